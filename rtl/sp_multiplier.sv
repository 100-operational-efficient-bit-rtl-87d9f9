// sp_multiplier: carry-save serial-parallel multiplier core with a free sum
// input and a swappable carry state (the inner part of the modified
// multiplier used as multiply-accumulate unit).
//
// The multiplicand x arrives LSB first, one bit per clock, w bits per word
// with no gaps between words. The m-bit coefficient is applied in parallel.
// Cell j holds an AND gate (partial product bit), a full adder, a carry delay
// c[j] fed back to itself and a sum delay feeding cell j-1. The sum output of
// cell 0 is the product bit of the current clock, so the w least significant
// result bits leave on p_l during the w clocks of the word.
//
// Free sum input A (sum_in): the sum input of the top cell comes from an extra
// delay element loaded from sum_in. A bit applied during clock t of a word
// is added with weight 2^(t+m).
//
// Swap (R): during the last clock of a word (swap = 1) hi_sum / hi_carry carry
// the most significant part of the result in carry-save form; the enclosing
// unit loads them into its shift registers. At the end of that clock the sum
// delays are cleared and the carry delays take carry_load, so a value placed
// there (the m low bits of an incoming partial sum) is added, with weights
// 2^0 .. 2^(m-1), to the next result.
//
// Two's complement: the published scheme only says the unsigned circuit needs slight
// changes. This design inverts the partial-product bit of the coefficient sign
// cell on every bit except the data sign bit (x_msb = 1, the last bit of the
// word), and on that bit inverts the other cells instead. The array then
// produces x*h - C with the constant C of bsfir_pkg::sign_bias; the filter
// adds the total of these constants once, at the head of the chain.
//
// Reset clears the sum delays and sets the carry delays to CARRY_INIT (zero
// unless the unit heads the tap chain, where it holds the low bits of the
// sign correction so that the first word after reset is already corrected).
//
// Value held after the last clock of a word (weights relative to 2^w):
//   sum(hi_sum[i] * 2^i) + sum(hi_carry[i] * 2^i).
module sp_multiplier #(
  parameter int unsigned W_X = 16,  // w: data word length
  parameter int unsigned M   = 12,  // m: coefficient length
  parameter logic [M-1:0] CARRY_INIT = '0  // carry delay value after reset
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         x,           // serial data bit, LSB first
  input  logic         x_msb,       // high on the sign bit of x (last bit of the word)
  input  logic [M-1:0] coef,        // two's complement coefficient
  input  logic         sum_in,      // free sum input A
  input  logic         swap,        // R: end of word, download / upload
  input  logic [M-1:0] carry_load,  // value loaded into the carry delays at swap
  output logic         p_l,         // low result bit of this clock
  output logic [M-1:0] hi_sum,      // carry-save high part, sum vector
  output logic [M-1:0] hi_carry     // carry-save high part, carry vector
);
  logic [M:1]   s_q;  // sum delays; s_q[M] is the delay behind sum_in
  logic [M-1:0] c_q;  // carry delays
  logic [M-1:0] pp, fa_s, fa_c;

  always_comb begin
    for (int j = 0; j < M; j++) begin
      pp[j]   = (x & coef[j]) ^ ((j == M - 1) ^ x_msb);
      fa_s[j] = pp[j] ^ s_q[j+1] ^ c_q[j];
      fa_c[j] = (pp[j] & s_q[j+1]) | (pp[j] & c_q[j]) | (s_q[j+1] & c_q[j]);
    end
  end

  assign p_l      = fa_s[0];
  assign hi_sum   = {sum_in, fa_s[M-1:1]};
  assign hi_carry = fa_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q <= '0;
      c_q <= CARRY_INIT;
    end else if (swap) begin
      s_q <= '0;
      c_q <= carry_load;
    end else begin
      s_q <= {sum_in, fa_s[M-1:1]};
      c_q <= fa_c;
    end
  end

  if (M < 2 || M >= W_X) begin : g_bad_m
    $error("sp_multiplier: M must satisfy 2 <= M < W_X");
  end
endmodule
