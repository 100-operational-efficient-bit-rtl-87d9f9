// ma_unit: multiply-accumulate unit of the filter, the modified 100 %
// efficient serial-parallel multiplier.
//
// It computes, for every data word, P = x * coef + Q (modulo 2^(w+m+log2 k),
// see sp_multiplier for the sign constant), where Q is the partial sum handed
// over by the neighbouring unit. There are no idle clocks: a new word enters
// while the previous result is still being converted.
//
// Parts: the serial-parallel core (sp_multiplier), an upper and a lower
// m-bit shift register and a bit-serial adder. At R (last clock of a word)
// the carry-save high part is downloaded, sum vector into the upper and carry
// vector into the lower register, and in the same clock the old content of
// the lower register is uploaded into the carry delays of the core (the two
// are interchanged). During the next word the adder adds the two registers
// bit by bit and sends the high part of P out on p_h.
//
// Accumulation inputs, all serial:
//   l_in  neighbour's low result bits 0..m-1, clocks 0..m-1 of a word; they
//         are shifted into the lower register (lo_en = 1) behind the carry
//         vector that is leaving it, and are uploaded into the carry delays
//         at the next R.
//   a_in  free sum input A: during clock t the bit of weight 2^(t+m) of Q.
//   b_in  serial input of the upper register: bits entering during clocks
//         0..log2(k)-1 leave it m clocks later and are added as high-part
//         bits m.. (the accumulation overflow bits of Q).
//
// Outputs: p_l, result bits 0..w-1 during clocks 0..w-1 of the word in which
// x enters (combinational); p_h, result bits w.. during clocks 0..m+log2(k)-1
// of the following word (combinational from registers).
module ma_unit #(
  parameter int unsigned W_X = 16,  // w
  parameter int unsigned M   = 12,  // m
  parameter logic [M-1:0] CARRY_INIT = '0  // carry delays after reset
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         x,       // serial data, LSB first
  input  logic [M-1:0] coef,    // two's complement coefficient h_i
  input  logic         r,       // R: last clock of the word (also the data sign bit)
  input  logic         lo_en,   // clocks 0..m-1 of the word
  input  logic         l_in,    // neighbour low part, into the lower register
  input  logic         a_in,    // free sum input A
  input  logic         b_in,    // overflow bits, into the upper register
  output logic         p_l,
  output logic         p_h
);
  logic [M-1:0] hi_sum, hi_carry;
  logic [M-1:0] up_q, lo_q;

  sp_multiplier #(.W_X(W_X), .M(M), .CARRY_INIT(CARRY_INIT)) u_core (
    .clk       (clk),
    .rst_n     (rst_n),
    .x         (x),
    .x_msb     (r),
    .coef      (coef),
    .sum_in    (a_in),
    .swap      (r),
    .carry_load(lo_q),
    .p_l       (p_l),
    .hi_sum    (hi_sum),
    .hi_carry  (hi_carry)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up_q <= '0;
      lo_q <= '0;
    end else if (r) begin
      up_q <= hi_sum;
      lo_q <= hi_carry;
    end else begin
      up_q <= {b_in, up_q[M-1:1]};
      if (lo_en) lo_q <= {l_in, lo_q[M-1:1]};
    end
  end

  bs_adder u_add (
    .clk  (clk),
    .rst_n(rst_n),
    .last (r),
    .a    (up_q[0]),
    .b    (lo_q[0] & lo_en),
    .s    (p_h)
  );

  if (M >= W_X) begin : g_bad_m
    $error("ma_unit: M must be smaller than W_X");
  end
endmodule
