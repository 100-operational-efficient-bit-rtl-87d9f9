// bsfir_top: k-tap programmable FIR filter in transpose form, bit-serial with
// 100 % operational efficiency.
//
// y(n) = sum_{i=0}^{k-1} h_i * x(n-i), full precision, w + m + ceil(log2 k)
// bits, two's complement. Data words x(n) (w bits) enter LSB first back to
// back, one word every w clocks, with no zero bits between them; the
// coefficients h_i (m bits) are applied in parallel and may be changed
// between words.
//
// Structure: k multiply-accumulate units (ma_unit), all fed the broadcast
// data bit and control signals R and R_1 from fir_ctrl. Unit i computes
// P_i(n) = h_i x(n) + P_{i+1}(n-1). Its result is handed to unit i-1 as
//   - low bits 0..m-1: straight into the lower shift register of unit i-1,
//     which uploads them into its carry delays at the next R;
//   - low bits m..w-1: through the external register R_L (w-m delays) to the
//     free sum input A of unit i-1 during phases 0..w-m-1 of the next word;
//   - high bits w..w+m-1: through the external register R_H (w-m delays) to
//     A during phases w-m..w-1;
//   - high bits w+m.. (overflow bits): through the same R_H into input B of
//     unit i-1 one word later, where they are appended to its high part.
// Unit k-1 takes the sign correction constant (sign_bias_src) instead of a
// neighbour's result; after reset its carry delays hold the low bits of that
// constant, as if it had been handed over in the word before. Unit 0 gives
// the filter output.
//
// Output timing: y_l carries bits 0..w-1 of y(n) in the same clocks as the
// bits of x(n) (combinational from x_in), y_h carries bits w..w+m+log2(k)-1
// of y(n) in phases 0..m+log2(k)-1 of the next word. Later phases of y_h
// carry nothing meaningful. Outputs for the first k-1 samples after reset
// (y_l_valid / y_h_valid low) include the reset state of the chain.
// Coefficients may change only in phase 0; an assertion checks this in
// simulation.
module bsfir_top
  import bsfir_pkg::*;
#(
  parameter int unsigned W_X = 16,  // w: input data width
  parameter int unsigned M   = 12,  // m: coefficient width
  parameter int unsigned K   = 3,   // k: number of taps
  localparam int unsigned PW = (W_X > 1) ? $clog2(W_X) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                x_in,        // x(n), LSB first, phase 0 = LSB
  input  logic [K-1:0][M-1:0] coef,        // h_i, two's complement
  output logic                y_l,         // y(n) bits 0..w-1
  output logic                y_h,         // y(n-1) bits w..
  output logic [PW-1:0]       phase,       // bit position of the current clock
  output logic                word_start,  // phase 0
  output logic                y_l_valid,
  output logic                y_h_valid
);
  localparam int unsigned LG   = $clog2(K);
  localparam logic [63:0]  BIAS = sign_bias(W_X, M, K);

  logic r, a_sel, lo_en;
  logic [K-1:0] p_l, p_h, l_in, a_in, b_in;
  logic bias_l, bias_a, bias_b;

  fir_ctrl #(.W_X(W_X), .M(M), .K(K)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .phase     (phase),
    .r         (r),
    .a_sel     (a_sel),
    .lo_en     (lo_en),
    .word_start(word_start),
    .y_l_valid (y_l_valid),
    .y_h_valid (y_h_valid)
  );

  sign_bias_src #(.W_X(W_X), .M(M), .K(K)) u_bias (
    .phase(phase),
    .l_bit(bias_l),
    .a_bit(bias_a),
    .b_bit(bias_b)
  );

  for (genvar i = 0; i < K; i++) begin : g_tap
    if (i == K - 1) begin : g_head
      assign l_in[i] = bias_l;
      assign a_in[i] = bias_a;
      assign b_in[i] = bias_b;
    end else begin : g_link
      logic rl_q, rh_q;
      serial_delay #(.DEPTH(W_X - M)) u_rl (
        .clk(clk), .rst_n(rst_n), .d(p_l[i+1]), .q(rl_q)
      );
      serial_delay #(.DEPTH(W_X - M)) u_rh (
        .clk(clk), .rst_n(rst_n), .d(p_h[i+1]), .q(rh_q)
      );
      assign l_in[i] = p_l[i+1];
      assign a_in[i] = a_sel ? rh_q : rl_q;
      assign b_in[i] = rh_q;
    end

    ma_unit #(
      .W_X       (W_X),
      .M         (M),
      .CARRY_INIT((i == K - 1) ? BIAS[M-1:0] : '0)
    ) u_ma (
      .clk  (clk),
      .rst_n(rst_n),
      .x    (x_in),
      .coef (coef[i]),
      .r    (r),
      .lo_en(lo_en),
      .l_in (l_in[i]),
      .a_in (a_in[i]),
      .b_in (b_in[i]),
      .p_l  (p_l[i]),
      .p_h  (p_h[i])
    );
  end

  assign y_l = p_l[0];
  assign y_h = p_h[0];

  // Usage rule: the coefficients may only change in phase 0 (right after the
  // clock edge that ends a word); within a word every tap needs a stable h_i.
  a_coef_stable : assert property (
    @(posedge clk) (phase != '0) |-> $stable(coef)
  ) else $error("bsfir_top: coef changed in the middle of a word");

  if (M + LG > W_X) begin : g_bad_width
    $error("bsfir_top: the design needs M + log2(K) <= W_X");
  end
  if (out_width(W_X, M, K) > 64) begin : g_too_wide
    $error("bsfir_top: output wider than 64 bits");
  end
endmodule
