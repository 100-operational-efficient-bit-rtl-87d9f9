// sign_bias_src: serial source of the two's complement correction constant
// for the first unit of the tap chain.
//
// The unit at the head of the chain (tap k-1) has no neighbour feeding it a
// partial sum. Its accumulation inputs are driven instead with the constant
// bsfir_pkg::sign_bias(w, m, k), which cancels the constants that the
// unsigned carry-save arrays of all k units introduce (see sp_multiplier).
// The bits are presented with the same timing a neighbouring unit and its
// external registers would give:
//   l_bit  during phase t < m:          bit t        (into the lower register)
//   a_bit  during phase t:              bit t + m    (free sum input A)
//   b_bit  during phase t < log2(k):    bit w + m + t (overflow input B)
// Purely combinational from the word phase; this block is this design's own
// addition; the published scheme leaves the signed version of the multiplier open.
module sign_bias_src
  import bsfir_pkg::*;
#(
  parameter int unsigned W_X = 16,
  parameter int unsigned M   = 12,
  parameter int unsigned K   = 3,
  localparam int unsigned PW = (W_X > 1) ? $clog2(W_X) : 1
) (
  input  logic [PW-1:0] phase,
  output logic          l_bit,
  output logic          a_bit,
  output logic          b_bit
);
  localparam int unsigned     W_Y  = out_width(W_X, M, K);
  localparam int unsigned     LG   = $clog2(K);
  localparam logic [63:0]     BIAS = sign_bias(W_X, M, K);

  always_comb begin
    l_bit = 1'b0;
    a_bit = 1'b0;
    b_bit = 1'b0;
    if (int'(phase) < M)  l_bit = BIAS[int'(phase)];
    if (int'(phase) + M < W_Y) a_bit = BIAS[int'(phase) + M];
    if (int'(phase) < LG) b_bit = BIAS[int'(phase) + W_X + M];
  end
endmodule
