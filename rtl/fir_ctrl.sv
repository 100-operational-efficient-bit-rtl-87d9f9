// fir_ctrl: word-timing controller of the bit-serial filter.
//
// A counter runs through the w bit positions of a data word (phase 0 = LSB,
// phase w-1 = sign bit) without gaps and is shared by all taps. From it:
//   r          R of the published scheme: last clock of a word; the units download
//              their high part and swap carry state, and it marks the data
//              sign bit.
//   a_sel      R_1 of the published scheme: selects, for the free sum input A, the
//              delayed low part (0, phases 0..w-m-1) or the delayed high part
//              (1, phases w-m..w-1).
//   lo_en      phases 0..m-1: the lower shift registers take the neighbour's
//              low bits and the bit-serial adders see the carry vector.
//   word_start phase 0.
//   y_l_valid / y_h_valid: the serial output bits belong to a sample whose
//              whole tap history was computed after reset (the low part from
//              word k-1 on, the high part one word later). Before that the
//              outputs hold the start-up transient.
// The exact encodings of R and R_1 are this design's choice; the published scheme
// names the signals but does not define them bit by bit.
module fir_ctrl #(
  parameter int unsigned W_X = 16,  // w
  parameter int unsigned M   = 12,  // m
  parameter int unsigned K   = 3,   // k taps
  localparam int unsigned PW = (W_X > 1) ? $clog2(W_X) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [PW-1:0] phase,
  output logic          r,
  output logic          a_sel,
  output logic          lo_en,
  output logic          word_start,
  output logic          y_l_valid,
  output logic          y_h_valid
);
  localparam int unsigned CW = $clog2(K + 1);

  logic [PW-1:0] phase_q;
  logic [CW-1:0] words_q;  // completed words since reset, saturating at K

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q <= '0;
      words_q <= '0;
    end else if (phase_q == PW'(W_X - 1)) begin
      phase_q <= '0;
      if (words_q != CW'(K)) words_q <= words_q + 1'b1;
    end else begin
      phase_q <= phase_q + 1'b1;
    end
  end

  assign phase      = phase_q;
  assign r          = (phase_q == PW'(W_X - 1));
  assign a_sel      = (phase_q >= PW'(W_X - M));
  assign lo_en      = (phase_q < PW'(M));
  assign word_start = (phase_q == '0);
  assign y_l_valid  = (words_q >= CW'(K - 1));
  assign y_h_valid  = (words_q == CW'(K));
endmodule
