// bs_adder: bit-serial adder, one full adder and a carry delay element with
// reset.
//
// Adds two LSB-first serial operands one bit per clock: s = a ^ b ^ carry,
// and the carry out is kept for the next bit. In the multiply-accumulate unit
// it turns the carry-save high part of a product into binary. `last` marks
// the final bit of a word: the carry is cleared at the end of that clock so
// the next word starts with carry 0.
//
// Timing: s is combinational from a, b and the stored carry (same clock).
// Ports: clk, rst_n (asynchronous, active low), last, a, b -> s.
module bs_adder (
  input  logic clk,
  input  logic rst_n,
  input  logic last,
  input  logic a,
  input  logic b,
  output logic s
);
  logic cy_q;

  assign s = a ^ b ^ cy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    cy_q <= 1'b0;
    else if (last) cy_q <= 1'b0;
    else           cy_q <= (a & b) | (a & cy_q) | (b & cy_q);
  end
endmodule
