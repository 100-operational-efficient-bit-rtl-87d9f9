// serial_delay: a DEPTH-stage shift register delaying a serial bit stream by
// exactly DEPTH clocks.
//
// In the filter these are the external registers between two neighbouring
// multiply-accumulate units: one delays the low part of a unit's result, the
// other its high part, each by w - m clocks so that the bits reach the free sum
// input of the next unit at the right weight. The registers shift on every
// clock and are cleared by reset.
//
// Timing: a bit applied to d during clock t is on q during clock t + DEPTH.
module serial_delay #(
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic [DEPTH-1:0] sr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr_q <= '0;
    else        sr_q <= (sr_q >> 1) | (DEPTH'(d) << (DEPTH - 1));
  end

  assign q = sr_q[0];
endmodule
