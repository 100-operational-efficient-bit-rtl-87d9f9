// tb_bsfir_sizes: the bit-serial FIR filter at other sizes than the default.
// Runs, side by side, the 4-tap filter of the direct/transpose comparison
// figures with w = 16, m = 12, an 8-tap filter (three growth bits,
// m + log2 k = 15 <= w = 16), a 2-tap filter, and a small 8-bit-data filter
// with a 5-bit coefficient (m + log2 k = 7 <= w = 8). Each instance checks
// every output bit against a full-precision reference (see fir_run).
module tb_bsfir_sizes;
  logic clk = 1'b0;
  int   c [4];
  int   f [4];
  logic d [4];
  int   checks, failures;

  always #5 clk = ~clk;

  fir_run #(.W_X(16), .M(12), .K(4), .WORDS(300)) u_k4 (.clk(clk), .checks(c[0]), .failures(f[0]), .done(d[0]));
  fir_run #(.W_X(16), .M(12), .K(8), .WORDS(300)) u_k8 (.clk(clk), .checks(c[1]), .failures(f[1]), .done(d[1]));
  fir_run #(.W_X(16), .M(12), .K(2), .WORDS(300)) u_k2 (.clk(clk), .checks(c[2]), .failures(f[2]), .done(d[2]));
  fir_run #(.W_X(8),  .M(5),  .K(4), .WORDS(300)) u_w8 (.clk(clk), .checks(c[3]), .failures(f[3]), .done(d[3]));

  function automatic void report(input int extra);
    checks = 0; failures = extra;
    for (int i = 0; i < 4; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endfunction

  initial begin : watchdog
    repeat (310 * 16 + 200) @(posedge clk);
    $display("watchdog expired");
    report(1);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);  // let the instances clear their flags first
    wait (d[0] && d[1] && d[2] && d[3]);
    report(0);
    $finish;
  end
endmodule
