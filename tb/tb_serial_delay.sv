// tb_serial_delay: self-checking testbench of the serial delay line.
// A random bit stream is applied; after reset the output must equal the
// input of exactly DEPTH clocks earlier (zeros before that).
module tb_serial_delay;
  localparam int DEPTH  = 4;
  localparam int CYCLES = 500;

  logic clk = 1'b0, rst_n = 1'b0;
  logic d, q;
  logic hist [CYCLES];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  serial_delay #(.DEPTH(DEPTH)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  initial begin : watchdog
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic want;
    d = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < CYCLES; c++) begin
      @(negedge clk);
      d = 1'($urandom);
      hist[c] = d;
      #1;
      want = (c >= DEPTH) ? hist[c-DEPTH] : 1'b0;
      checks++;
      if (q !== want) begin
        failures++;
        if (failures < 10) $display("cycle %0d: got %b want %b", c, q, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
