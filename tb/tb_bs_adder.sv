// tb_bs_adder: self-checking testbench of the bit-serial adder.
// Random pairs of N-bit words are streamed LSB first, back to back, with
// `last` on the final bit of each word; every sum bit is compared with the
// bits of (a + b) mod 2^N worked out in the testbench.
module tb_bs_adder;
  localparam int N     = 10;
  localparam int WORDS = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  logic last, a, b, s;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  bs_adder dut (.clk(clk), .rst_n(rst_n), .last(last), .a(a), .b(b), .s(s));

  initial begin : watchdog
    repeat (WORDS * N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] av, bv, sv;
    last = 1'b0; a = 1'b0; b = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < WORDS; n++) begin
      av = N'($urandom);
      bv = N'($urandom);
      if (n % 7 == 0) begin av = '1; bv = '1; end  // longest carry chain
      sv = av + bv;
      for (int t = 0; t < N; t++) begin
        @(negedge clk);
        a = av[t]; b = bv[t]; last = (t == N - 1);
        #1;
        checks++;
        if (s !== sv[t]) begin
          failures++;
          if (failures < 10) $display("word %0d bit %0d: got %b want %b", n, t, s, sv[t]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
