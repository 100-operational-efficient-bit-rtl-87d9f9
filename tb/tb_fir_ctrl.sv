// tb_fir_ctrl: self-checking testbench of the word-timing controller.
// Follows the phase counter for many words and checks R, R_1 (a_sel), the
// lower-register enable, word_start and the two valid flags against a phase
// and word count kept in the testbench. The word period must be exactly W_X
// clocks.
module tb_fir_ctrl;
  localparam int W_X   = 16;
  localparam int M     = 12;
  localparam int K     = 3;
  localparam int PW    = $clog2(W_X);
  localparam int WORDS = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [PW-1:0] phase;
  logic r, a_sel, lo_en, word_start, y_l_valid, y_h_valid;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  fir_ctrl #(.W_X(W_X), .M(M), .K(K)) dut (
    .clk(clk), .rst_n(rst_n), .phase(phase), .r(r), .a_sel(a_sel),
    .lo_en(lo_en), .word_start(word_start), .y_l_valid(y_l_valid),
    .y_h_valid(y_h_valid)
  );

  task automatic check(input logic got, input logic want, input string what, input int c);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("cycle %0d %s: got %b want %b", c, what, got, want);
    end
  endtask

  initial begin : watchdog
    repeat (WORDS * W_X + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, n, last_start, periods;
    repeat (2) @(negedge clk);
    last_start = -1; periods = 0;
    for (int c = 0; c < WORDS * W_X; c++) begin
      @(negedge clk);
      rst_n = 1'b1;  // the first clock after reset is phase 0
      #1;
      t = c % W_X;
      n = c / W_X;
      checks++;
      if (int'(phase) != t) begin
        failures++;
        if (failures < 10) $display("cycle %0d phase %0d want %0d", c, phase, t);
      end
      check(r, t == W_X - 1, "r", c);
      check(a_sel, t >= W_X - M, "a_sel", c);
      check(lo_en, t < M, "lo_en", c);
      check(word_start, t == 0, "word_start", c);
      check(y_l_valid, n >= K - 1, "y_l_valid", c);
      check(y_h_valid, n >= K, "y_h_valid", c);
      if (word_start) begin
        if (last_start >= 0) begin
          periods++;
          check(1'b1, (c - last_start) == W_X, "word period", c);
        end
        last_start = c;
      end
    end
    check(1'b1, periods == WORDS - 1, "number of words", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
