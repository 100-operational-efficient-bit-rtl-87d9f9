// tb_bsfir_top: end-to-end self-checking testbench of the bit-serial FIR
// filter at its default size (w = 16, m = 12, k = 3 taps, 30-bit output).
//
// Random 16-bit samples stream in back to back, LSB first, with no idle
// clocks. The coefficients are reprogrammed every few words on the fly, at a
// word boundary. For every sample the testbench forms
//     y(n) = sum_i h_i(n-i) * x(n-i)          (h_i as applied with x(n-i))
// in full precision and compares the serial outputs bit by bit: bits 0..15
// on y_l in the same clocks as x(n), bits 16..29 on y_h in phases 0..13 of
// the following word. It also checks the one-word-per-16-clocks rate, that
// the valid flags rise at words k-1 and k, and counts the mechanisms:
// coefficient reprogramming, results that need the log2(k) growth bits (the
// overflow path through input B), negative results and the extreme
// operand -2^(w-1) * -2^(m-1). A mechanism never seen counts as a failure.
module tb_bsfir_top;
  import bsfir_pkg::*;
  localparam int W_X   = 16;
  localparam int M     = 12;
  localparam int K     = 3;
  localparam int W_Y   = out_width(W_X, M, K);
  localparam int LG    = $clog2(K);
  localparam int PW    = $clog2(W_X);
  localparam int WORDS = 600;

  logic clk = 1'b0, rst_n = 1'b0;
  logic x_in, y_l, y_h, word_start, y_l_valid, y_h_valid;
  logic [K-1:0][M-1:0] coef;
  logic [PW-1:0] phase;
  int checks = 0, failures = 0;
  int n_reprogram = 0, n_growth = 0, n_negative = 0, n_extreme = 0, n_words = 0;

  logic signed [W_X-1:0] xs   [WORDS];
  logic [K-1:0][M-1:0]   hs   [WORDS];
  logic [W_Y-1:0]        yref [WORDS];

  always #5 clk = ~clk;

  bsfir_top dut (
    .clk(clk), .rst_n(rst_n), .x_in(x_in), .coef(coef), .y_l(y_l), .y_h(y_h),
    .phase(phase), .word_start(word_start), .y_l_valid(y_l_valid),
    .y_h_valid(y_h_valid)
  );

  task automatic check_bit(input logic got, input logic want, input string what, input int n, input int b);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 20) $display("word %0d %s bit %0d: got %b want %b", n, what, b, got, want);
    end
  endtask

  initial begin : watchdog
    repeat ((WORDS + 4) * W_X + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [K-1:0][M-1:0] hcur;
    longint acc;
    int start_cycle, cycle;
    logic signed [M-1:0] hsgn;
    x_in = 1'b0;
    coef = '0;
    hcur = '0;
    cycle = 0; start_cycle = 0;
    repeat (2) @(negedge clk);
    for (int n = 0; n < WORDS; n++) begin
      // choose the sample and, now and then, new coefficients
      xs[n] = W_X'($urandom);
      if (n % 9 == 0) begin
        for (int i = 0; i < K; i++) hcur[i] = M'($urandom);
        if (n > 0) n_reprogram++;
      end
      if (n % 50 >= 20 && n % 50 < 26) begin
        xs[n] = {1'b1, {(W_X-1){1'b0}}};
        for (int i = 0; i < K; i++) hcur[i] = (n % 100 < 50) ? {1'b1, {(M-1){1'b0}}} : {1'b0, {(M-1){1'b1}}};
      end
      hs[n] = hcur;
      acc = 0;
      for (int i = 0; i < K; i++) begin
        if (n - i >= 0) begin
          hsgn = hs[n-i][i];
          acc += longint'(xs[n-i]) * longint'(hsgn);
          if (xs[n-i] == {1'b1, {(W_X-1){1'b0}}} && hsgn == {1'b1, {(M-1){1'b0}}}) n_extreme++;
        end
      end
      yref[n] = W_Y'(acc);
      if (n >= K - 1) begin
        if (acc < 0) n_negative++;
        if (acc >= (longint'(1) << (W_X + M - 1)) || acc < -(longint'(1) << (W_X + M - 1))) n_growth++;
      end
      for (int t = 0; t < W_X; t++) begin
        @(negedge clk);
        rst_n = 1'b1;            // the first clock after reset is phase 0 of word 0
        if (t == 0) coef = hs[n];  // coefficients change right after a word boundary
        x_in = xs[n][t];
        #1;
        checks++;
        if (int'(phase) != t) begin
          failures++;
          if (failures < 20) $display("word %0d: phase %0d want %0d", n, phase, t);
        end
        if (t == 0) begin
          if (n > 0) begin
            checks++;
            if (cycle - start_cycle != W_X) begin
              failures++;
              $display("word %0d: period %0d clocks, want %0d", n, cycle - start_cycle, W_X);
            end
          end
          start_cycle = cycle;
          n_words++;
          check_bit(y_l_valid, n >= K - 1, "y_l_valid", n, 0);
          check_bit(y_h_valid, n >= K, "y_h_valid", n, 0);
        end
        if (n >= K - 1) check_bit(y_l, yref[n][t], "low", n, t);
        if (n >= K && t < M + LG) check_bit(y_h, yref[n-1][W_X+t], "high", n - 1, W_X + t);
        cycle++;
      end
    end
    $display("words %0d, reprogrammings %0d, growth-bit results %0d, negative %0d, extreme products %0d",
             n_words, n_reprogram, n_growth, n_negative, n_extreme);
    if (n_reprogram == 0) begin failures++; $display("coefficient reprogramming never exercised"); end
    if (n_growth == 0)    begin failures++; $display("accumulation growth bits never exercised"); end
    if (n_negative == 0)  begin failures++; $display("negative results never exercised"); end
    if (n_extreme == 0)   begin failures++; $display("extreme operands never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
