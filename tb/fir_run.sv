// fir_run: one bit-serial FIR filter of a given size together with its
// stimulus and checker, for testbenches that compare several sizes.
//
// Streams WORDS random samples back to back into a bsfir_top of size
// (W_X, M, K), reprograms the coefficients every few words, forces blocks
// of extreme operands (-2^(w-1) data with -2^(m-1) or 2^(m-1)-1
// coefficients, so that the log2(k) growth bits are needed) and compares
// every output bit with the full-precision sum of products computed here.
// Reports its counts on `checks` / `failures` and raises `done` at the end.
module fir_run #(
  parameter int W_X   = 16,
  parameter int M     = 12,
  parameter int K     = 3,
  parameter int WORDS = 300
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int LG  = $clog2(K);
  localparam int W_Y = W_X + M + LG;
  localparam int PW  = $clog2(W_X);

  logic rst_n = 1'b0;
  logic x_in, y_l, y_h, word_start, y_l_valid, y_h_valid;
  logic [K-1:0][M-1:0] coef;
  logic [PW-1:0] phase;

  logic signed [W_X-1:0] xs   [WORDS];
  logic [K-1:0][M-1:0]   hs   [WORDS];
  logic [W_Y-1:0]        yref [WORDS];

  bsfir_top #(.W_X(W_X), .M(M), .K(K)) dut (
    .clk(clk), .rst_n(rst_n), .x_in(x_in), .coef(coef), .y_l(y_l), .y_h(y_h),
    .phase(phase), .word_start(word_start), .y_l_valid(y_l_valid),
    .y_h_valid(y_h_valid)
  );

  task automatic check_bit(input logic got, input logic want, input string what, input int n, input int b);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("K=%0d w=%0d m=%0d word %0d %s bit %0d: got %b want %b", K, W_X, M, n, what, b, got, want);
    end
  endtask

  initial begin
    logic [K-1:0][M-1:0] hcur;
    logic signed [M-1:0] hsgn;
    longint acc;
    int n_growth;
    checks = 0; failures = 0; done = 1'b0; n_growth = 0;
    x_in = 1'b0; coef = '0; hcur = '0;
    repeat (2) @(negedge clk);
    for (int n = 0; n < WORDS; n++) begin
      xs[n] = W_X'($urandom);
      if (n % 7 == 0) for (int i = 0; i < K; i++) hcur[i] = M'($urandom);
      if (n % 40 >= 20 && n % 40 < 20 + K + 2) begin
        xs[n] = {1'b1, {(W_X-1){1'b0}}};
        for (int i = 0; i < K; i++) hcur[i] = (n % 80 < 40) ? {1'b1, {(M-1){1'b0}}} : {1'b0, {(M-1){1'b1}}};
      end
      hs[n] = hcur;
      acc = 0;
      for (int i = 0; i < K; i++) begin
        if (n - i >= 0) begin
          hsgn = hs[n-i][i];
          acc += longint'(xs[n-i]) * longint'(hsgn);
        end
      end
      yref[n] = W_Y'(acc);
      if (n >= K - 1 && (acc >= (longint'(1) << (W_X + M - 1)) || acc < -(longint'(1) << (W_X + M - 1))))
        n_growth++;
      for (int t = 0; t < W_X; t++) begin
        @(negedge clk);
        rst_n = 1'b1;
        if (t == 0) coef = hs[n];
        x_in = xs[n][t];
        #1;
        if (t == 0) begin
          check_bit(y_l_valid, n >= K - 1, "y_l_valid", n, 0);
          check_bit(y_h_valid, n >= K, "y_h_valid", n, 0);
        end
        if (n >= K - 1) check_bit(y_l, yref[n][t], "low", n, t);
        if (n >= K && t < M + LG) check_bit(y_h, yref[n-1][W_X+t], "high", n - 1, W_X + t);
      end
    end
    if (n_growth == 0) begin
      failures++;
      $display("K=%0d: accumulation growth bits never exercised", K);
    end
    $display("K=%0d w=%0d m=%0d: %0d words, %0d needing growth bits", K, W_X, M, WORDS, n_growth);
    done = 1'b1;
  end
endmodule
