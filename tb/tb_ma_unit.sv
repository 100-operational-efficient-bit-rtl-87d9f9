// tb_ma_unit: self-checking testbench of the multiply-accumulate unit.
// The unit's neighbour is modelled by the testbench: for every word n it
// chooses a random partial sum Q(n) of W_Y = w+m+LG bits and presents it with
// the timing of the filter:
//   l_in, word n,   phases 0..m-1  : Q(n) bits 0..m-1 (junk at other phases)
//   a_in, word n+1, phase t        : Q(n) bit t+m
//   b_in, word n+2, phases 0..LG-1 : Q(n) bits w+m.. (junk at other phases)
// The unit must return R(n) = x(n)*h(n) - C + Q(n-1) mod 2^W_Y, low bits on
// p_l during word n and high bits on p_h in phases 0..m+LG-1 of word n+1.
// The coefficient changes every word.
module tb_ma_unit;
  localparam int W_X   = 16;
  localparam int M     = 12;
  localparam int LG    = 2;               // log2 of a 3- or 4-tap chain
  localparam int W_Y   = W_X + M + LG;
  localparam int WORDS = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  logic x, r, lo_en, l_in, a_in, b_in, p_l, p_h;
  logic [M-1:0] coef;
  int   checks = 0, failures = 0;

  logic [W_Y-1:0] q   [WORDS + 2];  // neighbour partial sums, index n+2
  logic [W_Y-1:0] res [WORDS + 2];  // expected results, index n+2

  always #5 clk = ~clk;

  ma_unit #(.W_X(W_X), .M(M)) dut (
    .clk(clk), .rst_n(rst_n), .x(x), .coef(coef), .r(r), .lo_en(lo_en),
    .l_in(l_in), .a_in(a_in), .b_in(b_in), .p_l(p_l), .p_h(p_h)
  );

  initial begin : watchdog
    repeat ((WORDS + 2) * W_X + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [W_X-1:0] xv;
    logic signed [M-1:0]   hv;
    longint                c_const;
    logic [W_Y-1:0]        qp1, qp2;
    c_const = (longint'(1) << (M - 1)) + (longint'(1) << (W_X - 1)) - (longint'(1) << (W_X + M - 1));
    x = 0; r = 0; lo_en = 0; l_in = 0; a_in = 0; b_in = 0; coef = '0;
    q[0] = '0; q[1] = '0; res[0] = '0; res[1] = '0;  // nothing before reset
    repeat (2) @(negedge clk);
    for (int n = 0; n < WORDS; n++) begin
      xv = W_X'($urandom);
      hv = M'($urandom);
      q[n+2] = W_Y'({$urandom, $urandom});
      if (n % 6 == 1) begin
        xv = {1'b1, {(W_X-1){1'b0}}}; hv = {1'b1, {(M-1){1'b0}}};
        q[n+2] = {2'b01, {(W_Y-2){1'b1}}};
      end
      if (n % 6 == 4) q[n+2] = {1'b1, {(W_Y-1){1'b0}}};
      qp1 = q[n+1];  // Q(n-1)
      qp2 = q[n];    // Q(n-2)
      res[n+2] = W_Y'(longint'(xv) * longint'(hv) - c_const + longint'(qp1));
      for (int t = 0; t < W_X; t++) begin
        @(negedge clk);
        coef = hv;
        rst_n = 1'b1;  // the first clock after reset is phase 0 of word 0
        r = (t == W_X - 1);
        lo_en = (t < M);
        x = xv[t];
        l_in = (t < M) ? q[n+2][t] : 1'($urandom);
        a_in = qp1[t+M];
        b_in = (t < LG) ? qp2[W_X+M+t] : 1'($urandom);
        #1;
        checks++;
        if (p_l !== res[n+2][t]) begin
          failures++;
          if (failures < 10) $display("word %0d low bit %0d: got %b want %b", n, t, p_l, res[n+2][t]);
        end
        if (n > 0 && t < M + LG) begin
          checks++;
          if (p_h !== res[n+1][W_X+t]) begin
            failures++;
            if (failures < 60) $display("word %0d high bit %0d: got %b want %b", n - 1, W_X + t, p_h, res[n+1][W_X+t]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
