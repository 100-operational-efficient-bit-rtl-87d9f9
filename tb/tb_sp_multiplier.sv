// tb_sp_multiplier: self-checking testbench of the serial-parallel
// multiplier core.
// Every word gets a random signed x, a random signed coefficient, a random
// value on the free sum input A and a random value uploaded into the carry
// delays at the preceding swap. The w low bits leaving p_l plus 2^w times the
// carry-save high part (hi_sum + hi_carry, sampled in the swap clock) must
// equal exactly
//     x*h - C + carry_load + A*2^m,   C = 2^(m-1) + 2^(w-1) - 2^(w+m-1),
// C being the constant of the sign handling. Extreme operands are mixed in.
module tb_sp_multiplier;
  localparam int W_X   = 16;
  localparam int M     = 12;
  localparam int WORDS = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  logic x, x_msb, sum_in, swap, p_l;
  logic [M-1:0] coef, carry_load, hi_sum, hi_carry;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  sp_multiplier #(.W_X(W_X), .M(M)) dut (
    .clk(clk), .rst_n(rst_n), .x(x), .x_msb(x_msb), .coef(coef),
    .sum_in(sum_in), .swap(swap), .carry_load(carry_load), .p_l(p_l),
    .hi_sum(hi_sum), .hi_carry(hi_carry)
  );

  initial begin : watchdog
    repeat (WORDS * W_X + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [W_X-1:0] xv;
    logic signed [M-1:0]   hv;
    logic [W_X-1:0]        av, low;
    logic [M-1:0]          cl_now, cl_next;
    longint                want, got, c_const;
    c_const = (longint'(1) << (M - 1)) + (longint'(1) << (W_X - 1)) - (longint'(1) << (W_X + M - 1));
    x = 0; x_msb = 0; sum_in = 0; swap = 0; coef = '0; carry_load = '0;
    cl_now = '0;  // the carry delays are cleared by reset
    repeat (2) @(negedge clk);
    for (int n = 0; n < WORDS; n++) begin
      xv = W_X'($urandom);
      hv = M'($urandom);
      av = W_X'($urandom);
      cl_next = M'($urandom);
      case (n % 5)
        1: begin xv = {1'b1, {(W_X-1){1'b0}}}; hv = {1'b1, {(M-1){1'b0}}}; end
        2: begin xv = '1; hv = '1; av = '1; cl_next = '1; end
        3: begin xv = {1'b0, {(W_X-1){1'b1}}}; hv = {1'b1, {(M-1){1'b0}}}; end
        default: ;
      endcase
      for (int t = 0; t < W_X; t++) begin
        @(negedge clk);
        coef = hv;
        rst_n = 1'b1;  // the first clock after reset is bit 0 of word 0
        x = xv[t]; x_msb = (t == W_X - 1); swap = (t == W_X - 1);
        sum_in = av[t]; carry_load = cl_next;
        #1;
        low[t] = p_l;
        if (t == W_X - 1) begin
          got  = longint'(low) + (longint'(hi_sum) + longint'(hi_carry)) * (longint'(1) << W_X);
          want = longint'(xv) * longint'(hv) - c_const + longint'(cl_now)
                 + longint'(av) * (longint'(1) << M);
          checks++;
          if (got != want) begin
            failures++;
            if (failures < 10) $display("word %0d x=%0d h=%0d: got %0d want %0d", n, xv, hv, got, want);
          end
        end
      end
      cl_now = cl_next;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
