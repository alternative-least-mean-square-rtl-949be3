// tb_hybrid_section: self-checking testbench of hybrid_section (one
// three-tap section of the hybrid filter).
//
// x_in, the three coefficients and sum_in get new random values every cycle.
// Expected, from the input history:
//   sum_out(n) = w0(n) x_in(n) + w1(n) x_in(n-1) + w2(n) x_in(n-2) + sum_in(n-1)
//   x_out(n)   = x_in(n-2)
// at the full 28-bit width, wrapping. A synchronous reset must clear the x
// registers and the sum register.
module tb_hybrid_section;
  localparam int NT = 3, DATA_W = 12, COEF_W = 12, ACC_W = 28;

  logic clk = 1'b0;
  logic rst;
  logic signed [DATA_W-1:0] x_in, x_out;
  logic signed [COEF_W-1:0] w [NT];
  logic signed [ACC_W-1:0]  sum_in, sum_out;

  int checks = 0, failures = 0;

  hybrid_section dut (.clk(clk), .rst(rst), .x_in(x_in), .w(w), .sum_in(sum_in),
                      .x_out(x_out), .sum_out(sum_out));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint xh [NT];      // xh[i] = x_in(n-i)
  longint sprev;        // sum_in(n-1)

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s = %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    longint e;
    rst = 1'b1; x_in = '0; sum_in = '0;
    foreach (w[i]) w[i] = '0;
    repeat (2) @(posedge clk);
    foreach (xh[i]) xh[i] = 0;
    sprev = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      if (n == 2000) begin        // reset in the middle of the run
        rst = 1'b1;
        @(posedge clk);
        foreach (xh[i]) xh[i] = 0;
        sprev = 0;
        @(negedge clk);
      end
      rst = 1'b0;
      x_in = DATA_W'($urandom);
      sum_in = ACC_W'($urandom);
      foreach (w[i]) w[i] = COEF_W'($urandom);
      xh[0] = x_in;
      #1;
      e = sprev;
      for (int i = 0; i < NT; i++) e += longint'(w[i]) * xh[i];
      check("sum_out", sum_out, longint'(ACC_W'(e)));
      check("x_out", x_out, xh[NT-1]);
      @(posedge clk);
      for (int i = NT - 1; i > 0; i--) xh[i] = xh[i-1];
      sprev = sum_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
