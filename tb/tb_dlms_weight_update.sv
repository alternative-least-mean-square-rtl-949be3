// tb_dlms_weight_update: self-checking testbench of dlms_weight_update.
//
// x, d and dhat are driven with independent random values (x and the error
// over the full 12-bit range in one phase, small values in another), so the
// block is tested on its own, without a filter closing the loop. Expected:
//   err(n)      = d(n) - dhat(n), cut to 12 bits
//   me(n+1)     = err(n) >> 1            (mu = 2^-7, 6 fraction bits)
//   w_k(n+1)    = w_k(n) + me(n) x(n-2-k), cut to 12 bits
// so a nonzero error first moves the weights two clock edges later. A
// synchronous reset must clear the weights and the delay lines.
module tb_dlms_weight_update;
  localparam int TAPS = 16, DATA_W = 12, COEF_W = 12;

  logic clk = 1'b0;
  logic rst;
  logic signed [DATA_W-1:0] x, d, dhat, err;
  logic signed [COEF_W-1:0] w [TAPS];

  int checks = 0, failures = 0;

  dlms_weight_update dut (.clk(clk), .rst(rst), .x(x), .d(d), .dhat(dhat), .err(err), .w(w));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint xh [TAPS+3];    // xh[i] = x(n-i)
  longint wm [TAPS];
  longint me;

  function automatic longint cut(longint v, int bits);
    longint m = longint'(1) << bits;
    v = v % m;
    if (v < 0) v += m;
    return (v >= m / 2) ? v - m : v;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s = %0d, expected %0d", what, got, exp);
    end
  endtask

  task automatic model_reset();
    foreach (xh[i]) xh[i] = 0;
    foreach (wm[k]) wm[k] = 0;
    me = 0;
  endtask

  task automatic run(int n, int range);
    longint e;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      rst = 1'b0;
      x    = DATA_W'(int'($urandom_range(2 * range)) - range);
      d    = DATA_W'(int'($urandom_range(2 * range)) - range);
      dhat = DATA_W'(int'($urandom_range(2 * range)) - range);
      #1;
      e = cut(longint'(d) - longint'(dhat), DATA_W);
      check("err", err, e);
      for (int k = 0; k < TAPS; k++) check("w", w[k], wm[k]);
      @(posedge clk);
      for (int k = 0; k < TAPS; k++) wm[k] = cut(wm[k] + cut(me * xh[2 + k], COEF_W), COEF_W);
      me = e >>> 1;
      for (int j = TAPS + 2; j > 1; j--) xh[j] = xh[j-1];
      xh[1] = x;
    end
  endtask

  initial begin
    rst = 1'b1; x = '0; d = '0; dhat = '0;
    repeat (2) @(posedge clk);
    model_reset();
    run(30, 5);
    run(1500, 40);
    @(negedge clk); rst = 1'b1; @(posedge clk); #1; model_reset();
    check("w0 after reset", w[0], 0);
    run(1500, 2047);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
