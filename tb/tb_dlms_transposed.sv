// tb_dlms_transposed: self-checking testbench of dlms_transposed (transposed delayed-LMS filter).
//
// Drives the filter with a system-identification task: x is random in
// -5..+5 (the input range of the published evaluation) and d is the output
// of a fixed random 16-tap plant, d(n) = (sum_k h_k x(n-1-k)) >> 6. Every
// cycle dhat, err and all weights are compared with dlms_ref_pkg, which
// computes them from the DLMS equations of this form. A middle phase uses
// inputs of +-300 so that sums and weights wrap; a synchronous reset in the
// run must clear all state. At the end, after a fresh reset and a
// training run with x in -4..+4, the mean |err| of the last 256 samples must
// be at most 3 (the filter has learned the plant). At 16 taps the
// transposed form is not stable for x in -5..+5 with mu = 2^-7, hence -4..+4.
module tb_dlms_transposed;
  import dlms_ref_pkg::*;

  localparam int TAPS = 16, DATA_W = 12, COEF_W = 12, FRAC = 6, MU = 7;

  logic clk = 1'b0;
  logic rst;
  logic signed [DATA_W-1:0] x, d, dhat, err;
  logic signed [COEF_W-1:0] w [TAPS];

  int checks = 0, failures = 0;
  int cycle = 0;

  dlms_transposed dut (.clk(clk), .rst(rst), .x(x), .d(d), .dhat(dhat), .err(err), .w(w));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  dlms_ref ref_m;
  int h [TAPS];
  int xhist [TAPS+1];

  function automatic int plant_d();
    longint s = 0;
    for (int k = 0; k < TAPS; k++) s += longint'(h[k]) * xhist[k];
    return int'(wrap(s >>> FRAC, DATA_W));
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10)
        $display("cycle %0d: %s = %0d, expected %0d", cycle, what, got, exp);
    end
  endtask

  // One cycle: apply x and d, compare, clock.
  task automatic run(int n, int xmax, bit do_rst = 0);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      rst = do_rst;
      x = DATA_W'($urandom_range(2 * xmax) - xmax);
      d = DATA_W'(plant_d());
      #1;
      if (!do_rst) begin
        check("dhat", dhat, ref_m.dhat());
        check("err", err, ref_m.err(d));
        for (int k = 0; k < TAPS; k++) check("w", w[k], ref_m.weight(k));
      end
      @(posedge clk);
      if (do_rst) ref_m.reset(); else ref_m.step(x, d);
      for (int k = TAPS; k > 0; k--) xhist[k] = xhist[k-1];
      xhist[0] = x;
    end
  endtask

  initial begin
    longint abs_sum;
    ref_m = new(ARCH_TRANSPOSED, TAPS, DATA_W, COEF_W, FRAC, MU);
    for (int k = 0; k < TAPS; k++) h[k] = int'($urandom_range(192)) - 96;
    for (int k = 0; k <= TAPS; k++) xhist[k] = 0;
    x = '0; d = '0; rst = 1'b1;
    run(3, 5, 1);
    run(600, 5);
    run(200, 300);
    run(2, 5, 1);
    run(400, 5);
    run(2, 5, 1);
    run(1200, 4);
    abs_sum = 0;
    for (int i = 0; i < 256; i++) begin
      run(1, 4);
      abs_sum += (err < 0) ? -err : err;
    end
    checks++;
    if (abs_sum > 3 * 256) begin
      failures++;
      $display("not converged: mean |err| = %0d/256", abs_sum);
    end
    $display("mean |err| after training: %0d/256", abs_sum);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
