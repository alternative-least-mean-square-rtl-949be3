// tb_dlms_sizes: the three filter forms at the smaller evaluated lengths,
// 4 and 8 taps, with x in -5..+5 and mu = 2^-7 (the published test setup).
//
// Two dlms_top instances (TAPS = 4 and TAPS = 8) each identify a random plant
// of their own length, d(n) = (sum_k h_k x(n-1-k)) >> 6. Every output, error
// and weight of every form is compared each cycle with dlms_ref_pkg, and
// after 1500 samples each form must have learned its plant (mean |err| over
// the last 256 samples at most 3). The 16-tap case is run by tb_dlms_top.
module tb_dlms_sizes;
  import dlms_ref_pkg::*;

  localparam int DATA_W = 12, COEF_W = 12, FRAC = 6, MU = 7;

  logic clk = 1'b0;
  logic rst;
  logic signed [DATA_W-1:0] x, d4, d8;

  logic signed [DATA_W-1:0] dh4 [3], e4 [3], dh8 [3], e8 [3];
  logic signed [COEF_W-1:0] w4 [3][4];
  logic signed [COEF_W-1:0] w8 [3][8];

  int checks = 0, failures = 0;

  dlms_top #(.TAPS(4)) dut4 (
    .clk(clk), .rst(rst), .x(x), .d(d4),
    .dhat_direct(dh4[0]),     .err_direct(e4[0]),     .w_direct(w4[0]),
    .dhat_transposed(dh4[1]), .err_transposed(e4[1]), .w_transposed(w4[1]),
    .dhat_hybrid(dh4[2]),     .err_hybrid(e4[2]),     .w_hybrid(w4[2])
  );

  dlms_top #(.TAPS(8)) dut8 (
    .clk(clk), .rst(rst), .x(x), .d(d8),
    .dhat_direct(dh8[0]),     .err_direct(e8[0]),     .w_direct(w8[0]),
    .dhat_transposed(dh8[1]), .err_transposed(e8[1]), .w_transposed(w8[1]),
    .dhat_hybrid(dh8[2]),     .err_hybrid(e8[2]),     .w_hybrid(w8[2])
  );

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  dlms_ref r4 [3], r8 [3];
  int h4 [4], h8 [8];
  int xh [8];
  longint abs4 [3], abs8 [3];

  function automatic int plant(int taps);
    longint s = 0;
    for (int k = 0; k < taps; k++) s += longint'((taps == 4) ? h4[k] : h8[k]) * xh[k];
    return int'(wrap(s >>> FRAC, DATA_W));
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s = %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    r4[0] = new(ARCH_DIRECT, 4, DATA_W, COEF_W, FRAC, MU);
    r4[1] = new(ARCH_TRANSPOSED, 4, DATA_W, COEF_W, FRAC, MU);
    r4[2] = new(ARCH_HYBRID, 4, DATA_W, COEF_W, FRAC, MU);
    r8[0] = new(ARCH_DIRECT, 8, DATA_W, COEF_W, FRAC, MU);
    r8[1] = new(ARCH_TRANSPOSED, 8, DATA_W, COEF_W, FRAC, MU);
    r8[2] = new(ARCH_HYBRID, 8, DATA_W, COEF_W, FRAC, MU);
    foreach (h4[k]) h4[k] = int'($urandom_range(192)) - 96;
    foreach (h8[k]) h8[k] = int'($urandom_range(192)) - 96;
    foreach (xh[k]) xh[k] = 0;
    foreach (abs4[f]) begin abs4[f] = 0; abs8[f] = 0; end
    x = '0; d4 = '0; d8 = '0; rst = 1'b1;
    @(posedge clk);
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      rst = 1'b0;
      x  = DATA_W'(int'($urandom_range(10)) - 5);
      d4 = DATA_W'(plant(4));
      d8 = DATA_W'(plant(8));
      #1;
      for (int f = 0; f < 3; f++) begin
        check("dhat4", dh4[f], r4[f].dhat());
        check("err4", e4[f], r4[f].err(d4));
        check("dhat8", dh8[f], r8[f].dhat());
        check("err8", e8[f], r8[f].err(d8));
        for (int k = 0; k < 4; k++) check("w4", w4[f][k], r4[f].weight(k));
        for (int k = 0; k < 8; k++) check("w8", w8[f][k], r8[f].weight(k));
        if (n >= 1500 - 256) begin
          abs4[f] += (e4[f] < 0) ? -e4[f] : e4[f];
          abs8[f] += (e8[f] < 0) ? -e8[f] : e8[f];
        end
      end
      @(posedge clk);
      for (int f = 0; f < 3; f++) begin
        r4[f].step(x, d4);
        r8[f].step(x, d8);
      end
      for (int k = 7; k > 0; k--) xh[k] = xh[k-1];
      xh[0] = x;
    end
    for (int f = 0; f < 3; f++) begin
      $display("form %0d: mean |err| 4 taps %0d/256, 8 taps %0d/256", f, abs4[f], abs8[f]);
      checks += 2;
      if (abs4[f] > 3 * 256) begin failures++; $display("4-tap form %0d did not converge", f); end
      if (abs8[f] > 3 * 256) begin failures++; $display("8-tap form %0d did not converge", f); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
