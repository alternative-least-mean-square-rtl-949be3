// tb_dlms_top: end-to-end testbench of dlms_top at its default size
// (16 taps, 12-bit data and coefficients, mu = 2^-7).
//
// All three filter forms receive the same system-identification task: x is
// random and d is the output of a fixed random 16-tap plant with
// coefficients in -1.5 .. +1.5, d(n) = (sum_k h_k x(n-1-k)) >> 6. Every cycle the
// outputs, errors and weights of each form are compared with the reference
// model in dlms_ref_pkg. The run has three phases:
//   1. training with x in -4..+4: all three forms must learn the plant
//      (mean |err| over the last 256 samples at most 3);
//   2. a synchronous reset in mid-stream: every weight must be 0 afterwards;
//   3. training with x in -5..+5, the published input range: the direct and
//      hybrid forms must learn the plant; the transposed form is only
//      compared with the model, because with 16 taps its longer
//      weight-to-error delay makes it unstable at this input power.
// Mechanisms counted, each of which must occur: weight adaptation in each
// form, convergence of each form, and reset of the weights.
module tb_dlms_top;
  import dlms_ref_pkg::*;

  localparam int TAPS = 16, DATA_W = 12, COEF_W = 12, FRAC = 6, MU = 7;

  logic clk = 1'b0;
  logic rst;
  logic signed [DATA_W-1:0] x, d;
  logic signed [DATA_W-1:0] dhat [3], err [3];
  logic signed [COEF_W-1:0] w_d [TAPS], w_t [TAPS], w_h [TAPS];

  int checks = 0, failures = 0;
  int adapt_events [3] = '{0, 0, 0};
  int converged    [3] = '{0, 0, 0};
  int reset_events = 0;
  int cycle = 0;

  dlms_top dut (
    .clk(clk), .rst(rst), .x(x), .d(d),
    .dhat_direct(dhat[0]),     .err_direct(err[0]),     .w_direct(w_d),
    .dhat_transposed(dhat[1]), .err_transposed(err[1]), .w_transposed(w_t),
    .dhat_hybrid(dhat[2]),     .err_hybrid(err[2]),     .w_hybrid(w_h)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  dlms_ref ref_m [3];
  int h [TAPS];
  int xhist [TAPS];
  longint abs_sum [3];
  string names [3] = '{"direct", "transposed", "hybrid"};

  function automatic longint wgt(int f, int k);
    case (f)
      0:       return w_d[k];
      1:       return w_t[k];
      default: return w_h[k];
    endcase
  endfunction

  function automatic int plant_d();
    longint s = 0;
    for (int k = 0; k < TAPS; k++) s += longint'(h[k]) * xhist[k];
    return int'(wrap(s >>> FRAC, DATA_W));
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("cycle %0d: %s = %0d, expected %0d", cycle, what, got, exp);
    end
  endtask

  task automatic run(int n, int xmax);
    for (int f = 0; f < 3; f++) abs_sum[f] = 0;
    for (int i = 0; i < n; i++) begin
      longint wprev [3][TAPS];
      @(negedge clk);
      rst = 1'b0;
      x = DATA_W'(int'($urandom_range(2 * xmax)) - xmax);
      d = DATA_W'(plant_d());
      #1;
      for (int f = 0; f < 3; f++) begin
        check({names[f], " dhat"}, dhat[f], ref_m[f].dhat());
        check({names[f], " err"}, err[f], ref_m[f].err(d));
        for (int k = 0; k < TAPS; k++) begin
          check({names[f], " w"}, wgt(f, k), ref_m[f].weight(k));
          wprev[f][k] = wgt(f, k);
        end
        if (i >= n - 256) abs_sum[f] += (err[f] < 0) ? -err[f] : err[f];
      end
      @(posedge clk);
      #1;
      for (int f = 0; f < 3; f++) begin
        ref_m[f].step(x, d);
        for (int k = 0; k < TAPS; k++)
          if (wgt(f, k) != wprev[f][k]) begin adapt_events[f]++; break; end
      end
      for (int k = TAPS - 1; k > 0; k--) xhist[k] = xhist[k-1];
      xhist[0] = x;
    end
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst = 1'b1;
    @(posedge clk);
    #1;
    for (int f = 0; f < 3; f++) ref_m[f].reset();
    for (int k = 0; k < TAPS; k++) xhist[k] = 0;
    checks++;
    if (w_d.sum() == 0 && w_t.sum() == 0 && w_h.sum() == 0 &&
        w_d[0] == 0 && w_t[0] == 0 && w_h[0] == 0)
      reset_events++;
    else begin
      failures++;
      $display("weights not cleared by reset");
    end
  endtask

  initial begin
    ref_m[0] = new(ARCH_DIRECT,     TAPS, DATA_W, COEF_W, FRAC, MU);
    ref_m[1] = new(ARCH_TRANSPOSED, TAPS, DATA_W, COEF_W, FRAC, MU);
    ref_m[2] = new(ARCH_HYBRID,     TAPS, DATA_W, COEF_W, FRAC, MU);
    for (int k = 0; k < TAPS; k++) h[k] = int'($urandom_range(192)) - 96;
    x = '0; d = '0;
    do_reset();

    // phase 1
    run(2000, 4);
    for (int f = 0; f < 3; f++) begin
      $display("x in -4..4: %s mean |err| = %0d/256", names[f], abs_sum[f]);
      checks++;
      if (abs_sum[f] <= 3 * 256) converged[f]++;
      else begin failures++; $display("%s did not converge", names[f]); end
    end

    // phase 2: reset in mid-stream
    run(50, 5);
    do_reset();

    // phase 3
    run(2000, 5);
    for (int f = 0; f < 3; f++) begin
      $display("x in -5..5: %s mean |err| = %0d/256", names[f], abs_sum[f]);
      if (f != 1) begin
        checks++;
        if (abs_sum[f] <= 3 * 256) converged[f]++;
        else begin failures++; $display("%s did not converge", names[f]); end
      end
    end

    for (int f = 0; f < 3; f++) begin
      $display("%s: cycles with weight updates %0d, converged %0d time(s)",
               names[f], adapt_events[f], converged[f]);
      checks += 2;
      if (adapt_events[f] == 0) begin failures++; $display("%s never adapted", names[f]); end
      if (converged[f] == 0)    begin failures++; $display("%s never converged", names[f]); end
    end
    $display("resets: %0d", reset_events);
    checks++;
    if (reset_events < 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
