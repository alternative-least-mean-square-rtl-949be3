// tb_fir_transposed: self-checking testbench of fir_transposed (transposed-form filter block).
//
// The coefficients are driven with new random values every cycle and x with
// random values over the full 12-bit range, so every tap's timing and the
// wrap-around of the output are exercised. The expected output is computed
// from the history of x and of the coefficients:
//   dhat(n) = (sum_k w_k(n - a(k)) * x(n-1-k)) >> COEF_FRAC, cut to 12 bits,
// with a(k) = 1 + k (each product keeps the coefficient of the cycle it was formed in). A second phase holds the coefficients
// still and sends a single 1 (scaled to 2^6) into the filter: the impulse
// response must appear one cycle after the input, tap by tap, the latency
// all three filter forms share. A synchronous reset must clear the state.
module tb_fir_transposed;
  localparam int TAPS = 16, DATA_W = 12, COEF_W = 12, FRAC = 6, SEC = 3;

  logic clk = 1'b0;
  logic rst;
  logic signed [DATA_W-1:0] x, dhat;
  logic signed [COEF_W-1:0] w [TAPS];

  int checks = 0, failures = 0;

  fir_transposed dut (.clk(clk), .rst(rst), .x(x), .w(w), .dhat(dhat));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint xh [TAPS+2];           // xh[i] = x(n-i)
  longint wh [TAPS+2][TAPS];     // wh[t][k] = w_k(n-t)

  function automatic int age(int k);
    return 1 + k;
  endfunction

  function automatic longint expected();
    longint acc = 0;
    for (int k = 0; k < TAPS; k++) acc += wh[age(k)][k] * xh[1 + k];
    acc = acc >>> FRAC;
    return longint'(DATA_W'(acc));
  endfunction

  task automatic clear_hist();
    foreach (xh[i]) xh[i] = 0;
    foreach (wh[t, k]) wh[t][k] = 0;
  endtask

  task automatic cycle_once(logic signed [DATA_W-1:0] xv, bit newcoef, bit do_check);
    @(negedge clk);
    rst = 1'b0;
    x = xv;
    if (newcoef) for (int k = 0; k < TAPS; k++) w[k] = COEF_W'($urandom);
    for (int k = 0; k < TAPS; k++) wh[0][k] = w[k];
    #1;
    if (do_check) begin
      checks++;
      if (longint'(dhat) != longint'(DATA_W'(expected()))) begin
        failures++;
        if (failures < 10) $display("dhat = %0d, expected %0d", dhat, DATA_W'(expected()));
      end
    end
    @(posedge clk);
    for (int i = TAPS + 1; i > 0; i--) xh[i] = xh[i-1];
    xh[1] = xv;
    for (int t = TAPS + 1; t > 0; t--) wh[t] = wh[t-1];
  endtask

  initial begin
    logic signed [COEF_W-1:0] wfix [TAPS];
    rst = 1'b1; x = '0;
    for (int k = 0; k < TAPS; k++) w[k] = '0;
    clear_hist();
    repeat (2) @(posedge clk);
    for (int i = 0; i < 3000; i++) cycle_once(DATA_W'($urandom), 1'b1, 1'b1);
    // synchronous reset, then the output must be 0 for any coefficients
    @(negedge clk); rst = 1'b1; x = '0; @(posedge clk);
    clear_hist();
    @(negedge clk); rst = 1'b0;
    for (int k = 0; k < TAPS; k++) begin
      wfix[k] = COEF_W'($urandom_range(2000) - 1000);
      w[k] = wfix[k];
    end
    #1;
    checks++;
    if (dhat != 0) begin failures++; $display("output not cleared by reset"); end
    // impulse response with fixed coefficients: x = 64 once
    cycle_once(DATA_W'(64), 1'b0, 1'b1);
    for (int n = 0; n < TAPS + 4; n++) begin
      cycle_once('0, 1'b0, 1'b1);
      checks++;
      if (dhat != ((n < TAPS) ? DATA_W'(wfix[n]) : DATA_W'(0))) begin
        failures++;
        $display("impulse response at lag %0d: %0d, expected %0d", n + 1, dhat,
                 (n < TAPS) ? wfix[n] : 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
