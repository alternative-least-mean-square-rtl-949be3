// dlms_direct: direct-form delayed-LMS adaptive FIR filter.
//
// A fir_direct filter block (registered x delay line, unregistered adder
// chain) produces dhat from the current weights; a dlms_weight_update block
// forms the error, scales it by mu = 2^-MU_SHIFT, registers it and adapts the
// weights. This is the simplest of the three forms and the slowest: its
// critical path is one multiplier plus a TAPS-long adder chain, followed by
// the error subtractor.
//
// Interface and timing: one sample of x and of the desired signal d per
// clock. dhat(n) = sum_k w[k](n) * x[n-1-k] (scaled by 2^-COEF_FRAC), so d(n)
// should be the desired response to x up to x[n-1]. err = d - dhat in the
// same cycle; w[k](n+1) = w[k](n) + mu*e(n-1)*x[n-2-k]. rst is synchronous and
// clears all state, weights included.
//
// The structure follows the published direct-form DLMS filter; numeric
// details (binary point, error sign, wrap-around, reset) are this design's own
// choices, listed with the blocks it uses.
module dlms_direct
  import dlms_pkg::*;
#(
  parameter int unsigned TAPS      = DEF_TAPS,
  parameter int unsigned DATA_W    = DEF_DATA_W,
  parameter int unsigned COEF_W    = DEF_COEF_W,
  parameter int unsigned COEF_FRAC = DEF_COEF_FRAC,
  parameter int unsigned MU_SHIFT  = DEF_MU_SHIFT
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [DATA_W-1:0] x,
  input  logic signed [DATA_W-1:0] d,
  output logic signed [DATA_W-1:0] dhat,
  output logic signed [DATA_W-1:0] err,
  output logic signed [COEF_W-1:0] w [TAPS]
);

  fir_direct #(
    .TAPS(TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC)
  ) u_filter (
    .clk (clk),
    .rst (rst),
    .x   (x),
    .w   (w),
    .dhat(dhat)
  );

  dlms_weight_update #(
    .TAPS(TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC),
    .MU_SHIFT(MU_SHIFT)
  ) u_update (
    .clk (clk),
    .rst (rst),
    .x   (x),
    .d   (d),
    .dhat(dhat),
    .err (err),
    .w   (w)
  );

endmodule
