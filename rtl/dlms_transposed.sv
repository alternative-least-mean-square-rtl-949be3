// dlms_transposed: transposed-form delayed-LMS adaptive FIR filter.
//
// A fir_transposed filter block (x broadcast to every multiplier, registers
// in the adder chain) produces a registered dhat; a dlms_weight_update block
// forms the error, scales it by mu = 2^-MU_SHIFT, registers it and adapts the
// weights. The filter's critical path is one multiplier and one adder for any
// number of taps, which is why this form is the fastest of the three.
//
// Interface and timing: one sample of x and d per clock.
// dhat(n) = sum_k w[k](n-1-k) * x[n-1-k] (scaled by 2^-COEF_FRAC): each tap's
// product uses the weight of the cycle in which it was formed, so while the
// weights change the response differs slightly from the direct form. err =
// d - dhat; w[k](n+1) = w[k](n) + mu*e(n-1)*x[n-2-k]. rst is synchronous and
// clears all state.
//
// The structure follows the published transposed DLMS filter; numeric
// details are this design's own choices, listed with the blocks it uses.
module dlms_transposed
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

  fir_transposed #(
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
