// dlms_hybrid: hybrid-form delayed-LMS adaptive FIR filter.
//
// A fir_hybrid filter block (input register, then sections of SECTION_TAPS
// taps with x-line delays inside a section and a sum register between
// sections) produces dhat; a dlms_weight_update block forms the error, scales
// it by mu = 2^-MU_SHIFT, registers it and adapts the weights. The critical
// path is bounded by one section rather than by the whole filter, and the
// filter is a pipeline of identical sections.
//
// Interface and timing: one sample of x and d per clock.
// dhat(n) = sum_k w[k](n-j(k)) * x[n-1-k] (scaled by 2^-COEF_FRAC), with
// j(k) = k / SECTION_TAPS the section of tap k. err = d - dhat;
// w[k](n+1) = w[k](n) + mu*e(n-1)*x[n-2-k]. rst is synchronous and clears all
// state.
//
// The structure follows the published hybrid DLMS filter built from
// three-tap sections; numeric details are this design's own choices, listed
// with the blocks it uses.
module dlms_hybrid
  import dlms_pkg::*;
#(
  parameter int unsigned TAPS      = DEF_TAPS,
  parameter int unsigned DATA_W    = DEF_DATA_W,
  parameter int unsigned COEF_W    = DEF_COEF_W,
  parameter int unsigned COEF_FRAC = DEF_COEF_FRAC,
  parameter int unsigned MU_SHIFT  = DEF_MU_SHIFT,
  parameter int unsigned SECTION_TAPS = DEF_SECTION_TAPS
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [DATA_W-1:0] x,
  input  logic signed [DATA_W-1:0] d,
  output logic signed [DATA_W-1:0] dhat,
  output logic signed [DATA_W-1:0] err,
  output logic signed [COEF_W-1:0] w [TAPS]
);

  fir_hybrid #(
    .TAPS(TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC),
    .SECTION_TAPS(SECTION_TAPS)
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
