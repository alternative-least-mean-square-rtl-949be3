// dlms_top: the three delayed-LMS adaptive filter architectures side by side.
//
// The direct, transposed and hybrid forms of the delayed-LMS (DLMS) adaptive
// FIR filter are alternative implementations of the same adaptive filter:
// they share the weight update block design and differ only in where the
// filter's pipeline registers sit. This top feeds all three from the same
// input stream x and desired signal d, so that their outputs, errors and
// learning curves can be compared sample by sample; each form has its own
// outputs. In a product one would keep only one form (the transposed form is
// the fastest at almost the same cost).
//
// Interface and timing: one sample of x and d per clock, 12-bit two's
// complement by default. Each form produces dhat_*, the error err_* = d -
// dhat_* and its weight bank w_* (COEF_FRAC fraction bits). The step size is
// fixed at 2^-MU_SHIFT. rst is synchronous, active high, and clears all
// state including the weights.
//
// The set of forms and their sizes follow the published design (12-bit data
// and coefficients, 16 taps, mu = 2^-7, three-tap hybrid sections); placing
// the three in one top with shared inputs is this design's own arrangement.
module dlms_top
  import dlms_pkg::*;
#(
  parameter int unsigned TAPS         = DEF_TAPS,
  parameter int unsigned DATA_W       = DEF_DATA_W,
  parameter int unsigned COEF_W       = DEF_COEF_W,
  parameter int unsigned COEF_FRAC    = DEF_COEF_FRAC,
  parameter int unsigned MU_SHIFT     = DEF_MU_SHIFT,
  parameter int unsigned SECTION_TAPS = DEF_SECTION_TAPS
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [DATA_W-1:0] x,
  input  logic signed [DATA_W-1:0] d,
  output logic signed [DATA_W-1:0] dhat_direct,
  output logic signed [DATA_W-1:0] err_direct,
  output logic signed [COEF_W-1:0] w_direct [TAPS],
  output logic signed [DATA_W-1:0] dhat_transposed,
  output logic signed [DATA_W-1:0] err_transposed,
  output logic signed [COEF_W-1:0] w_transposed [TAPS],
  output logic signed [DATA_W-1:0] dhat_hybrid,
  output logic signed [DATA_W-1:0] err_hybrid,
  output logic signed [COEF_W-1:0] w_hybrid [TAPS]
);

  dlms_direct #(
    .TAPS(TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC),
    .MU_SHIFT(MU_SHIFT)
  ) u_direct (
    .clk(clk), .rst(rst), .x(x), .d(d),
    .dhat(dhat_direct), .err(err_direct), .w(w_direct)
  );

  dlms_transposed #(
    .TAPS(TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC),
    .MU_SHIFT(MU_SHIFT)
  ) u_transposed (
    .clk(clk), .rst(rst), .x(x), .d(d),
    .dhat(dhat_transposed), .err(err_transposed), .w(w_transposed)
  );

  dlms_hybrid #(
    .TAPS(TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC),
    .MU_SHIFT(MU_SHIFT), .SECTION_TAPS(SECTION_TAPS)
  ) u_hybrid (
    .clk(clk), .rst(rst), .x(x), .d(d),
    .dhat(dhat_hybrid), .err(err_hybrid), .w(w_hybrid)
  );

endmodule
