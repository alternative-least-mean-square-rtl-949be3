// fir_transposed: transposed-form FIR filter block with time-varying
// coefficients, the filter half of the transposed delayed-LMS filter.
//
// How it works: the input x drives every multiplier directly (one broadcast
// bus, no delay line). The delays sit in the adder chain instead: the product
// of the last tap is registered, every adder adds its tap's product to the
// registered partial sum coming from its right and is registered again, and
// the left-most sum is registered as the output. The critical path is one
// multiplier and one adder whatever the number of taps. Sums are kept at full
// precision; the output is the sum shifted right by COEF_FRAC and cut to
// DATA_W bits (no saturation).
//
// Interface and timing: one sample per clock. dhat is registered:
// dhat(n) = sum_k w[k](n-1-k) * x[n-1-k], i.e. each tap's product enters the
// chain with the coefficient of the cycle in which it was formed. With fixed
// coefficients this is the same response as fir_direct. rst clears the chain.
//
// The register placement follows the published transposed DLMS structure;
// output scaling and wrap-around are this design's own choices.
module fir_transposed
  import dlms_pkg::*;
#(
  parameter int unsigned TAPS      = DEF_TAPS,
  parameter int unsigned DATA_W    = DEF_DATA_W,
  parameter int unsigned COEF_W    = DEF_COEF_W,
  parameter int unsigned COEF_FRAC = DEF_COEF_FRAC
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [DATA_W-1:0] x,
  input  logic signed [COEF_W-1:0] w [TAPS],
  output logic signed [DATA_W-1:0] dhat
);

  localparam int unsigned P_W   = DATA_W + COEF_W;
  localparam int unsigned ACC_W = acc_width(DATA_W, COEF_W, TAPS);

  logic signed [P_W-1:0]   prod  [TAPS];
  logic signed [ACC_W-1:0] chain [TAPS];   // chain[k]: register to the left of adder k

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    booth_mult #(.A_W(COEF_W), .B_W(DATA_W)) u_mult (
      .a(w[k]), .b(x), .p(prod[k])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < TAPS; k++) chain[k] <= '0;
    end else begin
      chain[TAPS-1] <= ACC_W'(prod[TAPS-1]);
      for (int k = 0; k < TAPS - 1; k++) chain[k] <= ACC_W'(prod[k]) + chain[k+1];
    end
  end

  assign dhat = DATA_W'(chain[0] >>> COEF_FRAC);

endmodule
