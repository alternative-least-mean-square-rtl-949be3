// fir_direct: direct-form FIR filter block with time-varying coefficients,
// the filter half of the direct-form delayed-LMS filter.
//
// How it works: x enters a register chain with one register in front of every
// tap, so tap k multiplies w[k] by x[n-1-k]. The TAPS products are added by a
// plain (unregistered) adder chain, so the critical path grows with the
// number of taps: one multiplier plus TAPS-1 adders. The sum is kept at full
// precision and the output is that sum shifted right by COEF_FRAC (the
// coefficient binary point) and cut to DATA_W bits; nothing saturates,
// because the input range the filters are meant for cannot overflow.
//
// Interface and timing: one sample per clock. dhat in cycle n is
// sum_k w[k](n) * x[n-1-k], with w sampled combinationally in the same
// cycle. rst (synchronous, active high) clears the delay line.
//
// The register placement follows the published direct-form DLMS structure
// (including the register in front of the first tap). The output scaling and
// wrap-around are this design's own choices.
module fir_direct
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

  logic signed [DATA_W-1:0] xd   [TAPS];   // xd[k] = x[n-1-k]
  logic signed [P_W-1:0]    prod [TAPS];
  logic signed [ACC_W-1:0]  acc;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < TAPS; k++) xd[k] <= '0;
    end else begin
      xd[0] <= x;
      for (int k = 1; k < TAPS; k++) xd[k] <= xd[k-1];
    end
  end

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    booth_mult #(.A_W(COEF_W), .B_W(DATA_W)) u_mult (
      .a(w[k]), .b(xd[k]), .p(prod[k])
    );
  end

  // Adder chain, last tap first, as drawn: no register anywhere in it.
  always_comb begin
    acc = '0;
    for (int k = TAPS - 1; k >= 0; k--) acc = acc + ACC_W'(prod[k]);
  end

  assign dhat = DATA_W'(acc >>> COEF_FRAC);

endmodule
