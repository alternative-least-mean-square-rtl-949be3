// dlms_weight_update: the weight update block shared by the three
// delayed-LMS (DLMS) filter forms.
//
// How it works: the error e = d - dhat is formed combinationally and scaled
// by the step size mu = 2^-MU_SHIFT. Because the coefficients carry COEF_FRAC
// fraction bits, mu*e in coefficient LSB units is e shifted right
// arithmetically by MU_SHIFT - COEF_FRAC, so the "mu multiplier" is a wire
// shift. mu*e is registered once: this is the delay D = 1 of the delayed LMS
// update w(n+1) = w(n) + mu*e(n-D)*x(n-D) that lets the filter be pipelined.
// A separate x delay line (two registers, then one per tap) supplies tap k
// with x[n-2-k], the sample that met weight k in the error being applied.
// Each weight register is updated by its own multiplier and adder:
//   w[k](n+1) = w[k](n) + (mu*e)(n) * x[n-2-k],   (mu*e)(n) = mu * e(n-1)
// The product is cut to COEF_W bits and the weights wrap on overflow; no
// saturation is built in because the intended input range cannot overflow.
//
// Interface and timing: one sample per clock. err is combinational from d
// and dhat; w is the weight register bank, valid from the clock edge. rst
// (synchronous, active high) clears the weights to zero and empties the
// delay lines.
//
// Register placement follows the published DLMS weight update block. The
// error sign (d - dhat, with adding updates), the shift form of the step
// size, the coefficient binary point, truncation and reset values are this
// design's own choices.
module dlms_weight_update
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
  input  logic signed [DATA_W-1:0] dhat,
  output logic signed [DATA_W-1:0] err,
  output logic signed [COEF_W-1:0] w [TAPS]
);

  localparam int unsigned P_W = 2 * DATA_W;

  logic signed [DATA_W-1:0] mue_reg;          // mu * e of the previous cycle
  logic signed [DATA_W-1:0] x_pre;            // first of the two leading x registers
  logic signed [DATA_W-1:0] xu   [TAPS];      // xu[k] = x[n-2-k]
  logic signed [P_W-1:0]    upd  [TAPS];

  assign err = d - dhat;

  always_ff @(posedge clk) begin
    if (rst) begin
      mue_reg <= '0;
      x_pre   <= '0;
      for (int k = 0; k < TAPS; k++) begin
        xu[k] <= '0;
        w[k]  <= '0;
      end
    end else begin
      mue_reg <= err >>> (MU_SHIFT - COEF_FRAC);
      x_pre   <= x;
      xu[0]   <= x_pre;
      for (int k = 1; k < TAPS; k++) xu[k] <= xu[k-1];
      for (int k = 0; k < TAPS; k++) w[k] <= w[k] + COEF_W'(upd[k]);
    end
  end

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    booth_mult #(.A_W(DATA_W), .B_W(DATA_W)) u_mult (
      .a(mue_reg), .b(xu[k]), .p(upd[k])
    );
  end

  initial assert (MU_SHIFT >= COEF_FRAC)
    else $error("dlms_weight_update: MU_SHIFT must not be below COEF_FRAC");

endmodule
