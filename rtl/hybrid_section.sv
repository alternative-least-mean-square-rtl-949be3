// hybrid_section: one section of a hybrid-form FIR filter with time-varying
// coefficients (three taps by default).
//
// How it works: inside a section the delays are on the x line, as in the
// direct form: tap 0 sees x_in, and a register between taps makes tap i see
// x_in delayed by i cycles. The products are summed by an unregistered adder
// chain, as in the direct form. Between sections the delay moves to the sum
// line, as in the transposed form: the partial sum arriving from the next
// section (sum_in) is registered before it is added, and the x value of the
// last tap leaves (x_out) without a register. A filter is a pipeline of
// identical sections, and its critical path is bounded by one section
// (one multiplier and NT adders), not by the whole filter.
//
// Interface and timing: sum_out(n) = sum_i w[i](n) * x_in[n-i] + sum_in(n-1);
// x_out = x_in delayed by NT-1 cycles. Sums are full precision (ACC_W bits),
// nothing is rounded here. rst clears all registers.
//
// The register placement follows the published three-tap hybrid module; that
// the x line continues unregistered into the next section is read from how
// the published hybrid DLMS filter chains its sections.
module hybrid_section
  import dlms_pkg::*;
#(
  parameter int unsigned NT     = DEF_SECTION_TAPS,
  parameter int unsigned DATA_W = DEF_DATA_W,
  parameter int unsigned COEF_W = DEF_COEF_W,
  parameter int unsigned ACC_W  = acc_width(DEF_DATA_W, DEF_COEF_W, DEF_TAPS)
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [DATA_W-1:0] x_in,
  input  logic signed [COEF_W-1:0] w [NT],
  input  logic signed [ACC_W-1:0]  sum_in,
  output logic signed [DATA_W-1:0] x_out,
  output logic signed [ACC_W-1:0]  sum_out
);

  localparam int unsigned P_W = DATA_W + COEF_W;

  logic signed [DATA_W-1:0] xs   [NT];    // xs[i] = x_in[n-i]
  logic signed [P_W-1:0]    prod [NT];
  logic signed [ACC_W-1:0]  sum_reg;      // registered chain input from the next section

  assign xs[0] = x_in;

  always_ff @(posedge clk) begin
    if (rst) begin
      sum_reg <= '0;
      for (int i = 1; i < NT; i++) xs[i] <= '0;
    end else begin
      sum_reg <= sum_in;
      for (int i = 1; i < NT; i++) xs[i] <= xs[i-1];
    end
  end

  for (genvar i = 0; i < NT; i++) begin : g_tap
    booth_mult #(.A_W(COEF_W), .B_W(DATA_W)) u_mult (
      .a(w[i]), .b(xs[i]), .p(prod[i])
    );
  end

  always_comb begin
    sum_out = sum_reg;
    for (int i = NT - 1; i >= 0; i--) sum_out = sum_out + ACC_W'(prod[i]);
  end

  assign x_out = xs[NT-1];

endmodule
