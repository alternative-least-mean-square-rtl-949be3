// fir_hybrid: hybrid-form FIR filter block with time-varying coefficients,
// the filter half of the hybrid delayed-LMS filter.
//
// How it works: x is registered once and then feeds a chain of
// hybrid_section blocks of SECTION_TAPS taps each (the last one shorter when
// TAPS is not a multiple of SECTION_TAPS). Section j holds taps
// j*SECTION_TAPS .. j*SECTION_TAPS+SECTION_TAPS-1. Inside a section the delays
// are on the x line; between sections they are on the partial-sum line. A
// tap in section j therefore sees x one cycle later than in the direct form
// (x[n-1-k+j]) and its product passes j sum registers, so with fixed
// coefficients the response equals that of fir_direct. The output is the sum
// of section 0 shifted right by COEF_FRAC and cut to DATA_W bits.
//
// Interface and timing: one sample per clock;
// dhat(n) = sum_k w[k](n-j(k)) * x[n-1-k] with j(k) = k / SECTION_TAPS.
// rst clears all registers.
//
// The structure (input register, three-tap sections, one sum register per
// section boundary) follows the published hybrid DLMS filter; output scaling
// is this design's own choice.
module fir_hybrid
  import dlms_pkg::*;
#(
  parameter int unsigned TAPS         = DEF_TAPS,
  parameter int unsigned DATA_W       = DEF_DATA_W,
  parameter int unsigned COEF_W       = DEF_COEF_W,
  parameter int unsigned COEF_FRAC    = DEF_COEF_FRAC,
  parameter int unsigned SECTION_TAPS = DEF_SECTION_TAPS
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [DATA_W-1:0] x,
  input  logic signed [COEF_W-1:0] w [TAPS],
  output logic signed [DATA_W-1:0] dhat
);

  localparam int unsigned ACC_W = acc_width(DATA_W, COEF_W, TAPS);
  localparam int unsigned NSEC  = (TAPS + SECTION_TAPS - 1) / SECTION_TAPS;

  logic signed [DATA_W-1:0] x_reg;
  logic signed [DATA_W-1:0] sec_x   [NSEC+1];   // sec_x[j]: x entering section j
  logic signed [ACC_W-1:0]  sec_sum [NSEC+1];   // sec_sum[j]: sum leaving section j

  always_ff @(posedge clk) begin
    if (rst) x_reg <= '0;
    else     x_reg <= x;
  end

  assign sec_x[0]      = x_reg;
  assign sec_sum[NSEC] = '0;

  for (genvar j = 0; j < NSEC; j++) begin : g_sec
    localparam int unsigned FIRST = j * SECTION_TAPS;
    localparam int unsigned NT    = (TAPS - FIRST < SECTION_TAPS) ? TAPS - FIRST : SECTION_TAPS;
    logic signed [COEF_W-1:0] wsec [NT];
    for (genvar i = 0; i < NT; i++) begin : g_w
      assign wsec[i] = w[FIRST + i];
    end
    hybrid_section #(
      .NT(NT), .DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W)
    ) u_sec (
      .clk    (clk),
      .rst    (rst),
      .x_in   (sec_x[j]),
      .w      (wsec),
      .sum_in (sec_sum[j+1]),
      .x_out  (sec_x[j+1]),
      .sum_out(sec_sum[j])
    );
  end

  assign dhat = DATA_W'(sec_sum[0] >>> COEF_FRAC);

endmodule
