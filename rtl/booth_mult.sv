// booth_mult: combinational signed multiplier, radix-4 Booth recoding with a
// carry-save partial-product array.
//
// How it works: the multiplier b is cut into overlapping 3-bit groups
// (b[2i+1], b[2i], b[2i-1]) with b[-1] = 0; each group selects one of
// 0, +a, +2a, -a, -2a, so a B_W-bit multiplier gives ceil((B_W+1)/2)
// partial products instead of B_W. The partial products, sign-extended to
// the full product width, are reduced with a chain of 3:2 carry-save adders
// (no carry propagation) and a single carry-propagate add at the end, which
// an FPGA maps onto its dedicated carry chain.
//
// Interface: a (A_W bits) and b (B_W bits) are two's complement; p has
// A_W + B_W bits and is exact. No clock: the product is valid in the same
// cycle.
//
// The choice of a Booth multiplier and of carry-save arithmetic follows the
// published design; the radix, the linear (array) order of the carry-save
// adders and the final adder are this design's own choices.
module booth_mult #(
  parameter int unsigned A_W = 12,
  parameter int unsigned B_W = 12
) (
  input  logic signed [A_W-1:0]     a,
  input  logic signed [B_W-1:0]     b,
  output logic signed [A_W+B_W-1:0] p
);

  localparam int unsigned P_W = A_W + B_W;
  localparam int unsigned NPP = (B_W + 1) / 2;   // number of Booth partial products

  logic signed [P_W-1:0] a_ext;
  logic        [2*NPP:0] b_ext;                 // b with b[-1] = 0 below and sign above
  logic        [P_W-1:0] pp [NPP];
  logic        [P_W-1:0] cs_sum, cs_carry;

  assign a_ext = P_W'(a);
  assign b_ext = {(2*NPP)'(b), 1'b0};         // size cast of signed b sign-extends

  // Booth recoding: one partial product per 3-bit group.
  always_comb begin
    for (int i = 0; i < NPP; i++) begin
      logic [P_W-1:0] mag;
      unique case (b_ext[2*i +: 3])
        3'b000, 3'b111: mag = '0;
        3'b001, 3'b010: mag = a_ext;
        3'b011:         mag = a_ext <<< 1;
        3'b100:         mag = -(a_ext <<< 1);
        default:        mag = -a_ext;      // 3'b101, 3'b110
      endcase
      pp[i] = mag << (2 * i);
    end
  end

  // Carry-save array: sum/carry pair accumulates one partial product per row.
  always_comb begin
    cs_sum   = pp[0];
    cs_carry = '0;
    for (int i = 1; i < NPP; i++) begin
      logic [P_W-1:0] s, c;
      s        = cs_sum ^ cs_carry ^ pp[i];
      c        = (cs_sum & cs_carry) | (cs_sum & pp[i]) | (cs_carry & pp[i]);
      cs_sum   = s;
      cs_carry = c << 1;
    end
  end

  // Final carry-propagate adder.
  assign p = signed'(cs_sum + cs_carry);

endmodule
