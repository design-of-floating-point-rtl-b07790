// vedic_16x16: 16x16-bit unsigned Vedic multiplier.
//
// Each operand is split into a high and a low 8-bit half. Four vedic_8x8
// multipliers form the vertical and crosswise products Al*Bl, Al*Bh, Ah*Bl
// and Ah*Bh all at once, and vedic_combine adds them with two carry save
// adders into the 32-bit product. This is the published hierarchical
// construction (2x2 -> 4x4 -> 8x8 -> 16x16 -> 32x32).
// Interface: a, b (16 bits) -> q = a*b (32 bits). Purely combinational;
// the absence of pipeline registers inside the tree is this implementation's
// choice.
module vedic_16x16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] q
);
  logic [15:0] ll, lh, hl, hh;

  vedic_8x8 u_ll (.a(a[7:0]), .b(b[7:0]), .q(ll));
  vedic_8x8 u_lh (.a(a[7:0]), .b(b[15:8]), .q(lh));
  vedic_8x8 u_hl (.a(a[15:8]), .b(b[7:0]), .q(hl));
  vedic_8x8 u_hh (.a(a[15:8]), .b(b[15:8]), .q(hh));

  vedic_combine #(.N(16)) u_combine (.ll(ll), .lh(lh), .hl(hl), .hh(hh), .q(q));
endmodule
