// vedic_8x8: 8x8-bit unsigned Vedic multiplier.
//
// Each operand is split into a high and a low 4-bit half. Four vedic_4x4
// multipliers form the vertical and crosswise products Al*Bl, Al*Bh, Ah*Bl
// and Ah*Bh all at once, and vedic_combine adds them with two carry save
// adders into the 16-bit product. This is the published hierarchical
// construction (2x2 -> 4x4 -> 8x8 -> 16x16 -> 32x32).
// Interface: a, b (8 bits) -> q = a*b (16 bits). Purely combinational;
// the absence of pipeline registers inside the tree is this implementation's
// choice.
module vedic_8x8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [15:0] q
);
  logic [7:0] ll, lh, hl, hh;

  vedic_4x4 u_ll (.a(a[3:0]), .b(b[3:0]), .q(ll));
  vedic_4x4 u_lh (.a(a[3:0]), .b(b[7:4]), .q(lh));
  vedic_4x4 u_hl (.a(a[7:4]), .b(b[3:0]), .q(hl));
  vedic_4x4 u_hh (.a(a[7:4]), .b(b[7:4]), .q(hh));

  vedic_combine #(.N(8)) u_combine (.ll(ll), .lh(lh), .hl(hl), .hh(hh), .q(q));
endmodule
