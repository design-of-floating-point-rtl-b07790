// vedic_4x4: 4x4-bit unsigned Vedic multiplier.
//
// Each operand is split into a high and a low 2-bit half. Four vedic_2x2
// multipliers form the vertical and crosswise products Al*Bl, Al*Bh, Ah*Bl
// and Ah*Bh all at once, and vedic_combine adds them with two carry save
// adders into the 8-bit product. This is the published hierarchical
// construction (2x2 -> 4x4 -> 8x8 -> 16x16 -> 32x32).
// Interface: a, b (4 bits) -> q = a*b (8 bits). Purely combinational;
// the absence of pipeline registers inside the tree is this implementation's
// choice.
module vedic_4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] q
);
  logic [3:0] ll, lh, hl, hh;

  vedic_2x2 u_ll (.a(a[1:0]), .b(b[1:0]), .q(ll));
  vedic_2x2 u_lh (.a(a[1:0]), .b(b[3:2]), .q(lh));
  vedic_2x2 u_hl (.a(a[3:2]), .b(b[1:0]), .q(hl));
  vedic_2x2 u_hh (.a(a[3:2]), .b(b[3:2]), .q(hh));

  vedic_combine #(.N(4)) u_combine (.ll(ll), .lh(lh), .hl(hl), .hh(hh), .q(q));
endmodule
