// vedic_32x32: 32x32-bit unsigned Vedic multiplier.
//
// Each operand is split into a high and a low 16-bit half. Four vedic_16x16
// multipliers form the vertical and crosswise products Al*Bl, Al*Bh, Ah*Bl
// and Ah*Bh all at once, and vedic_combine adds them with two carry save
// adders into the 64-bit product. This is the published hierarchical
// construction (2x2 -> 4x4 -> 8x8 -> 16x16 -> 32x32).
// Interface: a, b (32 bits) -> q = a*b (64 bits). Purely combinational;
// the absence of pipeline registers inside the tree is this implementation's
// choice.
module vedic_32x32 (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [63:0] q
);
  logic [31:0] ll, lh, hl, hh;

  vedic_16x16 u_ll (.a(a[15:0]), .b(b[15:0]), .q(ll));
  vedic_16x16 u_lh (.a(a[15:0]), .b(b[31:16]), .q(lh));
  vedic_16x16 u_hl (.a(a[31:16]), .b(b[15:0]), .q(hl));
  vedic_16x16 u_hh (.a(a[31:16]), .b(b[31:16]), .q(hh));

  vedic_combine #(.N(32)) u_combine (.ll(ll), .lh(lh), .hl(hl), .hh(hh), .q(q));
endmodule
