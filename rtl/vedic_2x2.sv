// vedic_2x2: 2x2-bit unsigned multiplier by the Urdhva Tiryakbhyam
// ("vertically and crosswise") rule, the leaf of the Vedic multiplier tree.
//
// Column 0 is the vertical product a0*b0. Column 1 is the crosswise sum
// a1*b0 + a0*b1, giving sum s1 and carry c1. Column 2 adds c1 to the vertical
// product a1*b1, giving s2 and the final carry c2. All partial products are
// formed at once; only the two half adders lie in series.
// Interface: a, b (2 bits) -> q = a*b (4 bits). Purely combinational.
// The column equations are the published rule; the half-adder realisation
// is this implementation's choice.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q
);
  logic p00, p01, p10, p11;
  logic s1, c1, s2, c2;

  always_comb begin
    p00 = a[0] & b[0];
    p10 = a[1] & b[0];
    p01 = a[0] & b[1];
    p11 = a[1] & b[1];
    // column 1: c1 s1 = a1b0 + a0b1
    s1  = p10 ^ p01;
    c1  = p10 & p01;
    // column 2: c2 s2 = c1 + a1b1
    s2  = c1 ^ p11;
    c2  = c1 & p11;
    q   = {c2, s2, s1, p00};
  end
endmodule
