// vedic_combine: adds the four half-size partial products of an NxN Vedic
// multiplier into the 2N-bit product.
//
// With A = {Ah, Al} and B = {Bh, Bl} (halves of H = N/2 bits) the inputs are
// ll = Al*Bl, lh = Al*Bh, hl = Ah*Bl and hh = Ah*Bh, each N bits. The low H
// bits of ll are the low H product bits directly. A first carry save adder
// sums lh, hl and the upper half of ll; its low H bits are product bits
// N-1..H. A second carry save adder sums hh and the remaining upper bits of
// the first sum, giving product bits 2N-1..N.
// Interface: ll, lh, hl, hh (N bits) -> q (2N bits). Purely combinational.
// The arrangement is the published one; the first adder's upper bits are
// passed in full (H+2 bits) so no carry is lost.
module vedic_combine #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]   ll,
  input  logic [N-1:0]   lh,
  input  logic [N-1:0]   hl,
  input  logic [N-1:0]   hh,
  output logic [2*N-1:0] q
);
  localparam int unsigned H = N / 2;

  logic [N+1:0] mid;     // lh + hl + ll[N-1:H]
  logic [N+1:0] top;     // hh + mid[N+1:H]
  logic [N-1:0] ll_hi;
  logic [N-1:0] mid_hi;

  assign ll_hi  = N'(ll[N-1:H]);
  assign mid_hi = N'(mid[N+1:H]);

  csa_add3 #(.W(N)) u_csa_mid (.x(lh), .y(hl), .z(ll_hi), .s(mid));
  csa_add3 #(.W(N)) u_csa_top (.x(hh), .y(mid_hi), .z('0), .s(top));

  assign q = {top[N-1:0], mid[H-1:0], ll[H-1:0]};
endmodule
