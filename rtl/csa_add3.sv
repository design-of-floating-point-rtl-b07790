// csa_add3: three-operand unsigned adder built as a carry save adder.
//
// A row of W full adders compresses x, y and z into a sum vector and a carry
// vector without any carry rippling between bit positions; one carry-propagate
// addition of the two vectors then gives the total. The result is W+2 bits
// wide, enough for the largest sum 3*(2^W-1).
// Interface: x, y, z (W bits) -> s = x+y+z (W+2 bits). Purely combinational.
// The Vedic multiplier tree uses this block where partial products are added;
// the 3:2 row followed by a single final adder is this implementation's
// choice of carry save adder.
module csa_add3 #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W+1:0] s
);
  logic [W-1:0] sv;   // bitwise sum
  logic [W-1:0] cv;   // bitwise carry, weight 2^(i+1)

  always_comb begin
    sv = x ^ y ^ z;
    cv = (x & y) | (x & z) | (y & z);
    s  = {2'b00, sv} + {1'b0, cv, 1'b0};
  end
endmodule
