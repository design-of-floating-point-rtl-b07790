// fp_classify: unpacks one IEEE 754 single-precision operand and classifies it.
//
// The sign and biased exponent are split off; the significand is rebuilt
// with its hidden leading 1 at bit 23 and zero-extended to 32 bits, the width
// at which the mantissa unit's 32x32 Vedic multiplier takes it. Flags mark
// zero, infinity and NaN operands. Subnormal operands (exponent 0, fraction
// non-zero) are flushed: flagged as zero with a zero significand, a choice of
// this implementation since no subnormal support is specified.
// Interface: x (32 bits) -> f (fp_unpacked_t). Purely combinational.
module fp_classify
  import fpmul_pkg::*;
(
  input  logic [31:0]  x,
  output fp_unpacked_t f
);
  logic [EXP_W-1:0]  e;
  logic [FRAC_W-1:0] m;
  logic              e_zero, e_ones;

  always_comb begin
    e      = x[30:23];
    m      = x[22:0];
    e_zero = (e == '0);
    e_ones = (e == '1);

    f.sign    = x[31];
    f.exp     = e;
    f.is_zero = e_zero;
    f.is_inf  = e_ones && (m == '0);
    f.is_nan  = e_ones && (m != '0);
    f.sig     = e_zero ? '0 : SIG_W'({1'b1, m});
  end
endmodule
