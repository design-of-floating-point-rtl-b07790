// fp_exponent_unit: exponent path of the floating-point multiplier.
//
// The biased exponents of the two operands are added and the bias (127) is
// subtracted once, giving the exponent of the unnormalised product. The
// result is kept as a 10-bit two's-complement number so that the later
// normalisation stage can tell an exponent above 254 (overflow) or below 1
// (underflow) from a valid one; its low 8 bits are the biased exponent when
// it is in range.
// Interface: ea, eb (8 bits) -> exp_in (signed 10 bits). Purely combinational.
// The arithmetic is the standard one; the 10-bit signed width is this
// implementation's choice.
module fp_exponent_unit
  import fpmul_pkg::*;
(
  input  logic        [EXP_W-1:0]  ea,
  input  logic        [EXP_W-1:0]  eb,
  output logic signed [XEXP_W-1:0] exp_in
);
  always_comb begin
    exp_in = signed'({2'b00, ea}) + signed'({2'b00, eb}) - XEXP_W'(BIAS);
  end
endmodule
