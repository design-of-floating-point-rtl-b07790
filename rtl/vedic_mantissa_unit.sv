// vedic_mantissa_unit: significand multiplier of the floating-point
// multiplier.
//
// The two 24-bit significands (hidden bit included), each zero-extended to
// 32 bits, are multiplied by the 32x32 Vedic multiplier. The 48-bit product
// of two significands in [1,2) lies in [1,4): bit 47 or bit 46 holds its
// leading 1. Product bits 47..20 are passed on as the 28-bit SIG_in; the
// lower bits are dropped, so the result is truncated (no rounding is
// specified for this design).
// Interface: a_sig, b_sig (32 bits) -> sig_in (28 bits). Purely
// combinational.
module vedic_mantissa_unit
  import fpmul_pkg::*;
(
  input  logic [SIG_W-1:0]  a_sig,
  input  logic [SIG_W-1:0]  b_sig,
  output logic [PSIG_W-1:0] sig_in
);
  logic [2*SIG_W-1:0] prod;

  vedic_32x32 u_mult (.a(a_sig), .b(b_sig), .q(prod));

  assign sig_in = prod[47 -: PSIG_W];
endmodule
