// fp_normalize_pack: normalisation, exception handling and result packing.
//
// The 28-bit product significand sig_in has its leading 1 at bit 27 or 26.
// When bit 27 is set the significand is shifted right by one and the
// exponent incremented; afterwards the hidden bit sits at bit 26 and the
// fraction is bits 25..3 (the bits below are dropped: truncation). The
// result is then chosen in priority order: NaN (quiet NaN 0x7FC00000), a
// special infinity, a special zero, exponent overflow (signed infinity),
// exponent underflow (signed zero, no subnormal results), else the normal
// number {sign, exponent, fraction}.
// Interface: sign, exp_in (signed 10 bits), sig_in (28 bits), spec
// (fp_special_t) -> z (32 bits), flags (fp_flags_t), and the normalised
// exp_o / sig_o for observation. Purely combinational.
// Shift-by-one normalisation and overflow/underflow handling follow the
// published design; truncation, flush-to-zero and the NaN encoding are this
// implementation's choices.
module fp_normalize_pack
  import fpmul_pkg::*;
(
  input  logic                     sign,
  input  logic signed [XEXP_W-1:0] exp_in,
  input  logic        [PSIG_W-1:0] sig_in,
  input  fp_special_t              spec,
  output logic        [31:0]       z,
  output fp_flags_t                flags,
  output logic        [EXP_W-1:0]  exp_o,
  output logic        [PSIG_W-1:0] sig_o
);
  logic                     norm;
  logic signed [XEXP_W-1:0] exp_n;
  logic        [FRAC_W-1:0] frac;

  always_comb begin
    norm  = sig_in[PSIG_W-1];
    sig_o = norm ? (sig_in >> 1) : sig_in;
    exp_n = exp_in + XEXP_W'(norm);
    exp_o = exp_n[EXP_W-1:0];
    frac  = sig_o[PSIG_W-3 -: FRAC_W];

    flags = '0;
    if (spec.nan) begin
      z             = QNAN;
      flags.invalid = 1'b1;
    end else if (spec.inf) begin
      z             = {sign, 8'hFF, 23'd0};
      flags.inf     = 1'b1;
    end else if (spec.zero) begin
      z             = {sign, 31'd0};
      flags.zero    = 1'b1;
    end else if (exp_n >= XEXP_W'(255)) begin
      z              = {sign, 8'hFF, 23'd0};
      flags.overflow = 1'b1;
      flags.inf      = 1'b1;
    end else if (exp_n <= XEXP_W'(0)) begin
      z               = {sign, 31'd0};
      flags.underflow = 1'b1;
      flags.zero      = 1'b1;
    end else begin
      z = {sign, exp_o, frac};
    end
  end
endmodule
