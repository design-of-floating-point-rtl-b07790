// fpmul_pkg: constants and types shared by the single-precision Vedic
// floating-point multiplier.
//
// IEEE 754 binary32 layout: sign (1 bit), biased exponent (8 bits, bias 127)
// and fraction (23 bits, hidden leading 1 for normal numbers). The unpacked
// significand is carried in 32 bits (hidden bit at position 23) because the
// mantissa product is formed by a 32x32 Vedic multiplier; the top 28 bits of
// the 48-bit significand product are kept for normalisation. These widths
// follow the signal widths of the published design; flag and special-value
// encodings are this implementation's own choice.
package fpmul_pkg;

  localparam int unsigned EXP_W  = 8;
  localparam int unsigned FRAC_W = 23;
  localparam int unsigned SIG_W  = 32;   // unpacked significand width (A_SIG)
  localparam int unsigned PSIG_W = 28;   // kept product bits 47..20 (SIG_in)
  localparam int unsigned XEXP_W = 10;   // signed exponent with overflow room
  localparam int          BIAS   = 127;

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  // One operand after unpacking and classification.
  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [SIG_W-1:0]  sig;      // {8'b0, hidden, fraction}; 0 for zero/subnormal
    logic              is_zero;  // +-0 or subnormal (flushed)
    logic              is_inf;
    logic              is_nan;
  } fp_unpacked_t;

  // Special-operand summary handed to the result stage.
  typedef struct packed {
    logic nan;    // result is NaN (NaN operand or 0 * Inf)
    logic inf;    // result is infinity (Inf operand, other operand non-zero)
    logic zero;   // result is zero (zero operand, other operand finite)
  } fp_special_t;

  // Result status flags.
  typedef struct packed {
    logic invalid;    // NaN produced
    logic overflow;   // finite operands, exponent too large -> infinity
    logic underflow;  // finite operands, exponent too small -> zero
    logic inf;        // result is +-infinity
    logic zero;       // result is +-zero
  } fp_flags_t;

endpackage
