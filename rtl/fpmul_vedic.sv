// fpmul_vedic: IEEE 754 single-precision floating-point multiplier whose
// significand product comes from a hierarchical Vedic (Urdhva Tiryakbhyam)
// multiplier.
//
// Z = A * B is computed in three register stages, all on the rising clock
// edge:
//   1. operand capture: fp_a/fp_b are registered when in_valid is high.
//   2. fields and product: both operands are unpacked and classified
//      (fp_classify), the sign is the XOR of the signs, the exponents are
//      added and re-biased (fp_exponent_unit), the 24x24 significand product
//      is formed in the 32x32 Vedic multiplier (vedic_mantissa_unit), and the
//      special-operand cases (NaN, 0*Inf, Inf, zero) are summarised; all of it
//      is registered.
//   3. result: fp_normalize_pack normalises by one position, handles
//      overflow/underflow and packs Z, which is registered with its flags.
// Interface: clk, rst_n (active-low, synchronous), in_valid, fp_a, fp_b in;
// out_valid, fp_z, flags out. Latency 3 clocks from the edge that samples
// in_valid to out_valid, one new operand pair accepted every clock.
// The datapath follows the published design; the valid signals, reset, the
// stage boundaries, truncation and flush-to-zero are this implementation's
// own choices.
module fpmul_vedic
  import fpmul_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] fp_a,
  input  logic [31:0] fp_b,
  output logic        out_valid,
  output logic [31:0] fp_z,
  output fp_flags_t   flags
);
  // ---------------- stage 1: operand capture ----------------
  logic        v1;
  logic [31:0] a_q, b_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1  <= 1'b0;
      a_q <= '0;
      b_q <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        a_q <= fp_a;
        b_q <= fp_b;
      end
    end
  end

  // ---------------- stage 2: fields, exponent, mantissa product ----------------
  fp_unpacked_t              ua, ub;
  logic signed [XEXP_W-1:0]  exp_in;
  logic        [PSIG_W-1:0]  sig_in;
  fp_special_t               spec;
  logic                      sign;

  fp_classify         u_cls_a (.x(a_q), .f(ua));
  fp_classify         u_cls_b (.x(b_q), .f(ub));
  fp_exponent_unit    u_exp   (.ea(ua.exp), .eb(ub.exp), .exp_in(exp_in));
  vedic_mantissa_unit u_mant  (.a_sig(ua.sig), .b_sig(ub.sig), .sig_in(sig_in));

  always_comb begin
    sign      = ua.sign ^ ub.sign;
    spec.nan  = ua.is_nan || ub.is_nan ||
                (ua.is_inf && ub.is_zero) || (ua.is_zero && ub.is_inf);
    spec.inf  = !spec.nan && (ua.is_inf || ub.is_inf);
    spec.zero = !spec.nan && !spec.inf && (ua.is_zero || ub.is_zero);
  end

  logic                     v2;
  logic                     sign_q;
  logic signed [XEXP_W-1:0] exp_in_q;
  logic        [PSIG_W-1:0] sig_in_q;
  fp_special_t              spec_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v2       <= 1'b0;
      sign_q   <= 1'b0;
      exp_in_q <= '0;
      sig_in_q <= '0;
      spec_q   <= '0;
    end else begin
      v2 <= v1;
      if (v1) begin
        sign_q   <= sign;
        exp_in_q <= exp_in;
        sig_in_q <= sig_in;
        spec_q   <= spec;
      end
    end
  end

  // ---------------- stage 3: normalise, exceptions, pack ----------------
  logic [31:0]       z_d;
  fp_flags_t         flags_d;
  logic [EXP_W-1:0]  exp_o;
  logic [PSIG_W-1:0] sig_o;

  fp_normalize_pack u_norm (
    .sign(sign_q), .exp_in(exp_in_q), .sig_in(sig_in_q), .spec(spec_q),
    .z(z_d), .flags(flags_d), .exp_o(exp_o), .sig_o(sig_o)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      fp_z      <= '0;
      flags     <= '0;
    end else begin
      out_valid <= v2;
      if (v2) begin
        fp_z  <= z_d;
        flags <= flags_d;
      end
    end
  end
endmodule
