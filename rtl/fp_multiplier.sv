// fp_multiplier: IEEE 754 single-precision floating-point multiplier.
//
// Three paths work side by side, as in the block diagram of the design:
//   sign      - XOR of the two sign bits;
//   exponent  - exp_adder: Kogge-Stone addition of the biased exponents,
//               then removal of one bias of 127;
//   mantissa  - karatsuba_mult: the two 24-bit significands (hidden one
//               restored) zero-extended to 32 bits and multiplied by a
//               two-level Karatsuba recursion over 8 x 8 Urdhva Tiryagbhyam
//               multipliers; the 48-bit product goes to the normalizer,
//               which also updates the exponent.
// Finally the special operands and range limits are resolved.
//
// The three paths and their blocks follow the source design. Everything it
// leaves open is this design's choice:
//   - rounding is toward zero (the product is truncated);
//   - subnormal inputs are read as zero and results below the normal range
//     become a signed zero (flag underflow);
//   - results above the normal range become the largest finite number of
//     that sign (correct for rounding toward zero; flag overflow);
//   - NaN operands and infinity x zero give the quiet NaN 0x7fc00000 (flag
//     invalid); infinity x nonzero gives a signed infinity.
//
// Interface: a, b (binary32 bit patterns) in; p (binary32) and the flags
// overflow, underflow, invalid out. The multiplier is purely combinational:
// the result is valid in the same cycle as the operands, with no clock.
//
// Lint reports two unused signals, and both stand: the top 16 bits of the
// 64-bit Karatsuba product are always zero because the significands are
// zero-extended from 24 to 32 bits, and the normalizer's shift indication is
// already folded into its exponent output.
module fp_multiplier
  import fpmul_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] p,
  output logic        overflow,
  output logic        underflow,
  output logic        invalid
);

  localparam int unsigned KARA_N = 32;   // 24-bit significands padded to 32

  fp32_t fa, fb, fp;
  assign fa = fp32_t'(a);
  assign fb = fp32_t'(b);

  // Sign path.
  logic sign;
  assign sign = fa.sign ^ fb.sign;

  // Exponent path.
  logic signed [EXPS_W-1:0] e_sum;
  exp_adder u_exp (.ea(fa.exp), .eb(fb.exp), .e_sum(e_sum));

  // Mantissa path.
  logic [MANT_W-1:0]   ma, mb;
  logic [2*KARA_N-1:0] m_prod;
  assign ma = {1'b1, fa.frac};
  assign mb = {1'b1, fb.frac};

  karatsuba_mult #(.N(KARA_N), .LEAF(8)) u_mant (
    .a(KARA_N'(ma)),
    .b(KARA_N'(mb)),
    .p(m_prod)
  );

  logic [FRAC_W-1:0]        n_frac;
  logic signed [EXPS_W-1:0] n_exp;
  logic                     n_shifted;

  normalizer u_norm (
    .prod   (m_prod[PROD_W-1:0]),
    .e_in   (e_sum),
    .frac   (n_frac),
    .e_out  (n_exp),
    .shifted(n_shifted)
  );

  // Operand classes.
  logic a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  assign a_zero = (fa.exp == '0);
  assign b_zero = (fb.exp == '0);
  assign a_inf  = (fa.exp == EXP_MAX) && (fa.frac == '0);
  assign b_inf  = (fb.exp == EXP_MAX) && (fb.frac == '0);
  assign a_nan  = (fa.exp == EXP_MAX) && (fa.frac != '0);
  assign b_nan  = (fb.exp == EXP_MAX) && (fb.frac != '0);

  always_comb begin
    overflow  = 1'b0;
    underflow = 1'b0;
    invalid   = 1'b0;
    fp        = '{sign: sign, exp: n_exp[EXP_W-1:0], frac: n_frac};
    if (a_nan || b_nan || ((a_inf || b_inf) && (a_zero || b_zero))) begin
      invalid = 1'b1;
      fp      = fp32_t'({1'b0, QNAN_MAG});
    end else if (a_inf || b_inf) begin
      fp = '{sign: sign, exp: EXP_MAX, frac: '0};
    end else if (a_zero || b_zero) begin
      fp = '{sign: sign, exp: '0, frac: '0};
    end else if (n_exp >= signed'(EXPS_W'(EXP_MAX))) begin
      overflow = 1'b1;
      fp       = fp32_t'({sign, MAXFIN_MAG});
    end else if (n_exp <= 0) begin
      underflow = 1'b1;
      fp        = '{sign: sign, exp: '0, frac: '0};
    end
  end

  assign p = fp;

endmodule
