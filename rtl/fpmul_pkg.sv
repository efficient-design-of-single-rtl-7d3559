// fpmul_pkg: shared constants and types of the single-precision multiplier.
//
// IEEE 754 binary32 layout: 1 sign bit, 8-bit biased exponent (bias 127) and
// 23 stored fraction bits; normal numbers carry a hidden leading one, so the
// significand that is multiplied is 24 bits wide and the raw product 48 bits.
// The exponent path works on a 10-bit two's-complement value, wide enough for
// ea + eb - 127 (from -127 to 383) plus the normalisation increment.
package fpmul_pkg;

  localparam int unsigned EXP_W  = 8;
  localparam int unsigned FRAC_W = 23;
  localparam int unsigned MANT_W = FRAC_W + 1;   // with the hidden bit
  localparam int unsigned PROD_W = 2 * MANT_W;   // 48-bit significand product
  localparam int unsigned EXPS_W = EXP_W + 2;    // signed exponent working width
  localparam int unsigned BIAS   = 127;

  localparam logic [EXP_W-1:0] EXP_MAX = '1;     // 255: infinity / NaN

  // Canonical quiet NaN and the largest finite magnitude.
  localparam logic [30:0] QNAN_MAG   = 31'h7fc0_0000;
  localparam logic [30:0] MAXFIN_MAG = 31'h7f7f_ffff;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp32_t;

endpackage
