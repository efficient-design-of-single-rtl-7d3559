// normalizer: "Normalizer" and "Exp-Update" of the multiplier.
//
// The product of two 24-bit significands with hidden ones lies in [2^46,
// 2^48), i.e. in [1, 4) with 46 fraction bits. When bit 47 is set the value is
// 2 or more: the significand is taken one place higher and the exponent is
// raised by one. The 23 fraction bits below the leading one are kept and the
// rest are dropped (rounding toward zero). The exponent update is a 10-bit
// Kogge-Stone adder used as an incrementer, the shift bit as its carry in.
//
// The normaliser and exponent update blocks are named in the source block
// diagram; the one-place shift, truncation as the rounding and the use of a
// Kogge-Stone incrementer are this design's choices. Results outside the
// normal range are not handled here: the caller checks e_out.
//
// Interface: prod (48 bits) and e_in (10-bit signed) in; frac (23 bits),
// e_out (10-bit signed) and shifted (normalisation took place) out.
// Combinational.
module normalizer
  import fpmul_pkg::*;
(
  input  logic [PROD_W-1:0]        prod,
  input  logic signed [EXPS_W-1:0] e_in,
  output logic [FRAC_W-1:0]        frac,
  output logic signed [EXPS_W-1:0] e_out,
  output logic                     shifted
);

  logic [EXPS_W-1:0] e_upd;
  logic              unused_cout;

  assign shifted = prod[PROD_W-1];
  assign frac    = shifted ? prod[PROD_W-2 -: FRAC_W] : prod[PROD_W-3 -: FRAC_W];

  kogge_stone_adder #(.WIDTH(EXPS_W)) u_inc (
    .a   (e_in),
    .b   ('0),
    .cin (shifted),
    .sum (e_upd),
    .cout(unused_cout)
  );

  assign e_out = signed'(e_upd);

endmodule
