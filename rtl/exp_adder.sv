// exp_adder: exponent path of the multiplier, "Adder" followed by "-127".
//
// The two biased 8-bit exponents are added by an 8-bit Kogge-Stone adder
// whose carry out is the ninth bit of the sum. A second, 10-bit Kogge-Stone
// adder then removes one bias: it adds the two's complement of 127
// (~127 with carry in 1) to the zero-extended sum. The result is the biased
// exponent of the product before normalisation, as a 10-bit two's-complement
// number in [-127, 383], so that overflow and underflow stay visible.
//
// That the exponents are added and then reduced by 127 follows the source
// block diagram; doing the subtraction on a second Kogge-Stone adder and the
// 10-bit signed result are this design's choices.
//
// Interface: ea, eb (8 bits) in; e_sum (10 bits, signed) out. Combinational.
module exp_adder
  import fpmul_pkg::*;
(
  input  logic [EXP_W-1:0]         ea,
  input  logic [EXP_W-1:0]         eb,
  output logic signed [EXPS_W-1:0] e_sum
);

  logic [EXP_W-1:0]  raw_sum;
  logic              raw_cout;
  logic [EXPS_W-1:0] unbias_sum;
  logic              unused_cout;

  kogge_stone_adder #(.WIDTH(EXP_W)) u_add (
    .a   (ea),
    .b   (eb),
    .cin (1'b0),
    .sum (raw_sum),
    .cout(raw_cout)
  );

  kogge_stone_adder #(.WIDTH(EXPS_W)) u_bias (
    .a   ({1'b0, raw_cout, raw_sum}),
    .b   (~EXPS_W'(BIAS)),
    .cin (1'b1),
    .sum (unbias_sum),
    .cout(unused_cout)
  );

  assign e_sum = signed'(unbias_sum);

endmodule
