// exponent_calc: intermediate exponent E1 + E2 - 127.
//
// Both biased exponents are added in an 8-bit ripple-carry adder; its carry
// out becomes bit 8 of the 9-bit sum, so an overflow of the addition is kept
// and may be compensated by the bias subtraction that follows. The bias is
// then subtracted by adding its two's complement in a second, 10-bit
// ripple-carry adder, so no separate subtractor is needed. The result is a
// 10-bit two's complement number covering -125 .. 381 for normal operands
// (Table-I range); the normaliser adds one to it when the product needs a
// right shift. The 10-bit internal width is this design's choice.
// Combinational.
module exponent_calc
  import fpm_pkg::*;
(
  input  logic [EXP_W-1:0] exp_a,
  input  logic [EXP_W-1:0] exp_b,
  output logic [EI_W-1:0]  exp_int   // signed: exp_a + exp_b - BIAS
);
  logic [EXP_W-1:0] sum8;
  logic             c8;
  logic [EI_W-1:0]  sum_ext;
  logic             c_unused;

  // E1 + E2
  ripple_carry_adder #(.N(EXP_W)) u_add_exp (
    .a   (exp_a),
    .b   (exp_b),
    .cin (1'b0),
    .sum (sum8),
    .cout(c8)
  );

  assign sum_ext = {{(EI_W-EXP_W-1){1'b0}}, c8, sum8};

  // (E1 + E2) - BIAS, as an addition of -BIAS
  ripple_carry_adder #(.N(EI_W)) u_sub_bias (
    .a   (sum_ext),
    .b   (NEG_BIAS),
    .cin (1'b0),
    .sum (exp_int),
    .cout(c_unused)   // carry out of a two's complement add carries no information
  );
endmodule
