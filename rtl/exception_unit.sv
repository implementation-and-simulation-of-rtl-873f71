// exception_unit: special operands, overflow/underflow detection and the
// packing of the result word.
//
// Decisions, first match wins:
//   1. invalid  - an operand is NaN, or infinity meets zero (or a denormal,
//                 which the design treats as zero): result is the quiet
//                 NaN 0x7FC00000 pattern, invalid flag set.
//   2. infinity - an operand is infinite: result is +-Inf, no flag.
//   3. zero     - an operand is exactly zero: result is +-0, no flag.
//   4. denormal - an operand is denormal: flushed to +-0, underflow flag.
//   5. overflow - normalised exponent >= 255: +-Inf, overflow flag.
//   6. underflow- normalised exponent <= 0: +-0, underflow flag.
//   7. normal   - {sign, exponent[7:0], truncated fraction}.
// Rules 5-7 and the flush of denormals follow the design's exponent range
// table; the handling of NaN, infinity and exact zero operands and the NaN
// pattern are this design's choices. Combinational.
module exception_unit
  import fpm_pkg::*;
#(
  parameter int unsigned F = FRAC_W
) (
  input  logic [EXP_W-1:0]     exp_a,
  input  logic [F-1:0]         frac_a,
  input  logic [EXP_W-1:0]     exp_b,
  input  logic [F-1:0]         frac_b,
  input  logic                 sign_r,     // sign of the product
  input  logic [EI_W-1:0]      exp_norm,   // signed exponent after normalisation
  input  logic [F-1:0]         frac_norm,  // truncated fraction
  output logic [EXP_W+F:0]     result,
  output logic                 overflow,
  output logic                 underflow,
  output logic                 invalid,
  output res_kind_e            kind
);
  logic a_zero, a_den, a_inf, a_nan;
  logic b_zero, b_den, b_inf, b_nan;
  logic signed [EI_W-1:0] e;

  always_comb begin
    a_zero = (exp_a == '0) && (frac_a == '0);
    a_den  = (exp_a == '0) && (frac_a != '0);
    a_inf  = (exp_a == EXP_MAX) && (frac_a == '0);
    a_nan  = (exp_a == EXP_MAX) && (frac_a != '0);
    b_zero = (exp_b == '0) && (frac_b == '0);
    b_den  = (exp_b == '0) && (frac_b != '0);
    b_inf  = (exp_b == EXP_MAX) && (frac_b == '0);
    b_nan  = (exp_b == EXP_MAX) && (frac_b != '0);
    e      = signed'(exp_norm);

    if (a_nan || b_nan || (a_inf && (b_zero || b_den)) || (b_inf && (a_zero || a_den)))
      kind = RES_INVALID;
    else if (a_inf || b_inf)
      kind = RES_INF;
    else if (a_zero || b_zero)
      kind = RES_ZERO;
    else if (a_den || b_den)
      kind = RES_DENORM_IN;
    else if (e >= signed'(EI_W'(EXP_MAX)))
      kind = RES_OVERFLOW;
    else if (e <= 0)
      kind = RES_UNDERFLOW;
    else
      kind = RES_NORMAL;

    overflow  = 1'b0;
    underflow = 1'b0;
    invalid   = 1'b0;
    unique case (kind)
      RES_INVALID: begin
        invalid = 1'b1;
        result  = {1'b0, EXP_MAX, 1'b1, {(F-1){1'b0}}};
      end
      RES_INF:       result = {sign_r, EXP_MAX, {F{1'b0}}};
      RES_ZERO:      result = {sign_r, {EXP_W{1'b0}}, {F{1'b0}}};
      RES_DENORM_IN: begin
        underflow = 1'b1;
        result    = {sign_r, {EXP_W{1'b0}}, {F{1'b0}}};
      end
      RES_OVERFLOW: begin
        overflow = 1'b1;
        result   = {sign_r, EXP_MAX, {F{1'b0}}};
      end
      RES_UNDERFLOW: begin
        underflow = 1'b1;
        result    = {sign_r, {EXP_W{1'b0}}, {F{1'b0}}};
      end
      default:       result = {sign_r, exp_norm[EXP_W-1:0], frac_norm};
    endcase
  end
endmodule
