// fp_multiplier: IEEE 754 single-precision floating-point multiplier.
//
// Operands A and B are split into sign, biased exponent and fraction. Three
// independent units work in parallel: the sign calculator XORs the signs,
// the exponent calculator forms E1 + E2 - 127 with ripple-carry adders, and
// the significand multiplier forms the 48-bit intermediate product of the
// two 24-bit significands (hidden ones restored). The normaliser shifts the
// product right by one and increments the exponent when its bit 47 is set,
// and the exception unit detects overflow, underflow and invalid operations
// and packs the result. The fraction is truncated: there is no rounding, and
// the whole 48-bit intermediate product is given out, unshifted, on its own
// port for units that want the full precision.
//
// Interface: clk, rst (synchronous, active high), start, a, b in; result,
// overflow, underflow, invalid, product, valid out. The datapath is
// combinational from a/b to the output register; on a rising clock edge
// with start high, the outputs are loaded and valid goes high for one
// cycle, so a result appears one clock after start (latency 1, one
// operation per clock). The single output register stage, start/valid and
// the product port are this design's choices; the clock, reset, operand,
// result and flag ports follow the design's block diagram.
//
// Parameter F is the fraction width (23 for single precision); smaller
// values give the reduced-mantissa format of the worked example, with the
// 8-bit exponent and bias 127 kept.
module fp_multiplier
  import fpm_pkg::*;
#(
  parameter int unsigned F = FRAC_W
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic [EXP_W+F:0]   a,
  input  logic [EXP_W+F:0]   b,
  output logic [EXP_W+F:0]   result,
  output logic               overflow,
  output logic               underflow,
  output logic               invalid,
  output logic [2*F+1:0]     product,   // intermediate significand product, as is
  output logic               valid
);
  localparam int unsigned M = F + 1;   // significand width with hidden one

  // operand fields
  logic             sign_a, sign_b;
  logic [EXP_W-1:0] exp_a, exp_b;
  logic [F-1:0]     frac_a, frac_b;

  assign {sign_a, exp_a, frac_a} = a;
  assign {sign_b, exp_b, frac_b} = b;

  // datapath
  logic              sign_r;
  logic [EI_W-1:0]   exp_int, exp_norm;
  logic [2*M-1:0]    ip;
  logic [F-1:0]      frac_norm;
  logic [EXP_W+F:0]  res_c;
  logic              ovf_c, unf_c, inv_c;

  sign_calc u_sign (
    .sign_a(sign_a),
    .sign_b(sign_b),
    .sign_r(sign_r)
  );

  exponent_calc u_exp (
    .exp_a  (exp_a),
    .exp_b  (exp_b),
    .exp_int(exp_int)
  );

  mantissa_multiplier #(.M(M)) u_mul (
    .a   ({1'b1, frac_a}),
    .b   ({1'b1, frac_b}),
    .prod(ip)
  );

  normalizer #(.F(F)) u_norm (
    .ip     (ip),
    .exp_in (exp_int),
    .frac   (frac_norm),
    .exp_out(exp_norm),
    .shifted()
  );

  exception_unit #(.F(F)) u_exc (
    .exp_a    (exp_a),
    .frac_a   (frac_a),
    .exp_b    (exp_b),
    .frac_b   (frac_b),
    .sign_r   (sign_r),
    .exp_norm (exp_norm),
    .frac_norm(frac_norm),
    .result   (res_c),
    .overflow (ovf_c),
    .underflow(unf_c),
    .invalid  (inv_c),
    .kind     ()
  );

  // output register
  always_ff @(posedge clk) begin
    if (rst) begin
      result    <= '0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
      invalid   <= 1'b0;
      product   <= '0;
      valid     <= 1'b0;
    end else begin
      valid <= start;
      if (start) begin
        result    <= res_c;
        overflow  <= ovf_c;
        underflow <= unf_c;
        invalid   <= inv_c;
        product   <= ip;
      end
    end
  end

  // at most one flag per result
  a_one_flag: assert property (@(posedge clk) disable iff (rst)
                               $onehot0({overflow, underflow, invalid}));
endmodule
