// sign_calc: sign of the product.
//
// A product is negative exactly when one operand is negative, so the
// result sign is the XOR of the two operand signs. Combinational.
module sign_calc (
  input  logic sign_a,
  input  logic sign_b,
  output logic sign_r
);
  always_comb sign_r = sign_a ^ sign_b;
endmodule
