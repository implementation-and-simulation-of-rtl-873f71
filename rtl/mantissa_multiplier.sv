// mantissa_multiplier: unsigned array multiplier for the significands.
//
// Multiplies two M-bit significands (hidden one included; M = 24 for single
// precision) into the 2M-bit intermediate product. It is a column of M rows,
// each an M-bit ripple-carry adder. Row i adds the partial product
// (b[i] ? a : 0) to the upper M bits carried down from row i-1 (row 0 starts
// from zero). The least significant sum bit of row i is final: it is product
// bit i. The remaining M-1 sum bits and the row's carry out form the upper
// M bits passed to the next row, and those of the last row are product bits
// 2M-1 .. M. Fully combinational; the delay grows with M rows of M-bit
// ripple carries. The width is a parameter with the single-precision default.
module mantissa_multiplier #(
  parameter int unsigned M = 24
) (
  input  logic [M-1:0]   a,
  input  logic [M-1:0]   b,
  output logic [2*M-1:0] prod
);
  // acc[i] is the M-bit upper part entering row i
  logic [M-1:0] acc  [M+1];
  logic [M-1:0] pp   [M];
  logic [M-1:0] rsum [M];
  logic         rco  [M];

  assign acc[0] = '0;

  for (genvar i = 0; i < M; i++) begin : g_row
    assign pp[i] = a & {M{b[i]}};

    ripple_carry_adder #(.N(M)) u_add (
      .a   (acc[i]),
      .b   (pp[i]),
      .cin (1'b0),
      .sum (rsum[i]),
      .cout(rco[i])
    );

    assign prod[i]  = rsum[i][0];
    assign acc[i+1] = {rco[i], rsum[i][M-1:1]};
  end

  assign prod[2*M-1:M] = acc[M];
endmodule
