// ripple_carry_adder: N-bit unsigned adder made of a chain of full adders.
//
// Each full adder takes the carry out of the next less significant one, so
// the carry ripples from bit 0 to bit N-1 (cin enters bit 0, cout leaves
// bit N-1). This is the adder the design uses wherever it adds: exponent
// addition, bias subtraction (adding the two's complement of the bias),
// the normalisation increment, and every row of the significand array
// multiplier. Purely combinational; the delay grows linearly with N. The
// width N is this design's parameter (default 8, the exponent width).
module ripple_carry_adder #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N:0] c;   // c[i] is the carry into bit i

  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_fa
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[N];
endmodule
