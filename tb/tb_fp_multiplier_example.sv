// tb_fp_multiplier_example: the multiplier in the reduced format with a
// 4-bit fraction (8-bit exponent, bias 127, hidden one kept).
//
// First the worked example: A = 0 10000100 0100 (40) times
// B = 1 10000001 1110 (-7.5). The significand product is 10.01011000, the
// exponent 132 + 129 - 127 = 134 becomes 135 after the normalising shift,
// and the truncated result is 1 10000111 0010 (-288, the exact -300 cut to
// four fraction bits). Then every pair of operands with exponents in a
// window around the bias and all fraction values is checked against the
// integer reference model.
module tb_fp_multiplier_example;
  import fpm_ref_pkg::*;

  localparam int F = 4;

  int checks = 0, failures = 0;

  logic          clk = 0, rst, start;
  logic [F+8:0]  a, b, result;
  logic          overflow, underflow, invalid, valid;
  logic [2*F+1:0] product;

  fp_multiplier #(.F(F)) dut (
    .clk, .rst, .start, .a, .b, .result, .overflow, .underflow, .invalid, .product, .valid
  );

  always #5 clk = ~clk;

  initial begin
    repeat (500_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [F+8:0] x, logic [F+8:0] y);
    ref_t r;
    a <= x; b <= y; start <= 1'b1;
    @(posedge clk);
    #1;
    r = ref_mul(F, longint'(x), longint'(y));
    checks++;
    if (!valid || result != (F+9)'(r.result) || overflow != r.overflow ||
        underflow != r.underflow || invalid != r.invalid) begin
      failures++;
      if (failures < 10) $display("FAIL %b * %b -> %b", x, y, result);
    end
  endtask

  initial begin
    rst = 1; start = 0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    run(13'b0_10000100_0100, 13'b1_10000001_1110);
    checks++;
    if (result != 13'b1_10000111_0010 || product != 10'b1001011000 || overflow || underflow) begin
      failures++;
      $display("FAIL worked example: result %b product %b", result, product);
    end
    for (int ea = 0; ea < 256; ea += 3)
      for (int eb = 0; eb < 256; eb += 5)
        for (int fa = 0; fa < 16; fa++)
          for (int fb = 0; fb < 16; fb += 3)
            run({1'(fa + eb), 8'(ea), 4'(fa)}, {1'(fb), 8'(eb), 4'(fb)});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
