// tb_exponent_calc: exhaustive check of the intermediate exponent
// e_a + e_b - 127 over all pairs of 8-bit biased exponents, read as a 10-bit
// two's complement number; includes the paper-style example 132 + 129 - 127
// = 134 and the sums that overflow 8 bits.
module tb_exponent_calc;
  import fpm_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] ea, eb;
  logic [9:0] ei;

  exponent_calc dut (.exp_a(ea), .exp_b(eb), .exp_int(ei));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ea = 8'b10000100; eb = 8'b10000001;
    #1;
    checks++;
    if (ei != 10'b0010000110) begin
      failures++;
      $display("FAIL worked example: %b", ei);
    end
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        ea = 8'(i); eb = 8'(j);
        #1;
        checks++;
        if (int'(signed'(ei)) != i + j - 127) begin
          failures++;
          if (failures < 10) $display("FAIL %0d+%0d-127 -> %0d", i, j, signed'(ei));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
