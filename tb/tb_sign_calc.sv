// tb_sign_calc: checks the product sign for all four sign combinations:
// negative exactly when the operand signs differ.
module tb_sign_calc;
  int checks = 0, failures = 0;
  logic sa, sb, sr;

  sign_calc dut (.sign_a(sa), .sign_b(sb), .sign_r(sr));

  initial begin
    #10_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      sa = i[0]; sb = i[1];
      #1;
      checks++;
      if (sr != (sa != sb)) begin
        failures++;
        $display("FAIL sign %b*%b -> %b", sa, sb, sr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
