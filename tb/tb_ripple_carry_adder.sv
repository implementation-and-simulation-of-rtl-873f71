// tb_ripple_carry_adder: exhaustive check of the 8-bit ripple-carry adder
// (all operand pairs, both carry-in values) and a random check of a 24-bit
// one, against the integer sum.
module tb_ripple_carry_adder;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, s8;
  logic        ci8, co8;
  logic [23:0] a24, b24, s24;
  logic        ci24, co24;

  ripple_carry_adder dut8 (.a(a8), .b(b8), .cin(ci8), .sum(s8), .cout(co8));
  ripple_carry_adder #(.N(24)) dut24 (.a(a24), .b(b24), .cin(ci24), .sum(s24), .cout(co24));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(i); b8 = 8'(j); ci8 = 1'(c);
          #1;
          checks++;
          if ({co8, s8} != 9'(i + j + c)) begin
            failures++;
            if (failures < 10) $display("FAIL 8-bit %0d+%0d+%0d -> %0d", i, j, c, {co8, s8});
          end
        end
    for (int k = 0; k < 5000; k++) begin
      a24 = 24'($urandom); b24 = 24'($urandom); ci24 = 1'($urandom);
      #1;
      checks++;
      if ({co24, s24} != 25'(longint'(a24) + longint'(b24) + longint'(ci24))) begin
        failures++;
        if (failures < 10) $display("FAIL 24-bit %h+%h+%0d", a24, b24, ci24);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
