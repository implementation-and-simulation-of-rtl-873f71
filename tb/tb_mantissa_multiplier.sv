// tb_mantissa_multiplier: checks the 24x24 array multiplier against the
// integer product for corner cases and random significands, and a 5x5
// instance exhaustively. Includes the worked example 1.0100 x 1.1110 =
// 10.01011000 (10100 x 11110 = 1001011000 in binary).
module tb_mantissa_multiplier;
  int checks = 0, failures = 0;

  logic [23:0] a, b;
  logic [47:0] p;
  logic [4:0]  a5, b5;
  logic [9:0]  p5;

  mantissa_multiplier dut (.a(a), .b(b), .prod(p));
  mantissa_multiplier #(.M(5)) dut5 (.a(a5), .b(b5), .prod(p5));

  task automatic check24(logic [23:0] x, logic [23:0] y);
    a = x; b = y;
    #1;
    checks++;
    if (p != 48'(longint'(x) * longint'(y))) begin
      failures++;
      if (failures < 10) $display("FAIL %h*%h -> %h", x, y, p);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a5 = 5'b10100; b5 = 5'b11110;
    #1;
    checks++;
    if (p5 != 10'b1001011000) begin
      failures++;
      $display("FAIL worked example: %b", p5);
    end
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) begin
        a5 = 5'(i); b5 = 5'(j);
        #1;
        checks++;
        if (p5 != 10'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL 5-bit %0d*%0d -> %0d", i, j, p5);
        end
      end
    check24('0, '0);
    check24('1, '1);
    check24(24'h800000, 24'h800000);
    check24(24'hFFFFFF, 24'h800000);
    check24(24'hA00000, 24'hF00000);
    for (int k = 0; k < 3000; k++)
      check24(24'($urandom), 24'($urandom));
    for (int k = 0; k < 1000; k++)
      check24(24'($urandom) | 24'h800000, 24'($urandom) | 24'h800000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
