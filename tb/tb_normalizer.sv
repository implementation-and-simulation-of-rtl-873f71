// tb_normalizer: drives intermediate products with the leading one at
// bit 47 or bit 46 and random signed exponents, and checks the shift, the
// exponent increment and the truncated fraction
// against values computed here. Also the worked example in the 4-bit
// fraction format: 10.01011000 with exponent 134 becomes 1.001011000 with
// exponent 135 and fraction 0010.
module tb_normalizer;
  import fpm_pkg::*;
  int checks = 0, failures = 0;
  int n_shift = 0, n_noshift = 0;

  logic [47:0] ip;
  logic [9:0]  ei, eo;
  logic [22:0] fr;
  logic        sh;

  logic [9:0] ip4;
  logic [9:0] ei4, eo4;
  logic [3:0] fr4;
  logic       sh4;

  normalizer dut (.ip(ip), .exp_in(ei), .frac(fr), .exp_out(eo), .shifted(sh));
  normalizer #(.F(4)) dut4 (.ip(ip4), .exp_in(ei4), .frac(fr4), .exp_out(eo4),
                            .shifted(sh4));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [47:0] exp_ipn;
    bit          top;
    ip4 = 10'b1001011000; ei4 = 10'd134;
    #1;
    checks++;
    if (!sh4 || eo4 != 10'd135 || fr4 != 4'b0010) begin
      failures++;
      $display("FAIL worked example: sh=%b e=%0d f=%b", sh4, eo4, fr4);
    end
    for (int k = 0; k < 4000; k++) begin
      top = 1'($urandom);
      ip  = {$urandom, $urandom} & 48'h3FFF_FFFF_FFFF;
      ip[46] = 1'b1;
      ip[47] = top;
      ei  = 10'($urandom_range(0, 1023));
      #1;
      exp_ipn = top ? ip >> 1 : ip;
      checks++;
      if (sh != top || eo != 10'(ei + 10'(top)) || fr != exp_ipn[45:23]) begin
        failures++;
        if (failures < 10) $display("FAIL ip=%h ei=%0d -> sh=%b eo=%0d", ip, ei, sh, eo);
      end
      if (top) n_shift++; else n_noshift++;
    end
    if (n_shift == 0 || n_noshift == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
