// tb_exception_unit: directed cases for every outcome (normal, zero,
// infinity, invalid, denormal flush, overflow, underflow, and the limits
// exponent 0 / 1 / 254 / 255) plus random field values, checked against
// the classification rules written out here.
module tb_exception_unit;
  import fpm_pkg::*;
  int checks = 0, failures = 0;
  int seen [8];

  logic [7:0]  ea, eb;
  logic [22:0] fa, fb, fn;
  logic        s;
  logic [9:0]  en;
  logic [31:0] res;
  logic        ovf, unf, inv;
  res_kind_e   kind;

  exception_unit dut (
    .exp_a(ea), .frac_a(fa), .exp_b(eb), .frac_b(fb), .sign_r(s),
    .exp_norm(en), .frac_norm(fn), .result(res),
    .overflow(ovf), .underflow(unf), .invalid(inv), .kind(kind)
  );

  task automatic apply(logic [7:0] xa, logic [22:0] xfa, logic [7:0] xb, logic [22:0] xfb,
                       logic xs, int xe, logic [22:0] xfn);
    logic [31:0] want;
    bit wo, wu, wi;
    int k;
    ea = xa; fa = xfa; eb = xb; fb = xfb; s = xs; en = 10'(xe); fn = xfn;
    #1;
    wo = 0; wu = 0; wi = 0;
    if ((xa == 255 && xfa != 0) || (xb == 255 && xfb != 0) ||
        (xa == 255 && xb == 0) || (xb == 255 && xa == 0)) begin
      wi = 1; want = 32'h7FC0_0000; k = 3;
    end else if (xa == 255 || xb == 255) begin
      want = {xs, 8'hFF, 23'd0}; k = 2;
    end else if ((xa == 0 && xfa == 0) || (xb == 0 && xfb == 0)) begin
      want = {xs, 31'd0}; k = 1;
    end else if (xa == 0 || xb == 0) begin
      wu = 1; want = {xs, 31'd0}; k = 6;
    end else if (xe >= 255) begin
      wo = 1; want = {xs, 8'hFF, 23'd0}; k = 4;
    end else if (xe <= 0) begin
      wu = 1; want = {xs, 31'd0}; k = 5;
    end else begin
      want = {xs, 8'(xe), xfn}; k = 0;
    end
    checks++;
    if (res != want || ovf != wo || unf != wu || inv != wi || int'(kind) != k) begin
      failures++;
      if (failures < 10)
        $display("FAIL ea=%0d fa=%h eb=%0d fb=%h e=%0d -> %h o%b u%b i%b k%0d (want %h k%0d)",
                 xa, xfa, xb, xfb, xe, res, ovf, unf, inv, kind, want, k);
    end
    seen[k]++;
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(130, 5, 120, 7, 1, 123, 23'h12345);     // normal
    apply(130, 5, 120, 7, 0, 1, 23'h7FFFFF);      // smallest normal exponent
    apply(200, 5, 181, 7, 1, 254, 23'h1);         // largest normal exponent
    apply(200, 5, 182, 7, 1, 255, 23'h1);         // overflow at 255
    apply(254, 0, 254, 0, 0, 381, 23'h0);         // overflow, maximum
    apply(100, 0, 27, 0, 1, 0, 23'h0);            // underflow at 0
    apply(1, 0, 1, 0, 0, -125, 23'h0);            // underflow, minimum
    apply(0, 0, 100, 3, 1, -27, 23'h0);           // zero operand
    apply(0, 9, 100, 3, 1, -27, 23'h0);           // denormal operand
    apply(255, 0, 100, 3, 1, 228, 23'h0);         // infinity
    apply(255, 0, 0, 0, 1, 128, 23'h0);           // inf * 0
    apply(0, 4, 255, 0, 1, 128, 23'h0);           // denormal * inf
    apply(255, 1, 100, 3, 0, 228, 23'h0);         // NaN
    for (int k = 0; k < 5000; k++) begin
      int e;
      e = $urandom_range(0, 520) - 130;
      apply(8'($urandom_range(0, 3) == 0 ? ($urandom_range(0, 1) ? 255 : 0) : $urandom),
            ($urandom_range(0, 1) ? 23'($urandom) : 23'd0),
            8'($urandom_range(0, 3) == 0 ? ($urandom_range(0, 1) ? 255 : 0) : $urandom),
            ($urandom_range(0, 1) ? 23'($urandom) : 23'd0),
            1'($urandom), e, 23'($urandom));
    end
    for (int k = 0; k < 7; k++)
      if (seen[k] == 0) begin
        failures++;
        $display("outcome %0d never exercised", k);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
