// tb_fp_multiplier: end-to-end test of the single-precision multiplier at
// its default parameters.
//
// Operands are issued with start on a random subset of clock cycles; one
// clock later the result, the three flags and the significand product are
// compared with the integer reference model, valid is checked to follow
// start by exactly one cycle, and idle cycles must leave the outputs
// unchanged. Directed operands cover the worked example 40 x -7.5 = -300,
// and random exponents are steered towards the range limits. Each
// mechanism (normalising shift or not, exponent-sum carry compensated by
// the bias, zero exponent rescued by the shift, overflow caused by the
// shift, overflow, underflow, denormal flush, zero, infinity, invalid,
// idle cycle, reset) is counted, and one never exercised counts as a
// failure.
module tb_fp_multiplier;
  import fpm_ref_pkg::*;

  localparam int F = 23;

  int checks = 0, failures = 0;
  int cycles = 0;

  typedef enum int {
    M_SHIFT, M_NOSHIFT, M_CARRY_COMP, M_ZERO_RESCUE, M_NORM_OVF, M_OVERFLOW, M_UNDERFLOW,
    M_DENORM, M_ZERO, M_INF, M_INVALID, M_IDLE, M_RESET, M_COUNT
  } mech_e;
  int seen [M_COUNT];
  string mname [M_COUNT] = '{"normalising shift", "no shift", "exponent carry compensated",
                            "zero exponent rescued", "overflow from normalisation",
                            "overflow", "underflow", "denormal flush", "zero operand",
                            "infinity", "invalid", "idle cycle", "reset"};

  logic        clk = 0, rst, start;
  logic [31:0] a, b, result;
  logic        overflow, underflow, invalid, valid;
  logic [47:0] product;

  fp_multiplier dut (
    .clk, .rst, .start, .a, .b, .result, .overflow, .underflow, .invalid, .product, .valid
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rand_operand(int bias_e);
    logic [31:0] x;
    int e;
    int sel;
    sel = $urandom_range(0, 19);
    unique case (sel)
      0:       e = 0;
      1:       e = 255;
      default: e = bias_e < 0 ? $urandom_range(1, 254) : bias_e;
    endcase
    x = {1'($urandom), 8'(e), 23'($urandom)};
    if ($urandom_range(0, 3) == 0) x[22:0] = '0;
    if ($urandom_range(0, 7) == 0) x[22:0] = '1;
    return x;
  endfunction

  task automatic issue(logic [31:0] x, logic [31:0] y);
    ref_t r;
    logic [31:0] prev;
    // idle cycles in between
    while ($urandom_range(0, 3) == 0) begin
      prev = result;
      start <= 1'b0;
      @(posedge clk);
      #1;
      checks++;
      if (valid || result != prev) begin
        failures++;
        $display("FAIL idle cycle changed outputs");
      end
      seen[M_IDLE]++;
    end
    a <= x; b <= y; start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    #1;
    r = ref_mul(F, longint'(x), longint'(y));
    checks++;
    if (!valid || result != 32'(r.result) || overflow != r.overflow ||
        underflow != r.underflow || invalid != r.invalid ||
        (r.normal_ops && product != 48'(r.product))) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h * %h -> %h o%b u%b i%b v%b (want %h o%b u%b i%b)", x, y, result,
                 overflow, underflow, invalid, valid, 32'(r.result), r.overflow,
                 r.underflow, r.invalid);
    end
    if (r.normal_ops) begin
      if (r.shifted) seen[M_SHIFT]++; else seen[M_NOSHIFT]++;
      if (x[30:23] + y[30:23] > 255 && !r.overflow) seen[M_CARRY_COMP]++;
      if (r.exp_int == 0 && r.shifted) seen[M_ZERO_RESCUE]++;
      if (r.exp_int == 254 && r.shifted) seen[M_NORM_OVF]++;
      if (r.overflow) seen[M_OVERFLOW]++;
      if (r.underflow) seen[M_UNDERFLOW]++;
    end else begin
      if (r.invalid) seen[M_INVALID]++;
      else if (32'(r.result) ==? {1'b?, 8'hFF, 23'd0}) seen[M_INF]++;
      else if (r.underflow) seen[M_DENORM]++;
      else seen[M_ZERO]++;
    end
  endtask

  initial begin
    logic [31:0] x, y;
    int ex;
    int sel;
    rst = 1; start = 0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (valid || result != 0 || overflow || underflow || invalid) begin
      failures++;
      $display("FAIL outputs not cleared by reset");
    end
    seen[M_RESET]++;
    rst <= 0;

    // 40 * -7.5 = -300 (0xC3960000)
    issue(32'h4220_0000, 32'hC0F0_0000);
    checks++;
    if (result != 32'hC396_0000) begin
      failures++;
      $display("FAIL worked example: %h", result);
    end
    // 1.5 * 1.5 = 2.25 needs the shift; 1 * 1 does not
    issue(32'h3FC0_0000, 32'h3FC0_0000);
    issue(32'h3F80_0000, 32'h3F80_0000);
    // exponent sum 0 rescued by the shift, and 254 pushed to overflow
    issue({1'b0, 8'd64, 23'h400000}, {1'b0, 8'd63, 23'h400000});
    issue({1'b0, 8'd200, 23'h400000}, {1'b1, 8'd181, 23'h400000});
    // largest values overflow, smallest underflow
    issue(32'h7F7F_FFFF, 32'h7F7F_FFFF);
    issue(32'h0080_0000, 32'h0080_0000);

    for (int k = 0; k < 20_000; k++) begin
      // steer the exponent sum towards 127 (result near 1), 254 or 381
      sel = $urandom_range(0, 3);
      unique case (sel)
        0: ex = -1;
        1: ex = $urandom_range(1, 126);
        2: ex = $urandom_range(100, 254);
        default: ex = $urandom_range(1, 40);
      endcase
      x = rand_operand(ex);
      if (ex > 0 && $urandom_range(0, 1) == 1) begin
        int t;
        t = $urandom_range(0, 1) ? 254 - ex + 127 : 127 - ex;  // sum 254 or 0
        t = t + $urandom_range(0, 2) - 1;
        y = rand_operand((t >= 1 && t <= 254) ? t : -1);
      end else begin
        y = rand_operand(ex < 0 ? -1 : $urandom_range(1, 254));
      end
      issue(x, y);
    end

    // reset in the middle of operation
    a <= 32'h4000_0000; b <= 32'h4000_0000; start <= 1; rst <= 1;
    @(posedge clk);
    #1;
    checks++;
    if (valid || result != 0) begin
      failures++;
      $display("FAIL reset did not win over start");
    end
    seen[M_RESET]++;

    for (int m = 0; m < M_COUNT; m++) begin
      $display("mechanism %-28s : %0d", mname[m], seen[m]);
      if (seen[m] == 0) begin
        failures++;
        $display("FAIL mechanism never exercised: %s", mname[m]);
      end
    end
    $display("cycles: %0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
