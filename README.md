# IEEE 754 single-precision floating-point multiplier

This multiplier takes two 32-bit IEEE 754 numbers and returns their product.
It has three units that work side by side:

- the sign is the XOR of the two signs;
- the exponent is the sum of the two biased exponents minus the bias 127;
- the significand is the product of the two 24-bit significands, with their
  hidden ones restored. This is a 48-bit "intermediate product" (IP).

A normaliser then shifts the IP right by at most one place. An exception
unit checks the exponent range and handles zero, denormal, infinite and NaN
operands. Every adder in the design is a plain ripple-carry chain of full
adders. This includes the 24 rows of the array multiplier, the exponent
adder, the bias subtraction and the exponent increment. The result fraction
is **truncated**, not rounded. The full 48-bit IP is also available on a
port of its own, for a later unit that wants all of its bits.

```
 a[31:0] ─┬─ sign ──────────► sign_calc ──────────────────────────┐
          ├─ exp[7:0] ──┐                                          │
          └─ frac[22:0] │   exponent_calc ── exp_int (10b signed) ─┤
 b[31:0] ── (same) ─────┘   E1+E2-127            │                 ▼
                                                 ▼          exception_unit ──► result
           {1,frac_a} × {1,frac_b}           normalizer ───►  (overflow,        overflow
           mantissa_multiplier ── IP[47:0] ─► shift/inc       underflow,        underflow
                               │                              invalid, pack)    invalid
                               └──────────────────────────────────────────────► product
                                               all outputs registered on start ► valid
```

## Number format and parameters

A word is `{sign, exponent[7:0], fraction[F-1:0]}`, with `F = 23` by
default. Its value is (-1)^sign × 1.fraction × 2^(exponent−127). The
fraction width `F` is a parameter of the top and of the datapath modules.
The exponent field is 8 bits wide with bias 127 at every `F`. So `F = 4`
gives a small 13-bit format that is handy for hand-worked examples:

    0 10000100 0100  (40)   ×   1 10000001 1110  (−7.5)
    significands 1.0100 × 1.1110 = 10.01011000      (IP = 1001011000)
    exponent     132 + 129 − 127 = 134, +1 for the shift = 135
    result       1 10000111 0010  (−288: the exact −300 truncated to 4 fraction bits)

At `F = 23` the same operands, 0x42200000 × 0xC0F00000, give 0xC3960000
(−300) exactly.

## The exponent path and its range

This is the part that needs the most care. The flags are decided here.

`exponent_calc` adds the two 8-bit biased exponents in an 8-bit ripple-carry
adder. Its carry out is kept as bit 8. It then adds −127, as a 10-bit two's
complement constant, in a second ripple-carry adder. No separate subtractor
is needed. The result `exp_int` is a signed 10-bit number. For normal
operands (exponents 1 to 254) it lies in −125 … 381.

The 8-bit sum can overflow without the result overflowing. For example,
200 + 100 = 300 does not fit in 8 bits, but 300 − 127 = 173 is a normal
exponent. Keeping the carry is what lets the bias subtraction make up for
such an overflow.

The normaliser then adds one to the exponent when the IP needed a shift, and
the exception unit reads the final signed exponent `e`:

| final `e`    | outcome                                              |
|--------------|------------------------------------------------------|
| `e ≤ 0`      | underflow: result ±0, `underflow` = 1               |
| `1 … 254`    | normal result                                        |
| `e ≥ 255`    | overflow: result ±Inf, `overflow` = 1               |

Two edge cases are decided only after the normalising increment:

- An intermediate exponent of 0 becomes a normal 1 when the IP has to be
  shifted.
- An intermediate exponent of 254 becomes an overflow when the IP has to be
  shifted.

An intermediate exponent below 0 always underflows.

## Special operands

These are checked before the range test, in this order (the first match
wins):

1. **Invalid.** Either operand is NaN, or an infinity meets a zero or a
   denormal. The result is the quiet NaN pattern `0 11111111 100…0`
   (0x7FC00000) and `invalid` = 1.
2. **Infinity.** Either operand is ±Inf. The result is ±Inf with no flag.
3. **Zero.** Either operand is exactly ±0. The result is ±0 with no flag.
4. **Denormal.** Either operand is denormal. It is not supported: the result
   is flushed to ±0 and `underflow` = 1.

The exception unit also reports which case applied, as a `res_kind_e` value
(see `fpm_pkg`). The top does not use it.

## Significand multiplier

`mantissa_multiplier` is an array of `M = F+1` rows. Each row is an M-bit
ripple-carry adder:

- Row *i* adds the partial product `a & {M{b[i]}}` to the upper M bits left
  by row *i−1*. Row 0 starts from zero.
- The lowest sum bit of row *i* is final and becomes product bit *i*.
- The other M−1 sum bits and the row's carry out move down to the next row.
- After the last row, those M bits are product bits 2M−1 … M.

This is a direct, slow structure: its delay is about M rows times an M-bit
carry ripple. It is about 1,650 AND gates and 1,100 XOR gates at M = 24.

## Normalisation and truncation

Both significands lie in [1, 2), so their product lies in [1, 4). The
binary point of the IP sits between bits 46 and 45, and the leading one is
at bit 47 or bit 46:

- If it is at bit 47, a row of 2:1 multiplexers shifts the IP right by one,
  and the exponent is incremented. The increment is a ripple-carry adder
  with the shift bit as its carry-in.
- The fraction is the 23 bits just below the leading one. All lower bits
  are dropped: there is no rounding mode, only truncation.

## Interface and timing (`fp_multiplier`)

| port        | dir | width  | meaning                                                |
|-------------|-----|--------|--------------------------------------------------------|
| `clk`       | in  | 1      | clock                                                  |
| `rst`       | in  | 1      | synchronous reset, active high; clears all outputs     |
| `start`     | in  | 1      | load the result for `a`, `b` at this clock edge        |
| `a`, `b`    | in  | F+9    | operands                                               |
| `result`    | out | F+9    | product, truncated                                     |
| `overflow`  | out | 1      | exponent above 254: result is ±Inf                     |
| `underflow` | out | 1      | exponent below 1, or denormal operand: result is ±0    |
| `invalid`   | out | 1      | NaN operand, or infinity × zero                        |
| `product`   | out | 2F+2   | 48-bit intermediate significand product, not shifted   |
| `valid`     | out | 1      | outputs were loaded at the last edge                   |

The whole datapath is combinational, from `a`/`b` to one output register:

- At a rising edge where `start` = 1, all outputs are loaded and `valid`
  goes high for one cycle.
- The latency is one clock, and one operation can be started every clock.
- When `start` = 0, the outputs hold their values.
- `rst` has priority over `start`.
- An assertion checks that at most one of the three flags is set.

## Where this RTL departs from the source design or fills gaps

- **Rounding.** The original design description lists rounding as a step of
  the algorithm, but its implementation does not round. This RTL truncates,
  and adds the raw 48-bit product as an output.
- **Clocking and handshake.** The original block diagram shows only a clock
  and a reset. These are this design's own choices:
  - the single output register;
  - the `start` input and the `valid` output;
  - reset polarity and synchronous reset.
- **Invalid flag.** The original names an invalid output but does not define
  it. The NaN / Inf × 0 rule above is this design's own. So is the handling
  of exact zero and infinite operands.
- **Normal range.** The normal exponent range is taken as 1 … 254 inclusive.
- **Adders.** All adders are ripple-carry. A carry-skip adder built from
  4-bit ripple blocks would be a faster drop-in for `ripple_carry_adder` if
  needed.
- **Not modelled.**
  - The original reports a 14 ns combinational delay on its FPGA target.
    Simulation here has no timing, so this is not modelled.
  - No floating-point adder is part of this design.

## Files

| file | contents |
|------|----------|
| `rtl/fpm_pkg.sv` | widths, bias, `NEG_BIAS`, result-kind enum |
| `rtl/full_adder.sv` | one-bit full adder |
| `rtl/ripple_carry_adder.sv` | N-bit ripple-carry adder (default N = 8) |
| `rtl/sign_calc.sv` | sign XOR |
| `rtl/exponent_calc.sv` | E1 + E2 − 127 |
| `rtl/mantissa_multiplier.sv` | M×M array multiplier (default M = 24) |
| `rtl/normalizer.sv` | one-place right shift, exponent increment, truncation |
| `rtl/exception_unit.sv` | special operands, overflow/underflow, result packing |
| `rtl/fp_multiplier.sv` | top level |
| `tb/fpm_ref_pkg.sv` | integer reference model used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_fp_multiplier_example` |

## Verification

Every testbench checks against values computed independently and ends with
a `TB_RESULT checks=… failures=…` line.

| testbench | what it checks |
|-----------|----------------|
| `tb_ripple_carry_adder` | the 8-bit adder exhaustively, with both carry-in values; a 24-bit adder randomly |
| `tb_exponent_calc` | all 65,536 pairs of exponents |
| `tb_mantissa_multiplier` | a 5×5 instance exhaustively; the 24×24 array with corner cases and 4,000 random pairs |
| `tb_normalizer` | the shift decision, the exponent increment and the fraction |
| `tb_exception_unit` | every outcome and the range limits 0, 1, 254, 255, plus random fields |
| `tb_fp_multiplier` | end to end at the default size (see below) |
| `tb_fp_multiplier_example` | the 4-bit-fraction format: the worked example above, then about 430,000 operand pairs against the reference model |

`tb_fp_multiplier` runs about 20,000 operations at random issue times. It
checks:

- the result, the flags, `product` and one-cycle `valid`;
- that idle cycles leave the outputs unchanged;
- reset.

It counts every mechanism and fails if any never occurs:

- a normalising shift and no shift;
- an exponent carry made up by the bias;
- a zero exponent rescued by the shift;
- an overflow caused by the shift;
- overflow and underflow;
- denormal flush, zero, infinity and invalid;
- idle cycles and reset.

To simulate with Verilator (packages first):

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/fpm_pkg.sv tb/fpm_ref_pkg.sv rtl/*.sv tb/tb_fp_multiplier.sv \
  --top-module tb_fp_multiplier -o sim && ./obj_dir/sim
```

Replace the testbench name to run any other one. Every run takes well under
a second.

## Changing it

- **Fraction width.** Set `F` on `fp_multiplier`. The significand array and
  the product port follow automatically. The reference model handles
  `F` ≤ 30.
- **Rounding.** A rounding stage would go in `normalizer`. The dropped bits,
  `ip_norm[F-1:0]`, are the guard and sticky bits. It would also need a
  second check for a carry into the exponent.
- **Adders.** A faster adder can replace `ripple_carry_adder` without any
  change to its ports.
