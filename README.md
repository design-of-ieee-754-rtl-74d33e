# Hybrid FLP/LNS double-precision floating-point unit

This FPU works on IEEE-754 doubles and does its four operations in two
different number systems:

* **Addition and subtraction** stay in the ordinary floating-point (FLP)
  format: align, add, normalize, round.
* **Multiplication and division** go through the **logarithmic number
  system (LNS)**. Each operand's mantissa is replaced by its base-2 logarithm,
  read from a table. A product is then a sum of logarithms and a quotient a
  difference, so one adder does the work of a multiplier or divider array. An
  antilogarithm table turns the result back into a mantissa.

The trade is hardware for accuracy. Add and subtract are bit-exact IEEE
round-to-nearest-even. Multiply and divide are approximate. Their relative
error is set by the table size: at the default of 2^10 + 1 words per table
it is at most about 1.35 × 2^-10 ≈ 1.3 × 10^-3. The largest error seen in
the end-to-end test over about 10,000 random products and quotients is
1.18 × 10^-3.

## Number formats

An IEEE double has 1 sign bit, an 11-bit exponent E biased by 1023 and a
52-bit fraction M. A normal number has the value (-1)^s · 2^(E-1023) · 1.M
and an exponent of 1 to 2046. An exponent of 0 means zero; subnormals are
treated as zero (see *Exceptions*). An exponent of 2047 means Inf or NaN.

In the log domain an operand is a sign, a class (zero, normal, Inf or NaN)
and one signed fixed-point number `lg` (type `lns_t` in `fpu_pkg`):

    lg = (E - 1023) + log2(1.M)        13 integer bits . 52 fraction bits

The integer part comes straight from the exponent field. Only the fraction
log2(1.M), which lies in [0, 1), needs the table. Thirteen integer bits are
enough to hold the sum or difference of the logarithms of any two doubles
without wrap-around.

## Pipeline

```
 opa, opb, fpu_op, enable
   │
   ├─ flp_to_lns (a) ─┐   log tables, one per operand
   ├─ flp_to_lns (b) ─┤
   └──────────────── operator_switch   decode; "-1" unit on operand b
                       │
                 ══ register 1 ══                  (edge n)
                       │
         fp_addsub ────┴──── lns_alu               ALU: FLP adder | log adder
                       │
                 ══ register 2 ══                  (edge n+1)
                       │
          FLP result ──┤── lns_to_flp (antilog table)
                      MUX  (selected by the operator carried along)
                       │
         out, ready, invalid, div_by_zero, overflow, underflow, exception
```

A new operation may enter every cycle. Operands presented with `enable`
high before rising edge *n* produce `out` with `ready` high right after
edge *n+1*: a latency of two cycles. Both pipeline registers carry the
operator, and the stage-2 copy steers the output MUX. Results therefore come
out in order, and add and multiply can be mixed freely back to back.

The **operator switch** decodes `fpu_op` (00 add, 01 subtract,
10 multiply, 11 divide). It also holds the **"-1" unit**, so that the ALU
only ever adds:

* for subtract it flips the sign bit of b, and the FLP adder computes a + (-b);
* for divide it negates lg(b) in two's complement, and the log adder computes
  lg(a) + (-lg(b)).

## The addition path (`fp_addsub`)

This is a conventional IEEE adder:

1. Order the operands so that |a| ≥ |b|. The larger exponent is the tentative
   result exponent.
2. Shift the smaller significand right by the exponent difference. Keep a
   guard bit, a round bit and a sticky bit. A difference above 63 leaves only
   the sticky bit.
3. Add the significands if the signs agree, subtract them otherwise.
4. Normalize. After a carry, shift right by one and increment the exponent.
   After cancellation, shift left by the leading-zero count.
5. Round to nearest, ties to even. If rounding carries out of the
   significand, shift right and increment the exponent.
6. The sign is the sign of the larger operand. An exact zero result is +0.

It is a single combinational stage between the two registers.

## The multiply/divide path and its accuracy

**Log table (`log_lut`).** The top `LUT_ABITS` bits of M are rounded to
nearest and used as an address *i* into a table of log2(1 + i/2^LUT_ABITS).
The table has 2^LUT_ABITS + 1 words. The extra last word, log2(2) = 1,
catches a mantissa that rounds up to 2; it carries into the integer part of
`lg`.

**Log adder (`lns_alu`).** A single 65-bit signed adder computes lg(a) +
lg(b). This one addition does all three steps of a log-domain multiply:

* it adds the exponents;
* it adds the mantissa logarithms;
* when the fraction sum reaches 1, the carry moves into the integer part,
  which is the "shift right and increment exponent" of an ordinary
  multiplier.

A divide borrows the same way. The integer part plus 1023 is the result
exponent: 2047 or more overflows to Inf, 0 or less is flushed to zero. The
sign is the XOR of the operand signs.

**Antilog table (`antilog_lut`).** The top `LUT_ABITS` bits of the result's
log fraction f are rounded and used as an address *j* into a table of
2^(j/2^LUT_ABITS) − 1, which gives the mantissa bits. The last word stands
for 2^1: the mantissa becomes 1.0 and the exponent grows by one. At exponent
2046 this overflows to Inf.

**Error budget.** There are three sources of error:

* Rounding each operand's mantissa to `LUT_ABITS` bits moves its logarithm by
  at most 2^-(LUT_ABITS+1)/ln 2 ≈ 0.72 × 2^-LUT_ABITS. This happens twice.
* Rounding the result's log fraction adds at most 0.5 × 2^-LUT_ABITS.
* Together the logarithm is off by at most 1.94 × 2^-LUT_ABITS, which means
  a relative error of at most ln 2 × 1.94 × 2^-LUT_ABITS ≈ 1.35 × 2^-LUT_ABITS.

The table words themselves are held to 52 bits and add nothing visible.
Powers of two multiply and divide exactly. Each extra address bit halves the
error and doubles the three tables. The default tables together hold
3 × 1025 words of 53 bits.

**How the tables are made.** Nothing is read from a file. Each word is
computed while the design is elaborated, by constant functions in 62-bit
fixed point:

* The logarithm uses the squaring method. With x in [1, 2), square x. If the
  square reaches 2, the next bit of log2(x) is 1, and x is halved.
* The antilogarithm first finds the constants 2^(2^-k), k = 1 … LUT_ABITS, by
  repeated bit-by-bit integer square roots starting from 2. It then
  multiplies together the constants selected by the set bits of the address.

Both methods are checked word by word against the simulator's `$ln` and
`$pow`.

## Exceptions

| Case | Result | Flag |
|---|---|---|
| either operand NaN | quiet NaN | `invalid` if it was a signalling NaN |
| Inf − Inf, Inf × 0, 0 / 0, Inf / Inf | quiet NaN | `invalid` |
| finite non-zero / 0 | ±Inf | `div_by_zero` |
| result beyond the largest exponent | ±Inf | `overflow` |
| non-zero result below 2^-1022 | ±0 | `underflow` |

Subnormal operands are read as zero, and subnormal results are flushed to
zero. `exception` is the OR of the four flags. The flags are valid with
`ready`.

## Files

| File | Contents |
|---|---|
| `rtl/fpu_pkg.sv` | formats, operator and class enums, flags, LNS types |
| `rtl/log_lut.sv`, `rtl/antilog_lut.sv` | the two tables |
| `rtl/flp_to_lns.sv`, `rtl/lns_to_flp.sv` | conversion into and out of the log domain |
| `rtl/operator_switch.sv` | operator decode and the "-1" unit |
| `rtl/fp_addsub.sv` | FLP adder |
| `rtl/lns_alu.sv` | log adder, exponent range, special operands |
| `rtl/fpu_double.sv` | top: registers, ALU stage, output MUX |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Each testbench compares its module with an independent reference. That
reference is mostly the simulator's own IEEE double arithmetic on `real`
values, or plain integer arithmetic on the fields. Each testbench ends by
printing `TB_RESULT checks=N failures=M`.

`tb_fpu_double` runs the whole FPU at its default parameters:

* 20 directed and 20,000 random operations, issued back to back with random
  bubbles;
* a check of the two-cycle latency on every result;
* a count of each mechanism: every operator, alignment shift, carry and
  cancellation normalization, rounding carry, log-fraction carry and borrow,
  each flag in each path, back-to-back issue and bubbles. It fails if any of
  them never happens.

## Simulating

With Verilator 5:

```
verilator --binary --timing -y rtl rtl/fpu_pkg.sv tb/tb_fpu_double.sv --top tb_fpu_double
./obj_dir/Vtb_fpu_double
```

Replace `tb_fpu_double` with any other testbench name to run it. The unit
testbenches of the tables run at `ABITS = 8` to stay short; the others use
the default.

## What to trust, and what is a choice of this design

The following come from the FPU description this RTL implements:

* the split into an FLP path for add and subtract and an LNS path for
  multiply and divide, joined by a MUX;
* the log and antilog tables;
* the operator switch and "-1" block;
* the two registers around a shared ALU stage;
* the six steps of the adder;
* the LNS steps: add or subtract the logarithms, carry into the exponent,
  XOR the signs.

The following are this design's own choices:

* the table size (`LUT_ABITS = 10`) and width, and the rounding of table
  addresses;
* round-to-nearest-even in the adder;
* what "-1" does for each operator;
* the operator encoding, the `enable`/`ready` handshake and the synchronous
  active-high reset;
* the flag set and the IEEE special-operand rules;
* flushing subnormals to zero.

The description draws a single log table. Here each operand has its own,
so that one operation can start every cycle.

Multiply and divide are not correctly rounded, and cannot be with this
method. Use them only where a relative error of about 10^-3 (at the default
size) is acceptable, or raise `LUT_ABITS`.
