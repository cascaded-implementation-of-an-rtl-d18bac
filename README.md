# Cascaded inverse square root for single-precision floating point

This is a combinational datapath that computes `y = 1/sqrt(v)` for an IEEE-754
single-precision operand. It uses no divider. It runs the multiplicative
iteration

    x(i+1) = x(i) * (3/2 - b * x(i)^2 / 2)

exactly twice. The two iterations are not one loop reused: they are two
separate pieces of logic in series (a *cascade*). Each piece is trimmed to what
its own accuracy needs:

* The **first stage** needs only about 13 correct bits. It drops the bottom of
  the computation and reads `x0^2` from the seed table instead of squaring.
* The **second stage** needs full accuracy. Its correction factor is `1 + delta`
  with a tiny `delta`, so it computes `x1 + delta*x1` directly. The long run of
  identical bits between the leading 1 and `delta` (the *middle* of the
  computation) is never formed.

The exponent is handled on a separate path, beside the mantissa. It needs only
the operand exponent, plus one early-detected special case (the *overflow
lookahead*). So the exponent never waits for the mantissa.

The structure, the table and the first-stage bit widths follow the published
method. The second-stage widths, the rounding and a few details listed under
[Departures and choices](#departures-and-choices) are this implementation's own.

## From floating point to fixed point

An operand `v = 2^(e-127) * 1.m` has an inverse square root with mantissa
`1/sqrt(b)`. Here `b` is the operand mantissa moved into `[1/4, 1)`:

| exponent LSB `e0` | `b`              | range of `b`  | range of `1/sqrt(b)` |
|-------------------|------------------|---------------|----------------------|
| 0 (even `e`)      | `0.1 m22 .. m0`  | `[1/2, 1)`    | `(1, sqrt 2]`        |
| 1 (odd `e`)       | `0.01 m22 .. m0` | `[1/4, 1/2)`  | `(sqrt 2, 2]`        |

This one-bit *denormalization* makes the result mantissa depend only on `e0` and
`m`. The result exponent depends only on `e`:

    e' = (380 - e)/2   for even e
    e' = (379 - e)/2   for odd e

The one exception is `b = 1/4` exactly (odd `e`, `m = 0`). There the mantissa
result is 2.0, so the exponent must be one higher.

## Seed table (`isqrt_rom`)

The table has 256 entries. It is addressed by `{e0, m22..m16}`. Each word holds
two values:

* the seed `x0` in 9 bits, format 1.8 (leading 1 included);
* its square `q = x0^2` in 12 bits, format 2.10.

Storing the square saves a multiplier in the first stage.

Each address covers an interval `[lo, hi)` of `b`. The seed is made to err
**low** everywhere in that interval, so that `b*x0^2 < 1` always holds. Then
the sign of the error is known in advance, and the first stage needs no
carry-propagating correction for it. The table is built in three steps:

1. Take the seed at the top of the interval: `x0 = floor(256 / sqrt(hi)) / 256`.
2. Square that truncated seed.
3. Truncate the square to 10 fraction bits.

The contents are computed during elaboration by `isqrt_pkg::seed_x0` and
`isqrt_pkg::seed_q`. They use an exact integer square root,
`x0 = isqrt(floor(2^(24+e0) / (129 + m22..16)))`, so no data file is needed.

## First stage (`denorm_shifter`, `isqrt_stage1`)

* `denorm_shifter` is a row of 2:1 multiplexers. It forms `b1 = 0.1 m22..m9`
  with 15 fraction bits, shifted right once when `e0 = 1` (m9 then falls off).
* A 15x12 array multiplier forms `b1*q`. This product is below 1 and always reads
  `00.1xxxx...`. Only its fraction bits `p1..p14` are kept.
* Halving and subtracting from 3/2 need no adder, only wiring and inverters. The
  factor is `1.0 ~p1 ~p2 ... ~p14` (16 bits, format 1.15). This is the ones'
  complement of `b1*q/2` placed after `1.0`. It is at most 2^-15 below the exact
  `3/2 - b1*q/2`.
* A 16x9 array multiplier forms `x1 = factor * x0`. The result is 25 bits, format
  2.23, and its top bit is always 0.

## Second stage (`isqrt_stage2`)

1. Square `x1` with a 25x25 array multiplier. Keep the square to 30 fraction
   bits.
2. Multiply the square by the full operand `b2`: the untruncated
   `0.1 m22..m0` or `0.01 m22..m0`, with 25 fraction bits. Keep the product to
   34 fraction bits.
3. `b*x1^2` is within about 2^-10 of 1. All bits above weight 2^-9 are therefore
   copies of the sign of `b*x1^2 - 1`: the pattern is `01.000000000` or
   `00.111111111`. Only the 26-bit *bottom part* (weights 2^-9 .. 2^-34) is
   kept. Read as a two's-complement number, it equals `b*x1^2 - 1`. Inverting it
   gives `2*delta = 1 - b*x1^2`, to within 2^-34.
4. A signed array multiplier forms `2*delta*x1`. Dropping one more bit halves
   it, which gives `delta*x1` with 30 fraction bits.
5. Add `x1 + delta*x1`. Round to 23 fraction bits by adding half an LSB and
   truncating.

`delta` is signed here on purpose. In both published worked examples, `x1` comes
out slightly **above** `1/sqrt(b)`. This happens because the truncated seed
square makes `b*q` smaller than `b*x0^2`, so the first correction overshoots.
`delta` is then negative. About three quarters of random operands give a
negative `delta`; the rest give a positive one.

### Mantissa overflow

Only `b = 1/4` has a true result of exactly 2.0. For that operand the
second-stage sum lies just below 2.0, and rounding carries into the 2^1
position. The stored 23 fraction bits are then all zero, which is already the
correct fraction for 2.0. So no mantissa correction logic exists. The carry is
brought out of `isqrt_stage2` as `mant_ge2` for testing only.

## Exponent path (`exponent_unit`, `overflow_lookahead`)

`overflow_lookahead` detects `e0 = 1` together with `m = 0`. This is a 24-input
AND. It is built as a small tree: six 4-input NORs, two 3-input ANDs and one
2-input AND. It has the whole mantissa datapath's delay to settle.

`exponent_unit` rewrites both exponent formulas as a single sum with no adder
for `e` itself:

    s = (~e >> 1) + 62 + c,      c = ~e0 | overflow

Seven bit slices each add one bit of the constant 62 (`0111110`) to one of the
inverted bits `~e7..~e1`. The carry out of the top slice is `s7`. The even/odd
choice and the overflow share the carry into the lowest slice. This works
because an overflow only happens for odd exponents.

## Interface and timing

```
module isqrt_fp32 import isqrt_pkg::*; (
  input  fp32_t v,    // {sign, exp[7:0], mant[22:0]}, positive normal numbers
  output fp32_t y,    // 1/sqrt(v); sign always 0
  output logic  ovf   // overflow lookahead fired (v = 2^odd * 1.0)
);
```

The whole design is combinational. It has no clock, no registers and no
handshake, and `y` is valid one propagation delay after `v`. The method
describes a cascade of logic, not a pipeline. If you need one, add registers
between `isqrt_stage1` and `isqrt_stage2`: `x1` and `b2` are the only signals
that cross there.

Operands must be positive normal numbers (exponent 1..254). Zero, negative
numbers, subnormals, infinities and NaNs get no special handling and give
meaningless results.

## Accuracy

The result mantissa depends only on `e0` and the 23 fraction bits, so a sweep
over all 2^24 of these combinations (`tb_isqrt_sweep`) covers every case. Against
a double-precision `1/sqrt(v)`:

| error           | share of all mantissas |
|-----------------|------------------------|
| within 0.5 ulp  | 80.0 %                 |
| within 1 ulp    | 94.9 %                 |
| within 2 ulp    | 99.6 %                 |
| within 3 ulp    | 100 %                  |

The worst case is **2.71 ulp**. Results for `v = 2^(odd)` are exact.

The published error analysis predicts about 2^-27.9, which is far better. That
analysis counts only the seed's address and entry truncation. It leaves out the
truncation of the stored square to 10 fraction bits. That truncation is up to
2^-10 relative for `x0` near 1 (`b` near 1). It leaves the first stage with an
error near 2^-11, and the second iteration squares that error to about 2^-21.8.
The table widths of the method were kept as published. In a bit-accurate model
of this datapath, storing the square with 14 fraction bits instead of 10 (a
15x16 first multiplier, `p1..p14` still kept) brings the worst case down to
about 0.6 ulp (random sample).

The second stage's own truncations are below 2^-27 (checked by
`tb_isqrt_stage2`). They do not limit accuracy.

## Departures and choices

* **Second-stage widths** (30, 34, 26 and 30 fraction bits) are this design's
  choice. They are formed as full array products and then truncated, not as
  reduced-precision multipliers.
* **Signed correction** in the second stage. The method's text expects
  `b*x1^2 < 1`, but its worked examples have `b*x1^2 > 1`.
* **Rounding:** round to nearest, ties away from zero.
* **No mantissa clearing on overflow.** Rounding to 2.0 already leaves the
  fraction bits at zero.
* **Array multiplier structure:** one partial-product row per multiplier bit,
  summed in a chain. The method names array multipliers but does not give their
  insides.
* **Slice logic** of the exponent circuit: written as sum/carry equations, not
  as a gate netlist.
* **Special operands** (zero, sign, subnormal, Inf, NaN) are not treated.

## Files

| file | contents |
|------|----------|
| `rtl/isqrt_pkg.sv` | widths, `fp32_t`, seed-table formulas |
| `rtl/isqrt_fp32.sv` | top level |
| `rtl/isqrt_rom.sv` | seed table |
| `rtl/denorm_shifter.sv` | first-stage operand `b1` |
| `rtl/isqrt_stage1.sv` | first iteration |
| `rtl/isqrt_stage2.sv` | second iteration and rounding |
| `rtl/array_mult.sv` | array multiplier, optionally signed multiplier operand |
| `rtl/overflow_lookahead.sv` | 24-input overflow detector |
| `rtl/exponent_unit.sv` | exponent circuit |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_isqrt_sweep.sv` | accuracy sweep over all 2^24 mantissas (a few seconds) |

Each testbench prints `TB_RESULT checks=N failures=M` and exits.
`tb_isqrt_fp32` checks three things:

* the two worked examples, step by step: seed, square, factor, first-stage
  result, exponent and final result;
* all power-of-two edges;
* random operands.

It also counts the overflow case, even and odd exponents and second-stage
corrections of both signs, and fails if any of these never happens.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/` (the package
is named first; `-y rtl` finds every module by its file name):

```
verilator --binary --timing --assert -y rtl +libext+.sv rtl/isqrt_pkg.sv \
          tb/tb_isqrt_fp32.sv --top-module tb_isqrt_fp32
./obj_dir/Vtb_isqrt_fp32
```

Replace `isqrt_fp32` with any other module name to run that module's test. Lint
with `verilator --lint-only -Wall -y rtl +libext+.sv rtl/isqrt_pkg.sv
rtl/isqrt_fp32.sv`. The remaining warnings are about unused bits and constants:
the truncated product bits, package constants a module does not need, and
outputs such as `x2` and `mant_ge2` that exist for testing.
