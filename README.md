# Digit-serial integer power unit: z = x^y mod 2^k without a multiplier

This unit computes the integer power `z = x^y mod 2^k` of two `k`-bit
unsigned operands using only adders, shifters and a `k`-entry table. It
needs no multiplier. It works right to left, one bit position per step, and
produces the `k`-bit result after `3*(k-3)+2` clock periods. The default word
size is `k = 128`. The same RTL also builds at `k = 8, 16, 32` and `64`.

The trick is to take a discrete logarithm. Every odd residue modulo `2^k`
can be written as

    x = (-1)^s * 3^e  (mod 2^k),   s in {0,1},  0 <= e < 2^(k-2)

so raising it to the power `y` is an *integer multiplication* of the
exponent: `x^y = (-1)^(s*y) * 3^(e*y)`. The unit converts `x` to `(s, e)`,
multiplies `e` by `y`, and converts `3^(e*y)` back to binary. It overlaps the
three jobs bit by bit. Even bases are handled by factoring out the power of
two: `x = 2^p * n` with `n` odd gives `x^y = 2^(p*y) * n^y`.

## Why it can run bit-serially

The low `j` bits of a sum, a product or a power depend only on the low `j`
bits of the operands. The three recurrences below keep to this rule. Each
one fixes one more low-order bit per step and never changes a bit it has
already fixed. As a result, the next stage can use a bit in the same
iteration in which the previous stage produced it.

### The two-ones discrete logs (`dlg_rom`)

All three recurrences use the exponents `dlg(2^i+1)`. These are the numbers
`d` with `3^d = 2^i + 1 (mod 2^k)`. There is one for `i = 1`
(`dlg(3) = 1`) and one for every `i >= 3`. There is none for `i = 2`,
because `5` is not a power of 3 modulo 8. For `i >= 3` the lowest set bit of
`dlg(2^i+1)` is bit `i-2`.

Multiplying by `2^i+1` costs one shift and one add (`v + (v << i)`). It flips
bit `i` of an odd `v` and leaves the bits below it alone. For `k = 8` the
table holds, modulo 64:

| i | 2^i+1 | dlg(2^i+1) |
|---|-------|------------|
| 1 | 3     | 1          |
| 3 | 9     | 2          |
| 4 | 17    | 52         |
| 5 | 33    | 40         |
| 6 | 65    | 16         |
| 7 | 129   | 32         |

The ROM is not typed in by hand. A constant function computes it during
elaboration and finds each logarithm bit by bit. Multiplying by `3^(2^j)`
(`j >= 1`) flips bit `j+2` of a residue and keeps the bits below it. So bit
`j` of the logarithm is set exactly when the partial power and the target
differ in bit `j+2`. The same rule applies to bit 1 for `j = 0`.

### The three interleaved recurrences (`fsa_datapath`)

Each iteration has an index `i` that runs `1, 3, 4, ..., k-1`, and a
product bit `j = i-2` (`j = 0` when `i = 1`). Registers `p`, `z` are `k`
bits wide. Registers `e`, `t`, `m`, `q` are `k-2` bits wide, because only
their value modulo `2^(k-2)` matters.

1. **Conversion (DLG).** `p` starts at 1 and is always `3^e`. If bit `i` of
   `x` differs from bit `i` of `p`, then `p += p << i` and
   `e += dlg(2^i+1)`. Afterwards `p` agrees with `x` up to bit `i`, and bit
   `j` of `e` is final.
2. **Accumulation (ACC).** `t` holds `y << j`. If bit `j` of `e` is set,
   then `m += t`. Afterwards bit `j` of `m = e*y mod 2^(k-2)` is final.
3. **Deconversion (EXP).** First `q += (bit j of m) << j`. Then, if bit `j`
   of `q` is set, `z += z << i` and `q -= dlg(2^i+1)`. The invariant is
   `z = 3^(m - q)`, with the low `j+1` bits of `q` zero. So after the last
   step `z = 3^(e*y) mod 2^k`. Then `t` shifts left by one.

Conversion step `i` and deconversion step `j` use the same table entry.
One ROM read, addressed by the loop counter, therefore serves both stages.

Before the loop, `x` is normalised. If `x mod 8` is 5 or 7 (bit 2 set), the
unit sets `s = 1` and works on `2^k - x`. After the loop, the result is
negated when `s = 1` and `y` is odd.

Example for `k = 8`, `x = 11`, `y = 5` (`dlg(11) = 39`, `39*5 mod 64 = 3`,
`3^3 = 27`). The values shown are after each iteration:

| i | j | DLG update | p        | e      | m      | EXP update | z        |
|---|---|------------|----------|--------|--------|------------|----------|
| 1 | 0 | yes        | 00000011 | 000001 | 000101 | yes        | 00000011 |
| 3 | 1 | yes        | 00011011 | 000011 | 001111 | yes        | 00011011 |
| 4 | 2 | yes        | 11001011 | 110111 | 100011 | no         | 00011011 |
| 5 | 3 | no         | 11001011 | 110111 | 100011 | no         | 00011011 |
| 6 | 4 | yes        | 10001011 | 000111 | 100011 | no         | 00011011 |
| 7 | 5 | yes        | 00001011 | 100111 | 000011 | no         | 00011011 |

The high bits of `e` and `m` keep changing, but each low bit stays fixed
once its step has passed. `z = 27 = 11^5 mod 256`.

## Controller and timing (`fsa_controller`)

The controller is a six-state FSM with a loop counter:

    Load --load--> Init --> [Loop_DLG -> Loop_ACC -> Loop_EXP] x (k-3) --> Ready --> Load

* **Load** is the reset state. It waits for `load`, then captures and
  normalises the operands.
* **Init** performs all three steps for `i = 1` in a single clock.
* Each index `i = 3..k-1` then spends one clock in each sub-stage state.
  **Loop_DLG** updates `p` and `e`. **Loop_ACC** updates `m`.
  **Loop_EXP** updates `z`, `q` and `t`.
* **Ready** shows the result for one clock, then returns to Load on its own.

The counter reads 1 during Init and `i` during the loop. It addresses the
ROM and selects the bits that the bit checkers test.

Let the clock period in which `load` is sampled be period 0. Then `ready`
is high in period `3*(k-3)+2` and nowhere else. The unit accepts a new
`load` in the next period, so it runs back to back. Results arrive after:

| k | clocks after load |
|---|-------------------|
| 8 | 17 |
| 16 | 41 |
| 32 | 89 |
| 64 | 185 |
| 128 | 377 |

## Even bases and zero (`pow2_factor`)

The shift-add core needs an odd base. `pow2_factor` sits around the core:

* On the way in, it counts the trailing zeros `p` of `x` and passes on
  `n = x >> p`.
* On the way out, it shifts the core's `n^y` left by `p*y`.

If `p*y >= k` (or `y >= k` with `p >= 1`), the result is zero. The shift
amount is stored when the operands are loaded. The product `p*y` is formed
only on two `log2(k)+1`-bit numbers. The top `p` bits of `n` are zeros
rather than the true high bits of the odd part, but the final shift by at
least `p` discards them.

Zero operands follow these conventions: `0^y = 0` for `y > 0`, and
`x^0 = 1` for every `x`, including `0^0 = 1`.

## Top level (`fsa_power`)

```
module fsa_power #(parameter int K = 128) (
  input  logic clk, rst_n,        // rst_n: asynchronous, active low
  input  logic load,              // start; sampled while idle
  input  logic [K-1:0] x, y,      // base, exponent
  output logic idle,              // in Load, will accept load
  output logic busy,              // Init .. last Loop_EXP
  output logic ready,             // one-clock strobe, z valid
  output logic [K-1:0] z);        // x^y mod 2^K
```

`x` and `y` are needed only in the clock in which `load` is sampled. `load`
is ignored while the unit is busy.

The result of a `K`-bit unit, truncated to its low `k` bits, is the `k`-bit
power of the truncated operands. So a 128-bit unit also serves narrower
words, although it takes the 128-bit latency to do so. `K` must be at least
4.

## Files

| file | contents |
|------|----------|
| `rtl/fsa_pkg.sv` | controller state type |
| `rtl/dlg_rom.sv` | table of `dlg(2^i+1)`, computed during elaboration |
| `rtl/fsa_controller.sv` | six-state FSM and loop counter |
| `rtl/fsa_datapath.sv` | registers, bit checkers, shift-and-add units, sign |
| `rtl/pow2_factor.sv` | factor `2^p` out of `x`, scale the result by `2^(p*y)` |
| `rtl/fsa_power.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_fsa_power_sizes` |

The testbenches compute their expected values independently, using
square-and-multiply on 128-bit numbers. Each one prints
`TB_RESULT checks=N failures=M`. They cover the following:

* `tb_dlg_rom`
  * `3^entry = 2^i+1` for every entry at `k = 8` and `k = 128`.
  * The position of the lowest set bit of each entry.
  * The `k = 8` values listed above.
* `tb_fsa_controller`
  * The exact sequence of states and counter values.
  * The latency.
  * That loads are ignored while busy.
  * Asynchronous reset.
* `tb_fsa_datapath`
  * Random and corner-case odd operands at `k = 16` and `k = 128`.
  * The latency.
* `tb_pow2_factor`
  * The odd part and the final scaling for random even bases.
  * Zero operands.
  * Results shifted out to zero.
* `tb_fsa_power`
  * The whole unit at its default size, end to end.
  * It counts how often each mechanism occurs: conversion updates and
    skips, sign negation, even base, zero base, zero exponent, result
    shifted out, ignored load, back-to-back start.
  * A mechanism that never occurs counts as a failure.
* `tb_fsa_power_sizes`
  * Units at `k = 8, 16, 32, 64`, each with its own latency.
  * Each checked against a 128-bit unit fed the same operands.

To simulate with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/fsa_pkg.sv tb/tb_fsa_power.sv \
          --top-module tb_fsa_power --Mdir obj && ./obj/Vtb_fsa_power
```

Swap in any other testbench name in the same way. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/fsa_pkg.sv rtl/<module>.sv`.
The only remaining lint warning is `SYNCASYNCNET` for `rst_n`. It appears
because the controller's assertions use the asynchronous reset as their
`disable iff` condition, which is intended.

## How this departs from the published algorithm

The published description was followed for these parts:

* the shift-add method
* the three sub-stages
* the six controller states
* the shared lookup table
* the odd/even factorisation

The details below were settled here instead, either because the published
text is inconsistent or because it does not say:

* **Conversion test.** The published pseudo-code writes the update
  condition as "bit `i` of `x` equals bit `i` of `p`". That cannot make `p`
  converge to `x`. The unit updates when the two bits *differ*, which is
  what the method requires. `e` is increased by the table entry, as the
  algorithm states, not decreased.
* **Accumulator and deconversion hand-over.** The recurrences for `m` and
  `q` above are this design's own formulation of the accumulate and
  deconvert sub-stages. In particular, `q` takes the product bits one at a
  time, and `t` holds `y` shifted, not `e`.
* **Register widths.** The published design sizes `p, e, z, q` at `k` bits.
  Here `e, t, m, q` are `k-2` bits wide, since only their value modulo
  `2^(k-2)` matters. The datapath therefore takes `y` modulo `2^(k-2)`.
* **Sign.** Applying `(-1)^(s*y)` at the end, by negating in Ready when `s`
  and bit 0 of `y` are both set, is this design's choice.
* **Timing.** These are this design's reading of the state diagram:
  * one clock per sub-stage (three clocks per iteration)
  * Init doing the whole `i = 1` step in one clock
  * a one-clock Ready
  * the counter value 1 during Init
  * an asynchronous active-low reset
* **Even bases.** The published hardware treats only odd `x`. The
  `pow2_factor` stage implements the `2^(p*y)` factor from the algebra. The
  zero-operand conventions are this design's own.
* **ROM contents.** They are computed during elaboration, not stored as a
  list. The read is combinational.
* **Default size.** `K = 128` is the largest of the five sizes the method was
  built at.

The published comparison circuit, a square-and-multiply unit using a full
multiplier, is not included. Neither are the published area and delay
figures. Nothing here was synthesised to a cell library, so the speed and
area claims have not been checked.

## How far it has been verified

Every result above is checked against an independent reference at
`k = 8, 16, 32, 64` and `128`, including all the corner cases listed. The RTL passes `verilator -Wall`
lint and elaborates in Yosys through the slang front end. No gate-level
or timing verification has been done.
