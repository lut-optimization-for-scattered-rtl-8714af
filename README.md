# Distributed-arithmetic LMS adaptive FIR filter (4 taps, 16 bits)

An adaptive FIR filter adjusts its weights so that its output `y(n)` follows a
desired signal `d(n)`; the least-mean-square (LMS) rule nudges every weight by
`mu * e * x` after each sample, with `e = d - y`. The expensive part in
hardware is the inner product `y = sum_k w_k * x(n-k)` and the `N` products of
the update.

This design removes every multiplier:

* The inner product uses **distributed arithmetic (DA)**. A table holds all
  15 sums of a subset of the 4 latest samples. Each clock, one bit of each of
  the 4 weights (a *bit slice*) picks one table word. The picked words are
  shift-accumulated over 16 clocks, least significant slice first.
* The shift accumulation is **carry-save**: a row of full adders with no carry
  propagation. This keeps the fast clock short. One carry-propagate adder
  resolves the result once per sample.
* The weight update keeps only the **leading one of the error**. This makes
  `mu * e` a power of two, so `mu * e * x` becomes a barrel shift of `x`. The
  sign of the error chooses between add and subtract.
* Filtering and weight update run **concurrently**. The update uses the error
  from two samples earlier (a delayed LMS with adaptation delay 2). This takes
  the error path out of the loop that has to finish within one sample.

The filter takes one new sample every 16 clock cycles. It has 4 taps, 16-bit
samples and 16-bit weights.

## Number formats

Samples `x`, desired samples `d` and weights `w` are 16-bit two's complement
*fractions*: the value is the integer divided by 2^15, which is in [-1, 1).
The filter output and the error are 18 bits wide in the same units as `x`,
because the sum of four products can reach about +/-2.
The step size is `mu = 2^-i / 4`, where `i` is the `step_size` input.

With `W_k`, `X` and `D` the raw integers, the arithmetic is bit-exact:

```
y(n)    = floor( sum_k W_k * X(n-k) / 2^15 )            18 bits
e(n)    = D(n) - y(n)                                    18 bits, wraps
mu*e(n) = floor( e(n) / 4 )                              16 bits (bits 17..2)
t       = leading zeros of |mu*e| in 15 bits              0..14, 15 means zero
W_k    += (mu*e < 0 ? -1 : +1) * floor( X(n-2-k) / 2^(1+i+t) )   wraps at 16 bits
          (no change when mu*e = 0)
```

`2^(14-t)` is the leading one of `|mu*e|`, so the increment is
`x * 2^(14-t) / 2^15`: the product of two fractions. The extra shift by 1
appears because of that fractional alignment.

## One sample period

Everything runs on one clock, `clk`. It is the bit clock of the accumulator.
The bit counter `bit_timer` counts bit cycles `l = 0 .. 15`. The sample-rate
part of the filter only loads at the end of cycle 15, the *tick*. The tick
acts as the edge of a clock 16 times slower, without adding a second clock
domain.

| bit cycle | inner product | error / update path |
|---|---|---|
| 0 | accumulator restarts, adds table word for slice `l = 0` | `mu*e(n-2)`, `t` and sign are stable |
| 1 .. 14 | adds word for slice `l`, running sum shifted right one place | (idle, combinational values stable) |
| 15 (tick) | adds the **one's complement** of the word for the sign slice | |
| end of 15 | S and C words captured; DA table shifts in `x(n+1)` | weights updated, `d(n)` captured, `mu*e` of the previous output captured |

From the edge where a sample `x` enters, the results appear as follows:

* The output that first uses `x` as `x(n)` is computed during the next
  period.
* That output sits in `y_out` for the period after that.
* The matching `mu*e` appears in `error_out` at the end of that period.
* The weight update that uses `x` as `x(n-2)` happens at the end of the
  third period after it entered the table.

## The DA table

The table (`da_table`) has one register per non-empty subset of
`{x(n), x(n-1), x(n-2), x(n-3)}`. Entry `k` holds the sum of `x(n-j)` over the
bits `j` set in `k`. Entry 0 is the constant 0. When a new sample arrives,
every entry is rebuilt in a single clock from the old table:

```
k even:  new[k] = old[k/2]            the same subset, one sample older
k odd:   new[k] = x(n+1) + old[k/2]   one adder
```

This needs seven adders for 4 taps (k = 3, 5, ..., 15). The table therefore
never spends extra cycles on an update, which matters because a new sample
arrives every period. All words are 18 bits, sign-extended.

The 16-to-1 multiplexer (`lut_mux`) is addressed by the bit slice
`A = {w_3[l], w_2[l], w_1[l], w_0[l]}`. It returns the partial inner product
`P_l = sum_k w_k[l] * x(n-k)`. The weight-parallel to bit-serial conversion
(`bit_serial_converter`) is a set of 16-to-1 bit multiplexers steered by the
bit counter.

## Signed carry-save shift accumulation

This is the part of the design that is least obvious.

Written out, the inner product is a weighted sum of the partial products,
with the sign slice negated:

```
sum_k W_k X_k = sum_{l<15} 2^l P_l  -  2^15 P_15
```

Feeding the slices least significant first and halving the running sum each
cycle gives `acc_l = floor(acc_{l-1} / 2) + P_l`. The floors compose exactly,
because `floor(floor(a)/2 + P) = floor(a/2 + P)` for an integer `P`. So the
final value is `floor(sum_k W_k X_k / 2^15)`, with no accumulated rounding
error.

`csa_accumulator` keeps the running sum as two 18-bit words, S and C. Full
adder `i` gets three inputs:

* `a = P[i] XOR sign_ctrl`
* `b = S[i+1]`, or `S[17]` at the top. This is the right shift with sign
  extension.
* `c = C[i]`, its own carry from the previous cycle.

It writes `S[i]` and `C[i]`. A carry leaving position `i` has weight
`2^(i+1)`, so the word pair stands for `acc = S + 2*C`.

The key property is that, with both words read as 18-bit two's complement
numbers, one adder row turns `(S, C, P)` into `(S', C')` with
`S' + 2C' = (S >>> 1) + C + P` **exactly, as integers**. At the top
position, the sum bit has weight `-2^17` and the carry bit `-2^18`. The
recurrence therefore holds for any data: there is no hidden overflow inside
the accumulator, and no guard bits are needed beyond the 18.

Subtracting the sign slice follows the usual two's complement trick:

* In bit cycle 15, `sign_ctrl` makes the XOR gates add `~P_15 = -P_15 - 1`.
* The final adder in `error_unit` computes `y = S + 2*C + 1`, which supplies
  the missing 1.

In bit cycle 0, the shifted feedback is forced to zero. This starts a new
accumulation without a separate clear cycle.

## Error path and weight update

`error_unit` holds `d(n)` for one period so that it meets the output it
belongs to, subtracts, and shifts right by 2 (that is, `mu = 1/4`). It then
registers `mu*e`. From there, three blocks form the update:

* `sign_mag_separator` splits off the sign and a 15-bit magnitude. `-2^15` is
  clamped to `2^15 - 1`.
* `control_word_gen` is a priority encoder. Its output `t` is the
  leading-zero count, and `t = 15` marks a zero magnitude.
* `weight_increment` holds, for each tap:
  * a fixed pre-shift by `1 + i`
  * a barrel shifter by `t`; code 15 gives 0, so a zero error changes nothing
  * an adder/subtractor steered by the sign
  * the weight register.

Weight `w_k` is updated with `x(n-2-k)`. Samples `x(n-2)` and `x(n-3)` come
from the DA table, and `x(n-4)` and `x(n-5)` from two extra registers in the
top module.

## Top-level interface (`lms`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | bit clock; one sample per 16 cycles |
| `rst` | in | 1 | synchronous, active high; clears all state (weights to 0) |
| `en` | in | 1 | global enable; low freezes the whole filter |
| `data_in` | in | 16 | `x(n+1)`, taken at the end of a `sample_tick` cycle |
| `desired_in` | in | 16 | `d(n)`: the desired sample that belongs to the sample presented one tick earlier |
| `step_size` | in | 16 | `i`, extra right shift of the step (`mu = 2^-i/4`); 0 for `mu = 1/4` |
| `sample_tick` | out | 1 | high in the last bit cycle of a period (qualified by `en`) |
| `error_out` | out | 16 | registered `mu*e = e/4` of the latest complete output |
| `y_out` | out | 18 | filter output of the previous period (combinational from registers) |
| `weights` | out | 4 x 16 | current weights `w_0 .. w_3` |

Parameters: `L` (word length, default 16) and `N` (taps, default 4). The DA
table grows as `2^N` words, and the control word `t` is `$clog2(L)` bits.

Module hierarchy:

```
lms
+-- bit_timer             bit counter, tick, sign control
+-- inner_product         DA table + 16:1 mux + carry-save accumulator + S/C registers
|   +-- da_table
|   +-- lut_mux
|   +-- csa_accumulator
+-- error_unit            final adder, d delay, subtract, >>2, mu*e register
+-- sign_mag_separator
+-- control_word_gen
+-- weight_increment      pre-shift, 4 barrel shifters, 4 add/sub + weight registers
    +-- barrel_shifter (x4)
    +-- bit_serial_converter
lms_pkg                   default N_TAPS, L_BITS, GUARD
```

## What follows the original structure and what was chosen here

The source structure fixes the following:

* the 4-tap DA table with 15 registers and 7 adders
* the 16-to-1 multiplexer addressed by weight bit slices, LSB first
* the XOR sign control on the MSB slice, with a carry-in of 1 in the final
  adder
* the carry-save shift accumulator with 18-bit (L+2) sum and carry words
* the one-sample register on `d`, and `>>2` for `mu = 1/N`
* the sign/magnitude split, the leading-one quantised error and the barrel
  shifters
* add/subtract selected by the error sign
* the `x(n-2) .. x(n-5)` taps of the update (adaptation delay 2)
* the `2^-i` step-size option by pre-shifting
* the 16-bit port widths and the port names `data_in`, `desired_in`,
  `step_size`, `error_out`, `clk`, `en` and `rst`.

Choices made where the description is silent or unclear:

* **One clock instead of two.** The source runs the accumulator on a fast
  clock and the rest on a slow one. Here the slow clock is an enable from the
  bit counter.
* **Width of `t`.** The source draws the control word as 3 bits, which fits
  8-bit words. With 16-bit words it is 4 bits.
* **Control-word logic.** The source does not give it. Here it is a
  leading-zero counter, and the all-zero code (`t = L-1`) means "no update".
* **Word-parallel to bit-serial converter.** Built from multiplexers rather
  than shift registers.
* **Table word widths.** All table words are 18 bits. The source uses 16, 17
  and 18 bits depending on how many samples a word sums; the stored values
  are the same.
* **Adders in the accumulator.** Full adders everywhere. The source mentions
  replacing some full adders by half adders without saying which.
* **Arithmetic limits.** No saturation anywhere: weights and the error wrap.
  `-2^15` is clamped in the magnitude.
* **Reset.** Synchronous and active high. The `en` port is a global enable.
* **Error output.** `error_out` is the registered `e/4`.
* **Extra ports.** `y_out`, `weights` and `sample_tick` are added for
  observation.
* **Input alignment.** `desired_in` is one sample behind `data_in`, as in the
  source's data flow.

## Limits worth knowing

* The output can be +2^17 in exactly one case: all four samples are -1
  (`0x8000`) and all four weights are -1. That value does not fit 18 bits and
  wraps. Every other input combination is exact.
* The error `d - y` is taken modulo 2^18. With large outputs and opposite `d`
  it can wrap. Keep the signals away from full scale, as the testbench does
  (samples within +/-0.25).
* The weights wrap rather than saturate. With a step that is too large, a
  diverging filter can wrap around.
* Because the error is quantised to a power of two, the weights settle in a
  small neighbourhood of the optimum rather than exactly on it. In the
  system-identification test they end within 0.1 % of full scale.

## Simulating

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. For
example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl --top-module tb_lms \
    rtl/lms_pkg.sv rtl/*.sv tb/tb_lms.sv
./obj_dir/Vtb_lms
```

Replace `tb_lms` by any other testbench name. What each testbench compares
against:

* **`tb_lms`** runs the full-size filter (defaults, no parameter overrides)
  for 3000 samples. The task is system identification: `d` is a fixed 4-tap
  filter (0.3, -0.2, 0.1, -0.05) applied to random input.
  * After every tick it compares `y_out`, `error_out` and all four weights
    with an integer model of the equations above. The model uses a direct
    inner product, not DA.
  * It checks that a sample is taken every 16 enabled clocks.
  * It checks that each mechanism occurs: negative weights (subtracted sign
    slice), weight increase, weight decrease, zero error, a non-zero
    step-size shift, stalls through `en`, and a reset in the middle of the
    run (after which the weights must converge again).
  * It checks convergence to within 400/32768 of the reference taps.
* **`tb_inner_product`** compares the S/C result with
  `floor(sum W_k X_k / 2^15)` over 300 periods, including full-scale
  extremes, and checks the 16-cycle period.
* **`tb_csa_accumulator`** drives arbitrary 18-bit partial products,
  including the extreme words, and compares against the weighted sum with the
  sign slice negated.
* **The other testbenches** check their block against direct formulas: table
  subset sums, the shifts, the leading-zero count, the absolute value, and
  the add/subtract update.
