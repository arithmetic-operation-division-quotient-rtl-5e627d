# Combinational signed divider: quotient and remainder in one pass

This is a divider for twos' complement integers that delivers both results of a
division, the quotient `Z = trunc(X / Y)` and the remainder `R = X - Z*Y`
(which carries the sign of `X`), from one block of combinational logic. Its
delay is that of a chain of adders, like an array multiplier, rather than one
clock cycle per quotient bit. The idea is to unroll non-restoring division
with a fixed divisor into a stack of adders. A handful of small circuits
around the stack then make the answer exact for signed operands:

* a normalizer that counts how many quotient digits there are;
* a shift array that keeps only the integer digits;
* a one-bit correction of the quotient;
* a one-step restoration that recovers the remainder.

The same datapath is also provided cut into a micro-pipeline that returns one
division per clock cycle.

The scheme follows the article *Arithmetic Operation Division. Quotient and
Remainder. Logical Structures and Calculation Schemes* (D. Tyanev,
Y. Petkova, Technical University of Varna). That article draws an 8x8 divider
gate by gate. This RTL is an independent implementation of it. The places
where it departs from the published scheme are listed near the end.

The default width is `W = 8`: 8-bit operands and results, with 7 adder levels.
Every module takes `W` as a parameter.

## How one division is computed

Take `X = -97`, `Y = -7` (8 bits), which gives `Z = 13`, `R = -6`.

1. **Left normalization** (`lead_norm`). Each operand is shifted left until the
   bit after the sign differs from the sign. `X = 1 0011111` needs no shift
   (`sx = 0`). `Y = 1 1111001` becomes `Wy = 1 0010000` (`sy = 4`).
2. **Digit count** (`nk_adder`). `N = sy - sx + 1 = 5` is the number of
   integer digits of the quotient. `K = (W-1) - N = 2` is how far the digit
   word must later be shifted right.
3. **The array** (`div_array`, seven `div_level`s). Level 1 forms
   `R1 = Wx - Wy`. It subtracts because `Wx` and `Wy` have the same sign (it
   would add if they differed). Each later level forms `Rm = 2*R(m-1) -/+ Wy`.
   Every level also emits a digit: 1 if `Rm` has the sign of `Wy`, 0 if not.
   That digit also picks what the next level does: subtract after a 1, add
   after a 0. Here the levels give `0 1 1 0 1 | 0 1`, and the last two digits
   are fractional.
4. **Quotient alignment** (`shift_array`). A sign bit is placed above the
   digits: `sign(X) xor sign(Y)`, which is 0 here. The word `0 0110101` is then
   shifted right arithmetically by `K = 2`, giving `0 0001101 = 13`.
5. **Correction** (`quot_correction`, `half_adder_inc`). Sometimes the
   quotient must have 1 added to it (next section). Here it does not, so
   `Z = 13`.
6. **Remainder** (`rem_restore`, `shift_array`). The remainder lives in `R_N`,
   the partial remainder of the last integer digit, scaled by `2^sy`.
   `Z = 13` is odd, so `R5 = 1 0100000` is used as it stands. Shifting it right
   arithmetically by `sy = 4` gives `1 1111010 = -6`.

If `N <= 0` the divisor is larger in magnitude than the dividend. All digits
are then shifted out, the quotient becomes 0, and the remainder is `X` itself.

## The array level

Each level is an adder with a two-way multiplexer on one input. The
multiplexer chooses `Wy` or its bitwise inverse under a control pair CS+/CS-.
A carry-in equal to CS- completes the subtraction. The other input is the
previous partial remainder shifted left by one place, which is only wiring:
its top bit is dropped. Normalization makes this safe, because every partial
remainder stays smaller in magnitude than `Wy`. The digit is an XNOR of two
sign bits. A W-input NOR flags `Rm = 0` for the correction logic. The first
level adds `Wx` itself, not doubled. The array is built from adders only, with
no subtractors.

## Why the quotient needs a correction

Read as a twos' complement number with its sign preset, the digit word is
sometimes one less than the truncated quotient. This comes from the asymmetry
of the twos' complement range. `COR` adds 1 at bit 0 through a chain of half
adders:

| sign of X | sign of Y | add 1 when                    | term   |
|-----------|-----------|-------------------------------|--------|
| +         | +         | never                         | -      |
| +         | -         | always                        | `cor1` |
| -         | +         | the division is not exact     | `cor2` |
| -         | -         | the division is exact         | `cor3` |

"Exact" (`EQ`) means that some partial remainder `Rm` with `m <= N` is zero.
A zero can appear before level N (a *premature* exact division, for example
-96 / 3). After that point the array keeps producing the digit pattern of
...1000. Zeros at levels deeper than N are deliberately ignored. Those levels
compute fractional digits, and a zero there only means that the binary
fraction ends, as in -3 / 2 = -1.5.

## Recovering the remainder

After the last integer step, `R_N = 2^sy * (X - Z*Y)` if that step's
subtraction "succeeded". That is the case exactly when the final, corrected
quotient is odd. If the quotient is even, the step overshot. The previous
partial remainder is then restored with one more add or subtract of `Wy`:
subtract if `R_N` and `Wy` have the same sign, add if they differ. A last
arithmetic right shift by `sy` turns the result into the integer remainder.

## Fractional mode

With `frac = 1` the divider works on normalized mantissas, read as fixed-point
numbers with the binary point just after the sign bit. This is the case of a
floating-point divider. In this mode:

* the operands bypass normalization, so they must already be normalized
  (`01x..x`, `10x..x` other than `100..0`, or `110..0`);
* `N` is forced to `W-1` and `K` to 0, so the shift array passes the digits
  through unchanged;
* the quotient is `trunc(X * 2^(W-2) / Y)`, which is `X/Y` with `W-2`
  fraction bits;
* `r` is the matching scaled remainder `X * 2^(W-2) - Z*Y`, which a
  floating-point unit can ignore.

The mode travels with each operation, so integer and fractional divisions can
be mixed freely.

## Two organizations

### `comb_divider`: single cycle

There are four registers: RGX and RGY in front of `div_comb_core`, and RGZ
and RGR after it.

* `in_valid` loads the operands and the mode bit.
* One rising edge later, RGZ/RGR capture the results and `out_valid` rises.
* In all, results appear two rising edges after the operands were presented.
* A new division can start every cycle.
* The clock period must cover the whole array: `W-1` ripple-carry adders in
  series, plus the normalizer, the shifters and the restoration adder.

### `pipe_divider`: micro-pipeline

The same blocks are separated by stage registers, `NS = W + 4` stages in all
(12 for `W = 8`):

| stage      | register contents                       | logic in front of it       |
|------------|-----------------------------------------|----------------------------|
| 0          | X, Y                                    | -                          |
| 1          | Wx, Wy, sx, sy                          | two normalizers            |
| 2          | N, K                                    | the N/K adder              |
| 3 .. W+1   | R_m, digits so far, zero flags, R_N     | one array level each       |
| W+2        | aligned quotient Z', COR, restored R    | shift array, correction, restore adder |
| W+3        | Z, R                                    | half adders, remainder shifter |

Every stage carries one packed record, so a stage passes along unchanged
whatever it does not compute. The array always has `W-1` levels. The level
whose index equals `N` stores its partial remainder in the `R_N` field, which
travels with the operation.

Each stage is run by its own `pipe_stage_ctrl`, a two-state (EMPTY/FULL)
machine with a valid/ready handshake:

* a stage loads when the previous stage is full and it is either empty or
  being emptied in the same cycle;
* `out_ready` low at the output stalls the last stage, and the stall works
  its way back one full stage at a time until `in_ready` falls;
* with no stalls, throughput is one division per cycle and latency is `NS`
  rising edges from acceptance to the result.

The ready signal passes combinationally through all stages. This keeps full
throughput but makes a long path for large `W`. An assertion in each
controller checks that a stalled stage never drops its operation.

### `divider_top`

Both organizations sit side by side, each with its own ports: prefix `c_`
for the single-cycle one and `p_` for the pipeline. They share only `clk` and
the asynchronous active-low `rst_n`.

## Operand range and known limits

* **`Y = 0`** and the overflow **`-2^(W-1) / -1`** are not detected. The
  outputs are meaningless for them and no flag is raised.
* **`X = -2^(W-1)` divided by `+-2^j`** (for example -128 / 4) gives a
  quotient one too small in magnitude and a nonzero remainder. The divisor's
  normalized magnitude equals the dividend's, but `-2^(W-1)` cannot be
  normalized one place further. As a result, no partial remainder becomes
  zero, and the exact division is never recognized. All other operand pairs,
  65,265 of the 65,536 at `W = 8`, are exact.
* **Negative powers of two** are normalized to `1100..0`, not `1000..0`. This
  gives `-2^j` the same digit count as `+2^j`. Without it, exact divisions by
  or of negative powers of two lose one quotient digit.

## Where this differs from the published scheme

* **Which levels count for EQ.** The published scheme ORs the zero flags of
  all array levels. Here, only the levels up to `N` count (see the correction
  section). The published form gives wrong quotients, for example for -3 / 2.
* **Remainder shift.** The published scheme shifts the remainder right by the
  order difference `k - l` of dividend and divisor, and its structure drawing
  labels that shifter with `K-1`. Here it shifts by `sy`, the divisor's
  normalization count. Both published examples have an already normalized
  dividend, and then the two agree. When the dividend also needs
  normalization, only `sy` is correct.
* **Parity for restoration.** The bit tested is bit 0 of the corrected
  quotient, as in the published structure drawing. The raw last digit would
  give wrong remainders for negative quotients.
* **Not specified in the source, chosen here:**
  * how the leading-digit counters work inside (a simple priority chain);
  * the normalization of `-2^j`;
  * the handling of `N <= 0`;
  * the clamping of `K`;
  * registers, handshakes and reset;
  * the stage controllers, which are synchronous valid/ready machines
    instead of the self-timed micro-pipeline control the source refers to;
  * the fractional-mode input, its operand bypass and its remainder output.
* **Pipeline drawing.** In the published pipeline drawing the quotient's
  alignment shifter is labeled as a left shift. This design shifts right by
  `K`, as the combinational scheme does.
* **Not built.**
  * Detection of `Y = 0` and of overflow. The source mentions both cases but
    leaves them out of its scheme.
  * The variant that keeps the quotient's fractional digits in integer mode.
    That variant would apply the correction to the last fractional bit. Here
    those digits are shifted out and discarded.
  * Latency optimizations of the adder stack (carry-save levels and the
    like), which the source only suggests by analogy with multipliers.

## Modules

| module            | role |
|-------------------|------|
| `div_pkg`         | default width `DIV_W = 8`, stage state type |
| `lead_norm`       | leading insignificant digit count and left normalization |
| `nk_adder`        | `N = sy - sx + 1`, `K = (W-1) - N`, fractional-mode override |
| `div_level`       | one array level: multiplexer, adder, digit XNOR, zero flag |
| `div_array`       | `W-1` levels in cascade |
| `quot_correction` | `EQ`, `cor1..cor3`, `COR` |
| `shift_array`     | arithmetic right shifter (logarithmic), for quotient and remainder |
| `half_adder_inc`  | half-adder chain adding `COR` |
| `rem_restore`     | restoration of the previous partial remainder |
| `div_comb_core`   | the whole combinational divider |
| `comb_divider`    | four registers around `div_comb_core` |
| `pipe_stage_ctrl` | EMPTY/FULL stage controller |
| `pipe_divider`    | micro-pipelined divider |
| `divider_top`     | both organizations side by side |

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one ends
by printing `TB_RESULT checks=<n> failures=<m>`. `tb/div_tb_pkg.sv` holds the
shared operand generators and reference functions. To build and run one,
for example the whole design:

```
verilator --binary --timing --assert -Irtl -Itb rtl/div_pkg.sv \
    tb/tb_divider_top.sv --top-module tb_divider_top -Mdir obj_top
./obj_top/Vtb_divider_top
```

The same pattern works for any other testbench. What the testbenches cover:

* `tb_div_comb_core` checks the combinational divider:
  * every in-scope operand pair at `W = 8` and at `W = 6`, against the
    language's `/` and `%`;
  * both worked examples (31 / 5 at 6 bits, -97 / -7 at 8 bits);
  * every pair of normalized mantissas in fractional mode.
* `tb_divider_top` is the end-to-end test at the default `W = 8`:
  * it runs all 65,265 in-scope integer pairs and all 16,384 mantissa pairs
    through both organizations, with a stall pattern on the pipeline output;
  * it checks the single-cycle latency;
  * it counts how often each mechanism occurred: the three correction terms,
    restoration, premature exact division, `N <= 0`, `K = 0`, stalls, a
    blocked pipeline input and the mode switch. It fails if any of them never
    happened.
  * It takes a few seconds.
* `tb_pipe_divider` checks the 12-cycle latency and the one-per-cycle
  throughput, then random traffic with stalls.
* The unit testbenches check each block against integer arithmetic,
  exhaustively where the input space allows.

To change the width, override `W` on the module you instantiate, or change
`DIV_W` in `div_pkg`.
