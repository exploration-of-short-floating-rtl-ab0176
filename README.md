# BAPS digital predistorter in custom-precision floating point

A power amplifier distorts a wideband signal: its gain compresses at high
amplitude and its output depends on past samples (memory effects). A digital
predistorter (DPD) placed in front of it applies an approximate inverse of
that distortion. This RTL implements a predistorter based on the
*basis-propagating selection* (BAPS) model, a pruned Volterra model, with every
arithmetic operation done in a floating-point format whose exponent width `w`
and mantissa width `t` are parameters. The same source can therefore be
synthesized in IEEE single precision (8,23) or in much shorter formats such as
(8,7) or (5,5), which is what makes it useful for studying how much precision a
predistorter really needs.

## The BAPS model

For every complex input sample `x(n)` the model builds `R` basis functions
`phi_1 .. phi_R` (R = 8 here), one after another:

* `phi_1 = x(n)`.
* A **Type I** step delays an earlier basis function: `phi_r(n) = phi_i(n-m)`,
  with `i < r` and `m` samples of delay.
* A **Type II** step multiplies three earlier basis functions of the same
  sample, the last conjugated: `phi_r = phi_i * phi_j * conj(phi_k)`, with
  `i, j, k < r`. Repeated Type II steps give the odd-order terms
  `|x|^2 x`, `|x|^4 x`, ... that a Volterra model needs.

The output is the weighted sum `y(n) = sum_r theta_r * phi_r(n)`.

Which steps to take, and the coefficients `theta_r`, are chosen offline by a
greedy search on measured amplifier data. The hardware does not know them in
advance: both are loaded at run time (see *Loading a model*). Different
searches (for example one allowed a memory depth of one sample, another five)
give different mixes of Type I and Type II steps, all of which this design can
run as long as it has at most `NUM_BASIS` functions and delays of at most
`MAX_DELAY` samples.

## Structure

```
             +------------------------ baps_dpd_top -------------------------+
  x(n) ----->| basis_builder                      dpd_engine                 |--> y(n)
 valid/ready |  FSM: IDLE -> COMPUTE phi_1..phi_8   8 x cplx_mult (theta*phi) |   y_valid
             |       -> DONE -> (next x)          balanced tree of cplx_add  |
             |  type2_unit  (2 x cplx_mult)       (3 levels for 8 terms)     |
             |  delay_lines (shift registers)     coefficient registers      |
             |  program registers   -- all phi, at once -->                   |
             +---------------------------------------------------------------+
```

* **basis_builder** computes the basis functions *sequentially*, one per clock
  cycle, under a small FSM. A Type II step uses one shared `type2_unit` (two
  complex multipliers in series); a Type I step reads the `delay_lines`, which
  keep the last `MAX_DELAY` values of every basis function.
* **dpd_engine** weights all basis functions *in parallel*, one complex
  multiplier per basis function, and sums them in a balanced adder tree:
  `((t1+t2)+(t3+t4)) + ((t5+t6)+(t7+t8))`.
* **baps_dpd_top** (the wrapper) connects the two. When the builder finishes
  sample `n` it hands over all `R` values in one cycle and immediately starts
  sample `n+1`, so the two halves work as a two-stage pipeline.

The design aims at precision experiments, not at throughput: one sample takes
`R + 1` cycles. A high-rate predistorter would unroll the builder.

### Arithmetic units

| module       | does                                   | made of                      |
|--------------|----------------------------------------|------------------------------|
| `fp_mult`    | `a * b`                                | significand multiplier       |
| `fp_addsub`  | `a + b` or `a - b`                     | align, add, normalise        |
| `cplx_mult`  | `a * b` or `a * conj(b)`               | 4 `fp_mult`, 2 `fp_addsub`   |
| `cplx_add`   | `a + b`                                | 2 `fp_addsub`                |
| `type2_unit` | `phi_i * phi_j * conj(phi_k)`          | 2 `cplx_mult` in series      |

All are combinational; registers sit only in the builder and the engine.

## Number format and rounding

A value is `{sign, exponent[EXP_W], mantissa[MAN_W]}` and means
`(-1)^s * 2^(e - bias) * 1.m` with `bias = 2^(EXP_W-1) - 1`, as in IEEE-754.
Every unit rounds to nearest, ties to even, and every operation rounds once:
a complex product is `re = rnd(rnd(ar*br) - rnd(ai*bi))`,
`im = rnd(rnd(ar*bi) + rnd(ai*br))`. This order fixes the exact bits of
every result, and the testbench reference model follows it.

Where this departs from full IEEE-754, to keep the units small:

* subnormal inputs are read as zero, and results below the smallest normal
  number become a zero of the result's sign (the range check is made after
  rounding);
* overflow gives infinity; infinity and NaN inputs follow the usual rules;
  every NaN produced is the quiet NaN with only the top mantissa bit set;
* an exact cancellation `x - x` gives `+0`.

For DPD signals this matters little, because the signal stays far from both
ends of the range; the one case where flushing shows is measured in the
precision sweep below. The widths are free parameters; the formats
studied for this design range from (5,5), 11 bits, to (8,23), 32 bits.

## Timing

Counting the clock edge that accepts `x(n)` (`x_valid && x_ready`) as edge 0:

| edge        | event                                                          |
|-------------|----------------------------------------------------------------|
| 1 .. 8      | `phi_1 .. phi_8` written, one per edge (COMPUTE)                |
| after 8     | DONE: `phi_valid` high for one cycle, `x_ready` high             |
| 9           | engine registers the eight products; delay lines shift; a waiting `x(n+1)` is accepted |
| 10, 11, 12  | the three adder-tree levels                                    |
| after 12    | `y_valid` high for one cycle with `y(n)`                        |

So the latency is 12 cycles from acceptance to `y_valid` (a testbench sampling
on the rising edge sees it at edge 13), and with a continuous input a sample is
accepted every 9 cycles. In general the period is `NUM_BASIS + 1` and the
latency `NUM_BASIS + 1 + log2(NUM_BASIS)`. The combinational path of a
Type II step is two complex multiplications deep; nothing here has been timed
against a library.

## Interface of `baps_dpd_top`

| port                      | dir | width        | meaning                                        |
|---------------------------|-----|--------------|------------------------------------------------|
| `clk`, `rst_n`            | in  | 1            | clock; asynchronous active-low reset            |
| `prog_we`, `prog_addr`, `prog_data` | in | 1, 4, 17 | write step `prog_addr` of the basis program   |
| `coef_we`, `coef_addr`, `coef_re`, `coef_im` | in | 1, 4, N, N | write coefficient `theta` number `coef_addr` |
| `x_valid`, `x_ready`      | in/out | 1         | input handshake; hold `x_valid` until taken    |
| `x_re`, `x_im`            | in  | N            | input sample                                   |
| `y_valid`, `y_re`, `y_im` | out | 1, N, N      | predistorted sample, valid for one cycle, no back-pressure |
| `busy`                    | out | 1            | a sample is still in flight                     |

`N = 1 + EXP_W + MAN_W`. Parameters: `EXP_W` (8), `MAN_W` (23),
`NUM_BASIS` (8, a power of two), `MAX_DELAY` (5).

Reset clears the program, the coefficients and the delay history to zero, so
samples before the first one count as zero in Type I steps. To start a new,
unrelated signal, reset the design.

## Loading a model

A program step is the packed struct `dpd_pkg::basis_op_t`:

| field | bits | meaning                                             |
|-------|------|-----------------------------------------------------|
| `op`  | 1    | `OP_DELAY` (Type I) or `OP_PRODUCT` (Type II)        |
| `i`   | 4    | first source basis function (0-based: 0 is `phi_1`)  |
| `j`   | 4    | second source (Type II only)                         |
| `k`   | 4    | conjugated source (Type II only)                     |
| `m`   | 4    | delay in samples (Type I only; 0 copies `phi_i(n)`)  |

Entry `r` describes `phi_(r+1)`; entry 0 is ignored because `phi_1` is always
the input. Sources must be lower-numbered than the step, and delays at most
`MAX_DELAY`; simulation assertions report a program that breaks this. Write
the program and the coefficients (real part and imaginary part, in the same
floating-point format) while `busy` is low; an assertion checks this too.

An example, the one the testbenches call program 0:

```
phi_1 = x(n)
phi_2 = phi_1 phi_1 conj(phi_1)        OP_PRODUCT i=0 j=0 k=0   |x|^2 x
phi_3 = phi_1(n-1)                     OP_DELAY   i=0 m=1
phi_4 = phi_2 phi_1 conj(phi_1)        OP_PRODUCT i=1 j=0 k=0   |x|^4 x
...
```

## What the precision sweep shows

`tb_precision_sweep` runs sixteen copies of the design in different formats on
the same eight-tone test signal (39,640 samples) and measures how far each
output is from an ideal, unrounded model. This is an NMSE of the arithmetic
alone; no amplifier is involved. Results for program 0 (program 1 is within
0.7 dB):

| mantissa t (w = 8) | 23 | 19 | 15 | 11 | 10 | 9 | 8 | 7 | 6 | 5 |
|--------------------|----|----|----|----|----|---|---|---|---|---|
| NMSE (dB)          | -147.2 | -123.0 | -98.9 | -74.9 | -68.8 | -62.6 | -56.8 | -51.5 | -45.4 | -40.6 |

| exponent w          | 8 | 7 | 6 | 5 |
|---------------------|---|---|---|---|
| t = 23, NMSE (dB)   | -147.2 | -147.2 | -147.2 | -71.3 |
| t = 6, NMSE (dB)    | -45.4 | -45.4 | -45.4 | -45.4 |

The error grows by about 6 dB per mantissa bit removed. The exponent width
hardly matters. The one visible effect, (5,23), comes from flushing to zero:
with a bias of 15, the smallest high-order terms of samples near zero fall
below the normal range. That error is still 30 dB below the distortion a
predistorter corrects, and at short mantissas rounding error hides it
entirely. A predistorter needs its own error to stay well below the amplifier
distortion it removes, typically around -40 dB. So mantissas of about 7 to
8 bits are the practical floor, and 5 exponent bits are enough.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The references are independent of the RTL:
`tb/fp_ref_pkg.sv` widens operands to IEEE double, computes there (exact for
these widths) and rounds back with integer operations on the double's bit
pattern; `tb/baps_ref_pkg.sv` builds the whole BAPS model on top of it, plus an
unrounded real-valued version.

| testbench               | covers                                                          |
|-------------------------|-----------------------------------------------------------------|
| `tb_fp_mult`, `tb_fp_addsub` | random and directed cases in (8,23), (5,5), (6,9): ties, cancellation, overflow, flush, inf, NaN, signed zero |
| `tb_cplx_mult`, `tb_cplx_add`, `tb_type2_unit` | random complex operands, bit-exact                  |
| `tb_delay_lines`        | every line and delay after random shifts                         |
| `tb_basis_builder`      | both example programs, bit-exact basis sets, 9-edge timing, back-to-back acceptance |
| `tb_dpd_engine`         | bit-exact weighted sums, 4-cycle latency, a new set every cycle  |
| `tb_baps_dpd_top`       | the whole design at default parameters: 2 x 79,280 samples, bit-exact, latency and period, counts of Type I/II steps, pipeline overlap, input stalls and a program switch |
| `tb_precision_sweep` (with `format_lane`) | sixteen formats side by side, both programs, as above |

To run one with Verilator (packages first):

```
verilator --binary --timing --assert --top-module tb_baps_dpd_top \
  rtl/dpd_pkg.sv tb/fp_ref_pkg.sv tb/baps_ref_pkg.sv \
  rtl/fp_mult.sv rtl/fp_addsub.sv rtl/cplx_mult.sv rtl/cplx_add.sv \
  rtl/type2_unit.sv rtl/delay_lines.sv rtl/basis_builder.sv \
  rtl/dpd_engine.sv rtl/baps_dpd_top.sv tb/tb_baps_dpd_top.sv
./obj_dir/Vtb_baps_dpd_top
```

For `tb_precision_sweep` add `tb/format_lane.sv`. The unit testbenches need
only the package files and the modules below the one they test.

## Where this design makes its own choices

The overall structure (sequential builder under an FSM, shift-register delays,
Type II by floating-point complex multipliers, parallel weighting with
prestored coefficients, balanced adder tree, overlap of consecutive samples)
follows the published description of this architecture. These details are
this implementation's own:

* **Arithmetic units.** The original uses licensed floating-point IP; here
  the multiplier and adder are written from scratch with the same function
  (parameterised widths, round to nearest). Subnormal and NaN handling as
  described above. The IP's lower limit of 5 bits for both fields does not
  apply to this RTL, though formats below (5,5) have not been tested.
* **Model contents.** The actual basis sequences and coefficients found by the
  greedy search for the reference amplifier are not part of the hardware; they
  are loaded through ports. The two example programs in the testbenches are
  made up with the same size (eight functions) and delays of one and of up to
  five samples.
* **Delay depth** `MAX_DELAY = 5`, taken from the deepest memory setting
  studied; delay lines exist for every basis function.
* **Cycle timing**: one basis function per cycle, registers after the
  weighting multipliers and after each adder level; the latency and period
  above follow from that.
* **Handshake and control**: valid/ready at the input, a one-cycle valid at the
  output with no back-pressure, a `busy` flag, asynchronous active-low reset.
* **Complex multiplier**: the direct four-multiplier, two-adder form.

Not reproduced: the amplifier measurements, the standard-cell area of the
Type II unit (it scales roughly linearly with total width, dominated by the
mantissa), and any timing closure.
