# Exponential-product (EP) core: a streaming floating-point pipeline for Gaussian orbital sums

Quantum-chemistry codes (Hartree-Fock, density-functional and Monte Carlo methods) spend a
large share of their time evaluating Gaussian-type orbital functions

    chi(r) = x^k y^l z^m * sum_i C_i * exp(-alpha_i * r^2)

at many points in space. The expensive part is the finite sum of exponential products. This
RTL computes

    S = sum_i C_i * exp(-alpha_i * r^2)

as a fully pipelined floating-point datapath. It accepts one term `{C_i, r^2, alpha_i}` per
clock and emits one sum for each group of terms. The datapath is written for IEEE-754 single
precision by default. Every width is a parameter, so the same sources also build a
double-precision core, or anything in between. Around the core sits the integration for one
FPGA of an SRAM-equipped accelerator blade. There, two cores each stream their terms from their
own 128-bit SRAM bank and write their results to a third bank.

The polynomial prefactor `x^k y^l z^m` is not part of this core. Nor is the normalisation
factor `N_i` that usually multiplies each coefficient. The host folds it into `C_i` before
streaming the terms.

## The datapath

```
 alpha_i --(negate)--+
 r^2 ----------------+--> mult0 ----37-bit word----> exp ------> mult1 -----> ACC ---> S
 C_i ----------------------- delay (mult0 + exp) -------------------^          ^
 first/last ---------------- delay (mult0 + exp + mult1) ----------------------+
```

| unit | module | job | latency (single) | latency (double) |
|---|---|---|---|---|
| mult0 | `fp_mult` | `-alpha * r^2`, widened to the intermediate word | 4 | 5 |
| exp | `exp_module` (+ `exp_rom`) | `e^x` | 21 | 30 |
| mult1 | `fp_mult` | `C_i * e^x` | 4 | 5 |
| ACC | `fp_acc` | sums the terms of one group | 8 | 10 |
| EP core | `ep_module` | all of the above | **37** | **50** |

There is no stall or back-pressure anywhere. A `valid` bit travels with every datum, and the
units fill the rest of their latency with delay registers to reach the figures in the table.
`C_i` and the frame markers (`first`, `last`) ride in delay lines beside the datapath, so each
unit sees them together with its own term.

**Latency.** The published component latencies add up to 33 cycles (single) and 45 cycles
(double) if only one multiplier is counted. The block diagram has two multipliers, and both are
built. So the core's latency is 37 cycles in single precision and 50 in double.

### The intermediate word between mult0 and exp

The argument of the exponential is not handed over as a standard single-precision word. The
first multiplier keeps 28 fraction bits instead of 23, which makes a 37-bit word: 1 sign bit,
8 exponent bits and 28 fraction bits.

The extra bits matter because of how `e^x` amplifies error. An absolute error `d` in `x`
becomes a relative error `d` in `e^x`. For `|x|` near 64, a 23-bit argument is already
`2^-18` off, which is 32 ulp of the result. `tb/mid_width_sweep_tb.sv` builds the mult0+exp pair
for word widths of 32 to 38 bits. It then measures the mean square error of `exp(-alpha*r^2)`,
with `alpha` in [0.05, 30) and `r^2` in [0, 5):

| width [bits] | 32 | 33 | 34 | 35 | 36 | 37 | 38 |
|---|---|---|---|---|---|---|---|
| MSE [ulp^2] | 146 | 38.9 | 9.7 | 2.4 | 0.68 | 0.23 | 0.12 |

Each extra bit cuts the error by about 4. At 37 bits the error is dominated by the exp unit
itself rather than by the argument. This is why 37 bits is the default (`ep_pkg::SP_MID_W`).
The published curve has the same shape with smaller values at the narrow end. Its argument
distribution is not known, so the numbers are not expected to match.

## The exponential unit (`exp_module`)

This is the most intricate part. It works in fixed point between a floating-point input and a
floating-point output:

1. **To fixed point.** The input is shifted into a signed fixed-point number with
   `XF = FO_W + 8` fraction bits (31 for single precision) and `EXP_W` integer bits.
   Magnitudes of `2^(EXP_W-1)` or more (128 in single precision) give infinity or zero
   straight away, depending on the sign.
2. **Base change.** The number is multiplied by `log2(e)`. The integer part `xi = floor(x * log2 e)`
   becomes the result's binary exponent. The fraction `f` is kept.
3. **Remainder.** The remainder is `r = f * ln 2`. This equals `x - xi * ln 2` and lies in
   `[0, ln 2)`, so that `e^x = 2^xi * e^r`.
4. **Table and polynomial.** The top `AW` bits of `r` (8 by default) address a table of
   `e^(k / 2^AW)`, built as a registered ROM. The remaining bits `r_lo < 2^-AW` go into the
   Taylor polynomial of `e^r_lo`, evaluated by Horner's rule. Its degree is `PDEG`, 2 by
   default. The table entries are `e^(k/2^AW)`, rounded to `XF` fraction bits. They are
   computed at elaboration by a constant function that sums the Taylor series in
   120-fraction-bit integer arithmetic. The coefficients `1/n!` are computed the same way, so
   no data file is involved.
5. **Product and packing.** `e^r_hi * e^r_lo` lies in `[1, 2)`. It is rounded to nearest (ties
   away from zero) to `FO_W` fraction bits, and `xi + bias` becomes the exponent.

Only six of the 21 cycles do work; the rest are delay registers. `log2(e)` and `ln 2` are held
to 128 fraction bits in `ep_pkg`; the table generator allows `XF` up to 118.

**Accuracy:**
- Single precision (`AW = 8`, `PDEG = 2`): the remainder after the table is below `2^-8`, so the
  neglected cubic term is below `2^-26.6`. The result stays within 1 ulp of `exp()` over the
  whole single-precision range. The testbench checks this on 4,000 arguments.
- Double precision (`AW = 10`, `PDEG = 4`, `XF = 60`): the result stays within 2 ulp of the
  double-precision library `exp()`, which is itself only accurate to half an ulp.

**Special cases:**
- A zero argument gives exactly 1.0.
- A result above the normal range gives +infinity.
- A result below the normal range is flushed to zero.
- The result's sign is always 0.

## The multipliers (`fp_mult`)

A `(F+1) x (F+1)`-bit mantissa product is roughly twice as wide as the datapath keeps. The unit
therefore does not build the low columns of the partial-product array. Each row `ma * mb[j] << j`
is masked to weights of `2^DROP` and above before the rows are added. `DROP` is chosen so that
`GUARD = 7` bits remain below the rounding position, and the dropped columns then cost less
than 0.2 ulp. Rounding is to nearest (ties away from zero).

The operand fraction widths (`FA_W`, `FB_W`) and the result fraction width (`FO_W`) are
independent. This lets one module serve as mult0 (23 x 23 -> 28) and as mult1 (23 x 23 -> 23).
Exponent field 0 reads as zero, underflow flushes to zero, and overflow saturates to infinity.
NaN is not propagated.

## The accumulator (`fp_acc`)

An accumulator fed every cycle cannot use a multi-cycle floating-point adder in its feedback
path: the next addend would arrive before the previous sum is ready. This unit puts the whole
align / add / renormalise step into a single-cycle loop, with one cycle before it to decode
and one after it to round.

The running sum is wider than the words it adds ("mixed precision"). It is a signed mantissa
with `GUARD = 8` extra fraction bits and its own exponent. Operand bits shifted out during
alignment are dropped. Each addition therefore loses at most one internal ulp (`2^-31`
relative) of the larger operand, and the final result is rounded to nearest.

Framing is done with two signals:
- `in_first` starts a new sum with that word, instead of adding to the old one.
- `in_last` makes the finished sum appear `LATENCY` cycles later.

Sums may follow each other without a gap, and words may have idle cycles between them. Sums
below the normal range flush to zero, and sums above it saturate to infinity.

## One FPGA of the accelerator (`rasc_fpga_top`)

The board gives each FPGA two 16 MB QDR SRAM banks and one 8 MB bank. Each bank moves 128 bits
per clock. The top places one EP core on each input bank:

| bits of a MEM0/MEM1 word | 31:0 | 63:32 | 95:64 | 127:96 |
|---|---|---|---|---|
| field | `C_i` | `r^2` | `alpha_i` | unused |

**A run:**
1. The host sets `n_terms` (terms per sum) and `n_sums` (sums per core) and pulses `start`.
2. The top reads addresses `0 .. n_terms*n_sums - 1` from both banks, one address per clock.
3. A term counter on the returning data marks the first and last term of every sum.
4. The two results of sum `k` go to MEM2 address `k` as `{64'b0, core1, core0}`.
5. `done` pulses for one cycle after the last write. `busy` is high from `start` to `done`.

**Rules and limits:**
- `start` is ignored while `busy` is high.
- A run with `n_terms = 0` or `n_sums = 0` finishes at once.
- `n_terms * n_sums` must not exceed `2^ADDR_W`, which is 2^20 terms: one 16 MB bank.
- The SRAM read latency can be anything, but the two input banks must have the same latency.
  An assertion checks that they answer in step.

A run of `N` terms per core takes `N + read latency + 37 + 3` cycles.

Two parts of the board are outside this RTL:
- **The vendor's core-services logic.** This links the FPGA to the host interconnect and
  provides the SRAM controllers and host registers. Its signals appear as the top's ports.
- **The host computer.**

**Differences from the published design:**
- The published LUT, flip-flop and block-RAM counts were not reproduced. The exp table here is
  256 x 33 bits, which fits one 18-Kbit block RAM; the published single-precision unit uses two.
- The core latency is 37 cycles rather than 33 (see *Latency* above).

The published design also mentions packing up to four single-precision cores per FPGA by
reusing coefficients. That variant is not built, because the reuse scheme is not specified.

## Where this RTL is its own

The following follow the published design:
- the dataflow of the EP core;
- the component latencies;
- the 37-bit intermediate word;
- the `e^x = 2^xi * e^(x - xi ln 2)` identity with a table and a polynomial;
- the truncated multiplier array;
- the one-datum-per-clock accumulator;
- two cores per FPGA on two 128-bit banks.

The following are choices of this RTL:
- the accumulator's internal structure;
- the exp unit's table size, polynomial degree and fixed-point widths;
- rounding and special-value handling;
- the framing signals;
- the memory word layout, the address sequencing and the start/done control;
- the 69-bit intermediate word of the double-precision build;
- where the minus sign of `-alpha*r^2` is applied (alpha's sign bit is inverted at mult0's
  input).

## Building a double-precision core

```systemverilog
ep_module #(.EXP_W(11), .FRAC_W(52), .MID_W(69),
            .MUL_LAT(5), .EXP_LAT(30), .ACC_LAT(10),
            .EXP_AW(10), .EXP_DEG(4)) u_ep_dp ( ... );   // ports are 64 bits wide
```

The constants are collected in `ep_pkg` (`DP_*`). `rasc_fpga_top` stays single precision: its
word layout packs three 32-bit fields.

## Verification

Every testbench is self-checking. Each computes its expected values in double-precision `real`
arithmetic through `tb/tb_fp_pkg.sv`, checks the latency of every result, and ends with
`TB_RESULT checks=N failures=M`. Each also has a watchdog.

| testbench | what it covers |
|---|---|
| `fp_mult_tb` | 3,000 random products in both multiplier roles, within 1 ulp; zero, overflow and underflow |
| `exp_module_tb` | 4,000 arguments over [-100, 100] and down to 2^-40, within 1 ulp; infinity and zero limits |
| `fp_acc_tb` | 600 framed sums: back to back, with gaps, one-word, and exactly cancelling |
| `ep_module_tb` | 400 orbital sums of 1-32 terms, including terms whose exponential underflows |
| `rasc_fpga_top_tb` | whole FPGA at default parameters with SRAM models: multi-term, one-term and empty runs, ignored `start`, run time |
| `ep_dp_tb` | double-precision exp (2,000 arguments, within 2 ulp) and double-precision EP sums |
| `mid_width_sweep_tb` | the interface-width sweep above |

To run one with Verilator:

```sh
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/ep_pkg.sv tb/tb_fp_pkg.sv tb/ep_module_tb.sv --top-module ep_module_tb
./obj_dir/Vep_module_tb
```

Substitute any testbench name. All of them finish in well under a second of simulation time
once built.

**Not verified:**
- timing closure or resource use on a real FPGA;
- NaN and subnormal inputs, which are not handled;
- the behaviour of real QDR SRAM controllers.
