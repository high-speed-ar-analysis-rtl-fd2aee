# Fixed-point AR analysis processors: Durbin solver in rational fractions and an adaptive lattice filter

Autoregressive (AR) analysis models a signal x(n) as white noise passed
through an all-pole filter and estimates that filter: the prediction
coefficients a_1..a_p and the reflection coefficients k_1..k_p. The usual
route has two steps: estimate the autocorrelation r_xx(0..p), then solve
the Toeplitz (Yule-Walker) system R a = -r with the Durbin recursion. That
recursion divides by the prediction error power E_i, which can come close to
zero, so it is normally run in floating point.

This RTL implements the two fixed-point processors proposed in the paper
"High Speed AR Analysis Based on FPGA". Each works at one input sample per
clock.

* **Durbin processor** (`ar_durbin_proc`). A linear array of P+1
  multiply-accumulate units estimates r_xx(0..P) over a frame of N samples.
  A small solver then runs the Durbin recursion in **rational-fraction
  arithmetic**: each value is a pair of 18-bit integers n/d. This avoids
  both a wide fixed-point format and a floating-point unit.
* **Lattice processor** (`ar_lattice_proc`). A P-stage lattice
  prediction-error filter is adapted one stage at a time. For stage j, a
  coefficient unit accumulates partial correlations of the stage inputs over
  N samples and sets k_j = -Σ f·b / sqrt(Σ f² · Σ b²). Because |k_j| < 1 is
  guaranteed, plain integer arithmetic is enough. The samples come either
  from one captured array of N samples, replayed for every stage, or
  straight from the live stream.

`ar_top` puts the two side by side, each with its own ports. They are
alternatives, not parts of one pipeline. The defaults are order P = 10,
16-bit samples and N = Q·P = 100 samples (Q = 10).

## Rational-fraction arithmetic (`ar_pkg`, `rat_muldiv`, `rat_add`)

A value is `rat_t = {n, d}`: an 18-bit signed numerator and an 18-bit
denominator that is always kept positive. The operations are:

    x·y = (nx·ny) / (dx·dy)
    x/y = (nx·dy) / (dx·ny)        (signs moved so that d > 0)
    x+y = (nx·dy + ny·dx) / (dx·dy)

Each operation is a handful of 18×18 products, so it maps onto DSP
multipliers with no normalising shifter in front of them. Division costs no
more than multiplication, and that is what shortens the critical loop of
the Durbin recursion.

The products are 36 bits wide and must go back to 18. **Renormalisation**
(`rat_shift_amt`, `rat_pack` in `ar_pkg`) shifts the numerator and the
denominator right by the *same* amount. The amount is the smallest that
makes both magnitudes fit in 17 bits. This keeps the ratio and drops low
bits; it works like a shared exponent that cancels out. If the denominator
shifts down to 0 (the value is too large), the result saturates to
±(2^17−1)/1. Division by zero does the same.

What this means for precision:

* A value is most precise when |n| and d are of similar size, so when its
  magnitude is near 1 or below. The relative error is then about 2^-16.
* A large value (n at 17 bits, d small) has a coarse denominator. Its
  relative error grows roughly with the value.

The Durbin solver therefore does not use r_i directly. It enters the
normalised correlations r_i/r_0, with both parts shifted by the one amount
that brings r_0 into 17 bits. The recursion is unchanged by scaling, and
every operand stays near or below 1: E_0 = 1, |r_i/r_0| ≤ 1 and
|k_i| < 1. Only the a_i can grow beyond 1. With plain r_i/1 the error power
E_i loses its accuracy after the first order.

Both units are fully pipelined and accept one operation per cycle. A tag
travels with each operation so the caller can route the results.

| unit | latency | stages |
|---|---|---|
| `rat_muldiv` | 7 | operands, product, product register, sign fix, leading-one detect, shift/pack, output |
| `rat_add` | 4 | operands, three products, sum + leading-one detect, shift/pack/output |

The adder latency sets the accumulation period: a sum whose result is fed
back to its own input can take a new term every 4 cycles.

## Durbin path

### Correlation processor (`corr_processor`, `corr_cell`)

The input sample x(n) goes to all P+1 cells at once. Cell i multiplies x(n)
by x(n−i) and accumulates into 48 bits. The lagged samples move along the
array, one register per cell. Cell 0 uses x(n) itself.

On the last sample of a frame, every cell copies its sum to its result
register and clears its accumulator and lag register. Frames are therefore
independent windows, and samples before a window count as zero. This biased
estimate keeps the Toeplitz matrix positive definite, so the solver sees
|k_i| < 1.

`r_valid` pulses one cycle after the last sample. The results are then held
for a whole frame while the next frame accumulates.

### Solver schedule (`durbin_processor`)

The solver has one `rat_muldiv` and one `rat_add`. For each order
i = 1..P it runs these steps:

1. **k-sum**: s = Σ_{j=0}^{i−1} a_j · r_{i−j}. A product is issued every
   4 cycles. Product j leaves the multiplier in the same cycle that partial
   sum j−1 leaves the adder, and that sum is forwarded straight back to the
   adder input. The loop therefore runs at one term per 4 cycles with no
   extra buffering, taking 4i + 12 cycles.
2. **k_i = −s / E_{i−1}**: one division, 9 cycles.
3. **Coefficient update**: a_j ← a_j + k_i · a_{i−j} for j = 1..i−1. These
   are independent, so they stream through multiplier and adder one per
   cycle, steered by the tag. They read the order-(i−1) array `a_old` and
   write `a_new`, which is copied back at the end of the order.
4. **E_i = (1 − k_i²) · E_{i−1}**. k_i² takes the multiplier slot right
   after the last update, and 1 − k_i² the adder slot that this product
   frees. Only the multiplication by E_{i−1} then remains after the
   updates. Forming 1 − k_i² against an exact 1 matters: the algebraically
   equal E_{i−1} + k_i · s, which is one operation shorter, adds two nearly
   equal fractions of different denominators. It loses enough precision on
   narrow-band signals to push late k_i past ±1.

At P = 10 the whole solve takes 646 cycles. Afterwards the results leave
on a valid/ready stream: k_1..k_P, then a_1..a_P.

### Output conversion and frame handling (`rat_to_fixed`, `ar_durbin_proc`)

`rat_to_fixed` divides numerator by denominator with a restoring divider
(35 cycles). It produces a signed 32-bit value with 16 fraction bits,
truncated toward zero and saturated. Each result leaves `ar_durbin_proc` as
a one-cycle `coef_valid` pulse carrying both the fraction and the
fixed-point value.

The correlation processor and the solver form a two-stage pipeline. If a
frame ends while the solver is still busy, that frame is dropped and
`overrun` pulses. At the defaults (P = 10, N = 100, one sample per clock),
solving plus converting takes about 1350 cycles, about 14 frames. Most
frames are therefore dropped unless samples arrive more slowly than the
clock.

## Lattice path

### Stage (`lattice_stage`) and filter (`lattice_filter`)

Each stage computes:

    E^f_j(n) = E^f_{j−1}(n)   + k_j · E^b_{j−1}(n−1)
    E^b_j(n) = E^b_{j−1}(n−1) + k_j · E^f_{j−1}(n)

with E^f_0 = E^b_0 = x(n). Each stage holds:

* one delay register on the backward path;
* a k_j register: 18-bit signed, 16 fraction bits, loadable and clearable.

The errors are 18 bits wide: 16-bit data plus 2 guard bits. The products
are rounded to nearest (half an LSB is added before the shift, so the
stages do not pile up the bias of truncation), and the sums saturate (`sat`).
The error path carries no fraction bits. Once a signal is nearly whitened,
the later stages see a residual of only a few LSBs. Their k then differ
from an exact floating-point computation by the rounding noise: up to about
0.02 for the band-pass test signal at stages 8 and 9, and below 0.001 for
the AR(2) signal.

Both stage outputs are registered. Each stage adds one sample of delay to
both paths alike, and `e_out` = E^f_P lags the input by P samples.

Every stage brings out its inputs E^f_{j−1}(n) and E^b_{j−1}(n−1) as taps
for the coefficient unit.

### Coefficient calculation unit (`coef_calc_unit`)

After `start`, the unit clears all k and then, for j = 1..P:

1. It skips 2 samples so that the taps of stage j reflect k_{j−1}.
2. It accumulates over N samples from stage j's taps:
   C = Σ f·b, F = Σ f², B = Σ b² (48-bit integers).
3. It computes S = ⌊√(F·B)⌋ with a digit-by-digit square root of the
   96-bit product (`isqrt`, 48 cycles).
4. It computes |k| = |C|·2^16 / S with a 16-cycle fractional division. The
   sign is that of −C. The magnitude is clipped to 1 − 2^-16 when rounding
   makes |C| ≥ S, and k = 0 when S = 0.
5. It loads k_j into stage j.

One stage takes 2 + N + 67 samples. The filter input never stops: samples
that arrive while k_j is being computed pass through the filter without
being accumulated. `calc` is high during each estimation period.

### Feeding the adaptation (`lattice_input_buffer`)

The P estimates need P windows of N samples. Where they come from is
chosen by `buffered` at each `start`:

* **Buffered** (`buffered` = 1). The next N input samples are captured
  into an N-entry array; the filter is not fed meanwhile. In the cycle
  that writes the last sample, the coefficient unit starts. The array is
  then played to the filter, one sample per clock and cyclically, until
  k_P is loaded. Every stage is thus estimated from the same data, and the
  live input is ignored until the adaptation ends. Each N-sample window
  covers every stored sample once, starting at a different point in the
  array. The filter carries its state across the wrap from the last sample
  to the first.
* **Streaming** (`buffered` = 0). The buffer is transparent and the live
  stream is fed directly. Each stage sees new samples, which suits a
  signal that is stationary over the whole P·(N + 69)-sample adaptation.

Adaptation takes P·(N + 69) samples when streaming, plus N for the capture
when buffered.

## Timing against the paper's reference implementation

The paper reports results for 16-bit data and N = 10p, implemented in a
Xilinx Virtex-4 device:

| | this RTL, P = 10 | paper, p = 10 | this RTL, P = 90 | paper, p = 90 |
|---|---|---|---|---|
| Durbin: cycles to k_1..k_p | 646 (+ 35 per converted result) | 610 | 23843 | 5490 |
| Lattice: samples to adapt (streaming) | 1690 | 1650 | 87211 | 86850 |

The lattice figures agree to within the per-stage overhead, and the
Durbin figures at p = 10 to within 6 %. The Durbin
solver here runs the k-sum of every order through one multiplier at one term
per 4 cycles, so its time grows as p². The paper gives the unit latencies
and the 4-cycle period but not the schedule. Its Durbin figures are 61
cycles per order at both sizes. With one fraction multiplier, the
k-sums and coefficient updates up to order 90 alone take about 8000
products. So the p = 90 figure cannot be reached with a schedule of this
kind, and it probably measures something other than the full solve.

No clock-frequency or area figures are claimed for this RTL.

## Where this design makes its own choices

The paper fixes the following:

* both structures;
* the recursions and the k_j formula;
* the 18-bit numerator and denominator;
* the latency of 7 for multiply/divide and the period of 4 for
  accumulation;
* the 16-bit data;
* N = 10p.

The paper's evaluation mentions "N = 10" next to "N = qp = 10p". The
lattice timings only fit N = 10p, so that is what is built.

Everything below is this design's own choice:

* the renormalisation rule (truncating), the round-to-nearest of the lattice
  products and the saturation;
* the r_i/r_0 input scaling;
* the solver schedule and its output stream format;
* the fixed-point output format (32 bits, 16 fraction bits) and the
  sequential dividers;
* frame windowing, and dropping frames that arrive while the solver is busy;
* error and coefficient widths in the lattice, and the output register
  after each stage;
* the square-root and division methods, the 2-sample settling after each
  load, and the clipping of k;
* the cyclic playback of the buffered array, and the choice of mode per
  start;
* one clock and an asynchronous active-low reset for everything.

The paper also points out that the correlation processor could run from a
faster clock than the solver. Here everything runs on one clock.

## Ports of `ar_top`

| port | dir | meaning |
|---|---|---|
| `d_x_valid`, `d_x[15:0]` | in | Durbin path sample stream |
| `d_coef_valid` | out | one result: `d_coef_is_a` (0 = k, 1 = a), `d_coef_idx` (1..P), `d_coef_frac` (n/d), `d_coef_fixed` (Q15.16) |
| `d_busy`, `d_done`, `d_overrun` | out | solver busy, solve finished, frame dropped |
| `l_start` | in | clear all k and adapt |
| `l_buffered` | in | with `l_start`: adapt on one captured array (1) or on the stream (0) |
| `l_x_valid`, `l_x[15:0]` | in | lattice path sample stream |
| `l_e_out[17:0]` | out | prediction error E^f_P |
| `l_k_valid`, `l_k_idx`, `l_k_val` | out | coefficient just loaded (k with 16 fraction bits) |
| `l_k[P]` | out | all coefficients |
| `l_calc`, `l_busy`, `l_done`, `l_sat` | out | estimation period, capturing or adapting, adaptation finished, a stage saturated |

## Files

* `rtl/ar_pkg.sv`: `rat_t` and the renormalisation functions.
* `rtl/rat_muldiv.sv`, `rtl/rat_add.sv`, `rtl/rat_to_fixed.sv`: the
  fraction units.
* `rtl/corr_cell.sv`, `rtl/corr_processor.sv`, `rtl/durbin_processor.sv`,
  `rtl/ar_durbin_proc.sv`: the Durbin path.
* `rtl/lattice_stage.sv`, `rtl/lattice_filter.sv`, `rtl/coef_calc_unit.sv`,
  `rtl/lattice_input_buffer.sv`, `rtl/ar_lattice_proc.sv`: the lattice path.
* `rtl/udiv.sv`, `rtl/isqrt.sv`: sequential divider and square root.
* `rtl/ar_top.sv`: the top.
* `tb/tb_<module>.sv`: one self-checking testbench per module.
* `tb/tb_util_pkg.sv`: floating-point Levinson-Durbin reference and the
  AR(2) test signal x(n) = 1.2x(n−1) − 0.6x(n−2) + w(n), whose
  k_1 = −0.75 and k_2 = 0.6.

Additional testbenches:

* `tb/tb_ar_top.sv`: both paths end to end at the default parameters.
* `tb/tb_workload_p90.sv`: order 90 with N = 900.
* `tb/tb_workload_bandpass.sv`: the lattice processor on noise shaped by a
  6th-order band-pass filter.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself.
For example, with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/ar_pkg.sv tb/tb_util_pkg.sv tb/tb_ar_top.sv --top-module tb_ar_top
    ./obj_dir/Vtb_ar_top

Replace `tb_ar_top` with any other testbench name. All of them finish in
seconds; `tb_workload_p90` is the longest.

The testbenches compare against independent models:

* integer models for the correlation cells and lattice stages;
* floating-point arithmetic for the fraction units;
* a floating-point Levinson-Durbin solution of each frame's own
  autocorrelation for the solver; at P = 90 the largest coefficient error is
  0.003;
* the known reflection coefficients of the test signal, and the fall in
  prediction-error power, for the lattice processor;
* a floating-point model of the whole lattice processor, fed the same
  samples on the same timing (`lattice_ref` in `tb_util_pkg`, behind a
  model of the input buffer, `buffer_ref`). Every loaded k must agree with
  it within 0.005, or 0.05 for the band-pass signal. Both feeding modes are
  run by `tb_ar_lattice_proc` and `tb_ar_top`.

`--assert` also enables three assertions in the RTL:
* the Durbin output stream holds each word until it is taken;
* the coefficient unit writes one stage register at a time;
* the input buffer feeds the filter nothing while it captures.
