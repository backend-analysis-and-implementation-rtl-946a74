# 8-tap LMS adaptive noise canceller

This is an adaptive FIR filter that removes interference from a signal when a
second signal correlated with that interference is available. The typical
case is mains hum or another noise source on an ECG recording. The noisy
recording enters as `data1` = d(n). A reference of the noise source enters as
`data2` = x(n). The filter learns 8 tap weights w so that its output y(n)
reproduces the noise as it appears in d(n). The difference e(n) = d(n) − y(n)
leaves on `error`, and that difference is the cleaned signal.

The weights are adapted by the Widrow–Hoff least-mean-square (LMS) rule. Each
input sample is one iteration of three steps:

```
y(n)   = Σ_{i=0..7} w_i(n) · x(n−i)          filter
e(n)   = d(n) − y(n)                          error
w(n+1) = w(n) + 2μ · e(n) · x(n)              weight update, x(n) = [x(n) … x(n−7)]
```

Each iteration takes 2N+1 = 17 multiplications: 8 in the filter, one for
2μ·e(n) and 8 in the update. It also takes 2N = 16 additions and
subtractions. The whole iteration is combinational between two register
stages, so the filter accepts a new sample pair on every clock.

The design follows a published ASIC implementation of this filter: 130 nm,
16-bit data, 8 taps, samples at 1 kHz. The block structure, the port and bus
names and the sizes come from that design. The number format, rounding,
overflow handling, handshake and reset were not specified and are chosen
here. The section "What is this design's own" below lists them.

## Block structure

```
             data1 ─────────────────────┐ (registered as d(n))
                                        ▼
 data2 ──► fir_filter ──q0..q7──► adaptive_filter ──► error
             ▲    └────fir_op───────►   │   ▲
             │                          │   │
             └──c0..c7── coeff_update ◄─┘n_c0..n_c7
                            (c0..c7 also read by adaptive_filter)
```

| file | role |
|---|---|
| `rtl/lms_pkg.sv` | sizes (`LMS_N_TAPS` = 8, `LMS_W` = 16, `LMS_FRAC` = 15), default step size, and the `clip` and `round_shift` helpers |
| `rtl/fir_filter.sv` | 8-stage delay line `q[0..7]` = x(n)…x(n−7), sum of products → `fir_op` = y(n), fill flag `q_full` |
| `rtl/adaptive_filter.sv` | combinational: e(n), 2μ·e(n), and the new weights `n_c[i]` = c[i] + 2μ·e(n)·q[i] |
| `rtl/coeff_update.sv` | register bank holding the weights `c[0..7]`; it loads `n_c` once per sample |
| `rtl/lms_top.sv` | wires the three blocks together and registers d(n) with x(n) |

## Timing of one iteration

All state changes on a rising `clk` edge with `in_valid` high. On that edge:

* `data2` shifts into `q[0]`, and the older samples move one tap down;
* `data1` is stored as d(n);
* the weights computed during the previous sample interval are stored as
  w(n).

Until the next strobe, `fir_op`, `error` and `coef` show y(n), e(n) and w(n)
for the new sample. The weights w(n+1) are waiting at the input of the
weight registers, and the next strobe stores them. Samples may come on every
clock or sparsely, such as once per millisecond from a 1 kHz ADC. Between
strobes nothing changes.

`out_valid` goes high once 8 samples have been taken since reset. From then
on every tap holds real data rather than the zero left by reset. With a
sample on every clock, that is 8 clocks after the first sample. From then on
there is a fresh error value after every clock: a latency of 8 clocks and a
throughput of one sample per clock. The weights adapt from the first sample
on. Before the delay line fills, the empty taps are zero and contribute
nothing.

The longest combinational path runs from the tap and weight registers through
a tap multiplier, the 8-input sum, the error subtraction, the 2μ multiplier,
an update multiplier and a weight adder, into the weight registers. The
design has no internal pipeline stages. The original work mentions
pipelined variants but does not describe them.

## Arithmetic

All samples, weights, the error and 2μ are signed 16-bit Q1.15 fractions:
`16'h8000` is −1.0 and `16'h7FFF` is 1 − 2⁻¹⁵. A 16-bit result printed as
an unsigned number, such as 38403, is simply the two's-complement pattern
(here 0x9603, about −0.83).

* **Products** are formed at full width (32 bits). They are brought back to
  Q1.15 by adding 2¹⁴ and shifting right 15 places, which rounds to nearest.
  Rounding matters here: with plain truncation, every small update is biased
  toward −∞. In simulation the weights then drifted several hundred LSB away
  from the true solution, and the residual noise stayed about 50 times
  higher.
* **The filter sum** adds all eight full-width products before rounding
  once.
* **Overflow**: y(n), e(n), 2μ·e(n) and each new weight are clipped to
  [−32768, 32767] instead of wrapping. `sat` on the top is high while any of
  these clips in the current iteration. This happens when, for example,
  d(n) and y(n) are near full scale with opposite signs.
* **Step size**: the parameter `MU2` holds 2μ directly, as a Q1.15 constant.
  It defaults to `16'sh0100` = 2⁻⁷. It is applied with a real multiplier, so
  any value can be set. Larger values adapt faster but raise the misadjustment
  and can make the filter unstable. The usual bound is roughly
  2μ < 2 / (8 · E[x²]).

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_TAPS` | 8 | filter order (number of taps) |
| `W` | 16 | word width of every sample and weight |
| `FRAC` | 15 | fraction bits; products are rounded by this many bits |
| `MU2` | `16'sh0100` | 2μ in Q1.15 (only `adaptive_filter` and `lms_top`) |

`N_TAPS` and `W` can be changed, as long as 2·W + log2(N_TAPS) + 2 stays
below 64. The helpers work on 64-bit intermediates. The defaults need 36
bits.

## What is this design's own

Taken from the original design:

* the 8-tap LMS equations;
* the split into FIR filter, adaptive filter and coefficient update;
* the names `data1`, `data2`, `fir_op`, `q`, `c`, `n_c` and `error`;
* the 16-bit buses;
* the 1 kHz / 16-bit application;
* the 8-clock latency with one result per clock.

Chosen here, because the original does not say:

* Q1.15 two's-complement fixed point. The original text also mentions an
  IEEE 754 floating-point format, but its results are reported as 16-bit
  integers. This design uses integers.
* Round-to-nearest products and clipping on overflow.
* 2μ = 2⁻⁷.
* The `in_valid` sample strobe. The original feeds the filter at 16 kbit/s
  per input and defines no handshake.
* Reading the "latency of 8 clocks" as the fill time of the 8-stage delay
  line, marked by `out_valid`. No extra pipeline registers were added.
* Asynchronous active-low reset. It clears the delay line, the d(n) register
  and the weights: w(0) = 0.
* The extra top-level outputs `fir_op`, `coef`, `out_valid` and `sat`, for
  observing the filter. The original brings out only `error`.

Not modelled:

* the pipelined variants mentioned in the original;
* the I/O pad ring and the clock tree of the fabricated chip. These are
  physical-design artefacts with no logic function of their own.

## Verification

Each testbench checks itself. It prints `TB_RESULT checks=N failures=M`
and stops with `$finish`.

| testbench | what it shows |
|---|---|
| `tb/tb_fir_filter.sv` | delay line and sum of products against an integer model; random strobe gaps; clipping in both directions; `q_full` exactly at the 8th strobe |
| `tb/tb_adaptive_filter.sv` | error, 2μe and all new weights against integer arithmetic, for random and corner inputs, at the default and a full-scale step size; one hand-worked case |
| `tb/tb_coeff_update.sv` | reset, hold and load of the weight bank |
| `tb/tb_lms_top.sv` | end to end at the default parameters: system identification of an unknown 8-tap path plus a pulse train, 24,000 samples |
| `tb/tb_lms_ecg.sv` | the intended application: synthetic ECG at 72 bpm plus 50 Hz hum, cancelled using a 50 Hz reference, 12 s of data at 1 kS/s |

`tb/tb_lms_top.sv` compares every output on every clock with the bit-exact
model in `tb/lms_ref_pkg.sv`. It also makes each mechanism happen and counts
it:

* gaps in the strobe;
* a full-scale burst that drives the error into clipping;
* a reset in the middle of the run;
* the delay line filling.

It checks that `out_valid` rises 8 clocks after the first sample, that the
noise left in the error falls by more than 100×, and that the learned
weights end within 400 LSB of the true path. In a typical run the noise
falls by about 30 dB. `tb/tb_lms_ecg.sv` reaches about 50 dB of hum
suppression within 12 s.

To run one with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/lms_pkg.sv tb/lms_ref_pkg.sv tb/tb_lms_top.sv --top-module tb_lms_top -o sim
./obj_dir/sim
```

For the block testbenches, replace `tb_lms_top` with the testbench's name.
`tb/lms_ref_pkg.sv` is needed only by `tb_lms_top` and `tb_lms_ecg`. All
tests run in well under a second.

## How far to trust it

The RTL is small and every output is checked bit-exactly against an
independent model, over random, corner-case and application-like inputs. The
one result the original reports, an output of 38403 at the 8th iteration,
cannot be reproduced, because its input samples and step size are not
published. The arithmetic choices listed above are therefore unverified
against the original hardware, and a bit-exact match with it should not be
expected. A gate-level implementation should check the single-cycle
iteration path against its clock period. That path holds three multipliers
in series.
