# Variable-precision distributed-arithmetic MIMO equalizer

This is synthesizable SystemVerilog for the digital equalizer of a 112 Gb/s
dual-polarization QPSK coherent optical receiver for metro links of about
80 km. Four 5-bit, 56 GS/s time-interleaved SAR ADCs sample the two
polarizations (I and Q of X and Y) at twice the symbol rate. Every 500 MHz
clock the equalizer takes 112 samples from each ADC and returns 112 QPSK
decisions: 56 for polarization X and 56 for Y.

Two ideas set the design apart from a conventional FIR equalizer.

1. **The converter is calibrated inside the filter.** An interleaved SAR ADC
   has per-sub-converter offset, gain and timing errors, and every
   sub-converter also has its own bit-weight errors (capacitor mismatch,
   comparator offset). Here the equalizer does not multiply a sample by a
   coefficient. It splits the sample into its five bits and gives **every
   bit of every tap of every ADC its own complex coefficient** (distributed
   arithmetic). A bit-weight error becomes just another coefficient
   difference, so the LMS adaptation that removes chromatic dispersion,
   polarization mixing and interleaving mismatch also removes the converter
   nonlinearity. No analog calibration is needed.
2. **Each symbol is computed to the precision it needs (variable
   precision).** The bit planes are evaluated MSB first in a five-step
   pipeline. After each step the partial result is checked. A symbol that
   is already far from both decision boundaries is decided at that step,
   and the remaining steps are switched off for it. Only symbols near a
   boundary go on to the finer bits. Most symbols finish early, which cuts
   switching activity. The published analysis of this scheme expects roughly
   half the dynamic power of computing every bit plane, for a negligible
   BER penalty.

The analog front end (the ADCs themselves) and the clock-recovery phase
detector are outside this RTL. The ADC codes enter on a port, and the clock
is the design's `clk`.

## Module map

| file | role |
|---|---|
| `rtl/vpda_pkg.sv` | constants (4 ADCs, 5 bit planes), ADC index names, decision type, suspicious-region constants and `sus_threshold()` |
| `rtl/vpda_bitplane_mac.sv` | one bit plane of one sub-equalizer: ±coefficient sum over 4 ADCs × L taps, with the j rotation for the Q branches |
| `rtl/vpda_vp_stage.sv` | one resolution step: `acc = 2·acc + P + E`, range check, early decision, enable for the next step |
| `rtl/vpda_subeq.sv` | one output symbol: coefficient store, 5 × (MAC + step) pipeline, offset split, LMS update |
| `rtl/vpda_window.sv` | keeps three input blocks and cuts the L-sample tap window for each symbol position |
| `rtl/vpda_lms.sv` | shared LMS engine of one polarization: round robin, full-precision request, decision-directed error |
| `rtl/vpda_mimo_top.sv` | window + 112 sub-equalizers + 2 LMS engines, configuration and read-back port |

## The bit-plane arithmetic

Each sub-equalizer produces one complex output symbol from four real input
streams: XI, XQ, YI and YQ (index 0..3). The in-phase streams (XI, YI) use
coefficient set **A**. The quadrature streams (XQ, YQ) use set **B**, whose
products are rotated by +j before summing, so that `y = Σ A·r_I + j·Σ B·r_Q`.
This is the MIMO form: each output sees all four converters, so the same
filter also undoes polarization rotation and I/Q crosstalk.

A 5-bit code `d4..d0` is read as the sum `Σ (2·d_i − 1)·2^i`: each bit counts
as **+1 or −1**, not 1 or 0. Plane k (k = 1 is the MSB) has a complex
coefficient `C[k][adc][tap]`, and its partial result is

    P_k = Σ_adc Σ_tap  s(k,adc,tap) · C[k][adc][tap]     (s = ±1; B terms times j)

so no multiplier is needed, only a conditional negation and an adder tree
(`vpda_bitplane_mac`). The full output is `Σ_k 2^(5−k)·P_k` plus an offset.
Reading bits as ±1 makes a result truncated after any number of planes an
unbiased estimate of the full one. This is what allows deciding early. With
0/1 bits, every truncated result would be offset by half of the missing
weight.

An ideal converter needs the same coefficient in every plane. Any
difference between planes is the converter correction. Each tap of a given
sub-equalizer always reads the same physical sub-converter, so these
differences can be learnt per sub-converter.

Widths: the partial sum has `PW = COEF_W + clog2(4·L) + 1` = 16 bits, and the
running result has `AW = PW + 6` = 22 bits. Both are exact, with no
rounding inside the datapath.

## The variable-precision pipeline

`vpda_subeq` chains five `vpda_bitplane_mac` + `vpda_vp_stage` pairs. Step k
computes

    acc_k = 2·acc_{k−1} + P_k + E_k

and registers it. Steps 1–4 then scale `acc_k` to full resolution
(`<< (5−k)`) and test it against that step's threshold `thr[k−1]`:

* The **suspicious region** is the set of points whose real *or* imaginary
  part lies within ±thr of zero. That is a cross along both axes, because
  each QPSK bit is decided by one component. A symbol inside the cross stays
  active, and the next step is enabled.
* A symbol outside the cross is **decided now**: the decision is the sign of
  each component. Later steps get `en = 0`, and their MAC operands are
  forced to zero (operand isolation), so their adder trees do not toggle.
  The decision and the number of the deciding step ride along the pipeline
  to the output.
* Step 5 always decides.

The outputs are `out_dec` (one bit each for I and Q, 1 = positive),
`out_res` (the deciding step, 1..5) and the soft value `out_re/out_im`. The
soft value is meaningful only when `out_res == 5`.

`vp_en = 0` enables every step for every symbol. That is the
fixed-resolution DA equalizer, used for comparison and for tracking
measurements. The LMS engine also forces full precision on the symbols it
learns from (below).

**Thresholds.** `thr[0..3]` are run-time inputs in full-resolution output
units. The published region sizes, normalized to the QPSK constellation,
are 1.82, 0.86, 0.44 and 0.19 for steps 1 to 4. `vpda_pkg::sus_threshold(step,
amp)` converts them for a symbol amplitude `amp`, using the Q8 constants
466, 220, 113 and 49. Larger thresholds trade power for BER.

## The offset split

Each sub-equalizer has one complex offset `off` (OW = 20 bits). It is stored
once at full resolution but added step by step, so that every partial result
already carries the offset at its own precision. Step 1 adds `off >>> 4`, and
step k > 1 adds bit `5 − k` of `off`. After the doubling in each step, the
full-precision result contains exactly `off`. The LMS adapts the offset as
the average error. This is where the converters' DC offsets end up.

## Sample windows

`vpda_window` keeps the last three input blocks (NPAR samples × 4 ADCs
each). Symbol s of a polarization (s = 0..55) sits at sample 2s of a block.
Its window is samples `2s − L/2 … 2s + L/2 − 1` of the middle block, reaching
into the neighbouring blocks at the edges. Tap `L/2` is therefore the
symbol's own sample. The X output s and the Y output s share one window, so
56 windows feed 112 sub-equalizers. Centring the window costs one block of
latency, but it lets the filter reach both pre- and post-cursor dispersion.

## The LMS engine

One `vpda_lms` per polarization adapts its 56 sub-equalizers in round robin,
one per clock (or one per `DWELL` clocks). Each sub-equalizer is therefore
updated once every 56 clocks, 56 times more slowly than with an engine per
output. This is the area trade of the architecture.

An early-decided symbol has no full-resolution value to learn from. So the
engine asserts `force_full` for the sub-equalizer whose symbol is *entering*
the pipeline now. Five clocks later, when that symbol leaves, the engine
forms the decision-directed error

    e = ref_amp·(±1 ± j) − y

and asserts `upd_en` for that one sub-equalizer, broadcasting `e`. The
sub-equalizer updates all 5 × 4 × L coefficients in one clock, using the
sample window aligned with that output (the window travels down the
pipeline with the symbol):

    A[k] += s · round(e · 2^(5−k) / 2^MU_SH)
    B[k] += s · round(−j·e · 2^(5−k) / 2^MU_SH)
    off  += round(e / 2^MU_OFF_SH)

`2^(5−k)` is the weight of plane k in the output, which makes this the true
gradient. Each coefficient register holds `CFRAC = 8` guard bits below the
8 bits the datapath uses, so steps smaller than one LSB accumulate. The
datapath takes the register **rounded to nearest**. Truncation would turn
every unused coefficient that drifts slightly below zero into −1, and across
the 640 coefficients of a sub-equalizer that bias is large enough to flip
decisions. With `MU_SH = 16` and 32 taps, `μ·Σx²` ≈ 0.7, which is stable.
A configuration write wins over an update in the same clock.

Coefficients and offsets reset to zero. Software (or a testbench) loads a
starting set through `cfg_*`, or the engines start from zero.

## Timing and latency

* Throughput: one block per clock, i.e. 112 samples per ADC and 112
  decisions per clock, with no stalls. `in_valid` may have gaps.
* The decisions for block n appear on `out_*` with `out_valid` 1 + 5
  clocks after the `in_valid` of block n+1. That is one block of window
  look-ahead, one window register and the five pipeline steps. The
  testbenches check this latency.
* Reset is asynchronous and active low. It clears valid flags, window
  history, coefficients, offsets and the LMS pointer.
* Everything between registers is one bit plane of one sub-equalizer: an
  adder tree over 4·L = 128 signed 8-bit terms, one add and a compare.
  Whether that closes at 500 MHz depends on the library. The RTL has no
  extra pipelining inside a step.

## Parameters

All defaults are the published design point, except where marked.

| parameter | default | meaning |
|---|---|---|
| `NPAR` | 112 | samples per ADC per clock (56 GS/s / 500 MHz) = number of outputs |
| `L` | 32 | taps per ADC per sub-equalizer (any L with L/2 ≤ NPAR) |
| `ADC_W` | 5 | converter resolution = number of bit planes |
| `COEF_W` | 8 | coefficient bits used by the datapath |
| `CFRAC` | 8 | LMS guard bits (own choice) |
| `MU_SH` | 16 | LMS step 2^−MU_SH (own choice) |
| `MU_OFF_SH` | 6 | offset LMS step 2^−MU_OFF_SH (own choice) |
| `DWELL` | 1 | clocks the LMS engine stays with one sub-equalizer (own choice) |

The derived widths `PW`, `AW` and `OW` follow from these and normally
should not be overridden. A dual-polarization link with separate PMD
compensation is quoted as needing 32 + 9 = 41 taps of equal capability.
Set `L = 41` for that; the default of 32 is the single-polarization
simulation setting.

## Simulation

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>`, ends with `$finish`, and has a watchdog.
Build and run with plain Verilator 5, for example:

    verilator --binary --timing --assert -Irtl \
        rtl/vpda_pkg.sv rtl/vpda_bitplane_mac.sv rtl/vpda_vp_stage.sv \
        rtl/vpda_subeq.sv rtl/vpda_window.sv rtl/vpda_lms.sv rtl/vpda_mimo_top.sv \
        tb/tb_vpda_mimo_top.sv --top-module tb_vpda_mimo_top
    ./obj_dir/Vtb_vpda_mimo_top

For a block testbench, list only `vpda_pkg.sv`, the modules it uses and the
testbench.

| testbench | size | what it checks |
|---|---|---|
| `tb_vpda_bitplane_mac` | L=32 | every output against an integer model, including isolation when `en = 0` |
| `tb_vpda_vp_stage` | default | recursion, cross-shaped region, decisions, pass-through of decided symbols, `vp_en`/force; every outcome occurs |
| `tb_vpda_subeq` | L=4, CFRAC=2 | bit-exact model of the pipeline, latency, early decisions at all five steps, offset split, coefficient writes and read-back, and the LMS update of every coefficient and the offset |
| `tb_vpda_window` | NPAR=8, L=6 | every tap of every window, block edges, fill-up after reset |
| `tb_vpda_lms` | NSUB=5, DWELL=2 | round robin, `force_full` → `upd_en` lead, gating by `in_full`, error value |
| `tb_vpda_mimo_top` | NPAR=8, L=4 | end to end, below |
| `tb_vpda_mimo_top_full` | all defaults | the same end-to-end test at full size, with shorter phases |

The end-to-end tests drive a 2×-oversampled QPSK stream on both
polarizations, with noise, random interference taps and random offsets.
They check the following:

* **Phase A** (variable precision): every output bit-exact against an
  integer model (decision, deciding step, soft value), the latency, and a
  symbol error rate below 5 % against the transmitted data.
* **Phase B**: the same with `vp_en = 0`; every symbol must be full precision.
* **Phase C** (adaptation): the centre taps start too small and XI gets a DC
  offset; both LMS engines run. At the small size, the mean output error
  must drop by a quarter, the centre tap must grow and the symbol error rate
  must stay below 2 %. At full size each sub-equalizer is visited only once
  per 56 clocks, so only updates and forced symbols are required.
* Each mechanism must be seen: decisions at each of the five steps,
  fixed-precision outputs, LMS updates and forced full-precision symbols.

The full-size build generates about 370 MB of C++. It takes 3–5 minutes and
about 4 GB of memory to compile, then a few seconds to run.

## What has and has not been verified

* Verified: bit-exact behaviour of every block against independent integer
  models, at reduced sizes and at full size for the top level; LMS updates
  bit-exact at L = 4 and L = 32; LMS convergence on a synthetic channel at
  NPAR = 8, L = 4, and no loss of decisions under adaptation at
  NPAR = 16, L = 32.
* Not reproduced: BER against OSNR on a real fiber channel, the enable rates
  of the published suspicious regions on such a channel, the converter
  nonlinearity models, or the 2 ms tracking time constant under polarization
  rotation. These need a channel and converter model the testbenches do not
  have. The enable rates seen here are for the synthetic stimulus only.
* Not checked: timing closure and area. The 112-sub-equalizer top holds
  about 2.3 M coefficient flip-flops (112 × 640 complex coefficients of 16 bits), and generic logic synthesis of it is
  slow.

## Where this RTL makes its own choices

The structure follows the published architecture: per-bit complex
coefficients, A/B branches with a j rotation, an MSB-first pipeline with a
doubling accumulator and a range check per step, early decision with the
later steps disabled, one shared LMS engine per 56 sub-equalizers, and the
published default sizes. The following are this design's decisions:

* Bits are read as ±1 everywhere (the description uses both ±1 and 0/1
  forms). This keeps early results unbiased.
* The suspicious region is tested as a cross: either component near zero.
  The region is defined as a union of the two bands.
* Thresholds are run-time inputs, scaled to full resolution before the
  compare, rather than fixed constants.
* The offset is stored once and split bitwise over the steps. The
  description mentions both an offset adder in every step and an offset
  subtracted in the last stage.
* The window is centred on the symbol, which costs one block of latency.
* The LMS is decision-directed, with explicit reference amplitude, gradient
  weighting per plane, guard bits, rounding and saturation. The engine
  forces full precision on the symbol it learns from, instead of requiring
  variable precision to be off while adapting.
* One sub-equalizer equation prints the last branch as the X polarization
  where the block diagram shows Y. The RTL follows the block diagram: outputs
  56..111 are Y, and streams YI/YQ feed them through A/B like X.
* There is no pipelining inside a step. The description gives no more detail.
