# Six-stage decimation filter for a 3-bit sigma-delta ADC

A sigma-delta modulator delivers a coarse 3-bit code at 208 MHz. Its
quantisation noise has been pushed far above the 0.8 MHz signal band. This
filter removes that noise and lowers the rate by 128, from 208 MHz to
1.625 MHz, giving 12-bit samples. It does this in six stages.
Each stage decimates by 2 or 4, so the hardware after each stage runs slower
than the hardware before it.

```
 3 b @208 MHz                                                          12 b @1.625 MHz
 ──► comb (1+z⁻¹)⁴ ─► comb (1+z⁻¹)³ ─► sinc³ ─► half-band ─► half-band ─► low-pass ──►
       ↓2   7 b        ↓2   10 b        ↓4 16 b   7 taps ↓2   15 taps ↓2   37 taps ↓2
     104 MHz           52 MHz          13 MHz     6.5 MHz     3.25 MHz     1.625 MHz
```

The first three stages are plain binomial and sinc filters with small integer
taps. They need no multipliers and remove most of the noise while the word is
still narrow. The last three are true FIR filters that set the band edge:
two half-band filters, then a linear-phase low-pass with passband 0–0.45 and
stopband 0.55–1 of its input Nyquist band (0.73 MHz and 0.89 MHz). Every
stage uses a polyphase structure. Input samples are gathered into groups of
R (the decimation factor). Each sub-filter handles one input phase, and all
the arithmetic for a group runs once. Nothing is ever computed and then
thrown away by a down-sampler.

## Clocking and interface

The whole chain runs on the modulator clock, so there is one clock domain.
Each stage emits a one-cycle `out_valid` strobe with each output sample. That
strobe is the next stage's `in_valid`, and it is the only condition under
which that stage's registers load. In effect it is a clock enable, and it
stands in for the divided clocks that a multi-clock version would use.

`decim_top` ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | modulator clock (208 MHz nominal) |
| `rst_n` | in | 1 | asynchronous, active low; clears every register |
| `in_valid` | in | 1 | a modulator sample is on `in_data`; may be high every cycle |
| `in_data` | in | 3 | signed code, −4…3 |
| `out_valid` | out | 1 | one-cycle pulse, once per 128 accepted inputs |
| `out_data` | out | 12 | signed output sample, held between pulses |

Timing: `out_valid` rises 6 clock cycles after the edge that accepts the
input completing a group of 128. That input completes a group in every
stage, and each stage adds one register. The design has no back-pressure.
`in_valid` may drop for any number of cycles, and the filter simply waits.
Assertions in `decim_top` check the strobe rules during simulation. A
strobe never lasts two cycles, and each one follows a strobe from the stage
before it.

The output samples are
`y[m] = Σ h[k]·x[R·m + R − 1 − k]` per stage, counting inputs from the
first one after reset. This means the first output uses samples x[0]…x[127],
and all samples before x[0] count as zero.

## The non-recursive comb stages (stages 1 and 2)

Stage 1 is H1(z) = (1+z⁻¹)⁴, with taps 1 4 6 4 1. Its order is one more than
the modulator's noise-shaping order, 3. The filter is split into two phases.
The even taps 1, 6, 1 act on the newer sample of each pair. The odd taps 4, 4
act on the older one. The older sample waits in a single input-rate register,
`b_hold`. When the newer sample arrives, both sub-filters are evaluated
together, and their delay registers advance once per pair:

```
y[m] = a[m] + 6·a[m-1] + a[m-2] + 4·(b[m] + b[m-1]),   a[m]=x[2m+1], b[m]=x[2m]
```

Stage 2, H2(z) = (1+z⁻¹)³, works the same way. It has newer-phase taps 1, 3
and older-phase taps 3, 1.

The word length grows by the filter order, because the DC gain is 2^K:
3 → 7 → 10 bits. No overflow is possible. The most positive code is 3 and
the most negative is −4, so the result always fits.

The gains 3, 4 and 6 are shift-and-add constants (`csd_mult`).

## The polyphase sinc stage (stage 3)

The third-order sinc with decimation 4, ((1−z⁻⁴)/(1−z⁻¹))³, is normally
built as a CIC filter: integrators at the high rate and combs at the low
rate. Here it is expanded instead into its 10 taps,
1 3 6 10 12 12 10 6 3 1. These are split into four phase sub-filters
(z⁻¹ = one output period):

| phase (newest first) | sub-filter |
|---|---|
| x[4m+3] | 1 + 12z⁻¹ + 3z⁻² |
| x[4m+2] | 3 + 12z⁻¹ + z⁻² |
| x[4m+1] | 6 + 10z⁻¹ |
| x[4m]   | 10 + 6z⁻¹ |

Only three registers run at the input rate: they hold the three older
phases of the current group. Everything else runs once per four inputs. The
integrators' wide, fast accumulators are gone, and so is the long carry
chain that limits a CIC's clock rate. The word length grows by
3·log2(4) = 6 bits, to 16.

## The FIR stages (4, 5, 6) and the `polyfir_dec2` engine

All three FIR stages share one engine: a decimate-by-2 FIR in transposed
direct-form polyphase structure (`polyfir_dec2`). Each time a pair of inputs
(newer `a`, older `b`) is complete, it forms one product sum per tap
position:

```
p[j] = h[2j]·a + h[2j+1]·b
y    = p[0] + r[0]          r[j] ← p[j+1] + r[j+1]      r[last] ← p[last+1]
```

In the chain each register sits behind exactly one adder. The critical path
is therefore one constant multiplier and two adders, however many taps the
filter has, and the chain moves only at the output rate.

Each multiplier is a canonical-signed-digit network (`csd_mult`). The
package function `csd_mask` recodes each constant at elaboration. Each
non-zero digit then becomes one shifted add or subtract. A zero tap produces
no logic at all. Where two mirrored taps of a symmetric filter have the same
value, their product is computed once and used twice.

In a half-band filter every second tap away from the centre is zero, and the
centre tap is exactly ½. The 7-tap stage therefore needs two multipliers plus
a shift, and the 15-tap stage needs four plus a shift. The 37-tap low-pass
needs 19 (10 on one phase, 9 on the other).

The full-precision sum is kept to the end. Each stage then drops its
fraction bits once, rounding to nearest (ties towards +∞), and saturates to
its output width. The half-band stages are 16-bit in and out at unity scale.
The low-pass drops 4 further bits, turning the 16-bit scale into the 12-bit
output.

### Coefficients

The filter orders, types and band edges are fixed by the specification. The
tap values are this design's own. They were computed with the
Parks-McClellan (equiripple) algorithm and rounded to 16-bit signed integers
with 15 fraction bits. They are in `rtl/decim_pkg.sv`.

| stage | taps | design | stopband reached |
|---|---|---|---|
| HBF1 | 7 | half-band, passband edge 0.89 MHz at fs 13 MHz | 61 dB (target 65 dB) |
| HBF2 | 15 | half-band, passband edge 0.89 MHz at fs 6.5 MHz | 65 dB |
| FIR | 37 | bands 0–0.45 / 0.55–1 ×Nyquist, stopband weighted 100:1 | 59.8 dB (target 60 dB) |

7 taps cannot reach the 65 dB asked of the first half-band filter. The 37-tap
filter reaches its 60 dB only by giving up passband flatness: about ±0.9 dB
of ripple, and a DC gain of 0.90. Across the whole chain the response is
+0.82 dB at 100 kHz and +0.50 dB at 0.70 MHz. It is about 60.8 dB down or more
everywhere from 0.894 MHz to 104 MHz. To change the tap values, replace the
arrays in `decim_pkg`. The structure adapts to any odd or even tap count of 3
or more. Symmetry is detected from the values.

## Scaling

The DC gain is 16 × 8 × 64 = 8192 per input step through the combs. It is
unity through the half-band stages, then 1/16 and the low-pass's DC gain of
0.90 at the output. A constant code of −4 settles at about −1840. A tone of
amplitude A steps comes out at about 512·A·|H(f)| LSB. Full-scale steps in
the input (−4 ↔ +3) make the FIR stages overshoot, and they saturate rather
than wrap.

## Where this departs from the specification it was built from

- One clock with valid strobes as clock enables, not divided clocks. A
  multi-clock version would move the stage boundaries onto clock edges. The
  comb stages' adder trees sit between registers of the input clock. At
  208 MHz they must either meet the full-rate period, or be given
  multicycle constraints of 2, 4, 16, … cycles.
- The output rate is 1.625 MHz (208 MHz / 128). A figure of 0.8 MHz appears
  as the "output rate" in the specification table, but it is the signal
  bandwidth. The decimation chain and the 3.25 MHz input rate of the last
  stage both give 1.625 MHz.
- One passage mentions droop compensation by an FIR equaliser, but the
  last-stage specification is a plain low-pass. A plain low-pass is what is
  built. The chain's passband response is given above.
- The first half-band filter reaches 61 dB rather than 65 dB (see above).
- The number format is two's complement. The word lengths of the FIR stages,
  the rounding, the saturation and the reset are this design's choices.
- The decimation factor is fixed at 128. A different signal bandwidth is
  served by changing the clock, because all band edges scale with it.
- The analog front end is outside the RTL: the anti-aliasing filter and the
  continuous-time modulator.

## Verification

Each testbench checks itself and prints `TB_RESULT checks=N failures=M`.
Each also has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_nrc_stage1`, `tb_nrc_stage2`, `tb_cic_stage3` | random full-range inputs with random idle cycles; every output against a direct-form convolution of the recorded input, exact; one output per R inputs; output strobe on the edge after the completing input |
| `tb_hbf1`, `tb_hbf2`, `tb_fir_stage` | the same, plus bursts of alternating full-scale inputs that must drive the output into saturation; reference rounding and clipping from `tb_ref_pkg` |
| `tb_decim_top` | the whole chain at its default sizes, 76,800 inputs / 600 outputs. The input is a 100 kHz tone through a behavioural modulator, then random codes, then long −4/+3 steps. Checks: every output bit-exact against a stage-by-stage reference cascade; sample counts after all six stages; 6-cycle latency; idle inputs and saturation in each FIR stage seen; no saturation in the combs; tone amplitude within limits of the 1406 LSB computed for 100 kHz |
| `tb_band_tones` | frequency response at the specified operating point. A 698 kHz tone must come out at the computed 1355.6 LSB ±3 % (measured 1355.5). A 1.0 MHz tone, aliased to 625 kHz, must be more than 55 dB down (measured 62 dB, against 63 dB computed) |

`tb/sdm_model.sv` is the modulator model. It is only a stimulus generator: a
discrete-time second-order loop with a 3-bit quantiser. It is not the
third-order continuous-time modulator the filter was specified for.

Every testbench was also run against a copy of its block with a deliberate
defect: a wrong tap gain, a mis-wired phase register, a wrong output shift, a
zeroed tap pair, or a skipped stage. Each of these copies fails.

Simulating with Verilator 5 (from the project root):

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_decim_top \
    rtl/decim_pkg.sv tb/tb_ref_pkg.sv tb/tb_decim_top.sv
./obj_dir/Vtb_decim_top
```

Use the same command for the others, naming their testbench. `tb_band_tones`
does not need `tb_ref_pkg.sv`. Each run finishes in well under a second.
For lint: `verilator --lint-only -Wall -Irtl rtl/decim_pkg.sv rtl/decim_top.sv`.

## Files

| file | content |
|---|---|
| `rtl/decim_pkg.sv` | word lengths, tap tables, CSD recoding function |
| `rtl/decim_top.sv` | the six-stage chain |
| `rtl/nrc_stage1.sv`, `rtl/nrc_stage2.sv` | polyphase binomial combs, ↓2 |
| `rtl/cic_stage3.sv` | polyphase sinc³, ↓4 |
| `rtl/hbf1.sv`, `rtl/hbf2.sv`, `rtl/fir_stage.sv` | FIR stages: tap set and scaling for the engine |
| `rtl/polyfir_dec2.sv` | transposed polyphase FIR decimator engine |
| `rtl/csd_mult.sv` | shift-add constant multiplier |
| `tb/tb_*.sv` | testbenches; `tb_ref_pkg.sv` reference arithmetic; `sdm_model.sv` modulator stand-in |
