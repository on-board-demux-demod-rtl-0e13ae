# On-board bulk demultiplexer/demodulator

A satellite that regenerates traffic on board must split a 20 MHz band full of
FDMA/TDMA QPSK carriers into individual carriers, and then demodulate their
bursts. Building one filter and one demodulator per carrier does not scale, and
it cannot be re-planned in orbit. This design instead does the work with a few
shared engines:

* **Demultiplexing in the frequency domain.** One 256-point FFT runs over the
  whole band, using overlap-and-save with 50 % overlap. Each carrier's bins are
  weighted by its receive filter. A shared inverse FFT then brings each carrier
  back to the time domain at a low sample rate. The pipeline can mix inverse
  transforms of any size from 2 to 32 points, so wide and narrow carriers share
  it.
* **Interpolation to two samples per symbol.** The IFFT gives each carrier a
  sample rate near two per symbol, but not exactly two. A shared polyphase FIR
  interpolator resamples each carrier to exactly two samples per symbol, placed
  on the symbol peak and on the transition. The demodulator steers this through
  a clock-error feedback.
* **One demodulator for all carriers.** A single QPSK demodulator serves the
  carriers in turn and keeps a small state per carrier. It acquires each burst
  open loop from its preamble, using table lookups instead of dividers. It then
  preloads its tracking loops and resolves the remaining 180-degree ambiguity
  with a unique word.

Everything is synchronous to one pipeline clock. The reference design clocks it
at 11.52 MHz and passes four complex samples per clock through the FFT.

## Data path

```
din[2] ─► overlap_buffer ─► fft256 ─► freq_filter ─┬► ifft_var ─► ifft_reorder ─► lane 0 ─► ifm_filter (I) ┐
 2 smp/clk   4 smp/clk        4 smp/clk   plan RAM  ├► ifft_var ─► ifft_reorder ─► lane 1 out               ├► demod ─► bits, UW
                                                    ├► ifft_var ─► ifft_reorder ─► lane 2 out  ifm_filter (Q) ┘   │
                                                    └► ifft_var ─► ifft_reorder ─► lane 3 out        ▲            │
                                                                                     ifm_control ◄──┴── clock ◄──┘
                                                                                      (mapping RAM)    estimate/adjust
```

| Module | Role |
|---|---|
| `dd_pkg` | Shared types (`cplx_t`, `plan_t`, `ifft_tag_t`), twiddle and complex-multiply functions |
| `overlap_buffer` | Builds 256-sample blocks from the 128 newest and 128 previous samples (three segment memories) |
| `fft256` | Radix-4 pipeline: `bf_radix4` – DSD(16) – `bf_radix4` – DSD(4) – `bf_radix4` – DSD(1) – `bf_radix4` |
| `bf_radix4`, `fft_coef_mem` | Radix-4 butterfly, three twiddle multipliers, scale 1/4 |
| `dsd`, `dsd_asic` | Delay-switch-delay stream reorder unit, built from eight 4-bit slices |
| `freq_filter` | Bin memory (double buffer) and plan RAM: selects, weights and interleaves the bins |
| `ifft_var`, `ifft_stage` | Radix-2 delay-feedback IFFT lane, 32 points at most, with stage bypass per sample |
| `ifft_reorder` | Restores time order and marks the aliased half of each transform invalid |
| `ifm_control` | Interpolator control: mapping RAM, phase plans, clock-error accumulators, coefficient tables |
| `ifm_filter` | One rail (I or Q) of the interpolator: per-carrier buffer, 16-tap shift register, FIR |
| `demod` | Shared burst demodulator; uses `acq_estimator`, `phase_rotator`, `carrier_loop`, `timing_loop`, `uw_detector` |
| `demux_demod_top` | The receive chain above |

The analog front end (IF conversion and A/D) and the ground command link are
not part of this RTL. The same goes for burst-timing control and the test
equipment (modulators, combiner, BER monitor). The top provides these as
ports:

* front-end samples `din`;
* plan and mapping RAM write ports;
* a burst-start request, `sob_req`/`sob_ch`.

## The FFT pipeline and the DSD

The FFT is a radix-4 decimation-in-frequency pipeline on four parallel
streams. In block clock `t` (0..63), stream `j` carries sample `t + 64j`. Each
butterfly works on the four streams of one clock. Between two butterflies, a
**DSD** (delay-switch-delay) changes which samples share a clock:

* Input stream `i` is delayed `i·k` clocks.
* A four-state switch rotates the streams: output `j` takes input `(s − j) mod 4`.
  The state `s` is a counter that advances every `k` clocks.
* Output stream `j` is then delayed `(3 − j)·k`.

With `k` = 16, 4 and 1 after the first, second and third butterfly, the output
comes out in digit-reversed order. In clock `16q1 + 4q2 + q3`, stream `q4`
carries bin `q1 + 4q2 + 16q3 + 64q4`, scaled by 1/256.

A DSD is built from eight `dsd_asic` slices. Each slice carries 4 bits of every
stream. A slice has:

* selectable delay taps of 1/4/16 (and 8 for a radix-2 setting) per stream,
  built from 16-, 32- and 48-stage shift registers;
* a 2-state (radix-2) or 4-state switch;
* a 6-bit controller counter that restarts after each end-of-block strobe
  (`eobk_in_n`, active low) unless `freerun` is set.

The end-of-block strobe travels with the data (delayed `3k`). The clear is
passed down the pipeline, so each DSD counter starts exactly when its first
data arrives.

Latency is 67 clocks from a block's first input clock to its first output clock.

**Departure:** the reference block diagram draws the twiddle multipliers in
front of the butterfly adders (decimation in time). Here they follow the adders
(decimation in frequency).

## Frequency plan and the variable-size IFFT

This is the part that needs the most care when you configure the design.

After each FFT block, `freq_filter` writes the 256 bins into one bank of a
double buffer. It then reads the other bank through a **plan RAM** of 256
`plan_t` entries. Entry `4c + l` says what IFFT lane `l` receives in frame
clock `c` (0..63). Each entry holds:

* `en`;
* `bin` (0..255);
* `coef`, a real filter weight in Q2.14;
* `carrier` (0..3);
* `lg2n`, the log2 of the size of the inverse transform this bin belongs to.

The lane sample is `bin × coef`.

A carrier whose filtered band spans `M` bins gets one inverse transform of `N ≥ M`
points (a power of two, up to 32) per FFT block. It occupies `N` consecutive
frame clocks of one lane, given in natural bin order. **A transform of N points
must start at a frame clock that is a multiple of N.** For example, an 8-point
transform fits at clocks 0–7 or 8–15, and a 32-point one at 0–31 or 32–63.
Transforms of different sizes can be mixed freely within a lane.

Each `ifft_var` lane is a radix-2 delay-feedback pipeline with stage spans 16, 8,
4, 2 and 1. Every sample carries its tag `{valid, sof, carrier, lg2n}`. A stage
does its butterfly only when its span is smaller than half the sample's
transform size. Otherwise it passes the sample straight through (the
"butterfly bypass"). This lets one pipeline compute any mixture of sizes
without being reconfigured. The output is bit-reversed within each transform
and not scaled. Latency is 36 clocks.

`ifft_reorder` writes each 64-clock frame to a bank at the natural position of
each sample. It reads the previous frame in order, so latency is 65 clocks.
With 50 % overlap-and-save, only the second half of each transform is a valid
time output. `dvalid` is low for the first half. An `N`-point transform
therefore yields `N/2` new samples per FFT block.

## Interpolating filter

`ifm_control` runs a 7-bit slot counter that wraps every 128 clocks; the top
restarts it every second FFT block. The counter addresses a 128-word
**mapping RAM**:

| Bits | Meaning |
|---|---|
| [1:0] | carrier served in this slot |
| [2] | slot enabled |
| [3] | set-next marker |
| [6:4] | carrier type, which selects a phase plan |

Each carrier has an address counter that steps through its type's **phase
plan**. The plan for type `t` turns `R_t = (64 + D_t)/64` input samples into one
output. The default types are `D = 0, 2, −2, 4, −4, 1`. A plan word gives:

* the fractional phase (1/64 sample);
* the clock gate, which shifts a new sample in;
* data-valid, which marks that an output is made.

When `R > 1`, some slots make no output. When `R < 1`, a sample is reused for
two outputs.

The plan phase is summed with the carrier's 8-bit clock-error accumulator (in
1/256 sample). The demodulator loads this accumulator with its timing
estimate at the start of a burst and then adds its tracking corrections. The
sum selects one of 256 coefficient sets of a 16-tap Hamming-windowed sinc
interpolator. `ifm_filter` (one per rail) keeps a 64-sample input buffer per
carrier and a 16-tap shift register per carrier. It computes the 8-bit FIR
output and flags underflow.

## Demodulator

`demod` takes interpolated samples at two per symbol with their carrier
number. For each carrier it keeps:

* the mode: idle, acquire, wait or track;
* the sample parity;
* the last decision sample and the last transition sample;
* the loop accumulators;
* the unique-word polarity.

* **Acquisition** (`acq_estimator`): the burst starts with a "0101" preamble
  on both rails.
  * Multiplying by alternating ±1 sequences removes the modulation.
  * Four sums are formed over each half of the preamble, at the decision
    samples and at the transition samples: `Ie, Io, Qe, Qo`.
  * Each sum of squares is converted to a logarithmic code. A code difference
    then addresses one arctangent table. The sign of a product picks the
    quadrant. This gives the phase modulo 180° and the timing for each half.
  * End-of-preamble estimates:
    * `θ0 = θ2 + (θ2 − θ1)/2`
    * `Δθ = θ2 − θ1`
    * `τ0 = (τ1 + τ2)/2`
  * Only one burst is acquired at a time.
* **Preload:** the carrier loop is loaded with `−θ0` and with the frequency
  `−Δθ/HALF` per symbol. The timing loop and the interpolator's clock-error
  accumulator are loaded with `τ0`.
* **Tracking:**
  * Each sample is rotated by the carrier's phase (`phase_rotator`, table
    based).
  * Decision samples give hard decisions and the phase error `sgn(I)Q − sgn(Q)I`.
    This error drives the second-order `carrier_loop`:
    * `f += kf·e`
    * `θ += f/256 + kp·e`
  * The Gardner error `mid·(previous − current)` drives the first-order
    `timing_loop`. It is also sent to `ifm_control` as a clock adjustment.
* **Unique word** (`uw_detector`): the decided I and Q bit streams are each
  compared with a 16-bit word (`16'hE6A2`, at most 3 mismatches over both
  rails). An inverted match means the phase is 180° off. In that case the
  carrier's output bits are inverted from then on.

## Number formats and defaults

| Item | Format |
|---|---|
| FFT/IFFT data | 16-bit signed I and Q (`dd_pkg::CW`); twiddles Q2.14 |
| FFT scaling | 1/4 per stage (1/256 total); IFFT not scaled |
| Interpolator and demodulator samples | 8-bit signed, ±127; the top shifts the IFFT output right by `IFM_SHIFT` = 4 with saturation |
| Loop phase | 256 = 360° (16-bit accumulator); frequency accumulator 24 bits |
| Acquisition outputs | θ and Δθ: 128 = 90°; τ: 128 = 180° of a symbol |

Top parameters: `NCH` = 4 carriers per demodulator, `NMAX` = 32 (largest inverse transform), `IFM_SHIFT` = 4.

## Where this departs from the reference architecture

* The twiddle multipliers follow the butterfly adders (decimation in frequency),
  where the reference diagram has them in front.
* The shared inverse FFT is a radix-2 delay-feedback lane per stream. The
  reference uses the same butterfly/DSD pipeline as the forward FFT. The
  principle of skipping butterflies for small transforms is the same.
* The phase-plan memories are 128 words deep instead of 2K. The plans used here
  repeat within 68 slots.
* Only lane 0 feeds the interpolator and demodulator. Lanes 1–3 are outputs. A
  second interpolator/demodulator group would be needed to carry more than two
  32-point carriers to demodulation.
* These are this design's own choices, not given by the reference:
  * the filter weights, window and unique word;
  * the loop detector types and gains;
  * the mapping-RAM bit layout.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops on a watchdog. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl +libext+.sv -Irtl rtl/dd_pkg.sv \
          tb/tb_fft256.sv --top-module tb_fft256 -o sim && ./obj_dir/sim
```

Substitute any testbench name. `tb_demux_demod_top` runs the complete chain at
default parameters for 7000 clocks:

* It puts a tone on one FFT bin and sets a frequency plan with 8-, 16- and
  32-point transforms on two lanes.
* It checks that the carrier holding the tone comes out at the right amplitude
  and that the other carriers stay silent.
* It counts each mechanism: FFT blocks, IFFT bypass and full-size transforms,
  interpolator skips and sample reuse, set-next, acquisition preload, symbol
  decisions and clock adjustments. A mechanism that never occurs counts as a
  failure.

Correct decoding of bursts, including the unique word and the 180° ambiguity,
is checked at block level by `tb_demod`. That testbench uses two interleaved
bursts with phase and frequency offsets.
