# 16-channel EEG seizure detection and band-energy analysis

This design watches 16 EEG channels sample by sample. A cheap time-domain
test on every channel decides whether a seizure is under way. Only when
enough channels agree does it start a costly frequency-domain analysis. That
analysis takes the last 128 samples of each channel that detected, runs a
128-point FFT over them, and reports how much energy the channel carries in
four clinical EEG bands:

| band  | range    | FFT bins at 173.61 Hz sampling |
|-------|----------|--------------------------------|
| theta | 4-7 Hz   | 3..5                           |
| alpha | 8-12 Hz  | 6..8                           |
| beta  | 13-29 Hz | 10..21                         |
| gamma | 30-50 Hz | 23..36                         |

A neurologist uses these band energies to judge the type and place of a
seizure. Running the spectral analysis only after a detection is how the
design saves power. The FFT's twiddle multiplications use Urdhva Tiryagbhyam
multipliers. These are the "vertically and crosswise" multipliers of Vedic
arithmetic, used here in place of Booth multipliers. The Booth-based system
that the source compares against can be built too, with `USE_BOOTH = 1`.

The RTL follows a published architecture for a seizure detection and
analysis system-on-chip. That source gives the block structure, the channel
count, the filter length, the FFT size, the band edges and the sampling rate
of its test data. It gives no widths, no timing and no handshakes. Those,
and several behaviours listed under "Design choices" below, belong to this
implementation.

## System structure

```
 eegdata_in[16] ──┬──► channel_detect ×16 ──► multichannel_detect ──► seizure
 (16-bit ADC      │     (FIR → compare →         (≥ 2 channels)        │ rising edge
  codes, one per  │      IEI window, N count)          │               ▼ arms analysis
  channel)        │                                    └─ detected_channels (mask)
                  │                                                     │
                  └──► buffer_memory (128 × 256 bit, circular) ◄───────┤ rd_channel
                               │ rd_sample                              │
                               ▼                                        ▼
                          seizure_analysis: fft128 → power_calc → band_select
                                            → band_accumulator ×4 → band_mux
                                                   │
                                     tx_out[4] (theta..gamma, 64 bit each),
                                     tx_valid, tx_channel, energy_response
```

The ADC, the wireless transmitter and the phone that receives the result
are outside this RTL. Samples enter on `eegdata_in`/`sample_valid` and
results leave on `tx_*`.

## Detecting a seizure on one channel

`channel_detect` chains four small blocks. The behaviour that matters
is how they count.

1. **High-pass FIR (`hpf_fir`)**, 33 taps. It removes the electrode DC
   offset: `y[n] = Σ coef[i]·x[n-i]`. `x` is the unsigned ADC code and the
   coefficients are signed inputs, shared by all channels. The sum is exact
   and then saturated to a signed 16-bit `y`, one clock after the sample.
   Coefficients that sum to zero remove DC. For example, `coef[16] = 32` with
   every other tap at `-1` (this is what the system testbench uses).
2. **Comparator**. `enable = (y > baseline_thresh)`, signed and strict.
3. **IEI window (`iei_counter`)**. IEI means inter-event interval. The first
   crossing opens a window. Every later sample increments a counter, and on
   the sample where the counter would exceed `iei_thresh` the window closes.
   That sample also pulses `master_reset`. A window therefore spans the
   opening sample plus `iei_thresh` more. A crossing on the closing sample is
   not counted and does not reopen the window.
4. **N-stage counter (`nstage_counter`)**. It counts crossings and is
   cleared by `master_reset`. `seizure_detected = count > n_thresh`. To
   declare a seizure after N crossings inside one window, set
   `n_thresh = N-1`. The flag stays up until the window closes.

**Priming.** After reset the FIR delay line holds zeros. The first 32
outputs therefore show the step from zero to the DC level, which would
look like crossings on every channel at power-up. `channel_detect` ignores
those outputs: they reach `y` but not the comparator or the counters.

**Timing.** The sample arrives at clock 0. `y` is valid after clock 1 and
the counters update on clock 2. `seizure` from the multichannel stage
follows on clock 3.

## Agreement across channels

A spike on one electrode is not a seizure. `multichannel_detect` registers
the 16 channel flags as `detected_channels`. It raises `seizure` when at
least `MIN_CHANNELS` (default 2) are set. A single-channel detection is
visible on `channel_seizure` but starts nothing.

## Buffer and trigger

`buffer_memory` is a circular store of the last 128 sample words, each
16 channels × 16 bits. Reads are addressed from the oldest word:
address 0 is the oldest sample and 127 the newest. Read data arrive one
clock later, both as the whole word and as the sample of `rd_channel`.

The rising edge of `seizure` arms the analysis with the current
`detected_channels` mask. The analysis starts as soon as the buffer has
been filled once. From then until the last report the buffer is frozen:
samples are still detected but not stored. The analysed history therefore
ends where the detection happened. Another seizure edge during an analysis
re-arms the trigger, which fires when the current analysis ends.

## Spectral analysis

`seizure_analysis` walks through the armed channels, lowest index first.
For each one:

* **Load.** It reads the channel's 128 samples oldest-first and streams
  them into `fft128`. It inverts the MSB on the way, turning
  offset-binary ADC codes into two's complement; this only changes the DC
  bin.
* **FFT (`fft128`).** This is a radix-2 decimation-in-time FFT, computed in
  place in a 128-word register array, one butterfly per clock: 7 stages of
  64 butterflies, 448 clocks. Samples are written at bit-reversed addresses
  while loading. The butterfly is `A' = A + B·W`, `B' = A − B·W` with
  `W = exp(−j2πk/128)`. Its complex product uses four signed Urdhva
  Tiryagbhyam multipliers (`mult_signed` → `vedic_mult_signed` →
  `vedic_mult`), or Booth multipliers when `USE_BOOTH = 1`.
  * **Number format.** Data are 24-bit signed and never scaled: 16 input
    bits, plus 7 bits of growth over 7 stages, plus 1 spare, so no stage can
    overflow. Twiddles are 16-bit with 14 fraction bits, computed at
    elaboration as `round(cos(2πk/128)·2^14)` and `round(−sin(2πk/128)·2^14)`.
    Products are rounded to nearest. Against a floating-point DFT, the
    full-scale random frames of the testbench stay within about 30 LSB of
    outputs that reach 2^22.
* **Energy (`power_calc`).** It computes `Re² + Im²` exactly (49 bits) with
  two more vedic multipliers.
* **Band selection (`band_select`).** This is the band-pass filter, done in
  the frequency domain. Bin `k` lies at `k·FS/128` Hz, and a band
  `[f_lo, f_hi]` takes the bins `ceil(f_lo·128/FS) .. floor(f_hi·128/FS)`.
  The bins are computed at elaboration from `FS_MHZ`, the sampling rate in
  millihertz (default 173610). Bins between bands, such as 12-13 Hz, count
  nowhere.
* **Accumulate and report.** Four 64-bit `band_accumulator`s sum the bin
  energies. After bin 127, `tx_out[0..3]` (theta, alpha, beta, gamma) is
  loaded, `tx_channel` names the channel, and `tx_valid` pulses for one
  clock. `energy_response` is `tx_out[band_sel]` (`band_mux`).

One channel takes **709 clocks** from start (or from the previous report)
to its report: 1 to pick the channel, 129 to load, 448 to compute, 129 to
stream the bins through the output and energy registers, and 2 to report.
All 16 channels take 11,344 clocks. At the 173.61 Hz sampling rate that fits
inside one sample period at any clock of 2 MHz or more.

### The Urdhva Tiryagbhyam multiplier

`vedic_mult #(N)` is unsigned, N×N → 2N, and purely combinational. It
follows the sutra literally and works column by column from the LSB.
Column k sums every bit product `a[i]·b[j]` with `i + j = k`: the
"vertical" product and the "crosswise" ones. It adds the carry from column
k−1, keeps the LSB as product bit k, and passes the rest on as carry. All
N² bit products are formed in parallel; only the small column carries
ripple. `vedic_mult_signed` wraps it for two's-complement operands: it
multiplies magnitudes and restores the sign.

### The Booth multiplier (comparison system)

`booth_mult #(N)` is the source's baseline: signed, N×N → 2N, combinational.
It uses radix-2 Booth recoding with the table the source prints. Each
multiplier bit is paired with the bit below it (below bit 0 sits a 0), and
the pair recodes as 00 → 0, 01 → +a, 10 → −a, 11 → 0. Partial product i is
shifted left by i, and the partial products are summed.

`mult_signed` picks one of the two multipliers at elaboration. The
`USE_BOOTH` parameter chooses it, and `eeg_seizure_soc`, `seizure_analysis`,
`fft128` and `power_calc` all pass it down. The default 0 gives the
proposed vedic system. Both multipliers are exact, so the two systems give
bit-identical results; they differ only in size and delay. The source's
resource and delay figures come from its own FPGA tool flow and are not
reproduced here.

## Top-level interface (`eeg_seizure_soc`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `sample_valid` | in | 1 | `eegdata_in` holds a new sample word (one clock per sample) |
| `eegdata_in` | in | 16 × 16 | unsigned ADC code per channel |
| `fir_coef` | in | 33 × 16 signed | high-pass coefficients, shared by all channels |
| `baseline_thresh` | in | 16 signed | comparator threshold |
| `iei_thresh` | in | 16 | IEI window length in samples (see above) |
| `n_thresh` | in | 16 | crossings needed, minus one |
| `band_sel` | in | 2 | band routed to `energy_response` |
| `channel_seizure` | out | 16 | per-channel detection |
| `detected_channels`, `seizure` | out | 16, 1 | multichannel stage (registered) |
| `analysis_busy` | out | 1 | analysis running, buffer frozen |
| `tx_valid`, `tx_channel`, `tx_out` | out | 1, 4, 4 × 64 | one report per analysed channel |
| `energy_response` | out | 64 | `tx_out[band_sel]` |

Every stage is pipelined, so `sample_valid` may be high on consecutive
clocks. Real EEG rates are many orders of magnitude slower than the clock.

Parameters, with their defaults: `NUM_CH = 16`, `SAMPLE_W = 16`,
`FIR_TAPS = 33`, `DEPTH = 128` (the buffer depth and FFT size; a power of
two), `MIN_CHANNELS = 2`, `USE_BOOTH = 0` (vedic multipliers; 1 selects
Booth). The FFT data width follows from them as
`SAMPLE_W + log2(DEPTH) + 1`. Shared constants and the band-bin functions
are in `seizure_pkg`.

## Design choices beyond the source

These are decisions of this implementation, not of the published design:

* **Arithmetic formats.**
  * The FIR coefficients are signed and the output saturates. The source
    only ever shows positive coefficients, but a high-pass filter needs
    negative ones.
  * All widths inside the FFT and energy path are this implementation's.
* **Detection rules.**
  * How the IEI window opens and closes. The source gives only "count >
    IEI threshold → master reset".
  * `master_reset` is an active-high pulse.
  * Filter priming.
  * The agreement rule of at least 2 channels.
  * The detection feature is the amplitude of the filtered sample, compared
    with the threshold as the detection diagram draws it. The source's
    conclusion instead names an "energy parameter" as the feature. No
    squaring is done in the detector.
* **Analysis control.**
  * Trigger on the rising edge of `seizure`.
  * The buffer freeze.
  * Analysing the detected channels one after another through one FFT.
  * The `tx_*` handshake.
  * In the source's analysis waveforms, the 256-bit `tx_out` takes a new
    value every clock, and its bit layout cannot be read from them. Here
    `tx_out` changes once per analysed channel and holds the four band
    energies. `tx_valid` marks each new value.
* **Interface and architecture.**
  * All channels arrive in parallel, one 256-bit word per sample.
  * The FFT is iterative with one butterfly per clock. The source only asks
    for a 128-point FFT with vedic multipliers.

Not built:
* the 64-core RISC platform that the source names as the host of the
  algorithms;
* the ADC and the wireless transmitter.

## Verification

Every module has a self-checking testbench in `tb/` named `tb_<module>`,
except the two helpers. `vedic_mult_signed` is tested in `tb_vedic_mult`,
and `mult_signed` through `tb_fft128` and `tb_power_calc`.
Each one prints `TB_RESULT checks=… failures=…` and stops itself with a
watchdog. The reference values are computed independently:

* **Filter and detector.**
  * `tb_hpf_fir`: a full-precision sum with saturation. A 4-tap case
    reproduces 1125 → 19125 and 4 → 68 with coefficients 7, 3, 2, 5.
  * `tb_channel_detect`: a sample-by-sample model of filter, comparator,
    window and counter.
* **Multipliers.**
  * `tb_vedic_mult`: exhaustive for N = 2, 3 and 4; random and corner
    values at N = 24, signed and unsigned.
  * `tb_booth_mult`: exhaustive for N = 2, 3 and 4; at N = 24, corner
    values (including alternating bit patterns) and random values.
  * `tb_fft128` and `tb_power_calc` also run a Booth-built instance
    beside the vedic one. Its outputs must match bit for bit on every
    clock.
* **Spectral path.**
  * `tb_fft128`: a floating-point DFT over impulse, tone, two-tone,
    full-scale random and full-scale DC frames. It also checks the output
    order and the 449-clock gap between the last input and the first bin.
  * `tb_band_select`: bin frequencies computed in floating point.
  * `tb_seizure_analysis`: a behavioural buffer with tones placed in each
    band. It checks the band energies against a DFT to within 0.2 %, the
    band that should dominate, the channel order and the 709-clock period.
* **Whole system.**
  * `tb_eeg_seizure_soc` runs the whole system at its default size. It
    covers:
    * quiet input;
    * a spike burst on one channel, which is rejected;
    * a burst on three channels, which is analysed;
    * a burst on two further channels, which re-arms the analysis.
  * Every channel flag is compared after every sample with a reference
    model.
  * Every report's energies are compared with a DFT of the samples the
    buffer must hold.
  * It counts each mechanism: crossings, window expiries, channel
    detections, rejection of a single channel, seizures, analyses, reports,
    samples dropped while frozen and buffer wrap-around. Each count must be
    non-zero.
* **Recording-length workload.** `tb_workload_eeg_segments` streams three
  synthetic 23.6 s segments at 173.61 Hz (4097 samples each, the length of
  the Bonn recordings) through the whole system. The real recordings are not
  included.
  * Normal: a weak 10 Hz rhythm plus noise. Nothing may be detected.
  * Interictal: isolated spikes at least 1.2 s apart. They cross the
    threshold, but at most once per 1 s IEI window, so nothing may be
    detected.
  * Ictal: a 5.4 Hz discharge on channels 0-12. All 13 must detect, which
    gives the per-channel pattern 0x1FFF of the source's 16-channel result,
    and a seizure must be raised. Reports may come only from ictal channels, and
    theta must be the largest band in each.
  * The Booth-multiplier system runs beside the default system on the same
    input. Every one of its outputs must match on every clock.

To run one testbench with Verilator, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --timescale 1ns/1ps --top-module tb_eeg_seizure_soc \
    -y rtl -y tb +libext+.sv rtl/seizure_pkg.sv tb/tb_eeg_seizure_soc.sv
./obj_dir/Vtb_eeg_seizure_soc
```

The full-system test takes a few seconds. To lint the design, run
`verilator --lint-only -Wall -y rtl rtl/seizure_pkg.sv rtl/eeg_seizure_soc.sv`.
The remaining warnings concern unused package constants and unused
per-channel signals. The testbenches observe those signals (filter output,
comparator, window) by hierarchical reference.

## Known limits

* **Numeric range.**
  * `baseline_thresh` is compared with the saturated 16-bit filter output.
    Thresholds near ±32767 therefore lose meaning when the filter
    saturates.
  * The band energies are exact sums of the FFT's output, but the FFT itself
    carries twiddle rounding error: about 30 LSB at full scale.
* **Timing and interface.**
  * The FFT has no output back-pressure; the energy path always accepts.
  * Samples that arrive during an analysis are detected but not buffered.
    The next analysis may therefore see a gap in the history.
* **Buffer start-up.**
  * A detection that happens before the buffer has first filled is held.
    It is analysed as soon as 128 samples are stored.
