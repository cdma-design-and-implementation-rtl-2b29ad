# WCDMA uplink base-station baseband receiver

This is synthesizable SystemVerilog for the baseband part of a WCDMA
(3.84 Mcps) uplink receiver in a base station. The receiver has four
antennas. It handles the random access channel (PRACH) and the dedicated
channel (DPCH):

- It detects a mobile's random access preamble.
- It estimates the channel: the path delays, the path phasors and the
  frequency offset.
- It locks a carrier recovery loop.
- It points a four-element beamformer at the mobile.
- It demodulates the data with a four-finger Rake receiver and maximal
  ratio combining.

One idea keeps the hardware small. A single correlator-based channel
estimator does the heavy work: a 1024-tap complex matched filter and a
peak detector. The other blocks reuse its output:

- The preamble detector reads the sign of the strongest peak.
- The carrier loop reads that peak's phase.
- The Rake fingers take their delays and weights from the four strongest
  peaks.
- The beam searcher places its correlation window on the strongest path.

The beamformer weights come from a moving average of the spatial
signature: the pilot despread separately on each antenna. No matrix
inversion is needed.

The datapath takes one complex sample per clock at four samples per chip.
At a 15.36 MHz clock it runs in real time.

## Signal flow

```
 ant[0..3] (6-bit I/Q, 4 samples/chip)
    |                        \
    v                         v
 beamformer  <--- bw ---  beam_searcher  (pilot correlator per antenna,
 (BF enable: combiner        ^             averaging, weights)
  or antenna 1 bypass)       | code, dump (window on delta_0)
    |                        |
    v                  code_generator <--- delays of the paths
 phase_derotator <-- NCO --- carrier_recovery <--- (I_p0, Q_p0)
 (enable_message:            (atan ROM, loop filter, NCO)     ^
  de-rotate or bypass)                                         |
    |                                                          |
    +--> channel_estimator: prefilter -> mf_delay_line -> matched_filter
    |        -> magnitude -> peak_threshold / peak_detector -> weight_estimator
    |        peaks (delay, phasor) -----> preamble_detector (signature, RAQ)
    |        w_i (Rake weights)  \
    v                             v
 rake_receiver (4 fingers x I/Q correlators, bit selection,
                Re(y_i * w_i) combining) -> soft_dec / hard_dec
```

`rx_controller` sequences the whole receiver. `wcdma_rx_top` wires it all
together.

## Operating phases

| mode | what runs | what is off |
|---|---|---|
| `SEARCH` | The matched filter correlates antenna 1 with the preamble code. The preamble detector matches the signs of the strongest peak, one per symbol, against the 16-bit signature. The carrier recovery averages the frequency offset. | beamformer, de-rotation, Rake output |
| `INIT` (after the random access request, `init_syms` symbols) | The matched filter switches to the pilot code. The frequency estimate is frozen. The Last Phase follows the pilot. The beam searcher loads the first spatial signature. | beamformer, de-rotation, Rake output |
| `MESSAGE` | The beamformer is on (if `bf_allow`). The NCO is loaded with the Initial Phase and the loop is closed. The beam searcher keeps averaging. The Rake decisions are valid. | – |

`restart` returns to `SEARCH`.

Both bypasses keep the same latency as the paths they replace:

- The beamformer bypass is antenna 1 through three registers.
- The de-rotator bypass is two registers.

Symbol timing therefore does not move when the receiver changes mode.

## Timing: the part to understand first

### The 1024-sample window

Everything is referred to `sample_pos`, a free-running count from 0 to 1023
of the samples at the channel estimator input (the de-rotator output).

The estimator collects peaks over one window of 1024 positions. At the
window's last position it publishes the four largest legitimate peaks
(`est_valid`), each with:

- `pos`: the `sample_pos` at which the last sample of the correlated
  256-chip symbol entered the estimator;
- `mag`: the magnitude;
- `val`: the complex matched filter value (I, Q).

The estimator subtracts its own pipeline latency from `pos`: one clock for
the prefilter, one for the delay line, two for the adder tree and one for
the magnitude. The value of `pos` is therefore directly the dump position
for a Rake finger on that path.

The window is not aligned to the transmitter's symbols. The design works
as long as all the paths of one symbol fall into the same window. If a
window boundary falls between two paths, their peaks are reported one
estimate apart, and the pilot bit applied to them (below) is wrong for one
of them. The testbench starts the transmission so that the strongest path
ends in the middle of the window.

### Pilot bits

The pilot carries a known 16-bit pattern, one bit per 256-chip symbol
(`pilot_seq`, where 1 means −1). After the request, the controller counts
the estimates. The Nth estimate is taken to carry pilot bit N (mod 16).

That bit (`pilot_neg`) is used in three places:

- It removes the pilot modulation from the Rake weights.
- It removes it from the phase detector, as a 0/π correction.
- It removes it from the beam searcher's signature.

### Rake fingers

Finger f uses `delay[f]`, the `pos` of peak f registered at the estimate.
Its local time is `sample_pos − delay[f] − 1`:

- Its chip index is local/4 into the 256-chip data code.
- It dumps every 4·SF samples.

The data code period is thus locked to the pilot symbol, with data chip k
sent together with pilot chip k.

The combiner fires half a data symbol (2·SF samples) after finger 0's dump.
Finger 0 is the strongest path, so this reference moves only when another
path becomes the strongest. Every finger within ±2·SF samples of the
strongest path has then dumped the same data symbol, and not yet the next
one. At SF 4 that is ±8 samples (2 chips); at SF 64 it is ±128 samples.

### Beam searcher window

The beam searcher correlates the raw antennas. These reach it 6 clocks
earlier than the same samples reach the estimator: 4 clocks of beamformer
and 2 of de-rotator. Its 1024-sample window is therefore placed 6 samples
earlier than the strongest peak's `pos`.

## Number formats

| signal | format |
|---|---|
| antenna samples, beamformer weights and output, Rake input | 6-bit signed I/Q |
| prefilter accumulator / matched filter input | 8-bit sum of 4 samples / its top 4 bits |
| matched filter output, magnitude | 13 bits |
| correlator accumulators (Rake, beam searcher) | 17 bits |
| phase (atan output, phase error, Initial Freq/Phase) | 11 bits, 2048 = 2π |
| atan ROM address | 9 bits: {I<0, Q<0, \|Q\|>\|I\|, 6-bit ratio} |
| NCO accumulator / ROM address / output | 28 bits (2^28 = 2π) / top 8 bits / 6 bits with 31 = 1.0 |
| loop filter | 18-bit proportional term, 19-bit integrator, 20-bit output |
| Rake finger result after bit selection / product / soft decision | 6 / 13 / 4 bits |

Complex values are packed structs `{re, im}` (`wcdma_pkg`). The preamble and
pilot codes are QPSK chips, given as a phase index k per chip (chip = j^k).
Every complex multiplication by a code chip is therefore a swap and/or a
negation. The Rake code is real: one bit per chip, 1 meaning −1. Scrambling
is folded into these code tables.

## Carrier recovery

One atan ROM serves the whole loop. Each peak costs two look-ups on
consecutive clocks.

**Acquisition (SEARCH).** Each symbol, the differential phasor
p_k·conj(p_(k−1)) of consecutive strongest peaks is formed. It is flipped
onto the right half plane, which removes the ±1 preamble bits. This limits
the offset to below a quarter turn per symbol. The flipped phasor is
averaged by a leaky accumulator with a time constant of 16 symbols. Its
angle is the Initial Freq: the phase advance per 1024 samples.

**Initial estimation (INIT).** The angle of the strongest peak, plus π for
a −1 pilot bit, is the Last Phase.

**Switch to MESSAGE.** The NCO is loaded with
Initial Phase = Last Phase + 4·Initial Freq. The loop filter integrator is
loaded with Initial Freq·128, which is the same frequency expressed as an
NCO increment per sample.

**Tracking (MESSAGE).** Once per symbol the phase detector takes the angle
of the de-rotated strongest peak, with the same 0/π pilot correction. The PI
loop filter (gains `c1` and `c2`) turns it into the NCO increment. The NCO
outputs exp(−jθ), and the de-rotator multiplies by it and scales by 2⁻⁵.

## Beamformer weights

Each antenna's pilot correlation, multiplied by the pilot bit, is one entry
of the spatial signature. The averager computes

    avg_new = (1 − α)·avg_old + α·s,   α = 1/8

In INIT it loads s directly instead.

Before the weights are formed, the signature is referred to antenna 1:
r_i = avg_i·conj(avg_1). The weights are then bw_i = conj(r_i), scaled to
6 bits by one right shift common to all antennas. This reference has two
effects:

- Antenna 1's weight is real and positive. The beamformer output therefore
  keeps the carrier phase of antenna 1, which is what the loop saw through
  the bypass before the beamformer was switched on.
- A frequency offset turns all four averages together, so it no longer
  turns the weights.

The shift is chosen so that the largest part falls in 16..31. It is then
kept while that part stays in 8..31. Without this, every small level change
across a power of two would step the beamformer gain by 2×. The threshold
follows the average only one window later, so such a step lets spurious
peaks through.

## Channel estimator details

- **Prefilter:** a running sum of four samples, i.e. a filter matched to the
  chip.
- **Matched filter:** 1024-tap delay line with every fourth tap used. It
  correlates 256 chips in 16 groups of 16 over two register stages.
- **Magnitude:** exact `floor(sqrt(I²+Q²))`.
- **Threshold:** the average magnitude of the previous window times
  `thr_coef`/16. After reset it is all ones, so nothing passes until an
  average exists.
- **Peaks:** a local maximum above the threshold is a candidate. A sorted
  list keeps the four largest.
- **Weight estimator:** w_i = b·(I_i − jQ_i), where b is the pilot bit. All
  four weights share one normalising shift, so their relative sizes are
  kept. This is maximal-ratio weighting.

## Top-level ports

Configuration inputs:

| port | meaning |
|---|---|
| `pre_code`, `pilot_code` | 256 QPSK chip indices each |
| `data_code` | 256 real chips |
| `signature` | 16 bits; bit k is preamble symbol k, 1 = −1 |
| `pilot_seq` | the 16-bit pilot pattern |
| `sf_log2` | log2 of the spreading factor, 2..8 |
| `thr_coef` | threshold coefficient |
| `c1`, `c2` | loop filter gains |
| `finger_en` | finger enables |
| `bf_allow` | allow the beamformer in MESSAGE |
| `init_syms` | number of symbols spent in INIT |

Values used in the tests: `thr_coef` = 64 (4× the average), `c1` = 48,
`c2` = 1, `init_syms` = 3.

Outputs:

| port | meaning |
|---|---|
| `soft_dec`, `hard_dec`, `dec_valid` | Rake decisions; `dec_valid` only in MESSAGE |
| `raq`, `raq_inverted`, `pre_corr` | preamble detection |
| `mode` | current operating phase |
| `est_valid`, `peaks`, `w` | channel estimate |
| `bw` | beamformer weights |
| `dpcch` | I_p0, the detected pilot symbol |
| `phase_err`, `lf_upd` | carrier loop |
| `agc_level` | the average matched filter magnitude, for an external AGC |

The RF/IF stages, the converters, the AGC and the channel decoder are not
part of this RTL.

## Files

- `rtl/wcdma_pkg.sv`: constants, types and helper functions.
- One module per file:

  | group | modules |
  |---|---|
  | array front end | `beamformer`, `phase_derotator` |
  | channel estimator | `prefilter`, `mf_delay_line`, `matched_filter`, `magnitude`, `peak_threshold`, `peak_detector`, `weight_estimator`, and `channel_estimator` around them |
  | carrier recovery | `atan_rom`, `loop_filter`, `nco`, and `carrier_recovery` around them |
  | Rake | `rake_correlator`, `rake_receiver` |
  | other blocks | `beam_searcher`, `preamble_detector`, `code_generator`, `rx_controller` |
  | top | `wcdma_rx_top` |

- `tb/tb_<module>.sv`: one self-checking testbench per module. Each ends by
  printing `TB_RESULT checks=N failures=M`.

Run one testbench with plain Verilator, for example:

```
verilator --binary --timing -Wno-fatal -y rtl +libext+.sv -Irtl \
  rtl/wcdma_pkg.sv tb/tb_wcdma_rx_top.sv --top-module tb_wcdma_rx_top
./obj_dir/Vtb_wcdma_rx_top
```

## Verification

Unit testbenches compare each block with an independent model written in
the testbench. For the following blocks the model is bit-exact:

- beamformer, de-rotator and prefilter;
- delay line and matched filter;
- magnitude;
- loop filter and NCO;
- Rake correlator and Rake receiver;
- beam searcher;
- code generator.

The others are checked against behaviour:

- **atan ROM:** within 4/2048 of a turn of the true angle.
- **Peak detector:** finds the planted peaks, sorted, with sub-threshold
  ones rejected.
- **Channel estimator:** a three-path channel, with every path found at its
  dump position and with the right phase, and only noise rejected.
- **Carrier recovery:** frequency acquisition, Last Phase, NCO load and
  closed-loop tracking of a frequency offset.

`tb_wcdma_rx_top` runs the whole receiver at its default sizes. A
behavioural transmitter and channel are written inline. The test makes two
passes with a restart between them. Each pass is:

1. Two symbols of noise.
2. A 16-symbol PRACH preamble.
3. 28 symbols of message, with data on I and the pilot on Q.

The data is at SF 64 in the first pass and at SF 256 in the second. The
second pass also shows that the receiver acquires again after a restart.

The channel has three paths (0, 7 and 22 samples), one direction of
arrival across the array and a 200 Hz carrier offset (27/2048 of a turn per
symbol).

The testbench counts each mechanism and fails if one never happens:

- threshold rejection;
- the random access request, at the right symbol and with full correlation;
- both mode switches;
- beam searcher updates and the beamformer switched on, with the weights
  pointing at the source;
- the NCO load;
- loop updates with a small late phase error;
- three fingers in use;
- error-free Rake decisions;
- restart.

It takes a few seconds.

Not verified:

- A bit-error rate under fading, or multi-user capacity. These would need a
  long floating-point channel simulation.
- Timing closure at 15.36 MHz. No synthesis for a target technology was
  done.

## Where this design makes its own choices

The block structure, the word lengths and the main rules come from the
published architecture. These include:

- the running-sum prefilter;
- the 1024-tap matched filter;
- the four largest peaks above a threshold;
- weights w_i ∝ b·(I − jQ);
- beamformer weights by moving average of the conjugate signature;
- the atan / 0-π / PI loop / NCO carrier loop with Initial Phase = Last
  Phase + 4·Initial Freq;
- the BF-enable and enable_message bypass multiplexers.

The following are choices made for this implementation. Change them first
if they do not suit:

- The control state machine and the INIT length.
- The symbol framing and the pilot bit indexing.
- The code format: QPSK phase indices, with scrambling folded in.
- The frequency estimate: reading "average phase difference" as a leaky
  average of differential phasors.
- The threshold: a coefficient times the previous window's average.
- Peaks: a local maximum with a sorted list of four.
- The weight normalisations and the beam searcher's antenna 1 reference.
- α = 1/8 and the loop filter gain formats.
- The combine timing, which allows ±2·SF samples of delay spread.
- Rounding by truncation throughout.

Known limitations:

- Preamble detection uses only the sign of the real part of the strongest
  peak. If the carrier phase sits near ±90° during the preamble, the sign
  is unreliable. An inverted match, for a phase near 180°, is detected and
  reported.
- The threshold follows the previous window's average. In the first window
  after the matched filter switches from the preamble code to the pilot
  code, a noise peak can therefore pass. This happens in INIT, where the
  Rake output is not used.
- Noise can move a path's peak by one sample (a quarter chip) from one
  estimate to the next. The matching finger moves with it.
- If two paths are nearly equal, the strongest can alternate between them.
  Each alternation moves the combine reference and can drop or repeat one
  decision.
