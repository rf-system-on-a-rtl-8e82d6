# RFSoC cavity controller: self-excited loop, adaptive feedforward and Kalman observer

A superconducting RF cavity is a very narrow resonator. Mechanical vibrations
(microphonics) and the Lorentz force move its resonance by more than its own
bandwidth, so a drive at a fixed frequency loses the cavity. This RTL is the
programmable-logic part of a controller for a Xilinx RFSoC (ZCU111 class
board) that handles this in three ways, all running on one 122.88 MHz fabric
clock:

1. a **self-excited loop (SEL)**. A digital PLL measures the phase of the cavity
   probe signal against a reference and steers the drive NCO so that the drive
   follows the resonance;
2. an **adaptive feedforward** path. The SEL phase error *is* the detuning. It
   is decimated to the kHz bandwidth of the piezo tuner, and an LMS filter
   identifies the system from the piezo excitation to the detuning. Frames
   of the identified detuning are transformed (FFT), divided by the measured
   piezo response, transformed back and inverted. The result is the piezo
   drive that cancels the perturbation;
3. a **Kalman observer**. From spectrum frames of the detuning it finds the
   strongest microphonic lines, measures each line's width and quality factor,
   and switches on one Kalman filter per line. A second LMS filter matches the
   filters' summed estimate to the measured detuning.

Either the inverted piezo excitation or the Kalman-path LMS output can
phase-modulate a second output NCO, the feedforward drive on DAC6.

The architecture follows the paper "RF System on a Chip: A Compact Controller
for SRF Cavity Field and Detuning Control": its block diagrams, the 31-bit
NCOs, 4 samples per clock, the 36° phase acceptance window and the 122.88 MHz
rate. That paper gives block names and the overall behaviour, but no
widths, gains, handshakes or algorithms inside the blocks. All of those are
this design's own choices, listed in [Departures and own choices](#departures-and-own-choices).

## Numbers and formats used everywhere (`rtl/rfsoc_pkg.sv`)

| quantity | format |
|---|---|
| fabric clock | 122.88 MHz, one ADC IQ sample per clock |
| NCO phase | 31 bits per turn: 1 LSB = 122.88 MHz / 2^31 = 0.0572 Hz, so 0.1 Hz = 1.7476 steps |
| DAC stream | 4 lanes (IQ pairs) per clock, 14-bit words (`dac_iq_t`) |
| ADC / IQ | 16-bit signed I and Q (`iq_t`) |
| wrapped phase | 16 bits per turn, signed (`PH_W`) |
| unwrapped phase | 32-bit count of 2^-16 turns (`UNW_W`), itself modulo 2^32 |
| phase error | 24-bit signed, saturated (`ERR_W`) |
| 36° | 6554 phase units (`PHASE_36DEG`) |

Reset is synchronous and active high everywhere. There is one clock domain.

## The self-excited loop (`sel_loop`)

```
 fcw_ref ─► reference NCO ─┬──────────────────────► mux 0 ─┐
 (1 lane)                  └► phase corrector ────► mux 1 ─┴► atan2 ─► unwrap ─┐
                               ▲ offset -= err (ALIGN)                         ▼
 ADC (cavity probe) ──────────────────────────────────► atan2 ─► unwrap ─► error ─► PI ─► u
                                                                            │
                                                     lock detector ◄────────┘ (wrapped, ±36°)
 fcw_out + u ─► output NCO (4 lanes/clock) ─► DAC5 (cavity drive)
```

**Phase detection.** Both channels go through a pipelined CORDIC in vectoring
mode (`cordic_atan2`, 16 iterations, latency 17 clocks). The CORDIC folds the
left half plane first and keeps 6 guard bits, so that small vectors still give
accurate angles. Each angle is unwrapped (`phase_unwrap`): the step from the
previous sample is taken modulo one turn and accumulated.

**Phase error** (`phase_error_detect`). The error is the unwrapped reference
minus the unwrapped feedback. Three details matter here:

* The two unwrappers start at unrelated moments, so their counts can differ
  by whole turns that are not a real error. On the first sample pair after a
  reset or `clear`, the detector computes a correction that leaves only the
  wrapped (−½…+½ turn) difference. It keeps that correction until the next
  `clear`. The SEL clears the unwrappers and the detector when it enters
  TRACK.
* The unwrapped counts themselves wrap every 2^16 turns. At 20 MHz this happens
  every few milliseconds, and the two channels wrap a few clocks apart. The
  difference is therefore taken modulo 2^32, which is exact while the true
  error is below 2^15 turns. Without this, the error saturates for a few
  clocks at every wrap.
* The error saturates to 24 bits. A large transient then does not wrap into a
  small error of the wrong sign.

**PI and output NCO.** `pi_controller` computes
u = sat((kp·e + Σ ki·e) >> SHIFT), with a saturating integrator. The
gains are 18-bit run-time inputs (SEL default `PI_SHIFT` = 12). u is added to
`fcw_out` of the output NCO, which produces 4 IQ pairs per clock. The
reference NCO produces one sample per clock at `fcw_ref`. Because the feedback
is sampled at 122.88 MSps, the loop settles where
**4·(fcw_out + u) ≡ fcw_ref (mod 2^31)**. With fcw_out set to fcw_ref/4 plus
a detuning, u converges to minus the detuning.

**Modes** (`mode` input, `sel_mode_e`):

* `SEL_OPEN`: the output NCO runs at `fcw_out`, and the PI is held cleared.
* `SEL_ALIGN`: every `ALIGN_PERIOD` (64) clocks, the phase corrector
  (`phase_corrector`) subtracts the current wrapped error from its offset. It
  then rotates the reference IQ by that offset with a CORDIC (`cordic_rotate`).
  This turns the reference onto the cavity phase. `ref_mux_sel` = 1 selects
  the corrected reference. The raw reference is still selectable, as in the
  multiplexer of the block diagram.
* `SEL_TRACK`: the unwrappers and the error detector are cleared on entry, and
  the PI closes the loop.

**Lock detection** (`phase_lock_detect`). `locked` rises after `LOCK_HOLD`+1
consecutive errors inside ±`lock_threshold` (6554 = 36°). It drops on the
first error outside. Lock detection does not switch modes by itself.
Sequencing OPEN → ALIGN → TRACK is left to software.

**Fast modulation.** With kp = 32768 (PI_SHIFT 12) the loop bandwidth is
about 20 kHz. A 1.2288 MHz modulation of the cavity phase is therefore not
followed. It appears at full amplitude in the phase error, and the loop
stays locked while the modulation is inside the 36° window.
`tb_sel_modulation` checks this with a 65536-sample (1.875 kHz resolution)
analysis of the error.

**Latency.** The loop delay from ADC to the output NCO frequency is about 40
clocks: 17 for atan2, plus the unwrap, the error, the PI and the NCO. This delay
limits the loop bandwidth. The paper notes that the loop cannot counteract
errors above some frequency, and that the sign change of the phase is the
largest error.

## Adaptive feedforward (`ddc_decimator`, `lms_filter`, `fft_r2`, `deconvolution`, `piezo_excitation`)

* `ddc_decimator`: a 3rd-order CIC that decimates by 2^15, giving
  122.88 MHz → 3.75 kSps. The gain is removed exactly by an arithmetic shift of
  45 bits. The detuning is already baseband, so no mixer is needed.
* `lms_filter`: a sequential LMS FIR (32 taps, 18-bit data, 24-bit Q.16
  weights). It uses one multiply-accumulate unit: TAPS clocks to compute
  y = Σ w·x, then TAPS clocks to update w += (e·x) >> mu_shift. The latency is
  2·TAPS+2 clocks per sample when adapting and TAPS+2 when `adapt` is low. At
  3.75 kSps there are 32768 clocks per sample, so this is far from a limit.
  `clear` zeroes the weights. `w_idx`/`w_val` read any weight. The number of
  taps and the step are the two tuning knobs.

In the top, x is the `piezo_ref` port (the piezo excitation), and d is the
decimated detuning. `aff_y` is the identified model's prediction and `aff_e`
the residual.

The frequency-domain half works on frames of 2^FFT_LOG2N = 64 samples of
`aff_y`. At 3.75 kSps a frame is 17 ms long and the bins are 58.6 Hz apart.

* `fft_r2` is an in-place radix-2 FFT. The frame is loaded at bit-reversed
  addresses, then LOG2N·N/2 butterflies run at one per clock, then the bins
  stream out. The forward transform halves at every stage, so it returns
  DFT/N and cannot overflow. The inverse (`inverse`=1) does not scale, so a
  round trip gives back the input. Twiddles are Q2.16, so 1.0 is exact, and
  all products are rounded. Frames are taken whenever the core is free.
  Samples that arrive while it is busy are skipped.
* `piezo_response_lut` holds the piezo-to-detuning response, written by the
  processor from a lock-in measurement: amplitude (Q4.12) and phase (2^16 per
  turn) per bin. For a real signal, the negative-frequency bins N/2..N−1 get
  the same amplitude and the negated phase.
* `deconvolution` computes X[k] = D[k]/H[k] in polar form. It rotates by
  −φ[k] (CORDIC), then divides both parts by A[k] with two restoring
  dividers. Bins whose amplitude is below `pz_amp_min` give zero rather than
  amplified noise. Each bin takes ITER+DW+AFRAC+3 = 55 clocks.
* `piezo_excitation` applies the inverse FFT and negates the real part,
  saturating it. It stores the frame in a 64-entry buffer and, once a frame
  is complete, plays one sample per decimated sample (`exc`), cyclically. A
  new frame overwrites the buffer in place.

A whole frame takes about 4k clocks to process. It takes 2.1 M clocks to
arrive.

## Kalman observer (`microphonics_observer`)

The processor (not part of this RTL) computes a power spectrum of the
detuning. It streams the spectrum in, one bin per clock (`spec_valid`,
`spec_mag`, `spec_last`). Each frame then runs:

1. **Peak detection** (`vna_peak_detect`). Strict local maxima above
   `peak_threshold` are kept in a sorted list of the NF (4) strongest, by
   insertion. The result is valid 2 clocks after the last bin.
2. **Peak assessment** (`vna_peak_assess`), once per found peak. It holds the
   frame in a 1024×24-bit memory. It walks left and right from the peak bin
   until the power falls below half the peak. That gives the width in bins,
   the half-bandwidth hbw = width/2, and Q = bin/width (UQ.8, restoring
   divider).
3. **Configuration.** Slot *k* gets pole angle θ = bin/(2·NBINS) turn and
   radius r = 1 − π·width/(2·NBINS), in UQ1.16. The pole radius comes from the
   line's measured bandwidth. Slots without a peak are switched off.
4. **Kalman bank** (`kalman_bank`). Each active filter models one damped
   oscillator: state s ← r·R(θ)·s. The coefficients r·cos θ and r·sin θ come
   from a CORDIC rotation when the filter is configured. All filters share the
   innovation ν = z − Σ predicted outputs. Each filter corrects its state with
   its own steady-state gains k1, k2 (Q2.16, `slot_k1`/`slot_k2` ports). The
   gains are computed off-line from the discrete Riccati equation of the
   chosen model and noise levels. `est` is the sum of the filters' outputs,
   the "estimated" detuning.

In the top, a second `lms_filter` takes x = the Kalman estimate and d = the
measured detuning. This is the system-identification arrangement drawn for the
observer.

Modelling each line as its own small filter, rather than one state-space
matrix for all lines, follows the paper. Its authors report that the
single-matrix approach did not track well.

## Feedforward output

`ff_sel` picks what drives DAC6: 0 for the inverted piezo excitation, 1 for
the Kalman-path LMS output. The chosen output (2^16 per turn
units) is shifted by `FF_SHIFT` = 15 into the 31-bit phase offset of the
feedforward NCO, which runs at `fcw_ff`.

## Departures and own choices

* **Where the PI acts.** The paper's text says the scaled phase error goes to
  the *reference* NCO. Its SEL diagram places an "error corrected NCO" after
  the PI, driving the DAC. This design follows the diagram: the reference
  stays fixed, and the drive NCO is corrected.
* **Decimation before the LMS.** The feedforward diagram draws the
  down-converter after the LMS filter. The text says the LMS inputs run at the
  piezo bandwidth (a few kHz). This design decimates first, so both LMS inputs
  run at 3.75 kSps.
* **No separate transform of the piezo record.** The feedforward diagram
  shows an FFT of the recorded piezo response between the response tables
  and the deconvolution. Here the tables already hold the response per
  frequency bin, so the deconvolution uses them directly. The FFT size (64)
  and the table format are this design's choices.
* **Outside the RTL.** The RF data converters, the AXI4-Stream/memory bridge,
  the processor (VNA functions, spectrum, user interface), the one-time
  resonance scan and the analog front end. Their signals are the top's ports:
  `adc1`, `dac5`, `dac6`, the spectrum stream, and the configuration inputs.
* **Own choices:** every width beyond those in the table; CORDIC for
  atan2 and rotation; the turn-correcting error detector; the
  OPEN/ALIGN/TRACK sequencing; lock hold count 64; the CIC; the sequential
  LMS; peak "distinguishability" as the strongest local maxima; the
  half-power width; the oscillator model and the pole placement; per-filter
  gains; the shared feedforward NCO; polar deconvolution with an amplitude
  floor; cyclic playback of the excitation. NF = 4, NBINS = 1024, TAPS = 32
  and the 64-point FFT are defaults, not the paper's numbers.
* The tables (NCO cosine, CORDIC arctangents, FFT twiddles, pole-radius
  step) are computed at elaboration with `$cos`, `$sin`, `$atan` and real
  arithmetic, so no data files
  are needed.

## Files

| file | contents |
|---|---|
| `rtl/rfsoc_pkg.sv` | widths, IQ structs, SEL mode enum |
| `rtl/rfsoc_llrf_top.sv` | top: SEL, CIC, two LMS filters, frequency-domain feedforward, observer, feedforward NCO |
| `rtl/sel_loop.sv` | self-excited loop |
| `rtl/nco.sv` | 31-bit multi-lane NCO |
| `rtl/cordic_atan2.sv`, `rtl/cordic_rotate.sv` | CORDIC vectoring / rotation |
| `rtl/phase_unwrap.sv`, `rtl/phase_error_detect.sv`, `rtl/pi_controller.sv`, `rtl/phase_lock_detect.sv`, `rtl/phase_corrector.sv` | SEL parts |
| `rtl/ddc_decimator.sv`, `rtl/lms_filter.sv` | decimation and LMS identification |
| `rtl/fft_r2.sv`, `rtl/piezo_response_lut.sv`, `rtl/deconvolution.sv`, `rtl/piezo_excitation.sv` | FFT, piezo response tables, deconvolution, inverted excitation |
| `rtl/vna_peak_detect.sv`, `rtl/vna_peak_assess.sv`, `rtl/kalman_bank.sv`, `rtl/microphonics_observer.sv` | Kalman observer |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/cavity_model.sv` | behavioural cavity: delays the drive and rotates it by a phase plus an accumulating detuning |
| `tb/tb_rfsoc_llrf_top.sv` | end-to-end test at reduced sizes |
| `tb/tb_rfsoc_llrf_top_full.sv` | the same sequence with every top parameter at its default |
| `tb/tb_sel_modulation.sv` | SEL with a 1.2288 MHz, 10° modulation of the cavity phase, analysed with a 1.875 kHz resolution bandwidth |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/rfsoc_pkg.sv tb/tb_sel_loop.sv --top-module tb_sel_loop -Mdir obj -o sim
./obj/sim
```

Replace `tb_sel_loop` with any testbench name. The end-to-end tests take the
design through these steps:

1. SEL open loop, then alignment of the reference phase, then lock.
2. Tracking of a +1 kHz detuning with a cavity model.
3. Adaptive-feedforward identification, then a frozen filter.
   Every frame that passes FFT, deconvolution (unit piezo response) and
   inverse FFT must come back as the negated frame.
4. A spectrum frame with a microphonic line.
5. Kalman activation, estimation and deactivation.
6. Both feedforward selections.

The tests count each of these mechanisms and fail if one never happens. The
full-size run (decimation 2^15, 1024-bin frames, 32 taps, 64-point FFT)
covers about 23 million clocks. It takes about a minute of wall-clock
time.

The module testbenches compare against models written in the testbench:
exact NCO samples, `$atan2`, reference unwrapping, a PI model, a CIC
reference, LMS convergence to a known FIR with exact frozen-filter outputs,
a double-precision DFT for the FFT and its round trip, polar division for
the deconvolution, sorted peak lists, half-power widths, and an integer
model of the Kalman equations. The Kalman test also checks that the estimate is closer to the
clean signal than the noisy measurement is.
