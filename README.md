# Quadrature phase detector for ECVT

An electrical capacitance volume tomography (ECVT) sensor is read by driving
one electrode with a sine wave and measuring the current that reaches another.
The capacitance of interest shows up in the amplitude. Stray capacitance and
resistance in each channel also shift the phase, and an analog phase-sensitive
demodulator loses signal and accuracy unless its reference is shifted to
match. This design moves the demodulation into digital logic. It generates the
excitation itself, multiplies the digitized return signal by a sine and a
cosine of the excitation, and integrates both products over one period. Both
amplitude and phase come out of the two sums, so no phase-tracking loop is
needed.

The RTL follows the signal chain of the published design by Muttakin et al.,
"Hardware Design for Quadrature Phase Detection Algorithm in ECVT": a DDS, two
multipliers, two accumulators and a CORDIC arctangent. That design was a
Simulink/System Generator model built from vendor IP cores. Everything inside
those cores here (the DDS table, the CORDIC, widths, handshakes, sequencing) is
this implementation's own.

## The measurement

The sensor returns `u(n) = A sin(2πn/N + θ)`, sampled N times per period of the
50 kHz excitation. With the references `sin(2πn/N)` and `cos(2πn/N)` taken from
the same generator:

    R = Σ u(n)·sin(2πn/N) = N·A/2 · cos θ
    I = Σ u(n)·cos(2πn/N) = N·A/2 · sin θ
    θ = atan2(I, R),   |(R, I)| = N·A/2

Each product is a DC term plus a term at twice the excitation frequency. Over a
whole number of periods the double-frequency term sums to zero. That is why
the window length matters more than anything else in the design: a window that
is not a whole number of periods leaves a ripple in R and I, and hence a phase
error. At 100 MHz and 50 kHz one period is exactly 2000 clock cycles.

The DDS sine is also the excitation output. The reference therefore cannot
drift in frequency against the signal it demodulates. Any phase offset of the
analog path (DAC, sensor, amplifier, ADC) is simply part of the measured θ.

## Block structure

    smp ─┬─► qpd_mult (×sin) ─► qpd_accum ─► sum_re ─┐
         │                                           ├─► cordic_atan ─► res_phase, res_mag
         └─► qpd_mult (×cos) ─► qpd_accum ─► sum_im ─┘
    dds ─► sin, cos (sin also → exc_sine)
    demod_ctrl ─► first/last of each window, electrode pair (sel_tx, sel_rx)

| File | Role |
|---|---|
| `rtl/qpd_pkg.sv` | shared widths, CORDIC angle format and `atan(2^-i)` table |
| `rtl/dds.sv` | 32-bit phase accumulator and quarter-wave table: sine and cosine |
| `rtl/qpd_mult.sv` | signed multiplier, one register stage |
| `rtl/qpd_accum.sv` | windowed accumulator (restart on first sample, publish on last) |
| `rtl/cordic_atan.sv` | pipelined vectoring CORDIC: magnitude and atan2 |
| `rtl/demod_ctrl.sv` | window counter and electrode-pair sequencer |
| `rtl/qpd_top.sv` | the detector |

## Windows, pairs and frame rate

`demod_ctrl` counts accepted samples into windows of `N_SAMPLES` (default
`N_PERIOD · F_ADC_HZ / F_OP_HZ = 1 · 100 MHz / 50 kHz = 2000`). It flags the
first sample of a window, which restarts both accumulators, and the last,
which publishes the sums. Windows follow each other with no gap, so one result
leaves every 2000 samples.

Each window belongs to one electrode pair. For `N_CH` electrodes a frame
visits all `N_CH·(N_CH−1)/2` pairs in the order (0,1), (0,2) … (0,N−1),
(1,2) … (N−2,N−1). `sel_tx`/`sel_rx` give the pair being measured, meant for
the analog multiplexer. The frame time is `N_SAMPLES · N_CH·(N_CH−1)/2`
clocks when a sample arrives every clock:

| Electrodes | Pairs | Clocks/frame | Frames/s at 100 MHz |
|---|---|---|---|
| 8 | 28 | 56 000 | 1785.7 |
| 16 | 120 | 240 000 | 416.7 |
| 32 (default) | 496 | 992 000 | 100.8 |

These match the rates the published design quotes (1785, 416 and 100 data/s).
Its throughput formula is printed with the ADC rate in the denominator. It is
read here as "2000 clocks per pair measurement", the only reading that gives
those numbers.

`run` starts and stops measuring. It is only looked at between windows: a
window that has started always completes, as long as samples keep coming. A
stopped frame resumes at the next pair, not at pair 0. `smp_valid` may drop at
any time. The window still ends after `N_SAMPLES` accepted samples, but the
DDS runs on every clock. The window therefore covers whole periods only if
samples arrive on a regular strobe whose rate divides into whole periods, for
example every other clock with `F_ADC_HZ = 50 MHz` and `N_PERIOD = 2`.
Irregular gaps cause phase and amplitude errors.

## Number formats and timing

| Signal | Format |
|---|---|
| `smp` | signed `SMP_W` (16) bits, full scale ±32767 |
| DDS sine/cosine | signed `REF_W` (16) bits, amplitude 32767 |
| products | signed 32 bits, full precision |
| `acc_*`, `sum_re`, `sum_im` | signed `ACC_W` = 48 bits (43 needed for 2000 full-scale products) |
| `res_phase` | signed 16 bits, radians, 13 fraction bits (1 LSB = 1.22e-4 rad = 0.007°), range ±π |
| `res_mag` | unsigned 48 bits, = N·A/2 in sample × reference units |

To recover the amplitude as a fraction of ADC full scale, compute
`A = 2·res_mag / (N_SAMPLES · 32767 · 32767)`.

Latency, counted from the clock edge that takes a window's last sample:

- 1 clock: products registered (`qpd_mult`);
- 2 clocks: `sum_valid`, `sum_re`, `sum_im` (`qpd_accum`);
- 12 clocks: `res_valid` and the result (`cordic_atan`, 10 clocks).

The result carries the pair index, electrodes and a frame-end flag, so it can
be consumed without tracking the pipeline. All registers use an asynchronous
active-low reset `rst_n`.

### The DDS

The DDS uses a 32-bit phase accumulator with an increment of
`round(F_OP_HZ/F_CLK_HZ · 2^32)` (2 147 484 by default). Its top 10 bits
address a 1024-point wave. Only a quarter is stored, as
`round(32767·sin(2π(k+0.5)/1024))` for k = 0…255, computed at elaboration.
The other quarters are mirrored and negated. The half-point offset makes the
mirroring exact. Cosine reads the same table 256 points ahead, so the two
references are in exact quadrature. Sine, cosine and the phase they belong to
(`exc_phase`) are registered together.

### The CORDIC

This is the part that takes the most care. A vector in the left half-plane is
first rotated by ±90°, with the angle register preloaded with ±π/2. Then 18
micro-rotations by ±atan(2^-i) drive y to zero, adding each rotation to the
angle. Two micro-rotations are done per pipeline stage, so 9 stages plus one
output stage give a 10-clock latency. The output stage multiplies the
remaining x by `round(2^16/K)`, with `K = Π sqrt(1+2^-2i) ≈ 1.6468`, to
remove the CORDIC gain. It also rounds the Q3.29 angle to Q3.13. The datapath
is 2 bits wider than the inputs, because the fold, a √2 diagonal and the gain
K together grow values by up to 2.33×. The residual angle error,
atan(2^-17) ≈ 7.6e-6 rad, is far below the output LSB as long as the input
vector has more than about 2^20 of magnitude. A full-scale 2000-sample window
gives about 2^40.

## How far it can be trusted

The simulations use an ideal sensor model: a sine locked to the DDS phase,
rounded to the ADC width, with no noise. Under that model:

| Configuration | Sweep | Mean abs. phase error | Published figure |
|---|---|---|---|
| 16-bit, 100 MHz, 32 electrodes (496 pairs) | ±1 rad | 0.0018° | 0.58° |
| 16-bit, 100 MHz, 8 / 16 electrodes | ±1 rad | 0.0018° | 0.58° |
| 8-bit, 100 MHz | ±1 rad | 0.0027° | 0.85° |
| 16-bit, 200 MHz | ±1 rad | 0.0018° | 4.00° |
| 8-bit, 200 MHz | ±1 rad | 0.0022° | 3.65° |

The published errors are two to three orders of magnitude larger. They come
from that design's own fixed-point settings and sampling, which are not
described in enough detail to reproduce, and from a model that was not the
same as this RTL. Do not read the small figures above as a claim of real-world
accuracy. With a real front end the error is set by noise, ADC linearity and
channel crosstalk, none of which is modelled.

Other differences from the published design:

- **Phase range.** The published specification gives 0–114.58° (±57.29°,
  i.e. ±1 rad). This CORDIC covers ±180°, so the ±1 rad range is included.
- **8-bit and 200 MHz variants.** These are parameter settings
  (`SMP_W`/`REF_W` = 8, `F_CLK_HZ` = 200e6, which doubles `N_SAMPLES` to
  4000), not separate designs. The defaults are the recommended 16-bit,
  100 MHz, 32-electrode configuration.
- **Electrode sequencing** is an addition. The published design only implies
  it through its frame-rate formula.
- **Not included:** the analog front end (charge amplifier, gain stage), the
  DAC that turns `exc_sine` into the excitation, the analog multiplexer and the
  ADC. They sit outside this RTL, at `exc_sine`, `sel_tx`/`sel_rx` and
  `smp`/`smp_valid`.
- The alternative scheme mentioned alongside, which delays the reference until
  it is in phase with the signal, is not built. Quadrature demodulation makes
  it unnecessary.

## Simulation

Each testbench checks its unit against values computed independently in
floating point and prints `TB_RESULT checks=N failures=M`:

| Testbench | What it exercises |
|---|---|
| `tb/dds_tb.sv` | phase step, every sine/cosine sample against `$sin`/`$cos`, 5 periods in 10 000 clocks |
| `tb/qpd_mult_tb.sv` | random and extreme operands, 1-clock latency |
| `tb/qpd_accum_tb.sv` | random windows (including 1-sample windows) with gaps |
| `tb/cordic_atan_tb.sv` | all quadrants, axes, extremes; 10-clock latency; tag |
| `tb/demod_ctrl_tb.sv` | 7-sample windows, 5 electrodes, random `run`/`smp_valid` |
| `tb/qpd_top_tb.sv` | 4 electrodes, ±1 rad sweep plus ±90°+ cases, gaps, stop mid-window, idle, frame wrap; 12-clock result latency |
| `tb/qpd_top_full_tb.sv` | default parameters: one full 32-electrode frame, 992 000 clocks |
| `tb/qpd_workloads_tb.sv` | the 8/16-bit × 100/200 MHz and 8/16-electrode configurations (helper `tb/qpd_cfg_run.sv`) |

With Verilator 5, for example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/qpd_pkg.sv tb/qpd_top_full_tb.sv --top qpd_top_full_tb
    ./obj_dir/Vqpd_top_full_tb

Each run takes between a fraction of a second and about a second. The
package must be on the command line ahead of the files that import it.

## Changing it

- **Excitation frequency or clock:** set `F_OP_HZ`/`F_CLK_HZ` on `qpd_top`.
  Make sure `F_ADC_HZ · N_PERIOD / F_OP_HZ` is an integer, or the windows will
  not span whole periods. Also keep `ACC_W ≥ SMP_W + REF_W + log2(N_SAMPLES)`.
- **Longer integration:** raise `N_PERIOD`. Noise averages down, and the frame
  rate falls in proportion.
- **Electrode count:** `N_CH`. Pair counter and electrode selects size
  themselves.
- **Phase precision:** `PH_W` (format stays 3 integer bits) and `ITERS` (even,
  below 32; latency `ITERS/2 + 1`).
