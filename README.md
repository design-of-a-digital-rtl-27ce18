# Digital low-level RF controller for 80 MHz resonators

This is the FPGA logic of a controller that keeps the field of an 80 MHz
accelerating resonator at a set amplitude and phase. The RF is handled
digitally from the ADCs to the DAC: there are no analog down-converters,
vector modulators or phase shifters. The controller works in two ways:

* **Generator driven (GDR):** the cavity field is locked to an external
  80 MHz reference generator.
* **Self-excited loop (SEL):** the cavity's own pickup signal, phase-shifted
  and held at a fixed amplitude, drives the cavity. The loop then oscillates
  at the cavity's resonance, wherever that is, which helps to find and
  track the resonance at start-up.

It can also drive the cavity at a fixed frequency, or at a programmable
offset with an automatic frequency scan to measure the cavity response.
The feedback works either on amplitude and phase or on I and Q.

Everything runs on one 64 MHz clock, which is also the clock of the five
12-bit ADCs and the 12-bit DAC.

## The two sampling tricks

**Input.** An 80 MHz signal sampled at 64 MHz (4/5 of the RF) moves on
by 450° from one sample to the next, which is 90° modulo a full turn. So
four consecutive samples of `A·cos(ωt + φ)` are

    +I, -Q, -I, +Q        with I = A·cos φ, Q = A·sin φ

and the I/Q demodulator (`iq_demod`) only has to route each sample to I or
Q and, for two of the four, negate it. It needs no mixer, no local
oscillator and no multiplier. A fresh (I, Q) pair is available every clock.

**Output.** The DAC runs at 64 MHz and carries a 16 MHz carrier, exactly
four samples per period. The same pattern run backwards, `+I, -Q, -I, +Q`,
synthesises `I·cos(ωt) - Q·sin(ωt)` (`quad_mod`). An external mixer with a
64 MHz local oscillator moves it to 80 MHz. The oscillator is locked to the
sampling clock, so the phase at the DAC is the phase at 80 MHz.

The logic depends only on the 90° step between samples. Any RF frequency
of (n + ¼)·f_clk can therefore be handled by changing the clock and the
analog parts. For (n + ¾)·f_clk the step is −90°, which flips the sign of Q.

All sample counters come out of reset together. The phase from the output
pattern to the input pattern is therefore fixed, and the cable rotation
and phase offset absorb it together with the cable delays.

## Signal flow

```
 adc[0] cavity  ─┐
 adc[1] ref     ─┤  per channel:
 adc[2] fwd     ─┼─ iq_demod → iq_rotator → cic_decim (I,Q) → cordic_vector ─┐
 adc[3] refl    ─┤   (90° pattern)  (cable delay)  (filter, ÷2^k)    (mag, phase) │
 adc[4] beam    ─┘                                                             │
        ┌──────────────────────────────────────────────────────────────────────┘
        │ cavity magnitude, cavity phase, reference phase
        ▼
   loop_ctrl: errors → 2 × pid_ctrl → drive (x, y, angle) ── cordic_rotate ── quad_mod ── dac
        ▲              (+ cordic_rotate for I/Q feedback)                        (16 MHz carrier)
        │ NCO phase
   nco_sweep                 freq_meter → tuner_ph_diff / tuner_freq_diff
                             diag_capture (two traces)      ctrl_regs (host port)
```

Channel 0 is the cavity pickup and channel 1 the reference generator.
Channels 2 to 4 (forward power, reflected power, beam current) go through
the same chain. They are only read out; the loop does not use them.

## Number formats

| quantity | format |
|---|---|
| phase | 16-bit unsigned fraction of a turn, 2^16 = 360° (0.0055°). Differences wrap and read as signed. |
| I, Q, amplitude | 16-bit. A full-scale ADC input (2048 LSB) becomes 32768, so there are 4 fraction bits behind the ADC LSB. |
| PID gains | signed 16-bit with 8 fraction bits (256 = gain 1). Ki is applied per filtered sample. |
| NCO frequency | signed 26-bit, f = word × 64 MHz / 2^26 = 0.954 Hz per LSB. |
| phase set point | 12 bits, the top of the phase word: 360°/4096 = 0.088° per step. |
| DAC | offset binary, 0x800 = zero. |

## Modes and how the drive phase is anchored

This is the core of the design. `loop_ctrl` makes a drive vector, and the
output CORDIC turns it by `drive_angle`. In amplitude/phase feedback the
vector is (amplitude, 0); in I/Q feedback it is (I, Q). The mode decides
what the angle follows:

| mode (CTRL[1:0]) | drive angle | output frequency | feedback |
|---|---|---|---|
| `MODE_GDR` 0 | reference phase + ph_set + phase correction + ph_offset | the reference generator's | yes |
| `MODE_SEL` 1 | cavity phase + sel_shift + phase correction + ph_offset | the cavity's own | yes |
| `MODE_FIXED` 2 | ph_set + ph_offset | exactly 5/4 × 64 MHz = 80 MHz | no |
| `MODE_NCO` 3 | NCO phase ramp + ph_set + ph_offset | 80 MHz + NCO offset (fixed or scanned) | no |

* **GDR.** The reference phase is measured on channel 1, so the output
  stays locked to the generator even if the generator drifts against the
  sampling clock. The phase loop regulates `ph_rel = cavity phase −
  reference phase` to `ph_set`.
* **SEL.** The drive takes the cavity's measured phase, delayed by the
  processing (about 50 clocks), plus `sel_shift`. The loop oscillates where
  the phase around it is zero: cable phase + cavity response + processing
  delay + `sel_shift` + `ph_offset`. Set `sel_shift` to cancel the cable
  phase. The processing delay then pulls the oscillation part of the way
  from the resonance towards 80 MHz: in simulation, a cavity 100 kHz above
  80 MHz with an 80 kHz half bandwidth oscillated 73 kHz above 80 MHz. The
  amplitude is the set point, or the amplitude loop holds it.

  The phase loop also works in SEL. Its correction adds to the loop phase.
  A loop phase θ moves the oscillation by about f_half·tan θ, so the phase
  loop pulls the oscillation onto the reference frequency and then holds
  the relative phase. With proportional gain only, a phase error remains,
  because the loop phase that holds the frequency shift needs a standing
  error; the integral term removes it. The field falls as cos θ, so in
  practice the pull range is a few half bandwidths.
* **FIXED and NCO** are open loop. Both PIDs are held cleared whatever the
  feedback switches say, so a frequency scan measures the bare cavity.

**Feedback type (CTRL[2]).**

* *Amplitude/phase* (0): the errors are `amp_set − |cavity|` and `ph_set −
  ph_rel`. The corrections add to the drive amplitude and to the drive
  angle.
* *I/Q* (1): a third CORDIC turns the cavity vector by `−reference phase`,
  into the reference frame, and compares it with `(i_set, q_set)`. The
  corrections add to the drive I and Q, and the output CORDIC turns the
  result by the reference phase (GDR).

  In this mode the plant's own phase (cables plus cavity detuning) must be
  taken out with `ph_offset`, or the two I/Q loops couple. With more than
  about 60° left over, they can become unstable. The test bench sets
  `ph_offset = −(cable + atan(detuning / half bandwidth))`.

The same two `pid_ctrl` instances serve both feedback types. Axis a is
amplitude or I; axis b is phase or Q. They are cleared whenever the mode
or the feedback type changes, so an integrator never carries values in the
wrong units. The drive amplitude is clipped to `[0, amp_limit]`.

## Filtering and loop delay

`cic_decim` is a third-order CIC decimator with R = 2^k, where k = 0 to 12
comes from the host (`CIC_K`). A power-of-two R makes the DC gain R³ an
exact shift, so the output keeps the input scale. Setting k = 0 bypasses
the filter: each sample passes straight through, delayed.

A larger k lowers the measurement noise but lengthens the loop delay. The
CIC group delay is 3(R−1)/2 samples: about 48 µs at k = 11 and 96 µs at
k = 12, so the range covers loop delays of tens of microseconds. Everything
after the CIC runs at the decimated rate, marked by the valid strobes. The
drive is re-registered every clock, so the NCO ramp stays smooth.

With k = 0, an ADC sample reaches the DAC in about 50 clocks (0.8 µs). The
ADC/DAC pipelines, the analog filters and the cables add to this in a real
loop.

The gains are per filtered sample. When k goes up, the integral gain per
second drops by the same factor; re-tune the gains.

## Diagnostics

* **Two-trace capture (`diag_capture`).** It records two of eight probe
  points (0 cavity magnitude, 1 cavity phase, 2 reference magnitude, 3
  relative phase, 4/5 errors a/b, 6/7 corrections a/b) into 1024-entry
  buffers. It keeps one filtered sample in `DIAG_DIV+1`.
  * Trigger mode 0 starts at once; the host re-arms it for a display that
    refreshes at a fixed rate.
  * Trigger mode 1 waits for a rising edge of `trig_event` or for the end
    of a scan step. For a step response, write the new set point and raise
    `trig_event` together.
  * Step mode (`DIAG_SEL[9]`) records the **frequency response**. Arm the
    capture with trigger mode 0 and start a scan. Each entry is then the
    probe value on the last clock of one scan step, when the cavity has
    settled at that frequency. Entry i belongs to step i. The capture stays
    busy until 1024 steps have been recorded, but the host can read the
    first entries at any time.
* **Frequency meter (`freq_meter`).** It sums the wrapped increments of the
  relative phase over a gate of 2^23 clocks (131 ms, so about 7.6 results per
  second).

      Δf = freq_diff × 64 MHz / 2^39 = freq_diff × 1.16e-4 Hz

  The result and the last phase difference leave the chip on the
  `tuner_*` ports, for the mechanical tuner, and can be read over the host
  port.

## Host register map (`ctrl_regs`)

A write takes effect on the clock edge with `wr_en` high. `rdata` is valid
one clock after `rd_en`. Addresses are 7-bit word addresses.

| addr | name | contents |
|---|---|---|
| 00 | CTRL | [1:0] mode, [2] feedback type (1 = I/Q), [3] loop a on, [4] loop b on |
| 01 | AMP_SET | amplitude set point (unsigned 16-bit) |
| 02 | PH_SET | phase set point, 12 bits |
| 03, 04 | I_SET, Q_SET | I/Q set point (signed) |
| 05 | PH_OFFSET | extra drive rotation |
| 06 | SEL_SHIFT | loop phase in SEL |
| 07 | AMP_LIMIT | largest drive amplitude (reset 0x7FFF) |
| 08–0A | KP_A, KI_A, KD_A | gains, axis a |
| 0B–0D | KP_B, KI_B, KD_B | gains, axis b |
| 0E | CIC_K | log2 of the decimation (0–12) |
| 10+2c, 11+2c | ROT_COS, ROT_SIN | cable rotation of channel c, Q1.15 (reset 0x7FFF, 0) |
| 20 | NCO_FREQ | static NCO offset |
| 21–24 | SW_FSTART, SW_FSTEP, SW_NSTEPS, SW_DWELL | scan: first frequency, step, steps, clocks per step |
| 25 | SW_CMD | write 1 = start scan, 2 = stop |
| 28 | DIAG_SEL | [2:0] trace a, [6:4] trace b, [8] event trigger, [9] one sample per scan step |
| 29 | DIAG_DIV | capture decimation |
| 2A | DIAG_CMD | write 1 = arm |
| 2B | DIAG_RADDR | capture read address |
| 40+c | channel c | [15:0] magnitude, [31:16] phase |
| 48 | PH_REL | cavity − reference phase |
| 49, 4A | FREQ_DIFF | low 32 bits, high bits sign-extended |
| 4B | STATUS | [0] scan busy, [1] capture busy, [2] capture done, [31:16] scan step |
| 4C | DIAG_DATA | {trace b, trace a} at DIAG_RADDR |
| 4D, 4E, 4F | ERR, CORR, IQ_REL | {b, a} errors, {b, a} corrections, {Q, I} of the cavity in the reference frame |

Signed settings read back sign-extended. All settings reset to 0 unless
noted: loop open, GDR, amplitude/phase feedback.

## Files

`rtl/` holds one module or package per file:

| file | role |
|---|---|
| `llrf_pkg.sv` | widths, mode and feedback-type enums, the `loop_cfg_t` settings struct, CORDIC arctangent table |
| `llrf_top.sv` | top level: five receive channels, loop, output, diagnostics, registers |
| `iq_demod.sv` | 4/5-rate I/Q demodulator |
| `iq_rotator.sv` | cable-delay rotation matrix |
| `cic_decim.sv` | CIC decimator |
| `cordic_vector.sv` | CORDIC, Cartesian to polar (18-clock pipeline) |
| `cordic_rotate.sv` | CORDIC, vector rotation / polar to Cartesian (18-clock pipeline) |
| `pid_ctrl.sv` | PID regulator with anti-wind-up |
| `loop_ctrl.sv` | set-point comparison, feedback type, modes, drive |
| `nco_sweep.sv` | NCO phase ramp and frequency scan |
| `quad_mod.sv` | quadrature modulator to the DAC |
| `freq_meter.sv` | cavity/reference frequency difference |
| `diag_capture.sv` | two-trace capture buffer |
| `ctrl_regs.sv` | host register bank |

Parameters of `llrf_top` (defaults in brackets): `N_CH` receive channels
(5), `ADC_W` (12) and `DAC_W` (12) converter widths, `CIC_N` CIC order (3),
`K_MAX` largest log2 decimation (12), `F_W` NCO word width (26),
`GATE_LOG2` frequency-meter gate (23), `DIAG_AW` log2 of the capture depth
(10). Shared widths and formats (`PH_W`, `IQ_W`, gain format, CORDIC
stages and angle width) are in `llrf_pkg`.

`tb/` holds one self-checking test bench per module (`tb_<module>.sv`),
the end-to-end `tb_llrf_top.sv`, the full-size `tb_llrf_top_full.sv`, two
scenario tests (`tb_llrf_resonance.sv`, `tb_llrf_disturbance.sv`), and
`cavity_model.sv`, a behavioural model of everything outside the FPGA.

## Simulating

Each test bench prints `TB_RESULT checks=N failures=M` and stops by itself.
A watchdog ends it with a failure if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/llrf_pkg.sv tb/tb_llrf_top.sv --top-module tb_llrf_top
./obj_dir/Vtb_llrf_top
```

Put any other test bench in place of `tb_llrf_top`. `tb_llrf_top` takes
seconds. `tb_llrf_top_full` simulates 16.8 million clocks at the default
size and takes about half a minute.

### The resonator model

`cavity_model` turns the DAC stream back into a drive phasor, as the
up-converter would. It feeds that phasor through a single-pole resonator,
modelled as a complex envelope with detuning: 80 kHz half bandwidth and
30° of cable phase by default. It then produces ADC samples with noise for
the pickup, a reference generator, the forward and reflected waves, and a
beam channel.

The end-to-end test checks the model's own field, not the controller's
readings:

1. The open-loop response at a fixed frequency matches the resonator
   formula. The forward, reflected and beam channels read back the
   model's drive, field minus drive, and noise.
2. A 30° reference-channel rotation shifts the measured phase by −30°.
3. GDR amplitude/phase feedback locks the field to within 1% and 0.5°.
4. A phase step, recorded by an event-triggered capture, runs from the old
   set point to the new one.
5. I/Q feedback locks the field.
6. The loop still locks with CIC decimation by 8.
7. SEL oscillates near a resonance 100 kHz away, as the frequency meter
   shows.
8. A frequency scan peaks at the step nearest the resonance. The
   capture, in step mode, holds the same curve.

The full-size test runs a GDR lock and then SEL at the default size. It
checks that the tuner outputs update once every 2^23 clocks.

`tb_llrf_resonance` covers start-up with a cavity at 79.7 MHz, 300 kHz
below the carrier, with an 80 kHz half bandwidth:

* A scan in 20 kHz steps peaks at −300 kHz. The response 80 kHz either
  side of the peak is 0.68–0.70 of the peak, against 0.707 for the model.
* SEL, started from the fixed 80 MHz drive, runs at −201 kHz.
* When the resonance is moved to −200 kHz, SEL follows to −141 kHz.
* The amplitude loop holds the field at the set point throughout.
* With the resonance then tuned to +5 kHz, SEL runs at +3.7 kHz.
* Closing the phase loop in SEL pulls the oscillation onto the reference.
  With P only, it locks at 0 Hz but keeps a 14° phase error. With PI, the
  phase settles on the set point.
* Switching to GDR then locks the field to the reference at the set
  amplitude and phase.

The gap between the SEL frequency and the resonance is the pull of the
processing delay. It matches a hand calculation from the loop phase.

`tb_llrf_disturbance` swings the model's resonance by ±40 kHz at 500 Hz,
the way mechanical vibration does:

* With the loops open, the field phase swings by 26.6°, which is
  atan(40/80).
* Locked in GDR, the phase error stays within 0.15° and the amplitude
  within ±0.15%.

It then shows the filter trade-off. With ±40 LSB ADC noise, CIC decimation
by 16 halves the locked phase jitter, from 0.28° to 0.13° rms. The
10–90% time of a 10° phase step grows from 63 to 105 clocks.

Last, it runs a narrow-band resonator, as a superconducting cavity is:
100 Hz half bandwidth, 1.6 ms time constant. It uses CIC decimation by
2048, about 48 µs of filter delay, with Kp = 8 and Ki = 1/2.

* The loop locks.
* A detuning step of one half bandwidth would turn the phase by 45° open
  loop. Here it peaks at 5.6° and settles back to 0.03°.

The peak is set by how fast the loop can act: a crossover of about 1 kHz
against a phase drift of 2π·100 rad/s. A longer filter allows a lower
crossover, so the peak is larger. The narrower the cavity, the less this
matters.

## What to trust and what is missing

* The tests are simulations against idealised models: a single-pole
  cavity, a perfect mixer, and ADCs without non-linearity. The design has
  been linted and elaborated, and coarse synthesis gives about 3300
  word-level cells, 12.8k flip-flops and 32 kbit of RAM. It has not been
  placed or timed on an FPGA. The PID multiply-add and the CORDIC gain
  correction are single-cycle at 64 MHz and may need pipelining on a real
  device.
* Not included: the analog front end and the ADCs, the DAC and
  up-converter, the clock distributor and its configuration processor,
  the DSP processors, the PCI host link and the operator program, and the
  Ethernet link to the tuner. The plain register port and the `tuner_*`
  ports stand in for the links.
* This design's own choices, where only the function was given: the CIC
  order and power-of-two ratios; all widths and formats; how SEL is built
  digitally (follow the measured cavity phase); the extra CORDIC for I/Q
  feedback; opening the loops in FIXED and NCO modes; the scan parameters;
  computing the frequency difference in logic; the capture buffer size and
  probe list; and the register map.
* I and Q come from alternate ADC samples. For a signal that is off
  80 MHz by Δf, the phasor turns between the two. The measured magnitude
  then ripples by about ±π·Δf/64 MHz at 2Δf: ±1.5% at 300 kHz, as in a
  scan or in SEL away from 80 MHz. The CIC filter removes the ripple only
  when its nulls fall near 2Δf. Locked in GDR, Δf is zero.
* The DAC words are produced at the full 64 MHz clock, four per period of
  a 16 MHz carrier. A DAC updated only at 16 MHz could not carry a 16 MHz
  carrier, and the DAC interface runs at 64 MHz anyway.
* A complete installation has a loop delay of about 5 µs without digital
  filtering. That figure includes the converters, analog filters, amplifier
  and cables. The logic here contributes about 0.8 µs of it.
* Only a CIC filter is provided. Other digital filters that would trade
  more delay for less noise are not.
