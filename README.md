# Parallel-PWM polar transmitter

A polar transmitter sends a baseband signal by bending the edges of a single
square-wave carrier: the carrier's **position** (when its edges occur) carries
the phase, and its **pulse width or pulse density** carries the envelope. A
switched-mode (class-D) amplifier then amplifies this two-level signal at high
efficiency, and a band-pass filter turns it back into a sinusoid. Everything
up to the amplifier is digital.

No single modulator works across a wide carrier range. This design therefore
has two envelope modulators in parallel and selects one of them by carrier
frequency:

| mode | carrier band | envelope carried by | modulator |
|------|--------------|---------------------|-----------|
| 1 | 2 – 100 MHz | width of each carrier pulse | CF-PWM (carrier-frequency PWM) with arcsine precorrection |
| 2 | 80 MHz – 1 GHz | density of carrier pulses, gated by an IF pulse train | IF-PWM (intermediate-frequency PWM) and an AND gate |

At low carriers an IF clock would put spurs too close to the carrier for the
filter to remove. Mode 1 therefore uses only the carrier clock. At high
carriers, very narrow pulses cannot pass the amplifier, so mode 2 keeps every
carrier pulse at 50 % duty and gates whole pulses instead.

This repository holds SystemVerilog for the whole digital transmitter. It
also holds a digital version of the unit-delay calibration loop and a
behavioural model of the delay cells that the loop tunes. The amplifier and
the filter are external analog parts and are not modelled.

## Signal flow

```
I,Q ──► CORDIC ──► PHI ──► N-quantizer ──X──► N-stage delay line on f_C ──► carrier_ph
              │                                                              │
              └──► A ──► L-quantizer ──Y──► IF-PWM (L-stage line on f_IF, XOR) ──► if_env
              │                                                              │
              └──► A ──► precorrection + M-quantizer ──Y──► 90° shift (M-Y, M+Y)
                                                             │
                        mode 1: carrier_ph ──► CF-PWM (M- and 2M-stage lines, NOT, AND) ──► pa_drive
                        mode 2: carrier_ph AND if_env ─────────────────────────────────────► pa_drive
```

Default sizes: N = 256 phase levels, M = L = 128 envelope levels.

### Phase path

The CORDIC gives the phase as a fraction of a turn. The N-quantizer rounds
it to X ∈ 0..N−1. An N-stage delay line with a unit delay of 1/(N·f_C) shifts
the carrier by X/N · 360°. Tap 0 is the carrier itself, and tap k follows k
delay cells.

The sign needs care. A delay line can only delay, but a positive phase must
be a lead: the output has to be square(ω_C·t + Φ). The top therefore selects
tap (N − X) mod N. On a periodic carrier, a lag of N − X units is the same as
a lead of X units. Without this, every spectrum comes out mirrored about the
carrier, which is equivalent to negating Q.

### Mode 2: IF-PWM and pulse density

The envelope is rounded to Y ∈ 0..L−1 of the normalisation value A_std. An IF
clock f_IF (nominally f_C / 15.4) passes through an L-stage line with a unit
delay of 1/(2L·f_IF). Its XOR with the undelayed IF clock is high for Y units
after every IF edge. The result is one pulse per IF half period with a duty
of Y/L. The AND gate lets through only the phase-shifted carrier pulses that
fall inside these IF pulses. The carrier keeps a 50 % duty, so the filter sees
a clean square wave whose density is Y/L. The ratio 15.4 is deliberately not
a multiple of 0.5, so IF harmonics near 2·f_C do not fold into the signal
band.

### Mode 1: CF-PWM, precorrection and the 90° point

This mode is the least obvious part of the design. It makes one pulse per
carrier period whose width carries the envelope. Two effects of the
band-pass filter have to be cancelled.

1. **Amplitude is not linear in duty.** A square wave of duty d has a
   fundamental of (2/π)·sin(π·d). For the filter output to equal A/A_std, the
   duty must be the inverse function of that:

       Y / M = (2/π) · asin( (π/2) · A / A_std ),      d = 0.5 · Y / M

   `envelope_precorrection` evaluates this without an arcsine. It compares A
   with the M−1 thresholds A_std·(2/π)·sin(π(k−½)/(2M)) and counts how many
   A reaches. The thresholds are computed during elaboration with an integer
   Taylor series. The count is the rounded result. The argument reaches 1 at
   A/A_std = 2/π, the largest fundamental any pulse train can carry. Larger
   envelopes clip at Y = M−1.

2. **A width change moves the zero crossings.** If a pulse grew only from its
   rising edge, a change of width would also shift the phase seen after the
   filter. So the pulse is made symmetric about the 90° point of the
   phase-shifted carrier. Two lines with a unit delay of 1/(4M·f_C) delay the
   phase-shifted carrier. Here M units are a quarter period. The M-stage line
   uses tap M−Y and gives Φ1 = (1 − Y/M)·90°. The 2M-stage line uses tap M+Y
   and gives Φ2 = (1 + Y/M)·90°. `Φ1 AND NOT Φ2` is high from M−Y to M+Y.
   This is 2Y units, or 0.5·Y/M of a period, centred on M units (90°)
   whatever Y is. The phase is carried by this centre, not by a rising edge.

Within a carrier period the pulse starts 2·((N − X) mod N) + M − Y CF units
after the unshifted carrier's rising edge, modulo 4M, and is 2Y units long. One envelope
level is therefore 2/(4M·f_C), which is 39 ps at 100 MHz.

### Band selection

The two bands overlap between 80 and 100 MHz. `band_select` uses the overlap
as hysteresis. It switches to mode 2 only above 100 MHz and back to mode 1
only below 80 MHz, so a carrier near a boundary does not flip the mode. The
carrier frequency is given as a word in 100 kHz units.

### Delay lines

The published circuit builds its delay lines from supply-controlled inverter
cells with picosecond unit delays. Here `tapped_delay_line` uses the other
cell type, a chain of D flip-flops. That type suits larger unit delays. The
flip-flops are clocked at a period equal to the unit delay: N·f_C for the
phase line, 4M·f_C for the CF-PWM lines and 2L·f_IF for the IF line. A tap
multiplexer picks the lag. This makes the lines synthesizable and
cycle-exact, but the unit clocks are very fast (25.6 GHz for a 50 MHz
carrier in mode 1). Treat the flip-flop lines as an exact functional model of
the delay-line behaviour, not as a circuit ready for a 180 nm process.

Two deliberate details:
* The select input is registered on the unit clock, so a new tap takes effect
  one unit later.
* The CF-PWM's "M-stage" line has M+1 taps, so that Y = 0 (tap M, zero
  width) can be expressed.

### Unit-delay calibration

Inverter delays drift with process and temperature. The published loop
therefore tunes their supply. A replica of K cells delays a reference clock
f_in. When the K cells span exactly a quarter period, the reference and its
delayed copy are 90° apart and their XOR is high half of the time. From this
comes τ = 0.25 / (K·f_in). K = N/4, L/2 or M gives the unit delay of the
phase, IF and CF lines. The XOR output is low-pass filtered and compared with
the half level. An integrator then raises the supply by Δ when the XOR is
high too long (cells too slow) and lowers it otherwise.

`delay_calibration` is a sampled digital version of this loop:
* Both clocks pass through two-flop synchronizers on a fast sampling clock.
* The low-pass filter is an integrate-and-dump counter over a window of
  samples: 1024 in the phase loop, 4096 in the IF and CF loops.
* The comparator tests the count against half the window.
* The integrator is a saturating up/down supply code. Code 0 is 1.4 V and
  code 1023 is 2.2 V.

`replica_delay_line` is a behavioural model of K supply-controlled cells
whose delay falls linearly between two end points. Each group of delay lines
has its own supply, replica and loop, with these defaults:

| group | replica | reference | cell delay 1.4 V → 2.2 V | locks for |
|-------|---------|-----------|---------------------------|-----------|
| phase path | K = N/4 = 64 | f_C | 7.8 → 3.9 ps | f_C 0.5–1 GHz |
| IF-PWM | K = L/2 = 64 | f_IF | 120.3 → 60.1 ps | f_IF = f_C/15.4, f_C 0.5–1 GHz |
| CF-PWM | K = M = 128 | f_C | 39.0 → 19.5 ps | f_C 50–100 MHz |

Lower carriers are covered the published way: each cell gets more matched
inverter groups, so the whole delay range scales while K stays tied to the
line by τ = 0.25/(K·f_in). The replica's `STAGES` parameter and the top's
`CAL_STAGES_PH`, `CAL_STAGES_IF` and `CAL_STAGES_CF` set this. The default
is 1. For example, a 200 MHz carrier needs 19.5 ps phase units, and
`CAL_STAGES_PH = 3` gives 11.7 to 23.4 ps.

Outside its range a loop rests at a supply limit. Each loop locks with a
±1-step dither. In the tests the mean replica delay settles within 0.3 % of a
quarter period.

The flip-flop delay lines do not use the supply codes. They are outputs of the
top (`vdd_code_ph`, `vdd_code_if`, `vdd_code_cf`), for inverter-based lines.

## Files

| file | role |
|------|------|
| `rtl/ptx_pkg.sv` | levels, word widths, band limits, `tx_mode_e` |
| `rtl/pwm_transmitter.sv` | top: all blocks wired as above |
| `rtl/cordic_polar.sv` | pipelined vectoring CORDIC, I/Q → A, PHI (latency ITER+2) |
| `rtl/phase_quantizer.sv` | N-quantizer |
| `rtl/envelope_quantizer.sv` | L-quantizer for the IF path |
| `rtl/envelope_precorrection.sv` | arcsine precorrection merged with the M-quantizer |
| `rtl/quarter_shift.sv` | 90° shift: taps M−Y and M+Y |
| `rtl/tapped_delay_line.sv` | flip-flop tapped delay line (N-, L-, M-, 2M-stage) |
| `rtl/if_pwm.sv` | L-stage line + XOR |
| `rtl/cf_pwm.sv` | M- and 2M-stage lines + NOT + AND |
| `rtl/output_select.sv` | the two mode switches and the AND gate |
| `rtl/band_select.sv` | mode from carrier frequency, with hysteresis |
| `rtl/delay_calibration.sv` | digital calibration loop (detector, filter, comparator, integrator) |
| `rtl/replica_delay_line.sv` | behavioural model of supply-controlled delay cells (not synthesizable) |

Every block has a self-checking testbench `tb/tb_<module>.sv`. Three more
testbenches run the whole top: `tb/tb_8psk_workload.sv`,
`tb/tb_two_tone_spectrum.sv` and `tb/tb_low_carrier.sv` (see Simulating).

## Top-level interface and clocking

`pwm_transmitter` has the following clock inputs:
* `clk_bb`: baseband (CORDIC, quantizers, band selection).
* `f_c` and `f_if`: the carrier and IF clocks.
* `clk_ph_unit` = N·f_C, `clk_cf_unit` = 4M·f_C and `clk_if_unit` = 2L·f_IF:
  the unit clocks of the lines.
* `clk_cal`: the calibration sampling clock.

The clocks have these requirements:
* `f_c` must be derived from `clk_ph_unit`.
* `clk_cf_unit` must run at twice `clk_ph_unit` with coincident rising edges.
* `f_if` must be derived from `clk_if_unit`.
* The baseband results X and Y must stay stable while the unit clocks sample
  them. Symbols change far more slowly than the unit clocks.

`rst_n` is an asynchronous active-low reset of all registers. X and both Y
values appear ITER+3 = 17 `clk_bb` cycles after an I/Q sample. `pa_drive` is
the signal for the amplifier. `mode`, `phase_x`, `env_y_if`, `env_y_cf`,
`carrier_ph`, `if_env` and the calibration outputs are brought out for
observation.

Because the top contains the behavioural replicas, it is a simulation model.
Every other module is synthesizable.

## Simulating

All testbenches print `TB_RESULT checks=N failures=F` and stop by themselves.
For example, the end-to-end test at full default size (about 15 s):

```
verilator --binary --timing --assert --top-module tb_pwm_transmitter \
    -y rtl -y tb +libext+.sv rtl/ptx_pkg.sv tb/tb_pwm_transmitter.sv
./obj_dir/Vtb_pwm_transmitter
```

Replace the top module and file to run any block's test.
`tb_pwm_transmitter` does the following:
* It runs mode 1 at 62.5 MHz (31.25 ps CF units), with a clipped envelope and
  a carrier inside the overlap. It checks that the CF-PWM loop locks to
  4 ns.
* It switches to mode 2 at 781 MHz (f_IF = f_C/15.4). It checks that the
  phase loop locks to 320 ps and the IF loop to 4.93 ns.
* It checks the carrier lag, the IF pulse widths, the AND gating and the pulse
  density.
* It returns to mode 1.
* It counts each mechanism and fails on any that never occurred: CF pulses,
  clipping, hysteresis hold, switches both ways, AND pass and block, IF
  pulses, and up steps, down steps and lock of each calibration loop.

Expected values come from a floating-point model of the modulation
(atan2, asin), not from the RTL.

`tb_8psk_workload` (about 7 s) runs a random 8PSK stream through the same top.
The symbols have radius 0.55 of full scale, and the transitions pass through
zero envelope. It runs once in each mode and recovers amplitude and phase from
`pa_drive` alone:
* In mode 1, from the pulse centre and width in each carrier period.
* In mode 2, from the drive's duty over 5 IF periods and the position of its
  rising edges relative to the carrier.

The EVM limit is 3 %. Typical results are 0.5 % in mode 1 and 0.7 % in mode 2.
Both come only from quantization, because the receiver is ideal and the
filter and amplifier are not modelled.

`tb_two_tone_spectrum` (about 3 s) sends two tones, 2/P and 3/P above the
carrier. The period P is chosen so that the drive repeats exactly: 64 carrier
periods in mode 1, or 40 IF periods in mode 2. The test takes a DFT of
`pa_drive` at f_C + k/P for k = −8..8, which is what an ideal band-pass
filter would keep. It checks:
* The tone amplitudes: A/A_std in mode 1 and (2/π)·A/A_std in mode 2, within
  0.5 dB.
* Carrier leak, images and intermodulation within |k| ≤ 5: at least 40 dB
  below the tones.
* The bins further out: at least 30 dB below the tones.

Typical third-order products are −43 dBc in mode 1 and −50 dBc in mode 2.
With a linear envelope mapping in place of the precorrection, mode 1 measures
−27 dBc and fails. In mode 2 the
carrier harmonics mix with the IF pulse train. The products fall every
f_IF/5 from the carrier, because f_C/f_IF = 15.4 = 77/5, and the one at
f_C + f_IF/5 reaches about −36 dBc. A real filter whose passband includes
that offset would pass it.

`tb_low_carrier` (about 5 s) runs the top at the bottom of the range, a
2 MHz carrier in mode 1. Its cells have 32 inverter groups in the CF-PWM
group and 320 in the phase group. It checks the CF-PWM pulses unit by unit
and checks that the phase and CF-PWM loops lock to a quarter period (125 ns).

## Where this departs from the published design, and what to trust

* **Delay cells.** The lines use flip-flops on unit-rate clocks, not inverter
  cells with a tuned supply. Timing is exact in units, but the unit clocks are
  impractically fast for the chip the design targets. The inverter cells exist
  only as a behavioural model used by the calibration loop.
* **Calibration loops.** The loops are sampled and digital rather than analog.
  The XOR detector, the half-level comparison and the ±Δ integrator follow the
  published loop. The filter, the sampling, the step and the code width are
  choices of this implementation. The delay-versus-supply law between the two
  published end points is assumed to be linear. All three loops share one
  sampling clock.
* **Precorrection input range.** The transfer function (2/π)·asin((π/2)·A/A_std)
  is defined only up to A/A_std = 2/π. Above that the output clips.
* **Quantizer placement.** The CF path quantizes after the precorrection. The
  IF path has its own quantizer.
* **Choices of this implementation** (no published value): word widths (12-bit
  I/Q and envelope, 16-bit phase), A_std = 2048, CORDIC depth (14) and
  pipelining, rounding, the reset, the clocking scheme, the frequency-word
  format of the band selector and mode 1 after reset.
* **Phase sign.** The published block description speaks of the phase as
  a rising-edge lag, while its equations transmit square(ω_C·t + Φ). This
  design follows the equations: a phase X is a lead of X units, realised as
  tap (N − X) mod N.
* **IF clock.** f_IF is an input. Nothing generates it or checks the
  frequency plan that keeps IF spurs out of the filter passband: f_C/f_IF
  between k and k+1 for k = 10..19, not k + 0.5, and f_IF at least 2.5
  filter bandwidths. The tests use f_C/f_IF = 15.4.
* **Narrow pulses.** Nothing enforces a minimum pulse width for the
  amplifier. In mode 1 one envelope level is 2 CF units, and an envelope of
  0.15·A_std gives a pulse of 19 levels, 0.74 ns at 100 MHz.
* **Not covered.** The class-D amplifier and the band-pass filter are analog
  and not modelled. EVM and spectrum are measured on the ideal drive signal
  (see Simulating), so the published figures, which include those parts and
  the baseband shaping filter, are not reproduced. Only their quantization
  share is.
