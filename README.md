# Digital one-cycle-control boost PFC controller

A single-phase boost power-factor-correction (PFC) rectifier has to draw a
line current whose average, over each switching period, is proportional to
the rectified line voltage: `i_L = G_in * v_in`. `G_in` is an emulated input
admittance, and the output-voltage loop sets it to match the load. The usual
average-current-mode controller senses `v_in`, multiplies it by the
voltage-loop output and closes a compensated current loop around the result.

This controller does without all of that. In continuous conduction the boost
stage satisfies `v_in = v_o (1 - d)`, so the current law can be written as

    i_L = G_in * v_o * (1 - d)      =>      (1 - d) = i_L / (G_in * v_o)

Only two quantities are sensed: the inductor current and the output voltage.
Once per switching period the controller samples both, updates `G_in` with a
PI voltage loop, and computes the switch off-fraction with one multiply and
one divide. The current loop needs no compensator. If a disturbance pushes
the current up, the next off-fraction rises, the duty falls, and the current
comes back. Linearised, this is a first-order discrete loop that stays stable
while the converter is in continuous conduction. This scheme is a fully
digital form of one-cycle control (DOCC).

The RTL targets a 50 MHz FPGA clock and a 48.83 kHz switching frequency. The
power stage it assumes is 50 V rms in, 80 V out, about 120 W, with
L = 500 uH and C = 1000 uF.

## The switching period

The period is 1024 clocks (50 MHz / 1024 = 48.83 kHz, Ts = 20.48 us). The
switch is driven with *trailing triangle modulation*: the on-time
`D = d * 1024` clocks is split into two halves placed on either side of the
period boundary.

```
count:   0        floor(D/2)              1024-ceil(D/2)       1023|0
pwm:     ‾‾‾‾‾‾‾‾‾|______________________________|‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾|‾‾‾‾
conv:    _________________________|‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾|____
                                 512                               ^ sample
```

Because the on-pulse is centred on the boundary, the boundary falls in the
middle of the rising current ramp. The current sampled there equals the
average current of the period that just ended. No accumulator and no fast
converter are needed: one sample per period is enough. That sample stands in
for the average current of the period now starting, since the line current
hardly changes between two adjacent periods.

The sample is taken at the start of the period, and its duty is used in that
same period. So the result must be ready before the first on-half ends:

| clocks after boundary | event |
|---|---|
| 0 | `adc_conv_o` falls; both converters sample |
| 1-16 | conversion (15 clocks in the test models) |
| 17 | `adc_if` presents `iL[n]`, `Vo[n]` |
| 18 | `pi_compensator` presents `Gine[n]` |
| 19 | `gin_vo_multiplier` presents `Gine[n]*Vo[n]` |
| 31 | `seq_divider` presents the off-time (20 if it saturates at once) |
| 33 | earliest clock at which the first on-half can end |

The shortest first on-half in normal operation is at the line peak:
`d = 1 - 70.7/80 = 0.116`, so `D/2 = 59` clocks, and the result arrives in
time. When the required on-time is shorter than this, the DPWM ends the first
on-half on the clock after the value arrives, and flags it on `duty_late_o`.
This happens when the output is pulled below the line peak during a load
step. If no value arrives at all within 128 clocks (`WAIT_MAX`), the previous
period's value is used. The second on-half always uses the new value. Each
on-pulse is therefore `ceil(D[n-1]/2) + floor(D[n]/2)` clocks long.

## Number formats and what `Gine` means

Both converters are 12-bit bipolar parts (±2.5 V, two's complement). Only the
upper eight bits are used, so every sample is a signed byte with 51 counts
per volt. With the sensing chains of the reference power stage:

| signal | analog gain | code gain | at the operating point |
|---|---|---|---|
| `iL[n]` | 0.1 ohm shunt x 5 = 0.5 V/A | 25.5 /A | 3.4 A peak -> 87 |
| `Vo[n]` | 10k/(390k+10k) = 0.025 | 1.275 /V | 80 V -> 102 (`VREF_CODE`) |

The divider computes the off-time in clocks directly:

    off_count = min( (iL[n] << 20) / (Gine[n] * Vo[n]), 1024 ),   D = 1024 - off_count

This makes `Gine` a dimensionless 12-bit number equal to about 20480 times
`G_in` in siemens. At 50 V rms that is about 8.2 Gine units per watt: roughly
980 at 120 W, 520 at 64 W and 330 at 40 W. The shift of 20 is a choice of
this design. The ideal-efficiency relation `P = G_in * V_rms^2` then fixes
the meaning of every other number in the loop. If you change the sensing
gains or the line voltage, `Gine` shifts to match. You need to retune only if
you want the voltage-loop bandwidth to stay the same.

Edge cases:

- Negative current codes (offset near the zero crossing) count as zero
  current, which gives full duty.
- Negative voltage codes count as zero.
- A zero divisor (`Gine = 0`, for instance right after reset) or an
  over-range quotient gives `off_count = 1024`, so the switch stays off.

## Voltage loop

`pi_compensator` runs once per switching period:

    e[n]    = 102 - Vo[n]
    acc[n]  = acc[n-1] + 22*e[n] + 899*e[n-1]
    Gine[n] = acc[n] >> 15

This is a Gain1 path on the present error and a Gain2 path on the error one
sample back. Both feed an accumulator, and a final gain of 2^-15 scales the
result. Both paths are added. The integral gain per update is therefore
(22 + 899) / 2^15 Gine units per count of error. The accumulator is clamped
to `[0, 2^27 - 1]`, which keeps `Gine` in 0..4095 and stops the integrator
winding up (`gine_sat_o` pulses when a clamp acts). Reset starts from
`Gine = 0`.

The loop is slow on purpose: it keeps the 100 Hz output ripple (about ±3
codes at 120 W) from modulating the current reference. Here is how slow,
with this design's scaling:

- One `Gine` unit moves the output by about 1.95 codes per second.
- The integral gain is 921/2^15 x 48 828 = 1372 `Gine` units per code per
  second.
- These give a crossover near 8 Hz (estimate, ignoring the load pole).

The original design aims at about 20 Hz with a 60° phase margin. How its
gains were scaled is not known, so the two figures need not agree. Load
steps take hundreds of milliseconds to settle.

With the scaling above, the closed-loop simulation reproduces the reference
prototype's load-step behaviour quite closely:

| event | simulated | reference measurement |
|---|---|---|
| 120 W -> 64 W peak | 91.4 V | 92.5 V |
| 64 W -> 120 W dip | 69.3 V | 68.2 V |
| PF at 120 W | 1.000 (ideal plant) | 0.999 |

A closed-loop sweep over 25-175 W gave these steady-state results:

| load | 25 W | 50 W | 75 W | 100 W | 125 W | 150 W | 175 W |
|---|---|---|---|---|---|---|---|
| Gine | 197 | 407 | 605 | 810 | 1013 | 1218 | 1423 |
| PF | 0.875 | 0.995 | 1.000 | 1.000 | 1.000 | 1.000 | 1.000 |
| periods in DCM | 49 % | 13 % | 0.1 % | 0 | 0 | 0 | 0 |

Output is 80.0-80.1 V at every point. The converter leaves continuous
conduction at about `Gine` = 500, the same threshold the reference prototype
reports. At 25 W the simulated power factor (0.875) is well below the 0.98
measured on the prototype, which used a different inductor. The ideal plant
model has no input filter and no losses, so it damps nothing: treat figures
for light, discontinuous loads with care.

The gain values 22, 899 and 2^-15 come from the reference design. Two things
are this design's reading: the adding signs of the two paths, and the update
once per switching period.

## Modules

| file | role |
|---|---|
| `rtl/pfc_pkg.sv` | constants (period, widths, gains, reference) and the `sample_t` struct |
| `rtl/adc_if.sv` | converter read-out: busy/data handshake, upper eight bits, pairs the two channels |
| `rtl/pi_compensator.sv` | voltage loop, `Vo[n]` -> `Gine[n]` |
| `rtl/gin_vo_multiplier.sv` | `Gine[n] * Vo[n]` (19 bits) |
| `rtl/seq_divider.sv` | saturating restoring divider, one quotient bit per clock, 11 bits |
| `rtl/dpwm.sv` | period counter, trailing-triangle PWM, convert strobe |
| `rtl/docc_controller.sv` | top level: the per-period pipeline above |

The top-level ports:

- `adc_conv_o` goes to the convert input of both converters.
- `adc_il_busy`/`adc_il_data` and `adc_vo_busy`/`adc_vo_data` come back from
  the current and voltage converters.
- `pwm_o` goes to the gate driver (1 = switch on).
- `light_load_o` is high while `Gine` is below 500. That is the level below
  which the converter is expected to leave continuous conduction and the
  power factor starts to fall.
- The other outputs expose `Gine`, the off-time and the status pulses for
  monitoring.

The converter handshake is generic: conversion starts on the falling edge of
the strobe, busy is high while converting, and the word is valid when busy
falls. Match it to your converter's actual timing. The 15-clock conversion in
the test models is about 300 ns.

## Simulation

Every testbench is self-checking and ends with a `TB_RESULT checks=N failures=M`
line. Build and run one with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/pfc_pkg.sv \
    tb/docc_controller_tb.sv --top-module docc_controller_tb -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb/dpwm_tb.sv` | pwm/convert waveform on every clock over 400 random periods, period length, late-value and timeout handling |
| `tb/adc_if_tb.sv` | upper-eight-bit capture, pairing of channels with independent conversion times, abandoned pairs |
| `tb/pi_compensator_tb.sv` | `Gine` against a 64-bit model, including both clamps |
| `tb/gin_vo_multiplier_tb.sv` | products, negative-code clipping |
| `tb/seq_divider_tb.sv` | quotient, saturation, divide-by-zero and latency (12 clocks, 1 when saturated) |
| `tb/docc_controller_tb.sv` | closed loop at default parameters with a behavioural power stage (see below) |
| `tb/pfc_load_sweep_tb.sv` | closed loop over a 25-175 W load sweep: regulation and power factor at each point |

The closed-loop bench connects the controller to `tb/boost_power_stage.sv`
(rectified 50 Hz line, inductor, switch, diode, capacitor and resistive load,
integrated once per clock, with discontinuous conduction) and to two
`tb/adc_model.sv` converters. It runs these phases:

1. Start-up at 120 W.
2. A 120 -> 64 W load step.
3. A 64 -> 120 W load step.
4. A 40 W light load.

In every switching period it checks:

- The latency of the new off-time.
- The off-time against the control law, recomputed from the converter words
  and `Gine`.
- The exact number of on-clocks in each half-period.

After each phase it checks that the output is regulated to 80 V ± 2.5 V and
that the power factor is high enough. It also requires each of these to have
occurred at least once: discontinuous conduction, a late first-half edge,
divider saturation and a `Gine` clamp. The run covers 3.5 s of converter time
and takes about 1.5 minutes.

## Limits and where this departs from the reference design

- **Current sense range.** With 25.5 codes per ampere the 8-bit current code
  clips at about 5 A. At 50 V rms that is about 176 W. Higher power needs a
  lower current-sense gain, and `Gine` then rescales with it.
- **Light load.** Below roughly 60 W at 500 uH the converter runs partly
  discontinuous. The law `v_in = v_o(1-d)` then no longer holds near the
  zero crossings, and the power factor drops (0.967 at 40 W in simulation).
  This is inherent to the method, not a fault of the RTL.
- **Choices this design makes**, beyond the reference design:
  - the divider scaling (shift of 20);
  - the signs of the PI paths and the accumulator clamp;
  - the converter handshake, and sampling both channels at the same instant;
  - the 50 % convert-strobe shape;
  - the wait-for-value rule, `WAIT_MAX` and the rounding of the two on-halves;
  - negative-code clipping;
  - reset values.
- **Not part of the RTL.** The gate driver, the converters and the analog
  power stage are outside the FPGA. Only behavioural models of the last two
  exist, for simulation.
- **No dead time or protection.** There is no over-voltage or over-current
  protection and no soft-start beyond the clamped integrator starting from
  `Gine = 0`. None of these is part of the method as described. The
  `duty_late_o`, `gine_sat_o` and `off_sat_o` outputs are there if you want
  to add protection.
