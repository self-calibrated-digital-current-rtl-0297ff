# Digital inductor-current emulator with self-calibration for a GaN totem-pole PFC

This is a synthesizable SystemVerilog controller for a totem-pole boost PFC
converter. It does not measure the inductor current every switching cycle.
Instead it computes the current every 10 ns from the two measured voltages
and the switch states. It then runs hysteretic current-mode control (HCMC)
on that computed current: the peak and the valley are set cycle by cycle,
and the stage moves between boundary and continuous conduction (BCM and CCM)
automatically.

A slow Hall-effect sensor (about 1 MHz bandwidth) cannot follow a
200–500 kHz triangle. It feeds one analog comparator against a reference
DAC. That is enough to correct the computed current from time to time
(indirect calibration). It is also enough to tune the slope parameter M_L
by perturb and observe.

The controller runs from one 100 MHz clock. One clock is one emulation step,
T_comp = 10 ns.

## Contents

| Part | File | Role |
|---|---|---|
| common types | `rtl/emu_pkg.sv` | number formats, `cfg_t` configuration and `status_t` status structs |
| ADC receiver | `rtl/adc_serial_rx.sv` | serial master for a 10-bit ADC, one sample per µs, held between samples |
| switch-state decode | `rtl/switch_state_decode.sv` | S_HF, S_LF from the delayed gate commands and, in deadtime, from the current sign |
| inductor voltage | `rtl/inductor_voltage.sv` | v'_L = v_ac + (S_LF − S_HF)·V_link |
| emulator | `rtl/inductor_emulator.sv` | i'_L[n] = i'_L[n−1] + M_L·v'_L[n], or load i_cal |
| sensor model | `rtl/sensor_model.sv` | delay plus first-order low-pass: the emulated sensor output i'_sns |
| calibration | `rtl/calibration_unit.sv` | indirect calibration, DAC reference, perturb and observe of M_L |
| direct calibration | `rtl/direct_calibration.sv` | calibration and M_L measurement when the sensor can follow the ramp |
| sine reference | `rtl/sine_sync.sv` | sine locked to the line from the polarity comparator |
| thresholds | `rtl/bcm_ccm_ref.sv` | peak/valley thresholds, BCM/CCM choice, deadband |
| hysteretic latch | `rtl/hyst_comparator.sv` | two comparators and an SR latch giving the command c |
| gate generation | `rtl/mode_deadtime_gen.sv`, `rtl/deadtime_leg.sv` | four gate signals with break-before-make deadtime |
| top | `rtl/pfc_emu_ctrl_top.sv` | wiring plus the calibration scheduler |

## Number formats

| Quantity | Format | Range |
|---|---|---|
| voltages | ADC LSBs of 0.7 V | v_ac ADC offset binary, code 512 = 0 V, ±358 V; V_link ADC straight binary, 0–716 V |
| v'_L | 12-bit signed LSBs | ±2047 LSB |
| current | 32-bit signed, 24 fraction bits (`cur_t`) | ±128 A, resolution 6·10⁻⁸ A |
| M_L | 16-bit unsigned (`ml_t`) | amperes per (LSB·clock) × 2²⁴ |
| reference DAC | 10-bit offset binary, 1/8 A per code | ±64 A |

The default M_L is 10 ns / 19.8 µH × 0.7 V × 2²⁴ = 5931. Here 19.8 µH is the
6 × 3.3 µH line inductance of the prototype. The product M_L·v'_L is
already a current in the 24-fraction-bit format, so the emulator is one
multiply and one add per clock.

## Voltage sampling

`adc_serial_rx` starts a conversion every 100 clocks (1 MHz). It drives chip
select and a 25 MHz serial clock. It shifts in a 16-clock frame whose data
MSB follows four leading bits. At the end of the frame it updates `sample`
and pulses `valid`. The value stays constant until the next frame, which is
the sample-and-hold the emulator uses between measurements. The frame
layout is my own choice, modelled on common 10-bit SPI converters.

## Switch states and the inductor voltage

`switch_state_decode` delays the four gate commands by `DRV_DLY` = 5 clocks,
to stand in for the gate-driver delay. A leg with one gate on gives its
state directly: S = 1 when the high-side switch conducts. A leg with both
gates off (deadtime) conducts through the reverse path chosen by the
current sign:

- i_L > 0: S_HF = 1 and S_LF = 0;
- i_L < 0: S_HF = 0 and S_LF = 1.

When a whole leg is off, the boost stage cannot drive the current through
zero. A `no_cross` flag then tells the emulator to stop i'_L at zero, so
the emulated current decays exactly as the real one does when the
converter is disabled.

`inductor_voltage` is combinational. It forms v'_L from the two held
samples and the states. The resistive drop is neglected.

## Emulator

`inductor_emulator` holds i'_L in a 32-bit register. Every clock it adds
di = M_L·v'_L. When `cal_sel` is high it loads i_cal instead. The
calibration unit forms i_cal from the same clock's i'_L and di, so no step
is lost. The product `di` is also an output, because the calibration needs it.

## Sensor model

`sensor_model` turns i'_L into i'_sns, the output the real sensor would
give. It is a 5-clock delay followed by y += (x − y)/16. The /16 puts the
pole near 1.03 MHz at 100 MHz, matching the sensor's 1 MHz bandwidth. The
order and the delay are my choice; a measured or datasheet response can
replace them without touching the rest.

## Calibration

`calibration_unit` corrects i'_L using only the sign of i_sns − i_ref from
the analog comparator. `v_comp` is synchronised with two flip-flops. The
comparator's delay plus the synchroniser is the constant t_d = `TD_CYC` = 6
clocks.

One calibration runs as follows:

1. **Set.** Write the wanted level i_ref to the DAC. Wait `SETTLE_CYC` = 50
   clocks.
2. **Arm.** Wait until the real comparator and the emulated comparison
   (i'_sns > i_ref) agree. Both currents are then on the same side of the
   level.
3. **Measure.** In the same switching state, wait for both to change. From
   the first change on, add up v'_L each clock. A running sum of the last
   t_d values of v'_L is kept all the time.
   - If the real crossing is detected first, the real current crossed t_d
     clocks before that detection. The error is M_L times (window sum at
     the real detection + sum up to the emulated crossing).
   - If the emulated crossing comes first, the error is M_L times (sum up
     to the real detection − window sum at that detection).

   The sign of the result is the sign of i_L − i'_L, for rising and falling
   slopes alike.
4. **Multiply and apply.** Multiply by M_L in a separate clock. Then pulse
   `cal_sel` with i_cal = i'_L + di + i_err. Report `cal_done` and hold the
   applied error on `i_err`.

If both crossings have not been seen within `timeout_cyc` clocks, the
attempt is dropped and `cal_abort` is pulsed. This happens, for example,
when the level is outside the current's swing.

### Perturb and observe of M_L

A wrong M_L makes every ramp too steep or too shallow. A calibration at a
fixed level cannot see that: both currents cross that level at about the
same time once the offset is corrected. The error shows when consecutive
calibrations use different levels. So the unit counts the sign of i_err
multiplied by the sign of the level change since the previous calibration.
It ignores calibrations at an unchanged level.

After N counted calibrations (`pno_n`):

- all N positive: M_L increases by Δ (`pno_delta`);
- all N negative: M_L decreases by Δ;
- mixed: M_L is left alone.

`ml_inc` and `ml_dec` pulse on each change. M_L starts from `ml_init` and
can be reloaded with `ml_load`.

### Scheduling (top level)

The top requests a calibration at every `cal_interval`-th rising edge of
the switching command, while the converter is running. It can be
restricted to BCM cycles (`cal_bcm_only`); there the switching frequency is
lowest and the ramps are longest. The level is normally the present
average current. With `cal_alt` set, every other calibration uses the point
halfway between the average and the peak threshold instead. This gives
perturb and observe the level changes it needs.

### Direct calibration and slope measurement

At a low enough switching frequency the same 1 MHz sensor follows the
ramp: below about a fifth of its bandwidth, so near 200 kHz and under.
Then the comparator edge itself marks the crossing, and `direct_calibration`
can be used instead (`cfg.cal_direct`).

At the comparator edge, the real current passed i_ref exactly t_d clocks
earlier. So the unit loads:

    i'_L = i_ref + M_L * (sum of the last t_d samples of v'_L)

Here t_d is the whole sensing delay. In the top it is `TD_DIRECT` = 26
clocks:

- comparator and synchroniser: 6 clocks;
- sensor propagation: 5 clocks;
- first-order lag of the filter on a ramp: 15 clocks.

With `cfg.dir_est` set, the unit also measures M_L in the same switching
state:

1. Move the DAC by `dir_step` codes in the direction the current is moving.
2. Add up v'_L, delayed by t_d, until the comparator reports the new level.
3. Divide the step by the sum: M_L = Δi_ref / Σ v'_L.

Both edges carry the same delay. So the delayed sum covers exactly the time
between the two true crossings, even when the ramp turns just after the
second one. The measurement is dropped if the ramp turns before the second
level is reached.

The result has a resolution of one sample. A step that takes about 100
clocks or more gives 1 % accuracy. A 32-step serial divider produces the
value, which is loaded into the calibration unit's M_L register.

When the method changes while a calibration runs, the DAC stays with the
unit that started it.

## Sine reference

`sine_sync` receives the line-polarity comparator (`vac_pos`) through a
synchroniser:

1. It measures the clock count between rising crossings. Crossings closer
   than `MIN_PERIOD` (12.5 ms) are rejected as noise.
2. A serial restoring divider turns the period into a phase increment
   2³²/period.
3. The 32-bit phase accumulator is reset at every rising crossing.
4. The top two phase bits select the quarter. The next ten bits address a
   1024-entry quarter-wave table, mirrored for the other three quarters.
   The table is computed at elaboration by an integer series, so no data
   file is needed.

`locked` rises once a full period has been measured and divided. It falls
after four times `MIN_PERIOD` without a crossing.

## Thresholds, mode choice and deadband

`bcm_ccm_ref` scales the sine by the amplitude `i_amp` into the average
current i_avg. It then picks the thresholds:

| Condition | Mode | Positive half cycle | Negative half cycle |
|---|---|---|---|
| disabled, or \|v_ac\| < `db_vac` | OFF | — | — |
| \|i_avg\| < `i_bcm_th` | BCM | valley −`i_zvs`, peak 2·i_avg + `i_zvs` | peak +`i_zvs`, valley 2·i_avg − `i_zvs` |
| otherwise | CCM | i_avg ± `ccm_band`/2 | i_avg ± `ccm_band`/2 |

The small reversed valley in BCM gives zero-voltage turn-on of the HF
switches. The outputs are registered.

## Hysteretic latch and gate generation

`hyst_comparator` sets c when i'_L ≤ valley and resets it when
i'_L ≥ peak; reset wins if both hold. The encoding is the same in both half
cycles: c = 1 means the switch that raises |i_L| is on. While not running,
c is preset to the polarity.

`mode_deadtime_gen` maps the command to the gates:

- LF leg: low side on in the positive half cycle, high side on in the
  negative one.
- HF leg: follows c, with the two switches swapping roles between half
  cycles.
- OFF mode: all four gates are off.

Each leg goes through a `deadtime_leg`. It turns the on gate off, waits
`DT_HF` = 5 or `DT_LF` = 20 clocks, and then turns the other gate on. An
assertion checks that the two gates of a leg are never on together.

## Top level and interfaces

`pfc_emu_ctrl_top` has plain ports:

- the two ADC serial interfaces;
- `vac_pos`, `v_comp` and `dac_code`;
- the four gates;
- a `cfg_t` configuration struct and a `status_t` status struct.

The status shows the emulated and modelled-sensor currents, the
thresholds, the last error, M_L, the mode, the command, lock, and event
pulses for calibrations, aborts, P&O steps, direct calibrations and M_L
measurements.

`cfg.cal_direct` selects direct instead of indirect calibration for the
same scheduled requests. Set it only together with a band wide enough to
slow switching down to what the sensor can follow.

The current amplitude `i_amp` is an input. The outer voltage loop that
would set it from V_link is not part of this design.

`cfg.dc_mode` runs the same hardware as a dc-dc boost converter from a
positive dc input. The reference is then the constant `i_amp`, and no line
lock is needed.

## Verification

Every block has a self-checking testbench `tb/tb_<block>.sv` against a
reference model with random stimulus. The system benches use two
behavioural models:

- `tb/adc_model.sv`: a serial ADC;
- `tb/pfc_plant_model.sv`: the power stage. It has a true inductance,
  gate-driver delay, a 1 MHz sensor and a delayed comparator.

`tb_pfc_emu_ctrl_top` runs the controller at its default parameters at
240 V rms, 60 Hz into 450 V, with a 17.7 A peak reference (about 3 kW). The
true inductance is 5 % above the emulator's value. Results:

- lock in about two line periods;
- emulated current within 1.8 A of the true current over the whole line
  cycle;
- about 0.5 A or better at each calibration point;
- a 1.5 A disturbance injected into the true current is measured by the
  next calibration and removed;
- perturb and observe moves M_L from 5931 to 5661, against a true 5649;
- current gain against the sinusoidal reference of 0.998.

The bench counts every mechanism and fails if any count is zero: BCM and
CCM cycles, deadband, ADC samples, deadtime inference, zero-current
blocking, calibrations and M_L steps.

`tb_pfc_dcdc_steps` runs the dc-dc case: 120 V into 175 V, average current
0 → 7 → 14 → 7 A with a 3 % inductance mismatch. After each step the
current enters the new band within about one switching period. The true
average is within 0.3 A, and the emulated current stays within 0.9 A.

A last phase widens the band to 16 A, which gives about 116 kHz, and
switches to direct calibration:

- M_L measured as 5771 against a true 5758;
- emulated current within 0.2 A right after each direct calibration.

`tb_pfc_line_cases` runs three more line cases side by side, each with its
own power stage (`tb/pfc_case_harness.sv`) and a 3 % inductance mismatch:

| Case | Max emulation error | Current gain | CCM periods within 200–500 kHz | THD |
|---|---|---|---|---|
| 120 V rms → 300 V, 12 A rms | 0.61 A | 0.986 | 3022 of 3024 | 9.7 % |
| 210 V rms → 400 V, 12 A rms | 0.42 A | 0.992 | all 3641 | 4.6 % |
| 240 V rms → 450 V, 4 kW | 0.55 A | 0.997 | all 4485 | 3.9 % |

THD is the total harmonic distortion of the line current over the first 20
harmonics, taken over one line period. The 4 kW case is checked against
the 10.3 % measured on the prototype at that power. The simulated power
stage is ideal, so its THD comes only from the deadband and the BCM/CCM
transitions, and it is lower than the measured figure.

`tb_direct_calibration` checks the direct unit alone. It uses random
slopes and ramps, and both ramp directions.

### Running a testbench

From the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb \
      rtl/emu_pkg.sv tb/tb_pfc_emu_ctrl_top.sv --top-module tb_pfc_emu_ctrl_top
    obj_dir/Vtb_pfc_emu_ctrl_top

Each bench prints `TB_RESULT checks=<n> failures=<m>` and stops by itself.
A watchdog ends it if it hangs. The full-size bench simulates about 60 ms
of line time in a few seconds.

## Operating points

| Case | v_ac peak (LSB of 511) | V_link (code of 1023) | peak current (of ±64 A DAC) |
|---|---|---|---|
| dc-dc 120 V → 175 V, 7/14 A steps | 171 | 250 | 18 A |
| 120 V rms → 300 V, 12 A rms | 242 | 429 | 23 A with a 12 A band |
| 210 V rms → 400 V, 12 A rms | 424 | 571 | 23 A |
| 240 V rms → 450 V, 3 kW | 485 | 643 | 24 A |
| 240 V rms → 450 V, 4 kW | 485 | 643 | 30 A |

All fit. At 240 V rms the line crest leaves 26 LSB (18 V) of the v_ac
input range. The switching period at 200–500 kHz is 200–500 clocks, which
gives 0.2–0.5 % timing resolution.

## Not built, and where the design departs from the source description

- **Power hardware.** The power stage, gate drivers, sensor, comparator,
  DAC, ADC chips, dividers, polarity comparator and line filter are analog
  or power hardware. They exist only as behavioural testbench models.
- **Outer voltage loop.** No design for it is given, so it is not
  included.
- **Direct calibration.** The fast-sensor method is built, but only for a
  low-frequency operating mode chosen by configuration. The wide band and
  the switch between methods are my own scheduling choices.
- **Perturb-and-observe sign.** The basic rule says to raise M_L when the
  errors are positive and lower it when they are negative. Taken literally
  on the raw error sign, that rule does not converge with alternating
  levels. Here the error sign is referred to the direction of the level
  change; that is my own addition.
- **Calibration levels.** The alternating levels and the BCM-only option
  are my own scheduling choices.
- **My own choices.** These values and details are not given in the
  source description:
  - gate-driver delay, deadtimes, sensor delay, filter order, comparator
    delay and DAC settling time;
  - ADC frame and number formats;
  - BCM peak rule, CCM band and deadband width;
  - zero-current blocking;
  - calibration timeout.
