# SVPWM constant-V/f speed controller for a three-phase induction motor

This is a fully digital open-loop speed controller for a three-phase induction
motor. It runs on one 100 MHz clock and drives the six IGBT gates of a
voltage-source inverter. The motor speed is set with push buttons, 10 rpm per
press. The controller keeps the ratio of output voltage to output frequency
constant (V/f control), so the stator flux, and with it the available torque,
stays about the same at every speed. The voltage vector is synthesised with
space-vector PWM (SVPWM) at a 10 kHz switching frequency. Compared with
sine-triangle PWM, SVPWM gets about 15 % more output voltage from the same DC
bus.

The RTL follows a published FPGA implementation of this controller: the eight
modules, their port names and bus widths, the on-time equation, the sector
table and the rated operating point. Where that description stops (number
formats, carrier shape, clocking, button handling), the choices are this
design's own. They are marked as such below and in each file's header.

## Signal chain

```
 a ─┐                  speed      index (m)
 b ─┴OR─ inc ┐       ┌────────┐  ┌──────────────┐  Ta,Tb,To   ┌─────────────┐ maxa ┌─────────┐ pulse_1 / pulse_4
             ├─►speed_ctrl ─►vf_profile ─┬────────►│ on_time_calc│─sector─►│ pulse_count │─────►│ pwm_arm │ (phase A)
 c ─┐        │  300..1490 rpm            │ step    └──────▲──────┘         └──────▲──────┘ maxb │ pwm_arm │ pulse_2 / pulse_5
 d ─┴OR─ dec ┘                           ▼                │ alpha                 │       maxc │ pwm_arm │ pulse_3 / pulse_6
                                   clk_div_alpha ─────────┴── tick (10 kHz) ──────┘            └─────────┘
```

| module | job | clocking |
|---|---|---|
| `speed_ctrl` (+ `button_debounce`) | speed setting from the buttons, 300..1490 rpm, ±10 rpm per press | every cycle |
| `vf_profile` | modulation index and angle step, both proportional to speed | every cycle |
| `clk_div_alpha` | divides 100 MHz by 10000 and advances the angle by the step | every cycle; makes `tick` |
| `on_time_calc` (+ `sin_lut`) | sector, sin/cos table, Ta, Tb, To | loads on `tick` |
| `pulse_count` | each phase's ON count from the sector table | loads on `tick` |
| `pwm_arm` ×3 | center-aligned PWM for the upper/lower IGBT of one arm | every cycle |
| `svpwm` | top level: the wiring above, plus the two button OR gates | |

`svpwm_pkg` holds the shared constants and the bus types.

## Number formats

Everything hinges on four fixed-point conventions. They are inferred from the
reference simulation, which shows speed 1500, modulation index 928, step 18
and an angle going 162, 180, 198, 216 at 100 µs intervals.

* **Speed**: rpm, 11 bits.
* **Angle `alpha`**: tenths of an electrical degree, 0..3599, 12 bits. One
  revolution of the voltage vector is 3600 units.
* **Step `variation`**: how far the angle advances per 10 kHz sample, in the
  same units. At the rated 1500 rpm the step is 18, i.e. 1.8° per sample and 200
  samples per revolution, which is 50 Hz. That is the synchronous frequency of a
  4-pole motor at 1500 rpm.
* **Modulation index `m`**: a 10-bit fraction where 1024 means 1.0. The rated
  value 928 is 0.906 = π/(2√3), the largest index for which the on-time
  equation below stays in the linear range (To ≥ 0).
* **Times**: cycles of the 100 MHz clock, 14 bits. A switching period Ts is
  10000 cycles. Ta, Tb and To are times within half a period, Ts/2 = 5000 cycles.

The V/f law in `vf_profile` is then just two proportions, rounded to nearest:

```
index     = round(speed * 928 / 1500)
variation = round(speed *  18 / 1500)
```

Because the angle step is an integer, the output frequency has steps of
10000/3600 Hz ≈ 2.8 Hz. Rounding (rather than truncation) gives exactly 50 Hz
at 1490 rpm, 33.3 Hz at 1000 rpm and 16.7 Hz at 500 rpm. The index is not
quantised this way. No voltage boost is applied at low speed.

## From angle to on-times

Once per sample, `on_time_calc` finds the sector k = 1 + ⌊alpha / 60°⌋ and
evaluates

```
[Ta]   √3              [  sin(kπ/3)      −cos(kπ/3)     ] [cos α]
[Tb] = ──  · m · Ts ·  [ −sin((k−1)π/3)   cos((k−1)π/3) ] [sin α]
       π
To = Ts/2 − (Ta + Tb)
```

The matrix rows reduce to Ta = K·sin(k·60° − α) and Tb = K·sin(α − (k−1)·60°),
with K = (√3/π)·m·Ts. So Ta is the time spent on active vector k, the one
where the sector starts, and Tb the time on vector k+1, where it ends. To is
the zero-vector time that fills the half period.

The hardware follows the same steps, in this order:

1. The sector comes from five comparisons of alpha against multiples of 600.
2. sin α and cos α come from `sin_lut`. This is a quarter-wave table of 901
   entries, round(32767·sin(i·0.1°)), i = 0..900, stored in
   `rtl/sin_quarter.hex`. The quadrant decides whether the table is read
   forwards or backwards and whether the result is negated. cos α is read as
   sin(α + 90°) through a second read port.
3. The matrix uses the seven constants sin/cos(kπ/3) in Q15 (0, ±1/2, ±√3/2, ±1).
4. The scale K is formed as m · 22053 / 4096 cycles, where 22053 = round(√3/π · 10000 · 4).

In total it takes six multiplications. Every product is rounded to nearest
before it is shortened, and the registered Ta, Tb, To are within 3 cycles of
the exact equation. Ta and Tb are clamped to 0..5000 and To to ≥ 0. This only
matters for an index above 928, which the V/f law never produces.

## Sector table: which phase gets which time

In each sector, one phase is switched on in both active vectors, one phase in
neither, and one phase in exactly one of them. Its ON count per half period
(`pulse_count`) is therefore one of four sums:

| sector | phase A | phase B | phase C |
|---|---|---|---|
| 1 | Ta+Tb+To/2 | Tb+To/2 | To/2 |
| 2 | **Ta**+To/2 | Ta+Tb+To/2 | To/2 |
| 3 | To/2 | Ta+Tb+To/2 | Tb+To/2 |
| 4 | To/2 | **Ta**+To/2 | Ta+Tb+To/2 |
| 5 | Tb+To/2 | To/2 | Ta+Tb+To/2 |
| 6 | Ta+Tb+To/2 | To/2 | **Ta**+To/2 |

The published table lists Tb+To/2 for the single-vector entry in all six
sectors. In the even sectors the phase concerned is on only in vector k, whose
time is Ta, not Tb. Using Tb there would make the phase voltage jump at every
sector boundary. This design therefore uses Ta in the three bold cells and
follows the published table everywhere else. To/2 is To shifted right by one
bit.

## Center-aligned PWM and timing

Each `pwm_arm` has its own counter over the 10000-cycle period. The counter
is folded into a triangle 0 → 4999 → 0, and the upper gate is on while the
triangle is below the ON count `max`. This gives exactly 2·max ON cycles per
period, as one pulse centred on the period boundary. Because max is a time per
half period, this is the usual symmetric SVPWM pattern: the zero-vector time
is split between 000 and 111 at the two ends. `max` is copied into a shadow
register at each period start, so an update never cuts a pulse. The lower gate
is the exact complement of the upper gate. No dead time is inserted; the power
module downstream must provide it. An assertion in `svpwm` checks that the two
gates of an arm are never on together.

Clocking is a departure from the reference design. That design clocks the
on-time and count modules with the divided 10 kHz clock. Here the whole design
runs on the 100 MHz clock, and `clk_div_alpha` produces a one-cycle `tick` that
both modules use as a clock enable. The divided clock is still available as
`clk_10k`.

Pipeline, counting clock edges after reset is released (edge 1 is the first):

* Edge 10000·n: `on_time_calc` loads from the current angle and index. On the
  same edge, `pulse_count` loads from the previous on-times and the angle
  advances by the step.
* Edge 10000·n + 1: each `pwm_arm` starts a period and takes the new ON count.

So an angle reaches the gates two sampling periods (200 µs) after it is
sampled. The first two PWM periods after reset have all upper gates off.

## Buttons

Buttons `a` and `b` increase the speed and `c` and `d` decrease it; each pair
is ORed. Each input is synchronised, then debounced: a new level is accepted
only after it has been stable for `DEBOUNCE_CYCLES` cycles (default 10 ms).
Each rising edge of the accepted level is one press. A press that would leave
300..1490 rpm is ignored. Pressing both directions at once does nothing. After
reset the setting is 1500 rpm, the rated point used in the reference
simulation. This is just above the button range: the first decrease gives 1490
rpm, and an increase from 1500 is refused. The synchroniser, the debounce and
the reset value of 1500 rpm are this design's choices.

## Top-level ports (`svpwm`)

| port | dir | width | meaning |
|---|---|---|---|
| `clock` | in | 1 | 100 MHz |
| `reset` | in | 1 | synchronous, active high |
| `a`, `b` / `c`, `d` | in | 1 | increase / decrease buttons, active high |
| `pulse_1`, `pulse_2`, `pulse_3` | out | 1 | upper IGBT of phase A, B, C (1 = on) |
| `pulse_4`, `pulse_5`, `pulse_6` | out | 1 | lower IGBT of phase A, B, C |
| `Ta`, `Tb`, `To` | out | 14 | current on-times, 100 MHz cycles per half period |
| `sector` | out | 3 | 1..6 |
| `clk_10k` | out | 1 | 10 kHz square wave |
| `step_value` | out | 5 | low bits of the angle step |

Parameters: `DEBOUNCE_CYCLES` (default 1 000 000) and `SPEED_RESET` (1500).
The lower modules also take the period (`TS`, `DIVIDE`, `PERIOD`, all
10000), the speed limits and the rated point as parameters. If you change the
period, change it in all three modules together.

## Simulating

Each testbench in `tb/` checks itself and prints `TB_RESULT checks=N failures=M`.
Run them from the directory that contains `rtl/` and `tb/`, because the sine
table is read from `rtl/sin_quarter.hex`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -Irtl \
    rtl/svpwm_pkg.sv tb/svpwm_tb.sv --top-module svpwm_tb -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `speed_ctrl_tb` | limits, 10 rpm steps, glitch rejection, held button, both buttons |
| `vf_profile_tb` | index and step for all speeds 0..2047 against the rounded ratios |
| `clk_div_alpha_tb` | 10000-cycle tick, 50 % clk_out, angle accumulation and wrap |
| `on_time_calc_tb` | every angle at m = 928, and 2000 random angle/index pairs, against the floating-point equation (±3 cycles) |
| `pulse_count_tb` | ON counts in all sectors against the switching states of the hexagon's vectors |
| `pwm_arm_tb` | 2·max ON cycles, pulse centring, complementary gates, shadow update, 0 % and 100 % |
| `svpwm_tb` | end to end, debounce shortened to 8 cycles: per-period ON cycles of all three phases against a floating-point model; 1500, 1000, 500, 300 and 1490 rpm; both limits; all six sectors; 200 samples per revolution (50 Hz) at 1490 rpm |
| `svpwm_harmonics_tb` | line-to-line voltage spectrum over one revolution at 500, 1000 and 1490 rpm: fundamental at 16.67, 33.33 and 50 Hz with amplitude √3·(2/π)·m of the bus (constant V/f), 3rd and 5th harmonics below 1 % |
| `svpwm_full_tb` | the top with every parameter at its default: one revolution at 1500 rpm, one decrease press, one refused increase |

All of these pass. The end-to-end tests simulate about 10 million clock cycles
and take a few seconds each.

## What is not here, and how far to trust it

* The inverter (intelligent power module), the motor and the laboratory
  measurement chain are outside the digital design.
* There is no dead time, no over-modulation or six-step mode, and no low-speed
  voltage boost. The reference design does not describe any of them.
* The number formats and the rated-point scaling are inferred from printed
  simulation values, not stated outright. The even-sector entries of the
  sector table deliberately differ from the published table (see above).
* The results were checked only in simulation, against independent
  floating-point models. The design has not been run on an FPGA or a motor.
