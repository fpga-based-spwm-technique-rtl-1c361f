# Three-level sine-triangle PWM generator for an NPC inverter

This RTL drives the twelve IGBTs of a three-phase neutral-point-clamped (NPC)
three-level inverter. It uses sinusoidal PWM: a sine reference for each phase
is compared with two triangular carriers stacked one above the other. When the
reference is above the upper carrier, the leg outputs +Vdc/2. When it lies
between the carriers, the leg outputs 0. When it is below the lower carrier,
the leg outputs -Vdc/2. Two inputs set the output: `mi` sets the amplitude
and `frq` the frequency. Together they give the V/f control an induction
motor drive needs. The logic is small: one carrier counter, one phase
accumulator, and per phase a sine ROM, a multiplier, two comparators and two
dead-band timers.

The design follows a published FPGA implementation of this scheme. That
implementation was written in VHDL for a Spartan-6 board with a 20 MHz
(50 ns) clock. The carrier, sine table and frequency-step arithmetic here use
its numbers. Where the original gives no detail, this RTL makes its own
choices, listed under "Design choices" below. These cover the amplitude law,
the sampling instant, the pulse order and the dead-band length.

## Signal chain

```
             +------------------+ samp (1 clk / 100 us)
 clk ------->| triangle_carrier |-----------+
             +------------------+           v
               car_lo  car_hi      +-------------------+
                 |       |   frq ->| phase_accumulator |  16-bit, += frq per sample
                 |       |         +-------------------+
                 |       |            ramp[a] ramp[b]=a+85 ramp[c]=a+170
                 |       |               |  (one chain per phase)
                 |       |          +-----------+   +------------------+
                 |       |          | sine_lut  |-->| amplitude_scaler |<-- mi
                 |       |          +-----------+   +------------------+
                 |       |                                  | ref (0..2000)
                 v       v                                  v
               +----------------------------------------------+
               |          three_level_comparator              |
               +----------------------------------------------+
                      s1_on                 s2_on
                 +-----------+         +-----------+
                 | dead_band |         | dead_band |
                 +-----------+         +-----------+
                  S1     S1'             S2     S2'   -> pulse[4p+0..3]
```

| File | Role |
|---|---|
| `rtl/spwm_pkg.sv` | shared constants, the `level_e` enum and the `leg_gates_t` struct |
| `rtl/triangle_carrier.sv` | up/down counter giving both carriers and the sampling strobe |
| `rtl/phase_accumulator.sv` | frequency-step accumulator and the three table addresses |
| `rtl/sine_lut.sv` | 256 x 9-bit signed sine ROM, built from its formula at elaboration |
| `rtl/amplitude_scaler.sv` | multiplies by `mi` and centres the result on the carrier scale |
| `rtl/three_level_comparator.sv` | the three-level decision for one leg |
| `rtl/dead_band.sv` | blanking time for one complementary switch pair |
| `rtl/spwm_top.sv` | the whole generator |

## One number scale for carriers and references

Everything is compared as unsigned integers on a scale of 0 to 2000.

* **Lower carrier `car_lo`.** This is a counter that runs 0, 1, ..., 1000,
  999, ..., 1 and then repeats. One step takes one clock. A period is 2000
  clocks, which is 100 us, so the carrier runs at 10 kHz.
* **Upper carrier `car_hi`.** This is `car_lo + 1000`, the same triangle
  shifted up. The two carriers are in phase and touch at 1000. This is the
  "phase disposition" arrangement.
* **Reference.** A reference of 1000 means 0 V. 2000 is the top of the upper
  carrier and 0 is the bottom of the lower one. The amplitude scaler
  computes:

  `ref = clamp(1000 + (sine * mi) >>> 8, 0, 2000)`

  The sine sample lies in -255..+255. With `mi` of about 1004 the reference
  just reaches both carrier peaks, so the modulation index m_a is about
  `mi / 1004`. A larger `mi` saturates: the leg sits at +Vdc/2 or -Vdc/2 for
  whole carrier periods. This is over-modulation. For example, `mi = 400`
  gives a reference swing of 1000 ± 398.

## Frequency: the phase accumulator

The references are sampled once per carrier period (regular sampling at
10 kHz). The sample is taken at the carrier valley. On every sample, a 16-bit
accumulator adds `frq`. Its top 8 bits address the 256-entry table. The
output frequency is

    f_out = frq * 10 kHz / 65536        (about 0.153 Hz per step)

Some typical steps:

* `frq = 327` gives 49.9 Hz, with 200 or 201 samples per cycle.
* `frq = 300` gives 45.8 Hz.
* `frq = 100` gives 15.3 Hz.

Phases b and c read the table 85 and 170 locations ahead of phase a. Phase b
therefore leads a by 119.5 degrees, and c leads a by 239.1 degrees, which is
the same as lagging it by 120.9 degrees. The phase sequence is a-c-b; to
reverse the motor, swap the b and c outputs. Because 256 is not divisible by
3, the spacing is not exactly 120 degrees. This leaves a negative-sequence
component of about 0.5 % of the fundamental. The offsets are parameters
(`PHASE_B_OFF`, `PHASE_C_OFF`) if this matters.

The table holds `round(255 * sin(2*pi*k/256))` for k = 0..255 as 9-bit two's
complement numbers. The synthesis tool evaluates this formula when it builds
the design, so there is no data file. Each phase has its own ROM copy, which
lets all three be read in the same clock.

## Gate signals and the dead band

Within one leg, S1/S1' form a complementary pair, and so do S2/S2'. The
comparator therefore needs only two demands:

| Reference | `s1_on` | `s2_on` | Switches on | Leg output |
|---|---|---|---|---|
| `ref > car_hi` | 1 | 1 | S1, S2 | +Vdc/2 |
| `car_lo < ref <= car_hi` | 0 | 1 | S2, S1' | 0 |
| `ref <= car_lo` | 0 | 0 | S1', S2' | -Vdc/2 |

A tie goes to the lower level. `car_hi >= car_lo` always holds, so `s1_on`
implies `s2_on`. As a result, the outer switch S1 is never demanded while the
inner S2 is off.

Each pair passes through its own `dead_band`. The logic reacts to a change
of demand as follows:

1. The conducting switch turns off on the next clock.
2. The incoming switch is held off until the demand has been stable for
   `DEAD_CYCLES` clocks. Both gates are off for `DEAD_CYCLES + 1` clocks,
   which is 1.05 us with the default of 20.
3. A demand pulse shorter than that never turns anything on.

An assertion in `dead_band` checks that the two gates of a pair are never on
together.

The `pulse` output lists each leg from the positive rail down:

| Bit | Gate |
|---|---|
| `pulse[4p+0]` | S1 |
| `pulse[4p+1]` | S2 |
| `pulse[4p+2]` | S1' |
| `pulse[4p+3]` | S2' |

Here p = 0, 1, 2 stands for phases a, b, c. The output pins in a real system
feed level shifters and gate drivers, which are outside this RTL.

## Timing through the pipeline

All stages are registered.

| Clock after the edge that samples `samp` | Event |
|---|---|
| 0 | accumulator updated |
| +1 | sine sample out of the ROM |
| +2 | reference (`ref_a/b/c`) valid, then held for the rest of the period |

After that:

* A carrier crossing reaches `level` one clock later.
* An outgoing gate falls one clock after `level` changes.
* An incoming gate rises `DEAD_CYCLES + 1` clocks after the outgoing one
  falls.

`mi` is read continuously by the scaler. `frq` is read only in the sampling
clock. Changing either takes effect within one carrier period. Reset is
synchronous and active high. It puts the carrier at its valley counting up,
clears the accumulator, commands the zero level and turns all twelve gates off
until the first dead band has elapsed.

## Top-level ports (`spwm_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | system clock, 50 ns for the rates quoted here |
| `rst` | in | 1 | synchronous, active high |
| `mi` | in | `MI_W` = 10 | amplitude multiplier |
| `frq` | in | `ACC_W` = 16 | frequency step per 10 kHz sample |
| `pulse` | out | 12 | gate signals, order as above |
| `car_lo`, `car_hi` | out | 11 | carriers |
| `ref_a`, `ref_b`, `ref_c` | out | 11 | references |
| `level` | out | 3 x `level_e` | commanded level of each leg |
| `samp` | out | 1 | sampling strobe, one clock per carrier period |
| `cycle_wrap` | out | 1 | one clock per output sine cycle (accumulator overflow) |

The parameters and their defaults are:

| Parameter | Default | Meaning |
|---|---|---|
| `CAR_MAX` | 1000 | carrier amplitude |
| `ACC_W` | 16 | accumulator width |
| `PHASE_B_OFF` | 85 | table offset of phase b |
| `PHASE_C_OFF` | 170 | table offset of phase c |
| `MI_W` | 10 | width of `mi` |
| `MI_SHIFT` | 8 | right shift after the multiply |
| `DEAD_CYCLES` | 20 | dead-band length in clocks |

The carrier frequency is `f_clk / (2*CAR_MAX)`. If you change `CAR_MAX`,
note that `spwm_pkg::CW` (11 bits) must still hold `2*CAR_MAX`. Also set
`MI_SHIFT` so that the largest `mi` maps 255 onto roughly `CAR_MAX`.

## Design choices and departures

These points are this design's own, not taken from the original:

* **Amplitude law.** The original says only that the magnitude is set by
  multiplying the sine by an integer. The shift of 8 and the centring at 1000
  were chosen so that the original's simulation values (magnitude 400 with
  references peaking near 1396) fall in the same place.
* **Carrier offset.** The upper carrier equals the lower one plus 1000. The
  original states a DC offset between two in-phase carriers and shows an
  upper carrier at 1000.
* **Accumulator split.** The step 327 for 50 Hz implies a 16-bit accumulator
  with the top 8 bits addressing the table (65536 / 200 = 327.7). The
  original describes this only through the step arithmetic.
* **Sampling instant.** Samples are taken at the carrier valley. Reference
  changes therefore always happen when both carriers are at their minimum.
* **Pulse order.** The order of the twelve gates, and the use of two separate
  dead-band timers per leg, are assumptions.
* **Dead-band length.** The original allots a dead band but gives no value.
  20 clocks is a placeholder; size it to the IGBTs' turn-off time.
* **Rounding and saturation.** The ROM rounds to nearest. Over-modulation
  saturates instead of wrapping. Ties at a carrier go to the lower level.
* **No neutral-point balancing, minimum-pulse suppression or
  frequency/amplitude ramping.** None of these is part of the scheme.
  `mi` and `frq` are taken as they are.

Outside the RTL are the power stage (IGBTs, clamping diodes, DC-link
capacitors), the 5 V to 12 V gate-drive buffers, the rectifier supply and the
clock oscillator. `tb/npc_leg_model.sv` is a behavioural stand-in for one
inverter leg. The end-to-end test uses it to check the gate patterns; it is
not meant for synthesis.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_triangle_carrier` | counts against an independent triangle for five periods; checks the 1000 offset, the 2000-clock period and the strobe at every valley |
| `tb_phase_accumulator` | random steps and strobes against a model accumulator, including the overflow pulse; checks 200/201 samples per cycle at step 327 |
| `tb_sine_lut` | all 256 entries against `$sin`; checks 0/+255/-255 at 0/90/270 degrees, odd symmetry and the read latency |
| `tb_amplitude_scaler` | 4000 random sample/magnitude pairs against integer arithmetic, including the clamps |
| `tb_three_level_comparator` | 5000 random cases, ties included, and the reset state |
| `tb_dead_band` | a clock-by-clock reference for random demand runs, including runs shorter than the dead band; no overlap |
| `tb_spwm_top` | the whole design at default sizes, below |

`tb_spwm_top` drives the full design with three leg models at four operating
points (`mi`/`frq` = 400/327, 400/300, 700/100 and 1023/1500). It runs each
point for a whole output cycle, about 4.4 million clocks in total, and checks
on every clock:

* the carrier period;
* every reference sample against a model built from `$sin`;
* each leg's level against the comparison rule;
* the absence of shoot-through and forbidden patterns;
* that each leg settles to the commanded voltage once the dead band has
  passed;
* the length of one output cycle;
* for every carrier period, the exact number of clocks each leg spends at
  +Vdc/2 and -Vdc/2. With reference r this is 2(r-1000)-1 and
  2(1000-r)+1 respectively, so the period average tracks the sine.

It also counts each mechanism and requires that every one occurred: all three
levels on each leg, dead bands, accumulator wraps, clamped references, and
changes of `mi` and `frq`. The test takes about 15 s in Verilator.

What is not verified: behaviour on hardware, the real inverter's response
(neutral-point drift, switching transients), and timing closure on any
particular FPGA. The logic is shallow, with one 9x11 multiply per phase, so
20 MHz should be easy.

## Simulating

With Verilator 5 (`--timing` is needed for the testbench delays):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/spwm_pkg.sv rtl/spwm_top.sv tb/tb_spwm_top.sv \
    --top-module tb_spwm_top -Mdir obj_top
./obj_top/Vtb_spwm_top
```

The other testbenches follow the same pattern: list the package, the module
and its testbench. Verilator finds the lower modules through `-Irtl`. To lint
only:

```
verilator --lint-only -Wall -Irtl rtl/spwm_pkg.sv rtl/spwm_top.sv --top-module spwm_top
```
