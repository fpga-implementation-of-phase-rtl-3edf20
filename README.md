# Phase-shifted carrier PWM speed controller for a seven-level inverter

This design drives a three-phase, seven-level cascaded H-bridge inverter.
Each phase is three H-bridges in series, each fed from its own switched-inductor
Z-source network, and the inverter supplies an induction motor under
closed-loop speed control. All of it is digital logic running from one 20 MHz
clock. It compares one sine reference per phase with six triangle carriers
and produces 36 gate signals: 12 per phase, as complementary pairs with a dead
band. The speed loop around it decodes the shaft encoder and sets the sine
frequency with a PI controller.

The main idea is *phase-shifted carrier* modulation. An inverter with
m = 7 levels per phase needs m − 1 = 6 carriers. They are equal triangles whose
timing is staggered, so that every carrier crossing moves the output by one
level. As a result, the output changes many times per carrier period even
though each switch runs at the carrier frequency.

```
                 freq_word      amplitude
 enc_a,enc_b       ^               |
 ----> qep_speed --+--> pi_controller --> pspwm_core --------------------------> pwm[35:0]
       (rpm/30 ms)      (rpm -> freq)     |  carrier_sampling  -> RPH,YPH,BPH -+
                                          |  reference_carrier_gen -> CAR..CAR5+-> phase_comparison
```

## One number line for everything

Carriers, references and the dead band are all integers on a single
0..2000 scale, and 11 bits (`pspwm_pkg::CW`) hold every value. Understanding
the whole design comes down to this picture:

| signal | range | how it moves |
|---|---|---|
| CAR, CAR1, CAR2 | 0..1000 | triangles with a 2000-clock period (10 kHz), delayed 0, 333 and 666 clocks |
| CAR3, CAR4, CAR5 | 1000..2000 | 2000 − CAR, 2000 − CAR1, 2000 − CAR2 |
| RPH, YPH, BPH | 0..2000 | 1000 + sine × amplitude / 256, saturated, updated once per carrier period |

The three lower carriers stagger the crossings within the band 0..1000, and
the mirrored carriers do the same within 1000..2000. A reference centred on
1000 with an amplitude near 1000 therefore crosses all six carriers in turn.
The number of upper outputs of a phase that are on at any moment is 0..6,
which gives the seven levels. The phase shift between carriers comes from
the 333-clock stagger, which is 60° = 360°/(m−1) of the carrier period.

## Carrier generation (`triangle_carrier`, `reference_carrier_gen`)

Each triangle generator has two counters:

- a position counter X that wraps every 2000 clocks;
- an up/down counter that holds the carrier value.

The delayed position y = (X − OFFSET) mod 2000 decides the direction:
the value counts up while y < 1000 and down otherwise. With OFFSET = 333
the carrier falls from 333 to 0 at X = 333, rises to 1000 at X = 1333 and
falls back to 333 at the end of the period. At reset the value counter is
loaded with the triangle value for X = 0 (0, 333 or 666), so it is exact
from the first clock. CAR3..CAR5 are combinational differences of the
registered CAR..CAR2.

## Sine references (`carrier_sampling`, `sine_lut`)

- **Sample counter.** A counter runs over the same 2000-clock period. In its
  last clock `sample_tick` is high.
- **Phase accumulator.** On each tick a 16-bit accumulator adds `freq_word`.
  It wraps at 65280 = 255 × 256, so `acc / 256` is a ramp over 0..254.
- **Output frequency.** It is 10 kHz × freq_word / 65280. freq_word = 327
  gives 50.09 Hz, which at 4 poles is 1500 rpm synchronous.
- **Phase indices.** The ramp is the RED index I. YELLOW and BLUE use
  J = I + 170 and K = I + 85, with 256 subtracted when the sum passes 255.
  On the 255-steps-per-turn scale these offsets are 240° and 120°, so
  YELLOW lags RED by 120° and BLUE leads it by 120°.
- **Sine table.** It holds round(255·sin(2πi/255)) for i = 0..255, signed
  9-bit. It is computed at elaboration, so no data file is needed, and it is
  read through three registered ports.
- **Scaling.** The reference is 1000 + (sine × amplitude) >>> 8. It is
  clamped to 0..2000 and registered.
- **Amplitude and saturation.** An amplitude of 1000 fills the carrier span.
  Larger values, such as 2700, overmodulate: the reference then flattens at
  0 and 2000 instead of wrapping.

Latency: the new accumulator value shows on `ref_*` 2 clocks after the tick,
and an amplitude change shows 1 clock later.

## Comparison and dead band (`phase_comparison`)

For phase reference REF and carrier CARk, the two outputs are:

```
PWM(12p + 2k + 1) = CARk <= REF
PWM(12p + 2k + 2) = REF  <= CARk - 100
```

Phases are numbered p = 0 for RED, 1 for YELLOW and 2 for BLUE, and
carriers k = 0..5, so `pwm[0]` is PWM1. The second output is the complement
of the first, held off while REF lies within 100 counts below the carrier.
That keeps both outputs of a pair low for 100 clocks (5 µs) around each
crossing, so the two switches of a leg never conduct together. An
assertion checks this every clock. All 36 outputs are registered, one clock
behind the carriers and references.

How the 36 signals map onto the 12 switches of each phase is not specified.
The outputs are numbered by phase, then carrier, then upper/lower.

## Speed loop (`qep_speed`, `pi_controller`, `speed_ctrl_top`)

- **Speed measurement.** `qep_speed` synchronises encoder channels A and B
  and counts quadrature edges (×4, signed, invalid double steps ignored) in
  a fixed 600 000-clock (30 ms) gate. For a 500-line encoder that count is
  the speed in rpm.
- **PI controller.** `pi_controller` runs once per gate:
  `out = clamp((KP·e + KI·∫e) >>> SHIFT, 0, FREQ_MAX)`, with KP = 32, KI = 8,
  SHIFT = 8 and FREQ_MAX = 436 (66.8 Hz). The integral is clamped so that it
  cannot wind up past the point where it alone saturates the output.
- **What the loop controls.** The PI output is the PWM core's `freq_word`.
  The reference amplitude is a separate input; no V/f law is built in.
- **Timing.** `freq_word` changes one clock after `speed_valid`, and the
  core uses it from its next 10 kHz sample.

## Where this RTL makes its own choices

The modulator's structure and constants are as described for this
controller: the 20 MHz clock, the 10 kHz carrier, the 333/666 stagger, the
subtraction from 2000, the accumulator limit 65280, the 0/170/85 index
offsets, the +1000 offset and the 100-count dead band. The following are
interpretations or additions:

- **Carrier step.** Every carrier steps by 1 per clock, so all six share the
  0..1000 range and 10 kHz. A "count by 2" label on the original carrier
  diagram was not followed.
- **Index wrap.** An index over 255 has 256 subtracted rather than being
  set to zero. Setting it to zero would hold the phase still for many
  samples.
- **Dead band.** It is applied as CAR − 100 for all six carriers. One
  drawing of the comparator shows "+" for two of them, which would make the
  pairs overlap rather than separate.
- **CAR3..CAR5.** They are 2000 minus CAR..CAR2. Simulated waveforms of the
  original showed them starting at 999, 1332 and 1665, which that rule does
  not give.
- **Carrier frequency.** The 10 kHz carrier of the architecture was kept.
  The system parameters also list a 2 kHz switching frequency. That would
  need a 10 000-clock period and wider carrier values: `CW` in `pspwm_pkg`
  and `HALF_PERIOD` = 5000.
- **Reference arithmetic.** The reference saturates at 0 and 2000, and the
  division by 256 rounds down. Both are this design's own.
- **Speed loop.** The measurement method, gate length, encoder resolution,
  PI gains, limits, anti-wind-up and the choice to drive frequency are all
  assumptions. The original only says that a PI loop tuned by
  Ziegler–Nichols uses the encoder speed.
- **Not in the RTL.** The power stage (Z-source networks, H-bridges), the
  gate-driver board, the motor and the encoder are analog, board-level or
  bought-in parts. Only the gate signals and encoder inputs reach them.
  The driver board gates each PWM line with an enable before its
  optocoupler; that enable is not part of this RTL. A display/panel unit
  and a serial link to a PC are also part of the original controller.
  Their function is not specified, so they are not built.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `pspwm_core` | `HALF_PERIOD` | 1000 | carrier peak; the period is twice this (≤ 1023 with `CW` = 11) |
| `pspwm_core`, `phase_comparison` | `DEAD_BAND` | 100 | dead band in counts (clocks of slope) |
| `carrier_sampling` | `ACC_MAX`, `OFFS_Y`, `OFFS_B`, `REF_OFFSET`, `REF_MAX` | 65280, 170, 85, 1000, 2000 | accumulator wrap, phase offsets, reference centre and limit |
| `sine_lut` | `DEPTH`, `AMP` | 256, 255 | table size and peak value |
| `speed_ctrl_top` | `WINDOW_CYCLES` | 600000 | speed gate (30 ms) |
| `speed_ctrl_top` | `KP`, `KI`, `SHIFT`, `FREQ_MAX` | 32, 8, 8, 436 | PI gains and output limit |

## Simulating

Every testbench is self-checking and ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5, run from the folder that
holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb -Irtl rtl/pspwm_pkg.sv tb/tb_speed_ctrl_top.sv \
  --top-module tb_speed_ctrl_top -o sim && ./obj_dir/sim
```

Swap in any other `tb_*.sv` and its top-module name. The testbenches are:

| testbench | what it checks |
|---|---|
| `tb_triangle_carrier` | three delays against the closed form; 2000-clock spacing of the peaks |
| `tb_reference_carrier_gen` | all six carriers against closed forms |
| `tb_sine_lut` | all 256 entries, on all three ports, against `$sin` |
| `tb_carrier_sampling` | 420 periods, every clock, against a real-arithmetic model; includes accumulator and index wraps and saturation |
| `tb_phase_comparison` | random and corner cases, all 36 outputs |
| `tb_qep_speed` | forward and reverse rates; an invalid step; the full 30 ms gate reading 1500 rpm |
| `tb_pi_controller` | random steps against an integer model; both limits and the integral clamp |
| `tb_pspwm_core` | defaults at 50 Hz: carriers, outputs, a 400 000-clock (50.00 Hz) reference period, 120° spacing and seven levels |
| `tb_speed_ctrl_top` | the full design at its defaults, in closed loop with `motor_encoder_model` (a first-order motor plus encoder, not synthesizable), for about 4.7 s of simulated time (about 75 s to run) |

The top-level testbench covers several set-points (1000 and 1200 rpm, one
beyond the frequency limit, and one negative). It requires the speed to
settle within 15 rpm, and it counts each mechanism at least once: samples,
sine cycles, dead band, reference saturation, both PI limits, the integral
clamp, speed updates and all seven levels.

## Limits of what is verified

The gate signals are checked against the comparison rule and the carriers
against their closed forms. The closed loop is shown to settle only against
a simple first-order motor model with 4 % slip. Harmonic distortion,
torque and the behaviour of the real power stage are not modelled. The PI
gains were chosen to be stable with that model, not tuned for a real motor.
