# FPGA speed and direction control for DC motors

This design drives one or two small DC motors through an L298-type dual
H-bridge from a single FPGA clock. For each bridge channel it produces two
direction lines and a PWM signal on the enable line. The motor speed is set
by the PWM duty, and the direction by which of the two lines is high. One
channel also closes a speed loop. An opto-interrupter on the motor shaft
gives one pulse per turn. The pulses are counted over a one-second gate and
turned into rpm. The speed is shown on four 7-segment digits, and a PID
controller can take over the duty so that the motor holds a set speed.

Everything runs in one clock domain (50 MHz by default). The parts outside
the FPGA are off-chip: the bridge, the motor, its supply, the sensor and
any logging host. Their signals are ports of the top level.

```
              dip_sw1 ──► dir_ctrl ─────────────────────────► in1, in2
 p_b1, p_b2 ─► duty_adjust (duty A) ──┐
            └► duty_adjust (set rpm) ─┼─► pid_ctrl ─┐
                                      │             ▼
                            closed_loop ─────────► mux ─► pwm_gen ─► ena
 opto_in ─► speed_meter ─► rpm ─┬─────────────► pid_ctrl
                                └─► seven_seg_display ─► seg[3:0], dir_led
              dip_sw2 ──► dir_ctrl ─────────────────────────► in3, in4
 p_b3, p_b4 ─► duty_adjust (duty B) ───────────────► pwm_gen ─► enb
 tick_gen ─► tick (every DIV clocks) ─► both pwm_gen
```

## The bridge channels

The two channels are alike. The PWM counter of each channel advances once
per divider tick and wraps after `PWM_STEPS` ticks:

| quantity | formula | default |
|---|---|---|
| tick period | `DIV / CLK_HZ` | 5000 / 50 MHz = 100 µs |
| PWM period | `DIV * PWM_STEPS / CLK_HZ` | 10 ms (100 Hz) |
| high time | `duty * DIV / CLK_HZ` | duty 50 → 5 ms |

The duty is a 9-bit value, read as a percentage with the default 100 steps.
The output is high while the counter is below the duty, so duty 0 means
always off and any duty of `PWM_STEPS` or more means always on. The
comparator output is registered, so the enable line is glitch-free.

Direction:

| switch | IN_A (in1/in3) | IN_B (in2/in4) | motor |
|---|---|---|---|
| 1 | 1 | 0 | forward (`DIR_FWD`) |
| 0 | 0 | 1 | reverse (`DIR_REV`) |
| in reset | 0 | 0 | coasting |

Each switch is synchronised by two flip-flops, and the outputs are
registered. IN_A and IN_B change three clock edges after the switch does,
and they are never high together (there is an assertion in `dir_ctrl`).
There is no dead time or braking on a direction change. The switch is
applied at once, and the bridge and motor take the reversal. The motor
model in the testbench shows the speed passing through zero.

## Push buttons and the two modes of channel A

The buttons are synchronised and act once per PWM period while held. One
step is 1 duty point or 10 rpm, so holding a button for one second moves
the duty by 100 steps. Each register stops at 0 and at its limit. Pressing
both buttons of a pair does nothing.

- **Channel B** is always a push-button drive. `p_b3` raises the duty and
  `p_b4` lowers it, from a start value of 50 %.
- **Channel A** has two modes, chosen by the `closed_loop` switch.
  - `closed_loop = 0` (open loop): `p_b1`/`p_b2` move the duty of A, exactly
    as on channel B.
  - `closed_loop = 1` (closed loop): `p_b1`/`p_b2` move the set speed
    (start 500 rpm, range 0 to `SP_MAX` = 1000 rpm, step `SP_STEP` = 10 rpm).
    The PID output drives the PWM of A.

Each mode keeps its own register. Switching back to open loop restores the
last button duty. Switching to closed loop starts the PID from a cleared
state: integrator zero and duty 0 until the first speed reading. The motor
therefore coasts for up to one gate time (1 s) after the switch.

## Speed measurement

`speed_meter` counts rising edges of the synchronised sensor signal during
a gate of `GATE_CYCLES` clocks. At the end of each gate it scales the count:

    rpm = count * 60 * CLK_HZ / (GATE_CYCLES * PPR)

The scale factor is a constant worked out at elaboration. With the defaults
(1 s gate, one slot per turn) one pulse means 60 rpm. That resolution is
coarse. The measured speed, and so the closed loop, moves in 60 rpm steps,
and a speed between two steps reads as one or the other from gate to gate.
A longer gate or more slots per turn (`PPR`) improves the resolution. The
first costs loop speed; the second needs a different disc. The result
saturates at `2^RPM_W - 1` (16383 rpm). `rpm_valid` pulses for one clock
with each new reading. A pulse edge that falls in the last clock of a gate
is counted in the next gate, so no edge is lost.

## PID controller

`pid_ctrl` runs once per speed reading, which is once per second by
default. It is a parallel-form discrete PID in fixed point:

    e[k] = set_rpm - rpm
    I[k] = clamp(I[k-1] + e[k], -IMAX, +IMAX)                  IMAX = 8192
    u[k] = (KP*e[k] + KI*I[k] + KD*(e[k]-e[k-1])) >>> FRAC     FRAC = 8
    duty = clamp(u[k], 0, PWM_STEPS)

The gains are integers in units of 2^-FRAC. The defaults are KP = 13 ≈ 0.05
and KI = 26 ≈ 0.1 duty points per rpm, with KD = 0. They suit a motor of
about 1100 rpm at full duty, which is about 11 rpm per duty point, with a
mechanical time constant well under the 1 s sample period. The plant is
then nearly static from one sample to the next. The loop gain of the
integral term is about 1.1 per sample, and the set speed is reached within
a few samples. The clamp on the integrator is the anti-windup. Saturated
output is normal after a large set-speed step.

For a different motor, scale KP and KI by 11 / (rpm per duty point). The
duty is registered one clock after the reading. `pid_update` marks it.

## Display

`seven_seg_display` converts the measured rpm to four BCD digits (shift and
add 3, combinational). It encodes them as `gfedcba` patterns, with a lit
segment being 1 and digit 0 the units. The patterns are registered. Values
above 9999 show 9999. `dir_led` is lit while channel A runs forward. The
digits are driven statically, one 7-bit group per digit. A multiplexed
display would need a digit scanner added after this block.

## Top-level ports (`dc_motor_ctrl_top`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst | in | 1 | clock; synchronous active-high reset |
| dip_sw1, dip_sw2 | in | 1 | direction of channel A / B |
| p_b1, p_b2 | in | 1 | channel A up / down (duty or set speed) |
| p_b3, p_b4 | in | 1 | channel B duty up / down |
| closed_loop | in | 1 | 1 = PID speed control on channel A |
| opto_in | in | 1 | opto-interrupter output of motor A |
| in1..in4, ena, enb | out | 1 | bridge inputs |
| rpm, rpm_valid | out | 14, 1 | speed reading and its strobe |
| set_rpm | out | 14 | set speed |
| duty_a, duty_b | out | 9 | duty now applied to each channel |
| seg | out | 4 × 7 | display digits (`seg7_t [3:0]`) |
| dir_led | out | 1 | channel A direction indicator |
| pid_update | out | 1 | strobe: new PID duty |

All inputs are asynchronous and are synchronised inside. The buttons are
active high and are not debounced. Because a button acts only once per
10 ms PWM period, contact bounce adds at most one step.

Parameters of the top, with their defaults: `CLK_HZ` 50 000 000, `DIV` 5000,
`PWM_STEPS` 100, `GATE_CYCLES` = `CLK_HZ` (1 s), `PPR` 1, `SP_INIT` 500,
`SP_MAX` 1000, `SP_STEP` 10, `KP` 13, `KI` 26, `KD` 0. Shared constants,
the direction type and the segment table are in `rtl/dcm_pkg.sv`.

## What follows the reference design and what is chosen here

Taken from the reference board design:

- the 50 MHz clock and the divider value 5000;
- two bridge channels, with direction from DIP switches (switch set → IN1
  high, IN2 low) and duty from push buttons;
- the 9-bit duty register starting at 50, and the 11-bit PWM counter
  compared with the zero-extended duty through a registered comparator;
- speed sensing by counting opto-interrupter pulses, one per turn, over a
  fixed period;
- a PID controller between the speed reading and the PWM generator;
- a 7-segment speed display and a direction indication.

Chosen here, and worth checking against your hardware:

- one clock domain: the divider gives a clock enable instead of a divided
  clock, and its counter is 13 bits wide so that 5000 fits;
- 100 PWM steps;
- the button-to-channel assignment and the step rate;
- the `closed_loop` switch, and closing the loop on channel A only;
- the 1 s gate;
- the PID gains, number format and anti-windup;
- synchronisers on all inputs, and the reset values;
- the display format.

## Files and simulation

`rtl/` holds one module per file. `tick_gen`, `pwm_gen`, `duty_adjust`,
`dir_ctrl`, `speed_meter`, `pid_ctrl`, `seven_seg_display` and the top
`dc_motor_ctrl_top` are the blocks. `sync2` and `bin2bcd` are helpers, and
`dcm_pkg` is the package. Each block has a self-checking testbench
`tb/tb_<module>.sv`, which compares the block against values it works out
itself. Each testbench ends by printing `TB_RESULT checks=N failures=M`.

- `tb_dc_motor_ctrl_top` runs the whole controller end to end on a scaled
  time base (100 kHz, divider 10). It includes a behavioural motor
  (`tb/motor_model.sv`), a first-order speed lag with 1095 rpm at full duty
  and a 0.2 s time constant. It covers the reset state, button steps and
  both clamps, both direction changes, open-loop speed against the model,
  the closed loop settling at 500, 800 and 300 rpm, set-speed changes and
  the return to open loop. It counts each of these events and fails if one
  never happens. It runs in a few seconds.
- `tb_speed_sweep` steps the closed-loop set speed from 100 to 1000 rpm in
  100 rpm steps, then runs at full duty in open loop (about 1095 rpm). At
  each point it checks the mean speed to within one 60 rpm count, and it
  checks the display. It runs in a few seconds.
- `tb_dc_motor_ctrl_full` uses the top at its default parameters. It covers
  a 10 ms PWM period at 50 % on both channels and two 1 s speed gates
  checked against the model and the display. Then comes the first PID
  update in closed loop, checked against the PID law. It simulates 3 s,
  which is 150 M clocks and takes about 80 s in Verilator.

To run a testbench, for example the end-to-end one:

    verilator --binary --timing --assert --timescale 1ns/1ps \
      --top-module tb_dc_motor_ctrl_top -y rtl -y tb +libext+.sv -Irtl \
      rtl/dcm_pkg.sv tb/tb_dc_motor_ctrl_top.sv
    ./obj_dir/Vtb_dc_motor_ctrl_top

To lint a module, use `verilator --lint-only -Wall -y rtl rtl/dcm_pkg.sv
rtl/<module>.sv`. Linting a module alone also reports the package constants it
does not use. Apart from those notes, the only lint warning is the
intentionally open `dir` output of channel B's `dir_ctrl` instance. The RTL is synthesizable
SystemVerilog-2017 with no vendor primitives. The whole controller is
about 190 flip-flops.
