# Thunderbird tail-light controller

This design copies the rear lights of a 1965 Ford Thunderbird. Each side of the car has three
lamps. A turn signal lights the lamps on its side one after another, from the middle of the car
outward. It then goes dark and starts over, so the pattern sweeps toward the direction of the turn. The
brake turns every lamp on. The hazard switch makes all six lamps flash together. The running
lights make every lamp that would otherwise be dark glow at half brightness.

The core is a small Moore state machine clocked at a few hertz. A separate layer of
combinational logic after it handles the half-brightness running lights. The state machine itself
does not change when running lights are added.

```
 LEFT RIGHT BRAKE HAZARD ─┐
 CLK  RESET ──────────────┤   taillight_fsm    lamps (6)   running_lights     led_left[2:0]
                          └─► (Moore machine) ───────────► (combinational) ─► led_right[2:0]
                 LIGHTS  DIMCLK (~100 Hz square wave) ──────────┘
```

## Files

| file | contents |
|---|---|
| `rtl/taillight_pkg.sv` | shared types: `ctrl_t` (switches), `lamps_t` (3 + 3 lamps), `state_t`, `turn_pattern()` |
| `rtl/taillight_fsm.sv` | the Moore state machine for turn, brake and hazard |
| `rtl/running_lights.sv` | LED drive logic for the running lights |
| `rtl/taillight_top.sv` | top level: the state machine followed by the running-lights logic |
| `tb/taillight_model_pkg.sv` | reference model, written independently of the RTL, used by the testbenches |
| `tb/taillight_fsm_tb.sv` | directed and random test of the state machine |
| `tb/running_lights_tb.sv` | exhaustive test of the running-lights logic |
| `tb/taillight_top_tb.sv` | end-to-end test with a model of the key-press console and the DIMCLK generator |

The design has no parameters. Three lamps per side is built into the light patterns.

## Signals and timing

| port | dir | meaning |
|---|---|---|
| `clk` | in | state clock, intended to run at about 2-3 Hz. Each rising edge is one step of a turn sequence or one half of a hazard flash |
| `reset` | in | active high and asynchronous. Forces the all-dark idle state |
| `left`, `right`, `brake`, `hazard` | in | function switches, sampled at the rising edge of `clk` |
| `lights` | in | running lights on |
| `dimclk` | in | square wave with 50% duty cycle, fast enough not to flicker (about 100 Hz) |
| `led_left[2:0]`, `led_right[2:0]` | out | lamp drives, active high. Bit 0 is the lamp nearest the middle of the car |

The outputs of a Moore machine depend only on its state, so a switch change shows on the lamps
at the next rising edge of `clk` and never before it. `lights` and `dimclk` act on the
outputs immediately, through gates only.

The switches are expected to change in step with `clk`, as they do when one host program drives
both. No synchronizer is inserted. Add a two-flop synchronizer per input if they can come from
mechanical switches or from an unrelated clock domain.

The outputs are active high. Lamps or LEDs need external buffers, or an inverting stage, and
series resistors.

## Lighting behaviour

The sequence for one side, one row per clock edge while the switch stays on (`1` = lamp on,
bit 2 on the left):

| step | turning side | note |
|---|---|---|
| 0 | `000` | dark; this is also the idle state |
| 1 | `001` | inner lamp |
| 2 | `011` | inner and middle lamps |
| 3 | `111` | all three lamps |
| 0 | `000` | starts over |

The switches are resolved in this priority order at each edge:

1. **Brake with exactly one turn signal** (whether hazard is on or off). The turning side
   continues its sequence, and the other side shows brake (`111`).
2. **Brake** in any other combination, including with hazard and with both turn signals: all six
   lamps on.
3. **Hazard, or both turn signals together**: all six lamps flash, one clock on and one clock
   off. The flash starts with "on" on the first edge.
4. **One turn signal**: that side runs the sequence, and the other side is dark.
5. **Nothing**: all dark.

Releasing a turn signal in mid-sequence aborts the sequence, and the lamps go dark at the next
edge. Pressing or releasing the brake during a turn does not restart the sequence: the turning
side continues from the step it had reached. Hazard overrides a turn signal, and brake overrides
hazard. Brake together with one turn signal still shows the turn, even if hazard is also on.

### Running lights

The running-lights logic is one OR and one AND per lamp:

```
led = fsm_lamp | (LIGHTS & DIMCLK)
```

A lamp the state machine turns on stays fully on. While `lights` is asserted, a dark lamp is
switched on and off by `dimclk`. At a 50% duty cycle and about 100 Hz the eye sees it at half
brightness. With `lights` off the state machine outputs pass through unchanged. The logic sits
outside the state machine, so `reset` does not stop the dimmed glow: during reset every lamp
shows `dimclk` if `lights` is on.

## Inside the state machine

The state machine has 17 named states (`state_t` in the package):

| states | lamps (left / right) |
|---|---|
| `S_IDLE` | `000 / 000`. This is the reset state, step 0 of a plain turn and the dark half of a hazard flash |
| `S_L1..S_L3`, `S_R1..S_R3` | turn steps 1-3 on one side, other side dark |
| `S_LB0..S_LB3`, `S_RB0..S_RB3` | turn steps 0-3 on one side, other side on (brake) |
| `S_HAZ_ON` | `111 / 111`, the lit half of a hazard flash |
| `S_BRAKE` | `111 / 111`, brake |

Several states share an output pattern but not their successors, so they cannot be merged. For
example, `S_HAZ_ON` goes dark next under hazard. `S_BRAKE` goes to `S_HAZ_ON` if the brake is
released while hazard is on. `S_LB3` goes to `S_LB0` under brake and left.

The next-state logic works in two stages:

* The **current turn step of each side** (0-3) is decoded from the state. It is 0 for any state
  that is not part of that side's sequence. The next step is that value plus one, modulo 4.
* The **priority chain** listed above picks the mode. The mode and the next step then select the
  state.

Because the step comes from the state and not from the mode, a turn carries on across brake
changes. A turn that begins from any state other than its own sequence starts at step 1. The
output decoding is a single `case` on the state.

The module contains one assertion: the two sides are never both in the middle of a sequence
(`001` or `011`) at the same time.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.

* `taillight_fsm_tb` first runs directed scenarios, with the expected lamp patterns written out
  literally. They cover both turn sequences with their 4-clock period, abort, brake, brake with a
  turn, the 2-clock hazard flash, both turns as hazard, brake over hazard, brake + hazard + one
  turn, and the asynchronous reset between edges. They also check the Moore timing: an input
  change before the edge has no effect. The testbench then compares 4,000 random switch settings,
  each held 1-6 clocks, against the reference model on every clock.
* `running_lights_tb` tries all 64 lamp patterns against every combination of `lights` and
  `dimclk`.
* `taillight_top_tb` plays a user at the console. Each key press toggles one function (keys L, R,
  B, H and O, for left, right, brake, hazard and running lights). The console pulses `reset` at
  start-up and again in mid-session. `clk` runs 40 times slower than `dimclk`. Every lamp is sampled
  at every time unit of every clock period and checked against the reference model. The
  testbench also checks that dimmed lamps follow `dimclk` with a 50% duty cycle. A directed
  session is followed by 600 clocks of random key presses. The test counts how often each
  mechanism occurs (both turn sequences, abort, brake, brake with left and with right turn, hazard
  flash, both turns as hazard, brake over hazard, running lights and reset). Any mechanism that
  never occurs counts as a failure. The top has no parameters, so this test runs the design at
  its full size.

To simulate with Verilator (from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/taillight_pkg.sv tb/taillight_model_pkg.sv rtl/taillight_fsm.sv rtl/running_lights.sv \
  rtl/taillight_top.sv tb/taillight_top_tb.sv --top-module taillight_top_tb
./obj_dir/Vtaillight_top_tb
```

Swap in the other testbench and its module to run the block tests. `taillight_fsm_tb` also needs
`tb/taillight_model_pkg.sv`. Packages must come before the files that import them.

## Design choices

The following points are decisions of this design rather than a fixed specification:

* **Lamp order.** The lamps fill from the middle of the car outward, and bit 0 is the innermost
  lamp.
* **Speed of the sequences.** There is one sequence step per clock and no prescaler. The turn
  sequence repeats every 4 clocks and the hazard flash every 2. Slow `clk` down to slow the
  lamps.
* **Both turn signals.** Both turn signals on is treated as hazard. No priority of one side over
  the other is needed, and none exists.
* **Brake changes during a turn.** The turn step is kept when the brake is pressed or released
  during a turn.
* **Hazard start.** The hazard flash starts with all lamps on.
* **Reset.** The reset is asynchronous and active high. A synchronous reset would serve just as
  well.
* **Running-lights equation.** The equation is `fsm_lamp | (LIGHTS & DIMCLK)`, and the outputs
  are active high.
* **Input timing.** Inputs are not synchronized (see above).

Outside the FPGA, a host program turns key presses into the switch signals and generates `clk`
and `reset`. A bench generator supplies `dimclk`, and an I/O board and LED drivers complete the
set-up. None of these parts is part of this RTL. The testbenches stand in for the console and the
generator.

## Size

After generic synthesis the whole design is a single register, which yosys re-encodes as 17 one-hot
flip-flops (5 bits as written), plus about 70 small logic cells. It fits easily in any small
FPGA or CPLD. A Spartan-II XC2S50, for example, has 1,536 flip-flops and 1,536 LUTs.
