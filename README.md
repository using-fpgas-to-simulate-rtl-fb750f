# Two-train model railway: VGA simulator and DCC track controller

This RTL is the hardware behind a digital-design lab built around a model
railway. Two trains share a layout of an outer loop, an inner loop and a spur,
with three switches and five sensors. The lab's central piece is a *train
controller*: a state machine that reads the sensors and sets track power,
train direction and the switches so that the trains never collide or derail.
The same controller plugs into two systems with an identical interface:

* **Simulator system** (`train_sim_system`). A simulator core models the
  layout, moves the trains, produces the sensor signals and watches for
  safety violations. A VGA interface draws the layout on a monitor. On a
  violation the simulation stops and the place where it happened blinks. A
  controller can be tried here without risk.
* **Track system** (`track_ctrl_system`). A track controller core turns the
  controller's outputs into signals for a real DCC (Digital Command Control)
  HO layout. Each locomotive gets its own digital speed/direction command,
  sent as a bipolar bit stream on the rails through an LMD18200 H-bridge.
  Switch changes become 100 ms coil pulses, and the photointerrupter sensors
  are synchronised and filtered.

`train_lab_top` places both systems side by side. They share clock and
reset, and each has its own controller instance. On a board they would be
two separate FPGA configurations.

## The controller interface

The package `train_pkg` defines the interface shared by both systems:

| signal | width | meaning |
|---|---|---|
| `sensors` | 5 | one per segment, high while a train is at the sensor point |
| `cmd.track` | 2 | per train: 1 = power on (train runs), 0 = train stops |
| `cmd.fwd` | 2 | per train: 1 = forward, 0 = reverse |
| `cmd.sw` | 3 | per switch: 1 = inside route, 0 = outside route |

Speed is not under the controller's control. It comes from outside, as a
4-bit speed step per train (0 = stop, 14 = fastest).

Two choices here are this design's own:

* Track power is one bit per train. A DCC layout powers the whole track, so
  "power to a train" is the natural meaning.
* Switch value 1 means the inside route. The physical switches have one
  coil for the inside route and one for the outside route.

## The layout model

The layout has five segments and three switches. Each switch has a trunk
leg and two branch legs, "outside" and "inside".

```
 segment   end 0                     end 1
 OUTER_L   BL switch, outside leg    TOP switch, trunk
 OUTER_R   TOP switch, outside leg   BR switch, outside leg
 BOTTOM    BR switch, trunk          BL switch, trunk
 INNER     BL switch, inside leg     BR switch, inside leg
 SPUR      TOP switch, inside leg    dead end (bumper)
```

* The outer loop is BOTTOM, OUTER_L, OUTER_R.
* The inner loop is BOTTOM, INNER. The two loops share the bottom stretch.
* The spur leaves the top of the outer loop and crosses the inner loop at
  the middle of both segments.

This topology is this design's reading of a short description and a screen
image. The original's exact geometry may differ.

### Motion

A train is a point. Its state is:

* its segment;
* a position from 0 to `SEG_LEN-1` within that segment;
* a heading: the end it moves towards when running forward.

While a train's power is on, it adds its speed step to an accumulator on
every clock. It moves one position each time the accumulator passes
`STEP_DIV`. At full speed a train therefore moves one position every
`STEP_DIV/14` clocks.

At the end of a segment, the switch decides where the train goes:

* A train entering a switch at the trunk follows the switch's setting.
* A train entering at a branch leg passes only if the switch is set for that
  leg.

### Safety rules

There are two kinds of violation:

* **Derailment**: a train runs backwards through a switch that is set against
  it.
* **Collision**: both trains are in one segment, or both are within
  `SENSOR_WIN` positions of the crossing.

On either violation, every train stops. The kind of violation and its
segment are kept until reset. A train that reaches the end of the spur stops
at the bumper; this is not a violation.

### Sensors

Sensor *i* is high while a train is within `SENSOR_WIN` positions of the
middle of segment *i*. On the real layout, the photointerrupters likewise
see a train only as it passes.

## The example controller

`train_controller` is one possible controller, not the only correct one. It
runs this pattern:

* Train A runs round the outer loop.
* Train B runs round the inner loop.
* Both run clockwise (forward) by default. With `CLOCKWISE = 0`, both run
  counter-clockwise (reverse).
* The shared bottom stretch is a resource that one train holds at a time.

The rules:

* **A asks** for the bottom at the sensor of the outer side that leads into
  it: OUTER_R when clockwise, OUTER_L when counter-clockwise. **A releases**
  it at the other outer side's sensor, once it has left the bottom.
* **B releases and asks again** at the INNER sensor.
* A train that asks while the other train holds the bottom has its power cut.
  It stands at its sensor until the bottom is handed to it. A has priority
  when both trains are waiting.
* The BL and BR switches are set for the holder: outside for A, inside for
  B. They keep their setting while nobody holds the bottom.
* The top switch stays on the outside route, so the spur is unused.

Sensor events are rising edges. Assertions check two rules: the holder never
waits, and at most one train waits.

The simulator's start positions are chosen to suit the direction. Each
train starts where it does not yet need the bottom, or just before the
sensor where it first asks for it:

| direction | train A (OUTER_L) | train B (INNER) |
|---|---|---|
| clockwise | position 0 | position 1 |
| counter-clockwise | position `SEG_LEN-1` | position `SEG_LEN-2` |

Priority is fixed: A goes first. A B-first rule would starve A in this
pattern, because B asks again at the same moment it releases.

## DCC generation (track system)

The rails carry a square wave whose polarity flips twice per bit. The
decoder in each locomotive tells the bits apart by the time between zero
crossings. It also powers the locomotive from the rectified track voltage.

| block | what it does |
|---|---|
| `dcc_packet_builder` | One per train. Registers a 3-byte baseline packet: address `0AAAAAAA`; instruction `01DCSSSS` (D = 1 forward, C = 0, stop = `0000`, speed step n sent as n+1, max 15); check byte = address XOR instruction. Power off sends stop. |
| `dcc_serializer` | Sends 14 preamble ones, then `0 addr 0 instr 0 check 1`, MSB first. The two trains' packets alternate without pause. A packet is copied at its first preamble bit, so a change made during a packet goes out from that train's next packet on. |
| `hbridge_if` | Drives each bit as a high half period, then a low half period, on the LMD18200's DIR pin: 58 µs halves for a 1 and 100 µs halves for a 0. PWM is held high and BRAKE low. |

The timing gives whole bits of 116 µs for a 1 and 200 µs for a 0. These
lie inside the accepted ranges of 110–190 µs for a 1 and 190 µs–12 ms for a
0. The packet format, the 14-bit preamble and the DCC addresses 3 (train A)
and 4 (train B) are taken from the NMRA standard or chosen here.

Because the stream never stops, every command is repeated until it changes.
This matters because DCC is one-way and a lost packet cannot be detected.
The steady signal also keeps the rails powered.

### Serializer handshake

`dcc_serializer` and `hbridge_if` are joined by a bit/take handshake:

* `bit_out` is always valid.
* `take` is a one-clock pulse when the H-bridge interface captures a bit at
  the start of a bit period.
* The next bit appears one clock later.

## Switches and sensors (track system)

`switch_pulser` compares each switch input with its last value:

* A rising edge fires the switch's inside coil for `PULSE_MS` (100 ms).
* A falling edge fires its outside coil for the same time.
* A change during a pulse cuts that pulse short and fires the other coil.
* After reset the remembered value is 0 (outside). A switch the controller
  wants inside therefore gets a pulse at start.

An assertion checks that the two coils of one switch never fire together.
The outputs are logic-level signals; an external driver switches +12 V onto
the coil.

`sensor_input` handles the sensor lines:

* Each line passes a two-flop synchroniser.
* A filter then accepts a new level only after it has been stable for
  `FILTER_CYCLES` clocks (1 ms by default).
* `ACTIVE_LOW` inverts the lines for sensor circuits that pull low.
* Latency is `FILTER_CYCLES + 2` clocks.

## VGA display

`vga_interface` uses `vga_sync` for 640×480 at 60 Hz timing: 800 × 525
clocks per frame, active-low syncs, designed for a 25 MHz pixel clock. The
renderer draws fixed rectangles:

* the outer rectangle;
* the inner rectangle, standing on the outer loop's bottom;
* the spur, running down from the top;
* an 11×11 marker for each train;
* one square per sensor and one per switch.

| item | colour (4 bits per channel) |
|---|---|
| background | grey |
| free track | white |
| train A's marker | red |
| segment holding train A | pink |
| train B's marker | blue |
| segment holding train B | light blue |
| sensor | yellow when active, dark grey when idle |
| switch | green when set inside, white when set outside |

After a violation, the segment where it happened blinks black, toggling
every 16 frames. Colour and sync outputs are registered together, one clock
after the pixel counters.

Each segment's centre line is a polyline from its end 0 to its end 1, with
a length of `PLEN` pixels (816, 816, 160, 696 and 248 for the five
segments). A train at position *p* is drawn *p*·`PLEN`/(`SEG_LEN`−1) pixels
along that line. The marker centres are computed once per frame, at its
first pixel, so a marker never tears.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `CLK_HZ` | 25 000 000 | top, track system, pulser, H-bridge IF | system clock (also the VGA pixel clock) |
| `SEG_LEN` | 64 | top, simulator | positions per segment (at most 256) |
| `STEP_DIV` | 5 000 000 | top, simulator | accumulator threshold; full speed crosses a segment in about 0.9 s |
| `SENSOR_WIN` | 2 | simulator | half-width of the sensor and crossing zones |
| `CLOCKWISE` | 1 | top, both systems, controller | running direction of the example controller |
| `START_A`, `START_B` | 0, 1 | `sim_core` | start positions (set by `train_sim_system`) |
| `PULSE_MS` | 100 | top, pulser | switch coil pulse length |
| `FILTER_CYCLES` | `CLK_HZ/1000` | track core | sensor filter (1 ms) |
| `HALF1_US`, `HALF0_US` | 58, 100 | `hbridge_if` | DCC half periods |
| `ADDR_A`, `ADDR_B` | 3, 4 | track core | DCC addresses |
| `PREAMBLE` | 14 | serializer | preamble length |

Of these values, only the 100 ms pulse, the two trains, the five sensors and
the three switches come from the lab description. Every other value is this
design's choice.

## Files

* `rtl/train_pkg.sv` holds the shared types: `train_cmd_t`, `sim_state_t`,
  `dcc_pkt_t`, and the segment and violation enums.
* The hierarchy is:

  ```
  train_lab_top
  ├── train_sim_system
  │   ├── sim_core
  │   ├── train_controller
  │   └── vga_interface ── vga_sync
  └── track_ctrl_system
      ├── track_ctrl_core
      │   ├── dcc_packet_builder ×2
      │   ├── dcc_serializer
      │   ├── switch_pulser
      │   └── sensor_input
      ├── train_controller
      └── hbridge_if
  ```
* `tb/` has one self-checking testbench per module except `vga_sync`, which is tested through `vga_interface`. Each is named `tb_<module>.sv`.
  Each ends with a `TB_RESULT checks=N failures=M` line.
* `tb/dcc_rx_model.sv` is a behavioural DCC decoder. It plays the
  locomotive, measures the half periods on the DIR line and parses packets.
* `tb/tb_train_lab_top.sv` is the end-to-end test, at a 1 MHz clock with
  16-position segments. It counts every mechanism: both trains made to wait,
  route changes, stop packets, coil pulses on both coils, sensor glitch
  rejection, speed changes, derailment detection, freezing and blinking. A
  mechanism that never happens counts as a failure. The derailment is
  provoked by forcing the simulator's switch inputs against train A.
* `tb/tb_train_lab_full.sv` runs the top at all default parameters. It
  decodes both locomotives' packets (1450- and 2500-clock halves), measures
  two full 100 ms coil pulses (2 500 000 clocks), checks train A's progress
  and checks the VGA line and frame periods. It takes a few seconds.

To simulate one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/train_pkg.sv tb/tb_train_lab_top.sv --top-module tb_train_lab_top
./obj_dir/Vtb_train_lab_top
```

To lint one module:

```
verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/train_pkg.sv rtl/<module>.sv
```

## How far to trust it

All modules pass Verilator lint and the slang front end, and every testbench
passes. The remaining lint warnings are unused observation outputs and
unused bits.

These parts follow the lab description and are reliable:

* the system structure;
* the controller interface;
* speed and direction converted to repeated, registered DCC commands;
* edge-triggered 100 ms switch pulses;
* the violations detected;
* stopping and blinking on a violation.

These parts are this design's own:

* the layout topology and its numbering;
* the motion model;
* the controller's pattern (only the clockwise/counter-clockwise choice is
  a variation named in the lab description);
* the packet details taken from the NMRA standard;
* all timing values except the 100 ms pulse;
* sensor filtering;
* the screen geometry and colours.

DCC can also switch locomotive functions such as lights. The controller
interface has no signal for them, so none are sent.

The design stops at the FPGA pins. It does not include the H-bridge power
stage, the sensor circuits, the switch coil drivers or the locomotive
decoders. Nothing has been tried on a board or a real layout.
