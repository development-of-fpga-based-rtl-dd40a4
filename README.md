# Automatic level-crossing controller (FPGA fabric)

This RTL runs an automatic level crossing where a two-track railway meets a road. Infrared beam sensors
along each track detect a train. The controller then runs the road-side
warning, lowers the barriers, gives the train a proceed aspect, and waits
for it to clear. It reopens the road only when no other train is waiting.
It also detects two problem cases:

- **Fault:** a train that never arrives. The crossing gives up and reopens.
- **Disaster:** a train stopped on the road. The crossing stays closed and
  calls for outside help.

The design is the programmable-logic half of a Zynq-style system on chip.
A processor writes a small AXI4-Lite LED register. Everything that moves or
lights up in the crossing is driven from the fabric logic described here.

The behaviour follows a published design study of an FPGA-based
level-crossing management system. That study describes the system as a
sequence of rules, state tables, timed-automaton models and a LabVIEW
prototype, not as a netlist. The RTL below is one consistent reading of it.
The places where the reading needed choices are listed in
[Departures and choices](#departures-and-choices).

## The crossing and its names

```
            Influence area            Approaching area
   L ----------------------- M (road) ----------------------- R     track 0
   L ----------------------- M (road) ----------------------- R     track 1
                     |  side A  |  side B  |
        arriving barrier part   leaving barrier part  (on each side)
```

- **Sensor zone.** Each track has three IR beams, L, M and R. M sits on
  the road. A train entering at L travels left-to-right; one entering at R
  travels right-to-left.
- **Barrier parts.** Each road side (A and B) has two barrier parts. The
  *arriving* part closes the lane that enters the crossing; the *leaving*
  part closes the lane that exits it. Each part can stand in three
  positions: raised vertical, lowered to 45°, or lowered horizontal.
- **Road sensors.** Each side has two more beams. One sees a vehicle
  standing *under* the arriving part; the other sees a vehicle still *on the
  road* inside the crossing.
- **Signals.**
  - The *road signal* goes green → yellow → red.
  - The *rail signal* goes red → green (proceed).
  - Each track has its own pair of *crossing lights*: red, and flashing
    yellow.
  - An alarm sounds while the road is being closed.
- **Plunger.** A button the train driver presses to request the crossing
  by hand. This is used after a fault, once the train can move again.

## How one train is handled

`lx_control_unit` is the central state machine. It counts in seconds from
`tick_gen`, and every aspect it shows is flashing. Its sequence:

| State | What happens | Leaves when |
|---|---|---|
| `LX_INIT` | clears everything | next clock |
| `LX_WAIT_IRQ` | road green, rail red, barriers up | the request buffer is not empty |
| `LX_WARN_GREEN` | alarm on, road still green | t1 = 3 s |
| `LX_WARN_YELLOW` | road yellow | t2 = 5 s |
| `LX_WARN_RED` | road red | t3 = 10 s |
| `LX_CHK_OBST` | all parts go to 45°; an arriving part with no vehicle under it goes on to horizontal | both arriving parts horizontal, or t4 = 20 s expires (DISASTER) |
| `LX_CHK_LOWER` | each leaving part goes horizontal once its side of the road is empty | both leaving parts horizontal, or t5 = 20 s expires (DISASTER) |
| `LX_CHK_DEPART` | after t6 = 2 s the rail signal shows proceed; the TIME-OUT timer runs | a train leaves its zone (or has already left during the checks, leaving the request buffer empty), or TIME-OUT = 20 s expires |
| `LX_CHK_BUFFER` | looks at the request buffer | empty: reopen (`LX_WAIT_IRQ`); not empty: back to `LX_CHK_OBST` with "second train arriving" |
| `LX_CHK_FAULT` | TIME-OUT expired: is a train standing on a road sensor M? | yes: DISASTER; no: fault — flush all requests and reopen |
| `LX_INFORM_DMF` | DISASTER: road and rail red, alarm on, barriers down | the `dmf_clear` input (the disaster force has cleared the crossing) |

Two safety rules are fixed in the logic, not left to timing:

- A barrier part that has gone horizontal stays horizontal until the
  crossing is released (`arr_down`/`lv_down` latches). A second train
  therefore finds the barriers already down. Its pass through
  `LX_CHK_OBST` and `LX_CHK_LOWER` takes a few clocks.
- The rail signal can show proceed only in `LX_CHK_DEPART`. That state is
  entered only when all four parts report horizontal. A concurrent
  assertion in `lx_control_unit` checks this in simulation.

`lcd_msg` carries a code (`lcd_msg_e` in `lx_pkg`) for the status display:

- train arriving
- obstacle under a barrier
- train inside the crossing
- second train arriving
- barrier not lowered in time
- no fault / first train passed
- disaster
- train passed

## Requests, TIME-OUT, fault and disaster

This is the least obvious part of the design.

**The request buffer.** `approach_buffer` is an n × 2 array of counters:
one row per track, one column per direction. The counter for a track and
direction goes up when:

- a train enters that track's sensor zone in that direction, or
- the driver presses that plunger.

It goes down when that track's zone reports the train has left. The
crossing may reopen only when every counter is zero. So a second train
that arrives while the first is still inside keeps the barriers down. It
does not matter which track or direction the second train uses.

The counters saturate at both ends. `overflow` is a sticky flag for
"more than 15 requests in one cell".

**TIME-OUT.** The timer starts when the rail signal shows proceed. Every
new request restarts it, because a newly arriving train gets a full
TIME-OUT of its own. If TIME-OUT expires before any train has left, the
control unit decides between two cases:

- **Fault.** No road sensor M is covered, so the train is stuck somewhere
  before the crossing.
  - All requests are destroyed (`buf_flush`) and the road is reopened.
  - The display says no fault, as the road is not blocked.
  - When the train can move again, its driver re-requests the crossing
    with the plunger.
- **Disaster.** A road sensor M is covered, so a train stands on the road.
  - The crossing stays closed and `disaster` is raised.
  - Only `dmf_clear` returns the unit to `LX_INIT`; it also flushes the
    buffer.

The two other DISASTER cases are barriers that fail to reach horizontal
within t4 or t5. They also end in `LX_INFORM_DMF`.

## Sensor zones and crossing lights

Each track has a `track_light_ctrl` that follows its zone. It has seven
states: Start, Idle, Approach, Crossing, Leaving, Missing and Unexpected.

- **Start.** Both lights are on after power-up, until the operator presses
  `op_reset`.
- **Idle.** The yellow light flashes. A rising L or R starts an approach
  and fixes the direction.
- **Approach → Crossing → Leaving.** The red light is on while the train
  heads for M. Once M is released the yellow light flashes again. The
  zone is left when the far sensor (R for left-to-right) has been seen and
  released.
- **Missing.** The next expected sensor did not respond within 180 s: the
  train was lost.
- **Unexpected.** A sensor fired out of order. Examples:
  - M with no train announced
  - the far sensor before M
  - L and R together
  - a second train entering the same zone

Missing and Unexpected keep red and yellow on together. Only an operator
reset leaves them. A train may cover one, two or all three beams at once;
the zone works from edges and levels, not from beam counts. `enable` low
switches both lights off, as when the control system is not working.

Each zone's `enter`/`leave` pulses, with its direction, feed the request
buffer. Its `on_m` level is what the control unit calls "train blocking
the road".

All raw sensor lines pass through `ir_sensor_in`. The IR receiver's
output is low while the beam reaches it. `ir_sensor_in` synchronises that
line, then requires a new level to hold for `DEBOUNCE` clocks. `present`
then changes `DEBOUNCE + 2` clocks after the input.

## Barrier motors

The barriers are driven open loop by four-phase stepper motors through
ULN2003 Darlington drivers.

- **`stepper_seq`** produces the coil pattern on D0..D3 for full step (one
  coil at a time) or half step. Half step is the default, with this
  pattern order (D3..D0):

      0001 0011 0010 0110 0100 1100 1000 1001

  Reversing the direction walks the table backwards. The coils are off
  while the motor is disabled.
- **`barrier_drive`** keeps a step count for one barrier part.
  - Raised is position 0. 45° is `STEPS_45` = 50 and horizontal is
    `STEPS_90` = 100 half steps.
  - It steps toward the commanded target once every `STEP_DIV` clocks.
    At the top level that is 10 steps per second, so a full 90° takes 10 s.
  - It reports raised / 45° / horizontal and keeps the coils energised
    only while moving.
  - With no limit switches, the position assumes the barrier was raised at
    reset.

## Controllers that stand beside the main path

The source study also models the crossing in two other ways. Both are
built and instantiated in the top with their own ports. They do not
interact with the main control unit.

- **Two-train controller** (`crossing_ctrl_2train` + `gate_fsm`, ports
  `x_*`). This is a timed-automaton model with states Outside,
  Entering1/2/Both, Alarm1/2/Both, Inside1/2/Both and Leaving1/2.
  - An approach closes the gate.
  - When the gate reports down, the waiting trains get green.
  - If the gate is not down within 30 s, the controller moves to the
    Alarm state and sounds the alarm.
  - The gate opens only when the last train inside leaves.
  - An approach the current state cannot take is held until it can
    (see [Departures and choices](#departures-and-choices)).
  - `gate_fsm` models the gate as Open → Closing → Closed → Opening, with
    exactly 20 s of travel in each direction; a request that arrives while
    the gate is moving is ignored.
  - The top holds each train's aspect between its green and red events:
    `x_green*` and `x_red*`.
- **RF gate sequencer** (`gate_seq_fsm`, ports `gs_*`). This is the
  prototype's gate control, driven by a 434 MHz RF link with an HT12D
  decoder.
  - A valid transmission (VT) carrying the arrival code 0001 closes the
    gate step by step with its own `barrier_drive`.
  - Then it turns on red and the buzzer and waits for the IR departure
    sensor.
  - Then it reopens the gate and shows green.
  - Other codes are ignored.

## Processor side

`led_ip` is a four-register AXI4-Lite slave, mapped at 0x43C0_0000 in a
4 KiB window. It has the usual single-beat handshakes, byte strobes and
OKAY responses. Bits 3:0 of register 0 drive `led[3:0]`. The processor,
AXI interconnect, GPIO and block-RAM controllers are vendor IP and are not
part of this RTL, so the slave port is a top-level port. `led_ip` resets
synchronously on `s_axi_aresetn`. All other logic uses the asynchronous
active-low `rst_n`, and everything runs on one clock.

## Top level: `lx_soc_top`

| Parameter | Default | Meaning |
|---|---|---|
| `CLK_HZ` | 100 000 000 | fabric clock; sets the one-second tick |
| `DEBOUNCE` | 10 000 | clocks a sensor level must hold (100 µs) |
| `STEP_HZ` | 10 | barrier motor steps per second |

Ports, grouped:

- **Track sensors.** `ir_l_n`, `ir_m_n`, `ir_r_n` are active low, one
  bit per track.
- **Road sensors.** `ir_under_gate_n` and `ir_on_road_n` are active low,
  index 0 for side A and 1 for side B.
- **Operator and driver inputs.**
  - `plunger[track][direction]`
  - `op_reset`
  - `lights_enable`
  - `dmf_clear`
- **Signals.**
  - Road: `road_green/yellow/red`.
  - Rail: `rail_green/red`.
  - Status: `alarm`, `fault`, `disaster`.
  - Display and state: `lcd_msg`, `lx_state`.
- **Crossing lights.** `track_red/yellow/error`, one bit per track.
- **Motor coils.** `arr_coil[side]` and `lv_coil[side]`, D0..D3.
- **Other controllers.**
  - `x_*`: the two-train controller.
  - `gs_*`: the RF sequencer.
  - `s_axi_*` and `led`: the LED peripheral.

The times inside the control unit are parameters of `lx_control_unit`,
counted in seconds. The top uses the defaults:

| Time | Default | Origin |
|---|---|---|
| t1 green warning | 3 s | chosen |
| t2 yellow | 5 s | the source's yellow-to-red time for signal-controlled crossings |
| t3 red before lowering | 10 s | lower end of the source's 10–12 s gate delay |
| t4, t5 lowering limits | 20 s | the gate model's 20 s travel bound |
| t6 barriers down → rail proceed | 2 s | chosen |
| TIME-OUT | 20 s | the source's prototype value |
| zone timeouts (Missing) | 180 s | chosen |
| two-train alarm | 30 s | the source's model |
| gate travel | 20 s | the source's model |

## Departures and choices

The source leaves room for interpretation, or disagrees with itself, in
these places. This is what the RTL does:

- **Barrier parts.** Four barrier parts are built: arriving and leaving on
  each of two sides. The prototype description speaks of two gates; the
  control rules speak of two-part barriers on both sides.
- **Second train.** When a second train is waiting, the barriers stay
  horizontal. One of the source's tables would lower them to 45° again;
  its rules say they remain lowered. The rules are followed.
- **Rail signal in a disaster.** It stays red. One of the source's tables
  shows it flashing green.
- **Leaving the disaster state.** The unit leaves it only on `dmf_clear`,
  and goes back to the initial state. One of the prototype's diagrams
  instead returns to the buffer check.
- **Order of the barrier checks.** The barrier-lowering check always sits
  between the obstacle check and the departure check. One diagram goes
  straight from obstacles to departure.
- **Rail signal while the train is in the crossing.** The source turns the
  rail signal red again as soon as the train enters the approaching area.
  No sensor for that point exists in the sensor set, so proceed is held
  until the train leaves its zone or TIME-OUT expires.
- **When a request is cleared.** A request counts as served when the train
  leaves its sensor zone. The source does not say where the count goes
  down.
- **A train that is already gone.** A short train can leave its zone
  while the barriers are still being checked. When departure checking
  starts, the request buffer is then empty. The unit goes straight on to
  the buffer check and reopens the road. It does not wait for TIME-OUT
  and report a fault.
- **Two-train controller.** Transitions follow the published automaton.
  Inside1 + approach2 goes to InsideBoth with no green for train 2 (as
  printed). Two approaches in the same clock go straight to EnteringBoth,
  which the automaton does not show.
- **Held approaches.** In the automaton an approach is a handshake: a
  train cannot announce itself until the controller is in a state that
  takes the event. In hardware the approach is a one-clock pulse. So any
  approach that the current state does not take is held (`pend1`,
  `pend2`) until a state takes it. This covers Leaving, Alarm, and a clock
  where another event wins.
- **Both trains leaving at once.** Two leaves in the same clock in
  InsideBoth are handled as leave1 followed by leave2.
- **Why these matter.** The random property test found that, without
  them, a train could be forgotten and the gate opened in front of it.
- **Gate model labels.** The gate model's up/down output labels are
  swapped relative to the controller's inputs. Here `lowered` is reported
  on reaching Closed and `raised` on reaching Open.
- **RF gate sequencer.** The source lists nine states but shows no
  diagram. Its listed actions are run in order. The source speaks of a
  PWM unit; the gate uses the same stepper drive as the barriers. The
  arrival code 0001 is chosen.
- **Choices the source does not address.** These are all this design's
  own: the debounce length, step rate, step counts, flash rate, counter
  widths, message encoding and reset behaviour.

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, calls `$finish`, and has a watchdog.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/lx_pkg.sv tb/tb_lx_soc_top.sv --top-module tb_lx_soc_top
./obj_dir/Vtb_lx_soc_top
```

Replace the testbench name to run another one. The testbenches:

| Testbench | Covers |
|---|---|
| `tb_lx_pkg` | lamp function, encodings |
| `tb_tick_gen` | tick period and flash toggling, measured in clocks |
| `tb_ir_sensor_in` | debounce latency (DEBOUNCE + 2), glitch rejection |
| `tb_approach_buffer` | random increments, decrements and flushes against a reference model |
| `tb_stepper_seq` | both step tables, both directions, enable |
| `tb_barrier_drive` | step counts to 45° and 90°, step spacing, reversal, coils off at rest |
| `tb_lx_control_unit` | eight scenarios (including a train gone before departure checking) with behavioural barriers and a safety monitor |
| `tb_track_light_ctrl` | both directions, unexpected and missing trains, operator reset, lights off |
| `tb_crossing_ctrl_2train` | single trains, both trains, alarm, leave order, held approach |
| `tb_two_train_properties` | controller + gate against two random behavioural trains: the model's reachability, safety (train on crossing ⇒ gate Closed; gate Open ⇒ crossing empty) and liveness properties over 2 × 120 trips |
| `tb_gate_fsm` | travel times, requests in the wrong state ignored |
| `tb_gate_seq_fsm` | wrong code ignored, full close / wait / open cycle |
| `tb_led_ip` | writes, strobes, read-back, slow BREADY/RREADY |
| `tb_lx_soc_top` | end-to-end at `CLK_HZ=200` (one second = 200 clocks), all times at their defaults |
| `tb_lx_soc_top_full` | the top with no parameter overrides |

`tb_lx_soc_top` drives the sensors the way a passing train does. It counts
each mechanism and fails on any that never occurred:

- the warning sequence
- lowering
- rail proceed
- obstacle stall, and road-vehicle stall
- second train
- plunger request
- fault with flush
- disaster, then release by `dmf_clear`
- unexpected train and missing train
- two-train controller: single train and both trains
- RF gate cycle
- LED write

A monitor checks throughout that rail proceed never appears outside the
departure state or together with road green.

`tb_lx_soc_top_full` runs at the real 100 MHz with the real one-second
tick. A complete train passage would take about 4 × 10⁹ clocks, so this
test covers the first three seconds of one operation:

- the debounce latency of a train announcement
- the 3 s green warning, measured in clocks
- the RF gate motor stepping every 10⁷ clocks
- an LED write

This takes about 3–4 minutes in Verilator. Whole passages were simulated
only at the reduced clock rate of `tb_lx_soc_top`.

## Known limits

- **Barrier position.** Nothing confirms it: no limit switches are
  modelled. A stalled motor would still be reported as horizontal.
- **The alarm path of the two-train controller** is tested in its own
  testbench. At the top level, with the default 20 s gate against the
  30 s alarm limit, it cannot occur.
- **Parts outside this RTL.** These are external parts: IR transmitters
  and receivers, RF modules, HT12E/HT12D, ULN2003 drivers, motors, the
  display, and the train's engine controller. Only their digital
  interfaces appear here.
  - The display gets a message code, not a driver.
  - The RF decoder's VT and data lines are taken as already decoded.
