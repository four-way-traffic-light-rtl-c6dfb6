# Four-way traffic light controller with congestion and emergency handling

A fixed-time traffic light gives every road the same share of the cycle, whether
its queue is long or empty, and it cannot make way for an ambulance. This
controller runs a four-way junction from a fixed sequence of lamp patterns. It
changes that sequence in two ways:

* **Density.** Each road's green time is set from four IR vehicle sensors
  placed along its approach. An empty road gets a short green and a congested
  road a longer one.
* **Emergency.** An RF receiver on each road reports an approaching emergency
  vehicle, such as an ambulance, a fire engine or a VIP car. That road gets
  green as soon as the junction can safely give it, and keeps it while the
  vehicle is there.

The controller also uses the stop-line IR sensor to catch vehicles that cross
on red.

The whole design is synchronous logic of a few hundred cells. At its default
parameters it runs from a 50 MHz board clock, which is the oscillator of the
Altera DE0 board it was sized for.

## The junction and its signal heads

There are twelve signal heads:

| heads   | what they control                    | road mapping                                       |
|---------|--------------------------------------|----------------------------------------------------|
| C1..C4  | the vehicle flows, one head per road | West = C1, East = C2, North = C3, South = C4       |
| S1..S8  | the pedestrian crossings             | all eight always show the same colour              |

Note that the heads are not numbered in road order. The controller serves the
roads in the order West, North, East, South, so it drives C1, C3, C2, C4 in
turn. Inside the RTL, roads are indexed in service order (`tlc_pkg::road_t`,
W=0, N=1, E=2, S=3), and `tlc_pkg::center_of()` maps a road to its head.

Each lamp output is one-hot: `3'b100` red, `3'b010` yellow, `3'b001` green
(`tlc_pkg::lamp_t`). Each bit can drive one bulb.

## The light cycle

The sequencer (`tlc_fsm`) is a Moore machine with eleven states. After reset it
runs through them in this order and then repeats from WEST1:

| state   | C1 | C2 | C3 | C4 | S1..S8 | default time |
|---------|----|----|----|----|--------|--------------|
| INIT    | R  | R  | R  | R  | R      | 5 s (only after reset) |
| WEST1   | Y  | R  | R  | R  | R      | 5 s          |
| WEST2   | G  | R  | R  | R  | R      | West green   |
| WEST3   | Y  | R  | Y  | R  | R      | 5 s          |
| NORTH1  | R  | R  | G  | R  | R      | North green  |
| NORTH2  | R  | Y  | Y  | R  | R      | 5 s          |
| EAST1   | R  | G  | R  | R  | R      | East green   |
| EAST2   | R  | Y  | R  | Y  | R      | 5 s          |
| SOUTH1  | R  | R  | R  | G  | R      | South green  |
| SOUTH2  | R  | R  | R  | Y  | Y      | 5 s          |
| PED     | R  | R  | R  | R  | G      | 20 s         |

Each yellow state shows two kinds of yellow at once:

* The head that was green turns yellow, meaning "stop".
* The head that is about to turn green also shows yellow, meaning "get ready".

For example, WEST3 shows yellow on both C1 and C3. The pedestrian heads
follow the same rule in SOUTH2.

The table times of the greens are West 20 s, North 20 s, East 10 s and South
25 s. With those times a cycle from WEST1 to the end of PED takes 120 s.

`light_decoder` holds the lamp table. It is pure combinational logic, driven
by the state register.

## Timing: everything moves on a one-second tick

`tick_gen` divides the clock by `CLK_HZ / TICK_HZ` and produces a pulse one
cycle wide. The sequencer works as follows:

* On entry to a state it loads a down-counter with the state's duration
  minus one.
* It leaves the state on the tick that finds the counter at zero.
* Every state change happens on a tick.

As a result each state lasts exactly its duration in ticks. The one exception
is INIT after reset: the first tick comes one divider period after reset is
released, so INIT can run up to one clock cycle longer.

The `remain` output shows the counter. It is the number of seconds left in the
state, minus one, and is useful for a countdown display.

## Congestion: how the green time is chosen

`density_timer` counts how many of a road's four IR sensors see a vehicle:

| occupied sensors | green time                     |
|------------------|--------------------------------|
| 0                | `GREEN_MIN` (5 s)              |
| 1 or 2           | the table time of that road    |
| 3 or 4           | table time + `GREEN_EXT` (10 s)|

The sequencer samples a road's green time on the clock cycle it enters that
road's green. Changes in occupancy during the green do not stretch or shorten
it. Yellow, start-up and pedestrian times are fixed.

## Emergency preemption

This is the part of the behaviour with the most cases. `emergency_arbiter`
reduces the four RF lines to "some request" plus one winning road. The lowest
road index wins: West, then North, East, South. The sequencer then applies
these rules on each tick:

1. **The emergency road already has green.** Its counter is frozen while the
   road's RF line stays high. The green lasts as long as the vehicle is there,
   and then runs its normal time.
2. **Another road has green, or the pedestrians have green.** The machine
   enters an extra state, `EMG_CLR`. For `YELLOW_S` seconds the head that was
   green shows yellow alone, and every other head shows red. The machine
   remembers which head that was in `clr_src`. It then goes to the emergency
   road's green. If the request has already gone by then, it still goes to
   that road's green.
3. **A request arrives during INIT or a yellow state.** The state finishes its
   normal time. Then, instead of the next state of the cycle, the machine goes
   straight to the emergency road's green. Every yellow head turns red at that
   point, so the jump is as safe as a normal change.

After the emergency green, the cycle goes on from that road as usual. For
example, after an emergency green on South it continues with SOUTH2 and then
PED. Any road skipped this way waits for the next cycle.

Two consequences are worth knowing:

* With requests on two roads, the lower-numbered road is served first. When
  its request drops, rule 2 moves the junction to the other road.
* A road whose RF line is stuck high keeps its green forever. Nothing limits
  how long a request can hold the junction.

## Red-light violations

`violation_detector` treats IR sensor 0 of each road as lying across the stop
line. A vehicle that stops correctly stands behind that sensor. If the sensor
sees a new vehicle (a rising edge) while the road's own head is red, the
detector does two things:

* It raises `violation[road]` for one cycle.
* It increments a saturating counter, `viol_count[road]`.

The edge detector keeps following the sensors during reset. A vehicle already
standing on the sensor when reset ends is therefore not counted.

## Top level: `traffic_light_top`

| port         | dir | width        | meaning |
|--------------|-----|--------------|---------|
| `clk`        | in  | 1            | board clock, `CLK_HZ` |
| `rst_n`      | in  | 1            | synchronous, active low; hold it for at least 3 cycles |
| `ir`         | in  | [4][4]       | IR sensors, `ir[road][k]`, road W N E S, k = 0 at the stop line; asynchronous, active high |
| `rf`         | in  | [4]          | RF emergency detect per road; asynchronous, active high |
| `center`     | out | [4] lamp_t   | C1..C4 (`center[0]` = C1) |
| `side`       | out | [8] lamp_t   | S1..S8 |
| `state`      | out | state_t      | current sequencer state |
| `remain`     | out | 8            | seconds left in the state, minus one |
| `violation`  | out | [4]          | one-cycle red-light violation pulse per road |
| `viol_count` | out | [4][8]       | violations per road, saturating |

Sensor lines pass a two-flop synchroniser (`sync2`), so the controller sees
them two cycles late. These flops have no reset. That is why `rst_n` must be
held for at least three cycles: the synchroniser needs that long to settle.
The lamps are decoded combinationally from registered state.

An assertion in the top checks the junction's safety rule on every cycle: at
most one green among C1..C4 and the pedestrian heads. The sequencer also
asserts two things: its state is always legal, and the state changes only on
a tick.

### Parameters

| parameter  | default    | meaning |
|------------|------------|---------|
| `CLK_HZ`, `TICK_HZ` | 50,000,000, 1 | clock rate and tick rate |
| `INIT_S`   | 5          | all-red time after reset |
| `YELLOW_S` | 5          | every yellow, including the emergency clearance |
| `PED_S`    | 20         | pedestrian green |
| `GREEN_W/N/E/S` | 20/20/10/25 | table green times |
| `GREEN_MIN`, `GREEN_EXT` | 5, 10 | short green, congestion extension |
| `VIOL_CNT_W` | 8        | width of each violation counter |

Durations are held in 8 bits (`tlc_pkg::TW`), so no state may last longer
than 255 s.

## What is taken from the original design and what is added

The following come from the original design of this controller:

* the eleven states and their order
* every lamp pattern
* the 5 s yellows, the table green times and the 20 s pedestrian phase
* four IR sensors and one RF module per road
* the intent that the IR sensors measure congestion and catch rule-breakers,
  and that the RF modules give emergency vehicles way

The following are choices made for this implementation, because the original
gives only the intent:

* **Density levels.** The three occupancy levels and the 5 s and +10 s
  amounts.
* **Emergency handling.** The preemption rules above, including the extra
  `EMG_CLR` state and the fixed priority.
* **Violation rule.** The stop-line definition of a violation.
* **Time base.** The one-second tick, the synchroniser, the one-hot lamps and
  the reset behaviour.

Points where the original is ambiguous:

* **Side signals.** The original speaks both of six side signals and of eight
  (S1..S8, twelve heads in all). This design has eight.
* **South green.** The original gives South's green as 25 s in its time
  table and 20 s in its step-by-step description. This design uses 25 s,
  which keeps the table's 120 s cycle consistent.
* **Start-up.** The all-red start-up lasts 5 s and then West gets 5 s of
  yellow before its first green.

The original design also mentions a CAN controller on the FPGA board. It does
not say what that controller carries, so it is not part of this RTL. The
sensors and RF receivers themselves are off-chip modules, and the top brings
out their lines as inputs.

## Files

| file | contents |
|------|----------|
| `rtl/tlc_pkg.sv` | shared types: road, lamp, state; road-to-head mapping |
| `rtl/traffic_light_top.sv` | top level, wiring of all blocks |
| `rtl/tick_gen.sv` | clock divider to the 1 s tick |
| `rtl/sync2.sv` | two-flop synchroniser for the sensor lines |
| `rtl/density_timer.sv` | IR occupancy to green time |
| `rtl/emergency_arbiter.sv` | RF requests to one emergency road |
| `rtl/tlc_fsm.sv` | the light sequencer with emergency preemption |
| `rtl/light_decoder.sv` | state to lamp patterns |
| `rtl/violation_detector.sv` | red-light violation detection and counting |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_traffic_light_top.sv` | end-to-end scenario at a divided clock |
| `tb/tb_traffic_light_full.sv` | start-up at the real 50 MHz time base |
| `tb/tb_congestion_sweep.sv` | each road congested in turn, then all roads empty |

## Simulating

Every testbench checks itself. It prints
`TB_RESULT checks=N failures=M` and stops, and it has a watchdog that ends a
hung run with a failure. With Verilator 5, a testbench is built and run like
this:

```
verilator --binary --timing --assert -Irtl \
    rtl/tlc_pkg.sv rtl/traffic_light_top.sv tb/tb_traffic_light_top.sv \
    --top-module tb_traffic_light_top
./obj_dir/Vtb_traffic_light_top
```

For another block, use its own file in place of `traffic_light_top.sv`.
`-Irtl` lets Verilator find the sub-modules.

`tb_traffic_light_top` sets `CLK_HZ = 4`, so one second takes four cycles.
Every other parameter keeps its default. It checks each lamp pattern and how
long it lasts through:

* a full cycle with short, normal and extended greens
* two simultaneous emergencies, showing priority, preemption of a green and a
  green held beyond its time
* preemption of the pedestrian phase
* a request during a yellow
* one red-light violation

It also counts how often each of these mechanisms happened, and fails if any
never did.

`tb_congestion_sweep` runs five light cycles at the same divided clock. In
each of the first four cycles one road is congested (all four sensors
occupied) and the others are lightly loaded. The fifth cycle has every road
empty. For each green it checks two things: the length of the green, and that
every other head, pedestrians included, stays red throughout.

`tb_traffic_light_full` runs the unmodified top at 50 MHz. It covers reset,
5 s all red, 5 s West yellow and West green, about 500 million cycles, which
takes about six minutes. A complete 120 s cycle at full clock rate (6 billion
cycles) is only covered at the divided clock.

## How far to trust it

* All blocks pass their testbenches.
* Each testbench has been shown to fail against a copy of its block with one
  deliberate bug.
* The RTL lints cleanly with Verilator and elaborates in Yosys/slang. No
  latches were inferred.
* It has not been run on hardware.
* The emergency and density behaviour is this design's interpretation of a
  goal the original states only in words. Check it against local traffic
  rules before using it for anything real.
