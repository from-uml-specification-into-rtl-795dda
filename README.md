# Beverage-mixer logic controller as a hierarchy of concurrent FSMs

This is a small FPGA logic controller for an industrial beverage mixer. Two
ingredient tanks are filled and their contents prepared. Meanwhile a trolley
is loaded with two containers and moved under a mixing tank. The ingredients
are then poured into the mixing tank and mixed for a timed period. Both
containers are filled from the mixing tank, and the trolley is driven back
home. The controller reads 13 sensor inputs (`x1`..`x13`) and drives 12
actuator outputs (`y1`..`y12`).

The main idea is how the controller is built. The behaviour is specified as
a *hierarchical, concurrent* state machine, in the style of statecharts:

- some states are composite and contain smaller machines;
- some composite states contain two machines that run in parallel.

This hierarchy is then mapped, one-to-one, onto a set of small flat
Moore FSMs. A superior machine starts its sub-machines with an activation
signal (`in_*`). The sub-machines report back with completion signals
(`ce_*`). Each FSM is a separate module of a few lines. The whole controller
uses 14 state flip-flops.

## The process being controlled

| signal | meaning | | signal | meaning |
|---|---|---|---|---|
| `x1` | start button | | `y1` | prepare ingredient 1 |
| `x2` | ingredient 1 prepared | | `y2` | prepare ingredient 2 |
| `x3` | ingredient 2 prepared | | `y3` | deliver containers onto the trolley |
| `x4` | containers placed on the trolley | | `y4` | mixer motor (also starts the mixing timer) |
| `x5` | tank 1 full | | `y5` | tank 1 outlet valve |
| `x6` | tank 1 not empty | | `y6` | tank 2 outlet valve |
| `x7` | tank 2 full | | `y7` | fill container 1 |
| `x8` | tank 2 not empty | | `y8` | fill container 2 |
| `x9` | mixing timer still running | | `y9` | move trolley right (home) |
| `x10` | container 1 filled and closed | | `y10` | tank 1 inlet valve |
| `x11` | container 2 filled and closed | | `y11` | tank 2 inlet valve |
| `x12` | trolley at home position | | `y12` | move trolley left |
| `x13` | trolley at the left end | | | |

The mixing time is not measured inside the controller. `y4` starts an
external timer, and that timer's output comes back as `x9`. `x9` stays high
while mixing must go on.

One production cycle, as a hierarchical state machine:

```
Start --[x1 & !x4]-->
  "Beverage preparation and movement to the left"     (two parallel regions)
  |  Tanks:   "Preparation of ingredients"             (two parallel regions)
  |           |  Tank 1: fill (y10) --[x5]--> prepare (y1) --[x2]--> done
  |           |  Tank 2: fill (y11) --[x7]--> prepare (y2) --[x3]--> done
  |           --> "Filling of tank 3 and mixing" (y4,y5,y6) --[!x6 & !x8 & !x9]--> done
  |  Trolley: load (y3) --[x4]--> move left (y12) --[x13]--> done
  --> "Filling of containers"                          (two parallel regions)
  |  Container 1: fill (y7) --[x10]--> done
  |  Container 2: fill (y8) --[x11]--> done
  --> "Movement to the right" (y9) --[x12]--> Start
```

A composite state is left when all its parallel regions have finished.

## From hierarchy to flat FSMs: activation and completion

Each machine of the hierarchy becomes its own module:

| module | role | activated by | activates | reports |
|---|---|---|---|---|
| `process_fsm` | master: Start / preparation / filling / move right | — | `in_bev_prep`, `in_filling` | — |
| `tanks_fsm` | prepare ingredients, then mix | `in_bev_prep` | `in_prep` | `ce_tanks` |
| `trolley_fsm` | load, move left | `in_bev_prep` | — | `ce_trolley` |
| `tank1_fsm` | fill tank 1, prepare ingredient 1 | `in_prep` | — | `ce_tank1` |
| `tank2_fsm` | fill tank 2, prepare ingredient 2 | `in_prep` | — | `ce_tank2` |
| `container1_fsm` | fill container 1 | `in_filling` | — | `ce_container1` |
| `container2_fsm` | fill container 2 | `in_filling` | — | `ce_container2` |

Two rules turn the hierarchy into these flat machines.

**Activation.** A superior machine holds an `in_*` output high for as long
as it stays in a composite state. Every subordinate machine gets an extra
`Idle` state. From `Idle` it enters its first real state on the clock after
`in_*` rises. From *every* other state it returns to `Idle` on the clock
after `in_*` falls. This return takes priority over any forward transition.
Parallel regions are simply machines that share the same `in_*` signal.

**Completion.** Every subordinate machine also gets an extra `End` state.
This state replaces the final state of the region. The machine waits in
`End` with its `ce_*` output high. The superior machine's exit from the
composite state is guarded by the AND of the `ce_*` signals of all its
regions, for example `ce_tanks & ce_trolley`. This is how the joins of the
parallel regions are built. Once the superior machine moves on, `in_*` falls
and the subordinates go back to `Idle`, ready for the next cycle.

One consequence matters when you change the design. With the master used
here, a subordinate machine only loses its activation once it is already in
`End`. So its early exits to `Idle` (from the working states) never fire
in normal operation. They fire only when a superior machine is changed to
leave a composite state early. They are kept so that every sub-machine is
correct on its own, and the unit testbenches exercise them.

The interfaces are single-bit and there is no bus. Concurrent assertions in
`mixer_top` check the handshake:

- a `ce_*` signal only rises while its `in_*` was high on the previous clock;
- the master's two composite states never overlap;
- the trolley is never driven left (`y12`) and right (`y9`) at once.

## Timing

Every machine is a Moore FSM. Its state register is updated on the rising
clock edge, and its outputs are decoded from that state only. No input
reaches an output without going through a register. Each level of the
hierarchy therefore adds one clock of latency. Suppose rising edge *n*
samples a guard. The resulting changes appear as follows:

| event sampled at edge *n* | visible effect |
|---|---|
| `x1 & !x4` in Start | master moves at *n*; `y3` high after *n*+1; `y10`, `y11` after *n*+2 |
| `x5` / `x7` while filling | `y1` / `y2` after *n* |
| `x4` while loading | `y12` after *n* |
| the later of `x2`, `x3` | `y4`, `y5`, `y6` after *n*+1 |
| the later of "mixing done" (`!x6 & !x8 & !x9`) and `x13` | `y7`, `y8` after *n*+2 |
| the later of `x10`, `x11` | `y9` after *n*+1 |
| `x12` while moving right | all outputs low after *n* |

These latencies are a few clock cycles. The mechanical process takes seconds,
so they do not matter for it. They are listed because the end-to-end
testbench checks them exactly.

Reset is active high and synchronous. It puts the master in Start and every
subordinate machine in `Idle`, so all outputs go low after the next edge.

## Resources

Each machine has at most four states and is binary-encoded in 2 bits. That
gives 7 × 2 = 14 state flip-flops. There are 27 I/O pins: 13 inputs, 12
outputs, clock and reset. A generic mapping to 4-input LUTs (yosys with FSM
re-encoding disabled) gives 14 flip-flops and 40 LUTs. For comparison, the
reference implementation reported 14 flip-flops and 42–43 LUTs on Spartan-3
and Virtex-4 class devices, and 33 6-input LUTs on Virtex-5. Any FPGA fits
this design. A synthesis tool that re-encodes FSMs as one-hot will report
more flip-flops (26 instead of 14).

## Where this RTL makes its own choices

The behaviour follows the state machines of the mixer:

- the states, guards and outputs of the master, Tanks, Trolley and
  Container 2 machines, and their Idle/End states;
- the Tank 1, Tank 2 and Container 1 regions;
- the module split and the signal names.

The following points are this design's own choices:

- **Start guard.** The master starts on `x1 & !x4`. The machine only
  starts when no containers are still on the trolley.
- **Tank 1, Tank 2 and Container 1 machines.** These were built by applying
  the Idle/End rule to their regions, in the same way as the other
  subordinate machines.
- **Exit priority.** If a subordinate machine sees both a falling activation
  and its forward guard, it goes to `Idle`.
- **State encoding.** Binary, 2 bits per machine. The codes are in
  `mixer_pkg`.
- **Reset.** Active high and synchronous.
- **Sensor meanings.** `x6`/`x8` are taken as the "tank not empty"
  (low-level) sensors, and `x2`/`x3` as the "ingredient prepared" sensors of
  tanks 1 and 2.

The following are not part of the RTL:

- the start push button;
- the mixing timer;
- the mechanical plant.

The testbench contains behavioural models of the timer and the plant
(`tb/mixing_timer_model.sv`, `tb/mixer_plant_model.sv`). Their dynamics are
invented for simulation: every level, position and count moves one unit per
clock.

## Files

| file | content |
|---|---|
| `rtl/mixer_pkg.sv` | state enums of all seven machines |
| `rtl/process_fsm.sv` | master FSM |
| `rtl/tanks_fsm.sv`, `rtl/trolley_fsm.sv` | the two regions of "Beverage preparation and movement to the left" |
| `rtl/tank1_fsm.sv`, `rtl/tank2_fsm.sv` | the two regions of "Preparation of ingredients" |
| `rtl/container1_fsm.sv`, `rtl/container2_fsm.sv` | the two regions of "Filling of containers" |
| `rtl/mixer_top.sv` | top level: wiring and handshake assertions |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/mixer_plant_model.sv`, `tb/mixing_timer_model.sv` | behavioural plant and timer used by `tb_mixer_top` |

## Verification

Each FSM testbench runs a reference model of its own alongside the DUT. The
model is a plain step counter, written without the RTL's enums or structure.
Each testbench has two passes:

- a directed pass checks every transition, its one-clock latency, every
  guard that must *not* fire (for example, one tank done is not enough), the
  return to Idle from each state, and reset;
- a random pass then compares the outputs on every clock for 4,000 cycles.

`tb_mixer_top` connects the controller to the plant and timer models. It
runs six complete production cycles, each with different plant timings, and
a reset in the middle of mixing. On every cycle it checks all latencies in
the timing table above. On every clock edge it checks that:

- `y4`/`y5`/`y6` move together;
- no tank is filled and drained at once;
- the trolley is never driven both ways.

It counts each mechanism and fails if any of them never happens:

- a start blocked by `x4`;
- either tank finishing last, and both finishing together;
- the trolley finishing before the mixing, and after it;
- either container finishing last;
- mixing ended by the timer, and mixing ended by the tanks running empty;
- a reset during operation.

Each testbench ends by printing `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5 (each testbench ends in `$finish`):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mixer_pkg.sv tb/tb_mixer_top.sv --top-module tb_mixer_top -o sim
./obj_dir/sim
```

To run a single machine's testbench, replace `tb_mixer_top` with
`tb_tanks_fsm`, `tb_tank1_fsm` or another testbench name. The testbenches
need no data files. The top has no parameters, so the end-to-end test runs
the design exactly as it would be synthesized.
