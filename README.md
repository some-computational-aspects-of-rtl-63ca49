# Statechart controllers as flip-flops and as ROM: a chemical-reactor controller

A statechart is a state diagram with hierarchy (states inside states), concurrency (regions
of a state that run side by side), history (a composite state that remembers where it was)
and broadcast events. This RTL implements such diagrams directly in synchronous logic, in two
ways:

* **logic-based**: every state gets one flip-flop, every place that generates an event gets
  one flip-flop, and combinational "excitation functions" compute each flip-flop's next value
  from the diagram's transitions;
* **memory-based**: the same behaviour flattened into a Moore finite state machine whose
  transition and output tables sit in a ROM addressed by a register of inputs and state code.

The main design is the controller of a small chemical plant (two scales, a main container
with a mixer, valves, conveyors and two external timers), in its original form and in an
improved form whose equivalent state machine is much smaller. Two small example diagrams,
which show the timing rules in isolation, are included as well.

## The execution model

Everything is clocked by one clock; the controller takes one "step" per rising edge.

* A **state flip-flop** at 1 means the state is active, or, inside a region with the history
  attribute, that it is the state the region will resume. A state is *active* only when its
  own flip-flop **and the flip-flops of all its ancestors** are 1 (`reactor_active` in
  `reactor_pkg`). So a history region keeps its flip-flops while its parent is inactive, and
  they count as "remembered", not active.
* Each state flip-flop obeys `next = activate | (s & ~inactivate)` (`sc_state_ff`). The
  activating term is the OR of every transition into the state (plus default entry of its
  parent, for an initial state); the inactivating term is the OR of every transition out of
  it and, outside history regions, of every transition that leaves one of its ancestors.
* An **event** generated in a step (a transition's broadcast set, an entry or exit action) is
  held in a flip-flop for exactly one clock period, so the controller reacts to it in the
  next step. An entry flip-flop is excited by "not active now and active after this edge",
  an exit flip-flop by "active now and inactive after this edge", where "active after this
  edge" is the AND of the excitation values along the path to the root.
* A **do action** is present in every period its state is active. Here it is the
  combinational activity of the state, which has the same timing as a flip-flop excited like
  the state.
* A transition fires at an edge when its source state is active, its guard (a Boolean of
  inputs and events) is true in the period before the edge, no enclosing transition
  pre-empts it, and, if its source is a composite state containing final states, those final
  states are active.

Consequence, visible in the small example `simple_ctrl`
(`START --i/{t1}--> ACTION --t1/{t2}--> STOP`, `ACTION` with entry `entr`, do `d`, exit `ext`):
after `i` is sampled, the next period shows `ACTION, entr, d, t1`; `t1` is then seen and fires
`t2`, so the period after shows `STOP, ext, t2`; then only `STOP`. This four-step sequence is
exactly its equivalent Moore machine.

## The reactor controller

Inputs (`reactor_in_t`): `AU` break-down, `REP` initiate request, `AUT` cycle start (control
desk); `B1`, `B2` scale weights reached; `NLIM`, `NMAX`, `NMIN` container levels (foam limit,
full, empty); `FT1`, `FT2` external timers elapsed.
Outputs (`reactor_out_t`): valves `V1`..`V6`, pump `P`, discard valve `EV`, conveyors `C1`,
`AC1`, `C2`, `AC2`, mixer `M`, timer starts `TM1`, `TM2`.

States (flip-flop index = number − 1; the numbers are those of the diagram):

| # | state | inside | do action |
|---|-------|--------|-----------|
| 1 | Start | top | |
| 2 | Initiating | top, two concurrent regions | |
| 6 | MCEmpt → final | Initiating, region A | EV |
| 7 | IngEmptying → final | Initiating, region B | AC1, AC2 |
| 3 | Filling | top, three concurrent regions with history | |
| 8, 9, 10 | MCFill, Excess of Foam, StopM | Filling, main container | V1, P in MCFill |
| 11, 12 | SC1Fill, Stop1 | Filling, scale 1 | V2 in SC1Fill |
| 13, 14 | SC2Fill, Stop2 | Filling, scale 2 | V4 in SC2Fill |
| 4 | Restart | top | |
| 5 | Process | top | |
| 15 | Reaction (Pouring 17, Emptying 18) | Process | M; C1, C2, V3, V5 in Pouring; V6 in Emptying |
| 16 | ProcessTermination | Process | V6 |

That is 18 numbered states plus the two final states: 20 state flip-flops. Transitions:

| t | from → to | guard / broadcast |
|---|-----------|-------------------|
| t1 | Start → Initiating | REP·!AU / TM1 |
| t2 | Initiating → Filling | AUT·!AU, only with both final states reached |
| t3, t4 | MCEmpt → final, IngEmptying → final | NMIN; FT1 |
| t5 | Filling → Restart | AU |
| t15 | Restart → Filling (resumes history) | REP·!AU |
| t6 | Filling → Process | NMAX·B1·B2 / TM1 (original); x·y·z·!AU / TM1 (improved) |
| t7, t9 | MCFill ↔ Excess of Foam | NLIM; !NLIM |
| t8, t10 | MCFill ↔ StopM | NMAX; !NMAX |
| t11, t12 | SC1Fill ↔ Stop1 | B1; !B1 |
| t13, t14 | SC2Fill ↔ Stop2 | B2; !B2 |
| t16 | Process → Filling | AUT·NMIN |
| t17 | Process → Start | AU |
| t18 | Reaction → ProcessTermination | FT2 |
| t19 | Pouring → Emptying | FT1 / TM2 |

`TM1` has two flip-flops (one for t1, one for t6) ORed at the output; `TM2` one. In the
**improved** diagram (`SYNC_T6 = 1`) the stop states of the three Filling regions emit local
do-events `x`, `y`, `z`, and t6 waits for all three. In the original, t6 can leave Filling
with the regions in any of 3 × 2 × 2 = 12 configurations, and each is remembered by the
history flip-flops. That multiplies the global states; synchronising t6 removes it.

### Rules chosen where the diagram is silent

These are design decisions. The reference model in `tb/reactor_ref.sv` makes the same ones.

* **Pre-emption**: a transition leaving a composite state wins over every transition inside
  it at the same edge. The history regions remember the configuration held before the edge.
* **Priorities among siblings**: t5 (AU) over t6; t17 (AU) over t16, in keeping with the
  `!AU` the diagram puts on t1, t2, t15 and the improved t6; t7 (NLIM) over t8 (NMAX);
  t18 (FT2) over t19.
* **History use**: only t15 (back from Restart after a break-down) resumes the remembered
  Filling configuration. Entering Filling through t2 or t16 starts its regions at MCFill,
  SC1Fill and SC2Fill. With history on t16, the improved diagram would restore StopM, Stop1
  and Stop2 and fire t6 again at once, skipping the refill.
* **Final states**: t2 leaves Initiating only when both regions have reached their final
  state.
* **Reset**: synchronous, active high. It activates Start and puts the history regions at
  their initial states.
* **Pouring outputs**: the two drawings of the diagram disagree (`C1, C2, V3, V5` against
  `C1, C2, V1, V2`). `C1, C2, V3, V5` is used in both variants, because the plant drawing puts
  V3 and V5 under the scales.

## The memory-based version

`reactor_rom_fsm` is the Moore-machine form: a register captures the 10 inputs and the
present-state code on each edge, and together they address `reactor_rom`. Each ROM word is
`{next-state code, outputs of the next state}`; the code is fed back to the register. Since
the ROM follows the register, the outputs after an edge are those of the state entered at
that edge: cycle for cycle, the same outputs as the logic-based controller.

A global state is the content of the logic-based controller's registry (20 state + 3 event
flip-flops). Codes are numbered breadth-first from the reset contents (code 0), with the
1024 input words tried in increasing binary order. With the rules above there are **143**
reachable global states for the original diagram and **41** for the improved one. The
published figures for this example are 137 and 42. The counts depend on the rules left open
above; of the variants tried, these rules gave the nearest numbers. Counting (state, next
state) pairs, self-loops included, the machine has 548 transitions for the original diagram
and 194 for the improved one. The published transition counts are 986 and 313, but the rule
behind them is not stated. Memory size is
`2^(m+n) · (n+y)` bits for m inputs, n code bits and y outputs:

| diagram | m | n | y | words | bits |
|---------|---|---|---|-------|------|
| original | 10 | 8 | 15 | 262,144 | 6,029,312 |
| improved | 10 | 6 | 15 | 65,536 | 1,376,256 |

**How the ROM is written.** Listing 2^18 words as data is impractical. Filling a memory of
that size at time zero also exceeds the constant-evaluation limits of elaboration tools. So
`reactor_rom` defines its contents as a function of the address. It stores only the
code→state table (143 × 23 bits for the original diagram, 41 × 23 for the improved one, in
the breadth-first order above). The tables are packed constants in
`rtl/reactor_states_pkg.sv`, so simulators and synthesis see the same contents. Codes past
the table decode to the reset contents. The ROM applies the shared next-state rules of
`reactor_pkg`, then finds the next state's code by searching the table. After a rule change,
rebuild the tables the same way. Start a list with the reset contents `FF_INIT`. For each
entry in turn, apply `reactor_next(entry, x, sync)` for x = 0 … 1023 and append every result
not yet listed. Entry c is code c, stored in bits `[24*c +: 23]` of the package constant.

**The small example as a ROM.** `fsm_rom` is the same register + ROM structure with its
contents given as a parameter. By default it holds the four-state machine equivalent to the
START/ACTION/STOP example: input `i`, outputs `{ext, d, entr, t2, t1}`, 8 words of 7 bits.

| code | state | next on i=0 | next on i=1 | outputs in this state |
|------|-------|-------------|-------------|-----------------------|
| 0 | START | 0 | 1 | none |
| 1 | ACTION | 2 | 2 | entr, d, t1 |
| 2 | STOP (just entered) | 3 | 3 | ext, t2 |
| 3 | STOP | 3 | 3 | none |

In the top module it runs next to `simple_ctrl` on the same input. The two produce the same
events in every cycle.

Published work also shrinks these memories by splitting the ROM into an address modifier
and a smaller memory. That decomposition is not implemented here.

## Module map

| file | role |
|------|------|
| `rtl/reactor_pkg.sv` | types, state/event indices, hierarchy table, and all reactor rules: `reactor_active`, `reactor_sig`, `reactor_y`, `reactor_fire`, `reactor_activate`, `reactor_inactivate`, `reactor_event_d`, `reactor_next` |
| `rtl/sc_state_ff.sv` | one state flip-flop with its set/hold/clear gate |
| `rtl/sc_registry.sv` | flip-flop registry: `NS` state cells plus `NE` event flip-flops |
| `rtl/reactor_signals.sv` | signal functions: event set and outputs from inputs and flip-flops |
| `rtl/reactor_excitation.sv` | excitation functions: t1..t19 enabling, activate/inactivate terms, event excitation |
| `rtl/reactor_ctrl.sv` | logic-based reactor controller (`SYNC_T6` selects the diagram) |
| `rtl/reactor_rom.sv` | ROM of the equivalent Moore machine |
| `rtl/reactor_states_pkg.sv` | generated code→state tables of both diagrams |
| `rtl/reactor_rom_fsm.sv` | register + ROM controller |
| `rtl/simple_ctrl.sv` | START → ACTION → STOP example |
| `rtl/fsm_rom.sv` | register + ROM Moore machine, parameter contents; defaults to the START/ACTION/STOP machine |
| `rtl/fig1_ctrl.sv` | S1..S7 example: two regions, history in S3, final state, events fed back |
| `rtl/statechart_top.sv` | all of the above side by side: four reactor controllers on shared inputs, the two examples (one of them also as a ROM machine) with their own ports |

In `fig1_ctrl`, S1 (do `c`) holds region S11 (S2 with exit `a`; S3 with history over S6 and
S7, S7 doing `d`) and region S12 (S4 → S5 with entry `b` → final state). `a` is both an input
and the exit action of S2; `b` and `c` are local; `d` is the output. With `a` held low it runs
t1, t2, t3+t4, t5, t6 and then rests in S2 with S6 remembered, so `d` pulses for one period.

## Simulating

All testbenches are self-checking and print `TB_RESULT checks=N failures=M`. Run from the
directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/reactor_pkg.sv rtl/reactor_states_pkg.sv tb/tb_statechart_top.sv --top-module tb_statechart_top
./obj_dir/Vtb_statechart_top
```

Replace the testbench name for the others: `tb_sc_state_ff`, `tb_sc_registry`,
`tb_reactor_signals`, `tb_reactor_excitation`, `tb_reactor_ctrl`, `tb_reactor_rom`,
`tb_reactor_rom_fsm`, `tb_simple_ctrl`, `tb_fsm_rom`, `tb_fig1_ctrl`.

* The reactor tests compare the design, every cycle, with `tb/reactor_ref.sv`. That model is
  written independently of the flip-flop encoding: one enumerated variable per region, and a
  nested `case` for each step. The inputs come from `tb/reactor_stim.sv`: every input keeps
  its level and flips at random with a small probability each cycle, which lets the plant
  reach all phases.
* `tb_statechart_top` runs the whole design at its default sizes (full ROMs) for 300,000
  cycles. Each reactor diagram's logic and ROM controllers must match the model. Each
  mechanism must occur at least once, and the test counts them: every transition of both
  diagrams, a history resume with a non-initial configuration, t2 held back by unfinished
  final states, an enclosing transition pre-empting an inner one, the full
  START/ACTION/STOP sequence, and every transition of the S1..S7 example. The ROM form of
  the small example must give the model's code and events in every cycle.
* `tb_simple_ctrl` and `tb_fig1_ctrl` also check exact cycle-by-cycle sequences.

## Limits

* The transition priorities, the pre-emption rule and the use of history on entry are this
  design's choices (listed above). The global-state counts (143 and 41) depend on them.
* The ROM contents are a function of the address plus a small code table, not a stored list
  of words. A synthesis tool maps them to logic or ROM as it sees fit.
* `reactor_ctrl` carries immediate assertions on its flip-flops. In every cycle, exactly one
  top-level state is set. Each active AND-region and each history region holds exactly one
  state. No state is set and cleared at the same time. They are simulation checks only.
* In `fig1_ctrl` the flip-flop of the outermost state is set at reset and never cleared, so
  synthesis turns `ex1_state[0]` into a constant 1.
* The plant, desk and timers are outside the design; their signals are ports.
