# Boolean Petri net controllers and ladder-logic testers

Relay ladders and PLC programs that run machines are hard to test: a stuck
contact or a miswired coil only shows when the machine happens to reach the
state that uses it. This design handles that with a **Boolean Petri net
(BPN)**. The sequence a ladder is meant to follow is written as a small Petri
net in which every place holds at most one token and every transition carries
a Boolean condition on the machine's inputs. That net maps directly onto
flip-flops and gates, and serves two purposes:

1. **As a controller.** The net drives the machine itself: one flip-flop per
   place, and the outputs are decoded from the marking.
2. **As a fault-free reference.** A tester applies a short *test event
   sequence* to the existing ladder and to the net at the same time, and
   compares the two sets of outputs after each event. If they differ, the
   ladder is faulty, and the step at which they first differ shows which rung
   to look at.

The RTL holds one generic token engine, four controllers built on it (a
self-holding rung, a Y-Delta motor starter, a two-tank filling system and a
pneumatic stamping cell), three complete testers (rung, Y-Delta and
stamping), and a small AND/OR circuit with stuck-at fault injection. That
circuit is the worked example for deriving test patterns from a net. Everything is synthesizable
SystemVerilog, and every module has a self-checking testbench.

## The token engine (`bpn_net`)

All the controllers are instances of `bpn_net`, configured by parameters:

| parameter | meaning |
|---|---|
| `NP`, `NT` | number of places and transitions |
| `PRE[t]`  | bit mask of the input places of transition *t* |
| `POST[t]` | bit mask of the output places of transition *t* |
| `OR_IN[t]`| 1 = *t* is an OR transition (see below) |
| `M0`      | initial marking, loaded by reset |

The marking is an `NP`-bit register: bit *p* = 1 means place *p* holds a
token. In each clock cycle:

* A normal (AND) transition *t* is **enabled** when all places in `PRE[t]` are
  marked. It **fires** when it is enabled and its event `ev_i[t]` is 1.
* On firing, it removes the tokens from its input places and puts one token in
  each place of `POST[t]`. This is the state equation
  `M(k) = M(k-1) + Aᵀ·U(k)` of Petri net theory, evaluated with Boolean
  operations: `M' = (M & ~consumed) | produced`.
* Any number of transitions can fire in the same cycle, provided they do not
  compete for a token. This gives true concurrency: the tank system runs its
  two tanks in parallel branches.
* An **OR transition** is enabled when *any* of its input places is marked.
  Firing empties *all* of its marked input places. The stamping cell uses one
  as an emergency stop that removes the token wherever it is.
* **Conflicts.** Two fireable transitions may want the same token, for example
  "stop" and "next step" on the same edge. The lower index wins. The engine
  walks the transitions in index order over a working copy of the marking, so
  a token taken by transition *i* is no longer available to transition *j > i*.
  Every controller lists its stop or safety transitions first, so a stop
  always beats a step.
* **Safety.** A concurrent assertion, `a_safe`, checks that no place would
  receive a second token. All the nets here are safe by construction, so the
  assertion catches wiring errors in a new net.

Timing: `fire_o` is combinational from the current marking and events.
`marking_o` changes on the next rising edge. A condition that stays true for
one cycle moves the token by exactly one step. Reset is synchronous, active
high, and reloads `M0`.

To make a new controller, draw the net, number its places and transitions
(stop transitions first), write `PRE`, `POST` and `M0` as bit masks, wire the
events, and decode outputs from `marking_o`. `ld_basic_ctrl.sv` is the
smallest example.

## Testing a ladder against the net

### Test event sequence

Each transition of the net is an input event that the ladder must respond
to. Firing every transition once, in the order the net allows, starting from
the initial marking and preceded by a "no event" step, exercises every rung in
the way it is used. For a rung with *m* inputs that is *m + 1* steps. The
sequence also exposes stuck-at faults on the contacts and coils: a contact
stuck closed shows in the "no event" step, and one stuck open shows in the step
that needs it.

`test_event_sequencer` holds the sequence as parameters: `STEP_IN[i]` is the
input vector of step *i*, and `STEP_WAIT[i]` is how many clocks it is held. The
sequencer works as follows:

1. On `start_i`, it gives a one-cycle `init_o`, which resets the reference net
   and the comparator.
2. It applies each step in turn. In the last cycle of each step it raises
   `strobe_o`, so the outputs are compared only after the ladder, the relays or
   the PLC scan have settled.
3. It ends with `done_o`.

The result is `fail_o`, plus `fail_step_o`, the first step whose comparison
failed. That index is the troubleshooting pointer: it names the event whose
rung is broken.

### Response comparator

`response_comparator` forms the **difference output vector**
DOV = expected − observed, bit by bit:

* `dov_pos_o` marks outputs that should be on but are off (value +1).
* `dov_neg_o` marks outputs that are on but should be off (value −1).

At each strobe, a non-zero DOV sets the sticky `fail_o`. `pass_o` means every
strobe so far has matched.

### The three testers

| | `ld_basic_tester` | `yd_starter_tester` | `stamping_tester` |
|---|---|---|---|
| reference net | `ld_basic_ctrl` | `yd_starter_ctrl` | `stamping_ctrl` |
| inputs | `{A, B}` | `{pb1, pb2, ol}` | `{m1, m2, a0, a1, b0, b1, c0, c1}` |
| outputs compared | C | PL1, PL2, PL3, X, Y, D | A+, A−, B+, B−, C+, C− |
| steps | none, A, B | none, Pb1, (wait for timer), Pb2 | none, m1, a1, b1, a0, b0, c1, c0, m2 |
| test length | `1 + 3·SETTLE` clocks | `1 + 4·SETTLE + CLK_HZ·DELAY_S` clocks | `1 + 9·SETTLE` clocks |

The rung shows best how far a few steps reach. The rung has two inputs, so
it has six single stuck-at faults: A, B and C, each stuck on or stuck off.
Three steps catch five of them:

* "No event" catches A stuck closed and the coil stuck on.
* The A step catches A, the stop contact or the coil stuck open.
* The B step catches a stop contact that never opens.

A holding contact stuck open is not caught. A is held for the whole step, so
the coil comes on anyway. The testbench checks that this fault passes.

The stamping tester also sorts a failure by the kind of switch to inspect
(`fail_type_o`, enum `fail_type_e`):

* `FT_STUCK_ON`: a failure at "no event" points to a normally open switch
  stuck closed.
* `FT_STUCK_OFF`: a failure at m1 … c0 points to that event's switch or
  wiring stuck open.
* `FT_SAFETY`: a failure at the last step points to the normally closed
  safety switch m2.

Outside a test, each tester routes the operator's inputs (`op_in_i`, or
`op_a_i`/`op_b_i` for the rung) to the ladder. The reference net follows the same inputs, so it can also run the
machine on its own. During a test (`busy_o`), the ladder's inputs come from
the sequencer instead. That is the **mode switch** between operation and test.
The ladder or PLC itself is not part of the chip: its inputs and outputs are
ports (`ld_a_o`/`ld_b_o`/`ld_c_i`, `ld_in_o`/`ld_out_i`,
`lc_in_o`/`lc_out_i`).

In the stamping test, limit switches are applied as a real cell would present
them. The "retracted" switches a0, b0 and c0 are closed at rest and open while
a cylinder is out. That way, the step "a0 and b0" can actually be reached.

## The controllers

**Basic self-holding rung (`ld_basic_ctrl`).** C = (A + C)·¬B. Two places,
p1 "stopped" and p2 "C on". Transition t1 fires on A·¬B and t2 on B. The coil
C is on while p2 is marked.

**Y-Delta motor starter (`yd_starter_ctrl`).** Three places:

* idle: pilot lamp PL1;
* star: main contactor X, star contactor Y, lamp PL2, timer running;
* delta: X, delta contactor D, lamp PL3.

Pb1 moves idle to star. The timer contact T∆ moves star to delta, after
`DELAY_S` = 5 s (`on_delay_timer`, counting `CLK_HZ·DELAY_S` clocks). Two
transitions, one from star and one from delta, return to idle on Pb2 (stop) or
OL (overload relay). They come first in priority. An assertion checks that Y
and D are never on together.

**Two-tank filling (`tank_fill_ctrl`).** Six steps in two parallel branches.
Each tank is empty, filling (valve V1/V2 open) or emptying (valve W1/W2 open).
The start transition *m* needs **both** tanks empty. It puts both branches
into "filling" together, which synchronises the two tanks. Each tank goes from
filling to emptying at its high level sensor (h1/h2), and back to empty at its
low level sensor (b1/b2). The next start waits until the slower tank has
emptied.

**Stamping cell (`stamping_ctrl`).** Cylinder A clamps the part, B stamps,
and C ejects it:

* m1: start. Clamp (A+).
* a1: A is out. Stamp (B+).
* b1: B is out. Retract both (A−, B−).
* a0·b0: both are back. Eject (C+).
* c1: C is out. Retract it (C−).
* c0: C is back. The token returns to the clamp step, so the next cycle
  starts at once (A+) without another m1.

The safety transition m2 is an OR transition fed by every working place. From
any step, it returns the cell to start.

**Example circuit (`and_or_cut`).** p5 = p1·p2, p6 = p3·p4, p7 = p5 + p6. Any
one line p1…p7 can be forced stuck-at-0 or stuck-at-1, so the test patterns
derived by reasoning backward through the net (e.g. p1 p2 p3 p4 = 0 0 1 1 for
p6 stuck-at-0) can be checked against the faulty circuit.

## Files

```
rtl/bpn_pkg.sv              I/O structs of the machines, troubleshooting-class enum
rtl/bpn_net.sv              token engine
rtl/on_delay_timer.sv       relay-style on-delay timer
rtl/ld_basic_ctrl.sv        self-holding rung as a net
rtl/yd_starter_ctrl.sv      Y-Delta starter net + timer
rtl/tank_fill_ctrl.sv       two-tank filling net
rtl/stamping_ctrl.sv        stamping cell net
rtl/test_event_sequencer.sv applies a test event sequence, strobes, records the failing step
rtl/response_comparator.sv  difference output vector, pass/fail
rtl/ld_basic_tester.sv      sequencer + rung net + comparator + mode switch
rtl/yd_starter_tester.sv    sequencer + Y-Delta net + comparator + mode switch
rtl/stamping_tester.sv      sequencer + stamping net + comparator + mode switch
rtl/and_or_cut.sv           AND/OR example with stuck-at injection
rtl/bpn_top.sv              all of the above side by side (shared clk, rst)
tb/tb_<module>.sv           one self-checking testbench per module
tb/tb_bpn_top_full.sv       the top at its default sizes (real 5 s timer at 1 MHz)
tb/ld_rung_model.sv         behavioural self-holding rung, with injectable faults
tb/yd_ladder_model.sv       behavioural relay ladder of the starter, with injectable faults
tb/stamping_plc_model.sv    behavioural PLC of the stamping cell, with stuck-on/off outputs
```

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Each has a
watchdog. With Verilator 5:

```
verilator --binary --assert -Mdir obj --top-module tb_bpn_top \
  rtl/bpn_pkg.sv $(ls rtl/*.sv | grep -v bpn_pkg) \
  tb/ld_rung_model.sv tb/yd_ladder_model.sv tb/stamping_plc_model.sv \
  tb/tb_bpn_top.sv
obj/Vtb_bpn_top
```

For another testbench, change the top name and the last file. Each tester
testbench needs its own model, and both top testbenches need all three.
`tb_bpn_top` runs with a 20 Hz clock and 1 s delay, so it finishes in well
under a second. `tb_bpn_top_full` uses the real sizes. It runs about 16
million clock cycles (three 5 s star-to-delta delays) in roughly 10 s.

The top testbenches count how often each mechanism occurs, and a mechanism
that never occurs counts as a failure. The mechanisms are:

* the self-hold and the reset;
* a passing and a failing rung test;
* star start, the timer, and stop by Pb2 and by OL;
* operation mode;
* a passing and a failing Y-Delta test;
* tank filling, the two-tank synchronisation and the join wait;
* a stamping cycle and the safety stop;
* a passing and a failing stamping test;
* the stuck-at circuit.

The ladder and PLC models let the testbenches inject faults: a contact stuck
open or closed, or a coil stuck on or off. The testbenches then check that the
tester reports the failing step and DOV that the fault calls for.

## Own choices and departures

These points are choices made in this design. The method itself does not fix
them:

* **Clock and delay.** No clock frequency is given. 1 MHz is assumed, and the
  5 s star-to-delta delay becomes 5 000 000 clocks. Change `CLK_HZ` to match
  your clock.
* **Step hold time.** `SETTLE`, 100 ms by default, is how long each test step
  is held before comparing. It must exceed the ladder's relay time or the PLC
  scan.
* **Rung start event** is A·¬B rather than A alone. If both buttons are
  pressed in the same clock, the stop wins, as it does in the relay rung.
* **Conflict priority** by transition index, with stop and safety transitions
  first. A stop arriving in the same cycle as the timer contact wins.
* **Y-Delta outputs** are decoded from the places: PL1 in idle; X, Y and PL2
  in star; X, D and PL3 in delta. This follows the net's decomposed markings.
  It does not follow the per-state assignments of an HDL listing of the same
  starter, which sets some outputs a state early.
* **Basic rung coil** is on in place p2, as the net and its event table give.
  One listing of it drives C in the opposite places. The net was followed.
* **Stamping safety transition** is taken from every working place, as in the
  controller-level drawing. A simpler abstract drawing of the same net shows
  it leaving the last place only.
* **Level inputs.** Push buttons and sensors are sampled levels. A condition
  must be held for at least one clock. The ladder-side interfaces assume
  signals that are already synchronised and debounced.
* **Not included.** The machine-side ladders and PLC, the motors, tanks and
  cylinders, and the remote supervisor are external. The rung, the starter
  ladder and the stamping PLC have behavioural models for simulation. Deriving test patterns by backward reasoning
  on a logic Petri net is a design-time procedure, not hardware. Its results
  are exercised in `tb_and_or_cut`.
