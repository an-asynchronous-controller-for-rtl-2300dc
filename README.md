# A clockless interrupter for a daisy-chained VME interrupt system

On a VME bus, peripheral units request interrupts on seven open-collector
lines, IRQ1* to IRQ7*. A single interrupt handler (here an M68000 board)
answers the highest level that is asserted. It runs an *acknowledge cycle*:
it puts the level on A1..A3, asserts IACK* and DS0*, and waits for DTACK*.
Several units may request on the same level. For that case the acknowledge
does not go to all of them at once. It enters the first slot as IACKIN* and
ripples down a daisy chain. Each unit's interrupter either absorbs it, and
answers with a status/ID byte on D0..D7 and DTACK*, or passes it on as
IACKOUT* to the next slot. So levels rank requests first, and position in
the chain ranks requests on the same level.

Nearly all of this design is one decision, made by the interrupter's
controller: absorb or pass on. The controller has no clock. It is a small
asynchronous sequential circuit with five state variables, held by the
feedback of its own next-state logic. The difficulty is concurrency:

* A unit's own request can rise at almost the same moment the acknowledge
  for a unit further down the chain reaches it.
* DS0* goes to every slot directly, while IACKIN* arrives late by a
  different amount in every slot. So a controller can see the two in
  either order. A far slot can even see the *next* cycle's DS0* before the
  current cycle's IACKIN* has ended.
* The peripheral keeps its request up until its service routine runs. The
  controller must not answer it twice.

The RTL describes the seven-slot system used in a teaching laboratory. Each
slot is personalised by a level jumper and three status/ID switches.

## Structure

```
vme_interrupt_system          NUM_UNITS slots, wired-OR bus lines, daisy chain
 └─ interrupter  (one per slot)
     ├─ irq_request_ff         peripheral's request flip-flop: J = event, K = serviced  -> IRQP
     ├─ interrupter_datapath   bus pins, level jumper, status/ID choice, level compare M
     └─ interrupter_controller absorb/pass decision, IRQC, ENID, DTACK
vme_irq_pkg                   shared types: level, status/ID table, controller state struct
```

All personalisation is in the data path, so the controllers in all slots
are identical. Only the data path touches the bus. It converts the
active-low pins (DS0*, IACKIN*, IACKOUT*, DTACK*, IRQn*) to the active-high
controller signals.

## The controller

### State variables

| var | meaning | set when | reset when |
|-----|---------|----------|------------|
| R | request pending; drives IRQC | IRQP & ~X & ~IACKIN & ~A | ~IRQP or A |
| P | passing on; drives IACKOUT | IACKIN & ~A & ~(R & M) | ~IACKIN |
| A | acknowledge absorbed | IACKIN & R & M & ~P | ~IACKIN & ~(DS0 & ~Y) |
| X | during A: DS0 answered. Outside A: request served, IRQP not yet low | A & DS0 | ~IRQP & ~A |
| Y | during A: DS0 ended after being answered | A & X & ~DS0 | ~A |

Outputs are combinational in state and inputs:

```
IRQC = R    IACKOUT = P    ENID = A & ~Y & ~(X & ~DS0)    DTACK = A & ~Y & X & DS0
```

Each variable's next value is `set | (var & ~reset)`. Multiplied out, every
next-state function is unate, and the RTL writes it as the sum of *all* its
prime implicants. A two-level (PAL/GAL-style) realisation of that form has
no static logic hazards. `rst_n` gates every term, the way a GAL's
asynchronous reset term would.

### The absorb/pass decision

P and A each block the other's set term. Whichever is set when IACKIN
arrives stays set until IACKIN ends, even if M or IRQP changes in the
meantime. The decision is therefore made once per acknowledge and cannot be
undone. It is "absorb" only if a request was already pending (R) and the
data path reports a level match (M).

### The race between a new request and the acknowledge

R can only be set while IACKIN is absent. This gives three cases:

* **IRQP rises first.** R is set, and the acknowledge is absorbed if the
  level matches.
* **IACKIN arrives first.** The acknowledge is passed on. R is set as soon
  as IACKIN ends, so the handler sees the request and acknowledges it in a
  later cycle.
* **Both arrive in the same instant (a tie).** The acknowledge is passed on.

This tie rule is deliberate: the unit further down the chain, whose request
caused the acknowledge, receives it. In RTL a tie means the same simulation
time step. The analog arbitration a real circuit performs on near-coincident
edges is not modelled.

### One acknowledge per request

When A is set, R is released, which withdraws the IRQ line: the request is
released on acknowledge. When DS0 is answered, X is set. X stays set after
the cycle for as long as the peripheral keeps IRQP high, and it blocks R.
Only when the service routine clears the request flip-flop (IRQP low) can a
new request start.

If an absorbed acknowledge ends without DS0 ever being asserted, X is not
set. R then comes back, and the request is not lost.

### DS0 and IACKIN in either order

ENID is asserted as soon as the acknowledge is absorbed. DTACK follows once
DS0 is also asserted, which may already be the case. Both are withdrawn when
DS0 ends. If IACKIN ends first, DTACK is held until DS0 ends.

Once DS0 has ended after being answered, Y is set. From then on DS0 is
ignored: it does not re-assert ENID or DTACK, and it does not hold A. This
covers the next cycle's DS0 reaching this slot before the current
cycle's IACKIN release. A clears when IACKIN has ended and no DS0 is being
answered.

### Simulating a clockless circuit

In RTL the feedback is a combinational loop. The simulator settles it by
iterating from the previous state, in zero time. So the whole daisy chain
responds in the same time step as IACK*.

Simultaneous changes are safe for IRQP rising with IACKIN (the tie) and for
DS0 with IACKIN. IRQP falling in the very instant IACKIN arrives is a race,
in simulation as in hardware. The protocol does not produce it, because a
request falls only when its service routine clears it.

Verilator reports the loops as `UNOPTFLAT` and yosys reports them as logic
loops. Both are expected: these loops are the circuit's memory.

## Request flip-flop

`irq_request_ff` is also clockless: `Q = ~K & (J | Q)`. J is the
peripheral's event: an end switch of a solar panel, or a push button in the
laboratory setup. K is the service routine's clear. A clockless flip-flop
cannot toggle, so J = K = 1 clears.

## Data path

* **IRQ routing:** `irq_pull[l] = IRQC & (level_sel == l)`. `level_sel = 0`
  is an open jumper: no line is driven, and the unit never matches.
* **Level compare:** `M = (level_sel != 0) & (A[3:1] == level_sel)`.
* **Status/ID:** `d_out = STATUS_ID[id_sel]` while ENID is asserted,
  otherwise 0. `d_oe = ENID`.

## System top: `vme_interrupt_system`

| parameter | default | meaning |
|-----------|---------|---------|
| `NUM_UNITS` | 7 | slots on the daisy chain |
| `STATUS_ID` | 0x40..0x47 | the eight selectable status/ID bytes (M68000 user vectors; chosen here) |

| port | dir | meaning |
|------|-----|---------|
| `rst_n` | in | clears all controllers and request flip-flops |
| `level_sel[NUM_UNITS]` | in | level jumper per slot, 1..7, 0 = open |
| `id_sel[NUM_UNITS]` | in | status/ID switches per slot |
| `req_set`, `req_clr` `[NUM_UNITS]` | in | J (event) and K (serviced) of each request flip-flop |
| `irqp[NUM_UNITS]` | out | request flip-flop outputs |
| `iack_n`, `ds0_n`, `addr[3:1]` | in | handler's IACK*, DS0*, A1..A3 |
| `irq_n[7:1]`, `dtack_n` | out | wired-OR IRQ1*..IRQ7*, DTACK* |
| `d[7:0]`, `d_valid` | out | status/ID byte, and whether any slot drives it |
| `iackout_n` | out | IACKOUT* of the last slot; low means nobody absorbed the acknowledge |

The simulator has only two states, so open-collector and three-state lines
are modelled as wired-OR of drive enables. IACK* feeds slot 0's IACKIN*
directly: the bus's daisy-chain driver is treated as part of the handler.
The handler, the CPU board and the peripherals themselves are not part of
the RTL.

## Testbenches

Each testbench is self-checking and ends with
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_irq_request_ff` | random J/K against the truth table; hold; reset |
| `tb_interrupter_datapath` | exhaustive: every level, switch setting, A1..A3 and control combination |
| `tb_interrupter_controller` | named scenarios with hand-worked outputs, then a 20 000-step random walk (single input changes, ties, resets) against a reference written as a five-phase state machine |
| `tb_interrupter` | one slot through its pins: routing, pass on mismatch, absorb with byte 0x45, no second answer, clear; every jumper level against every acknowledged level |
| `tb_vme_interrupt_system` | full seven-slot system at default parameters, with a behavioural handler (below) |

In `tb_vme_interrupt_system`, a behavioural handler serves requests by
level. It lowers and raises DS0* before, with or after IACK*. A scoreboard
predicts the answering unit for every cycle. The test also checks that at
most one data driver is ever enabled. It counts, and requires, every
mechanism:

* absorb
* pass by an idle unit
* pass on a level mismatch
* pass by an already-served unit
* ranking by level
* ranking by position
* a tie
* a request that wins the race
* both DS0/IACKIN orders
* IACK* ending before DS0*
* the next cycle's DS0* arriving early at the answering slot, emulated by
  the handler

To run one, for example the system test:

```
verilator --binary --timing -Wno-fatal --timescale 1ns/1ps \
  -Irtl -y rtl -y tb +libext+.sv rtl/vme_irq_pkg.sv \
  tb/tb_vme_interrupt_system.sv --top-module tb_vme_interrupt_system
./obj_dir/Vtb_vme_interrupt_system
```

`-Wno-fatal` is needed because of the intentional `UNOPTFLAT` loops.

## What follows the original design and what is chosen here

These parts follow the original design:

* the system structure: seven priority levels, same-level ranking by chain
  position, seven slots;
* the split into a personalising data path and identical controllers;
* the jumper to one of IRQ1..IRQ7;
* eight switch-selectable status/ID bytes;
* the A1..A3 level compare;
* a clockless controller with complete-sum logic;
* the tie resolved in favour of passing on;
* DS0/IACKIN treated as concurrent;
* a clockless JK request flip-flop.

These are choices made here:

* **The state variables and their equations.** The original flow table
  (ten reduced states, extended to thirteen for a race-free assignment in
  four state variables) is not reproduced. This controller uses five
  variables, one per condition it must remember, and matches the original
  only in its behaviour at the interface.
* **Which four signals the controller outputs** (IRQC, IACKOUT, ENID,
  DTACK), and the ENID/DTACK timing.
* **Release on acknowledge, plus the served flag X** that enforces one
  acknowledge per request.
* **The status/ID byte values.**
* **The J/K sources and the J = K = 1 rule** of the request flip-flop.
* **Reset.**
* **Bus handshake rules are checked in the testbenches**, after the signals
  settle, rather than by assertions in the RTL. With no clock, an assertion
  would sample values that are still settling through the feedback.

## How far to trust it

The logic behaviour has been simulated thoroughly at the RTL level, for
every case listed above. What RTL simulation cannot show is the timing of a
real clockless implementation:

* essential hazards and delay differences between state variables;
* the analog resolution of near-simultaneous edges;
* the bus timing limits of the VME specification.

A synthesis tool will keep the feedback loops, but may restructure the
complete-sum logic and so lose its freedom from hazards. A hardware
realisation should map the equations as written, two-level with all prime
implicants, into a device with direct feedback, and have its timing checked
there.
