# PSi layer processor: protocol processing with one processor per connection

Protocol stacks run in software are slow for two reasons: a shared processor
must load and save each connection's context (flags, counters, timers) for
every event, and a protocol's state machine is walked one step at a time. This
design removes both in hardware. Every connection has its own small
**connection processor**. That processor holds the connection's state in
registers, so there is no context to switch. Its state machine is split into
small **path machines**. Each one is compiled from a *path expression* (a
regular expression over protocol events and actions) into a tree of gates.
These trees run in parallel and accept one event per clock.

The RTL implements one protocol layer, IEEE 802.2 LLC type 2, configured with
the one 802.2 path machine that is fully specified: the *remote-busy* path. It
is written in SystemVerilog-2017 and is synthesizable. All modules pass Verilator
lint and the slang front end of Yosys. Each module has a self-checking
testbench.

## The pipeline

```
 lower-layer frames ──┐                                        ┌──> upper-layer indications
 upper-layer commands ┴─> header ──HP→CP bus──> connection ──CP→OP bus──> output ──> lower-layer frames
                          processor              processors  (round-robin   processor
                             │                   (NUM_CP, one   arbiter)        ▲
                             └──> dummy connection processor ──────────────────┘
```

| stage | module | does |
|---|---|---|
| header processor | `header_processor` | Parses the LLC control field in all three formats at once (`llc_ctrl_parser`). Finds the connection by matching the address pair in a CAM (`conn_cam`). Writes `{event, parameters, pointer}` to that connection's processor. |
| HP→CP bus | `cp_bus_t` | A broadcast word. The connection processor whose `CONN_ID` equals `conn` takes it. The header processor addresses connection processors like memory words. |
| connection processors | `connection_processor` ×`NUM_CP` | Run the path machine and update flags, counters and timers. They queue messages in their output unit. |
| dummy CP | `dummy_cp` | A FIFO that looks like a connection processor to the bus. It carries connection-independent results: UI datagram indications, TEST and XID answers, and UI send requests. |
| CP→OP bus | `op_bus_arbiter` | Round-robin choice among `NUM_CP + 1` requesters, one word per clock. |
| output processor | `output_processor` | Sends indications to the upper layer. Builds frame headers for the lower layer, taking connection addresses from `conn_addr_table`. |

Payload bytes never enter the design. The payload stays in a packet memory that
several layers share, outside this design. Only a 16-bit pointer to it travels
with each event.

**Rate and latency.** The pipeline takes one frame or command per clock. A
frame presented in cycle *n* produces its indication in cycle *n+3*. Three
registers sit on that path: the header processor's output register, the
connection processor's output queue and the output processor's output
register. Inside a connection processor, an event is taken, its path machine
moves, and its actions run, all in one cycle.

## Path machines: a regular expression as a tree of gates

This is the least familiar part of the design. The remote-busy path is

```
[ (RR + REJ + I)* ; RNR ; e ; RNR* ; (RR + REJ + I) ; f ]*
   e = Rb=1, Snd=0, load(Is_Ct), tell upper layer IH_Rb
   f = Rb=0, tell upper layer IH_Rb_Off
```

In words: while the remote station is not busy, RR, REJ and I frames pass with
no action. An RNR marks the remote busy. Further RNRs are absorbed. The next
RR, REJ or I clears the busy state, and the path starts over. Events that
nothing is waiting for are ignored.

`rbusy_path` is the parse tree of this expression. Its cells carry the numbers
1–12 of the operators, left to right:

```
 [(a+b+c)*;d;e;d*;(a+b+c);f]*          a=RR b=REJ c=I d=RNR
   1 2   3 4 5 6 7 8  9 10 11 12
```

A single **token** moves through the tree. Every cell has an *offer* wire going
down and a *done* wire going up.

* **`+` (choice), `path_plus_cell`**: offers the token to both children and
  ORs their `done` wires. This OR gate is the only logic a token passes when it
  climbs the tree.
* **`*` (repetition), `path_star_cell`**: the OR of "offered from above" and
  "body done" drives both the offer to the body and its own `done`. The token
  therefore circulates: each time the body finishes, the body is offered the
  token again and so is whatever follows the `*`.
* **`;` (sequence)**: parent → left child, left done → right child, right done
  → parent. This is wiring only, written as `assign` statements inside
  `rbusy_path`.
* **Action leaf** (`e`, `f`): its action strobe is the arriving token, and the
  token goes straight back up. This is also wiring only.
* **Event leaf, `path_event_leaf`**: the only cell with state. An offered leaf
  is *armed* from the next clock on. An armed leaf fires when its event arrives.
  Its `done` then rises in the same cycle, the token climbs combinationally to
  the next waiting leaves, and those leaves are armed at the clock edge.

The path has exactly one token. When any leaf fires, the shared `advance` wire
(the OR of all the leaves' `done`) disarms every other leaf. Only the leaves
offered the token again in that cycle stay armed. This means the armed leaves
always form the set of events the path can accept next:

| resting state | armed leaves (`armed_o`) |
|---|---|
| not busy | a1 b1 c1 d4 (`8'b0000_1111`) |
| busy | d7 a9 b9 c9 (`8'b1111_0000`) |

After reset the root cell 12 is offered the token once (`ready_o` rises one
cycle after reset). An event that matches no armed leaf moves nothing.

The delay of an event is fixed by the shape of the expression: the gates
between the firing leaf and the next waiting leaves. `;` cells add nothing.
The published delay model counts only the `+` cells. In this RTL each `*` cell
is also one OR gate on the token's way up, so it adds one gate delay too. In
`rbusy_path` the longest chain is four OR gates. An RR or REJ that ends the
busy state climbs from leaf a9 or b9 through cells 9, 10 and 12, and comes
back down through cell 3 to the leaves a1, b1, c1 and d4. Transitions that do
not exist cost no gates. A PLA built from the full state table would pay for
them.

## The connection processor

```
 bus word ─> cp_comb_logic ─> rbusy_path ─> action decode (ACTION_MAP) ─┬─> cp_flags        (Rb, Snd)
               ▲                                                        ├─> cp_counters_regs (Is_Ct, last parameters)
               └── time-outs ── cp_timer ×3 <─────────────────────────┤
                                                                        └─> cp_output_unit ─> CP→OP bus
```

* `cp_comb_logic` presents one event per cycle. A bus event always goes first.
  Otherwise the lowest-numbered timer with a pending time-out is presented as
  `EV_TIMER` and acknowledged.
* `ACTION_MAP` is a parameter of type `cp_action_map_t`, one entry per action
  leaf. It maps each leaf to flag set/clear masks, counter load/increment
  masks, timer start/stop masks and an output message. The default,
  `RBUSY_ACTION_MAP` in `psi_pkg`, is exactly the `e` and `f` of the
  expression. To use a timer, give an action a `tmr_start` bit; the
  connection-processor testbench does this.
* `load(Is_Ct)` loads the counter from the N(R) field of the event that
  triggers it.
* `ready_o` is low in the first cycle after reset, and while the 2-entry output
  queue is full. The header processor then holds its word on the bus, which
  stalls the pipeline.

## 802.2 specifics

* The control field is `ctrl[15:0]`, with the first octet in `[7:0]`.
  * I frame: `ctrl[0]=0`. N(S) is `[7:1]`, P/F is `[8]`, N(R) is `[15:9]`.
  * S frame: `ctrl[1:0]=01` with SS in `[3:2]`: 00 RR, 01 RNR, 10 REJ.
  * U frame: `ctrl[1:0]=11`. P/F is `[4]`, and the U codes are in `psi_pkg`.
* The C/R bit is the low bit of the SSAP.
* CAM key: `{remote MAC, remote SAP with C/R cleared, local MAC, local SAP}`,
  112 bits.
* Connection-independent frames:
  * UI → datagram indication.
  * TEST or XID command → the matching response, with source and destination
    swapped and C/R=1.
  * TEST or XID response → dropped.
* Also dropped and counted in `drop_count_o`: frames for unknown address pairs,
  undefined control fields and upper-layer commands for a connection number out
  of range.
* Upper-layer commands either name a connection (`datagram=0`, sent straight to
  that connection processor) or request a UI datagram with explicit addresses.
* `cfg_*` opens a connection. It writes its address pair into both the CAM and
  the output address table.

## Parameters

| parameter | default | where | note |
|---|---|---|---|
| `NUM_CP` | 8 | top, header/output processor | Number of dedicated connection processors. It may go up to 256, because `CONN_W` is 8 bits. |
| `CP_NTMRS` | 3 | `psi_pkg` | Timers per connection. Protocols of this kind use 3–5. |
| `CP_NFLAGS`, `CP_NCTRS`, `CP_NACTS` | 2, 1, 2 | `psi_pkg` | Sized for the remote-busy path. |
| `TIMER_PERIOD` | 1000 ticks | `connection_processor` | Ticks come from the `tick_i` strobe. |
| `OUT_DEPTH` / dummy `DEPTH` | 2 / 4 | output unit / `dummy_cp` | |
| `PTR_W`, `SEQ_W`, `TMR_W` | 16, 7, 16 | `psi_pkg` | |

## What is and is not here, and what was chosen

This design follows the published architecture in these parts:

* the three-stage pipeline and its two buses;
* addressing connection processors like memory;
* the dummy connection processor;
* the template connection processor (flags, timers, counters and registers,
  combinational logic, state transition machine, output unit);
* parallel parsing of the I, S and U formats;
* a CAM for connection lookup;
* the cell logic of the `+`, `*` and `;` operators and the tree of the
  remote-busy path, with its actions.

The following are this design's own choices:

* single-clock synchronous timing, with the token traversal combinational
  within one cycle;
* the shared `advance` wire that enforces a single token;
* asynchronous active-low reset;
* valid/ready handshakes;
* queue depths;
* round-robin bus arbitration;
* priority of lower-layer frames over upper-layer commands;
* the key layout of the CAM;
* loading Is_Ct from N(R);
* reset values of the flags (Rb=0, Snd=1);
* the event and message encodings.

Not included:

* The other path machines of full 802.2 (fewer than 20 in all). Only the
  remote-busy one is specified. Without them, I frames are not acknowledged,
  nothing sets Snd back to 1 and no protocol timer is started by the default
  map.
* The shared packet memory.
* The silicon compiler that would generate path machines from expressions. The
  remote-busy tree is written by hand, cell for cell.
* Chip partitioning. All connection processors sit in one module.
* Sharing one connection processor among several connections, with on-chip
  context memory. This is suggested for complex protocols; here every
  connection has its own processor.
* A programmable header processor. The header processor here is fixed logic
  for 802.2.

## Files

* `rtl/psi_pkg.sv`: all shared types (bus words, frame header, events,
  messages, action map) and sizes.
* One module per file in `rtl/`. The top is `psi_layer_processor`.
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

## Simulating

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/psi_pkg.sv tb/tb_psi_layer_processor.sv --top-module tb_psi_layer_processor
./obj_dir/Vtb_psi_layer_processor
```

Substitute any other testbench name. Each testbench runs in seconds.

`tb_psi_layer_processor` runs the top at its default size (8 connections) in
two phases:

1. A back-to-back burst checks the rate (16 frames in 16 clocks) and the
   3-cycle latency.
2. 20,000 cycles of random mixed traffic run with backpressure from both
   layers. A model predicts each connection's busy state, its flags and
   counter, the drop count, and every indication and frame, per source.

It also checks that each mechanism occurred: the silent RR/REJ/I loop,
entering busy, repeated RNR, leaving busy, ignored events, datagram indication,
TEST and XID answers, UI send, upper-layer connection commands, CAM misses,
connection-processor backpressure, bus contention and output backpressure.

`tb_rbusy_path` compares the path machine with a two-state reference model on
random event streams.

All testbenches pass. Each was also run against a copy of its module with one
deliberate fault, and each detected the fault.

Tool notes: Verilator reports `SYNCASYNCNET` for the concurrent assertions
that use `disable iff (!rst_n)` next to asynchronously reset flops. This
warning is harmless. No latch, combinational-loop or multiple-driver warnings
remain.
