# Self-timed torus network with one-of-five channels

This is a network-on-chip for sixteen cores. The nodes are connected as a 4 × 4
torus, a mesh whose rows and columns wrap around into rings. No clock is shared
between the nodes. Every link is a delay-insensitive channel, and packets are
switched cut-through: a node sends each flit on as soon as it has it, without
waiting for the rest of the packet. The whole design rests on one idea. Each
5-wire channel carries two data bits per handshake in a one-hot code, with an
extra wire that marks the end of a packet. So a receiver can tell that a flit
has arrived by ORing five wires, and no timing assumption is needed between
wires.

The RTL here describes that network as synthesizable SystemVerilog. The
self-timed handshakes are kept. The state-holding gates (C-elements and the
mutex) are written as registers stepped by a common `clk`; see
[How the self-timed circuit is rendered](#how-the-self-timed-circuit-is-rendered).

## Channels: one-of-five code, four-phase handshake

A channel has five forward wires `{EOP, w3, w2, w1, w0}` (a `flit_t`, bit 4 is
EOP) and one `ack` wire going back.

| EOP w3 w2 w1 w0 | meaning |
|---|---|
| 0 0 0 0 0 | null (spacer between flits) |
| 0 0 0 0 1 | data 00 |
| 0 0 0 1 0 | data 01 |
| 0 0 1 0 0 | data 10 |
| 0 1 0 0 0 | data 11 |
| 1 0 0 0 0 | end of packet |

Each flit uses one return-to-zero (four-phase) cycle:

1. The sender raises one wire.
2. The receiver latches the flit and raises `ack`.
3. The sender returns all five wires to null.
4. The receiver lowers `ack`.

Completion detection is the OR of the five wires. Assertions in the RTL check
that every channel is one-hot or null.

## Packets and routing

```
| X | Y | D0 | D1 | ... | Dn | EOP |
```

`X` and `Y` are relative addresses, one flit each. Each is the number of hops
still to travel along the X ring (to the next column) and then along the Y ring
(to the next row). The links are unidirectional, so every destination is 0..3
hops away in each dimension. Node `n = 4*row + col`. X links go from
`(r, c)` to `(r, c+1 mod 4)`, and Y links from `(r, c)` to `(r+1 mod 4, c)`.

Routing is dimension order and is done by address arithmetic:

* A router stage reads the first flit it sees, which is the address for its
  dimension.
* If the address is not zero, the stage decrements it and forwards the packet
  in the same dimension.
* If the address is zero, the stage strips that flit and hands the rest of the
  packet to the next stage.

Examples:

* X input: X ≠ 0 leaves on X as `[X-1, Y, data, EOP]`. X = 0 goes to the Y
  stage. There, Y ≠ 0 leaves on Y as `[Y-1, data, EOP]`, and Y = 0 delivers
  `[data, EOP]` to the processor.
* Y input: Y ≠ 0 continues on Y. Y = 0 goes to the processor.
* Processor input: like the X input. The only difference is X = Y = 0, which
  would send the packet back to its own processor; that packet is *given up*
  (every flit acknowledged and dropped).

A packet from node 0 to node 14 (row 3, column 2) carries X = 2 and Y = 3. It
travels 0 → 1 → 2 along row 0, then 2 → 6 → 10 → 14 down column 2.

## Inside a node (`torus_node`)

```
 xin ─ router_x ─┬ xx ──────────┐             ┌ pipeline_latch ─ xout
  (Router_xy → xr → Router_yp)  ├ arbiter ─ merge ┘
                 ├ xy ─┐   px ──┘
                 └ xp ─┼──────┐
 yin ─ sub_router ┬ yy ┼──── arbiter_tree ─ merge(N=3) ─ pipeline_latch ─ yout
                  └ yp ┼──┐   (xy, yy, py)
 pin ─ router_p ─┬ px  │  └─ arbiter ─ merge ─ pipeline_latch ─ pout
  (Router_xy → pr → Router_y)  (xp, yp)
                 └ py ─┘
```

**Router stage (`sub_router`).** This is the unit the routers are built from.
It has three helpers:

* `set_dec` holds the header state. Its next state is computed while a flit
  is present and latched when the input returns to null. So the address flit
  sees state 00 and `dec = 01` (decrement), the second flit sees 01 and
  `dec = 10` (pass), and later flits see 10. The end of the packet resets it
  to 00.
* `decrement` turns w3→w2, w2→w1 and w1→w0 when `dec = 01`, and passes the flit
  when `dec = 10`.
* `route_control` sets `sx` for a non-zero address (same dimension, `out1`) or
  `sy` for a zero address (next dimension, `out2`). It holds the choice until
  the EOP has been handed on.

The flit is latched in one of two rows of asymmetric C-elements, `out1` or
`out2`. Each row's inputs are the decremented flit, the inverted `ack` of its
output, and `sx` or `sy` on the "plus" input. A row takes the flit once its
select is set. It drops the flit when the flit has gone and the output has
acknowledged. A zero address flit is acknowledged by a separate C-element on
`w0` and `dec[0]` (the strip). The input `ack` is the OR of all of these. The
packet ends when the `ack` of its EOP falls, which clears `sx`, `sy` and the
header state. `HAS_OUT2 = 0` gives the
processor's Y stage, which has no path back to the processor and gives up
packets addressed to its own node.

**Arbitration (`arbiter`, `arbiter_tree`, `arb_call`, `mutex`).** Each output
can be wanted by several router outputs at once:

| output | inputs |
|---|---|
| X | `xx`, `px` |
| Y | `xy`, `yy`, `py` |
| P | `xp`, `yp` |

An input's request latch is set by the first flit of its packet. It stays set
until the whole packet has passed, which is what keeps cut-through packets from
interleaving. The latches feed arbitrated call blocks. A call block is a mutex
whose winner passes its request up and gets the grant back. The three-input Y
arbiter is a two-level tree of call blocks. A packet that loses waits with its
first flit on its channel, so its router stage, and the channel behind it, is
blocked.

**Merge (`merge`, N = 2 or 3).** The granted input's wires are ORed into a row
of C-elements, the output latch. The OR of that latch is the `ack` sent back to
the granted input only. Once the latch has carried an EOP and returned to
null, the merge raises `release_o`. The arbiter then clears that input's
request, and the output is free for the next packet.

**Output buffer (`pipeline_latch`).** Each output has `PIPE_STAGES` rows of
five C-elements (two by default). Each row takes a flit when the row after it
has dropped its `ack`. The OR of each row is the `ack` for the row before.

## How the self-timed circuit is rendered

The circuit has no clock. Its memory is in C-elements, which switch only when
all their inputs agree and hold otherwise, and in a mutex. In this RTL:

* **C-element** (`c_element`): a register updated as
  `z <= a&b&c | z&(a|b)` on every `clk` edge. `c` is the optional asymmetric
  "plus" input, which counts only for the rising edge.
* **Mutex**: a registered decision. When both requests arrive together, the
  side that did not win last time gets the grant. This stands in for the
  analogue metastability resolution of a real mutex.
* **Control state**: the header state and route selects of a router stage,
  and the packet state of a merge, are small registers that follow the same
  handshakes.
* Everything between these elements is combinational.

So every feedback loop passes through a flip-flop, and the design synthesizes
and simulates like ordinary RTL. `clk` is not a system clock in the usual
sense. It is the time step of the state-holding gates: every C-element has a
delay of one step. The channels still behave delay-insensitively: a block
never assumes how many steps its neighbour takes. The source of this design
reports a speed (63.9 MHz equivalent over a 100-packet run) from gate-level
timing. Cycle counts here are not comparable with it, so the testbenches check
ordering and handshakes rather than nanoseconds.

Latencies in `clk` steps:

| element | latency |
|---|---|
| pipeline latch | 1 per stage (checked: 2 for the default) |
| merge | 1 |
| router stage | 1 per flit, 2 for the address flit (select, then latch) |
| arbitration | 2 to 3 on the first flit of a packet |

## Deadlock

Deadlock is the part of this network that is easiest to miss. Packets hold
every channel from head to tail, and there are no virtual channels. A rule such
as "no packet crosses the wrap-around link" would break the cycles, but this
design does not enforce one. So packets that wrap around a ring can wait on
each other in a cycle, and then nothing moves again. This is a known property
of the design, not a bug in this RTL.

In simulation, 100 packets with random destinations and unthrottled injection
deadlocked after 41 packets had been delivered. The smallest such cycle needs
two packets in one ring. For example, one holds links 0→1→2 and waits for link
2→3, while the other holds 2→3→0 and waits for 0→1.

The network testbench therefore throttles injection, not the hardware. In each
X ring and each Y ring, a packet that will cross the ring's wrap-around link
must be alone in that ring. Packets that do not wrap may share the ring freely.
Without a wrapping packet a ring behaves like a mesh row, and waits there
cannot form a cycle. `THROTTLE = 0` in `tb_torus_network` shows the raw
behaviour.

## Files

| file | contents |
|---|---|
| `rtl/oof_pkg.sv` | `flit_t`, code words, header-state enum, `encode2`/`decode2`/`flit_valid` |
| `rtl/c_element.sv` | C-element row (helper) |
| `rtl/torus_network.sv` | top: K × K torus of nodes, processor channels as ports |
| `rtl/torus_node.sv` | one node |
| `rtl/router_x.sv`, `rtl/router_p.sv` | two-stage X and processor input routers |
| `rtl/sub_router.sv`, `set_dec.sv`, `decrement.sv`, `route_control.sv` | router stage and its parts |
| `rtl/switch.sv` | the three arbiters and merges of a node |
| `rtl/arbiter.sv`, `arbiter_tree.sv`, `arb_call.sv`, `mutex.sv` | arbitration |
| `rtl/merge.sv` | merge with output latch |
| `rtl/pipeline_latch.sv` | output buffer |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_chan_src` and `tb_chan_sink` are behavioural channel ends |

Parameters:

| module | parameter | default | meaning |
|---|---|---|---|
| `torus_network` | `K` | 4 | 4-ary 2-cube; 2..4 only, since one address flit holds 0..3 |
| `torus_network`, `torus_node` | `PIPE_STAGES` | 2 | stages per output pipeline latch |
| `merge` | `N` | 2 | number of inputs |
| `sub_router` | `HAS_OUT2` | 1 | whether the second output exists |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog. For example, the whole network at its default size takes well under a
second:

```
verilator --binary --timing --assert --top-module tb_torus_network \
  rtl/oof_pkg.sv $(ls rtl/*.sv | grep -v oof_pkg) \
  tb/tb_chan_src.sv tb/tb_chan_sink.sv tb/tb_torus_network.sv
./obj_dir/Vtb_torus_network
```

The package must come first on the command line.

`tb_torus_network` sends 100 packets with random destinations, plus two
packets addressed to their own node. Every processor receiver is randomly
slow. One packet goes a single hop and one goes the longest way, three hops in
each dimension. The test checks that each packet arrives once, at the right
node, whole and not interleaved, and that both path lengths were delivered. It also counts these mechanisms and fails if any of them
never happens:

* address decrement;
* address strip;
* give-up;
* output contention;
* traffic on the wrap-around links;
* full output latches.

The other testbenches drive each block with the same behavioural channel ends
and compare the outputs with reference models written independently in the
testbench. Covered this way are the decrement table, the header state table,
mutex exclusion and fairness, arbitration without interleaving, pipeline
latency, and the routing cases of each router.

## Where this RTL departs from the circuit it models

* C-elements and the mutex are clocked registers (see above). The metastability
  filter of a real mutex is replaced by alternating priority on ties.
* The gate-level wiring of the router, the arbitrated call block and the
  route-control clear path is written from their described function, not
  traced gate by gate. So are the arbiter's "reset on EOP" (here a
  `release` signal from the merge) and the way a packet is given up (discarded
  flit by flit).
* The three-input Y arbiter is a two-level tree with the processor input at the
  root. That choice is arbitrary.
* The processors are not modelled in `rtl/`. Their channels are the top's
  ports.
* Reset is a synchronous active-low `rst_n` that empties every latch.
