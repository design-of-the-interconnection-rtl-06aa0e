# EARTH interconnection network in SystemVerilog

A message-passing network for a multiprocessor with up to 16 processing nodes
by default. It is built from one small part used over and over: a 4x4 crossbar
switch with one FIFO per input.

Nodes exchange messages, which are byte streams with a one-byte header per
network stage. Each switch reads one header byte and drops it. It then connects
the input to the output the byte names and passes the rest of the message
through as it arrives. This is virtual cut-through: a message can leave a
switch before its tail has come in. A header byte can name a fixed port.
It can also name a random choice within a pair of ports, which lets a message
step around an output that is already busy. Or it can name a broadcast to two
or four outputs.

Each node reaches the network through a network interface. The interface has a
64-unit send buffer and a 64-unit receive buffer. The node writes and reads
8-byte words, while the network side moves one byte per clock.

The RTL follows the EARTH interconnection network design: a 4x4 switch, a
multistage network of such switches, and a network interface. The
processing nodes themselves are outside this design. They appear only as the
node-side ports of the interfaces.

## Transfer units and messages

Every link carries a 9-bit transfer unit. Bit 8 is the control bit:

| unit | code (bit 8..0) | meaning |
|---|---|---|
| data | `0_dddddddd` | one data byte |
| ROUTE_0..3 | `11111_0000`..`11111_0011` | go to output port 0..3 |
| ROUTE_U | `11111_0100` | go to port 0 or 1, whichever is free |
| ROUTE_L | `11111_0101` | go to port 2 or 3, whichever is free |
| ROUTE_UL | `11111_0110` | go to one upper and one lower port (broadcast) |
| ROUTE_A | `11111_0111` | go to all four ports (broadcast) |
| TAG_1 | `100_aaaaaa` | ordering tag, byte 1: source node |
| TAG_2 | `101_nnnnnn` | ordering tag, byte 2: message number |
| CLOSE | `111000000` | end of message, connection released |
| ABORT | `111010000` | end of message, connection released |
| FILLER | `111111111` | padding; passes the switches, dropped by the receiver |

A message as sent by a node is:

    ROUTE (one per stage) -> TAG_1 TAG_2 -> data ... -> CLOSE

The node receives only `TAG_1 TAG_2 data ... CLOSE`. Every switch consumes
exactly one route unit, and the receiving interface removes FILLER units. The
tag lets a receiver put back in order the messages that random routing may
deliver out of order. Data moves in 8-byte words. A node pads a message with
FILLER so that it can be written in 2-, 4- or 8-unit pieces. `earth_net_pkg`
holds these codes and the functions that decode them.

## The 4x4 crossbar switch (`crossbar_switch`)

Each input port has a 32-entry FIFO (`xbar_fifo`) and a control unit
(`control_unit`). The four control units share a combinational crossbar
(`crossbar`) and an arbiter (`wwfa_arbiter`).

A port is three signals:
- a 9-bit unit;
- a write strobe (WCLK), high in each cycle that carries a unit;
- a stop flag flowing the other way. A sender must not strobe while stop is high.

An input port's stop is its FIFO's AFULL flag. The FIFO is empty when HEAD ==
TAIL and AFULL when HEAD == TAIL + 1, so it holds 31 units. That is more than
two of the shortest (12-byte) messages, so the second can start as soon as the
first has gone.

### Control unit: six states

```
IDLE -> READ_MSG -> MAKE_CONN -> CONN_GRANTED <-> DATA_XFER -> IDLE
                         \-> RANDOM_ROUTE -/
```

- **IDLE.** Waits until the FIFO is not empty and no broadcast is pending in
  the switch.
- **READ_MSG.** Reads the head unit. A route command goes into a route
  register and is not forwarded. Any other unit here is discarded, for
  example FILLER left between messages.
- **MAKE_CONN.** Raises the request for one, two or four output ports.
  - If the arbiter grants it, the next state is CONN_GRANTED.
  - Otherwise the next state is RANDOM_ROUTE.
- **RANDOM_ROUTE.** Keeps requesting. When the route is a random one and the
  port it wants is held by another connection, the request moves to the
  other port of the pair.
  - ROUTE_UL steps through the pairings {0,2}, {0,3}, {1,3}, {1,2}.
  - A fixed route simply waits.
- **CONN_GRANTED / DATA_XFER.**
  - One unit moves per clock while the FIFO is not empty and the connected
    outputs are not stopped.
  - When a unit cannot move, the control unit waits in CONN_GRANTED.
  - The CLOSE or ABORT unit is forwarded. The unit then drops its request,
    which releases the outputs, and returns to IDLE.

**Latency.** With a free output, a route command written into the switch's
FIFO at clock edge t is followed by the first unit written into the next FIFO
at edge t+4. This matches the 4-cycle connection latency of the original
design, whose target clock was 66.7 MHz (60 ns). Through the idle 16-node
network a unit written by a node reaches the destination's receive buffer 13
clocks later: one to leave the send buffer and four per stage.

**Throughput.** After that the port moves one unit per clock. A switch can
carry four such connections at once.

### Arbiter: wrapped wave front

The arbiter has 16 request and 16 grant signals, one per crosspoint (input
i, output j). Priority is set by a one-hot 4-bit shift register. It resets to
0001 and rotates right every clock. If the 1 is at position k, the four
top-priority cells are:
- normally, the wrapped diagonal (i + j) mod 4 == k. These four cells are in
  different rows and columns, so all four can win together.
- while any control unit holds a broadcast route (BroadcastPending), the row
  i == k. This lets one input win several columns at once.

For a free column:
- a lone requester wins at once;
- among several requesters, the one on the wave front wins, and the others
  try again the next clock as the wave moves on.

Grants are given in the same cycle as the request. A grant stays held while
its row keeps requesting, which is for the whole message.

Two rules are this design's own, added to keep the network free of deadlock
and livelock:
1. **Multi-port requests are all or nothing.** A broadcast request is
   granted whole or not at all. With partial grants, two broadcasts could
   each hold a port the other needs and wait forever.
2. **Random re-routing only around held ports.** A random route moves to the
   partner port only when its port is held by an established connection
   (the arbiter's `busy` output). It does not move just because it lost one
   round of arbitration. Without this rule, two random requests in the same
   pair chasing each other could trade ports every cycle and never be
   granted.

### Crossbar

WCLK_OUT[j] is the OR of WCLK_IN[i] & GRANT[i][j]. STOP_OUT[i] is the OR of
STOP_IN[j] & GRANT[i][j], gated by "row i is connected anywhere". So a
broadcast input stops when any of its outputs stops. The original design uses
tristate buses. Here each column is an AND-OR of the rows, which is equivalent
because a column has at most one granted row.

## The multistage data network (`data_network`)

The network has `STAGES` stages of N/4 switches, where N = 2^(STAGES+1).
- 2 stages give 8 nodes.
- 3 stages give 16 nodes (the default).

It is an indirect binary n-cube re-cut for 4x4 switches. Stages are counted
s = 1..n from the node side. Ports 0 and 1 of a switch are its upper pair and
ports 2 and 3 its lower pair.

- Node i enters switch i/4 of stage 1 at port i mod 4.
- **Between stage s and stage s+1.** Output p of switch k goes to switch m,
  input q:
  - m is k with bit s-1 replaced by p[1];
  - q = {k[s-1], p[0]}.

  Both ports of a pair therefore lead to the same next switch. That is why a
  random choice within the pair never changes where the message can go.
- **Last stage.** Output p of switch k is node b:
  - b[0] = p[1];
  - b[n] = p[0];
  - b[n-s] = k[s-1] for the middle bits.

**Routing to node b.**
- At stage s < n, take the upper pair if b[n-s] = 0 and the lower pair if it
  is 1. Use ROUTE_U / ROUTE_L for a random choice, or the exact port.
- At the last stage, take port {b[0], b[n]}.

Example, node 4 to node 13 (1101) in the 16-node network. All of these work:

| headers | stage 1 | stage 2 | stage 3 |
|---|---|---|---|
| all random | ROUTE_L | ROUTE_U | ROUTE_3 |
| mixed | ROUTE_L | ROUTE_1 | ROUTE_3 |
| all fixed | ROUTE_2 | ROUTE_0 | ROUTE_3 |

**Broadcast.** Use ROUTE_UL at stages 1..n-1 and ROUTE_A at the last stage.
The message then reaches every node, including the sender, exactly once.

The wiring formulas are this design's own. They satisfy the routing rule and
these examples. The switch numbering in a particular drawing of the network
may differ from them.

## The network interface (`network_interface`)

The interface is a send buffer (`send_fifo`) and a receive buffer
(`receive_fifo`), 64 units each. The node side works once per clock with CS,
R/W and DATA_TYPE:

| CS | R/W | DATA_TYPE | operation |
|---|---|---|---|
| 0 | - | - | none |
| 1 | 1 | 01 / 10 / 11 | write the low 2 / 4 / 8 units of `data_wr` |
| 1 | 1 | 00 | reset: both buffers emptied |
| 1 | 0 | - | read: one unit if the head is a command (CAHOD), eight if it is data (DAHOD) |

**Words.** A node word is eight 9-bit units, 72 bits. Unit k is in bits
9k+8..9k, and the low units are sent first.

**Reading.** `data_rd` always shows the eight units at the head of the
receive buffer. A command is in its low 9 bits. A data read takes effect only
when RECEIVE_8 is high.

**Status.** The status word is a 12-bit struct (`ni_status_t`), high bit first:

    SEND_2 SEND_4 SEND_8 SEND_EMPTY SEND_FULL RECEIVE_8 RECEIVE_16 RECEIVE_24
    RECEIVE_EMPTY RECEIVE_FULL DAHOD CAHOD

- SEND_2/4/8 mean fewer than 2/4/8 units are free.
- RECEIVE_8/16/24 mean at least that many units are stored.

A node must check these before each access. A write that does not fit, or a
data read of fewer than eight units, does nothing.

**Network side.** The send channel moves one unit per clock while it is not
empty and not stopped. The receive channel drops FILLER. Its stop is
RECEIVE_FULL.

`earth_interconnect` (the top) connects interface i's send channel to network
input i and network output i to interface i's receive channel. Its ports are
the node-side buses of all N interfaces, as unpacked arrays indexed by node.

## Where this RTL departs from the original design

- **One clock edge.** In the original, WCLK/RCLK are half-cycle pulses and the
  FIFO uses falling-edge address shadow registers. Here every register uses
  the rising edge of one clock. WCLK, RCLK, SEND_CLK and RECEIVE_CLK are
  enables. The FIFO head is visible without a read (first-word fall-through).
  The original writes the FIFO in mid-cycle, so its controller sees a unit
  half a clock after it arrives. Here the controller gets the FIFO's write
  strobe as `arriving` and leaves IDLE on the write edge. This keeps the
  4-clock latency per stage.
- **Reset.** Reset is asynchronous and active high.
- **Split data bus.** The interface's bidirectional data bus is split into
  `data_wr` and `data_rd`.
- **Arbitration rules.** Broadcast grants are all-or-nothing, and random
  re-routing uses the `busy` information (see the arbiter section).
- **Status word.** The bit order is a choice of this design.
- **ABORT** ends a connection exactly like CLOSE. Nothing more is defined
  for it.
- **Not modelled.** Gate-level timing, pin counts and area of the original
  chips are not modelled.
- **Known limit: concurrent broadcasts can deadlock.** This follows from
  cut-through broadcast with one input FIFO per port, and the switch design
  this RTL follows does not prevent it. A broadcast holds all outputs of a
  last-stage switch while it waits for its data. While a switch holds a
  broadcast, its other inputs stay idle (BroadcastPending). If two
  broadcasts each hold a switch that the other's data must pass through, and
  their data sits behind other messages in full FIFOs, nothing moves again.

  In stress runs of the 16-node network this happened with:
  - several nodes broadcasting repeatedly among unicast traffic;
  - messages of up to 32 units.

  It still happened with 64-entry switch FIFOs. It did not happen in the
  same traffic when messages were at most 16 units, or when all broadcasts
  came from one node.

  The safe use is to allow one broadcasting node at a time, for example by a
  software token. In `tb_earth_interconnect`, node 4 broadcasts five times
  among the unicast traffic, and nodes 4 and 11 each broadcast once at the
  end. All of these complete.

## Parameters

| module | parameter | default |
|---|---|---|
| `earth_interconnect` | `STAGES`, `FIFO_DEPTH`, `SEND_DEPTH`, `RECEIVE_DEPTH` | 3, 32, 64, 64 |
| `data_network` | `STAGES`, `FIFO_DEPTH` | 3, 32 |
| `crossbar_switch` | `FIFO_DEPTH` | 32 |
| `xbar_fifo` | `DEPTH` | 32 |
| `send_fifo` / `receive_fifo` | `DEPTH` | 64 |

Depths must be powers of two. TAG fields are 6 bits, so node numbers and
message numbers in tags are limited to 0..63.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it covers |
|---|---|
| `tb_xbar_fifo` | FIFO against a queue model, AFULL at 31 units |
| `tb_crossbar` | crossbar equations on random legal grant matrices |
| `tb_wwfa_arbiter` | the documented wave examples, plus a reference model on random requests |
| `tb_control_unit` | route consumption, forwarding, 4-cycle latency, random routes, stalls, broadcast, ABORT |
| `tb_crossbar_switch` | latency, four parallel connections at one unit per cycle, contention, random routing, broadcasts, back-pressure, random traffic |
| `tb_data_network` | the 16-node network with the three header sets above, a broadcast, a forced random route, random all-to-all traffic with stops |
| `tb_data_network_8` | the 8-node, 2-stage network: node 0 to node 6 with the first-stage port 2 occupied leaves on port 3, then broadcast and random traffic |
| `tb_send_fifo`, `tb_receive_fifo`, `tb_network_interface` | flags, piece sizes, filler removal, read sizes, reset, send-to-receive loopback |
| `tb_earth_interconnect` | the full 16-node system at default parameters, end to end (below) |
| `tb_earth_net_pkg` | command codes and route decoding |
| `tb_switch_utilization` | output utilization of one switch with four randomly addressed messages (below) |

`tb_earth_interconnect` drives all nodes through their interfaces. Each node
sends 40 random messages. Node 4 mixes five broadcasts into its traffic,
nodes 4 and 11 each end with a broadcast, and one message ends in ABORT. Some receivers pause so that their buffers fill. The testbench checks
every delivered unit. It also counts random re-routes, broadcasts, full switch
FIFOs, stopped send channels, full receive buffers, dropped fillers, ABORT and
reset operations, and fails if any count is zero. Before the traffic starts
it times one message through the idle network: its first units must reach
the receive buffer 13 clocks after the node writes them. It runs in about
2,800 clocks.

`tb_switch_utilization` measures how many of a switch's four outputs are in
use when each input holds one message to a random port:
- with fixed routes: 68.7%, against 1 - (3/4)^4 = 68.4%;
- with random routes within a pair: 81.2%, against 52/64 = 81.25%.

The original design quotes a best case of 91% for random routing, from a
different estimate. Random routing within a pair, as built here, does not
reach it.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl rtl/earth_net_pkg.sv \
        tb/tb_earth_interconnect.sv --top-module tb_earth_interconnect
    ./obj_dir/Vtb_earth_interconnect

Replace the testbench name to run another one. The package file must come
first.

## Tool notes

Verilator lint warns about three things. All are deliberate:
- unused low bits of the unit inside `is_route` (only the prefix is compared);
- the unused FILLER constant in some instantiations;
- `rst` used both as an asynchronous reset and in the `disable iff` of the
  assertions in `crossbar_switch` and `wwfa_arbiter`.
