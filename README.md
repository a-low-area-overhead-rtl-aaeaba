# A small-area wormhole network on chip: five-port XY switch and 2-D mesh

This is SystemVerilog RTL for a packet-switched network on chip. It is built
to be small: one logical channel per link, a short input FIFO per port, and a
single shared routing unit per switch. IP cores sit on a 2-D mesh. Each core
is attached to the Local port of a switch. Neighbouring switches are joined
by a pair of one-way links. Packets move in wormhole fashion: only the first
flit carries the destination. It reserves a path through each switch, and
the rest of the packet follows on that path until a length counter releases
it. Routing is deterministic XY: first along X to the target column, then
along Y.

The default configuration is a 2x2 mesh with 8-bit flits and 8-flit input
buffers. This is the size of the FPGA prototype the design was made for.
Any mesh size up to 16x16 can be set with parameters.

## Packets and addresses

A packet is a sequence of flits:

| flit | content |
|------|---------|
| 0 | header: target switch address, X in the upper half of the flit, Y in the lower half (`8'h21` = column 2, row 1) |
| 1 | payload length N, 0 to 2^FLIT_W - 1 |
| 2 .. N+1 | payload |

Switch (x, y) has address x in the upper half and y in the lower half. X grows
towards East and Y towards South, so row 0 is the northern edge. The address
layout inside the flit is a choice made for this RTL.

## The link handshake

Each direction of a link has three wires: `tx` (from the sender), `data`
(FLIT_W bits) and `ack` (from the receiver). On a switch these are
`tx/data_out/ack_tx` on an output and `rx/data_in/ack_rx` on an input.

* The sender puts a flit on `data` and raises `tx`. It holds both until it
  sees `ack` high.
* The receiver stores the flit in the first cycle it sees `tx` while its
  `ack` is low and it has room. It raises `ack` for exactly the next cycle.
* In that `ack` cycle the sender takes the flit as delivered. From the next
  cycle it may offer the next flit.

This gives one flit every two clock cycles on every link. A full buffer
simply gives no `ack`, and the sender waits. This is the only flow control
in the network. There is no end-to-end flow control; that is left to the
cores. The Local port of every switch uses the same handshake towards its
core.

## Inside the switch (`hermes_switch`)

```
      rx/data_in/ack_rx (x5)                    tx/data_out/ack_tx (x5)
             |                                          ^
      +------v-------+  data_av/data   +----------+     |
      | input_buffer |---------------->| crossbar |-----+
      |   (x5)       |<----------------|  muxes   |<----+ ack_tx
      +--+-------^---+  data_ack,close +----^-----+     |
         | h     | ack_h                    | free/in/out     +--------------+
      +--v-------+---+  req_rot,incoming,   |  table          | flit_counter |
      |   arbiter    |--header------->+-----+--------+<-close--|    (x5)      |
      +--------------+<---ack_rot-----| routing_logic|          +--------------+
                                      +--------------+
```

Ports are numbered East 0, West 1, North 2, South 3, Local 4.

**input_buffer**: one per input. It is a circular FIFO of BUF_DEPTH flits
with a three-state controller:

* IDLE: waits for a flit at the head. Between packets the head flit is
  always a header.
* REQ: raises `h` with the header visible on `data`, and waits for `ack_h`.
* CONN: offers flits on `data_av`/`data` and pops one on `data_ack`. It
  returns to IDLE on `close`.

**arbiter**: serves the `h` requests one at a time with rotating priority.
The port after the one served last comes first, in the order E, W, N, S, L,
wrapping around. After Local it is East. The arbiter passes the winner's
index (`incoming`) and its header to the routing logic with `req_rot`. If the
routing logic made the connection, it pulses `ack_h` to the winner. Whether
the request succeeded or was refused, the winner then drops to the lowest
priority. So a port whose output is busy keeps requesting but cannot block
the others, and no port starves.

**routing_logic**: runs the XY algorithm on the header and keeps the
switching table. The table has three vectors:

* `free[o]`: 1 when output o is free, 0 when it is busy.
* `out_sel[o]`: the input that drives output o.
* `in_sel[i]`: the output that input i drives. `in_busy[i]` marks the
  entries that are valid.

The same connection is stored twice. This lets the output multiplexers and
the acknowledge multiplexers each read their select directly. A request
takes four cycles: route, check `free`, write the table, and `ack_rot`. The
last cycle also carries `rot_ok`. If the output is busy the request is
refused and the header stays in its buffer for a later round.

For example, with West->North, North->South and Local->East all open:

| | 0 (E) | 1 (W) | 2 (N) | 3 (S) | 4 (L) |
|---|---|---|---|---|---|
| free | 0 | 1 | 0 | 0 | 1 |
| in_sel | - | 2 | 3 | - | 0 |
| out_sel | 4 | - | 1 | 2 | - |

**flit_counter**: one per output. It watches the flits that leave its
output. It loads N from the length flit, counts payload flits down, and
raises `close` in the cycle the last flit is transferred. A length of 0
closes with the length flit itself. `close` frees the output in the table.
Through the crossbar it also returns the input buffer to IDLE. That input's
next head flit is therefore treated as a new header, and never leaks into the
old connection.

**crossbar**: the combinational multiplexers. For each output o:
`tx[o] = !free[o] && data_av[out_sel[o]]` and
`data_out[o] = data[out_sel[o]]`. For each input i, `data_ack[i]` and
`close_in[i]` are taken from the output `in_sel[i]` (when `in_busy[i]`).

### Timing

With no contention, a header offered on an input's `rx` in cycle t is offered
on the chosen output's `tx` in cycle t+10:

| cycle | event |
|---|---|
| t | header offered |
| t+1 | `ack_rx` |
| t+2 | `h` |
| t+3 | arbiter grant |
| t+4 .. t+8 | `req_rot`, four routing cycles, `ack_rot` at t+8 |
| t+9 | `ack_h` |
| t+10 | `tx` |

The following flits move at one per two cycles. With no contention, the
latency of a packet of P flits (header and length included) across a path
of n switches is

    latency = 10 * n + 2 * P   cycles

This runs from the first cycle the source core offers the header to the cycle
after the target core acknowledges the last flit. Example: 00 -> 11 in a 2x2
mesh with P = 9 takes 3*10 + 18 = 48 cycles. The testbench checks this
exactly.

## The mesh (`hermes_noc`)

`hermes_noc` places X_SIZE x Y_SIZE switches. Switch (x, y) gets address
(x, y). Its East port is wired to the West port of (x+1, y), and its South
port to the North port of (x, y+1). Each switch is built with only the ports
its position needs, through the switch parameter `PORTS_EN`. A corner switch
has three ports, an edge switch four and an inner switch five. A missing
port has no buffer and no counter. XY routing never selects a missing port
for a target inside the mesh. Local port signals are flattened by core index
`c = y*X_SIZE + x`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `local_rx` | in | cores | core offers a flit |
| `local_data_in` | in | cores x FLIT_W | flit from the core |
| `local_ack_rx` | out | cores | network stored the flit |
| `local_tx` | out | cores | network offers a flit |
| `local_data_out` | out | cores x FLIT_W | flit to the core |
| `local_ack_tx` | in | cores | core stored the flit |

Parameters: `X_SIZE = 2`, `Y_SIZE = 2`, `FLIT_W = 8` (even, at most 32),
`BUF_DEPTH = 8`. XY routing on a mesh is deadlock-free. A packet can still
wait for an unbounded time behind a long packet that holds an output it
needs. This is best-effort service only.

Targets must lie inside the mesh. A header for an address outside it is
routed towards an edge port that leads nowhere, and the packet stalls there.

## Where this RTL departs from, or adds to, the original design

* **Cycle-level sequencing.** The arbiter, routing and buffer state machines
  were designed here. They are tuned to reproduce the published figures:
  10 cycles of routing per switch, 2 cycles per flit, and a four-cycle
  routing step that the arbiter waits for.
* **Packet length.** The original states both that a packet has a fixed
  2^FLIT_W flits and that the second flit gives the payload length. This RTL
  uses the length flit, so packets have N + 2 flits with N < 2^FLIT_W.
* **Address layout.** The address is split as X in the upper half and Y in
  the lower half of the header flit. Y grows towards South.
* **Counter timing.** The per-output counter loads when the length flit
  *leaves* the output, and `close` coincides with the last transfer.
* **Refused requests.** The routing logic reports a refused request with
  an extra signal, `rot_ok`.
* **Edge switches.** A missing port is removed by a parameter of the one
  switch design, not by a separate switch variant. The routing table keeps
  five entries in every switch.
* **Not included:** the IP cores of the prototype (an RS-232 serial core,
  memory cores and a small 16-bit processor) and the send/receive wrapper
  that adapts a core to the Local port. Their internals are not part of
  this design. The mesh exposes the Local ports for them instead.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it shows |
|---|---|
| `tb_input_buffer` | handshake (ack one cycle later, 2 cycles/flit), `h` before any flit is offered, no ack when full, order, `close`, the next header kept |
| `tb_arbiter` | service order against a reference rotating-priority model, refused port to the back, `req_rot`/`ack_h` timing |
| `tb_routing_logic` | all 9 targets of a 3x3 mesh from switch 11, 4-cycle answer, the table above, refusal of a busy output, simultaneous closes |
| `tb_flit_counter` | lengths 0, 1, 2, 3, 7, 255 with stalls; `close` exactly on the last transfer |
| `tb_crossbar` | 500 random legal tables against a model |
| `tb_hermes_switch` | packet `11 07 00 01 00 12 34 56 78` Local->East (10-cycle header latency, 2-cycle flits, counter 07->06, table and `free`); three simultaneous connections; random traffic on all five ports with stalling outputs |
| `tb_hermes_noc` | full default 2x2 mesh: the 48-cycle latency of a 9-flit 00->11 packet, then 60 random packets per core with random receiver stalls. Every packet is checked flit by flit and counted per source/target. The test requires refused routing requests, full buffers, several connections per switch and backpressure reaching a core |
| `tb_hermes_noc_3x3` | the mesh at 3x3: latency over 3 and 5 switches and random all-to-all traffic |

The random sources build each packet as header, length, source id, sequence
number, then `(src*37 + seq*11 + j) mod 256`. Receivers can therefore check
every flit without a shared scoreboard. The helpers are `tb_link_source` and
`tb_link_sink`.

To run one with Verilator:

    verilator --binary --timing --assert -Irtl -Itb rtl/hermes_pkg.sv tb/tb_hermes_noc.sv \
        --top-module tb_hermes_noc -o sim && ./obj_dir/sim

The RTL uses only synthesizable constructs. The assertions in the RTL
(flit held until taken, one `ack_h` at a time, a consistent switching table)
are checked during simulation with `--assert`.
