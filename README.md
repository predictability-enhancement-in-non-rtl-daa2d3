# Selective packet splitting for a non-preemptive wormhole NoC

A simple wormhole network-on-chip has one buffer per input port and no
virtual channels. Once a packet owns an output link it keeps it until its last
flit has passed. An urgent packet that arrives just after a long, unimportant
one has to wait for all of it. Preemptive networks solve this with one buffer
per priority level on every port, and that is expensive in area and power.

*Selective packet splitting* (SPS) gets most of the benefit of preemption
without those buffers. When a more urgent packet asks for an output port
that a less urgent packet holds, the holder may end its packet early. It marks
the next flit as a tail flit, releases the output port and immediately asks
for it again, now as a new packet with a header it builds itself. The
priority arbiter gives the port to the urgent packet first. The rest of the
interrupted packet follows later as a second piece. No flit is stored twice
and no buffers are added: the only cost is a little control logic per input
port and one extra header flit on the link for each split.

Two margins, set at run time, control how eagerly a router splits:

* **PD** (priority difference): the contender must be more urgent than the
  current packet by more than PD levels.
* **RF** (remaining flits): the current packet must still have at least RF
  payload flits to send. It must also have at least two, so that something
  is left after the tail flit.

Splitting can also be switched off. The router then behaves as a plain
non-preemptive priority router, which is useful for comparisons.

This repository holds synthesizable SystemVerilog for the router and for a
W x H mesh of them (4 x 4 by default), plus self-checking testbenches.

## Packets and flits

A flit is 16 bits. Bit 15 marks the last flit of a packet (the tail flit) in
every flit. A packet is one header flit followed by one or more payload flits.

```
header : [15] 0 | [14:11] priority | [10:9] dst_x | [8:7] dst_y | [6:0] length
payload: [15] tail | [14:0] data
```

* Priority 0 is the most urgent of the 16 levels.
* `length` is the number of payload flits that follow the header (1..127).
* The widths come from `sps_pkg` (`FLIT_W`, `PRIO_W`, `COORD_W`); the length
  field gets whatever bits are left.

**Splitting changes what the receiver sees.** A packet can arrive in several
*pieces*. Each piece starts with a header that has the packet's priority and
destination, and its `length` is the number of payload flits *still to come
for the whole packet*. Each piece ends with a tail flit. Pieces of one packet
arrive in order and on the same path, but pieces of other packets can arrive
between them at the destination. A receiver that needs whole packets must
reassemble them. It can use the length field: a piece whose flit count equals
its header's length completes the packet. Packets from the same source to
the same destination never overtake each other.

## Router

`sps_router` has five ports, numbered east 0, west 1, north 2, south 3 and
local 4. East is +x and north is +y. Every link uses a valid/ready handshake:
a flit moves in a cycle where `valid` and `ready` are both high. `ready` is
derived from the fill level of the receiving buffer only, so there is no
combinational path from one router to the next.

```
           +-----------------------------------------------+
 in[p] --> | sps_input_port x5                             |
           |   sps_fifo (2 flits)                          |
           |   sps_xy_route                                |
           |   regs: port request, priority, flits left,   |
           |         out port (connection)                 |
           |   5-state FSM with split state                |
           |        | req/prio           ^ grant, contender|
           |        v                    |                 |
           |   sps_arbiter (one priority pick per output)  |
           |        |                                      |
           |   sps_crossbar (input -> held output) --------+--> out[p]
           +-----------------------------------------------+
```

* **Input buffer** (`sps_fifo`): 2 flits deep by default (`BUF_DEPTH`).
  The output ports have no buffers.
* **XY routing** (`sps_xy_route`): the packet goes along x to the
  destination column, then along y, then leaves by the local port.
* **Arbiter** (`sps_arbiter`): for every output port that no input holds, it
  grants the most urgent requesting input. Equal priorities are served
  round-robin, with one pointer per output. Several outputs can be granted in
  the same cycle. For every output it also reports whether anyone is waiting
  for it and the best waiting priority (`cont_valid`, `cont_prio`). The input
  port that holds the output uses this report to decide whether to split.
* **Crossbar** (`sps_crossbar`): connects each input that holds a
  connection to its output port, and returns that output's `ready`.

### Input port state machine

`sps_input_port` is the core of the design. Its five states:

| state | name | what happens |
|---|---|---|
| 1 | `S_ARB_REQ` | Wait for a header at the head of the buffer. Remove it and load priority, destination, port request (from XY routing) and flits left (from the length field). |
| 2 | `S_ARB` | Request the output port until the arbiter grants it. The grant loads the out-port (connection) register. |
| 3 | `S_DATA` | Send a header built from the registers, then payload flits, decrementing flits left. The flit sent with the tail bit ends the connection (to state 4). If the split condition holds, go to state 5 instead of sending. |
| 4 | `S_CLOSE` | Release the output port (one cycle), then go back to state 1. |
| 5 | `S_SPLIT` | Send the next payload flit with the tail bit forced, release the output port, and go to state 2 to request the port again for the rest of the packet. |

The split condition, checked in state 3 after the header has gone out:

```
cfg_sps_en
&& some input waits for this output port (cont_valid)
&& own priority value - cont_prio > cfg_pd     (contender is more urgent)
&& flits_left >= cfg_rf && flits_left >= 2
&& the flit at the head of the buffer is not already a tail flit
```

Points that are easy to miss:

* The header is always rebuilt from the registers, never forwarded from the
  buffer. The first piece therefore looks exactly like the original header.
  After a split, the new header carries the remaining count.
* A flit that arrives already marked as a tail flit always ends the
  connection, even if flits left is not zero. This happens when an upstream
  router has split the packet. The port then goes to state 1 and reads the
  upstream router's new header from the buffer. This lets pieces be split
  again further down the path.
* After a split, the port asks for the same output again with the same
  priority. The more urgent contender is already requesting, so the arbiter
  picks it. When that packet has passed, the rest of the split packet
  competes normally.
* Cost of a split on the link: one idle cycle entering state 5, one extra
  header flit, and a new arbitration.

### Timing

With no contention and an always-ready receiver:

* A header written into the input buffer in cycle *t* is removed at *t+1*,
  granted at *t+2*, and sent as a header flit at the clock edge of *t+3*.
* Payload follows at one flit per cycle.
* A packet with *n* payload flits clears one router in 3 + *n* cycles, and
  each further hop adds 3 cycles of header latency.
* After a split, the waiting urgent packet can be granted in the cycle the
  split tail flit leaves. In the router testbench its header follows the
  tail flit within 4 cycles, and the testbench checks this bound.

## Mesh top level

`sps_noc` (parameters `W`, `H`, `BUF_DEPTH`; default 4 x 4 and 2) connects
router (x, y):

* its east port to the west port of (x+1, y);
* its north port to the south port of (x, y+1).

The ports on the mesh edges are tied off: they never send and they always
accept. XY routing never uses them for a destination inside the mesh.

All local ports are brought out as arrays indexed by `node = y*W + x`:

| signal | dir | meaning |
|---|---|---|
| `loc_in_valid/flit/ready` | in/in/out | inject flits at a node |
| `loc_out_valid/flit/ready` | out/out/in | flits delivered at a node |
| `cfg_sps_en`, `cfg_pd[3:0]`, `cfg_rf[6:0]` | in | shared by all routers; may change at run time |
| `split_evt` | out | per node, pulses when that router splits a packet |

Reset is asynchronous and active low (`rst_n`).

## Where this RTL departs from, or adds to, the described design

The technique and the router structure follow the published description: an
input-buffered Hermes-style router with XY routing, wormhole switching,
priority in the header, the 'port request', 'priority', 'flits left' and
'out port' registers, the five-state input port and the PD/RF split rule.
The following are choices of this implementation:

* **Flit format**: the 16-bit width, the field layout, the one-flit header
  with a length field and the 127-flit packet limit. Only the tail bit in the
  MSB and the priority in the header are given by the description.
* **PD test**: split when the difference is *strictly greater* than PD.
  PD = 0 therefore means "any more urgent contender".
* **RF test**: RF is an absolute flit count (flits left >= RF). In the
  published experiments RF is a fraction of the packet size; that is
  obtained by setting RF to that fraction of the length. The extra
  flits-left >= 2 guard is this design's own.
* **Tail flit**: the split tail flit is the next payload flit with its MSB
  set, not an extra empty flit.
* **Connection close**: the connection closes on the tail bit rather than
  only on flits left reaching zero. This is needed to pass on pieces that
  were split upstream.
* **Arbitration details**: per-output priority arbitration with a
  round-robin tie-break, several grants per cycle, and unbuffered output
  ports.
* **Handshake, reset and port numbering**: the valid/ready link handshake,
  the asynchronous reset and the port numbering.
* **Run-time configuration**: the run-time `cfg_*` inputs, including the
  on/off switch.
* **Not included**: priority forwarding, which the description names as a
  way to fight head-of-line blocking, is only proposed there and is not
  built. The traffic generators and the latency analysis of the published
  evaluation are test equipment, not part of the network. Here the
  testbenches play that role.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_sps_fifo` | random push/pop against a queue model; ready exactly when not full |
| `tb_sps_xy_route` | all 256 position/destination pairs of a 4 x 4 mesh |
| `tb_sps_arbiter` | random requests against a reference arbiter with its own round-robin pointers; rotation among equals; urgent request wins |
| `tb_sps_crossbar` | random one-to-one connections, valid, flit and ready routing |
| `tb_sps_input_port` | exact output flit sequences for a plain packet (3-cycle header and 3+n tail latency), a split, PD not met, RF not met, splitting off, a packet already split upstream, and a split under random back pressure |
| `tb_sps_router` | urgent packet overtakes a long one only with splitting on, within 4 cycles of the split tail; then random traffic on all ports with back pressure, checking order, every piece's header (priority, destination, remaining length) and tail, and that splits, stalls and waits occur |
| `tb_sps_noc` | end to end on the default 4 x 4 mesh: 16 periodic flows with distinct priorities, run with splitting on, off, PD = 15, RF = 127 and with back pressure at the outputs; full scoreboard; requires splits only where allowed, multi-piece packets, stalls, waits, and lower latency for the urgent flows with splitting |
| `tb_sps_workloads` | the published experiments on the 4 x 4 mesh, see below |

`tb_sps_workloads` runs each traffic case with splitting on and off:

* three random flow mappings at load V = 0.8;
* load raised to V = 0.7, 0.9 and 1.3 by longer packets;
* the same loads reached by shorter periods;
* RF = 1, 3/4 and 1/2 of a 16-flit packet;
* PD = 0, 2 and 4.

The load measure is V = Σ(C/P)/L. Here C is a flow's no-load latency (the
testbench measures it), P is its period and L is the 48 one-way links
between routers. Packet sizes, periods and the number of packets per flow
are not published. The testbench picks them from a fixed pseudo-random
sequence, so every run is repeatable.

With this router, V >= 0.7 already means that sources inject faster than the
network drains them. The header-count runs at different V therefore differ
only in injection times.

Mean latency of the four most urgent flows, in cycles, splitting on / off:

| case | on | off |
|---|---|---|
| random 1 / 2 / 3 (V 0.8) | 1457 / 728 / 951 | 2111 / 1413 / 2090 |
| payload V 0.7 / 0.9 / 1.3 | 707 / 1087 / 1838 | 1241 / 1858 / 3067 |
| header V 0.7 / 0.9 / 1.3 | 599 / 693 / 811 | 1012 / 1106 / 1224 |
| RF 1 / 12 / 8 (16-flit packets) | 533 / 649 / 567 | 894 |
| PD 0 / 2 / 4 | 533 / 533 / 616 | 894 |

Less urgent flows pay for this; the testbench prints all 16 priorities. The
workloads testbench only requires the combined result over the three random
mappings to favour splitting.

## Simulating

With Verilator 5 (two-state simulation, so all state that is read is reset):

```
verilator --binary --timing --assert -Irtl -Itb rtl/sps_pkg.sv \
    tb/tb_sps_noc.sv --top-module tb_sps_noc -o sim
./obj_dir/sim
```

Substitute any other testbench name. Verilator finds the modules in `rtl/`
through `-Irtl`, because every module lives in a file of its own name. The
end-to-end and workload testbenches finish in a few seconds.

## Files

* `rtl/sps_pkg.sv`: flit width, field types, port and state enums,
  header helper.
* `rtl/sps_fifo.sv`: input buffer.
* `rtl/sps_xy_route.sv`: XY routing function.
* `rtl/sps_input_port.sv`: input port with the split state machine.
* `rtl/sps_arbiter.sv`: priority arbiter and contender report.
* `rtl/sps_crossbar.sv`: switch.
* `rtl/sps_router.sv`: five-port router.
* `rtl/sps_noc.sv`: W x H mesh, top level.
* `tb/tb_*.sv`: the testbenches listed above.
