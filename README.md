# Fault-tolerant shortest-path routing on an 8×8 mesh NoC

This is a network-on-chip for 64 processing units arranged as an 8×8 grid. Each
unit hands the node next to it a small packet: a destination address and one byte.
The packet travels from node to node along a shortest path until it reaches the
destination's `procout` output. A node compares the destination with its own
position and moves the packet one step closer: first in rows, then in columns.
Every node also knows which of its four neighbours are faulty. When the shortest
step would enter a faulty node, the packet takes a short detour instead. The
network moves packets on both clock edges, so one hop takes half a clock period.

## Coordinates and packet format

Node `(x, y)` sits in row `x` and column `y`, both 0…7. Rows grow towards the
**south** and columns towards the **east**. Node `(0,0)` is the north-west corner.
Node names in this text are written `xy`, so `47` is row 4, column 7.

A unit presents a 14-bit packet (`noc_pkg::flit_t`):

| bits  | field   | meaning                    |
|-------|---------|----------------------------|
| 13:11 | `dst_x` | destination row            |
| 10:8  | `dst_y` | destination column         |
| 7:0   | `data`  | payload byte               |

Example: a byte `11001100` for node `42` is `100_010_11001100`.

Between nodes one more bit travels as bit 14: **force-y** (`pkt_t`). Every link
also carries a valid bit (`link_t`, 16 bits in all). The packet holds no source
address. Each node compares the destination with its own position, given to it by
its `addr_x`/`addr_y` inputs.

## The routing rule (`noc_route_compute`)

The basic rule is X-first shortest-path routing:

| comparison                  | output port        |
|-----------------------------|--------------------|
| `dst_x > addr_x`            | South              |
| `dst_x < addr_x`            | North              |
| rows equal, `dst_y > addr_y`| East               |
| rows equal, `dst_y < addr_y`| West               |
| both equal                  | local (`procout`)  |

**force-y.** If a packet arrives with force-y set and still has columns to cover,
it moves along Y first. Otherwise the rows are compared first, as in the table.
Every move clears force-y, except the detour that sets it.

**Detours.** `nb_err[d]` says that the neighbour behind port `d` is faulty. A
faulty neighbour is never entered unless it is the packet's destination. A port on
the mesh boundary is never used.

* *East/West step blocked.* The packet goes North with force-y set. If North is
  unusable (row 0, or a faulty node), it goes South with force-y set. Force-y makes
  the next node step east/west past the faulty node before it corrects the row.
  Without it, the next node would send the packet straight back.
  Example with node `05` faulty, `04 → 07`:
  `04 →S(force-y) 14 →E 15 →(N blocked) E 16 →N 06 →E 07`, five hops.
* *North/South step blocked.* The packet steps sideways, towards the destination
  column if there is one, East otherwise. The other side is the fallback. Example
  with `33` faulty, `13 → 63`: `13 → 23 →E 24 → 34 → 44 → 54 → 64 →W 63`.
* *Nothing usable.* The packet waits in its buffer (`route_ok = 0`).

The first two rules come from the original description of the design: the X-first
table, and "east blocked, go north, set force-y". What force-y does at the next
node, the South fallback, the sideways rule and the waiting rule are this design's
own completion of that rule.

## Inside a node (`noc_node`)

```
            nb_in[N,S,E,W]  g_in
                 |            |
           [1-packet buffer] x5      <- ready = buffer empty
                 |
           noc_route_compute x5      (one per buffer)
                 |
      round-robin arbiter per output (N,S,E,W,local)
                 |
   nb_out[N,S,E,W]          procout register
```

* **Buffers and handshake.** Each of the five inputs has a buffer that holds one
  packet. The buffer's ready signal (`nb_in_ready`, `g_ready`) is simply "empty".
  A sender drives a packet only into an empty buffer. An assertion in `noc_node`
  checks this rule. Ready depends only on register state, so no combinational path
  runs from one node to the next. The cost is throughput: a buffer cannot take a
  new packet at the same edge it sends one. Each link therefore carries at most
  one packet per clock period, that is, one every two edges.
* **Arbitration.** Several buffers may want the same output in one step. The
  output then grants one of them, round-robin. A neighbour output fires only when
  the neighbour's buffer is empty (`nb_out_ready`). The local output always fires.
  A packet that is not granted stays in its buffer, so nothing is dropped or
  duplicated.
* **`procout`.** It holds the last byte delivered to the node. `procout_valid` is
  high for the half period that follows a delivery.
* **`events`.** These are per-node strobes, one half period wide, for observing the
  network: delivery, the two detour kinds, force-y used, contention (a buffered
  packet waited) and injection stall.

### Storage on both clock edges (`noc_dual_edge_reg`)

All state (buffers, arbiter pointers, `procout`) sits in dual-edge registers. Each
one is built from two ordinary flip-flop banks and an XOR:

```
rising edge:  qp <= d ^ qn        falling edge:  qn <= d ^ qp        q = qp ^ qn
```

After either edge `q` equals the `d` sampled at that edge. The clock is never used
as data. A synthesis flow sees two banks of plain flip-flops, one for each edge.
The combinational path from any register to any register must therefore fit in
half a clock period, and the clock's duty cycle matters. The reset is asynchronous
and active-low.

## Timing

Count edges from the edge at which a unit's packet is accepted
(`datain_valid && datain_ready`). With no contention, the packet appears on
`procout` after `hops + 1` further edges, where `hops` is the Manhattan distance
(plus the detour, if any). For example:

* `00 → 42` (6 hops): 7 edges.
* `47 → 01` (10 hops): 11 edges.

A unit can offer at most one packet per clock period, because its G buffer must
empty first.

## Top level (`noc_mesh`)

`noc_mesh #(ROWS=8, COLS=8)` instantiates `ROWS×COLS` nodes and wires each port to
its neighbour. Per node it brings out the following, as `[ROWS][COLS]` arrays:

| port            | dir | meaning |
|-----------------|-----|---------|
| `datain`        | in  | 14-bit packet from the unit (`flit_t`) |
| `datain_valid`  | in  | packet present |
| `datain_ready`  | out | accepted at an edge where valid and ready are both high |
| `error`         | in  | node is faulty; its neighbours route around it |
| `procout`       | out | last delivered byte |
| `procout_valid` | out | delivery strobe |
| `events`        | out | `node_events_t` strobes |

Each node's `nb_err` is the `error` of the node behind each port. Boundary ports
see an error flag of 1, no packets and no ready. A faulty node keeps forwarding
anything already inside it. A packet addressed to a faulty node is still handed to
it. `ROWS` and `COLS` may be reduced, but not raised above 8, because addresses are
3 bits (`noc_pkg::ADDR_W`).

At the default size the mesh synthesizes to about 52,600 word-level cells and
13,120 flip-flop bits. A node has 208 flip-flop bits: five 16-bit buffers, five
3-bit arbiter pointers and a 9-bit `procout` register, each doubled by the two-bank
structure. Synthesis removes a few of these in boundary nodes, which leaves about
205 per node.

## Limitations and departures

* **Deadlock under load with faults.** Plain X-first routing with these buffers
  cannot deadlock. The detours add turns that X-first routing forbids (for example
  north, then east, then south). With one-packet buffers and no virtual channels,
  packets can wait on each other in a cycle. In simulation this happened at 10 %
  injection per node per half period with three faulty nodes. It did not happen at
  2 %. The routing has no deadlock recovery.
* **Possible livelock.** A long wall of faulty nodes ending at the mesh boundary
  can make a packet oscillate between detours. There is no hop limit.
* **The original row-0 example.** The original design's worked example detours a
  packet from node `04` "north" around a faulty `05`. Node `04` is on row 0 and
  has no northern neighbour in a mesh. Here that packet goes south, with force-y
  set. Away from row 0 the packet goes north, as in the example.
* **Farthest Reachable Router (FRR).** The design this RTL follows is presented as
  using FRR, which spreads the states of faulty components across the network so
  that routers can see further than their neighbours. No FRR logic is specified,
  and none is built here. The fault handling is purely local: the four neighbour
  flags and the detour rule above.
* **Attached units** are not part of this RTL. Their signals are the `datain*` and
  `procout*` ports.
* **Own additions.** These were not in the original description: the valid/ready
  handshake, `procout_valid`, the `events` output, one-packet input buffers,
  round-robin arbitration and the reset behaviour.

## Files

| file | contents |
|------|----------|
| `rtl/noc_pkg.sv` | widths, port numbering, `flit_t`, `pkt_t`, `link_t`, `node_events_t` |
| `rtl/noc_dual_edge_reg.sv` | register loaded on both clock edges |
| `rtl/noc_rr_arbiter.sv` | combinational round-robin arbiter |
| `rtl/noc_route_compute.sv` | routing and detour decision |
| `rtl/noc_node.sv` | one router node |
| `rtl/noc_mesh.sv` | the 8×8 mesh (top) |
| `tb/tb_noc_dual_edge_reg.sv` | follows `d` on both edges, holds between edges, resets |
| `tb/tb_noc_route_compute.sv` | all 131,072 position/destination/force-y/fault combinations against a reference model |
| `tb/tb_noc_node.sv` | single-node cases, arbitration and backpressure, random traffic through one node |
| `tb/tb_noc_mesh.sv` | full 8×8 mesh, end to end (see below) |

`tb_noc_mesh` runs the mesh at its default size in five phases:

1. Four packets offered at the same instant: `00→42`, `47→01`, `71→26`, `72→26`.
   It checks the exact latencies of the two that share no path.
2. The east-fault detour, `04→07` with `05` faulty: five hops, exact latency.
3. The sideways detour, `13→63` with `33` faulty: seven hops, exact latency.
4. Random traffic from all 64 nodes at 30 % offered load.
5. Random traffic with three faulty nodes at 2 %.

A scoreboard checks that every byte arrives exactly once at its destination. The
testbench also counts each mechanism: deliveries on rising edges, deliveries on
falling edges, both detour kinds, force-y moves, contention and injection stalls.
A mechanism that never occurs counts as a failure.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. With
Verilator 5, for example:

```
verilator --binary --timing --assert -y rtl rtl/noc_pkg.sv tb/tb_noc_mesh.sv \
          --top-module tb_noc_mesh -Mdir obj_mesh
./obj_mesh/Vtb_noc_mesh
```

Replace `tb_noc_mesh` with any other testbench name. Building the mesh testbench
takes under a minute. Running it takes well under a second.
