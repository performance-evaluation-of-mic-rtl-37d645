# MIC@R: a one-cycle, five-port wormhole router for 2D-mesh networks-on-chip

MIC@R is a network-on-chip router built to keep routing delay as low as
possible. An uncontended flit spends one clock cycle in each router. The
router has no virtual channels. Each input has a small register FIFO, and a
single control block routes and arbitrates all five inputs in parallel,
within that one cycle.

The routing algorithm sits in one small place, the per-input routing logic.
The rest of the router does not change when the algorithm does. Four schemes
are built:

- deterministic X-Y;
- fully adaptive (FA);
- proximity congestion awareness (PCA);
- proximity hot-spot awareness (PHSA), the scheme this design is built
  around.

The adaptive schemes use status that neighbouring routers send back with
every link acknowledgement. This is each neighbour's *stress value* (how full
its buffers are) and, for PHSA, whether the neighbour is a *hot spot* (its
outputs are in conflict).

This repository holds synthesizable SystemVerilog for the router, its parts,
a parameterised 2D mesh (default 4x4, PHSA, six-flit buffers, 32-bit flits),
and on-chip traffic generators for uniform, transpose and hot-spot traffic.
It also holds self-checking testbenches for all of them.

## Packets and flits

A flit is 32 bits. Packets are switched wormhole-style: the header leads and
the payload flits follow on the same path. A blocked header stalls the whole
worm in place.

| bits    | header flit                                        | payload flit from a generator |
|---------|----------------------------------------------------|-------------------------------|
| [3:0]   | destination Y                                      | flit index i, low bits        |
| [7:4]   | destination X                                      | flit index i, high bits       |
| [15:8]  | number of payload flits (0-255)                    | flit index i, bits 15:8       |
| [31:16] | free tag (the generators put their creation cycle here) | source X, Y and packet number |

The router reads only bits [15:0] of a header. Nothing marks the end of a
packet: each input counts the payload flits announced in its header.
Coordinates are 4 bits, so a mesh can be at most 16x16. Y grows towards
North and X grows towards East.

## Ports and the link handshake

Ports are numbered North=0, East=1, Local=2, South=3, West=4
(`micar_pkg::port_e`). Each direction of a link has three signals:

- `req` (1 bit, sender to receiver): a flit is on `data`;
- `data` (32 bits, sender to receiver);
- `credit` (5 bits, receiver to sender):
  - bits [1:0] are a response code: `00` ready, `01` okay (flit stored this
    cycle), `10` congested, `11` error;
  - bits [4:2] are the receiver's stress value.

The receiver answers **in the same cycle**. It says "okay" exactly when `req`
is high and its buffer has room, and it stores the flit at the next clock
edge. The sender keeps the flit on the link until it sees "okay", and it
removes the flit from its own buffer at that same edge. So a link carries one
flit per cycle with no credit counters. The cost is a combinational path from
the sender's crossbar, through the receiver's full flag, back to the
sender's buffer read.

The receiver sends "congested" when it is not taking a flit and either:

- the buffer on that port is full, or
- the router is a hot spot.

"Error" is never produced. A sender treats it like any other answer that is
not "okay".

## Inside the router

```
 data_in[5] ──► FIFO x5 (6 x 32, registers) ──head──► crossbar 5x5 ──► data_out[5], req_out[5]
                   ▲   │ empty/full/count               ▲ grant[out][in]
                   │   ▼                                 │
 req_in[5] ─► ┌──────────────── FPR control unit ───────────────┐ ◄── credit_in[5]
 credit_out ◄─│ IRL x5 ──route_req──► PPE x5 ──grant──► MSB      │
              │   ▲  nb_sv/nb_cong      ▲                │ ack   │
              │   └──── CSB (stored neighbour status,    ▼       │
              │          own stress value, hot-spot flag)        │
              └──────────────────────────────────────────────────┘
```

- **Input FIFO** (`micar_fifo`): a circular buffer of 6 x 32-bit registers
  with an occupancy count. A flit written at one edge is at the head during
  the next cycle.
- **Input Routing Logic, IRL** (`micar_irl`, one per input). It has a receive
  side and a send side:
  - Receive side: it writes incoming flits and forms `credit_out`.
  - Send side: while no packet is in progress, the flit at the head is a
    header. The routing computation (`micar_route`) turns it into a one-hot
    request for one output. Each time the neighbour says "okay", the head is
    popped. After a header with payload, the IRL keeps requesting the same
    output until the last payload flit has gone. It keeps the output even
    through cycles when its buffer is empty.
- **Programmable Priority Encoder, PPE** (`micar_ppe`, one per output). It is
  a round-robin arbiter. The search starts at a priority pointer, and the
  pointer moves just past each new winner. The input that holds the grant
  keeps it for as long as it keeps asking, which reserves the output for a
  whole worm. Its grant is combinational, so request and grant fall in the
  same cycle.
- **Matching Status Bloc, MSB** (`micar_msb`). It matches grants against
  requests and gives each matched input the "okay" of its output. It also
  raises `contention` when some input asked and was refused.
- **Credits Status Bloc, CSB** (`micar_csb`). It registers each neighbour's
  stress value and its "congested" flag every cycle, for the adaptive
  schemes. It also produces this router's own status:
  - the stress value: total buffer occupancy shifted right by two, since 5 x
    6 = 30 cells has to fit in 3 bits;
  - the hot-spot flag: `contention`, delayed one cycle.
- **Crossbar** (`micar_crossbar`): an AND-OR switch driven by the PPE grants.
- **FPR** (`micar_fpr`, Fast Parallel Routing): the wrapper around the five
  IRLs, five PPEs, the MSB and the CSB.

### Timing of one hop

In cycle *t* the upstream router offers a flit and this router says "okay".
At the edge ending *t*, the flit enters this router's FIFO. In cycle *t+1*,
this router routes it, arbitrates, and offers it on the chosen output, all
combinationally. If the downstream router says "okay", the flit leaves at
the edge ending *t+1*.

A packet crossing *h* links therefore shows up on the destination's local
output *h+1* cycles after the source router accepted it. The mesh testbench
checks this exact figure.

## Routing schemes

Let the router be at (cx, cy) and the destination at (dx, dy). A direction is
*productive* if it brings the packet closer: East if dx > cx, North if
dy > cy, and so on. A packet at its destination always goes to the Local
port. Select the scheme with the `ALGO` parameter (`micar_pkg::routing_e`).

- **X-Y** (`ALG_XY`): go East/West until dx = cx, then North/South.
  Deterministic and free of deadlock.
- **Fully adaptive** (`ALG_FA`): uses one candidate per cycle for as long as
  the header is not taken. The candidates, in order:
  1. the X-Y output;
  2. the other productive direction;
  3. the unproductive directions that exist on the mesh, in N, E, S, W order,
     never back out through the input the packet came in on.

  The list wraps round. Misrouting gives path diversity, but a packet can
  livelock.
- **PCA** (`ALG_PCA`): minimal routing. With only one productive direction,
  take it. With two, take the neighbour that has the smaller stored stress
  value, and take X when they are equal.
- **PHSA** (`ALG_PHSA`): like PCA, but the hot-spot flags are checked first.
  If only the X neighbour is a hot spot, go Y. If only the Y neighbour is, go
  X. If both or neither are, compare stress values as PCA does.

An adaptive header that is refused is routed again in the next cycle, with
fresh neighbour status. The neighbour status is one cycle old: it is the
credit seen at the previous edge.

**Deadlock.** PCA and PHSA are minimal but allow every turn, and there are no
virtual channels. A cyclic wait is therefore possible under heavy load. FA
can also livelock. Nothing in the RTL prevents either. The testbenches keep
loads at levels where drains complete. Use X-Y if you need guaranteed
freedom from deadlock.

## The mesh and the traffic generators

`micar_noc` builds MESH_X x MESH_Y routers. Router (x, y) is node
n = y*MESH_X + x. Border ports are tied off: nothing arrives on them, and
they answer "ready". The routing never selects them, so a destination must
lie inside the mesh.

Each node's local port is brought out twice:

- `ip_req/ip_data/ip_credit`: the IP injects flits;
- `ej_req/ej_data/ej_credit`: the router delivers flits, and the IP answers
  "okay" for each flit it takes.

Every node also has a traffic generator (`micar_tgen`). While
`tg_enable[n]` is high, the generator replaces the IP on the local input. It
keeps the port until it has finished the packet it is sending. Raise
`tg_enable` only while the IP is between packets.

The generators share `tg_rate`, `tg_len` and the hot-spot settings. Each has
its own pattern:

- **uniform**: any other node;
- **transpose**: (x, y) sends to (y, x), and the diagonal stays silent;
- **hot-spot**: the node (`tg_hs_x`, `tg_hs_y`) with probability
  `tg_hs_pct`/100, otherwise uniform.

An idle, enabled generator starts a packet with probability rate/256 per
cycle. It draws from a 32-bit LFSR that it advances 8 steps per cycle. It has
no source queue. The header tag carries the cycle the packet was created, so
a sink can measure latency.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `micar_noc` | `ALGO` | `ALG_PHSA` | routing scheme of every router |
| | `MESH_X`, `MESH_Y` | 4, 4 | mesh size (at most 16 each) |
| | `DEPTH` | 6 | flits per input buffer |
| `micar_router`, `micar_fpr`, `micar_irl` | `MY_X`, `MY_Y` | 0 | position of the router (set by the mesh) |
| `micar_fifo` | `WIDTH`, `DEPTH` | 32, 6 | |

The flit width (32) and the port count (5) are package constants in
`micar_pkg`.

Approximate sizes after generic synthesis, counting word-level cells:

| | cells | flip-flop bits | memory bits |
|---|---|---|---|
| one router (PHSA) | about 980 | 179 | 960 |
| 4x4 mesh (PHSA), generators included | about 16,000 | about 4,300 | 12,288 |

The mesh has fewer memory bits than 16 routers because the input buffers on
border ports are never written and get removed.

## Where this RTL fills in or departs from the published description

The published description gives the block structure, the credit codes, the
port list, the header fields, the buffer depth, the flit width and the four
routing flowcharts. The following are choices made here:

- **Link timing.** The link is single-clock and the "okay" comes back in the
  same cycle. The description allows asynchronous (GALS) links; those are
  not built.
- **Input mux.** The block diagram draws a mux per input that can take
  `data_in` past the FIFO. Here every flit goes through the FIFO, because a
  combinational bypass would make a hop take zero cycles rather than one.
- **Status encoding.** The stress value is total occupancy divided by 4. The
  hot-spot information travels as the "congested" code, because the 5-bit
  credit has no other field for it. Full-buffer and hot-spot conditions
  share that code.
- **PCA/PHSA ties.** Equal stress values go along X, as the prose says. The
  flowchart's comparison "SVy > SVx" would send ties along Y.
- **Arbiter and FA details.** The PPE's round-robin update and its hold rule
  are choices made here. So is the order of the FA candidates after the
  productive ones.
- **Field placement.** Where the header and payload fields sit in the flit,
  and the reset (synchronous, active low), are choices made here.
- **Traffic generators.** Their LFSR, rate scale and flit contents, and
  their mux onto the local port, are choices made here.
- **Not built.** The slower router variants with 2-4 cycle routing latency,
  used only for comparison. The IP cores.

## Testbenches

Each testbench is self-checking. It ends with one line
`TB_RESULT checks=N failures=M`, and it has a watchdog.

| bench | what it checks |
|---|---|
| `tb_micar_fifo` | random push/pop against a queue model; flags; one-cycle write-to-read |
| `tb_micar_ppe` | grants against a round-robin-with-hold model; rotation order |
| `tb_micar_crossbar` | random permutations |
| `tb_micar_msb` | match, ack and contention against a reference |
| `tb_micar_csb` | stored neighbour status; own stress value and hot-spot flag |
| `tb_micar_irl` | all four schemes against a reference over random destinations and status; the FA candidate sequence; wormhole hold; credit codes |
| `tb_micar_fpr` | five parallel matches in one cycle; conflict and rotation; hot-spot flag; worm hold and release; PHSA reading stored credits |
| `tb_micar_router` | one-cycle hop; PHSA choices; 6000 cycles of random five-way traffic with back-pressure, each packet checked for a minimal output, order and integrity |
| `tb_micar_tgen` | destinations per pattern, hot-spot share, injection rate, tags, payload, counters |
| `tb_micar_noc` | the default 4x4 PHSA mesh end to end (see below) |
| `tb_micar_noc_schemes` | 4x4 hot-spot workload on X-Y, FA and PCA meshes |
| `tb_micar_noc_transpose` | 8x8 PHSA mesh, transpose traffic, 8- and 32-flit payloads |

`tb_micar_noc` runs the mesh at its default parameters:

1. It measures the latency of lone packets against *hops + 1*.
2. It runs converging IP traffic with random ejection back-pressure.
3. It runs the hot-spot workload: node (1,2) receives 40% of the packets of
   six sources, and the other nine nodes send uniformly.
4. It runs transpose traffic.

Every packet must arrive whole and in order, and only at its destination.
The bench counts how often these mechanisms happened and fails if any never
did:

- output conflicts (the hot-spot flag);
- refusals by a full buffer;
- adaptive choices of Y over a productive X;
- headers held back;
- multi-flit worms.

`micar_tb_mesh` is a harness the workload benches share. It is not a design
block.

### Running with Verilator

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/micar_pkg.sv tb/tb_micar_noc.sv --top-module tb_micar_noc -Mdir obj -o sim
./obj/sim
```

Use the same command for any other bench, swapping the file and the top
module. `-y rtl -y tb` lets Verilator find each module in the file of the
same name. Building the 4x4 mesh bench takes one to two minutes. The 8x8 and the
three-mesh benches take several minutes, because each router position is its
own specialised module.
