# Interconnects for a 16-processor turbo decoder

A parallel turbo decoder splits each code block of N values into sub-blocks and
gives each sub-block to its own soft-in soft-out (SISO) processor. After every
half iteration each processor must hand its extrinsic values to the processors
that own the *interleaved* positions. The interleaver is close to a random
permutation, so in any cycle several processors may want to write into the same
memory. The exchange is then no longer a fixed wiring problem. It becomes a
small on-chip network problem. The network must:

- deliver every value, since dropping one damages error correction;
- accept a new value from every processor almost every cycle;
- add as little latency as possible, because the decoder pays it twice per
  iteration.

This repository holds synthesizable SystemVerilog for three such networks,
sized for a 16-way decoder of HSDPA blocks (N = 5114, 8-bit extrinsic values):

| network | idea | conflicts handled by |
|---|---|---|
| **Butterfly** (`bfly_*`) | 16-port, 4-stage multistage network of 2x2 routers; the destination number steers the packet | FIFOs in the routers and round-robin arbitration |
| **Benes** (`benes_*`) | 16-port, 7-stage rearrangeable network of bufferless 2x2 routers | an off-line schedule: each packet has a time slot and a precomputed route, so no two packets ever meet |
| **Direct network** (`dn_*`) | 16 nodes, one per processor, each linked to 4 others on a generalized Kautz graph; packets hop node to node | input FIFOs per node and a serving policy; a blocked packet waits in its FIFO |

All three are instantiated side by side in `tdec_noc_top`, each with its own ports.
They are alternatives for the same job, not stages of one pipeline.

A simple cost model shows why network latency matters. A decoder with P
processors, clock f and It iterations has throughput

    T = N * f / (2 * It * (N/P + L_siso + L_net))

L_net is the number of cycles the network needs, beyond N/P, to finish
delivering one half iteration. It adds directly to the N/P cycles each
processor spends on its sub-block.

## Conventions shared by all parts

- One clock and a synchronous, active-high `rst`.
- There is no flow control anywhere. A value offered by a processor is always
  accepted, and queues are sized so that they do not overflow for the intended
  traffic.
  - An overflow is never silent: it raises a sticky `overflow` output and fires
    an assertion.
  - A packet that reaches a memory it does not belong to raises `misroute`.
  - A Benes router that receives two packets for one output raises `collision`.
- Extrinsic values are `EW` = 8 bits.
- A frame (one half iteration) starts with a pulse: `bfly_clear`,
  `benes_frame_start` or `dn_frame_start`. The pulse clears that network's
  send and receive counters.
- Memories are register arrays with a combinational read port. The processor
  reads its received values through `*_rd_addr` / `*_rd_data`.
- The off-line tables (Benes schedules, direct-network destination and location
  tables) are loaded through `*_cfg_*` write ports. They are computed outside
  the chip from the interleaving law. The testbenches contain complete
  generators for them.

## Butterfly interleaver

### Ports, lanes and memories

There are 8 source processors. Each one delivers up to two values per cycle,
so the network has 16 input lanes.

- **Lanes.** Lane 2s and lane 2s+1 belong to processor s.
- **Memories.** On the receiving side, each of the 8 processors owns two
  memories:
  - a top memory for the first half of its sub-block (offsets 0..319);
  - a bottom memory for the second half (offsets 320..639).
- **Sub-block size.** It is SUB = ceil(5114/8) = 640. The last processor holds
  only 634 values.
- **Memory numbering.** Memory 2s is the top memory of processor s and memory
  2s+1 its bottom memory.

### Transmit interface (`bfly_ni_tx`)

The processor presents the interleaved position g of a value together with the
value. The interface forms the packet in one registered cycle. Here `/` is
integer division:

    port   = 2*(g / 640) + (g % 640 >= 320)     4 bits
    offset = g % 640                            10 bits
    packet = {port, offset, value}              22 bits

The offset field is floor(log2(N/8)) + 1 = 10 bits wide.

### Network and routers (`bfly_network`, `bfly_router`)

The network has 4 stages of 8 routers. Stage s connects the two lines whose
numbers differ only in bit 3-s.

Each router works as follows:

- It looks at the leading bit of the remaining port tag. That bit picks the
  upper or lower output, and the router strips it.
- After 4 stages the line number equals the destination port. Every
  source/destination pair therefore has exactly one path.
- Each router input has a FIFO, 2^s entries deep in stage s. That is enough for
  the worst case in which every packet entering the router wants one output.
- When both head packets want the same output, a round-robin bit picks one. The
  other waits in its FIFO. The bit flips after each such conflict.
- Outputs are registered.

Timing:

- An undisturbed packet written into the first stage leaves the last stage
  2*4 - 1 = 7 edges later.
- It is in memory one cycle after that.
- Every cycle lost in arbitration adds one cycle.

The network is blocking: two packets from different sources can need the same
internal link even when their destinations differ. The FIFOs are sized for one
burst, not for a sustained overload. The design is therefore meant for a
moderate injection rate, for example one value per lane every fifth cycle
(r = 0.2), as in the tests.

### Receive side (`ni_rx_mem`) and one direction (`bfly_link`)

- `ni_rx_mem` subtracts its base offset (0 or 320), writes the value and counts
  arrivals.
- `bfly_link` is one direction: 8 transmit interfaces, the network and 16
  memories.
- The top level has two links: index 0 goes from component decoder 0 to
  component decoder 1, and index 1 is the way back.

## Benes interleaver with time-division access

### Why schedule

A Benes network is two Butterflies joined back to back, 2*log2(16) - 1 = 7
stages. It can carry *any* permutation of its 16 inputs without internal
conflict, provided every packet takes the right one of its several paths. The
interleaver is a permutation of the whole block, but it is not a permutation in
every cycle: often two lanes send to the same memory at once.

The schedule fixes this:

- **Time slots.** Each value gets a time slot (a cycle number within the frame)
  such that the values entering in one slot have distinct destinations. The
  number of slots needed equals the largest number of values any one memory
  receives.
- **Routes.** For each slot, the set of (source, destination) pairs is
  completed to a full permutation. The looping algorithm then gives every
  packet its path.
- **Street-sign routing.** The path is carried in the header as a 7-bit word,
  one output choice per stage.

Once this is done, routers need no buffers and no arbitration.

### Transmit interface (`benes_ni_tx`)

One interface per lane. It holds a schedule table of 320 entries; entry j is
`{slot, route}` of the j-th value this lane sends in a frame.

- Values from the processor go into a 16-entry queue, as `{offset, value}`.
  The offset is computed as in the Butterfly interface.
- A slot counter starts at 0 with `frame_start`.
- The head of the queue is sent, registered, in the cycle its slot comes up.
- If the value arrives after its slot, it is sent at once and the sticky `late`
  flag is raised. A late value may collide in the network, so `late` means
  that the schedule and the processor timing do not match.

### Network (`benes_network`, `benes_router`)

Stage s switches line bit 3, 2, 1, 0, 1, 2, 3 for s = 0..6.

Each router:

- registers its two inputs;
- sends each packet to the output named by its leading route bit;
- strips that bit.

A packet is in memory exactly 2*4 - 1 + 1 cycles after it leaves the
interface. Two packets asking for one output means the schedule is wrong: the
router raises `collision` and an assertion fires.

### Computing the schedule

`tb/benes_tb_pkg.sv` implements the looping algorithm.

- The two packets that share a first-stage router are sent into different
  half-size subnetworks.
- So are the two packets that leave through one last-stage router.
- Constraints are followed around the loops they form, and the procedure
  recurses into each half.
- Bit 6-s of the route word is the output taken at stage s.

`tb/tb_tdec_noc_top.sv` shows the whole flow: slot assignment, routes, table
load and frame run.

## Direct network

### Node (`dn_node`)

Each of the 16 nodes sits next to one processor. The node has M = D + 1 = 5
ports: ports 0..3 are links to other nodes, and port 4 is the local processor.
The routing element consists of:

- an input FIFO per port (64 entries);
- a 5x5 crossbar;
- a register on every output.

Every cycle the routing logic does the following:

1. **Routing.** It looks up an output for each FIFO's head packet. The lookup
   maps destination node to output link, one fixed shortest path per pair
   (single shortest path, SSP). The table is computed at elaboration from the
   graph, choosing the lowest-numbered link among shortest ones. A packet for
   this node goes to port 4.
2. **Ranking.** It ranks the FIFOs with one of two policies:
   - `POL_RR`: round robin; the order rotates by one every cycle.
   - `POL_FL`: longest FIFO first; ties are broken by the round-robin order.
3. **Granting.** It grants each FIFO whose wanted output is not wanted by a
   higher-ranked FIFO. Losers stay in their FIFO and retry the next cycle. This
   is "delay the colliding message": packets never take a detour. The
   `stall` output shows when it happens.

Each hop costs two cycles: the output register and the FIFO write at the next
node. A value that reaches its destination port is written into that node's
extrinsic memory two cycles after it wins the port. A value sent h hops
therefore appears in memory 2h + 2 edges after the processor offers it.

### What a packet carries: FA and PP nodes

Every node has three memories of ceil(N/16) = 320 words:

- an identifier memory (IM);
- a location memory (LM);
- the extrinsic memory.

The j-th value a node sends goes to node IM[j]. The two node types differ in
what the packet carries and when LM is read:

| | packet | LM holds | LM read |
|---|---|---|---|
| `ARCH_FA` (fully adaptive) | `{dest node, location, value}`, 4+9+8 bits | location at the destination of each value sent | when sending |
| `ARCH_PP` (partially precalculated, default) | `{dest node, value}`, 4+8 bits | location of each value received, in arrival order | when receiving |

PP packets are 9 bits narrower. PP relies on the arrival order being fixed and
known in advance. The network is deterministic for a given interleaver and
start time, so the order can be obtained by simulating the network once off
line.

### Graphs (`noc_pkg`, `dn_network`)

`dn_network` wires P nodes as one of four graphs, chosen by `TOPO`:

| `TOPO` | node i links to |
|---|---|
| `TOPO_KAUTZ` (default) | (-i*D - k) mod P, k = 1..D |
| `TOPO_DEBRUIJN` | (i*D + k) mod P, k = 0..D-1 |
| `TOPO_RING` | i+1 and i-1 (D = 2) |
| `TOPO_TORUS` | four grid neighbours with wraparound (D = 4, P must be a square) |

For P = 16 and D = 4 the Kautz graph reaches every node in at most 2 hops.

- Link k of node i leaves from output port k.
- At the far end, a link enters the input port given by its rank among the
  links arriving there, ordered by source node and then by k.

All of this is computed at elaboration, so changing `TOPO`, `P` or `D`
rewires the network.

## Top level (`tdec_noc_top`)

| group | contents |
|---|---|
| `bfly_*[2]` | two Butterfly links (both directions) |
| `benes_*[2]` | two Benes links; a shared configuration bus with a per-direction write enable and a lane select |
| `dn_*` | the 16-node direct network; configuration selects a node, then IM (`dn_cfg_sel = 0`) or LM (`dn_cfg_sel = 1`) |

All ports are plain vectors or unpacked arrays. The default parameters give the
full-size design.

Coarse yosys synthesis of the top, memories kept as memory cells, gives:

- about 24,400 cells;
- 13,400 flip-flop bits;
- 551,000 memory bits.

Most of the memory bits are the direct network's FIFOs and tables and the
Benes schedule tables.

## Measured behaviour

The numbers come from the full-size end-to-end test (`tb_tdec_noc_top`) and
`tb_dn_network`.

| network, one half iteration of N = 5114 | cycles |
|---|---|
| Butterfly, one value per lane every 5 cycles | 1,607 (1,600 of injection + 7) |
| Benes, one value per lane every cycle, scheduled | 329 (320 slots + 9) |
| Direct network, Kautz D=4, PP/FL, one value per node every cycle | 365 |
| Direct network, Kautz D=4, FA/RR or PP/FL, other random interleavers | up to 403 |
| Direct network, one value every third cycle | about 967 (960 of injection) |

Some checks against the cost model:

- **Direct network.** At 200 MHz with 8 iterations and 365–403 cycles per half
  iteration, the model gives 5114 * 200e6 / (16 * 403) ≈ 159 Mb/s up to about
  175 Mb/s. This leaves L_siso out, so it is an upper bound.
- **Benes.** It adds only 9 cycles. Its cost is the schedule tables, and
  interleavers whose slot count exceeds the 320-value lane load make it slower.
- **Butterfly.** At r = 0.2 it is limited by the injection rate. Higher rates
  are possible, but the FIFOs can then overflow on unlucky interleavers.

The Benes and Butterfly tests use an interleaver in which every step is
conflict-free at memory level. Real interleavers need more Benes slots.

## Where this design departs from the published architecture

- **Direct network configuration.** The published best direct-network results
  use "all precalculated" nodes. Those nodes use a routing memory of crossbar
  commands and an adaptive all-shortest-path routing with traffic spreading.
  Neither is built here. The top uses PP nodes with single-shortest-path,
  longest-FIFO-first routing. It simulates within about 5–10 % of the
  published Kautz throughput.
- **Other omissions.**
  - The "send colliding message" alternative to delaying (deflecting a blocked
    packet to another output) is not built.
  - The honeycomb graph is not built.
- **Butterfly router priority.** The published Butterfly router shows a
  priority signal between FIFOs and arbiter. Here the arbiter is plain round
  robin, and priority is neither carried nor used.
- **Payload width.** The published routers show wider payload fields than the
  8-bit value plus address used here. Set `EW` to carry more.
- **Sizes chosen here:**
  - the direct-network FIFO depth (64, the smallest power of two with no
    overflow at r = 1 in the tests);
  - the Benes queue depth (16);
  - the slot counter width (12 bits);
  - the schedule table size (320 per lane).
- **Lane and memory numbering.** The exact numbering, and the top/bottom split
  of a sub-block, are choices made here.
- **Benes slot assignment.** It is left to the off-line tool. The testbench's
  assignment is one valid choice.
- **External memory.** The off-line tables are loaded through write ports
  instead of from an external flash memory.
- **Not included.** The SISO processors are not part of this design.

## Block sizes other than N = 5114

| workload | fits the defaults? |
|---|---|
| WiMAX-size blocks (N = 2400) | yes, with unused words |
| N = 16384 | no: needs 1024 words per direct-network node; set `N` |
| N = 24576 | no: needs 1536 words per direct-network node; set `N` |
| 64 nodes | no: set `DN_P = 64` |

All memory and field widths follow from `N`, `P_SISO`, `DN_P` and `DN_D`.

## Simulating

Each testbench is self-checking. It ends with a line of the form
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. Example with plain
Verilator 5:

    verilator --binary --timing --assert -Wno-fatal \
        rtl/noc_pkg.sv tb/link_tb_pkg.sv tb/benes_tb_pkg.sv rtl/*.sv \
        tb/tb_tdec_noc_top.sv --top-module tb_tdec_noc_top
    ./obj_dir/Vtb_tdec_noc_top

List the packages first. Other testbenches:

| testbench | what it proves |
|---|---|
| `tb_noc_fifo` | FIFO against a queue model, depths 1 and 5 |
| `tb_bfly_router` | routing, round-robin order, random traffic |
| `tb_bfly_network` | 7-cycle latency; 16-to-1 hot spot without loss; 200 permutations |
| `tb_bfly_ni_tx` | port/offset arithmetic, including the sub-block edges |
| `tb_ni_rx_mem` | writes, counting, clear, out-of-range rejection |
| `tb_bfly_link` | full block, both blocks exact, conflicts observed |
| `tb_benes_router`, `tb_benes_network` | 300 looping-algorithm permutations at one per cycle, fixed latency, no collision |
| `tb_benes_ni_tx` | slot timing, late flag, packet contents |
| `tb_benes_link` | full scheduled block at r = 1, exact memories |
| `tb_dn_node` | serving rule (RR and FL), DCM, isolated hop latency, FA/PP memory writes |
| `tb_dn_network` | hop latency against a breadth-first search; full blocks at r = 1 and 1/3; FA exact contents, PP per-node multisets |
| `tb_tdec_noc_top` | all three networks at full size; counts conflicts, slots, stalls, multi-hop and local deliveries, and fails if any never occurs |

The full-size top test compiles in about a minute and runs in under a second.

## Files

- `rtl/noc_pkg.sv` — graph definitions, port numbering, routing-table functions
- `rtl/noc_fifo.sv` — the FIFO
- `rtl/bfly_router.sv`, `rtl/bfly_network.sv`, `rtl/bfly_ni_tx.sv`, `rtl/bfly_link.sv` — Butterfly
- `rtl/benes_router.sv`, `rtl/benes_network.sv`, `rtl/benes_ni_tx.sv`, `rtl/benes_link.sv` — Benes
- `rtl/ni_rx_mem.sv` — receive interface and memory (both multistage networks)
- `rtl/dn_node.sv`, `rtl/dn_network.sv` — direct network
- `rtl/tdec_noc_top.sv` — top level
- `tb/` — testbenches and two helper packages: interleaver traffic, and Benes path computation
