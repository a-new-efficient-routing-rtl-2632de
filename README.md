# BIOS: a mesh network-on-chip router with best input and output selection

A router in a 2D-mesh network-on-chip has two decisions to make. **Output selection** picks the
output port for each packet. **Input selection** picks which of several competing input channels
gets an output that is free. BIOS (Best Input and Output Selection) makes both decisions from the
traffic that the router sees around it:

* **Output selection switches between deterministic and adaptive routing.** While no neighbouring
  router is congested, every packet follows a fixed minimal route. This route is a deterministic
  form of odd-even routing, called DOE here. It keeps latency at light load low. As soon as any
  neighbour reports congestion, the router routes adaptively under the odd-even turn model. When a
  packet has two minimal directions, it takes the one whose downstream input buffer holds fewer
  flits. Every DOE route is also an odd-even route, so mixing the two modes keeps the odd-even
  model's freedom from deadlock.
* **Input selection favours busy paths without starving quiet ones.** Each output channel counts
  how many input channels request it. This count is its *contention level* (CL), and the output
  sends it along the link to the next router. There, an input channel competing for an output
  has priority `CL + AGE`. AGE counts the competitions this input has lost since it last won.
  Traffic from congested upstream routers therefore moves first. A channel that keeps losing gains
  priority until it wins, so no channel starves.

This repository holds synthesizable SystemVerilog for the router (`bios_router`) and for an N × N
mesh of routers (`bios_noc`, 6 × 6 by default). It also holds self-checking testbenches, including
the uniform, transpose and hot-spot traffic on which the algorithm is usually evaluated.

## The mesh

```
 y
 5  S-S-S-S-S-S      each S is a bios_router with a local port to its tile's resource
 |  | | | | | |      tile k = y*N + x; north = y+1, east = x+1
 0  S-S-S-S-S-S      column parity (x even / odd) drives the odd-even turn rules
    0 ---------- 5 x
```

`bios_noc` instantiates `N*N` routers. Each router is given its own coordinates as parameters.
Between two neighbouring routers the link carries:

| direction   | signals                      | meaning                                                    |
|-------------|------------------------------|------------------------------------------------------------|
| forward     | `valid`, 32-bit flit         | a flit moves in this cycle                                 |
| forward     | `cl` (3 bits)                | contention level of the sending output, one cycle old      |
| backward    | `flag` (2 bits)              | congestion flag of the receiving input buffer: 0 / 1 / 2   |
| backward    | `occ` (3 bits)               | occupancy of the receiving input buffer, in flits          |

The congestion flag also serves as the backpressure signal. A sender only raises `valid` while the
receiver's flag is not 2 (full), so no flit is ever dropped and no credit counters are needed.
Ports that face the edge of the mesh receive nothing. They report "full", so nothing is ever
sent off the mesh.

**Local interface of tile k** (the resource, or a network interface, is not part of this design):

* inject with `local_in_valid[k]`/`local_in_data[k]`. Assert valid only while `local_in_ready[k]`
  is high, which means the local input buffer is not full.
* receive from `local_out_valid[k]`/`local_out_data[k]`. Hold `local_out_ready[k]` low to
  stall the router.
* `ev[k]` is a 6-bit event vector for observation only: `{stall, AGE-decided win, contested
  arbitration, backtrack, adaptive choice, adaptive mode}`.

**Flit format** (`bios_pkg`). Bit 31 marks a head flit and bit 30 a tail flit; a one-flit packet
sets both. A head flit then carries `dst_x`, `dst_y`, `src_x` and `src_y` (3 bits each), followed
by 18 payload bits. The odd-even route function needs the source column. Body and tail flits are
free below bit 30. Packets use wormhole switching: once a head flit has claimed an output, the
output stays with that packet until its tail flit has passed.

## Inside a router

```
 in i ──► bios_fifo ──► bios_output_selector ── req ──►┐
   (5 flits)   │              ▲ mode, backtrack          │  per output o:
               ▼              │                          ├─► bios_input_selector ── sel ──► MUX ──► out o
        bios_cong_flag ─► flag, occ to upstream         │        (CL + AGE)                 (bios_crossbar)
                                                        │          └─► out_cl o to downstream
 flags of N/E/S/W neighbours ──► bios_mode_ctrl ───────┘
```

Each of the five input channels (0 local, 1 north, 2 east, 3 south, 4 west) has:
* a register FIFO;
* a congestion-flag generator;
* an output selector.

Each output channel has an input selector and a multiplexer. The multiplexers together form the
crossbar. The crossbar is a full 5 × 5 crossbar, so a packet can also leave through the port it
came in on (see *Backtracking*).

**Timing.** The route decision, the arbitration and the crossbar are all combinational from the
flit at the front of a buffer. A flit that is written into a buffer at one clock edge can
therefore be in the next router's buffer at the next edge: one cycle per hop at zero load. The
signals that cross between routers are all derived from registers: flags, occupancies and
contention levels. This keeps combinational paths within one router. On an idle 6 × 6 mesh, a
one-flit packet from (0,0) to (5,5) spends 1 cycle entering the local buffer and 10 cycles for
its 10 hops. It is handed to the destination resource in the cycle after that.

Reset is asynchronous and active low. It empties every buffer and clears every AGE and lock.

## Congestion flags and the routing mode

Every input buffer publishes a flag for its upstream router (`bios_cong_flag`):

| occupancy (5-flit buffer, 60 % threshold) | flag | meaning for the upstream router          |
|-------------------------------------------|------|------------------------------------------|
| 0 – 2                                     | 0    | no congestion: route deterministically    |
| 3 – 4 (≥ 60 %, rounded up to whole flits) | 1    | congested: route adaptively               |
| 5 (full)                                  | 2    | cannot take a flit now                    |

The mode controller (`bios_mode_ctrl`) looks at the flags of the router's existing neighbours.
If any of them is 1 or 2, it sets *adaptive* for all output selectors. If all of them are 2, it
also raises *backtrack*.

## Output selection: DOE and odd-even

`bios_route_oe` computes the minimal odd-even candidate set. The odd-even turn model forbids:
* east→north and east→south turns in even columns;
* north→west and south→west turns in odd columns.

The route function that respects these rules:

* destination column reached → north or south (or the local port at the destination);
* eastbound, same row → east;
* eastbound, different row → north/south if the current column is odd *or* is the packet's
  source column (leaving the source column is not a turn). East is also allowed if the
  destination column is odd *or* the packet is more than one column away. An eastbound packet
  whose destination column is even must therefore make its last vertical move before it reaches
  that column;
* westbound → west, and north/south too if the current column is even.

At most one horizontal and one vertical direction can be candidates at the same time.

`bios_output_selector` decides once per packet, in the first cycle its head flit is at the front
of the buffer. It requests that output from then on, until the tail flit leaves:

* **deterministic mode (DOE):** if both a horizontal and a vertical move are allowed, take the
  horizontal one (X first, as in XY routing); otherwise take the only candidate.
* **adaptive mode:** with two candidates, avoid one whose downstream buffer is full. Otherwise
  take the one whose downstream buffer holds fewer flits. On equal occupancy, take the vertical
  one.

Example: the router at column 1, row 1 receives a packet from column 0 that is addressed to
column 3, row 3. North and east are both allowed. In adaptive mode it goes east if the north
neighbour's south input buffer holds more flits than the east neighbour's west input buffer, and
north otherwise.

Holding the decision, rather than re-deciding every cycle, makes a packet's request stable while
it waits for arbitration.

## Input selection: contention level plus age

`bios_input_selector` sits on each output:

* `out_cl` is the number of inputs that requested this output, registered. It travels along the
  link to the downstream router, where it becomes that input channel's CL. The local input has
  no upstream router, so its CL is 0. Packets already in the network therefore start out ahead
  of packets that are being injected.
* When the output is free, the requesting input with the largest `CL + AGE` wins. Equal priority
  goes to the larger AGE, and then to the lower port index.
* A competition counts as decided when the winner's head flit actually leaves. The winner's AGE
  becomes 0. Every other input that requested in that cycle gets AGE + 1 (4 bits, saturating).
* The output then stays locked to the winner until its tail flit has passed.

Starvation example, from the testbench: input 1 has CL 4 and input 2 has CL 0, and both request
without pause. Input 1 wins four times while input 2's AGE climbs 1, 2, 3, 4. Then the priorities
tie at 4 and input 2 wins on its higher AGE. Input 2 therefore gets every fifth packet instead of
none.

## Backtracking

BIOS as originally described also sends a packet back to the router it came from when every
neighbour reports a full buffer. The same description calls the algorithm deadlock free. With
wormhole switching these two claims clash. When every neighbour is full, the router the packet
came from is full too. The returned packet then waits for that router's buffer, while that
router's packets wait for this one's. In 6 × 6 mesh simulation under hot-spot load this closes
a cycle, and the network stops delivering. A softer variant, which drops a pending U-turn as soon
as a minimal direction frees, still deadlocked on some random seeds.

Backtracking is therefore implemented but **disabled by default** (`BACKTRACK = 0`). The mode
controller still computes the condition. With `BACKTRACK = 1` a packet that arrived from a
neighbour, and is not yet at its destination, is turned back through its input port. The local
input never backtracks. The router testbench exercises this mode.

## Parameters

| module        | parameter    | default | notes                                              |
|---------------|--------------|---------|----------------------------------------------------|
| `bios_noc`    | `N`          | 6       | mesh is N × N; coordinate fields are 3 bits (N ≤ 8) |
|               | `DEPTH`      | 5       | input buffer depth in flits (8 for the area figures usually quoted) |
|               | `THRESH_PCT` | 60      | congestion threshold in % of `DEPTH`, rounded up    |
|               | `AGE_W`      | 4       | AGE counter width                                  |
|               | `BACKTRACK`  | 0       | see above                                          |
| `bios_pkg`    | `FLIT_W`     | 32      | flit and link width                                |

`bios_router` takes the same parameters plus its own coordinates `X` and `Y`.

## Where this design makes its own choices

The algorithm (mode switch, flag values, CL + AGE arbitration, odd-even turn rules, 60 %
threshold, 5-flit register FIFOs, 32-bit flits, 6 × 6 mesh) follows the BIOS description. The
following are this implementation's own choices:

* the link protocol: the flag used as backpressure, occupancy sent back, CL registered;
* one cycle per hop;
* the flit layout;
* DOE's preference for the horizontal move;
* the vertical preference on equal occupancy;
* one route decision per packet;
* the full tie-break of the arbitration (lowest index);
* AGE incremented only for inputs that were requesting (not for every other input);
* the 4-bit saturating AGE;
* edge handling;
* backtracking being off by default.

Router area was originally quoted as 27,856 gates (against 25,971 for a plain odd-even router and
24,983 for XY), in a 0.16 µm library at 333 MHz with 8-flit buffers. This RTL has not been mapped
to such a library. Coarse synthesis with yosys gives about 2,000 word-level cells and 1,035
flip-flop bits per router at the default 5-flit depth. The network interface and the resources
are not part of the design.

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself with a watchdog.

| testbench                  | what it checks |
|----------------------------|----------------|
| `tb_bios_fifo`             | 3000 random cycles against a queue model: front data, count, empty, full |
| `tb_bios_cong_flag`        | flag values for every occupancy, depth 5 and depth 8 |
| `tb_bios_route_oe`         | 21 random walks for every source/destination pair of a 6 × 6 mesh: candidates never empty, always minimal, no forbidden turn, DOE always a candidate, destination reached in the Manhattan distance; plus exact candidate sets in five directed cases |
| `tb_bios_mode_ctrl`        | all 81 flag combinations × 16 neighbour masks |
| `tb_bios_output_selector`  | DOE, adaptive choices, full-buffer avoidance, backtrack on/off, ejection, decision hold, release at the tail |
| `tb_bios_input_selector`   | the starvation sequence above; 20,000 random cycles against a reference model |
| `tb_bios_crossbar`         | random legal grant patterns |
| `tb_bios_router`           | one-cycle hop, DOE route, adaptive route, CL priority with whole packets, local CL = 0, backpressure and flags, backtracking |
| `tb_bios_noc`              | default 6 × 6 mesh: 11-cycle zero-load corner-to-corner latency; uniform, transpose and hot-spot phases with a blocked hot-spot sink; every packet delivered intact and once; adaptive mode, adaptive choice, contested arbitration, AGE-decided wins and stalls each seen |
| `tb_bios_noc_depth8`       | the same end-to-end test with 8-flit input buffers |
| `tb_bios_workloads`        | the three traffic patterns at 0.01, 0.04 and 0.07 packets/cycle/tile with 4-flit packets: 2000 warm-up cycles, then 20,000 measured packets per point |

Mean latency (cycles from packet creation to tail arrival, source queueing included) measured by
`tb_bios_workloads` at the default parameters:

| packets/cycle/tile | uniform | transpose | hot spot |
|--------------------|---------|-----------|----------|
| 0.01               | 9       | 10        | 9        |
| 0.04               | 10      | 13        | 12       |
| 0.07               | 15      | 30        | 1453 (saturated) |

Only BIOS itself is built here. The XY and plain odd-even routers that BIOS is usually compared
with are not, so the comparison curves are not reproduced.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/bios_pkg.sv tb/tb_bios_noc.sv --top-module tb_bios_noc
./obj_dir/Vtb_bios_noc
```

Replace `tb_bios_noc` with any other testbench name. Each testbench finishes in seconds;
`tb_bios_workloads` takes about half a minute. To use the mesh in another design, instantiate
`bios_noc` and drive the local ports of each tile as described above. For a single router, use
`bios_router` and connect its four mesh ports to neighbours the way `bios_noc` does.
