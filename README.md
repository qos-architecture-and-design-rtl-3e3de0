# A four-level QoS wormhole network on chip

This is a packet-switched network that replaces the buses and dedicated
wires of a system on chip. All traffic between modules shares one mesh of
small routers. The traffic falls into four service levels with a strict
order of priority:

| code | level          | typical use                               |
|------|----------------|-------------------------------------------|
| 0    | Signalling     | interrupts and control signals, very short packets |
| 1    | Real-Time      | streamed audio and video, bandwidth-bounded |
| 2    | RD/WR          | short memory and register accesses (bus semantics) |
| 3    | Block Transfer | long bursts: cache refills, DMA            |

The main idea is this. A router keeps a separate small buffer for each level
on every input, and it may switch levels on a link at any flit. So a
Signalling packet overtakes a 2000-flit block transfer at the next flit
boundary, and the block transfer carries on when nothing more urgent is
waiting. Within one level the network is an ordinary wormhole network:
 * a packet holds its path until its last flit has passed;
 * round-robin arbitration shares an output between the inputs of that level;
 * hop-by-hop credits make the network lossless.

Routing is fixed and shortest-path, so no tables are needed, and packets
between two modules are never reordered.

The RTL builds the 4x4 example configuration:
 * 16 modules, one per router;
 * 16-bit flits;
 * two flits of buffering per level per input.

## Links and flits

A link has the same signals whether it joins two routers or a router and a
module. In the forward direction, one flit per clock:

| signal  | bits | meaning |
|---------|------|---------|
| `data`  | 16   | flit payload (`FLIT_W`) |
| `ftype` | 2    | 00 IDLE, 01 EP (end of packet), 10 BDY (body, not last), 11 FP (full, one-flit packet) |
| `sl`    | 2    | service level of the flit |

In the backward direction, the credits:

| signal    | bits | meaning |
|-----------|------|---------|
| `valid`   | 1    | the mask holds credits |
| `sl_mask` | 4    | bit *s* set: one flit slot of level *s* has been freed |

In the RTL these are the packed structs `link_t` and `credit_t` of `qnoc_pkg`.

No flit is marked as the start of a packet. The first flit of a packet is
the first non-idle flit of a level that follows an EP or FP flit of the same
level. This works because flits of two packets of one level never interleave
on a link: only flits of different levels do.

The first flit of every packet carries the target routing address (TRA) in
its four most significant bits: `data[15:14]` is the target row and
`data[13:12]` is the target column. The rest of the packet (command and
payload) belongs to the modules and the routers never look at it. Rows grow
southwards and columns eastwards. The module at row *r*, column *c* has
address {r, c}.

## Inside the router

`qnoc_router` has five ports: `LOCAL`=0, `NORTH`=1, `EAST`=2, `SOUTH`=3 and
`WEST`=4. Each port is an input half (`qnoc_input_port`) and an output half
(`qnoc_output_port`), and a crossbar (`qnoc_crossbar`) joins them.

### Input port: buffers and the Current Routing Table

 * Every non-idle flit goes into the FIFO of its level (`qnoc_sl_buffer`,
   `DEPTH` = 2 entries of data plus type). The sender's credits guarantee
   that there is always room. An assertion checks this.
 * Each level has one Current Routing Table (CRT) entry: a valid bit and an
   output port number.
 * When a packet's first flit reaches the head of its FIFO, `qnoc_route`
   computes the output port from the TRA, and the request goes out in the
   same cycle.
 * When that first flit leaves and is not also the last, the port is stored
   in the CRT. The body flits use the stored port, because their data is
   payload and not an address. The entry is cleared when the EP flit leaves.
 * The port returns one credit for every flit that leaves. All levels
   that lose a flit in a cycle are credited together in one mask, one cycle
   later.

The route is computed when the first flit reaches the head of the FIFO, not
when it arrives. This is deliberate. With two-flit buffers, the tail of one
packet and the head of the next can sit in the same FIFO. A single CRT entry
per level can then serve both, because the next packet is routed only once
the previous one has gone.

### Output port: NBS, CSIP and the scheduler

For each level the output keeps two values:

 * **NBS** (Next Buffer State): the free slots in that level's FIFO at the
   far end of the link. It starts at `DEPTH`. It goes down for each flit sent
   and up for each credit received.
 * **CSIP** (Currently Served Input Port): the round-robin pointer over the
   five inputs, plus a *locked* bit. The bit is set while a packet of that
   level is part-way through this output.

In every cycle:

1. For each level, pick a candidate input.
   * If the level is locked, the candidate is the input that owns the
     packet. If that input has no flit this cycle, the level sends nothing:
     no other packet of the level may slip in.
   * Otherwise the candidate is the first input, starting at CSIP, that has
     a head flit of this level routed here.
2. From the levels that have a candidate and either NBS > 0 or a credit
   arriving in this cycle, send the one with the lowest code, that is, the
   highest priority.
3. Register the flit onto the link. If it was the last flit of its packet,
   unlock the level and move CSIP to the input after the one just served.
   Otherwise lock the level on that input.

What this gives:

 * **Preemption.** A higher level takes the link at the next flit, even in
   the middle of a lower packet.
 * **Wormhole.** Within a level, packets go in whole, one after another.
 * **Fairness.** Within a level, inputs are served round robin, one packet
   at a time.
 * **Low levels can starve.** A low level gets only the cycles that the
   high levels leave free. The network must therefore be sized so that
   Signalling and Real-Time traffic stay bounded.

An idle link shows type IDLE and keeps its last data and level, so the data
wires do not toggle.

The output port also has three monitor signals. Testbenches read them and
cover properties count them:
 * `preempt`: a locked lower level was overtaken;
 * `credit_stall`: a level had a flit but no credit;
 * `rr_skip`: the round robin passed over the input at CSIP.

### Crossbar

Every (input, level) FIFO head is a crossbar source, which makes 20 sources.
Each output grants one source. All flits of one FIFO go to the output named
by its route or CRT, so no two outputs can grant the same source. Each
output is therefore a plain multiplexer. The crossbar also forms the pop
signals of the FIFOs.

### Timing

 * **Router latency: two cycles.** A flit on an input link at clock edge *t*
   is at the head of its FIFO after edge *t*, and on the output link after
   edge *t+1*. Crossing the idle 4x4 mesh from corner to corner goes through
   seven routers and takes 14 cycles. Both figures are checked by the
   testbenches.
 * **Credit loop: three cycles.** The loop is: flit sent, flit stored in the
   next FIFO, flit forwarded, credit registered. The credit is usable in the
   cycle it arrives. With two slots per level, one level alone can use at
   most 2/3 of a link. Several levels together can fill the link.
 * **Trimming.** The router parameter `PORT_EN` removes the logic of absent
   ports. The mesh uses it at its edges, which leaves 64 ports in total.

## Routing

Routing is symmetric X-Y, where X is the column:
 * a packet whose target is east of its source goes along its row first,
   then along the column;
 * every other packet goes along its column first, then along the row.

The path from A to B is therefore the path from B to A in reverse.

A router does not know a packet's source. It applies the rule to its own
position, in this order:
 * if the target column is east of this router, go east;
 * else if the target row differs, go north or south;
 * else if the target column is west, go west;
 * otherwise deliver to the local module.

Hop by hop this gives exactly the X-first path for eastbound packets and the
Y-first path for all others. The turns it allows cannot close a cycle, so
routing cannot deadlock. Under uniform traffic, this routing makes the
busiest link (1,3)->(2,3) carry 9.33 times the load of the quietest links,
such as (0,0)->(1,0).

## The mesh (top module `qnoc_mesh`)

Parameters:

| parameter | default | |
|-----------|---------|---|
| `ROWS`, `COLS` | 4, 4 | mesh size |
| `DEPTH` | 2 | flits per level per input |
| `qnoc_pkg::FLIT_W` | 16 | flit width, a package constant |
| `qnoc_pkg::COORD_W` | 2 | TRA field width, a package constant |

Router (r, c) is instance `g_r[r].g_c[c].u_router`. The module side of every
router comes out as arrays indexed `r*COLS + c`:

 * `inj_link[n]` (input) and `inj_credit[n]` (output): the module sends
   flits and receives the network's credits. The module starts with `DEPTH`
   credits per level and sends a flit of level *s* only while it holds a
   credit of level *s*.
 * `ej_link[n]` (output) and `ej_credit[n]` (input): the network delivers
   flits. The module returns one credit per flit taken, at any later cycle
   and at most one per level per cycle. Holding credits back makes the
   network wait. This is safe: nothing is lost.

A module may interleave its own levels just as a router does. All routers
share `clk`. The reset `rst_n` is synchronous and active low.

## Size

Synthesis of the full mesh gives about 3.1k flip-flop bits of control and
output registers, plus the FIFO storage. The FIFOs hold 64 ports x 4 levels
x 2 flits x 18 bits = 9,216 bits.

The usual estimate for this router counts, per port and level, the flit
buffers plus about log2(BufSize * #Port^2) bits of tables:

    #FF ≈ #Port * #SL * [ (FlitSize+2) * BufSize + log2(BufSize * #Port^2) ]

For the trimmed mesh (4 routers of 3 ports, 8 of 4, 4 of 5) this estimate
comes to about 10.5k.

## How it behaves under the benchmark traffic

The workload testbenches load every module with four sources, one per level.
One clock cycle stands for 1 ns of a 1 GHz link:

| level | packet length | inter-arrival time |
|-------|---------------|--------------------|
| Signalling | 2 flits | uniform, 50-150 ns |
| Real-Time | 20-60 flits | exponential, mean 2 µs; visits targets in turn |
| RD/WR | 2-6 flits | exponential, mean 25 ns |
| Block Transfer | 2000 flits | exponential, mean 12.5 µs |

That makes about 0.36 flits per cycle per module, which is 720 MB/s. On this
mesh of uniform 16-bit links, the busiest link then runs at about 67% under
uniform traffic and 59% when neighbours are twice as likely as other targets.

End-to-end delay is measured from packet creation, including source
queueing, to the arrival of the last flit. Over 120,000 cycles (one seed)
the results were:

| level | uniform: 99.9% below | non-uniform: 99.9% below | requirement used in the test |
|-------|----------------------|--------------------------|------------------------------|
| Signalling | 18 cycles | 17 cycles | 30 (99.9%) |
| Real-Time | 176 | 178 | 125,000 (99.9%) |
| RD/WR | 77 (99%) | 60 (99%) | 100 (99%) |
| Block Transfer | 54,700 | 55,815 | 100,000 (99.9%) |

As intended, the two high levels stay short and almost flat while the
Block Transfer level absorbs the congestion.

The load-sweep testbench runs the uniform benchmark at several fractions of
its rate and reports the mean delay per level, in cycles:

| load | Signalling | Real-Time | RD/WR | Block Transfer |
|------|------------|-----------|-------|----------------|
| 50%  | 9.3 | 69.5 | 14.5 | 4,648 |
| 75%  | 9.4 | 71.3 | 16.6 | 6,025 |
| 100% | 9.4 | 71.1 | 20.7 | 10,525 |
| 125% | 9.4 | 74.7 | 39.7 | 14,651 |

As load grows, the delay of the two lower levels climbs steeply while the
Signalling delay does not move.

## Departures and limits

 * **One link width and one clock.** Every link is one flit wide on the
   common clock. Sizing each link to its load (more wires or a faster link
   clock where traffic is heavy) is not modelled. That would need
   serialisation and clock crossing on each link, and neither is specified
   here. For the same reason, links are not clocked by a source-synchronous
   clock whose falling edge samples the data. Flits are sampled on the
   rising edge of `clk`, and the IDLE type plays the role of a valid signal.
 * **A regular mesh only.** `qnoc_mesh` builds the full mesh. It does not
   build an irregular mesh with trimmed routers and links, and it does not
   give one module several network ports. The router's `PORT_EN` parameter
   is enough to assemble such a layout by hand.
 * **One link register per output.** Each output has a single link register
   shared by all levels. The level to send is chosen before the flit is
   registered, so no per-level output slot is needed.
 * **No network interface.** No logic maps bus transactions (read/write,
   DMA) onto packets and levels. Modules must build packets themselves: TRA
   in the first flit, with EP/BDY/FP types.
 * **No rate enforcement.** No circuit enforces a bandwidth limit on
   Real-Time flows. The sources must keep to their allocation.
 * **Own choices.**
   * The TRA layout (absolute coordinates in the top bits).
   * The level and port codes.
   * The credit bypass.
   * Searching all inputs for the round robin in one cycle.
   * Routing at the FIFO head.
   * The two-cycle router pipeline.
   * The synchronous reset.

## Files

All files are in `rtl/` and `tb/`.

| file | contents |
|------|----------|
| `rtl/qnoc_pkg.sv` | flit and credit types, level and port codes, TRA helpers |
| `rtl/qnoc_sl_buffer.sv` | per-level FIFO |
| `rtl/qnoc_route.sv` | routing function |
| `rtl/qnoc_input_port.sv` | FIFOs, CRT, credit return |
| `rtl/qnoc_output_port.sv` | NBS, CSIP, scheduler, link register |
| `rtl/qnoc_crossbar.sv` | crossbar and pop signals |
| `rtl/qnoc_router.sv` | five-port router |
| `rtl/qnoc_mesh.sv` | top: mesh of routers |
| `tb/tb_qnoc_<block>.sv` | self-checking test of each block |
| `tb/tb_noc_endpoint.sv`, `tb/tb_noc_sb_pkg.sv` | traffic source, sink and scoreboard |
| `tb/tb_qnoc_mesh.sv` | end-to-end test at default sizes |
| `tb/tb_qnoc_workload_uniform.sv`, `tb/tb_qnoc_workload_nonuniform.sv`, `tb/tb_qnoc_workload_core.sv` | benchmark runs |
| `tb/tb_qnoc_workload_load_sweep.sv` | mean delay against offered load |

Every testbench prints `TB_RESULT checks=N failures=M` at the end.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
      -Irtl -y rtl -y tb rtl/qnoc_pkg.sv tb/tb_qnoc_mesh.sv \
      --top-module tb_qnoc_mesh -Mdir obj_mesh
    ./obj_mesh/Vtb_qnoc_mesh

Replace `tb_qnoc_mesh` with any other testbench name. A lint of the design
alone:

    verilator --lint-only -Wall -Wno-fatal -Irtl -y rtl rtl/qnoc_pkg.sv rtl/qnoc_mesh.sv

`tb_qnoc_router` also sends one Real-Time packet and one single-flit
Signalling packet to the same output, and checks that the link shows a
Real-Time body flit, then the Signalling flit, then Real-Time again.

`tb_qnoc_mesh` runs in about a minute:
 * the corner-to-corner latency check;
 * 40,000 cycles of mixed traffic, with two modules holding back credits;
 * a drain.

It fails if any of these never happened: preemption, a credit stall, a
round-robin skip, a single-flit packet, a multi-flit packet, or a route of
either kind.

Each workload testbench takes about 1.5 minutes. To change traffic, edit the
parameters of `tb_noc_endpoint`: rates by `LOAD_PCT` and the `*_MEAN`
inter-arrival times, sizes by `*_MIN`/`*_MAX`, and credit back-pressure by
`SINK_HOLD`.
