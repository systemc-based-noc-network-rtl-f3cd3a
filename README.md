# Wormhole mesh network-on-chip with synthetic traffic

This is a small packet-switched network-on-chip (NoC) in synthesizable SystemVerilog.
It has a grid of five-port routers. Each router serves one node. The node has a traffic
**source**, which injects packets, and a **sink**, which consumes them. Packets are cut
into 21-bit **flits** that move one hop per clock cycle. Routing is dimension-ordered:
x first, then y. Switching is **wormhole**: a packet's header reserves each output it
passes, the body follows, and the tail flit releases the output. Flow control is a
simple full/busy flag going back on every link.

The default build is a 4×4 mesh with 16 nodes and 4-bit addresses. The same RTL also
builds a 1×2 mesh (two nodes, one link) and a 4×4 torus (`TORUS = 1`).

The design is a hardware version of a classic SystemC teaching model of a NoC. That
model has source, sink, router, FIFO, arbiter and crossbar modules, and this RTL keeps
the same structure, port names and field widths. The model's event-driven behaviour is
turned into single-clock synchronous logic. The section "Departures from the reference
model" below lists every place where the two differ.

## Flit format

| bits   | field     | meaning |
|--------|-----------|---------|
| 20:10  | `data`    | 11-bit payload |
| 9:6    | `id`      | source address |
| 5:2    | `dest`    | destination address |
| 1      | `pkt_clk` | "imaginary clock": flips on every new flit of a source |
| 0      | `h_t`     | 1 in the tail (last) flit of a packet |

Every flit carries the full header. A packet is 5 flits long (`PKT_LEN`): four flits
with `h_t = 0`, then the tail. An address is `{y, x}`, with x (the column) in the low
bits. Row 0 is the north edge and column 0 the west edge. In a 4×4 network, node
n = 4y + x has address n. The types are in `rtl/noc_pkg.sv` (`flit_t`, `req_t`,
`port_code_e`, `traffic_e`).

In the SystemC model, `pkt_clk` made two identical flits look different, so that each
new flit raised an event. Here a `valid` bit marks a new flit, so `pkt_clk` is not
needed for that. It is kept in the flit, and the sinks use it as a check: inside a
packet, the bit must flip from one flit to the next.

## Links and flow control

Every link carries three things:

- `flit`, from the sender;
- `valid`, from the sender;
- `ack`, from the receiver. `ack` is high when the receiver cannot take a flit.

A flit moves at a rising edge where `valid` is high and `ack` is low. A sender that sees
`ack` high holds its flit unchanged.

- **Router input buffers:** `ack` is the buffer's *full* flag.
- **Router outputs:** the arbiter only grants an output whose `ack` is low, so every flit
  shown on an output is taken at the next edge. There is never a flit waiting on a
  router-to-router wire.
- **Sink:** `ack` means *busy*. It rises after each flit and falls at the next sink
  clock tick.

Every `ack` depends only on the receiver's own registers. So the handshake has no combinational path
from one router back to the one before it, even though a granted flit goes from a
buffer, through the crossbar, to the next router's buffer in the same cycle.

## Inside the router (`noc_router`)

Ports are numbered 0 = local, 1 = north, 2 = east, 3 = south and 4 = west. The arbiter
and crossbar use the output codes 1–5 (port + 1). Each router has three parts:

1. **Five input buffers** (`flit_fifo`). Each is a 4-entry shift register with entry 0 at
   the head. It raises `ack` when full. It sends the arbiter a request that holds
   not-empty, the head's destination and the head's tail bit.
2. **The arbiter** (`noc_arbiter`). It works out an output for every head flit and
   grants at most one input per output. More on it below.
3. **The crossbar** (`noc_crossbar`). It is purely combinational. A granted head flit
   goes to the output named in its 3-bit field of the 15-bit select word. Input i uses
   bits 3i+2..3i.

### Arbitration

This is the part that needs the most care.

- **Route.** A flit that is not part of a packet already in progress is routed from its
  destination: east if the destination's x is larger, west if it is smaller; with equal
  x, south if y is larger, north if it is smaller; otherwise local. In a torus, x and y
  each go the shorter way round their ring, east or south on a tie.
- **Wormhole state.** A granted header that is not a tail does three things:
  - it marks its input *connected*;
  - it stores the route in that input;
  - it marks the output *reserved*.

  Body flits of a connected input use the stored route and ignore their `dest`. The
  granted tail clears both marks. A header may only take an output that is not
  reserved. So the flits of two packets never mix on a link.
- **Free outputs.** An output is free in a cycle if its `ack` (the neighbour's full flag
  or the sink's busy flag) is low.
- **Priority.** Inputs are handled in fixed order, 0 (local) first, then N, E, S, W. The
  first input that asks for a free output gets it, and that output is then taken for
  the rest of the cycle.
- **No U-turns.** A request to leave by the input's own port is never granted. XY
  routing never makes one.

Grants are combinational in the buffer state and the `ack` inputs. Reservations change
at the clock edge.

### Timing

Take a flit written into an empty buffer at edge t:

- it is at the head during cycle t;
- it is granted in cycle t;
- it is in the next router's buffer (or taken by the sink) at edge t+1.

With no contention, a hop costs one cycle. In the end-to-end tests, the delay from the
edge where a router takes a flit from its source to the edge where the destination sink
takes it is **hops + 1 cycles** at zero load. The tests check this value at 1 and 2
hops, and check that no flit is ever faster.

Two limits set the throughput:

- Each output moves at most one flit per cycle.
- A sink whose clock ticks every cycle takes at most one flit every two cycles. After a
  flit its `ack` stays high until the next tick.

## Sources, sinks and their clocks

**`noc_source`** builds flits only when its clock tick `en` is high, and only when its
output register is empty or being emptied.

- **Data:** each flit's data is the previous data + `source_id` + 1, starting from 1000.
  So node 0 sends 1001, 1002, … and node 2 sends 1003, 1006, ….
- **Packets:** every fifth flit is a tail.
- **Destination:** taken from the traffic generator when the header is built, and kept
  for the whole packet.
- **Starting a packet:** a source never starts a packet to itself, and starts none while
  `run` is low. A packet it has begun is always finished, so lowering `run` stops all
  sources cleanly at packet ends.

**`noc_sink`** takes a flit whenever its `valid` is high; the router guarantees that
`ack` is low at that moment.

- **Counters:** it counts flits and packets, and keeps the last flit it took.
- **Errors:** it counts a flit addressed elsewhere, and a body flit whose source changed
  or whose `pkt_clk` did not flip.
- **Rate:** its clock tick sets how fast it drains the network.

**Clocks.** The model this design follows has three clocks: source, router and sink. In
this design all logic runs on the router clock. `clk_tick` makes the source and sink
clocks as enables: one cycle in `SRC_DIV` (or `SNK_DIV`). A divider of 1 means that
clock is as fast as the router clock.

## Traffic patterns (`traffic_gen`)

The `traffic_mode` input of the top selects the pattern. The output is registered, so a
change of mode takes effect one cycle later.

| mode                | node (x, y) sends to                                | property |
|---------------------|-----------------------------------------------------|----------|
| `TRAFFIC_FIXED`     | address `FIXED_DEST` (1)                            | hot spot; node 1 itself sends nothing |
| `TRAFFIC_UNIFORM`   | (COLS−1−x, ROWS−1−y), i.e. node n → 15−n in 4×4     | one-to-one: every node sends to one node, every node receives from one |
| `TRAFFIC_NEIGHBOUR` | (x XOR 1, y); in a single column (x, y XOR 1)       | one-to-one, one hop |

The neighbouring pattern needs an even number of columns, or of rows in a one-column
network.

## Torus option

With `TORUS = 1`, `noc_mesh` adds wrap-around links. The east output of the last column
feeds the west input of the first column, and the south output of the last row feeds the
north input of the first row.

**Deadlock.** There are no virtual channels. A wormhole packet can wait on a packet that
waits on it, all the way round a ring, so traffic whose packets fill a whole ring can
deadlock. The patterns above cannot, because no route covers a whole ring in either
dimension. The torus test drains the network after each pattern. A deadlock-free
general torus would need a second buffer class per input (a dateline scheme), which
this design does not have.

## Measuring packet delay

The top keeps a free-running cycle count and gives it to every node.

- Each source adds up the times at which the router takes its headers (`src_time_sum`).
- Each sink adds up the times at which it takes tail flits (`snk_time_sum`).

Run the network, lower `run`, and let it drain. Then:

    average packet delay = (Σ snk_time_sum − Σ src_time_sum) / (packets received)

This is the time from a header leaving its source to its tail reaching the sink,
averaged over the run. The end-to-end testbenches match every packet one by one and
check that the two results agree.

Results of the 4×4 tests: 2000 cycles of injection at full source rate (sources and
sinks ticking every cycle), then drain.

| network | pattern    | flits delivered | average packet delay (cycles) |
|---------|------------|-----------------|-------------------------------|
| mesh    | fixed (→1) | 1150            | 282.5 |
| mesh    | uniform    | 4195            | 98.8  |
| mesh    | neighbour  | 16160           | 21.9  |
| torus   | fixed (→1) | 1150            | 282.5 |
| torus   | uniform    | 16160           | 28.8  |
| torus   | neighbour  | 16160           | 21.9  |

16160 flits (about 0.5 flit per node per cycle) is the limit set by the sinks. In the
mesh, the uniform pattern sends every packet across the middle links, which are the
bottleneck. In the torus, every uniform packet goes one hop in x and one in y over the
wrap-around links.

## Departures from the reference model

What the design keeps from the SystemC model:

- the flit fields and widths;
- the 4-entry input buffers and 5-flit packets;
- the source's data rule;
- the sink's acknowledge-then-release behaviour;
- the arbiter's bit-wise XY comparison and output codes;
- the 15-bit crossbar select word;
- one buffer per input.

What this design chose:

- **One clock.** Everything uses rising edges of one clock, with valid bits and a
  hold-while-`ack` handshake instead of change events. The model's arbiter ran on the
  falling edge. Here it is combinational, so a hop takes one cycle.
- **Route stored at the header.** Body flits are routed by the route stored at the
  header. Only their tail bit is read.
- **Wider addresses.** The address splits into x and y fields of `XW` and `YW` bits, so
  a 4×4 network can be addressed. The model compared only bit 0 and bit 1.
- **No traffic to itself.** The model stopped one particular source (node 1) from
  sending to itself. Here any source skips a packet to its own address.
- **Kept destination.** The destination is held for a whole packet.
- **New inputs and checks.** The `run` input and the sink's error checks are new.
- **Chosen patterns.** The uniform and neighbouring permutations above are this design's
  choice. The patterns are only defined as one-to-one.
- **Buffer full blocks writes.** A full buffer refuses a write even in a cycle where it
  also sends a flit.
- **Reset.** It is asynchronous and active-low. After reset all buffers are empty, there
  are no reservations, and sources start at data 1000.
- **Mesh edge.** Ports on the edge of the mesh have idle inputs, and their outputs are
  held busy.

Not built:

- a processor/memory tile with network interfaces;
- a router with several buffers per input behind a demultiplexer (virtual channels);
- power and area estimates.

## Files

`rtl/`:

| file | contents |
|------|----------|
| `noc_pkg.sv`     | flit, request and mode types, sizes |
| `flit_fifo.sv`   | router input buffer |
| `noc_arbiter.sv` | XY/torus routing, wormhole reservation, grants |
| `noc_crossbar.sv`| 5×5 switch |
| `noc_router.sv`  | five buffers + arbiter + crossbar, flit counter |
| `noc_source.sv`  | traffic source |
| `noc_sink.sv`    | sink with counters, error checks, delay sum |
| `traffic_gen.sv` | destination patterns |
| `clk_tick.sv`    | source/sink clock enables |
| `noc_mesh.sv`    | top: mesh or torus of nodes |

Top-level parameters of `noc_mesh`:

| parameter    | default | meaning |
|--------------|---------|---------|
| `ROWS`, `COLS` | 4, 4  | size; `XW + YW` must fit the 4 address bits, so at most 16 nodes |
| `TORUS`      | 0       | 1 adds wrap-around links |
| `SRC_DIV`    | 1       | source clock divider |
| `SNK_DIV`    | 1       | sink clock divider |
| `FIXED_DEST` | 1       | destination of the fixed pattern |
| `CNT_W`      | 32      | counter width |
| `TIME_W`     | 32      | cycle-count width |
| `SUM_W`      | 64      | time-sum width |

Buffer depth and packet length come from `noc_pkg`. They can also be set per instance
(`DEPTH` on `flit_fifo`/`noc_router`, `LEN` on `noc_source`).

## Testbenches and simulation

Every testbench in `tb/` checks itself. It ends by printing
`TB_RESULT checks=<n> failures=<m>`, and it has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_flit_fifo`    | random traffic against a queue model; full at 4; head one cycle after a write |
| `tb_noc_arbiter`  | XY route to all 16 destinations; busy output; priority; reservation from header to tail; random test against a reference model |
| `tb_noc_crossbar` | random legal connections, all 20 paths |
| `tb_noc_router`   | 5 random senders and busy receivers; XY output, order per input, no interleaving of packets, one-cycle hop, flit count, buffers filling and requests waiting |
| `tb_noc_source`   | data sequence, imaginary clock, tail every fifth flit, held flit unchanged, one destination per packet, rate at full and 1/3 clock, stop at packet end, header time sum |
| `tb_noc_sink`     | counts, error detection, busy timing, rate at full and 1/4 clock, tail time sum |
| `tb_traffic_gen`  | the three patterns on 4×4 and 1×2 |
| `tb_clk_tick`     | tick spacing for dividers 1, 3, 4 |
| `tb_noc_mesh`     | whole 4×4 mesh at default parameters |
| `tb_noc_torus`    | 4×4 torus |
| `tb_noc_mesh_1x2` | the two-node network: data sequence at the sink, sink-limited rate, exchange both ways; a copy with the source clock at 1/4 |

The two 4×4 tests (`tb_noc_mesh`, `tb_noc_torus`) run all three patterns. They check
every flit end to end, check the latency bound and the delay sums, and confirm that each
mechanism occurred: full buffers, blocking on a reserved
output, sink throttling, every router port used, and (in the torus) the wrap-around
links.

To run one test with Verilator 5:

    verilator --binary --timing --assert --top-module tb_noc_mesh \
        -y rtl -y tb +libext+.sv -Irtl rtl/noc_pkg.sv tb/tb_noc_mesh.sv
    ./obj_dir/Vtb_noc_mesh

Each test runs in a few seconds or less. The RTL lints clean with
`verilator --lint-only -Wall`, except for unused-package-constant notes and a note that
`rst_n` is used both as an asynchronous reset and in the `disable iff` of the
assertions.

The RTL has assertions for the handshake rules:

- a grant only for a non-empty buffer;
- a grant only to a free output;
- no U-turn;
- no flit shown to a busy sink.

`--assert` turns them on.
