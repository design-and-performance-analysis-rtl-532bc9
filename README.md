# Label-switched mesh network on chip for streaming data

This is a 2-D mesh network on chip (8 x 8 routers by default) meant for streams of
16-bit samples, such as ECG data, moving between cores. It combines three ideas:

* **Label switching with a central manager.** Routers make no routing decisions of their
  own. A source first asks the NoC manager for a *pipe*: a source, a destination and the
  share `c` of link capacity the stream needs. The manager keeps the capacity that is
  still free on every link (its *flow graph*). It finds a path with enough room and
  writes one routing-table entry into each router on the way. After that, every packet
  carries only a label (its destination id), and each router looks that label up in its
  table. When a link breaks, the manager re-routes all pipes around it.
* **Bit-transition coding of the payload (BTED).** Before a payload enters the network it
  is re-coded so that neighbouring bits toggle less. It is decoded when it leaves.
* **Asynchronous links.** Routers pass flits to each other over level-encoded dual-rail
  (LEDR) links with a two-phase handshake. Such a link needs no common clock edge
  between its two ends.

The model follows a published design for an FPGA label-switching NoC. The RTL is written
from that description. Where the description gives only the function of a part, the
structure here is the simplest one that does the job; the choices are listed in
[Departures and choices](#departures-and-choices).

## Packet and flit

A packet is a single flit:

```
 FLIT_W-1        DATA_W  DATA_W-1                 0
+-----------------------+---------------------------+
| label = destination id|  BTED-encoded payload     |
|  clog2(NODES) bits    |  DATA_W = 16 bits         |
+-----------------------+---------------------------+
```

With 64 nodes, a flit is 6 + 16 = 22 bits. A 3 x 3 mesh gives 4 + 16 = 20 bits. For
example, flit `0x611b4` carries payload `0x11b4` to node 6. Node ids are row-major:
`id = y*COLS + x`, with x growing to the East and y growing to the South. Labels are never
rewritten on the way, so the label a router sees is always the final destination.

## How a stream gets through

1. The core (or a host) sends a pipe request `(src, dst, c)` to the manager (`req_*`). The
   manager answers on `rsp_valid` / `rsp_ok`.
2. The core at `src` offers payloads on `src_valid/src_ready/src_dst/src_data`. Its network
   adapter encodes each payload, puts the label in front and hands the flit to the
   router's Local port.
3. Each router sends the flit to the port its table gives for that label. A router sends
   a flit to its own Local port when the label is its own id. A flit whose label has no
   entry is dropped and counted in `drop_cnt`.
4. The destination adapter strips the label, decodes the payload and presents it on
   `snk_valid/snk_ready/snk_data`. `tx_cnt` and `rx_cnt` count packets at each node, so
   the packet delivery ratio is the sum of `rx_cnt` over the sum of `tx_cnt`.

A packet sent before its pipe exists is dropped at the first router. That is the intended
behaviour: in a label-switched network, traffic flows only on pipes that have been set up.

## The NoC manager (`noc_manager`)

The manager holds:

* **Flow graph:** an `A` value (available capacity) for each directed link,
  `cap[node][N/E/S/W]`. It starts at `LINK_CAP` = 10. Links that would leave the mesh and
  broken links have capacity 0.
* **Pipe stack:** up to `PS_DEPTH` pipes `(src, dst, c)` that have been set up.

**Setting up a pipe.** The manager walks from `src` to `dst` one hop per clock cycle and
records the hops. At each node it takes the first usable link from this list:

1. the link towards the destination in the same dimension as the previous hop (X on the
   first hop, so a pipe on an idle network follows plain XY routing);
2. the link towards the destination in the other dimension (the *alternative link*);
3. if the destination lies in the same row or column and the straight link is blocked, a
   *detour* hop sideways. A pipe may take at most `MAX_DETOUR` (2) detours.

A link is usable if `A >= c`, if it is not the reverse of the previous hop, and if the walk
is still shorter than `COLS+ROWS-2+2*MAX_DETOUR` hops. If no link is usable, the pipe
fails: `rsp_ok` = 0 and `fail_cnt` goes up. Once the walk arrives, the recorded hops are
*committed*, one per cycle, starting at the destination end and working back to the
source, so a packet never meets a half-written route. `c` is subtracted from each link, and the entry
`label dst -> port` is written into that hop's router over the configuration bus
(`cfg_we/cfg_node/cfg_label/cfg_port`). A failed walk therefore leaves no table entries
and reserves no capacity. A pipe of `h` hops takes `2h + 2` cycles from request to
response. A pipe with `src == dst` succeeds at once and writes nothing.

**Why the tables cannot loop.** Tables are indexed by destination. A later pipe to the
same destination can therefore overwrite entries that an earlier pipe wrote. Every commit
writes a complete, simple path to the destination. After a commit, following the entries
from any node either stays on old entries, which were loop-free before, or joins the new
path and follows it to the destination. So packets of the earlier pipe still arrive; from
the shared node on, they follow the newer path. The capacity the earlier pipe reserved on
its abandoned tail stays reserved. That is conservative.

**Link faults.** `fault_valid` with `fault_node`/`fault_dir` reports a bad link. It is
taken when `fault_ready` is high, and it has priority over pipe requests. The manager then:

1. sets the capacity of that link to 0 for good;
2. clears every routing table (`cfg_clear`) and restores all other capacities;
3. walks every pipe in the stack again. Pipes that no longer fit are removed.

`busy` is high until the re-route is done, and `reroute_cnt` counts re-routes. Packets in
flight while the tables are being rebuilt may be dropped.

## Router (`ls_router`)

The router has five ports: Local, North, East, South, West (`noc_pkg::port_e`). The path
through it is:

```
in[i] -> input_fifo (fifo_ctrl) -> head label -> route_table lookup / own-id test
      -> per-output rr_arbiter -> crossbar -> output register -> out[o]
```

* Each input has a FIFO of `FIFO_DEPTH` (4) flits. The FIFO control block `fifo_ctrl`
  keeps the pointers and the count, and the head flit is visible at once
  (first-word fall-through).
* `route_table` has one entry per label, made of a valid bit and a port. It has five
  combinational read ports, one per input.
* Each output has a round-robin arbiter. An arbiter grants only when its output register
  is empty or is being emptied in the same cycle. The arbiter's priority moves past each
  winner.
* The winning flit passes the crossbar into the output register in the same cycle. That
  is single-cycle traversal: a flit written into an empty input FIFO is at the output two
  cycles later.
* All ports use valid/ready handshakes, and an output register holds its flit until the
  next stage takes it.

## Asynchronous LEDR links (`ledr_tx`, `ledr_rx`)

Each bit of a flit uses two wires. `rail_d` carries the bit value. `rail_p` carries the
value XOR the *phase* of the flit. The phase alternates from flit to flit, so exactly one
of the two wires of every bit changes for each new flit. A receiver knows that a flit has
fully arrived when `rail_d ^ rail_p` equals the expected phase on every bit.

* `ledr_tx` loads a flit onto the rails, flips its phase and waits. The receiver answers
  by toggling `ack` (two-phase signalling). The acknowledge passes a 2-flop synchronizer,
  after which the transmitter takes the next flit.
* `ledr_rx` passes both wires of every bit through 2-flop synchronizers and tests for
  completion. It then copies the flit into a holding register, flips the expected phase
  and toggles `ack`. Only one wire per bit changes, so a bit that already shows the new
  phase also shows its new value. This makes per-bit synchronizers safe: a flit can never
  be captured half old and half new.

A link moves one flit per handshake, about 6-7 cycles of either clock. The testbench runs
the two ends on unrelated clocks (10 ns and 7.3 ns). In `ls_noc_top`, every node (router
and adapter) runs on its own clock `node_clk[n]`, and the links are the only path between
nodes. The manager runs on `clk`. The routing tables are written on `clk` and read by the
routers as quasi-static configuration: they change only while a pipe is being set up or
re-routed, and a packet that meets a table during such a change may be dropped. Each
clock domain has its own reset synchronizer (`rst_sync`), so `rst_n` may be asynchronous.

## Bit-transition coding (`bted_encoder`, `bted_decoder`)

Number the payload bits from the LSB and set `d[-1] = 0`. The invert mask `m[i]` is FI on
odd bits and FI ^ HI on even bits.

```
encode:  e[i] = d[i] ^ d[i-1] ^ m[i]
decode:  d[i] = e[i] ^ m[i]  ^ d[i-1]      (d[i-1] = the bit just decoded)
```

An alternating word loses its toggles. For example, `0xAAAA`, which toggles 15 times from
bit to bit, encodes to `0xFFFE` with FI = HI = 0 (one toggle). The decoder is a prefix XOR,
the exact inverse of the encoder. FI and HI are inputs of the top that all adapters share.
They are not sent with the packet, so both ends must use the same values. Only the payload
is coded; the label is sent as it is.

## Top level (`ls_noc_top`)

| Parameter    | Default | Meaning |
|--------------|---------|---------|
| `COLS, ROWS` | 8, 8    | mesh size (from the published design) |
| `DATA_W`     | 16      | payload bits (from the published design) |
| `FIFO_DEPTH` | 4       | flits per router input FIFO (chosen) |
| `LINK_CAP`   | 10      | capacity units per link (from the published design's flow-graph example) |
| `CAP_W`      | 8       | width of capacity values (chosen) |
| `PS_DEPTH`   | 16      | pipes the manager can hold (chosen) |

Ports:

* Clocks and reset: `clk` (manager and table writes), `node_clk[NODES]` (one per node;
  they may all be the same clock) and the active-low `rst_n`.
* Per node: `src_*` and `snk_*` (`[NODES]` arrays), plus the statistics `tx_cnt`,
  `rx_cnt` and `drop_cnt`.
* Manager: `req_*`, `rsp_*`, `fault_*`, `mgr_busy`, `alt_cnt` (hops that took the
  alternative or a detour link), `reroute_cnt` and `fail_cnt`.

At the mesh edges, the router ports without a neighbour are tied off: they have no input
and their output is always accepted. The manager never routes to them.

Measured on an idle network with every node on the same clock: a packet needs 4 + 6h cycles from the clock edge that
accepts it at `src_valid` to the edge that shows it at `snk_valid` over h hops. That is
10 cycles for one hop, 16 for two, 22 for three, and 46 for node 1 to node 15 of the 8 x 8
mesh (7 hops). Each hop is one router (2 cycles) plus one LEDR link (about 4 cycles).
Throughput per link is one flit per handshake, about 6-7 cycles.

## Departures and choices

These follow the published design:

* the 8 x 8 mesh and the five-port router with input FIFOs, FIFO control block, arbiter
  and crossbar;
* label-based routing tables written by a NoC manager that keeps link capacities (flow
  graph) and a pipe stack;
* the capacity test `A >= c` and the search for an alternative link;
* the three-step fault handling;
* BTED encoding before the source router and decoding after the destination router;
* LEDR links with synchronizers;
* 16-bit payloads and the label in the top bits of the flit.

These are this design's own choices:

* **Width of a flit.** The flit is the label plus the payload, 22 bits at 8 x 8. One
  summary in the source quotes 21 bits "including IDs of source and destination"; the
  waveforms given show 20-bit flits at 3 x 3 that hold only the destination label. The
  waveforms were followed, so no source id is carried.
* **BTED decoder.** The published decode equation uses the previous *received* bit, which
  does not invert the encode equation. The decoder here uses the previous *decoded* bit,
  which restores the payload exactly. The published encoder example (`1010...10` becoming
  all ones with FI = HI = 1) does not follow from its own equation with those flags. The
  equations were implemented as written.
* **The manager.** It is one central block driving a shared configuration bus. It is not a
  copy inside every router.
* **Labels and pipe lists.** Labels are destination ids and are never swapped. The
  used/unused label lists of each flow-graph edge are not stored.
* **Walk rules.** The walk order, the detour rule, the commit-on-arrival rule and the
  removal of pipes that no longer fit after a fault.
* **Missing routes.** A flit with no table entry is dropped and counted.
* **Link details.** The handshakes, the depths, round-robin arbitration, the two-phase
  acknowledge, the 2-flop synchronizers, the reset synchronizers and the quasi-static
  routing tables written from the manager's clock.
* **Not modelled.** The UART, the traffic generator, the ECG source, the host processors
  and the board's analog rails of the FPGA prototype.

## Simulating

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. To run one with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_ls_noc_top \
    rtl/noc_pkg.sv rtl/*.sv tb/tb_ls_noc_top.sv
./obj_dir/Vtb_ls_noc_top
```

(`noc_pkg.sv` must come first; listing it twice is harmless. You may need `-Wno-fatal`
for the style warnings.)

| Testbench | What it covers |
|-----------|----------------|
| `tb_bted_encoder`, `tb_bted_decoder` | the coding equations against an independent formula, including the `0xAAAA` example |
| `tb_fifo_ctrl`, `tb_input_fifo` | pointers, flags, data order, full/empty, fall-through latency |
| `tb_rr_arbiter`, `tb_crossbar`, `tb_route_table` | grant order and fairness, switching, table writes, reads and clear |
| `tb_ledr_link` | `ledr_tx` and `ledr_rx` on unrelated clocks: order, integrity, the one-wire-per-bit rule, throughput |
| `tb_ls_router` | a 3 x 3 centre router: routing by label, own-id delivery, drops, contention, back-pressure, 2-cycle latency |
| `tb_network_adapter` | label insertion, encoding, decoding, counters |
| `tb_noc_manager` | a 4 x 4 mesh: XY paths, alternative link, refused pipe, full pipe stack, fault re-route, set-up time |
| `tb_ls_noc_top` | the full 8 x 8 network at default parameters: pipes, streams from five sources with contention and back-pressure, local delivery, a dropped packet, a link fault with a detour, 100 % delivery afterwards |
| `tb_noc_gals` | a 4 x 4 mesh in which every node and the manager have different clock periods: eight pipes, 320 packets, all delivered in order and intact |
| `tb_paper_latency` | a 3 x 3 mesh: latency from R00 to R03, R04, R05 and R06, and 8 x 8 from node 1 to node 15 |

`tb_ls_noc_top` runs in well under a minute.
