# Congestion-aware routing with congestion data carried in the flits

A 4 x 4 mesh network-on-chip whose routers choose, at every hop, between
the two shortest directions towards a flit's destination, based on how
congested the neighbouring routers are. Many adaptive routers send that
information over extra side-band wires. Here every flit carries it instead.
Each flit has one byte that the sending router fills in with its own
congestion state, so every flit arriving on a link refreshes the receiver's
view of the router that sent it. The routers need no extra wiring and the
information costs no extra cycles, but it is only as fresh as the last flit
that crossed the link.

The design has three layers:

* **routers** (`router`, built from `input_port`, `rc_unit`, `citb`,
  `output_port` and `congestion_calc`);
* **the mesh** (`noc_mesh`), 16 routers wired by 8-bit channels;
* **network interfaces** at every node (`ni_tx` cuts a packet into flits,
  `ni_rx` puts the flits back together). `noc_system` is the top level: the
  mesh plus the interfaces.

All types and constants are in `rtl/noc_pkg.sv`.

## The flit

A flit is 64 bits and is sent over an 8-bit channel as eight bytes, lowest
byte first. Every flit is routed on its own: a packet is only a run of flits
with consecutive sequence numbers.

| bits  | field                 | meaning |
|-------|-----------------------|---------|
| 3:0   | source x              | |
| 7:4   | source y              | |
| 11:8  | destination x         | |
| 15:12 | destination y         | |
| 19:16 | delay information     | the sender's average delay, 0..15 |
| 23:20 | neighbour status      | congested flag of each of the sender's neighbours: bit 20 north, 21 east, 22 west, 23 south |
| 55:24 | payload               | 32-bit data word |
| 62:56 | sequence number       | position of the flit in its packet, 0..127 |
| 63    | last                  | set on the final flit of a packet |

Bits 23:16 (the third byte) are the *congestion byte*. A router overwrites
it on every flit it sends, whatever the flit's destination. Sources send it
as zero.

Coordinates: x grows to the east, y grows to the north, and node
`n = y*4 + x`. Node (0,0) is the south-west corner.

## Router pipeline and timing

Each router has five ports: north, east, west and south (index 0..3 in
`noc_pkg::dir_e`) and local (4). Every port has one 8-bit channel in and one
out, with `valid`/`ready`. A byte moves when both are high. Each input port
and each output port buffers exactly one flit.

A flit goes through a router like this:

1. **Receive** (8 cycles). The input port shifts in the bytes. When the
   congestion byte (byte 3) arrives, it is written into the row of the
   congestion table that belongs to the neighbour on that port.
2. **Route computation** (1 cycle). The RC unit picks the output port (next
   section).
3. **Switch request.** The input port requests that output port and keeps
   recomputing the route while it waits. A flit held up by a busy output can
   therefore change its mind when newer congestion data arrives.
4. **Switch** (1 cycle). Each output port has a round-robin arbiter over the
   five inputs. It grants when its buffer is empty, or in the cycle the
   buffer's last byte leaves. The flit is copied into the output buffer and
   its congestion byte is replaced by this router's own.
5. **Send** (8 cycles).

Without contention the first byte of a flit leaves a router 10 cycles after
its first byte arrived. Across a mesh, from the first byte into the source
router to the last byte out of the destination router:

    latency = 10 * hops + 17 + 10 * (flits - 1)    cycles

A source's local port takes one flit every 10 cycles, which gives the last
term. Through `noc_system`, from a packet header being accepted to the last
word leaving the receiving interface, the latency is `10*hops + 11*flits + 9`.
Both formulas are checked exactly by the testbenches.

## Measuring congestion

Each router measures how long flits stay inside it. An input port counts
the cycles in which its flit moves (bytes arriving, the RC stage) as
*propagation delay* `pd`. It counts the cycles in which the flit waits for
the switch as *queuing delay* `qd`. The output port goes on counting: the
switch cycle and every byte accepted downstream add to `pd`, and every cycle
the downstream port holds `ready` low adds to `qd`. When the last byte
leaves, `T_D = pd + qd` is reported to `congestion_calc`.

`congestion_calc` keeps an exponential moving average of `T_D` with
weight 1/8 and four fraction bits. Up to five flits can leave in one cycle,
and each contributes `(T_D - avg)/8`. The average is turned into the 4-bit
*delay information*:

    info      = min(15, avg_cycles >> 3)        full scale = 120 cycles
    congested = info > 70 % of 15, i.e. info >= 11 (average >= 88 cycles)

An unloaded router sees `T_D` = 18 cycles, so `info` = 2. A router becomes
congested only when flits really pile up behind it, typically when a
destination stops taking data or an output is fought over for a long time.

The 70 % threshold is the only number the algorithm fixes. The kind of
average, its weight and the 3-bit scaling are this implementation's choices.
They are parameters of `router`/`noc_mesh` (`AVG_SHIFT`, `DELAY_SHIFT`) and
the threshold is `CONG_PERCENT` in the package.

## The congestion table and the routing decision

This is the heart of the design.

**CITb** (`citb`, the congestion information table) has one row per
neighbour: `{neighbour status[3:0], delay information[3:0]}`, exactly the
congestion byte last received from that neighbour. A row is written in the
cycle that byte arrives. At reset all rows are zero, meaning "uncongested,
no delay". The router's own neighbour-status nibble, which it sends in its
flits, is the congested flag of each row. So a router tells its neighbours
about their neighbours. This gives every router a two-hop view, and that
view is what the last routing rule uses.

**RC unit** (`rc_unit`, combinational). Level one compares the destination
with the router's address and finds the productive directions: east or
west if x differs, north or south if y differs. Level two picks one. Each
decision is reported on the `dec_case` outputs under one of these names
(`noc_pkg::rc_case_e`):

| case            | condition                                       | choice |
|-----------------|-------------------------------------------------|--------|
| `RC_LOCAL`      | destination is this router                      | local port |
| `RC_SINGLE`     | only one productive direction                   | that direction |
| `RC_FREE_DELAY` | both neighbours uncongested                     | the lower delay information; a tie goes to x |
| `RC_ONE_CONG`   | exactly one neighbour congested                 | the other one |
| `RC_ND_FREE`    | both congested, exactly one *next-door* router uncongested | the route towards it |
| `RC_ND_DELAY`   | both congested, next-door routers alike         | the route whose neighbour has the lower delay information |

The *next-door* router of a route is the one a flit would reach one hop
beyond the neighbour. Its congestion flag is read from the neighbour's
status nibble in the table. If more than one hop remains along that axis,
the next-door router lies further along the same axis. Otherwise it lies
along the other axis, because that is where a minimal path has to turn.

Because the choice is always among shortest-path directions, a flit never
takes a longer path. The detour around a congested router costs nothing in
hops, so in an otherwise idle network a congested route has the same latency
as an uncongested one. The benefit shows up as less waiting.

## Network interfaces and reassembly

`ni_tx` takes a header (`pkt_dst_i`, `pkt_len_i` = 1..128 flits) and then
one 32-bit word per flit. It builds each flit with sequence numbers 0..n-1
and the last bit on the final one, and sends it to the router's local port.
A flit takes 9 cycles (load plus 8 bytes). A zero-length header is ignored.

Flits of one packet can take different paths and arrive out of order, and
flits from different sources interleave. `ni_rx` therefore keeps one
context per source node: a 128-word memory indexed by sequence number, a
bitmap of the numbers received, a count, and the length (known once the
flit with the last bit has arrived: its sequence number + 1). When the count
reaches the length, the packet is streamed out in order, one word per cycle,
with its source, word index and a last flag. The first word appears 1 cycle
after the final byte. While a packet is streaming out the interface accepts
no bytes, which backs traffic up into the network.

**Restriction.** The flit has no packet identifier. A source must
therefore not have two packets to the same destination in flight at once:
their flits could overtake each other and be mixed. Packets to different
destinations, or from different sources, are fine.

## Parameters

| parameter      | default | where | meaning |
|----------------|---------|-------|---------|
| `MESH_X`, `MESH_Y` | 4, 4 | `noc_system`, `noc_mesh`, `router`, `ni_rx` | mesh size (coordinates are 4 bits, so up to 16 x 16) |
| `MAX_FLITS`    | 128     | `noc_system`, `ni_tx`, `ni_rx` | longest packet (7-bit sequence number) |
| `DELAY_SHIFT`  | 3       | `noc_mesh`, `router`, `congestion_calc` | cycles per step of delay information |
| `AVG_SHIFT`    | 3       | same | moving-average weight 2^-AVG_SHIFT |
| `CONG_PERCENT` | 70      | `noc_pkg` | congestion threshold, percent of full scale |
| `FLIT_W`, `CH_W` | 64, 8 | `noc_pkg` | flit and channel width; the flit layout is fixed |
| `X`, `Y`       | -       | `router`, `ni_tx` | node address, set by the generate loops |

Size of `noc_mesh` at the defaults: about 19,700 cells, 11,900 of them
flip-flops. The `ni_rx` word memories (16 x 128 x 32 bits per node) dominate
`noc_system` and are meant to become RAMs.

## What is not here, and how far to trust it

* **Deadlock.** Routing is minimal and fully adaptive. Buffers hold one flit
  and there are no virtual channels or escape paths, so a cyclic wait is
  possible in principle. Heavy random all-to-all traffic in the testbenches
  has never deadlocked, but nothing rules it out.
* **Stale information.** A table row is refreshed only when a flit crosses
  that link. A neighbour that has stopped sending keeps its last reported
  state.
* **Outside the network.** The processing elements, the serial link to a
  host computer and the host software that generate and collect traffic in
  an FPGA test set-up are not included. `noc_system` exposes the
  packet/word interfaces they would use.
* **Choices of this implementation** (not fixed by the algorithm): the
  8-bit valid/ready channels, one-flit buffers at both ends of the switch,
  one RC cycle, round-robin arbitration, the moving average and its scaling,
  the x-first tie-break, the next-door rule near the destination, and the
  reassembly scheme. Each file's header comment says which parts are
  which.
* **Absolute numbers.** Latencies measured on an FPGA prototype including
  serial I/O are much larger than the cycle counts above, which cover only
  the network. Throughput figures for the whole system are not modelled.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`) that
prints `TB_RESULT checks=N failures=M`:

* `tb_rc_unit`: every decision rule, against a reference model over random
  tables.
* `tb_congestion_calc`: the average, the info value and the threshold.
* `tb_citb`, `tb_input_port`, `tb_output_port`: table writes, byte timing,
  delay counters, arbitration fairness, congestion-byte rewriting.
* `tb_router`: a single router with random traffic.
* `tb_noc_mesh`, full size: exact latency of 1-4 flit packets from (0,0) to
  all nodes, 400 flits of cross traffic, and forced congestion at chosen
  routers until every routing rule has fired.
* `tb_ni_tx`, `tb_ni_rx`: flit building and 9-cycle spacing; reassembly of
  shuffled, interleaved flits.
* `tb_noc_system`, full size:
  * exact packet latencies;
  * a congested router being avoided, for packets to every node that has
    a way around it;
  * random all-to-all traffic, every word checked.

Simulate with Verilator 5, for example:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        rtl/noc_pkg.sv tb/tb_noc_system.sv --top-module tb_noc_system
    ./obj_dir/Vtb_noc_system

Any other testbench runs the same way with its name substituted. The
testbenches use only `$urandom`, and the modules carry assertions on the
switch handshake (`--assert` enables them).
