# Mesh network-on-chip with multi-local-port routers

On an FPGA the routers of a network-on-chip cost a large share of the logic.
This design saves routers by giving each router several **local ports**: one
router serves several logic cores at once. It keeps a normal 2-D mesh with XY
routing around those routers. A nine-core system can then be a 3x3 mesh of
single-port routers, a single nine-port router, or any mix in between, such
as the default here: a row of three routers carrying 4, 4 and 1 cores.

Two effects follow. A transfer between two cores on the same router crosses
no router-to-router channel at all. Fewer routers also means fewer hops
across the mesh. Under store-and-forward flow control each avoided channel
saves a whole packet time.

The RTL is SystemVerilog (IEEE 1800-2017). It is written to be synthesizable,
and it is lint-clean in Verilator 5 apart from the warnings noted below.

## Packet and header format

A flit is one byte. A packet is `PKT_LEN` flits (default 8): a header flit,
then `PKT_LEN-1` payload flits. The header names the destination:

| bits | field | meaning |
|------|-------|---------|
| 7:4  | LID   | local port at the destination router |
| 3:2  | X     | destination router column |
| 1:0  | Y     | destination router row |

The split leaves room for 16 local ports per router and a 4x4 mesh. Every
configuration of a nine-core system fits in that. Routers ignore the payload.
The fixed packet length and the 4/2/2 split are choices made for this
implementation. The order of the fields and the 8-bit header are those of
the architecture.

## Router (`mlp_router`)

A router with `NLP` local ports has `NLP+4` ports. They are numbered 0 North,
1 East, 2 South, 3 West, then `4+k` for local port k. North is row y-1 and
East is column x+1. Each port has one of each of these:

* **Input buffer** (`channel_buffer`). This is a FIFO of 16 flits of 8 bits.
  A packet competes for an output only once all its flits are stored
  (store-and-forward). The buffer's `in_ready` means "room for a whole
  packet". The upstream sender looks at it once, before the header, and then
  sends the packet in consecutive cycles. There is no flit-level
  backpressure.
* **Route decode** (`route_decode`). The column is corrected first (East or
  West), then the row (North or South). At the destination router the LID
  field selects the local port. That last step is the only decoding a
  multi-local-port router adds to a plain XY router. A LID the router does
  not have is sent to local port 0, and an assertion flags it.
* **Output arbiter** (`output_arbiter`). There is one arbiter per output and
  no central arbiter. Grants follow a fixed priority: the lowest port index
  wins. The grant is decided in the cycle the request appears, and the
  header crosses in that same cycle, so arbitration costs no cycle. The
  grant then stays locked for `PKT_LEN` cycles. Fixed priority can starve
  high-numbered inputs under sustained contention; that is the price of the
  zero-cycle grant.
* **Cross point matrix** (`crosspoint_matrix`). This is one multiplexer per
  output, driven by that output's grant. The input buffer that is popped is
  the OR of all grants.

All outputs can carry different inputs at the same time, so up to `NLP+4`
connections run in parallel: eight in a four-local-port router. The inner
workings here are a straightforward implementation of these named functions.
They are not a copy of any particular earlier router.

An input in the middle of a packet is masked from requesting again, because
its head flit is then payload and not a header.

### Timing

* A packet whose last flit is written into a buffer at clock edge t can
  leave in the cycle after t.
* Each channel crossing costs exactly `PKT_LEN` cycles when nothing is in
  the way. The channels from the interface into the router and from the
  router to the interface count too.
* A packet that crosses h router-to-router channels needs `PKT_LEN*(h+2)`
  cycles from its header leaving the source interface to `rx_valid` at the
  destination. A transfer between two cores of the same router has h = 0.
* The outgoing link is combinational from the input buffer through the
  crosspoint. The next buffer registers it.

## Network interface (`network_interface`)

Each core has one interface, which holds up to `QDEPTH` (4) send requests. A
request is a destination header plus payload.

When a core has several pending requests, the interface sends the one whose
destination is **farthest away** first. Distance counts XY router hops, and
a core on the same router is 0 hops away. Ordering by distance costs no
header bits. Sending the farthest first, rather than the nearest, is a
choice made here: the long store-and-forward journeys start early and
overlap with the short ones. Ties go to the lowest-numbered slot.

The receive side always accepts flits. It presents header and payload to
the core for one cycle (`rx_valid`), the cycle after the last flit arrives.

The output `sending_dist` gives the distance of a packet starting in that
cycle. It is there for monitoring only.

## Mesh (`noc_mesh`, the top)

| parameter | default | meaning |
|-----------|---------|---------|
| `COLS`, `ROWS` | 3, 1 | mesh size (at most 4x4) |
| `LP_CNT[16]` | 4, 4, 1, 0... | local ports of router r = y*COLS+x |
| `NCORES` | 9 | must equal the sum of `LP_CNT` (checked at elaboration) |
| `BUF_DEPTH` | 16 | input buffer depth in flits |
| `PKT_LEN` | 8 | flits per packet |
| `QDEPTH` | 4 | pending send requests per interface |

Cores are numbered router by router, local port 0 first. With the defaults,
cores 0–3 sit on router (0,0), cores 4–7 on (1,0) and core 8 on (2,0). This
is the best layout with at most four local ports for an LU-decomposition
task graph of nine tasks. Choosing `COLS`, `ROWS` and `LP_CNT` for an
application is a job for an offline mapping tool. That tool searches
partitions of the cores over routers, mesh shapes and core placements, and
it is not part of this RTL. The ports of the mesh edge are tied off.

The top's ports are arrays over cores:

* `tx_valid`, `tx_ready`, `tx_hdr`, `tx_payload`: send requests.
* `rx_valid`, `rx_hdr`, `rx_payload`: delivered packets.
* `tx_dist`: distance of a packet starting this cycle.

Size after generic synthesis at the defaults: about 3.6k word-level cells,
1.3k flip-flops and 4k bits of buffer memory.

## Where the area goes

One router with n local ports replaces n single-port routers. It saves their
directional input buffers (four buffers of 16x8 bits per router removed),
their arbiters and decoders, and the wiring between them. Generic Yosys
synthesis of `mlp_router` gives the following word-level cell counts. These
are not FPGA slices, so only the trend means anything.

| local ports n | one n-port router | n one-port routers | saving |
|---------------|-------------------|--------------------|--------|
| 1 | 518  | 518  | –   |
| 2 | 664  | 1036 | 36% |
| 3 | 817  | 1554 | 47% |
| 4 | 982  | 2072 | 53% |
| 8 | 1762 | 4144 | 57% |

Larger routers have costs this table does not show: a longer critical path,
more wiring congestion and a pin-constrained placement. Those limits set how
many local ports make sense.

## Testbenches

Each testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_channel_buffer` | a packet is offered only once complete, one cycle after its last flit; room reported per packet; order |
| `tb_route_decode` | all 256 headers against a separate XY model |
| `tb_output_arbiter` | same-cycle grant, fixed priority, `PKT_LEN`-cycle lock, no grant without downstream room |
| `tb_crosspoint_matrix` | random and permutation selects |
| `tb_mlp_router` | `PKT_LEN` latency, 8 parallel connections, priority under contention, back pressure, 300 random packets |
| `tb_network_interface` | farthest-first order, slot exhaustion, start latency, receive strobe |
| `tb_noc_mesh` | default top end to end: latencies for 0 and 2 hops, farthest-first order, hot spot, 400 random packets |
| `tb_fig2_outtree` | one core sending to four cores on a 2x2 mesh with one 2-port router: exact arrival cycles, at most 2 router hops |
| `tb_fig3_mapping` | a four-task diamond graph under three placements on a 1x2 mesh of 2-port routers: exact end times, the placement that keeps no message local is one packet time slower |

`tb_noc_mesh` also counts each mechanism of the design and fails if any count
stays zero. The mechanisms are:

* transfers inside one router
* transfers over one and over two router-to-router channels
* parallel connections in one router
* two inputs competing for one output
* an interface picking a farther destination first
* an interface stalled by a full router buffer

To simulate one of them with Verilator (run from the directory that holds
`rtl/` and `tb/`):

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
        rtl/noc_pkg.sv tb/tb_noc_mesh.sv --top-module tb_noc_mesh -o sim
    ./obj_dir/sim

## Departures and limits

* The packet length, the header field widths, the link handshake, the
  priority order and the tie-breaks were not fixed by the architecture
  description; all are the choices documented above.
* In `tb_fig3_mapping` the two placements that each keep two messages local
  finish in the same cycle. A cost that simply counts channel accesses can
  rank them apart; cycle timing here does not.
* A 5x1 mesh (five single-port routers in a row) does not fit the 2-bit X
  field. Such a mesh is only a baseline that multi-port layouts replace.
* Verilator reports `rst_n` as used both synchronously and asynchronously.
  This comes from the `disable iff` of the assertions and does not affect
  the circuit. It also warns about constant comparisons in `route_decode`
  for a router in row or column 0; these are expected.
