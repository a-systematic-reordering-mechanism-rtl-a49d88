# GLB network-on-chip: congestion-aware mesh with in-order AXI-style memory access

Processors that spread their memory requests over many memories through a mesh
network get their answers back in arbitrary order, and the traffic piles up in
some regions of the mesh while others sit idle. This design tackles both
problems:

* **Reordering.** The network interface of each processor numbers every
  transaction per transaction ID. It hands the responses of one ID back in issue
  order, whatever order the network delivered them in. A 48-word reorder buffer
  holds the responses that arrive early. A transaction is admitted only when the
  buffer can take its whole response.
* **Global Load Balancing (GLB).** Every packet header carries a 4-bit
  *Congestion Status* (CS). Each router on the path averages its own congestion
  value into it, so the CS summarises how congested the packet's route was. Two
  mechanisms use it:
  1. **Router arbitration.** When several inputs compete for one output, the
     packet with the highest CS (plus the time it has waited) wins. Packets from
     congested areas are thus drained first.
  2. **Memory-side scheduling.** Each memory interface keeps a *Quadrants
     Information Table* (QIT): one congestion value for each of its four
     quadrants, built from the CS of arriving requests. Among waiting requests
     it serves first the one whose requester sits in the least congested
     quadrant. This delays new traffic into congested regions.
* The routers themselves route adaptively with the odd-even turn model. Between
  the admissible directions they pick one whose next input buffer is not
  congested.

The default configuration is a 6 x 5 mesh with 12 processors and 18 memories.
It uses 32-bit flits, 5 ports per router, 2 virtual channels per port and
5-flit VC buffers.

## Files

| file | what it is |
|---|---|
| `rtl/glb_pkg.sv` | flit and header types, constants, node placement functions |
| `rtl/glb_fifo.sv` | FIFO: router VC buffer and interface queues |
| `rtl/glb_cc.sv` | congestion condition: router congestion value and CS update |
| `rtl/glb_arbiter.sv` | GLB input-selection arbiter (largest CS + waiting time) |
| `rtl/glb_route.sv` | odd-even routing function with congestion-flag output selection |
| `rtl/glb_router.sv` | 5-port, 2-VC wormhole router |
| `rtl/glb_sched.sv` | QIT and memory-side request scheduler |
| `rtl/glb_slave_ni.sv` | memory-side network interface |
| `rtl/glb_reorder.sv` | reorder unit: sequence numbers, admittance, reorder buffer |
| `rtl/glb_master_ni.sv` | processor-side network interface |
| `rtl/glb_noc.sv` | top level: the mesh with all interfaces |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/glb_mem_model.sv` | behavioural memory controller plus DRAM (simulation only) |

## How the congestion status is formed (glb_cc, glb_router)

An input port is *congested* when its two VC buffers together hold more than
`CONG_THRESH` = 5 flits. Each router sends that flag for each input port to the
neighbour that feeds it.

For every router, two fractions are computed:

* x: congested own input ports / existing input ports.
* y: congested neighbour input ports facing this router / existing neighbours.

Each fraction becomes a 2-bit *congestion condition* (CC):

| fraction | CC |
|---|---|
| 0 .. 1/4 | 00 |
| (1/4, 1/2] | 01 |
| (1/2, 3/4] | 10 |
| (3/4, 1] | 11 |

The hardware compares integers (`4k <= n`, `2k <= n`, `4k <= 3n`) and needs no
divider. The router's congestion value is `{CC_x, CC_y}`. As a head flit leaves
the router, its CS becomes `(CS + value) / 2`, rounded down. The CS is
rewritten at every output, including the local one, so a memory sees the value
after the last router. Requests and responses start with CS = 0.

## Router (glb_router)

Ports are Local, East, West, North and South. Each input port has two VCs, each
with a 5-flit FIFO. VC 0 carries requests and VC 1 carries responses. Keeping
the two classes apart prevents request/response deadlock. Odd-even routing
needs no extra VCs.

Every cycle the router does the following:

1. **Routing.** `glb_route` evaluates the header flit at the front of each VC.
   It returns the minimal odd-even admissible ports. The choice is:
   * the X direction if its downstream flag is clear;
   * otherwise the Y direction if that flag is clear;
   * otherwise X.

   Body flits follow the port their head took.
2. **VC allocation.** A packet keeps its VC number (its message class). A head
   may bid only for an output VC no other packet holds. The output VC stays
   held until the tail passes (wormhole switching).
3. **Credits.** Every flit needs a credit for its output VC. Credits start at
   the buffer depth and return one cycle after the downstream buffer frees a
   cell.
4. **Switch allocation** has two stages. The first picks one VC per input port,
   round-robin. The second runs one `glb_arbiter` per output port: it grants
   the input with the largest `C + W`, the lowest index winning a tie.
   * C is the CS the packet brought into this router.
   * W counts how many times that input has lost for this output since it last
     won.

   W is one bit wider than C and saturates at 31. A waiting input therefore
   always overtakes in the end: with equal widths, a C = 0 input could lose
   forever to a C = 15 one.
5. **Crossbar and output registers.** Winners move into the output registers.
   A flit written into an input buffer in one cycle appears on the output link
   two cycles later. This is the zero-load per-hop latency.

## Memory-side interface and scheduler (glb_slave_ni, glb_sched)

Request flits enter a receive queue, whose pops return credits. An assembler
then copies each whole request into a free slot of the *packet queue*: the
header, the address and up to 8 write words. The default is 4 slots. As the
header arrives, its CS updates the QIT.

QIT update: `QIT[q] <- (QIT[q] + CS) / 2` for the quadrant of the requester,
relative to this node. A requester in the same row or column updates both
quadrants on its side. For example, a requester due east updates SE and NE.

Scheduling: each waiting request gets a quadrant congestion value, QuadCon.
This is the QIT entry of its quadrant, or the average of two entries for a
requester in the same row or column. Whenever the memory can take a request,
the scheduler picks the one with the smallest `QuadCon - W`. W counts how many
scheduling decisions the request has waited through. It is 5 bits and
saturating, so old requests cannot starve.

Example: requests arrive from the SW, SE, NW and NE quadrants, with quadrant
congestion 4, 2, 3 and 1. They are served NE, SE, NW, SW.

The memory receives the chosen request as one transfer: address, write flag,
length and the full write burst. Its header goes into an 8-entry header FIFO.
Responses are built in that FIFO's order:

* destination = the requester, source = this node, type changed to read or
  write response;
* ID, sequence number and length kept; CS = 0.

A read response is the header followed by one flit per data beat. The header
leaves only once the first beat is available, so the memory's latency never
holds a wormhole path open. A write response is the header alone, sent when
the memory acknowledges the write.

## Processor-side interface and reorder unit (glb_master_ni, glb_reorder)

The processor port is a reduced AXI. All three channels are valid/ready.

| channel | carries |
|---|---|
| `cmd_*` | read or write, 4-bit ID, 32-bit address, length − 1 (1 to 8 beats) |
| `wdata_*` | the write beats, `wlast` on the final one |
| `rsp_*` | read beats, or a single beat with `rsp_write = 1` for a write |

Commands wait in an 8-entry AXI queue. The packetizer sends the oldest one once
the reorder unit admits it:

* Memory `k = (addr >> MEM_SHIFT) mod 18` is the k-th non-processor node.
* The admittance rule: reserved words + need ≤ 48. A read needs len + 1 words;
  a write needs 1.
* On sending, the command takes its ID's next sequence number and reserves its
  words.

Response flits pass through an 8-entry packet queue into the reorder unit:

* **Bypass.** A response whose sequence number is the one its ID expects next
  streams straight to the processor.
* **Store.** Any other response goes word by word into free buffer entries.
  Each entry is tagged with ID, sequence number and beat. The 48 entries are
  searched associatively. The reservation guarantees a free entry.
* **Release.** Before taking a new packet, the unit checks whether a stored
  response has become due. If so, it releases that response beat by beat.

Each word handed to the processor frees one reserved word. Responses of one ID
come out in issue order; different IDs may overtake each other. Reads and
writes of an ID share one sequence, which orders more strictly than AXI
requires.

## Packet formats (glb_pkg)

A link carries `{valid, vc, head, tail, data[31:0]}`. The header flit is laid
out as follows:

| bits | 31:29 | 28:26 | 25:23 | 22:20 | 19:16 | 15:14 | 13:10 | 9:4 | 3:1 | 0 |
|---|---|---|---|---|---|---|---|---|---|---|
| field | dst_x | dst_y | src_x | src_y | CS | type | ID | seq | len−1 | 0 |

| packet | flits |
|---|---|
| read request | header, address |
| write request | header, address, 1–8 data |
| read response | header, 1–8 data |
| write response | header only |

## Top level (glb_noc)

Node `n = 6y + x`; y grows northwards. A node holds a processor when `n mod 5`
is 0 or 2, which gives 12 processors and 18 memories. This placement is this
design's choice. It spreads the two kinds evenly, and every processor has a
memory one hop away.

Edge ports of the mesh are tied off. Master m (the m-th processor node in node
order) has its ports on the `m_*` arrays. Memory k has its request and response
ports on the `s_*` arrays, and its QIT is visible on `s_qit`. The memory
controllers and the processors are not part of the RTL.

## Where this RTL makes its own choices

These points are not fixed by the method and were chosen here. Each is a
parameter or a small local change.

* **Congestion threshold.** More than 5 of a port's 10 cells (`CONG_THRESH`).
* **Rounding and resets.** The fraction 0 maps to CC 00. Averages round down.
  CS starts at 0. The QIT resets to 0.
* **Tie rules.** Lowest index wins. Routing prefers X.
* **Arbiter internals.**
  * A round-robin first stage picks the VC within each input port.
  * W resets when the input wins.
  * W is one bit wider than CS.
* **Packet queue.** 4 whole-request slots (40 words) per memory interface.
  `SLOTS` sets the size.
* **Reorder buffer.**
  * Associative, tagged entries.
  * A write response reserves one word.
* **Interface signalling.** The reduced AXI signalling and the memory port are
  simplified.
* **Address map and placement.** Both are as described above.
* **Pipelining.** Registered router outputs and credits give two cycles per
  hop.

The 48-word reorder buffer and the 8-entry queues are the design's nominal
sizes. The packet buffer of a memory interface is 40 words. The same
architecture was also evaluated with 32 to 80 words: set `SLOTS` to 8 for 80.

## Simulating

Each testbench is self-checking. It ends with a line
`TB_RESULT checks=N failures=M` and contains a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/glb_pkg.sv tb/tb_glb_noc.sv \
          --top-module tb_glb_noc -o sim
./obj_dir/sim
```

For another module, replace `tb_glb_noc`: `tb_glb_fifo`, `tb_glb_cc`,
`tb_glb_arbiter`, `tb_glb_route`, `tb_glb_router`, `tb_glb_sched`,
`tb_glb_slave_ni`, `tb_glb_reorder` or `tb_glb_master_ni`. The memory model
`tb/glb_mem_model.sv` is found through `-Itb`.

What the testbenches establish:

* **tb_glb_noc** runs the full-size mesh at its default parameters. It has
  two phases, and each of the twelve traffic generators issues 200 random
  reads and writes (bursts 1–8, four IDs) back to back in each:
  * *Uniform*: every memory is equally likely.
  * *Localized*: 70 % of commands go to a memory one hop away, the rest to the
    other memories.

  Each generator then reads back its last write. The test checks:
  * every response beat against the issue order of its ID;
  * every data word;
  * that each mechanism fired at least once: reorder-buffer store and release,
    admittance stalls, congested ports, arbitration decided by CS + W rather
    than port order, Y-first detours around a congested X neighbour, scheduler
    picks out of slot order, and non-zero QIT entries.

  The 4800 transactions take about 4700 clock cycles, well under a second of
  simulation time.
* **tb_glb_cc** is exhaustive against the interval table.
* **tb_glb_route** walks every source–destination pair with random congestion
  flags. It checks minimal paths and the odd-even turn rules.
* **tb_glb_sched** and **tb_glb_slave_ni** reproduce the four-quadrant example.
* **tb_glb_router** checks:
  * the two-cycle hop latency;
  * the CS update;
  * CS-based arbitration in both directions;
  * wormhole integrity under random traffic.

## Known limits

* **No latency or throughput measurement.** The testbenches check function,
  one latency and the firing of each mechanism. They do not reproduce the
  latency-versus-request-rate curves. The latency gains reported for GLB
  (about 20–30 % near saturation) are not measured here.
* **No real memory controller.** The memory controller and DRAM exist only as a
  behavioural model. It answers 6 cycles after a request, in order.
