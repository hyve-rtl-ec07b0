# HyVE — a hybrid vertex-edge memory hierarchy for graph accelerators

Graph accelerators spend most of their energy in memory. Their traffic has two
very different parts: the edge list, which is large and is only ever *read in
order*, and the vertex properties, which are much smaller but are *read and
written at random*. HyVE gives each part the memory that suits it:

* **Edges** live in a ReRAM (resistive RAM) edge memory. ReRAM reads about as fast
  as DRAM, needs no refresh and keeps its data without power. Its writes are slow,
  but edges are written only once, before processing starts.
* **Vertices** live in DRAM off chip. The interval of vertices currently in use is
  copied into an on-chip SRAM, which handles the random accesses. DRAM sees only
  sequential interval loads and write-backs.
* A **controller** between the accelerator and the three memories streams the
  edges. It swaps vertex intervals in and out as the stream moves through the
  graph.
* **Bank-level power gating** switches off every ReRAM bank that the edge stream
  is not using. This costs nothing in data, because the ReRAM cells are
  non-volatile.

This repository is synthesizable SystemVerilog for that hierarchy. It follows the
architecture of the paper *"HyVE: Hybrid Vertex-Edge Memory Hierarchy for
Energy-Efficient Graph Processing"* (Huang, Dai, Wang, Yang). The paper describes
the organisation and the policies but gives few sizes, widths or protocols. Every
number and protocol detail that is not the paper's is marked as this design's own
choice below and in the header comment of each file.

The graph accelerator and the DRAM are not part of the design. They connect
through ports. The testbenches supply behavioural models of both.

## How a run works: intervals, blocks and scheduling

The vertices are split into **intervals** of `2^INT_BITS` consecutive indices
(2^20 by default). Interval `I_k` holds vertices `k·2^20 … (k+1)·2^20−1`. The
edges are grouped into **blocks**: block `B_ij` holds the edges whose source is
in `I_i` and whose destination is in `I_j`. The edge list is stored in the edge
memory block after block, with the source interval as the outer loop:
`B_00, B_01, …, B_10, B_11, …`. Edges inside a block may be in any order.

While block `B_ij` streams, the SRAM holds `I_i` in its **source section** and
`I_j` in its **destination section**. The accelerator reads source properties
and reads and writes destination properties, all at SRAM speed.

The controller needs no block table. It checks every edge as it leaves the edge
buffer:

1. **The edge's intervals are the ones on chip.** The edge goes to the accelerator
   (`ae_valid`/`ae_ready`).
2. **An interval differs. This is a scheduling event.** The controller stops
   handing out edges. It waits until the accelerator has reported every edge it
   already has as finished (`ae_done`, one pulse per edge), so that no vertex
   access of the old block is still pending. Then it does three things:
   * It writes the destination interval back to DRAM, but only if it was
     modified. The write-back happens when the destination interval is being
     replaced, or when the new source interval is that same interval (the
     source copy must see the updated values).
   * It loads the new source interval, if the source interval changed.
   * It loads the new destination interval, if the destination interval changed.

   During the write-back and the loads, the vertex ports are stalled: their
   `ready` signals are low, and `vertex_stall` is high.
3. **After the last edge.** The controller writes back the destination interval if
   it was modified, then raises `done`.

The source interval is never written back. Within one pass, the accelerator sees
source values as they were when the interval was loaded. Updates made during the
pass become visible to later blocks whose source interval is loaded after the
write-back. Every DRAM access is a sequential run over one interval. The last
interval may be shorter: its length comes from `num_vertices`.

Edge words are prefetched from `edge_base` on, for the whole run and during
scheduling too, as far as the edge buffer has room. A read is issued only when
a buffer slot is reserved for it (a credit), so the edge memory never needs
back-pressure on its responses.

## The edge memory: chip, banks, blocks, mats

```
reram_chip
 ├─ address register ── bank_enable_logic ──► one enable per bank
 ├─ bank k (×NUM_BANKS)
 │   ├─ bank_pg_ctrl  ──sleep──► power_gate ──vdd_ok──┐
 │   └─ reram_bank                                    │ (powers the bank)
 │       ├─ global wordline decoder: picks a block    │
 │       ├─ block b (×N_BLOCKS): M_MATS × reram_mat ◄─┘
 │       │     mat selector, local wordline decoder, local bitline mux
 │       └─ global bitline mux
 └─ output multiplexer + register ─► rsp_data (512 bit)
```

One read returns **512 bits**, which is eight edges. The paper picks 512 output
bits as the most energy-efficient ReRAM configuration. All `M_MATS` mats of the
selected block take part in a read, and each supplies `512/M_MATS` bits through
its local bitline mux. The mats use single-level cells.

Word address layout (18 bits by default):

| bits | field | width | purpose |
|---|---|---|---|
| 2:0 | block | log2(N_BLOCKS) | sub-bank interleaving |
| 5:3 | column group | log2(COLS/(512/M_MATS)) | local bitline mux |
| 14:6 | row | log2(ROWS) | local wordline |
| 17:15 | bank | log2(NUM_BANKS) | bank select; no interleaving |

**Sub-bank interleaving.** Consecutive words go to consecutive blocks, and each
block works independently. A sequential stream therefore overlaps one block's
read period with the next block's. A bank streams one word per clock whenever
`N_BLOCKS ≥ READ_CYCLES`. The tests check this rate.

**No bank interleaving.** The bank is the top address field, so a stream stays in
one bank for `2^15` words (262,144 edges) before moving to the next bank. This is
what makes bank-level power gating pay off.

**Timing (default).** A mat accepts a read every `READ_CYCLES` = 2 cycles. This
is the paper's 1983 ps read period taken at an assumed 1 GHz clock. Writes
occupy a mat for `WRITE_CYCLES` = 20 cycles, which is this design's assumption.
A read into a powered bank returns `READ_CYCLES + 2` cycles after the chip accepts
it: one cycle in the address register and one in the output register. Responses
come back in request order.

## Bank-level power gating

Every bank has a power-gating controller (`bank_pg_ctrl`) and one power gate. The
gate can be a header or a footer; `power_gate` models its wake-up time. The
controller has three states: OFF, WAKE and ON.

* **OFF to WAKE.** `bank_enable_logic` raises the bank's enable because the
  address register holds a request for it. The request waits in the address
  register.
* **WAKE to ON.** The gate's virtual supply has settled (`WAKE_CYCLES` = 4,
  assumed). The bank is usable from that cycle: from enable to ready takes
  `WAKE_CYCLES + 1` cycles.
* **ON to OFF.** `IDLE_CYCLES` = 64 consecutive cycles pass (assumed) with no
  command, nothing in flight and nothing waiting.

During a stream, normally only the bank being read is powered. When the stream
crosses a bank boundary, the next bank wakes on demand and the old one goes off
64 cycles later. Nothing is saved or restored, because the ReRAM mats keep their
contents. The mat model checks, with assertions, that it is never accessed
without power. `PG_EN = 0` keeps every bank powered, which is HyVE without power
gating. Energy itself is not modelled.

## Interfaces of `hyve_top`

| group | signals | protocol |
|---|---|---|
| run control | `start`, `edge_base`, `num_edges`, `num_vertices`, `busy`, `done` | pulse `start` while idle or done; `done` stays high until the next `start` |
| edge loading | `host_valid/ready`, `host_addr`, `host_wdata[511:0]`, `host_wmask[63:0]` | writes into the edge memory, one byte-mask bit per byte; refused (`host_ready` low) while busy |
| DRAM | `dv_req_valid/ready`, `dv_req_we`, `dv_req_addr`, `dv_req_wdata`, `dv_rsp_valid`, `dv_rsp_data` | one 32-bit vertex per request, address = vertex index; read data in order, no back-pressure |
| edge stream | `ae_valid/ready`, `ae_edge`, `ae_done` | `ae_edge = {dst[31:0], src[31:0]}`; one `ae_done` pulse per finished edge |
| vertex ports | `sr_*` (source read), `dr_*` (destination read), `dw_*` (destination write) | global vertex index; reads answer one cycle after acceptance (`*_rvalid`); writes take effect at once |
| status | `bank_powered`, `vertex_stall`, `ebuf_full`, `n_sched`, `n_writeback`, `n_load_src`, `n_load_dst` | counters are cleared by reset only |

Edge word format: edge `k` of a 512-bit word occupies bits `[64k+63:64k]`, with
the source in the low half. The accelerator must only touch vertices of the
intervals on chip. It gets only such edges, and assertions in the controller
check it.

## Parameters

| parameter | default | origin |
|---|---|---|
| `IO_BITS` (package) | 512 | paper: chosen ReRAM output width |
| `VID_W`, `VTX_W` (package) | 32, 32 | this design |
| `NUM_BANKS` | 8 | this design (a commodity-DRAM-like chip) |
| `N_BLOCKS` × `M_MATS` | 8 × 8 | this design (the paper: "M×N mats") |
| `ROWS` × `COLS` per mat | 512 × 512 | this design |
| `READ_CYCLES` | 2 | paper's 1983 ps read period at an assumed 1 GHz |
| `WRITE_CYCLES` | 20 | this design |
| `PG_EN` | 1 | paper: the power-gated configuration |
| `IDLE_CYCLES`, `WAKE_CYCLES` | 64, 4 | this design |
| `INT_BITS` | 20 | 8 MB SRAM (the paper's choice) split into two 4 MB sections of 32-bit vertices |
| `EBUF_DEPTH` | 8 words | this design |

With the defaults, the edge memory is one 16 MiB chip (2,097,152 edges) and the
SRAM is 8 MB. The on-chip side handles graphs of any size up to 2^32 vertices,
one interval pair at a time. The edge memory does not: the graphs the paper
evaluates have 3 million to 1.47 billion edges (24 MB to 11 GB). A real system
needs several chips or larger ones. Raise `ROWS`, `COLS` or `NUM_BANKS`; the
address width follows.

## Files

| file | contents |
|---|---|
| `rtl/hyve_pkg.sv` | widths, edge record, scheduler states |
| `rtl/hyve_top.sv` | the hierarchy; shares the chip port between the host (writes, idle) and the controller (reads, busy) |
| `rtl/hyve_controller.sv` | partition check, scheduling, address mapping, port muxing |
| `rtl/edge_buffer.sv` | word FIFO with credits, unpacks eight edges per word |
| `rtl/onchip_vertex_mem.sv` | source and destination SRAM sections |
| `rtl/reram_chip.sv` | address register, bank enable, banks, power gating, output mux |
| `rtl/reram_bank.sv` | blocks of mats, global decoder and bitline mux |
| `rtl/reram_mat.sv` | behavioural model of one crossbar mat |
| `rtl/bank_enable_logic.sv`, `rtl/bank_pg_ctrl.sv`, `rtl/power_gate.sv` | power-gating pieces (`power_gate` is behavioural) |
| `tb/dram_model.sv`, `tb/acc_model.sv`, `tb/edge_mem_model.sv` | behavioural DRAM, accelerator (BFS, connected components or PageRank gather), simple edge memory |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_hyve_top_full` and `tb_hyve_workloads` |

`reram_mat` and `power_gate` stand in for analog parts: a resistive crossbar and
a sleep transistor. They are written in synthesizable style, but they only model
the timing and the storage behaviour.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself through
a watchdog if it hangs. The reference values are computed independently inside
each testbench.

* `tb_reram_mat`, `tb_reram_bank`, `tb_reram_chip` cover masked writes, data,
  read latency, one-word-per-cycle streaming, and a busy block holding off a
  command. For power gating they cover wake-on-demand, gate-off after the idle
  period, all banks off after a pause, and data kept across power-off.
* `tb_power_gate`, `tb_bank_pg_ctrl` and `tb_bank_enable_logic` check exact
  wake-up and idle timing, and the decoder exhaustively.
* `tb_edge_buffer` and `tb_onchip_vertex_mem` use random traffic against
  reference copies.
* `tb_hyve_controller` runs the controller with models of the edge memory, the
  DRAM and the accelerator. `tb_hyve_top` does the same with the real ReRAM chip,
  at reduced sizes (4 banks, 8-vertex intervals, 29 vertices), over several BFS
  passes. A reference model of the scheduling rules predicts the DRAM contents
  and the number of scheduling events, write-backs and loads. The top test also
  requires each mechanism to occur at least once:
  * scheduling, write-back, source load and destination load;
  * a stall, and a full edge buffer;
  * a bank wake-up, a bank gate-off, and a bank switch within one stream;
  * sub-bank interleaving.
* `tb_hyve_top_full` runs one BFS pass with every parameter at its default
  (16 MiB edge memory, 8 MB SRAM) on a graph of 2^20 + 1000 vertices and a few
  hundred edges that cross a bank boundary. It takes about 4 minutes of
  simulation, mostly spent loading and writing back the 2^20-vertex interval.
* `tb_hyve_workloads` runs the three algorithms HyVE is meant for. Breadth-first
  search and connected components (on a symmetrised graph, each vertex ends with
  the smallest index in its component) repeat passes until a pass changes
  nothing. PageRank runs ten iterations of one pass each. The test uses two
  random graphs of 96 vertices in three intervals: a sparse one (2.6 edges per
  vertex, like a YouTube social graph) and a dense one (14 edges per vertex, like
  LiveJournal). The results in
  DRAM are compared with a queue-based BFS and a union-find computed in the
  testbench, so they do not depend on the order in which HyVE streams edges.
  PageRank needs the old rank and the new sum of every vertex, while the design
  keeps one 32-bit value per vertex. The testbench therefore packs both into
  that word: the vertex's outgoing share (rank / out-degree) in the low 16 bits
  and the sum being gathered in the high 16 bits, in fixed point with a total
  rank of 2^14. The accelerator model adds the source's low half to the
  destination's high half. After each pass the testbench checks every sum
  exactly, then does the per-vertex apply step itself (damping 0.85).

Run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/hyve_pkg.sv tb/tb_hyve_top.sv \
          --top-module tb_hyve_top
./obj_dir/Vtb_hyve_top +verilator+rand+reset+2
```

The testbenches reset or initialise everything they read. Random initial values
(`+verilator+rand+reset+2`) only fill memories that are written before they are
read.

## Where this design goes beyond, or falls short of, the paper

* **Protocols, widths, latencies and reset** are this design's. The paper gives
  none of them. Reset is asynchronous and active low, and it clears control state
  but not memory arrays.
* **Draining the accelerator before scheduling** (`ae_done`) and the exact
  write-back rule are this design's reading of "write the modified vertex data
  back … and update to next interval(s)".
* **One accelerator port.** The paper draws several accelerators, each with
  access to the on-chip vertex memory, but does not say how they share it.
* **One ReRAM chip** forms the edge memory. ReRAM row-buffer hits are not
  modelled: every read takes the same time.
* **No edge weights.** The paper allows an optional constant weight per edge; the
  64-bit edge record has no room for it.
* **Energy** is the paper's main result, but it is not something RTL produces.
  Neither is the comparison of SLC and MLC cells or of SRAM sizes. Other SRAM
  sizes are reachable through `INT_BITS`.
* **Not designed here:** the DRAM off-chip vertex memory, and the accelerators,
  which the paper deliberately leaves open.
