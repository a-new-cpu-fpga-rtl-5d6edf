# Join kernel for a CPU-FPGA RDF graph store

A graph database answers a SPARQL query by matching the query graph against
the data graph, one query vertex at a time (a multi-step join). Each step
takes the partial matches found so far. For every partial match, it intersects
the neighbour lists of the already-matched vertices that the new query vertex
must be adjacent to. It then keeps only the vertices that are also candidates
for the new query vertex. On large graphs (billions of triples) this work is
dominated by list intersections and by random reads of neighbour lists, and a
CPU is slow at both.

This RTL moves that step onto an FPGA. The graph is held in the FPGA's DDR
memory in a compressed-sparse-row layout. The kernel streams neighbour lists
out of it, intersects them in a tree of merge units, filters the survivors
against a candidate bitmap and writes the results back. The host CPU decides
the join order, prepares the inputs in DRAM, starts the kernel and maps
the results back to vertex names. The host side is not part of this RTL.

The structure follows the published gStore CPU-FPGA system: its memory layout,
its four pipeline stages, the shared list cache and the block index over the
candidate bitmap. Sizes, widths, handshakes and the exact encodings are this
design's own choices. Each one is marked below.

## What one run computes

The host configures one join step and pulses `start`. A step is described by:

* `nlists` (1 to K) and, for each slot j < nlists, `sel[j]`: a predicate id
  and a direction (out-edges or in-edges). Slot j stands for "the neighbours
  of the j-th matched vertex along the query edge with this predicate".
* The **CLR** (candidate list for reading): `n_rows` rows in DRAM from word
  address `clr_base`. Each row is one partial match. It holds K offset ids
  (oids), the dense row numbers of the matched vertices; slot j holds the
  vertex whose list feeds slot j.
* The **CLS** (candidate list for searching): a bitmap from `cls_base`. Bit v
  is one if vertex v is a candidate for the new query vertex.

For every row r the kernel computes

    result(r) = { v : v in N(sel[0], oid[r][0]) ∩ ... ∩ N(sel[nlists-1], oid[r][nlists-1])
                      and CLS[v] = 1 }

and writes each pair {r, v} as one 64-bit word to `res_base + i`. Here i counts
the results of the run. Results of different rows can interleave, and so can
results of the same row. `result_count` gives the number written, and `done`
pulses once the last one has been accepted by memory.

## Memory layout (FFCSR)

The graph is stored in K = 4 DDR banks. Each bank holds the lists of some of
the predicates, so the threads reading different predicates use different banks
in parallel.

* **Index list**, one entry per predicate p: `{ddr, out_off, in_off}`. This is
  the bank that holds p, and the word addresses on that bank where p's
  out-edge and in-edge offset lists start. The host loads it into the
  kernel's on-chip table (`idx_wr_*`) before the first run. Keeping it on
  chip is this design's choice.
* **Offset list** of (p, direction): entry i, at address `start + i`, is the
  word address on the same bank where the list of oid i begins. The list of i
  ends where the list of i + 1 begins, so a list costs two offset reads.
* **Adjacency lists**: 32-bit vertex ids, ascending and without duplicates.
  The merge intersection depends on this order.
* **CLS**: 512-bit words. Bit v is bit `v % 512` of word `cls_base + v / 512`.
* **Block index**: one bit per CLS word, set if that word has any one. The host
  writes it into on-chip memory in 64-bit words (`bidx_wr_*`). Word w, bit b
  covers vertex ids `(64w + b) * 512` to `(64w + b) * 512 + 511`. At the
  default size it covers the full 32-bit id space with 2^23 bits (1 MiB).

The graph also uses an oid-to-vertex-id mapping, which stays on the host.
The kernel never needs it: it compares list elements with each other and
looks them up in the CLS, so the CLS must be indexed by the same ids that the
adjacency lists hold.

## The pipeline

All four stages run concurrently and are linked by valid/ready streams.

**Stage 1: reading the CLR and the FFCSR.**
`clr_reader` fetches one CLR row per memory read and keeps up to 4 rows in
flight or buffered. `clr_dispatcher` hands the row's slots to the `NT`
reading threads (`ffcsr_reader`). A slot goes to thread `oid mod NT` if that
thread is free. Otherwise it goes to the lowest free thread, which is counted
as a redirect. A slot is issued only when no thread is still reading the
previous list of the same slot. Each slot buffer therefore receives its lists
in row order, while the lists of consecutive rows are fetched at overlapping
times. The next row is taken once every slot of the current row has been
issued.

Each thread first asks the shared `ffcsr_cache` for the list. On a hit it copies
the list from the cache and makes no DRAM access. On a miss it looks up the
predicate's index entry, reads the two offsets, claims a cache line if the
list fits into one, and streams the list from the bank with up to 8 reads in
flight. Each word goes to the slot's BRAM buffer (`gs_fifo`, 512 entries) and
into the claimed cache line. An end-of-list token closes the list, and the
line is then committed. The cache holds 16 lines of 64 words and replaces
lines in FIFO order. A line is invisible to lookups while it is being filled.
An allocation that lands on a line still being filled by another thread fails,
and that list is then simply not cached.

**Stage 2: the intersection tree.** `intersect_tree` is a binary tree of
`intersect_node`s, K leaves and K-1 nodes. Every node compares the heads of
its two input streams every cycle:

* it drops the smaller head;
* it passes equal heads once;
* at the end of one list it drops the rest of the other list;
* at the end of both lists it passes one end token.

Each level therefore emits the intersection of its subtree's lists, one list
per row, closed by an end token. With fewer than K slots in use, a node whose
right subtree has no slot in use forwards its left input unchanged. The
leaves in use are always the contiguous slots 0..nlists-1. One node adds one
cycle of latency. With no stalls, L common elements leave the root in about
L + 1 + log2(K) cycles.

**Stage 3: searching the CLS.** `search_dispatcher` hands one vertex per cycle
to the `NS` searching threads in round-robin order. It skips busy threads. An
end token from the tree marks the end of a row: the dispatcher consumes it and
advances the row number attached to the vertices. A `cls_searcher` checks the
block index in the cycle it accepts a vertex. If the block is empty, the vertex
is dropped at once and the kernel makes no DRAM access. Otherwise the searcher
reads the CLS word and tests the vertex's bit. CLS bitmaps are mostly long runs
of zeros, so the block index removes most CLS reads.

**Stage 4: write-back.** `result_writer` takes one result per cycle from the
searchers, round-robin, into a 16-entry output buffer. It writes the results to
consecutive words of the results area.

The run ends when every row's end token has passed stage 3, all threads and
searchers are idle, and the output buffer is empty.

## Interfaces and timing

All logic runs on one clock, `clk`, with a synchronous active-high `rst`. The
original system clocks its FPGA design at 330 MHz. This RTL has not been
through FPGA timing closure.

Every memory port has two channels:

* a request channel: `*_req_valid`, `*_req_ready`, `*_req_addr`, plus `ff_req_bank`
  on the FFCSR ports;
* a response channel: `*_rsp_valid`, `*_rsp_ready`, `*_rsp_data`.

Responses come back in request order and never in the same cycle as their
request. A memory system with AXI or a vendor DRAM controller needs a small
adapter per port. The ports are:

| port | count | data | used by |
|---|---|---|---|
| `clr_*` | 1 | K x 32 bits (one row) | CLR reader, always ready for responses |
| `ff_*` | NT | 32 bits, `ff_req_bank` selects the DDR | reading threads |
| `cls_*` | NS | 512 bits | searching threads |
| `res_w_*` | 1 | 64 bits `{row, vid}`, write only, no response | result writer |

Host sequence:

1. Load the index list and the block index.
2. Set `nlists`, `sel`, `n_rows`, `clr_base`, `cls_base` and `res_base`.
3. Pulse `start` for one cycle while `busy` is low. The configuration inputs
   must stay stable until `done`.

`stats` counts the run's events: cache hits, misses and failed allocations,
thread redirects, block-index skips, CLS reads, CLS rejects, and cycles in
which a result waited on a full output buffer.

## Parameters (`fpga_kernel`)

| parameter | default | meaning | origin |
|---|---|---|---|
| `K` | 4 | DDR banks = tree leaves = slots per row | original system (4 DDR banks) |
| `NT` | 4 | FFCSR reading threads | this design (= K) |
| `NS` | 2 | CLS searching threads | original drawing shows two |
| `LEAF_DEPTH` | 512 | words per slot buffer | this design |
| `CACHE_LINES`, `LINE_LEN` | 16, 64 | list cache size | this design |
| `NUM_PRED` | 32 | index-list entries | this design |
| `OUT_DEPTH` | 16 | output buffer | this design |
| `BIDX_BLOCKS` | 2^23 | block-index bits (32-bit ids / 512) | this design |

Widths shared by all modules (32-bit ids and word addresses, 512-bit CLS
words, 8-bit predicate ids) are in `gstore_pkg`. With 32-bit word addresses,
each bank spans 16 GB, so the four banks cover the 64 GB of global memory of
the board the original system used. The largest evaluated data set has about
2.1 billion triples, which is 17 GB of adjacency lists counting both
directions. That fits.

## Limits and departures

* **Thread count vs. list count.** If NT < nlists and a list is longer than
  its slot buffer, the pipeline can deadlock. The tree waits for a list that
  no thread has started yet, because every thread waits on a full buffer.
  Keep `NT >= K`, as in the default, or make `LEAF_DEPTH` larger than any list.
* **A single kernel.** The original system runs a set of kernels under host
  control. Several `fpga_kernel` instances with their own memory ports can do
  that; arbitration between them is left to the memory system.
* **Block index is host-written.** Nothing in this RTL builds it from the CLS.
* **Combinational reads.** The cache, the index list and the block index have
  read ports with no latency. At 330 MHz the large arrays would need a pipeline
  register to map onto block RAM. The cache in particular has NT read and NT
  write ports, which is fine in registers or distributed RAM but would have to
  be banked to fit block RAM.
* **The memory sub-system, PCIe link and all host software** are outside this
  RTL. That includes query parsing, filtering, join ordering, building the
  FFCSR, CLR and CLS, and the oid/vertex-id mappings.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares against
values computed independently in the testbench and ends with a
`TB_RESULT checks=N failures=M` line.

`tb_fpga_kernel` is the end-to-end test, and runs the kernel at its default
parameters. It builds a random graph in the layout above, a CLS with
candidates in two of four blocks, and a memory model with random back-pressure
and 1 to 6 cycles of latency. It then runs four join steps with 4, 3, 2 and 1
lists per row. It checks the result set of every row against a reference
intersection, and the result addresses and counts. It also requires each of
the following to have happened at least once:

* a cache hit and a cache miss;
* a thread redirect;
* a block-index skip, a CLS read and a CLS reject;
* an output-buffer stall;
* an empty list and an uncacheable long list;
* a bypassed tree node.

`tb_lubm_q2` uses the kernel the way a host does. It runs LUBM benchmark
query 2, which asks for each graduate student x who is a member of a
department z of a university y and holds an undergraduate degree from the
same y. The query runs as a two-step join on a generated instance with 4
universities, 20 departments and 640 students:

* Step 1 has one list per row and gives the (university, department) pairs.
* Step 2 intersects the department's members with the holders of the
  university's degree, and keeps only graduate students through the CLS.

Vertex ids are sparse, and the CLR carries dense offset ids. The answers are
compared with a direct enumeration. Rows that share a university must hit the
list cache.

The unit testbenches check the following:

* the merge tree's results, and its rate of one comparison per node per cycle;
* the round-robin order of the search dispatcher;
* the FIFO replacement of the cache, and failed allocations;
* the read counts of the reading thread, and that cached lists cost no memory
  read;
* the CLR read-ahead bound;
* the dispatcher's per-slot ordering, and that consecutive rows overlap.

Simulating with Verilator 5, from the directory holding `rtl/` and `tb/`:

    verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
      -Irtl -y rtl -y tb +libext+.sv rtl/gstore_pkg.sv tb/tb_fpga_kernel.sv \
      --top-module tb_fpga_kernel -Mdir obj
    ./obj/Vtb_fpga_kernel

Replace `tb_fpga_kernel` with any other testbench in `tb/` to run that one.
The end-to-end test finishes in well under a second.
