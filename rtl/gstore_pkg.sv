// gstore_pkg: types and constants shared by the join kernel.
//
// The kernel intersects sorted vertex-id lists read from an FPGA-resident
// compressed-sparse-row graph (FFCSR) and filters the survivors against a
// candidate bitstring (CLS). This package fixes the word widths that all
// stages agree on and the token/record formats passed between them.
// Widths are this design's choice (32-bit ids and word addresses, 512-bit
// CLS words); the number of DDR banks (4) follows the graph layout it
// implements.
package gstore_pkg;

  // Number of DDR banks of the FPGA global memory (k in the FFCSR layout).
  parameter int unsigned NUM_DDR   = 4;
  // Vertex / offset id width and DRAM word-address width.
  parameter int unsigned VID_W     = 32;
  parameter int unsigned ADDR_W    = 32;
  // Predicate id width and DDR-number field width of an index-list entry.
  parameter int unsigned PID_W     = 8;
  parameter int unsigned DDR_W     = 4;
  // Row (intermediate result) number carried with every result.
  parameter int unsigned ROW_W     = 32;
  // One CLS word = one block of the block index (bits).
  parameter int unsigned CLS_W     = 512;
  parameter int unsigned CLS_LOG   = $clog2(CLS_W);
  // Width of host-written block-index words.
  parameter int unsigned BIDX_WW   = 64;

  // One entry of the index list: which DDR holds the predicate's lists and
  // where its out-edge and in-edge offset lists start on that DDR.
  typedef struct packed {
    logic [DDR_W-1:0]  ddr;
    logic [ADDR_W-1:0] out_off;
    logic [ADDR_W-1:0] in_off;
  } idx_entry_t;

  // Which list of a vertex is wanted: predicate and direction.
  typedef enum logic {DIR_OUT = 1'b0, DIR_IN = 1'b1} dir_e;

  typedef struct packed {
    logic [PID_W-1:0] pid;
    dir_e             dir;
  } edge_sel_t;

  // Key of one adjacency list: predicate, direction and offset id.
  typedef struct packed {
    logic [PID_W-1:0] pid;
    dir_e             dir;
    logic [VID_W-1:0] oid;
  } list_key_t;

  // Stream token: a list element, or the end-of-list marker that closes
  // every list (an empty list is a lone marker).
  typedef struct packed {
    logic             eol;
    logic [VID_W-1:0] vid;
  } tok_t;

  // One result: the CLR row it extends and the vertex that joins it.
  typedef struct packed {
    logic [ROW_W-1:0] row;
    logic [VID_W-1:0] vid;
  } result_t;

  // Event counters reported to the host.
  typedef struct packed {
    logic [31:0] cache_hits;
    logic [31:0] cache_misses;
    logic [31:0] cache_alloc_fail;
    logic [31:0] redirects;
    logic [31:0] bidx_skips;
    logic [31:0] cls_reads;
    logic [31:0] cls_rejects;
    logic [31:0] out_stalls;
  } kernel_stats_t;

endpackage
