// index_list: the FFCSR index list, one entry per predicate.
//
// Entry p holds the number of the DDR bank that stores predicate p's offset
// and adjacency lists, and the word addresses on that bank where its
// out-edge and in-edge offset lists start. The host writes entries before a
// run (one per cycle through wr_*); every FFCSR reading thread has its own
// combinational read port. The table is small (one entry per predicate), so
// it is kept on chip rather than fetched from DRAM for every list; that
// placement, the table size and reset-to-zero are this design's choices.
module index_list
  import gstore_pkg::*;
#(
  parameter int unsigned NUM_PRED = 32,
  parameter int unsigned NR       = 4
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  wr_en,
  input  logic [PID_W-1:0]      wr_pid,
  input  idx_entry_t            wr_entry,
  input  logic [NR-1:0][PID_W-1:0] rd_pid,
  output idx_entry_t [NR-1:0]   rd_entry
);
  localparam int unsigned AW = (NUM_PRED > 1) ? $clog2(NUM_PRED) : 1;

  idx_entry_t tbl [NUM_PRED];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NUM_PRED; i++) tbl[i] <= '0;
    end else if (wr_en && wr_pid < PID_W'(NUM_PRED)) begin
      tbl[AW'(wr_pid)] <= wr_entry;
    end
  end

  always_comb begin
    for (int r = 0; r < NR; r++) begin
      rd_entry[r] = (rd_pid[r] < PID_W'(NUM_PRED)) ? tbl[AW'(rd_pid[r])] : '0;
    end
  end
endmodule
