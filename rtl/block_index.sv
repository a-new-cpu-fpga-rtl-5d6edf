// block_index: on-chip bitstring index over the CLS.
//
// Bit b says whether block b of the CLS (CLS_W consecutive vertex ids, one
// DRAM word) holds any one at all. Searching threads check it first and
// read the CLS from DRAM only for ids in a non-empty block, which removes
// most DRAM reads because a CLS is mostly long runs of zeros. The host
// writes the index in BIDX_WW-bit words before a run; each searching
// thread has a combinational read port that returns the bit of a block
// number. BLOCKS defaults to the number of CLS words that cover the whole
// 32-bit id space. The block length (one 512-bit DRAM word) is this design's
// choice.
module block_index
  import gstore_pkg::*;
#(
  parameter int unsigned BLOCKS = 2**(VID_W - CLS_LOG),
  parameter int unsigned NR     = 2,
  localparam int unsigned WORDS = BLOCKS / BIDX_WW,
  localparam int unsigned AW    = $clog2(WORDS),
  localparam int unsigned BW    = $clog2(BLOCKS)
) (
  input  logic                    clk,
  input  logic                    wr_en,
  input  logic [AW-1:0]           wr_addr,
  input  logic [BIDX_WW-1:0]      wr_data,
  input  logic [NR-1:0][BW-1:0]   rd_block,
  output logic [NR-1:0]           rd_bit
);
  localparam int unsigned OW = $clog2(BIDX_WW);

  logic [BIDX_WW-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_comb begin
    for (int r = 0; r < NR; r++) begin
      logic [BIDX_WW-1:0] w;
      w = mem[rd_block[r][BW-1:OW]];
      rd_bit[r] = w[rd_block[r][OW-1:0]];
    end
  end
endmodule
