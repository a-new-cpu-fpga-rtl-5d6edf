// clr_reader: reads the candidate list for reading (CLR) from DRAM.
//
// The CLR of one join step is an array of n_rows rows starting at word
// address clr_base; a row holds K offset ids, one per list to intersect
// (slot j of the row is the vertex whose list feeds leaf j of the
// intersection tree). The reader fetches one whole row per read, keeping at
// most DEPTH rows in flight or buffered, so the response channel never
// needs back-pressure, and hands rows to the CLR dispatcher through a small
// FIFO. start (one cycle, while idle) begins a pass; busy stays high until
// every row has been handed on. The one-row-per-word layout and the
// read-ahead depth are this design's choices.
module clr_reader
  import gstore_pkg::*;
#(
  parameter int unsigned K     = NUM_DDR,
  parameter int unsigned DEPTH = 4
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      start,
  input  logic [ADDR_W-1:0]         clr_base,
  input  logic [31:0]               n_rows,
  output logic                      busy,
  // DRAM read port, one row per word
  output logic                      m_req_valid,
  input  logic                      m_req_ready,
  output logic [ADDR_W-1:0]         m_req_addr,
  input  logic                      m_rsp_valid,
  output logic                      m_rsp_ready,
  input  logic [K-1:0][VID_W-1:0]   m_rsp_data,
  // rows to the dispatcher
  output logic                      row_valid,
  input  logic                      row_ready,
  output logic [K-1:0][VID_W-1:0]   row_oid
);
  localparam int unsigned CW = $clog2(DEPTH) + 1;

  logic [31:0]       issued, delivered;
  logic [CW-1:0]     outst;
  logic [CW-1:0]     fcount;
  logic              running;
  logic              issue, rcv;

  assign m_req_addr  = clr_base + ADDR_W'(issued);
  assign m_req_valid = running && (issued != n_rows) &&
                       ((outst + fcount) < CW'(DEPTH));
  assign issue       = m_req_valid && m_req_ready;
  assign m_rsp_ready = 1'b1;
  assign rcv         = m_rsp_valid;
  assign busy        = running;

  gs_fifo #(.WIDTH(K*VID_W), .DEPTH(DEPTH)) u_rows (
    .clk, .rst,
    .wr_valid (rcv),
    .wr_ready (),
    .wr_data  (m_rsp_data),
    .rd_valid (row_valid),
    .rd_ready (row_ready),
    .rd_data  (row_oid),
    .count    (fcount)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      running   <= 1'b0;
      issued    <= '0;
      delivered <= '0;
      outst     <= '0;
    end else begin
      if (start && !running) begin
        running   <= (n_rows != 0);
        issued    <= '0;
        delivered <= '0;
        outst     <= '0;
      end else if (running) begin
        if (issue) issued <= issued + 1;
        outst <= outst + CW'(issue) - CW'(rcv);
        if (row_valid && row_ready) begin
          delivered <= delivered + 1;
          if (delivered + 1 == n_rows) running <= 1'b0;
        end
      end
    end
  end
endmodule
