// result_writer: stage 4, writes accepted (row, vid) pairs back to DRAM.
//
// Up to one result per cycle is taken from the NS searching threads
// (round-robin) into an on-chip output buffer of OUT_DEPTH entries, which
// drains to the results area of DRAM: the i-th result of a run goes to word
// address res_base + i as one {row, vid} word. clear (start of a run)
// resets the result count. idle is high when the buffer is empty.
// ev_stall marks cycles in which a result waits because the buffer is full.
// The record format, buffer depth and write handshake (valid/ready, no
// response) are this design's choices.
module result_writer
  import gstore_pkg::*;
#(
  parameter int unsigned NS        = 2,
  parameter int unsigned OUT_DEPTH = 16
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  clear,
  input  logic [ADDR_W-1:0]     res_base,
  input  logic    [NS-1:0]      in_valid,
  output logic    [NS-1:0]      in_ready,
  input  result_t [NS-1:0]      in_res,
  output logic                  w_valid,
  input  logic                  w_ready,
  output logic [ADDR_W-1:0]     w_addr,
  output result_t               w_data,
  output logic [31:0]           count,
  output logic                  idle,
  output logic                  ev_stall
);
  localparam int unsigned PW = (NS > 1) ? $clog2(NS) : 1;

  logic [PW-1:0] ptr, pick;
  logic          found, buf_ready;
  logic [$clog2(OUT_DEPTH):0] fill;

  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int i = 0; i < NS; i++) begin
      int unsigned t;
      t = (int'(ptr) + i) % NS;
      if (!found && in_valid[t]) begin
        found = 1'b1;
        pick  = PW'(t);
      end
    end
    in_ready = '0;
    if (found && buf_ready) in_ready[pick] = 1'b1;
  end

  gs_fifo #(.WIDTH($bits(result_t)), .DEPTH(OUT_DEPTH)) u_outbuf (
    .clk, .rst,
    .wr_valid (found),
    .wr_ready (buf_ready),
    .wr_data  (in_res[pick]),
    .rd_valid (w_valid),
    .rd_ready (w_ready),
    .rd_data  (w_data),
    .count    (fill)
  );

  assign w_addr   = res_base + count;
  assign idle     = (fill == '0);
  assign ev_stall = found && !buf_ready;

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      ptr   <= '0;
      count <= '0;
    end else begin
      if (found && buf_ready) ptr <= PW'((int'(pick) + 1) % NS);
      if (w_valid && w_ready) count <= count + 1;
    end
  end
endmodule
