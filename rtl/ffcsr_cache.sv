// ffcsr_cache: on-chip cache of whole adjacency lists, shared by the FFCSR
// reading threads, with first-in-first-out replacement.
//
// Before a thread reads a list from DRAM it looks the list up here by its
// key (predicate, direction, offset id). Threads reach the cache through a
// command port each; a round-robin arbiter grants one command per cycle and
// the answer is returned combinationally with the grant:
//   LOOKUP: rsp_hit, rsp_line, rsp_len for a valid line holding the key.
//   ALLOC : claims the line at the FIFO write pointer for a list of req_len
//           words (rsp_ok, rsp_line). The line is invalid until the owner
//           thread fills it through its write port and pulses commit. If
//           that line is still being filled by another thread, the alloc
//           fails and the list is simply not cached.
// Each thread also has its own read port (line, index -> word, no latency)
// and write port. Lists longer than LINE_LEN words are never cached.
// The FIFO policy and sharing follow the kernel's description; line count,
// line length, the command protocol and multi-porting are this design's.
module ffcsr_cache
  import gstore_pkg::*;
#(
  parameter int unsigned NT        = 4,
  parameter int unsigned LINES     = 16,
  parameter int unsigned LINE_LEN  = 64,
  localparam int unsigned LW = $clog2(LINES),
  localparam int unsigned IW = $clog2(LINE_LEN),
  localparam int unsigned NW = $clog2(LINE_LEN + 1)
) (
  input  logic                   clk,
  input  logic                   rst,
  // command ports
  input  logic      [NT-1:0]     req,
  input  logic      [NT-1:0]     req_alloc,   // 0 = lookup, 1 = alloc
  input  list_key_t [NT-1:0]     req_key,
  input  logic      [NT-1:0][NW-1:0] req_len,
  output logic      [NT-1:0]     gnt,
  output logic                   rsp_hit,
  output logic                   rsp_ok,
  output logic      [LW-1:0]     rsp_line,
  output logic      [NW-1:0]     rsp_len,
  // per-thread read ports
  input  logic      [NT-1:0][LW-1:0] rd_line,
  input  logic      [NT-1:0][IW-1:0] rd_idx,
  output logic      [NT-1:0][VID_W-1:0] rd_data,
  // per-thread write / commit ports
  input  logic      [NT-1:0]     wr_en,
  input  logic      [NT-1:0][LW-1:0] wr_line,
  input  logic      [NT-1:0][IW-1:0] wr_idx,
  input  logic      [NT-1:0][VID_W-1:0] wr_data,
  input  logic      [NT-1:0]     commit,
  input  logic      [NT-1:0][LW-1:0] commit_line
);
  localparam int unsigned TW = (NT > 1) ? $clog2(NT) : 1;

  logic [VID_W-1:0] data [LINES][LINE_LEN];
  list_key_t        tag   [LINES];
  logic [NW-1:0]    len   [LINES];
  logic [LINES-1:0] valid, busy;
  logic [LW-1:0]    wptr;
  logic [TW-1:0]    rr;

  // round-robin grant
  logic          any;
  logic [TW-1:0] sel;
  always_comb begin
    any = 1'b0;
    sel = '0;
    gnt = '0;
    for (int i = 0; i < NT; i++) begin
      int unsigned t;
      t = (int'(rr) + i) % NT;
      if (!any && req[t]) begin
        any = 1'b1;
        sel = TW'(t);
      end
    end
    if (any) gnt[sel] = 1'b1;
  end

  // lookup of the granted key
  always_comb begin
    rsp_hit  = 1'b0;
    rsp_line = '0;
    rsp_len  = '0;
    rsp_ok   = 1'b0;
    if (any && req_alloc[sel]) begin
      rsp_ok   = !busy[wptr];
      rsp_line = wptr;
    end else begin
      for (int l = LINES-1; l >= 0; l--) begin
        if (valid[l] && tag[l] == req_key[sel]) begin
          rsp_hit  = any;
          rsp_line = LW'(l);
          rsp_len  = len[l];
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      valid <= '0;
      busy  <= '0;
      wptr  <= '0;
      rr    <= '0;
      for (int l = 0; l < LINES; l++) begin
        tag[l] <= '0;
        len[l] <= '0;
      end
    end else begin
      if (any) rr <= TW'((int'(sel) + 1) % NT);
      for (int t = 0; t < NT; t++) begin
        if (commit[t]) begin
          valid[commit_line[t]] <= 1'b1;
          busy[commit_line[t]]  <= 1'b0;
        end
      end
      if (any && req_alloc[sel] && !busy[wptr]) begin
        valid[wptr] <= 1'b0;
        busy[wptr]  <= 1'b1;
        tag[wptr]   <= req_key[sel];
        len[wptr]   <= req_len[sel];
        wptr        <= wptr + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int t = 0; t < NT; t++) begin
      if (wr_en[t]) data[wr_line[t]][wr_idx[t]] <= wr_data[t];
    end
  end

  always_comb begin
    for (int t = 0; t < NT; t++) rd_data[t] = data[rd_line[t]][rd_idx[t]];
  end
endmodule
