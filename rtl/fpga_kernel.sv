// fpga_kernel: one join kernel of the CPU-FPGA graph store. It extends a
// set of partial query matches by one query vertex: for every CLR row (the
// offset ids of the already-matched vertices adjacent to the new query
// vertex) it intersects their adjacency lists and keeps the vertices that
// are also candidates of the new query vertex.
//
// Four stages, all running concurrently:
//   1. clr_reader fetches CLR rows; clr_dispatcher hands each row's lists
//      to NT ffcsr_reader threads, which walk index list -> offset list ->
//      adjacency list on the predicate's DDR bank, after first asking the
//      shared ffcsr_cache; each list lands in the BRAM buffer of its slot.
//   2. intersect_tree reduces the nlists slot buffers to their common
//      vertices, one comparison per node per cycle.
//   3. search_dispatcher gives one vertex per cycle round-robin to NS
//      cls_searcher threads; each checks block_index and then, only for a
//      non-empty block, the CLS bit in DRAM.
//   4. result_writer buffers accepted {row, vid} pairs and writes them to
//      the results area.
// Host side: the index list and block index are loaded through their write
// ports; then a one-cycle start with the step configuration (nlists, the
// edge selector of each slot, n_rows, DRAM base addresses) runs the step.
// busy is high until every row has passed all stages and the output buffer
// is empty; done is a one-cycle pulse at the end; result_count gives the
// number of results written. stats counts the kernel's events.
// Memory side: one read port for the CLR (one row per word), one read port
// per reading thread (bank number + word address, 32-bit words), one read
// port per searching thread (512-bit CLS words) and one write port for the
// results; every port uses valid/ready requests and in-order valid/ready
// responses. Stage structure, the cache, the block index and round-robin
// dispatch follow the kernel's description; port formats, widths, buffer
// sizes and thread counts are this design's choices.
module fpga_kernel
  import gstore_pkg::*;
#(
  parameter int unsigned K           = NUM_DDR,
  parameter int unsigned NT          = NUM_DDR,
  parameter int unsigned NS          = 2,
  parameter int unsigned LEAF_DEPTH  = 512,
  parameter int unsigned CACHE_LINES = 16,
  parameter int unsigned LINE_LEN    = 64,
  parameter int unsigned NUM_PRED    = 32,
  parameter int unsigned OUT_DEPTH   = 16,
  parameter int unsigned BIDX_BLOCKS = 2**(VID_W - CLS_LOG),
  localparam int unsigned SW  = $clog2(K),
  localparam int unsigned BAW = $clog2(BIDX_BLOCKS / BIDX_WW)
) (
  input  logic                        clk,
  input  logic                        rst,
  // host: tables
  input  logic                        idx_wr_en,
  input  logic [PID_W-1:0]            idx_wr_pid,
  input  idx_entry_t                  idx_wr_entry,
  input  logic                        bidx_wr_en,
  input  logic [BAW-1:0]              bidx_wr_addr,
  input  logic [BIDX_WW-1:0]          bidx_wr_data,
  // host: step control
  input  logic                        start,
  input  logic [SW:0]                 nlists,
  input  edge_sel_t [K-1:0]           sel,
  input  logic [31:0]                 n_rows,
  input  logic [ADDR_W-1:0]           clr_base,
  input  logic [ADDR_W-1:0]           cls_base,
  input  logic [ADDR_W-1:0]           res_base,
  output logic                        busy,
  output logic                        done,
  output logic [31:0]                 result_count,
  output kernel_stats_t               stats,
  // DRAM: CLR
  output logic                        clr_req_valid,
  input  logic                        clr_req_ready,
  output logic [ADDR_W-1:0]           clr_req_addr,
  input  logic                        clr_rsp_valid,
  output logic                        clr_rsp_ready,
  input  logic [K-1:0][VID_W-1:0]     clr_rsp_data,
  // DRAM: FFCSR, one port per reading thread
  output logic [NT-1:0]               ff_req_valid,
  input  logic [NT-1:0]               ff_req_ready,
  output logic [NT-1:0][DDR_W-1:0]    ff_req_bank,
  output logic [NT-1:0][ADDR_W-1:0]   ff_req_addr,
  input  logic [NT-1:0]               ff_rsp_valid,
  output logic [NT-1:0]               ff_rsp_ready,
  input  logic [NT-1:0][VID_W-1:0]    ff_rsp_data,
  // DRAM: CLS, one port per searching thread
  output logic [NS-1:0]               cls_req_valid,
  input  logic [NS-1:0]               cls_req_ready,
  output logic [NS-1:0][ADDR_W-1:0]   cls_req_addr,
  input  logic [NS-1:0]               cls_rsp_valid,
  output logic [NS-1:0]               cls_rsp_ready,
  input  logic [NS-1:0][CLS_W-1:0]    cls_rsp_data,
  // DRAM: results
  output logic                        res_w_valid,
  input  logic                        res_w_ready,
  output logic [ADDR_W-1:0]           res_w_addr,
  output result_t                     res_w_data
);
  localparam int unsigned LW = $clog2(CACHE_LINES);
  localparam int unsigned IW = $clog2(LINE_LEN);
  localparam int unsigned NW = $clog2(LINE_LEN + 1);
  localparam int unsigned BW = VID_W - CLS_LOG;

  // ---------------------------------------------------------------- control
  logic        running;
  logic [31:0] rows_done;
  logic        clr_busy, disp_busy;
  logic        row_done_pulse;
  logic        wr_idle;
  logic [NT-1:0] thr_idle;
  logic [NS-1:0] srch_idle;
  logic        finish;

  // ---------------------------------------------------------------- stage 1
  logic                    row_valid, row_ready;
  logic [K-1:0][VID_W-1:0] row_oid;

  clr_reader #(.K(K)) u_clr_reader (
    .clk, .rst,
    .start      (start && !running),
    .clr_base, .n_rows,
    .busy       (clr_busy),
    .m_req_valid(clr_req_valid),
    .m_req_ready(clr_req_ready),
    .m_req_addr (clr_req_addr),
    .m_rsp_valid(clr_rsp_valid),
    .m_rsp_ready(clr_rsp_ready),
    .m_rsp_data (clr_rsp_data),
    .row_valid, .row_ready, .row_oid
  );

  logic      [NT-1:0]         task_valid, task_ready;
  logic      [NT-1:0][SW-1:0] task_slot;
  list_key_t [NT-1:0]         task_key;
  logic                       ev_redirect;

  clr_dispatcher #(.K(K), .NT(NT)) u_clr_disp (
    .clk, .rst, .nlists, .sel,
    .row_valid, .row_ready, .row_oid,
    .task_valid, .task_ready, .task_slot, .task_key,
    .busy        (disp_busy),
    .ev_redirect
  );

  logic [NT-1:0][PID_W-1:0] idx_pid;
  idx_entry_t [NT-1:0]      idx_entry;

  index_list #(.NUM_PRED(NUM_PRED), .NR(NT)) u_index (
    .clk, .rst,
    .wr_en   (idx_wr_en),
    .wr_pid  (idx_wr_pid),
    .wr_entry(idx_wr_entry),
    .rd_pid  (idx_pid),
    .rd_entry(idx_entry)
  );

  logic      [NT-1:0]          c_req, c_alloc, c_gnt;
  list_key_t [NT-1:0]          c_key;
  logic      [NT-1:0][NW-1:0]  c_len;
  logic                        c_hit, c_ok;
  logic      [LW-1:0]          c_line;
  logic      [NW-1:0]          c_rsp_len;
  logic      [NT-1:0][LW-1:0]  c_rd_line, c_wr_line, c_commit_line;
  logic      [NT-1:0][IW-1:0]  c_rd_idx, c_wr_idx;
  logic      [NT-1:0][VID_W-1:0] c_rd_data, c_wr_data;
  logic      [NT-1:0]          c_wr_en, c_commit;

  ffcsr_cache #(.NT(NT), .LINES(CACHE_LINES), .LINE_LEN(LINE_LEN)) u_cache (
    .clk, .rst,
    .req(c_req), .req_alloc(c_alloc), .req_key(c_key), .req_len(c_len),
    .gnt(c_gnt), .rsp_hit(c_hit), .rsp_ok(c_ok), .rsp_line(c_line),
    .rsp_len(c_rsp_len),
    .rd_line(c_rd_line), .rd_idx(c_rd_idx), .rd_data(c_rd_data),
    .wr_en(c_wr_en), .wr_line(c_wr_line), .wr_idx(c_wr_idx),
    .wr_data(c_wr_data), .commit(c_commit), .commit_line(c_commit_line)
  );

  logic [NT-1:0]          t_valid, t_ready;
  logic [NT-1:0][SW-1:0]  t_slot;
  tok_t [NT-1:0]          t_tok;
  logic [NT-1:0]          ev_hit, ev_miss, ev_afail;

  for (genvar t = 0; t < NT; t++) begin : g_thread
    ffcsr_reader #(.K(K), .LINES(CACHE_LINES), .LINE_LEN(LINE_LEN)) u_reader (
      .clk, .rst,
      .task_valid   (task_valid[t]),
      .task_ready   (task_ready[t]),
      .task_slot    (task_slot[t]),
      .task_key     (task_key[t]),
      .idx_pid      (idx_pid[t]),
      .idx_entry    (idx_entry[t]),
      .c_req        (c_req[t]),
      .c_alloc      (c_alloc[t]),
      .c_key        (c_key[t]),
      .c_len        (c_len[t]),
      .c_gnt        (c_gnt[t]),
      .c_hit, .c_ok, .c_line, .c_rsp_len,
      .c_rd_line    (c_rd_line[t]),
      .c_rd_idx     (c_rd_idx[t]),
      .c_rd_data    (c_rd_data[t]),
      .c_wr_en      (c_wr_en[t]),
      .c_wr_line    (c_wr_line[t]),
      .c_wr_idx     (c_wr_idx[t]),
      .c_wr_data    (c_wr_data[t]),
      .c_commit     (c_commit[t]),
      .c_commit_line(c_commit_line[t]),
      .m_req_valid  (ff_req_valid[t]),
      .m_req_ready  (ff_req_ready[t]),
      .m_req_bank   (ff_req_bank[t]),
      .m_req_addr   (ff_req_addr[t]),
      .m_rsp_valid  (ff_rsp_valid[t]),
      .m_rsp_ready  (ff_rsp_ready[t]),
      .m_rsp_data   (ff_rsp_data[t]),
      .o_valid      (t_valid[t]),
      .o_ready      (t_ready[t]),
      .o_slot       (t_slot[t]),
      .o_tok        (t_tok[t]),
      .ev_hit       (ev_hit[t]),
      .ev_miss      (ev_miss[t]),
      .ev_alloc_fail(ev_afail[t])
    );
  end
  assign thr_idle = task_ready;

  // slot buffers: thread -> slot crossbar (one thread per slot at a time)
  logic [K-1:0] lb_wvalid, lb_wready, lb_rvalid, lb_rready;
  tok_t [K-1:0] lb_wtok, lb_rtok;

  always_comb begin
    lb_wvalid = '0;
    lb_wtok   = '0;
    t_ready   = '0;
    for (int t = 0; t < NT; t++) begin
      if (t_valid[t]) begin
        lb_wvalid[t_slot[t]] = 1'b1;
        lb_wtok[t_slot[t]]   = t_tok[t];
      end
      t_ready[t] = lb_wready[t_slot[t]];
    end
  end

  for (genvar j = 0; j < K; j++) begin : g_leaf
    gs_fifo #(.WIDTH($bits(tok_t)), .DEPTH(LEAF_DEPTH)) u_list_buf (
      .clk, .rst,
      .wr_valid(lb_wvalid[j]),
      .wr_ready(lb_wready[j]),
      .wr_data (lb_wtok[j]),
      .rd_valid(lb_rvalid[j]),
      .rd_ready(lb_rready[j]),
      .rd_data (lb_rtok[j]),
      .count   ()
    );
  end

  // ---------------------------------------------------------------- stage 2
  logic root_valid, root_ready;
  tok_t root_tok;

  intersect_tree #(.K(K)) u_tree (
    .clk, .rst, .nlists,
    .leaf_valid(lb_rvalid),
    .leaf_ready(lb_rready),
    .leaf_tok  (lb_rtok),
    .root_valid, .root_ready, .root_tok
  );

  // ---------------------------------------------------------------- stage 3
  logic [NS-1:0]    s_valid, s_ready;
  logic [VID_W-1:0] s_vid;
  logic [ROW_W-1:0] s_row;

  search_dispatcher #(.NS(NS)) u_search_disp (
    .clk, .rst,
    .clear   (start && !running),
    .in_valid(root_valid),
    .in_ready(root_ready),
    .in_tok  (root_tok),
    .s_valid, .s_ready, .s_vid, .s_row,
    .row_done(row_done_pulse)
  );

  logic [NS-1:0][BW-1:0] bidx_block;
  logic [NS-1:0]         bidx_bit;

  block_index #(.BLOCKS(BIDX_BLOCKS), .NR(NS)) u_bidx (
    .clk,
    .wr_en   (bidx_wr_en),
    .wr_addr (bidx_wr_addr),
    .wr_data (bidx_wr_data),
    .rd_block(bidx_block),
    .rd_bit  (bidx_bit)
  );

  logic    [NS-1:0] r_valid, r_ready;
  result_t [NS-1:0] r_res;
  logic    [NS-1:0] ev_skip, ev_read, ev_reject;

  for (genvar s = 0; s < NS; s++) begin : g_search
    cls_searcher u_searcher (
      .clk, .rst, .cls_base,
      .task_valid (s_valid[s]),
      .task_ready (s_ready[s]),
      .task_vid   (s_vid),
      .task_row   (s_row),
      .bidx_block (bidx_block[s]),
      .bidx_bit   (bidx_bit[s]),
      .m_req_valid(cls_req_valid[s]),
      .m_req_ready(cls_req_ready[s]),
      .m_req_addr (cls_req_addr[s]),
      .m_rsp_valid(cls_rsp_valid[s]),
      .m_rsp_ready(cls_rsp_ready[s]),
      .m_rsp_data (cls_rsp_data[s]),
      .res_valid  (r_valid[s]),
      .res_ready  (r_ready[s]),
      .res        (r_res[s]),
      .ev_skip    (ev_skip[s]),
      .ev_read    (ev_read[s]),
      .ev_reject  (ev_reject[s])
    );
  end
  assign srch_idle = s_ready;

  // ---------------------------------------------------------------- stage 4
  logic ev_stall;

  result_writer #(.NS(NS), .OUT_DEPTH(OUT_DEPTH)) u_writer (
    .clk, .rst,
    .clear   (start && !running),
    .res_base,
    .in_valid(r_valid),
    .in_ready(r_ready),
    .in_res  (r_res),
    .w_valid (res_w_valid),
    .w_ready (res_w_ready),
    .w_addr  (res_w_addr),
    .w_data  (res_w_data),
    .count   (result_count),
    .idle    (wr_idle),
    .ev_stall
  );

  // ---------------------------------------------------------------- control
  assign finish = running && (rows_done == n_rows) && !clr_busy && !disp_busy
                  && (&thr_idle) && (&srch_idle) && wr_idle;
  assign busy   = running;

  always_ff @(posedge clk) begin
    if (rst) begin
      running   <= 1'b0;
      rows_done <= '0;
      done      <= 1'b0;
      stats     <= '0;
    end else begin
      done <= 1'b0;
      if (start && !running) begin
        running   <= 1'b1;
        rows_done <= '0;
        stats     <= '0;
      end else if (running) begin
        if (row_done_pulse) rows_done <= rows_done + 1;
        if (finish) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
        stats.cache_hits       <= stats.cache_hits       + 32'($countones(ev_hit));
        stats.cache_misses     <= stats.cache_misses     + 32'($countones(ev_miss));
        stats.cache_alloc_fail <= stats.cache_alloc_fail + 32'($countones(ev_afail));
        stats.redirects        <= stats.redirects        + 32'(ev_redirect);
        stats.bidx_skips       <= stats.bidx_skips       + 32'($countones(ev_skip));
        stats.cls_reads        <= stats.cls_reads        + 32'($countones(ev_read));
        stats.cls_rejects      <= stats.cls_rejects      + 32'($countones(ev_reject));
        stats.out_stalls       <= stats.out_stalls       + 32'(ev_stall);
      end
    end
  end

  // Each slot buffer is written by at most one thread at a time.
  for (genvar j = 0; j < K; j++) begin : g_chk
    a_one_writer: assert property (@(posedge clk) disable iff (rst)
      $onehot0(t_valid & slot_mask(j)));
  end

  function automatic logic [NT-1:0] slot_mask(int unsigned j);
    logic [NT-1:0] m;
    for (int t = 0; t < NT; t++) m[t] = (t_slot[t] == SW'(j));
    return m;
  endfunction
endmodule
