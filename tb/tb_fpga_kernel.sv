// tb_fpga_kernel: end-to-end test of the join kernel at its default sizes.
//
// The testbench builds a small random graph in an FFCSR layout (one
// predicate per DDR bank, out- and in-edge offset lists followed by sorted
// adjacency lists), a CLS whose ones sit in blocks 0 and 2 only, and a
// block index to match. It then runs four join steps with 4, 3, 2 and 1
// lists per row. A memory model serves every read port with random
// acceptance and 1..6 cycles of latency and captures the result writes;
// the last step throttles the write port to fill the output buffer.
// For every row the expected results (intersection of the lists, filtered
// by the CLS) are computed here from the memory image and compared, as a
// set, with what the kernel wrote. Result addresses, counts and the done
// pulse are checked too. The kernel's event counters must show cache hits
// and misses, thread redirects, block-index skips, CLS reads and rejects,
// output stalls; the test also requires empty and uncacheable (long)
// lists and bypassed tree nodes to have occurred.
module tb_fpga_kernel;
  import gstore_pkg::*;

  localparam int unsigned K  = NUM_DDR;
  localparam int unsigned NT = NUM_DDR;
  localparam int unsigned NS = 2;
  localparam int unsigned NP = 4;     // predicates used
  localparam int unsigned NO = 24;    // offset ids per list family
  localparam int unsigned POOL = 160;
  localparam int unsigned LINE_LEN = 64;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #1 clk = ~clk;

  int checks = 0;
  int failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ------------------------------------------------------------- DUT ports
  logic                        idx_wr_en = 0;
  logic [PID_W-1:0]            idx_wr_pid = '0;
  idx_entry_t                  idx_wr_entry = '0;
  logic                        bidx_wr_en = 0;
  logic [16:0]                 bidx_wr_addr = '0;
  logic [BIDX_WW-1:0]          bidx_wr_data = '0;
  logic                        start = 0;
  logic [2:0]                  nlists = '0;
  edge_sel_t [K-1:0]           sel = '0;
  logic [31:0]                 n_rows = '0;
  logic [ADDR_W-1:0]           clr_base = 32'h100, cls_base = 32'h4000, res_base = 32'h8000;
  logic                        busy, done;
  logic [31:0]                 result_count;
  kernel_stats_t               stats;
  logic                        clr_req_valid, clr_req_ready = 0;
  logic [ADDR_W-1:0]           clr_req_addr;
  logic                        clr_rsp_valid = 0, clr_rsp_ready;
  logic [K-1:0][VID_W-1:0]     clr_rsp_data = '0;
  logic [NT-1:0]               ff_req_valid, ff_req_ready = '0;
  logic [NT-1:0][DDR_W-1:0]    ff_req_bank;
  logic [NT-1:0][ADDR_W-1:0]   ff_req_addr;
  logic [NT-1:0]               ff_rsp_valid = '0, ff_rsp_ready;
  logic [NT-1:0][VID_W-1:0]    ff_rsp_data = '0;
  logic [NS-1:0]               cls_req_valid, cls_req_ready = '0;
  logic [NS-1:0][ADDR_W-1:0]   cls_req_addr;
  logic [NS-1:0]               cls_rsp_valid = '0, cls_rsp_ready;
  logic [NS-1:0][CLS_W-1:0]    cls_rsp_data = '0;
  logic                        res_w_valid, res_w_ready = 0;
  logic [ADDR_W-1:0]           res_w_addr;
  result_t                     res_w_data;

  fpga_kernel dut (.*);

  // ------------------------------------------------------------- memory image
  logic [31:0]       ffmem  [longint];   // key: bank << 32 | addr
  logic [K*32-1:0]   clrmem [int unsigned];
  logic [CLS_W-1:0]  clsmem [int unsigned];
  int                write_prob = 100;   // percent of cycles the write port is ready

  function automatic longint fkey(int unsigned bank, int unsigned addr);
    return (longint'(bank) << 32) | longint'(addr);
  endfunction

  function automatic logic [31:0] ffread(int unsigned bank, int unsigned addr);
    if (ffmem.exists(fkey(bank, addr))) return ffmem[fkey(bank, addr)];
    return 32'hDEAD_BEEF;
  endfunction

  function automatic int unsigned pool_id(int unsigned i);
    if (i < 100) return i * 5;
    if (i < 130) return 512 + (i - 100) * 7;
    return 1024 + (i - 130) * 11;
  endfunction

  function automatic int unsigned off_start(int unsigned p, int unsigned d);
    return p * 20000 + d * 100;
  endfunction

  longint n_empty_lists = 0, n_long_lists = 0;

  task automatic build_graph();
    for (int unsigned p = 0; p < NP; p++) begin
      int unsigned bank = p % K;
      int unsigned ptr = p * 20000 + 1000;
      for (int unsigned d = 0; d < 2; d++) begin
        for (int unsigned o = 0; o <= NO; o++) begin
          ffmem[fkey(bank, off_start(p, d) + o)] = ptr;
          if (o < NO) begin
            int unsigned kind = $urandom_range(0, 9);
            int unsigned dens = (kind == 0) ? 0 : (kind == 1) ? 85 : 40;
            for (int unsigned i = 0; i < POOL; i++)
              if ($urandom_range(0, 99) < dens) begin
                ffmem[fkey(bank, ptr)] = pool_id(i);
                ptr++;
              end
          end
        end
      end
    end
    // CLS: half of the ids of blocks 0 and 2 are candidates
    for (int unsigned w = 0; w < 4; w++) begin
      logic [CLS_W-1:0] v;
      v = '0;
      if (w == 0 || w == 2)
        for (int b = 0; b < CLS_W; b++) v[b] = ($urandom_range(0, 1) == 1);
      clsmem[cls_base + w] = v;
    end
  endtask

  function automatic logic cls_bit(int unsigned vid);
    int unsigned w = cls_base + vid / CLS_W;
    if (!clsmem.exists(w)) return 1'b0;
    return clsmem[w][vid % CLS_W];
  endfunction

  // ------------------------------------------------------------- port models
  typedef struct { longint due; logic [31:0] d; }      q32_t;
  typedef struct { longint due; logic [K*32-1:0] d; }  qclr_t;
  typedef struct { longint due; logic [CLS_W-1:0] d; } qcls_t;

  q32_t  ffq  [NT][$];
  qclr_t clrq [$];
  qcls_t clsq [NS][$];

  logic [31:0] res_seen [longint];   // key: row << 32 | vid, value: count
  int          n_written = 0;

  always @(posedge clk) begin
    if (rst) begin
      n_written <= 0;
    end else begin
      // CLR port
      if (clr_rsp_valid && clr_rsp_ready) void'(clrq.pop_front());
      if (clr_req_valid && clr_req_ready) begin
        qclr_t e;
        e.due = cyc + longint'($urandom_range(1, 6));
        e.d   = clrmem.exists(clr_req_addr) ? clrmem[clr_req_addr] : '1;
        clrq.push_back(e);
      end
      clr_req_ready <= ($urandom_range(0, 3) != 0);
      clr_rsp_valid <= (clrq.size() > 0) && (clrq[0].due <= cyc);
      if (clrq.size() > 0) clr_rsp_data <= clrq[0].d;
      // FFCSR ports
      for (int t = 0; t < NT; t++) begin
        if (ff_rsp_valid[t] && ff_rsp_ready[t]) void'(ffq[t].pop_front());
        if (ff_req_valid[t] && ff_req_ready[t]) begin
          q32_t e;
          e.due = cyc + longint'($urandom_range(1, 6));
          e.d   = ffread(ff_req_bank[t], ff_req_addr[t]);
          ffq[t].push_back(e);
        end
        ff_req_ready[t] <= ($urandom_range(0, 3) != 0);
        ff_rsp_valid[t] <= (ffq[t].size() > 0) && (ffq[t][0].due <= cyc);
        if (ffq[t].size() > 0) ff_rsp_data[t] <= ffq[t][0].d;
      end
      // CLS ports
      for (int s = 0; s < NS; s++) begin
        if (cls_rsp_valid[s] && cls_rsp_ready[s]) void'(clsq[s].pop_front());
        if (cls_req_valid[s] && cls_req_ready[s]) begin
          qcls_t e;
          e.due = cyc + longint'($urandom_range(1, 6));
          e.d   = clsmem.exists(cls_req_addr[s]) ? clsmem[cls_req_addr[s]] : '0;
          clsq[s].push_back(e);
        end
        cls_req_ready[s] <= ($urandom_range(0, 3) != 0);
        cls_rsp_valid[s] <= (clsq[s].size() > 0) && (clsq[s][0].due <= cyc);
        if (clsq[s].size() > 0) cls_rsp_data[s] <= clsq[s][0].d;
      end
      // result writes
      if (res_w_valid && res_w_ready) begin
        longint key;
        key = (longint'(res_w_data.row) << 32) | longint'(res_w_data.vid);
        checks++;
        if (res_w_addr != res_base + n_written) begin
          failures++;
          $display("FAIL result %0d written to %h", n_written, res_w_addr);
        end
        if (res_seen.exists(key)) res_seen[key] = res_seen[key] + 1;
        else res_seen[key] = 1;
        n_written <= n_written + 1;
      end
      res_w_ready <= ($urandom_range(0, 99) < write_prob);
    end
  end

  // ------------------------------------------------------------- reference
  typedef int unsigned ulist_t[$];

  function automatic ulist_t ref_list(int unsigned p, int unsigned d, int unsigned o);
    ulist_t l;
    int unsigned bank = p % K;
    int unsigned b = ffread(bank, off_start(p, d) + o);
    int unsigned e = ffread(bank, off_start(p, d) + o + 1);
    for (int unsigned a = b; a < e; a++) l.push_back(ffread(bank, a));
    return l;
  endfunction

  longint mech_bypass = 0;

  task automatic run_step(int unsigned nl, int unsigned rows, int unsigned oid_range,
                          int wprob);
    logic [31:0] expect_set [longint];
    int n_expect;
    edge_sel_t [K-1:0] s;
    longint t0;
    // configuration
    for (int j = 0; j < K; j++) begin
      s[j].pid = PID_W'($urandom_range(0, NP-1));
      s[j].dir = dir_e'($urandom_range(0, 1));
    end
    // rows and expected results
    n_expect = 0;
    for (int unsigned r = 0; r < rows; r++) begin
      logic [K*32-1:0] row;
      ulist_t acc;
      row = '0;
      for (int j = 0; j < K; j++) begin
        int unsigned o = $urandom_range(0, oid_range - 1);
        row[j*32 +: 32] = (j < int'(nl)) ? o : 32'hFFFF_FFFF;
        if (j < int'(nl)) begin
          ulist_t l = ref_list(s[j].pid, s[j].dir, o);
          if (l.size() == 0) n_empty_lists++;
          if (l.size() > LINE_LEN) n_long_lists++;
          if (j == 0) acc = l;
          else begin
            ulist_t nx;
            foreach (acc[i]) if (l.size() > 0) foreach (l[m]) if (l[m] == acc[i]) nx.push_back(acc[i]);
            acc = nx;
          end
        end
      end
      clrmem[clr_base + r] = row;
      foreach (acc[i]) if (cls_bit(acc[i])) begin
        expect_set[(longint'(r) << 32) | longint'(acc[i])] = 1;
        n_expect++;
      end
    end
    if (nl < K) mech_bypass++;
    res_seen.delete();
    write_prob = wprob;
    n_written  = 0;
    @(negedge clk);
    nlists = 3'(nl);
    sel    = s;
    n_rows = rows;
    start  = 1'b1;
    @(negedge clk);
    start  = 1'b0;
    t0 = cyc;
    while (!done) @(negedge clk);
    $display("step nlists=%0d rows=%0d: %0d results in %0d cycles", nl, rows,
             result_count, cyc - t0);
    // compare
    checks++;
    if (result_count != n_expect || n_written != n_expect) begin
      failures++;
      $display("FAIL step nlists=%0d: count %0d written %0d expected %0d",
               nl, result_count, n_written, n_expect);
    end
    foreach (expect_set[k]) begin
      checks++;
      if (!res_seen.exists(k) || res_seen[k] != 1) begin
        failures++;
        $display("FAIL missing or repeated result row %0d vid %0d", k >> 32, k[31:0]);
      end
    end
    foreach (res_seen[k]) begin
      checks++;
      if (!expect_set.exists(k)) begin
        failures++;
        $display("FAIL unexpected result row %0d vid %0d", k >> 32, k[31:0]);
      end
    end
    checks++;
    if (busy) begin
      failures++;
      $display("FAIL busy after done");
    end
  endtask

  // ------------------------------------------------------------- event totals
  longint tot_hits = 0, tot_miss = 0, tot_redir = 0, tot_skip = 0;
  longint tot_reads = 0, tot_rej = 0, tot_stall = 0;
  always @(posedge clk) if (done && !rst) begin
    tot_hits  += stats.cache_hits;
    tot_miss  += stats.cache_misses;
    tot_redir += stats.redirects;
    tot_skip  += stats.bidx_skips;
    tot_reads += stats.cls_reads;
    tot_rej   += stats.cls_rejects;
    tot_stall += stats.out_stalls;
  end

  task automatic need(string what, longint n);
    checks++;
    $display("event %-22s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL event never happened: %s", what);
    end
  endtask

  initial begin
    build_graph();
    repeat (4) @(negedge clk);
    rst = 1'b0;
    // index list: predicate p on bank p % K
    for (int p = 0; p < NP; p++) begin
      @(negedge clk);
      idx_wr_en    = 1'b1;
      idx_wr_pid   = PID_W'(p);
      idx_wr_entry = '{ddr: DDR_W'(p % K), out_off: off_start(p, 0), in_off: off_start(p, 1)};
    end
    // block index: blocks 0 and 2 hold candidates
    @(negedge clk);
    idx_wr_en    = 1'b0;
    bidx_wr_en   = 1'b1;
    bidx_wr_addr = '0;
    bidx_wr_data = 64'h5;
    @(negedge clk);
    bidx_wr_en   = 1'b0;

    run_step(4, 40, 8, 100);
    run_step(3, 30, NO, 100);
    run_step(2, 30, NO, 100);
    run_step(1, 25, NO, 5);
    @(negedge clk);

    need("cache hits", tot_hits);
    need("cache misses", tot_miss);
    need("thread redirects", tot_redir);
    need("block-index skips", tot_skip);
    need("CLS reads", tot_reads);
    need("CLS rejects", tot_rej);
    need("output buffer stalls", tot_stall);
    need("empty lists", n_empty_lists);
    need("uncached long lists", n_long_lists);
    need("tree bypass steps", mech_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
