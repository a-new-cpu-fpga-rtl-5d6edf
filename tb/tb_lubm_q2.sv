// tb_lubm_q2: runs LUBM query 2, the triangle query of the benchmark,
//   ?x type GraduateStudent . ?y type University . ?z type Department .
//   ?x memberOf ?z . ?z subOrganizationOf ?y . ?x undergraduateDegreeFrom ?y
// as a two-step join through the kernel at its default parameters, with the
// host's part of the join done here. The graph is a small generated LUBM
// instance: 4 universities, 5 departments each, 12 graduate and 20
// undergraduate students per department; each graduate student holds an
// undergraduate degree from a random university. Vertex ids are sparse
// (vid = 2i + 5) and the CLR carries the dense offset ids i, as the host
// maps them. Step 1 (one row per university, one list: in-edges of
// subOrganizationOf, CLS = departments) yields the (y, z) pairs; step 2 (one
// row per pair, two lists: in-edges of memberOf from z and of
// undergraduateDegreeFrom from y, CLS = graduate students) yields x. The
// final answer set is compared with a direct enumeration of the triangles,
// and the step-2 cache hits (rows sharing a university) are required.
module tb_lubm_q2;
  import gstore_pkg::*;

  localparam int unsigned K  = NUM_DDR;
  localparam int unsigned NT = NUM_DDR;
  localparam int unsigned NS = 2;
  localparam int NU = 4, ND = 5, NG = 12, NUG = 20;
  localparam int P_MEMBER = 1, P_SUBORG = 2, P_UGDEG = 3;

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


  // ------------------------------------------------------------- the graph
  // entity i: universities first, then departments, then students
  function automatic int unsigned vid_of(int unsigned i);
    return 2 * i + 5;
  endfunction
  function automatic int unsigned oid_of(int unsigned vid);
    return (vid - 5) / 2;
  endfunction
  localparam int NSTU = ND * (NG + NUG);
  localparam int NV   = NU + NU * ND + NU * NSTU;
  function automatic int unsigned univ(int u);            return u; endfunction
  function automatic int unsigned dept(int u, int d);     return NU + u * ND + d; endfunction
  function automatic int unsigned stud(int u, int d, int s);
    return NU + NU * ND + u * NSTU + d * (NG + NUG) + s;  // s < NG: graduate
  endfunction

  // edges, as (subject, object) per predicate, all entity indices
  int unsigned esub [3][$];
  int unsigned eobj [3][$];
  int unsigned ugdeg [NU][ND][NG];

  function automatic int unsigned off_start(int unsigned p, int unsigned d);
    return p * 20000 + d * 5000;
  endfunction

  task automatic add_edge(int p, int unsigned s, int unsigned o);
    esub[p - 1].push_back(s);
    eobj[p - 1].push_back(o);
  endtask

  task automatic build_ffcsr();
    for (int u = 0; u < NU; u++)
      for (int d = 0; d < ND; d++) begin
        add_edge(P_SUBORG, dept(u, d), univ(u));
        for (int s = 0; s < NG + NUG; s++) begin
          add_edge(P_MEMBER, stud(u, d, s), dept(u, d));
          if (s < NG) begin
            ugdeg[u][d][s] = $urandom_range(0, NU - 1);
            add_edge(P_UGDEG, stud(u, d, s), univ(ugdeg[u][d][s]));
          end
        end
      end
    // CSR per predicate and direction; lists hold sorted vids
    for (int p = 1; p <= 3; p++) begin
      int unsigned bank = p % K;
      int unsigned ptr = p * 20000 + 10000;
      for (int dir = 0; dir < 2; dir++)
        for (int unsigned o = 0; o <= NV; o++) begin
          ffmem[fkey(bank, off_start(p, dir) + o)] = ptr;
          if (o < NV) begin
            // neighbours of o, sorted; vid_of keeps the order
            int unsigned nb [$];
            nb.delete();
            foreach (esub[p - 1][e]) begin
              if (dir == 0 && esub[p - 1][e] == o) nb.push_back(eobj[p - 1][e]);
              if (dir == 1 && eobj[p - 1][e] == o) nb.push_back(esub[p - 1][e]);
            end
            nb.sort();
            foreach (nb[i]) begin
              ffmem[fkey(bank, ptr)] = vid_of(nb[i]);
              ptr++;
            end
          end
        end
    end
  endtask

  // CLS bitmaps for a type, in the cls area selected by base
  task automatic set_cls(int unsigned base, int kind);
    for (int unsigned w = 0; w <= (2 * NV + 5) / CLS_W; w++) clsmem[base + w] = '0;
    for (int u = 0; u < NU; u++)
      for (int d = 0; d < ND; d++) begin
        if (kind == 1) begin
          int unsigned v = vid_of(dept(u, d));
          clsmem[base + v / CLS_W][v % CLS_W] = 1'b1;
        end
        if (kind == 2)
          for (int s = 0; s < NG; s++) begin
            int unsigned v = vid_of(stud(u, d, s));
            clsmem[base + v / CLS_W][v % CLS_W] = 1'b1;
          end
      end
  endtask

  task automatic load_bidx(int unsigned base);
    logic [63:0] w;
    w = '0;
    for (int unsigned b = 0; b < 64; b++)
      if (clsmem.exists(base + b) && clsmem[base + b] != '0) w[b] = 1'b1;
    @(negedge clk);
    bidx_wr_en = 1'b1; bidx_wr_addr = '0; bidx_wr_data = w;
    @(negedge clk);
    bidx_wr_en = 1'b0;
  endtask

  task automatic run(int unsigned nl, edge_sel_t [K-1:0] s, int unsigned rows);
    res_seen.delete();
    n_written = 0;
    @(negedge clk);
    nlists = 3'(nl); sel = s; n_rows = rows; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    checks++;
    if (n_written != int'(result_count)) begin failures++; $display("FAIL result count"); end
  endtask

  longint hits2 = 0;

  initial begin
    int unsigned pair_y [$];
    int unsigned pair_z [$];
    int n_ans, n_exp;
    edge_sel_t [K-1:0] s;
    build_ffcsr();
    repeat (4) @(negedge clk);
    rst = 1'b0;
    for (int p = 1; p <= 3; p++) begin
      @(negedge clk);
      idx_wr_en = 1'b1; idx_wr_pid = PID_W'(p);
      idx_wr_entry = '{ddr: DDR_W'(p % K), out_off: off_start(p, 0), in_off: off_start(p, 1)};
    end
    @(negedge clk);
    idx_wr_en = 1'b0;

    // step 1: universities -> departments that are their sub-organisations
    set_cls(cls_base, 1);
    load_bidx(cls_base);
    for (int u = 0; u < NU; u++) clrmem[clr_base + u] = {96'h0, 32'(oid_of(vid_of(univ(u))))};
    s = '0;
    s[0] = '{pid: PID_W'(P_SUBORG), dir: DIR_IN};
    run(1, s, NU);
    foreach (res_seen[k]) begin
      pair_y.push_back(univ(int'(k >> 32)));
      pair_z.push_back(oid_of(k[31:0]));
    end
    $display("step 1: %0d (university, department) pairs", pair_y.size());
    checks++;
    if (pair_y.size() != NU * ND) begin failures++; $display("FAIL step 1 pairs"); end

    // step 2: pairs -> graduate students in z with a degree from y
    set_cls(cls_base, 2);
    load_bidx(cls_base);
    foreach (pair_y[i])
      clrmem[clr_base + i] = {64'h0, 32'(pair_y[i]), 32'(pair_z[i])};
    s = '0;
    s[0] = '{pid: PID_W'(P_MEMBER), dir: DIR_IN};
    s[1] = '{pid: PID_W'(P_UGDEG), dir: DIR_IN};
    run(2, s, pair_y.size());
    hits2 = stats.cache_hits;
    n_ans = 0;
    foreach (res_seen[k]) begin
      automatic int unsigned r = k >> 32;
      automatic int unsigned x = oid_of(k[31:0]);
      automatic int unsigned y = pair_y[r];
      automatic int unsigned z = pair_z[r];
      bit ok;
      ok = 0;
      for (int u = 0; u < NU; u++)
        for (int d = 0; d < ND; d++)
          for (int g = 0; g < NG; g++)
            if (stud(u, d, g) == x && dept(u, d) == z && univ(u) == y && ugdeg[u][d][g] == u) ok = 1;
      checks++;
      if (!ok || res_seen[k] != 1) begin failures++; $display("FAIL answer x=%0d y=%0d z=%0d", x, y, z); end
      n_ans++;
    end
    n_exp = 0;
    for (int u = 0; u < NU; u++)
      for (int d = 0; d < ND; d++)
        for (int g = 0; g < NG; g++) if (ugdeg[u][d][g] == u) n_exp++;
    $display("step 2: %0d answers (expected %0d), %0d cache hits", n_ans, n_exp, hits2);
    checks++;
    if (n_ans != n_exp) begin failures++; $display("FAIL answer count"); end
    checks++;
    if (hits2 == 0) begin failures++; $display("FAIL no cache reuse across rows"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
