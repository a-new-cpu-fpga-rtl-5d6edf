// tb_ffcsr_reader: one reading thread with its own 8-line cache (16-word
// lines) and a memory model with random acceptance and latency. Two
// predicates live on banks 1 and 3; each has out- and in-edge offset lists
// over 12 vertices with empty, short and long (uncacheable) lists. Random
// tasks, many repeated, are run with random back-pressure on the output.
// Checks: the token stream is the list followed by one end token, tagged
// with the task's slot; every request goes to the predicate's bank; a
// repeated short list is served from the cache with no memory request; a
// long list is never cached; and at most MAX_OUT reads are in flight.
module tb_ffcsr_reader;
  import gstore_pkg::*;
  localparam int K = 4, LINES = 8, LL = 16, MAXO = 4, NV = 12;
  localparam int LW = 3, IW = 4, NW = 5, SW = 2;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic task_valid = 0, task_ready;
  logic [SW-1:0] task_slot = '0;
  list_key_t task_key = '0;
  logic [PID_W-1:0] idx_pid;
  idx_entry_t idx_entry;
  logic c_req, c_alloc, c_gnt, c_hit, c_ok;
  list_key_t c_key;
  logic [NW-1:0] c_len, c_rsp_len;
  logic [LW-1:0] c_line, c_rd_line, c_wr_line, c_commit_line;
  logic [IW-1:0] c_rd_idx, c_wr_idx;
  logic [VID_W-1:0] c_rd_data, c_wr_data;
  logic c_wr_en, c_commit;
  logic m_req_valid, m_req_ready = 0, m_rsp_valid = 0, m_rsp_ready;
  logic [DDR_W-1:0] m_req_bank;
  logic [ADDR_W-1:0] m_req_addr;
  logic [VID_W-1:0] m_rsp_data = '0;
  logic o_valid, o_ready = 0;
  logic [SW-1:0] o_slot;
  tok_t o_tok;
  logic ev_hit, ev_miss, ev_alloc_fail;

  ffcsr_reader #(.K(K), .LINES(LINES), .LINE_LEN(LL), .MAX_OUT(MAXO)) dut (.*);

  ffcsr_cache #(.NT(1), .LINES(LINES), .LINE_LEN(LL)) u_cache (
    .clk, .rst,
    .req(c_req), .req_alloc(c_alloc), .req_key(c_key), .req_len(c_len),
    .gnt(c_gnt), .rsp_hit(c_hit), .rsp_ok(c_ok), .rsp_line(c_line), .rsp_len(c_rsp_len),
    .rd_line(c_rd_line), .rd_idx(c_rd_idx), .rd_data(c_rd_data),
    .wr_en(c_wr_en), .wr_line(c_wr_line), .wr_idx(c_wr_idx), .wr_data(c_wr_data),
    .commit(c_commit), .commit_line(c_commit_line)
  );

  // index list: pid 0 on bank 1, pid 1 on bank 3
  function automatic idx_entry_t idx_of(logic [PID_W-1:0] p);
    return '{ddr: (p == 0) ? 4'd1 : 4'd3, out_off: 32'(100 + p * 1000),
             in_off: 32'(200 + p * 1000)};
  endfunction
  assign idx_entry = idx_of(idx_pid);

  logic [31:0] mem [longint];
  function automatic longint mk(int b, int a);
    return (longint'(b) << 32) | longint'(a);
  endfunction

  typedef int unsigned ulist_t[$];
  ulist_t lists [2][2][NV];

  task automatic build();
    for (int p = 0; p < 2; p++) begin
      automatic int bank = (p == 0) ? 1 : 3;
      automatic int ptr = 500 + p * 1000;
      for (int d = 0; d < 2; d++)
        for (int o = 0; o <= NV; o++) begin
          mem[mk(bank, 100 + p * 1000 + d * 100 + o)] = ptr;
          if (o < NV) begin
            automatic int len = (o % 4 == 0) ? 0 : (o % 4 == 1) ? 20 + o : 1 + o;
            automatic int v = $urandom_range(0, 5);
            for (int i = 0; i < len; i++) begin
              v += $urandom_range(1, 9);
              mem[mk(bank, ptr)] = v;
              lists[p][d][o].push_back(v);
              ptr++;
            end
          end
        end
    end
  endtask

  // memory model
  typedef struct { longint due; logic [31:0] d; } q_t;
  q_t q [$];
  longint cyc = 0;
  int inflight = 0, max_inflight = 0, n_req = 0;
  logic [DDR_W-1:0] want_bank;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (m_rsp_valid && m_rsp_ready) begin void'(q.pop_front()); inflight--; end
    if (m_req_valid && m_req_ready) begin
      q_t e;
      checks++;
      if (m_req_bank != want_bank) begin failures++; $display("FAIL bank"); end
      e.due = cyc + longint'($urandom_range(1, 5));
      e.d = mem.exists(mk(m_req_bank, m_req_addr)) ? mem[mk(m_req_bank, m_req_addr)] : '1;
      q.push_back(e);
      inflight++;
      n_req++;
    end
    if (inflight > max_inflight) max_inflight = inflight;
    m_req_ready <= ($urandom_range(0, 2) != 0);
    m_rsp_valid <= (q.size() > 0) && (q[0].due <= cyc);
    if (q.size() > 0) m_rsp_data <= q[0].d;
  end

  tok_t got [$];
  always @(posedge clk) if (o_valid && o_ready) begin
    got.push_back(o_tok);
    checks++;
    if (o_slot != task_slot) begin failures++; $display("FAIL slot"); end
  end
  always @(negedge clk) o_ready = ($urandom_range(0, 3) != 0);

  int n_hits = 0, n_long = 0, n_empty = 0;
  int lines_q [$];
  function automatic bit fifo_has(int k);
    foreach (lines_q[i]) if (lines_q[i] == k) return 1;
    return 0;
  endfunction

  initial begin
    build();
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 150; i++) begin
      automatic int p = $urandom_range(0, 1);
      automatic int d = $urandom_range(0, 1);
      automatic int o = $urandom_range(0, NV - 1);
      automatic int key = p * 100 + d * 50 + o;
      int req0;
      ulist_t l;
      l = lists[p][d][o];
      want_bank = (p == 0) ? 1 : 3;
      while (!task_ready) @(negedge clk);
      got.delete();
      req0 = n_req;
      task_valid = 1; task_slot = SW'($urandom); task_key = '{pid: PID_W'(p), dir: dir_e'(d), oid: o};
      @(negedge clk);
      task_valid = 0;
      while (!(got.size() > 0 && got[got.size() - 1].eol)) @(negedge clk);
      checks++;
      if (got.size() != l.size() + 1) begin
        failures++;
        $display("FAIL length %0d vs %0d", got.size(), l.size() + 1);
      end else begin
        foreach (l[m]) begin
          checks++;
          if (got[m].eol || got[m].vid != l[m]) begin failures++; $display("FAIL word %0d", m); end
        end
      end
      checks++;
      if (fifo_has(key)) begin
        n_hits++;
        if (n_req != req0) begin failures++; $display("FAIL cached list read from memory"); end
      end else if (n_req != req0 + 2 + l.size()) begin
        failures++;
        $display("FAIL %0d memory reads for a list of %0d", n_req - req0, l.size());
      end
      if (l.size() > LL) n_long++;
      if (l.size() == 0) n_empty++;
      // model of FIFO replacement: a miss on a cacheable list allocates
      if (!fifo_has(key) && l.size() > 0 && l.size() <= LL) begin
        lines_q.push_back(key);
        if (lines_q.size() > LINES) void'(lines_q.pop_front());
      end
    end
    checks++;
    if (n_hits == 0 || n_long == 0 || n_empty == 0 || max_inflight < 2 || max_inflight > MAXO) begin
      failures++;
      $display("FAIL coverage hits %0d long %0d empty %0d inflight %0d", n_hits, n_long, n_empty, max_inflight);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
