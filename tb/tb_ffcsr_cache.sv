// tb_ffcsr_cache: three threads share a 4-line cache with 8-word lines.
// The test allocates, fills and commits lists, looks them up from other
// threads and reads the words back; checks that a line is invisible until
// committed, that replacement is first-in-first-out (the fifth allocation
// evicts the first list), that an allocation onto a line still being filled
// fails, and that simultaneous requests are granted one per cycle in
// rotation.
module tb_ffcsr_cache;
  import gstore_pkg::*;
  localparam int NT = 3, LINES = 4, LL = 8;
  localparam int LW = 2, IW = 3, NW = 4;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic      [NT-1:0] req = '0, req_alloc = '0, gnt;
  list_key_t [NT-1:0] req_key = '0;
  logic      [NT-1:0][NW-1:0] req_len = '0;
  logic rsp_hit, rsp_ok;
  logic [LW-1:0] rsp_line;
  logic [NW-1:0] rsp_len;
  logic [NT-1:0][LW-1:0] rd_line = '0, wr_line = '0, commit_line = '0;
  logic [NT-1:0][IW-1:0] rd_idx = '0, wr_idx = '0;
  logic [NT-1:0][VID_W-1:0] rd_data, wr_data = '0;
  logic [NT-1:0] wr_en = '0, commit = '0;

  ffcsr_cache #(.NT(NT), .LINES(LINES), .LINE_LEN(LL)) dut (.*);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic list_key_t key(int n);
    return '{pid: PID_W'(n % 5), dir: dir_e'(n % 2), oid: VID_W'(100 + n)};
  endfunction

  // one command from thread t, returns the grant-cycle response
  task automatic cmd(int t, bit alloc, list_key_t k, int len,
                     output logic hit, output logic ok, output logic [LW-1:0] line,
                     output logic [NW-1:0] rlen);
    req[t] = 1; req_alloc[t] = alloc; req_key[t] = k; req_len[t] = NW'(len);
    #0.5;
    chk(gnt[t], "lone request granted at once");
    hit = rsp_hit; ok = rsp_ok; line = rsp_line; rlen = rsp_len;
    @(negedge clk);
    req[t] = 0;
  endtask

  task automatic fill(int t, logic [LW-1:0] line, int n, int len);
    for (int i = 0; i < len; i++) begin
      wr_en[t] = 1; wr_line[t] = line; wr_idx[t] = IW'(i); wr_data[t] = n * 16 + i;
      @(negedge clk);
    end
    wr_en[t] = 0;
  endtask

  task automatic do_commit(int t, logic [LW-1:0] line);
    commit[t] = 1; commit_line[t] = line;
    @(negedge clk);
    commit[t] = 0;
  endtask

  logic h, o;
  logic [LW-1:0] ln, held;
  logic [NW-1:0] rl;

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // miss, allocate, fill, invisible until commit, then hit
    cmd(0, 0, key(0), 0, h, o, ln, rl);
    chk(!h, "cold miss");
    cmd(0, 1, key(0), 5, h, o, ln, rl);
    chk(o && ln == 0, "first alloc gets line 0");
    fill(0, ln, 0, 5);
    cmd(1, 0, key(0), 0, h, o, ln, rl);
    chk(!h, "uncommitted line not visible");
    do_commit(0, 0);
    cmd(2, 0, key(0), 0, h, o, ln, rl);
    chk(h && ln == 0 && rl == 5, "hit after commit from another thread");
    for (int i = 0; i < 5; i++) begin
      rd_line[2] = ln; rd_idx[2] = IW'(i);
      #0.1;
      chk(rd_data[2] == 32'(i), "cached word");
    end
    // three more lists fill lines 1..3
    for (int n = 1; n < 4; n++) begin
      cmd(n % NT, 1, key(n), 3 + n, h, o, ln, rl);
      chk(o && ln == LW'(n), "FIFO allocation order");
      fill(n % NT, ln, n, 3 + n);
      do_commit(n % NT, ln);
    end
    for (int n = 0; n < 4; n++) begin
      cmd(1, 0, key(n), 0, h, o, ln, rl);
      chk(h && ln == LW'(n), "all four cached");
    end
    // fifth list evicts the first
    cmd(0, 1, key(4), 2, h, o, held, rl);
    chk(o && held == 0, "fifth alloc reuses line 0");
    cmd(1, 0, key(0), 0, h, o, ln, rl);
    chk(!h, "oldest list evicted");
    cmd(1, 0, key(1), 0, h, o, ln, rl);
    chk(h, "second list still cached");
    // line 0 is being filled: allocations wrap round to it and fail
    for (int n = 5; n < 8; n++) begin
      cmd(1, 1, key(n), 2, h, o, ln, rl);
      fill(1, ln, n, 2);
      do_commit(1, ln);
    end
    cmd(2, 1, key(9), 2, h, o, ln, rl);
    chk(!o, "alloc onto a line being filled fails");
    fill(0, held, 4, 2);
    do_commit(0, held);
    cmd(2, 0, key(4), 0, h, o, ln, rl);
    chk(h && ln == held, "late commit still lands");
    // contention: all threads at once, rotation
    req = '1; req_alloc = '0;
    for (int t = 0; t < NT; t++) req_key[t] = key(1);
    begin
      logic [NT-1:0] seen;
      seen = '0;
      for (int c = 0; c < NT; c++) begin
        #0.5;
        chk($onehot(gnt), "one grant per cycle");
        seen |= gnt;
        @(negedge clk);
      end
      chk(seen == '1, "every thread granted within NT cycles");
    end
    req = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
