// tb_intersect_tree: drives the four leaves of the intersection tree with
// random sorted lists (row after row, random valid gaps, random back-
// pressure at the root) for nlists = 4, 3, 2 and 1, and compares the root
// stream with intersections computed here. A final run with identical
// lists and no stalls checks the rate: L common elements must leave the
// root within L + 1 + 2 * depth cycles, one comparison per node per cycle.
module tb_intersect_tree;
  import gstore_pkg::*;
  localparam int K = 4;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0]    nlists = 3'd4;
  logic [K-1:0]  leaf_valid = '0, leaf_ready;
  tok_t [K-1:0]  leaf_tok = '0;
  logic          root_valid, root_ready = 0;
  tok_t          root_tok;
  int            stall_pct = 30;

  intersect_tree #(.K(K)) dut (.*);

  tok_t leafq [K][$];
  tok_t expq [$];
  int   n_out = 0;

  typedef int unsigned ulist_t[$];
  function automatic ulist_t rand_list(int unsigned dens);
    ulist_t l;
    for (int unsigned v = 0; v < 60; v++)
      if ($urandom_range(0, 99) < dens) l.push_back(v * 3);
    return l;
  endfunction

  task automatic add_row(int nl, bit same);
    ulist_t acc, l;
    for (int j = 0; j < nl; j++) begin
      if (!same || j == 0) l = rand_list($urandom_range(0, 9) == 0 ? 0 : 60);
      foreach (l[i]) leafq[j].push_back('{eol: 1'b0, vid: l[i]});
      leafq[j].push_back('{eol: 1'b1, vid: '0});
      if (j == 0) acc = l;
      else begin
        ulist_t nx;
        foreach (acc[i]) foreach (l[m]) if (l[m] == acc[i]) nx.push_back(acc[i]);
        acc = nx;
      end
    end
    foreach (acc[i]) expq.push_back('{eol: 1'b0, vid: acc[i]});
    expq.push_back('{eol: 1'b1, vid: '0});
  endtask

  // leaf drivers and root checker
  always @(posedge clk) if (!rst) begin
    for (int j = 0; j < K; j++)
      if (leaf_valid[j] && leaf_ready[j]) void'(leafq[j].pop_front());
    if (root_valid && root_ready) begin
      checks++;
      n_out++;
      if (expq.size() == 0 || root_tok != expq[0]) begin
        failures++;
        $display("FAIL root token %p", root_tok);
      end
      if (expq.size() > 0) void'(expq.pop_front());
    end
  end
  always @(negedge clk) begin
    for (int j = 0; j < K; j++) begin
      leaf_valid[j] = (leafq[j].size() > 0) && ($urandom_range(0, 99) >= stall_pct);
      leaf_tok[j]   = (leafq[j].size() > 0) ? leafq[j][0] : '0;
    end
    root_ready = ($urandom_range(0, 99) >= stall_pct);
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int nl = 4; nl >= 1; nl--) begin
      nlists = 3'(nl);
      for (int r = 0; r < 30; r++) add_row(nl, 1'b0);
      while (expq.size() > 0) @(negedge clk);
      repeat (4) @(negedge clk);
    end
    // rate check
    nlists = 3'd4;
    stall_pct = 0;
    begin
      ulist_t l;
      int t0, t1;
      for (int v = 0; v < 40; v++) l.push_back(v);
      for (int j = 0; j < K; j++) begin
        foreach (l[i]) leafq[j].push_back('{eol: 1'b0, vid: l[i]});
        leafq[j].push_back('{eol: 1'b1, vid: '0});
      end
      foreach (l[i]) expq.push_back('{eol: 1'b0, vid: l[i]});
      expq.push_back('{eol: 1'b1, vid: '0});
      t0 = $time;
      while (expq.size() > 0) @(negedge clk);
      t1 = $time;
      checks++;
      $display("40 common elements through the tree in %0d cycles", (t1 - t0) / 2);
      if ((t1 - t0) / 2 > 40 + 1 + 2 * 2) begin
        failures++;
        $display("FAIL rate");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
