// tb_clr_dispatcher: rows of four offset ids (with deliberate collisions
// of oid mod 4) are fed to the dispatcher for nlists = 4, 3 and 1; four
// model threads stay busy for a random time after each task. Checks that
// every slot in use is issued exactly once per row with the slot's
// predicate and direction and the row's oid, that unused slots are never
// issued, that a slot goes to thread oid mod 4 whenever that thread is free,
// that redirects happen only when it is not, and that a slot is never
// given to a thread while another thread still reads that slot's previous
// list (so each slot buffer stays in row order). It also requires that the
// lists of consecutive rows overlapped at least once.
module tb_clr_dispatcher;
  import gstore_pkg::*;
  localparam int K = 4, NT = 4, SW = 2;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic [SW:0] nlists = 3'd4;
  edge_sel_t [K-1:0] sel;
  logic row_valid = 0, row_ready;
  logic [K-1:0][VID_W-1:0] row_oid = '0;
  logic [NT-1:0] task_valid, task_ready;
  logic [NT-1:0][SW-1:0] task_slot;
  list_key_t [NT-1:0] task_key;
  logic busy, ev_redirect;

  clr_dispatcher #(.K(K), .NT(NT)) dut (.*);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // model threads
  int left [NT];
  int own [NT];
  int n_overlap = 0;
  assign task_ready[0] = (left[0] == 0);
  assign task_ready[1] = (left[1] == 0);
  assign task_ready[2] = (left[2] == 0);
  assign task_ready[3] = (left[3] == 0);

  logic [K-1:0][VID_W-1:0] cur_row;
  logic [K-1:0] issued;
  int rows_done = 0, n_redirect = 0, n_pref = 0;

  always @(posedge clk) if (!rst) begin
    bit any_pref_missed;
    any_pref_missed = 0;
    for (int t = 0; t < NT; t++) begin
      if (left[t] > 0) left[t] <= left[t] - 1;
      if (task_valid[t]) begin
        int j;
        j = task_slot[t];
        chk(task_ready[t], "task only to a free thread");
        chk(j < int'(nlists), "only slots in use");
        chk(!issued[j], "slot issued once");
        chk(task_key[t].oid == cur_row[j] && task_key[t].pid == sel[j].pid &&
            task_key[t].dir == sel[j].dir, "task key");
        for (int u = 0; u < NT; u++)
          if (u != t && left[u] > 0 && own[u] == j) chk(1'b0, "slot still being read by another thread");
        for (int u = 0; u < NT; u++)
          if (u != t && left[u] > 1 && !issued[own[u]]) n_overlap++;
        issued[j] = 1'b1;
        own[t] = j;
        left[t] <= $urandom_range(1, 6);
        if (t == int'(cur_row[j] % NT)) n_pref++;
        else if (task_ready[cur_row[j] % NT]) begin
          // preferred thread was free: only a same-cycle collision excuses it
          bit taken_by_other;
          taken_by_other = 0;
          for (int u = 0; u < NT; u++)
            if (u != t && task_valid[u] && u == int'(cur_row[j] % NT)) taken_by_other = 1;
          chk(taken_by_other, "preferred thread used when free");
        end
      end
    end
    if (ev_redirect) n_redirect++;
  end

  initial begin
    for (int j = 0; j < K; j++) begin
      sel[j].pid = PID_W'(10 + j);
      sel[j].dir = dir_e'(j % 2);
    end
    for (int t = 0; t < NT; t++) begin left[t] = 0; own[t] = 0; end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int ph = 0; ph < 3; ph++) begin
      nlists = (ph == 0) ? 3'd4 : (ph == 1) ? 3'd3 : 3'd1;
      for (int r = 0; r < 25; r++) begin
        logic [K-1:0][VID_W-1:0] row;
        for (int j = 0; j < K; j++) row[j] = $urandom_range(0, 9);
        row_valid = 1; row_oid = row;
        while (!row_ready) @(negedge clk);
        @(negedge clk);
        row_valid = 0;
        cur_row = row;
        issued = '0;
        // wait until every slot of the row has been issued
        while (busy) begin
          @(negedge clk);
        end
        chk(issued == K'((1 << nlists) - 1), "all slots in use issued");
        rows_done++;
      end
    end
    chk(n_redirect > 0 && n_pref > 0, "both preferred and redirected dispatch");
    chk(n_overlap > 0, "rows overlapped");
    $display("preferred %0d redirected %0d", n_pref, n_redirect);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
