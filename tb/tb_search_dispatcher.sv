// tb_search_dispatcher: feeds vids and end-of-row tokens to the dispatcher
// with three searching threads that are randomly busy. Checks that every vid
// reaches exactly one ready thread with the right row number, that end
// tokens advance the row and pulse row_done, that with all threads ready a
// vid is handed out every cycle in strict rotation, and that clear resets
// the row number.
module tb_search_dispatcher;
  import gstore_pkg::*;
  localparam int NS = 3;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear = 0, in_valid = 0, in_ready;
  tok_t in_tok = '0;
  logic [NS-1:0] s_valid, s_ready = '0;
  logic [VID_W-1:0] s_vid;
  logic [ROW_W-1:0] s_row;
  logic row_done;

  search_dispatcher #(.NS(NS)) dut (.*);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int row = 0, last = -1, busy_pct = 50;

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      if (i == 1500) busy_pct = 0;
      in_valid = ($urandom_range(0, 3) != 0);
      in_tok   = ($urandom_range(0, 7) == 0) ? '{eol: 1'b1, vid: '0}
                                              : '{eol: 1'b0, vid: $urandom};
      for (int s = 0; s < NS; s++) s_ready[s] = ($urandom_range(0, 99) >= busy_pct);
      #0.5;
      chk($onehot0(s_valid), "one thread at a time");
      chk((s_valid & ~s_ready) == '0, "only ready threads");
      chk(row_done == (in_valid && in_tok.eol), "row_done");
      if (in_valid && !in_tok.eol) begin
        chk((s_valid != '0) == (s_ready != '0), "vid handed out when a thread is ready");
        chk(in_ready == (s_ready != '0), "in_ready");
        chk(s_vid == in_tok.vid && s_row == ROW_W'(row), "vid and row");
        if (busy_pct == 0) begin
          int cur;
          cur = $clog2(s_valid);
          if (last >= 0) chk(cur == (last + 1) % NS, "round robin");
          last = cur;
        end
      end else if (in_valid) begin
        chk(in_ready && s_valid == '0, "end token consumed alone");
      end else begin
        chk(s_valid == '0, "nothing without input");
      end
      @(negedge clk);
      if (in_valid && in_tok.eol) row++;
    end
    clear = 1;
    @(negedge clk);
    clear = 0;
    in_valid = 1; in_tok = '{eol: 1'b0, vid: 5}; s_ready = '1;
    #0.5;
    chk(s_row == '0, "clear resets row");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
