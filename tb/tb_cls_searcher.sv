// tb_cls_searcher: one searching thread against a model CLS of 8 words and
// a block index with blocks 1, 4 and 6 empty. Random vids are offered with
// random memory latency and result back-pressure. Checks that ids in empty
// blocks are dropped in the cycle they are offered with no DRAM read, that
// other ids cause exactly one read of word cls_base + vid / 512, and that
// exactly the ids whose CLS bit is one come out, with their row numbers.
module tb_cls_searcher;
  import gstore_pkg::*;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic [ADDR_W-1:0] cls_base = 32'h200;
  logic task_valid = 0, task_ready;
  logic [VID_W-1:0] task_vid = '0;
  logic [ROW_W-1:0] task_row = '0;
  logic [VID_W-CLS_LOG-1:0] bidx_block;
  logic bidx_bit;
  logic m_req_valid, m_req_ready = 0, m_rsp_valid = 0, m_rsp_ready;
  logic [ADDR_W-1:0] m_req_addr;
  logic [CLS_W-1:0] m_rsp_data = '0;
  logic res_valid, res_ready = 0;
  result_t res;
  logic ev_skip, ev_read, ev_reject;

  cls_searcher dut (.*);

  logic [CLS_W-1:0] cls [8];
  logic [7:0] bidx = 8'b1010_1101;
  assign bidx_bit = bidx[bidx_block[2:0]];

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int n_skip = 0, n_hit = 0, n_rej = 0;

  initial begin
    for (int w = 0; w < 8; w++)
      for (int b = 0; b < CLS_W; b++) cls[w][b] = bidx[w] && ($urandom_range(0, 1) == 1);
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      logic [VID_W-1:0] v;
      logic [ROW_W-1:0] r;
      int reads;
      v = $urandom_range(0, 8 * CLS_W - 1);
      r = $urandom;
      task_valid = 1; task_vid = v; task_row = r;
      #0.5;
      chk(task_ready, "idle between tasks");
      chk(ev_skip == !bidx[v / CLS_W], "skip decision");
      @(negedge clk);
      task_valid = 0;
      if (!bidx[v / CLS_W]) begin
        n_skip++;
        chk(!m_req_valid && task_ready, "no read for an empty block");
        continue;
      end
      reads = 0;
      // serve one read with random latency, watch for the result
      while (!task_ready) begin
        m_req_ready = ($urandom_range(0, 1) == 1);
        res_ready   = ($urandom_range(0, 1) == 1);
        #0.5;
        if (m_req_valid && m_req_ready) begin
          reads++;
          chk(m_req_addr == cls_base + v / CLS_W, "CLS word address");
          @(negedge clk);
          m_req_ready = 0;
          repeat ($urandom_range(0, 4)) @(negedge clk);
          m_rsp_valid = 1; m_rsp_data = cls[v / CLS_W];
          @(negedge clk);
          m_rsp_valid = 0;
          continue;
        end
        if (res_valid) begin
          chk(res_valid == cls[v / CLS_W][v % CLS_W], "only ones pass");
          chk(res.vid == v && res.row == r, "result fields");
        end
        if (res_valid && res_ready) n_hit++;
        @(negedge clk);
      end
      chk(reads == 1, "exactly one CLS read");
      if (!cls[v / CLS_W][v % CLS_W]) n_rej++;
    end
    chk(n_skip > 0 && n_hit > 0 && n_rej > 0, "all outcomes seen");
    $display("skips %0d hits %0d rejects %0d", n_skip, n_hit, n_rej);
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
