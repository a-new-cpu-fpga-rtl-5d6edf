// tb_result_writer: two searching threads offer random results while the
// DRAM write port is randomly ready (and stalled for a long stretch so the
// output buffer fills). Checks that every offered result is written exactly
// once, that at most one is taken per cycle, that results are written to
// consecutive addresses from res_base, that the count matches, that a full
// buffer stalls the inputs, and that clear restarts the addresses.
module tb_result_writer;
  import gstore_pkg::*;
  localparam int NS = 2, OD = 16;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear = 0;
  logic [ADDR_W-1:0] res_base = 32'h1000;
  logic [NS-1:0] in_valid = '0, in_ready;
  result_t [NS-1:0] in_res = '0;
  logic w_valid, w_ready = 0;
  logic [ADDR_W-1:0] w_addr;
  result_t w_data;
  logic [31:0] count;
  logic idle, ev_stall;

  result_writer #(.NS(NS), .OUT_DEPTH(OD)) dut (.*);

  int pending [longint];
  logic [NS-1:0] acc;
  int n_sent = 0, n_got = 0, n_stall = 0;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      for (int s = 0; s < NS; s++)
        if (!in_valid[s] && $urandom_range(0, 2) == 0) begin
          in_valid[s] = 1;
          in_res[s] = '{row: n_sent, vid: $urandom};
          n_sent++;
        end
      w_ready = (i > 500 && i < 800) ? 1'b0 : ($urandom_range(0, 3) != 0);
      #0.5;
      chk($onehot0(in_ready), "one result per cycle");
      if (ev_stall) n_stall++;
      if (w_valid && w_ready) begin
        longint key;
        key = (longint'(w_data.row) << 32) | w_data.vid;
        chk(w_addr == res_base + n_got, "consecutive addresses");
        chk(pending.exists(key), "written result was offered");
        pending.delete(key);
        n_got++;
      end
      acc = in_valid & in_ready;
      for (int s = 0; s < NS; s++)
        if (acc[s])
          pending[(longint'(in_res[s].row) << 32) | in_res[s].vid] = 1;
      @(negedge clk);
      in_valid = in_valid & ~acc;
    end
    in_valid = '0;
    w_ready = 1;
    while (!idle) begin
      #0.5;
      if (w_valid) begin
        pending.delete((longint'(w_data.row) << 32) | w_data.vid);
        n_got++;
      end
      @(negedge clk);
    end
    chk(pending.size() == 0, "all results written");
    chk(count == n_got, "count");
    chk(n_stall > 0, "buffer filled");
    clear = 1;
    @(negedge clk);
    clear = 0;
    chk(count == 0 && w_addr == res_base, "clear");
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
