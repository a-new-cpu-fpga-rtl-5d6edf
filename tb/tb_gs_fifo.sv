// tb_gs_fifo: random pushes and pops against a queue model. Checks the
// data order, the count, wr_ready falling exactly at DEPTH entries and
// rd_valid falling exactly when empty, and simultaneous push and pop.
module tb_gs_fifo;
  localparam int W = 16, D = 8;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_valid = 0, rd_ready = 0;
  logic [W-1:0] wr_data = '0;
  logic wr_ready, rd_valid;
  logic [W-1:0] rd_data;
  logic [$clog2(D):0] count;
  logic [W-1:0] model [$];
  int saw_full = 0, saw_both = 0;

  gs_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      // phase-dependent bias so the FIFO both fills and drains
      automatic int bias = ((i / 200) % 2 == 0) ? 75 : 25;
      wr_valid = ($urandom_range(0, 99) < bias);
      rd_ready = ($urandom_range(0, 99) >= bias);
      wr_data  = W'($urandom);
      #0.5;
      chk(count == model.size(), "count");
      chk(wr_ready == (model.size() < D), "wr_ready");
      chk(rd_valid == (model.size() > 0), "rd_valid");
      if (model.size() > 0) chk(rd_data == model[0], "rd_data order");
      if (model.size() == D) saw_full++;
      if (wr_valid && wr_ready && rd_valid && rd_ready) saw_both++;
      @(posedge clk);
      if (rd_valid && rd_ready) void'(model.pop_front());
      if (wr_valid && wr_ready) model.push_back(wr_data);
      @(negedge clk);
    end
    chk(saw_full > 0, "never full");
    chk(saw_both > 0, "never push and pop together");
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
