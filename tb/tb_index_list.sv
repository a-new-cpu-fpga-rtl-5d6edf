// tb_index_list: writes random triples for every predicate, then reads
// them back through all ports at once in random order; also checks that
// an out-of-range predicate reads as zero and that its write is ignored.
module tb_index_list;
  import gstore_pkg::*;
  localparam int NPR = 32, NR = 4;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en = 0;
  logic [PID_W-1:0] wr_pid = '0;
  idx_entry_t wr_entry = '0;
  logic [NR-1:0][PID_W-1:0] rd_pid = '0;
  idx_entry_t [NR-1:0] rd_entry;
  idx_entry_t model [NPR];

  index_list #(.NUM_PRED(NPR), .NR(NR)) dut (.*);

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int p = 0; p < NPR; p++) begin
      model[p] = '{ddr: DDR_W'($urandom), out_off: $urandom, in_off: $urandom};
      wr_en = 1; wr_pid = PID_W'(p); wr_entry = model[p];
      @(negedge clk);
    end
    wr_pid = PID_W'(NPR + 3); wr_entry = '1;
    @(negedge clk);
    wr_en = 0;
    for (int i = 0; i < 200; i++) begin
      for (int r = 0; r < NR; r++) rd_pid[r] = PID_W'($urandom_range(0, NPR - 1));
      #0.5;
      for (int r = 0; r < NR; r++) begin
        checks++;
        if (rd_entry[r] != model[rd_pid[r]]) begin
          failures++;
          $display("FAIL port %0d pid %0d", r, rd_pid[r]);
        end
      end
      @(negedge clk);
    end
    rd_pid[0] = PID_W'(NPR + 3);
    #0.5;
    checks++;
    if (rd_entry[0] != '0) begin failures++; $display("FAIL out-of-range pid"); end
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
