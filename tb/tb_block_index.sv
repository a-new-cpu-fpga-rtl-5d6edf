// tb_block_index: fills part of a reduced-size block index with random
// words, then checks random block numbers on both read ports against a
// model of the same bits.
module tb_block_index;
  import gstore_pkg::*;
  localparam int BLOCKS = 4096, NR = 2, WORDS = BLOCKS / BIDX_WW;
  logic clk = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0, ones = 0, zeros = 0;

  logic wr_en = 0;
  logic [$clog2(WORDS)-1:0] wr_addr = '0;
  logic [BIDX_WW-1:0] wr_data = '0;
  logic [NR-1:0][$clog2(BLOCKS)-1:0] rd_block = '0;
  logic [NR-1:0] rd_bit;
  logic [BIDX_WW-1:0] model [WORDS];

  block_index #(.BLOCKS(BLOCKS), .NR(NR)) dut (.*);

  initial begin
    @(negedge clk);
    for (int w = 0; w < WORDS; w++) begin
      model[w] = {$urandom, $urandom} & {$urandom, $urandom};
      wr_en = 1; wr_addr = w[$clog2(WORDS)-1:0]; wr_data = model[w];
      @(negedge clk);
    end
    wr_en = 0;
    for (int i = 0; i < 1000; i++) begin
      for (int r = 0; r < NR; r++) rd_block[r] = $urandom_range(0, BLOCKS - 1);
      #0.5;
      for (int r = 0; r < NR; r++) begin
        logic exp_bit;
        exp_bit = model[rd_block[r] / BIDX_WW][rd_block[r] % BIDX_WW];
        if (exp_bit) ones++; else zeros++;
        checks++;
        if (rd_bit[r] != exp_bit) begin
          failures++;
          $display("FAIL block %0d port %0d", rd_block[r], r);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (ones == 0 || zeros == 0) failures++;
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
