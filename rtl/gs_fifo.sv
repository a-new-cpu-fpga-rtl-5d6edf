// gs_fifo: synchronous first-word-fall-through FIFO, the on-chip (BRAM)
// buffer used between the kernel's stages: adjacency-list buffers in front
// of the intersection tree, the CLR row buffer and the output buffer.
//
// Valid/ready on both sides. wr_ready is low when full; rd_valid is high
// when not empty and rd_data shows the oldest entry. A write and a read may
// happen in the same cycle. count gives the fill level. DEPTH must be a
// power of two. The storage is a plain array so a tool may map it to RAM.
module gs_fifo #(
  parameter int unsigned WIDTH = 33,
  parameter int unsigned DEPTH = 512
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_valid,
  output logic             wr_ready,
  input  logic [WIDTH-1:0] wr_data,
  output logic             rd_valid,
  input  logic             rd_ready,
  output logic [WIDTH-1:0] rd_data,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign wr_ready = (count != (AW+1)'(DEPTH));
  assign rd_valid = (count != '0);
  assign rd_data  = mem[rptr];
  assign do_wr    = wr_valid && wr_ready;
  assign do_rd    = rd_valid && rd_ready;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  if (DEPTH < 2 || (DEPTH & (DEPTH-1)) != 0) begin : g_bad_depth
    $error("gs_fifo: DEPTH must be a power of two");
  end
endmodule
