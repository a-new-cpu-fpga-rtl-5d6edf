// tb_clr_reader: a memory model with random acceptance and latency holds
// CLR rows; the reader is started for several passes of different lengths
// (including zero rows) while the consumer is randomly stalled. Checks that
// rows arrive in order and complete, that requests go to clr_base + r, that
// no more than DEPTH rows are ever requested or buffered ahead, and that
// busy falls after the last row.
module tb_clr_reader;
  import gstore_pkg::*;
  localparam int K = 4, D = 4;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, busy;
  logic [ADDR_W-1:0] clr_base = '0;
  logic [31:0] n_rows = '0;
  logic m_req_valid, m_req_ready = 0, m_rsp_valid = 0, m_rsp_ready;
  logic [ADDR_W-1:0] m_req_addr;
  logic [K-1:0][VID_W-1:0] m_rsp_data = '0;
  logic row_valid, row_ready = 0;
  logic [K-1:0][VID_W-1:0] row_oid;

  clr_reader #(.K(K), .DEPTH(D)) dut (.*);

  function automatic logic [K*VID_W-1:0] row_at(int unsigned a);
    return {a * 7, a * 5, a * 3, a};
  endfunction

  typedef struct { longint due; logic [K*VID_W-1:0] d; } q_t;
  q_t q [$];
  longint cyc = 0;
  int ahead = 0, max_ahead = 0, n_issued = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (m_rsp_valid && m_rsp_ready) void'(q.pop_front());
    if (m_req_valid && m_req_ready) begin
      q_t e;
      checks++;
      if (m_req_addr != clr_base + n_issued) begin failures++; $display("FAIL address"); end
      n_issued++;
      e.due = cyc + longint'($urandom_range(1, 6));
      e.d = row_at(m_req_addr);
      q.push_back(e);
    end
    m_req_ready <= ($urandom_range(0, 2) != 0);
    m_rsp_valid <= (q.size() > 0) && (q[0].due <= cyc);
    if (q.size() > 0) m_rsp_data <= q[0].d;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int pass = 0; pass < 4; pass++) begin
      automatic int n = (pass == 0) ? 30 : (pass == 1) ? 0 : (pass == 2) ? 1 : 17;
      automatic int got = 0;
      clr_base = 32'(1000 * (pass + 1));
      n_rows = n;
      n_issued = 0;
      start = 1;
      @(negedge clk);
      start = 0;
      while (busy || start) begin
        // rows requested but not yet consumed
        row_ready = ($urandom_range(0, 2) == 0);
        #0.5;
        ahead = n_issued - got;
        if (ahead > max_ahead) max_ahead = ahead;
        if (row_valid && row_ready) begin
          checks++;
          if (row_oid != row_at(clr_base + got)) begin failures++; $display("FAIL row %0d", got); end
          got++;
        end
        @(negedge clk);
      end
      checks++;
      if (got != n || n_issued != n) begin
        failures++;
        $display("FAIL pass %0d: %0d rows, %0d reads, %0d expected", pass, got, n_issued, n);
      end
    end
    checks++;
    if (max_ahead > D + 1 || max_ahead < 2) begin failures++; $display("FAIL read-ahead %0d", max_ahead); end
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
