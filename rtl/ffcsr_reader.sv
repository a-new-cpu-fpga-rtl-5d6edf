// ffcsr_reader: one FFCSR reading thread.
//
// A task names a list slot (leaf of the intersection tree) and a list key
// (predicate, direction, offset id). The thread
//   1. asks the shared list cache for the key; on a hit it streams the
//      cached words to its slot's buffer and skips DRAM entirely;
//   2. on a miss it takes the predicate's index-list entry (DDR bank,
//      out/in offset-list start), reads offset[start+oid] and
//      offset[start+oid+1] from that bank, which bound the list in the
//      bank's adjacency region;
//   3. claims a cache line if the list fits one, then streams the list
//      from DRAM with up to MAX_OUT reads in flight, writing each word to the
//      slot buffer (and to the cache line);
//   4. closes the list with an end-of-list token and commits the line.
// Offsets are absolute word addresses on the bank, so list i spans
// [offset[i], offset[i+1]). This layout, the two-read offset fetch, the
// memory handshake (valid/ready request, valid/ready in-order response) and
// the read-ahead depth are this design's choices; the cache-before-DRAM
// order follows the kernel's description. The thread accepts a new task
// only when idle (task_ready).
module ffcsr_reader
  import gstore_pkg::*;
#(
  parameter int unsigned K        = NUM_DDR,
  parameter int unsigned LINES    = 16,
  parameter int unsigned LINE_LEN = 64,
  parameter int unsigned MAX_OUT  = 8,
  localparam int unsigned SW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned LW = $clog2(LINES),
  localparam int unsigned IW = $clog2(LINE_LEN),
  localparam int unsigned NW = $clog2(LINE_LEN + 1)
) (
  input  logic              clk,
  input  logic              rst,
  // task from the CLR dispatcher
  input  logic              task_valid,
  output logic              task_ready,
  input  logic [SW-1:0]     task_slot,
  input  list_key_t         task_key,
  // index list read port
  output logic [PID_W-1:0]  idx_pid,
  input  idx_entry_t        idx_entry,
  // cache command port
  output logic              c_req,
  output logic              c_alloc,
  output list_key_t         c_key,
  output logic [NW-1:0]     c_len,
  input  logic              c_gnt,
  input  logic              c_hit,
  input  logic              c_ok,
  input  logic [LW-1:0]     c_line,
  input  logic [NW-1:0]     c_rsp_len,
  output logic [LW-1:0]     c_rd_line,
  output logic [IW-1:0]     c_rd_idx,
  input  logic [VID_W-1:0]  c_rd_data,
  output logic              c_wr_en,
  output logic [LW-1:0]     c_wr_line,
  output logic [IW-1:0]     c_wr_idx,
  output logic [VID_W-1:0]  c_wr_data,
  output logic              c_commit,
  output logic [LW-1:0]     c_commit_line,
  // DRAM read port
  output logic              m_req_valid,
  input  logic              m_req_ready,
  output logic [DDR_W-1:0]  m_req_bank,
  output logic [ADDR_W-1:0] m_req_addr,
  input  logic              m_rsp_valid,
  output logic              m_rsp_ready,
  input  logic [VID_W-1:0]  m_rsp_data,
  // list tokens to the slot buffer
  output logic              o_valid,
  input  logic              o_ready,
  output logic [SW-1:0]     o_slot,
  output tok_t              o_tok,
  // events
  output logic              ev_hit,
  output logic              ev_miss,
  output logic              ev_alloc_fail
);
  typedef enum logic [3:0] {
    S_IDLE, S_LOOKUP, S_OFF0, S_OFF0_W, S_OFF1, S_OFF1_W,
    S_ALLOC, S_STREAM, S_CSTREAM, S_EOL
  } state_e;

  localparam int unsigned OW = $clog2(MAX_OUT + 1);

  state_e            state;
  logic [SW-1:0]     slot;
  list_key_t         key;
  logic [DDR_W-1:0]  bank;
  logic [ADDR_W-1:0] off_addr;
  logic [ADDR_W-1:0] beg_addr, end_addr, nxt_addr;
  logic [ADDR_W-1:0] len, rcv;
  logic [OW-1:0]     outst;
  logic              fill;
  logic [LW-1:0]     line;

  logic issue, accept;

  assign task_ready = (state == S_IDLE);
  assign idx_pid    = task_key.pid;
  assign o_slot     = slot;

  assign c_key         = key;
  assign c_len         = NW'(len);
  assign c_rd_line     = line;
  assign c_rd_idx      = IW'(rcv);
  assign c_wr_line     = line;
  assign c_wr_idx      = IW'(rcv);
  assign c_wr_data     = m_rsp_data;
  assign c_commit_line = line;
  assign m_req_bank    = bank;

  always_comb begin
    c_req       = 1'b0;
    c_alloc     = 1'b0;
    m_req_valid = 1'b0;
    m_req_addr  = '0;
    m_rsp_ready = 1'b0;
    o_valid     = 1'b0;
    o_tok       = '0;
    c_wr_en     = 1'b0;
    c_commit    = 1'b0;
    issue       = 1'b0;
    accept      = 1'b0;
    unique case (state)
      S_LOOKUP: c_req = 1'b1;
      S_ALLOC: begin
        c_req   = 1'b1;
        c_alloc = 1'b1;
      end
      S_OFF0: begin
        m_req_valid = 1'b1;
        m_req_addr  = off_addr;
      end
      S_OFF1: begin
        m_req_valid = 1'b1;
        m_req_addr  = off_addr + 1'b1;
      end
      S_OFF0_W, S_OFF1_W: m_rsp_ready = 1'b1;
      S_STREAM: begin
        m_req_valid = (nxt_addr != end_addr) && (outst != OW'(MAX_OUT));
        m_req_addr  = nxt_addr;
        issue       = m_req_valid && m_req_ready;
        m_rsp_ready = o_ready;
        o_valid     = m_rsp_valid;
        o_tok       = '{eol: 1'b0, vid: m_rsp_data};
        accept      = m_rsp_valid && o_ready;
        c_wr_en     = accept && fill;
      end
      S_CSTREAM: begin
        o_valid = 1'b1;
        o_tok   = '{eol: 1'b0, vid: c_rd_data};
      end
      S_EOL: begin
        o_valid  = 1'b1;
        o_tok    = '{eol: 1'b1, vid: '0};
        c_commit = o_ready && fill;
      end
      default: ;
    endcase
  end

  assign ev_hit        = (state == S_LOOKUP) && c_gnt && c_hit;
  assign ev_miss       = (state == S_LOOKUP) && c_gnt && !c_hit;
  assign ev_alloc_fail = (state == S_ALLOC) && c_gnt && !c_ok;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      slot     <= '0;
      key      <= '0;
      bank     <= '0;
      off_addr <= '0;
      beg_addr <= '0;
      end_addr <= '0;
      nxt_addr <= '0;
      len      <= '0;
      rcv      <= '0;
      outst    <= '0;
      fill     <= 1'b0;
      line     <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (task_valid) begin
          slot     <= task_slot;
          key      <= task_key;
          bank     <= idx_entry.ddr;
          off_addr <= ((task_key.dir == DIR_IN) ? idx_entry.in_off : idx_entry.out_off)
                      + ADDR_W'(task_key.oid);
          fill     <= 1'b0;
          rcv      <= '0;
          state    <= S_LOOKUP;
        end
        S_LOOKUP: if (c_gnt) begin
          if (c_hit) begin
            line  <= c_line;
            len   <= ADDR_W'(c_rsp_len);
            state <= S_CSTREAM;
          end else begin
            state <= S_OFF0;
          end
        end
        S_OFF0:   if (m_req_ready) state <= S_OFF0_W;
        S_OFF0_W: if (m_rsp_valid) begin
          beg_addr <= m_rsp_data;
          state    <= S_OFF1;
        end
        S_OFF1:   if (m_req_ready) state <= S_OFF1_W;
        S_OFF1_W: if (m_rsp_valid) begin
          end_addr <= m_rsp_data;
          nxt_addr <= beg_addr;
          len      <= m_rsp_data - beg_addr;
          outst    <= '0;
          if (m_rsp_data == beg_addr)
            state <= S_EOL;
          else if (m_rsp_data - beg_addr <= ADDR_W'(LINE_LEN))
            state <= S_ALLOC;
          else
            state <= S_STREAM;
        end
        S_ALLOC: if (c_gnt) begin
          fill  <= c_ok;
          line  <= c_line;
          state <= S_STREAM;
        end
        S_STREAM: begin
          if (issue) nxt_addr <= nxt_addr + 1'b1;
          outst <= outst + OW'(issue) - OW'(accept);
          if (accept) begin
            rcv <= rcv + 1'b1;
            if (rcv + 1'b1 == len) state <= S_EOL;
          end
        end
        S_CSTREAM: if (o_ready) begin
          rcv <= rcv + 1'b1;
          if (rcv + 1'b1 == len) state <= S_EOL;
        end
        S_EOL: if (o_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // A response may only arrive for a request that was issued.
  a_no_spurious_rsp: assert property (@(posedge clk) disable iff (rst)
    (state == S_STREAM && m_rsp_valid) |-> (outst != '0));
endmodule
