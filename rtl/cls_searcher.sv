// cls_searcher: one CLS searching thread.
//
// It takes a (row, vid) pair when idle. In the same cycle it checks the
// block-index bit of vid's CLS block: if the block is empty the id is
// dropped at once. Otherwise it reads the CLS word holding bit vid from
// DRAM (address cls_base + vid / CLS_W) and tests that bit; a one sends the
// pair on to the result writer, a zero drops it. One DRAM read is in flight
// at a time. The word layout of the CLS (bit vid mod CLS_W of word
// vid / CLS_W) and the handshakes are this design's choices.
module cls_searcher
  import gstore_pkg::*;
#(
  localparam int unsigned BW = VID_W - CLS_LOG
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [ADDR_W-1:0] cls_base,
  input  logic              task_valid,
  output logic              task_ready,
  input  logic [VID_W-1:0]  task_vid,
  input  logic [ROW_W-1:0]  task_row,
  // block index read port
  output logic [BW-1:0]     bidx_block,
  input  logic              bidx_bit,
  // DRAM read port
  output logic              m_req_valid,
  input  logic              m_req_ready,
  output logic [ADDR_W-1:0] m_req_addr,
  input  logic              m_rsp_valid,
  output logic              m_rsp_ready,
  input  logic [CLS_W-1:0]  m_rsp_data,
  // results
  output logic              res_valid,
  input  logic              res_ready,
  output result_t           res,
  // events
  output logic              ev_skip,
  output logic              ev_read,
  output logic              ev_reject
);
  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT, S_OUT} state_e;

  state_e           state;
  logic [VID_W-1:0] vid;
  logic [ROW_W-1:0] row;

  assign task_ready  = (state == S_IDLE);
  assign bidx_block  = task_vid[VID_W-1:CLS_LOG];
  assign m_req_valid = (state == S_REQ);
  assign m_req_addr  = cls_base + ADDR_W'(vid[VID_W-1:CLS_LOG]);
  assign m_rsp_ready = (state == S_WAIT);
  assign res_valid   = (state == S_OUT);
  assign res         = '{row: row, vid: vid};

  assign ev_skip   = (state == S_IDLE) && task_valid && !bidx_bit;
  assign ev_read   = (state == S_REQ) && m_req_ready;
  assign ev_reject = (state == S_WAIT) && m_rsp_valid && !m_rsp_data[vid[CLS_LOG-1:0]];

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      vid   <= '0;
      row   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (task_valid && bidx_bit) begin
          vid   <= task_vid;
          row   <= task_row;
          state <= S_REQ;
        end
        S_REQ:  if (m_req_ready) state <= S_WAIT;
        S_WAIT: if (m_rsp_valid)
          state <= m_rsp_data[vid[CLS_LOG-1:0]] ? S_OUT : S_IDLE;
        S_OUT:  if (res_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
