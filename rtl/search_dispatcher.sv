// search_dispatcher: spreads the vertex ids leaving the intersection tree
// over NS CLS searching threads, one id per cycle, round-robin.
//
// The pointer starts at the thread after the last one served; the first
// ready thread from there takes the id. End-of-list tokens from the tree
// mark the end of a CLR row: they are consumed here, advance the row number
// that is attached to every id handed out, and pulse row_done. clear resets
// the row number at the start of a run. Attaching the row number (so that
// each result names the intermediate result it extends) is this design's
// choice.
module search_dispatcher
  import gstore_pkg::*;
#(
  parameter int unsigned NS = 2
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  clear,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  tok_t                  in_tok,
  output logic [NS-1:0]         s_valid,
  input  logic [NS-1:0]         s_ready,
  output logic [VID_W-1:0]      s_vid,
  output logic [ROW_W-1:0]      s_row,
  output logic                  row_done
);
  localparam int unsigned PW = (NS > 1) ? $clog2(NS) : 1;

  logic [PW-1:0]    ptr;
  logic [ROW_W-1:0] row;
  logic             found;
  logic [PW-1:0]    pick;

  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int i = 0; i < NS; i++) begin
      int unsigned t;
      t = (int'(ptr) + i) % NS;
      if (!found && s_ready[t]) begin
        found = 1'b1;
        pick  = PW'(t);
      end
    end
  end

  assign s_vid    = in_tok.vid;
  assign s_row    = row;
  assign in_ready = in_tok.eol || found;
  assign row_done = in_valid && in_tok.eol;

  always_comb begin
    s_valid = '0;
    if (in_valid && !in_tok.eol && found) s_valid[pick] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      ptr <= '0;
      row <= '0;
    end else if (in_valid) begin
      if (in_tok.eol) row <= row + 1'b1;
      else if (found) ptr <= PW'((int'(pick) + 1) % NS);
    end
  end
endmodule
