// intersect_node: one node of the merge-based intersection tree.
//
// Inputs a and b are streams of ascending, duplicate-free lists, each list
// closed by an end-of-list token. Every cycle the node compares the two
// heads: the smaller one is dropped, equal ones are passed once, and when
// one side reaches its end the rest of the other side's list is dropped;
// when both reach their end, one end token is passed. Each pair of lists
// thus yields their intersection as one list, at up to one comparison per
// cycle. With pass_a set (a tree leaf or subtree that is not in use this
// step) the node simply forwards a and leaves b untouched. The output is a
// register with valid/ready. Sortedness of the inputs is this design's
// reading of the graph layout (ordered ids).
module intersect_node
  import gstore_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic pass_a,
  input  logic a_valid,
  output logic a_ready,
  input  tok_t a_tok,
  input  logic b_valid,
  output logic b_ready,
  input  tok_t b_tok,
  output logic y_valid,
  input  logic y_ready,
  output tok_t y_tok
);
  logic can_out, push;
  tok_t push_tok;

  assign can_out = !y_valid || y_ready;

  always_comb begin
    a_ready  = 1'b0;
    b_ready  = 1'b0;
    push     = 1'b0;
    push_tok = a_tok;
    if (pass_a) begin
      a_ready = can_out;
      push    = a_valid && can_out;
    end else if (a_valid && b_valid) begin
      if (a_tok.eol && b_tok.eol) begin
        a_ready = can_out;
        b_ready = can_out;
        push    = can_out;
      end else if (a_tok.eol) begin
        b_ready = 1'b1;
      end else if (b_tok.eol) begin
        a_ready = 1'b1;
      end else if (a_tok.vid < b_tok.vid) begin
        a_ready = 1'b1;
      end else if (b_tok.vid < a_tok.vid) begin
        b_ready = 1'b1;
      end else begin
        a_ready = can_out;
        b_ready = can_out;
        push    = can_out;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      y_valid <= 1'b0;
      y_tok   <= '0;
    end else if (can_out) begin
      y_valid <= push;
      if (push) y_tok <= push_tok;
    end
  end
endmodule
