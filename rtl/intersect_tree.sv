// intersect_tree: binary tree of intersect_node units that finds the
// elements common to the K lists of one CLR row, bottom-up.
//
// Streams are numbered heap-fashion: leaves are streams 0..K-1, node n
// reads streams 2n and 2n+1 and drives stream K+n; the last node drives the
// root. Every node works every cycle, so sibling pairs are intersected in
// parallel. Only leaves 0..nlists-1 carry lists in a step; a node whose
// right subtree has no leaf in use forwards its left input unchanged.
// K must be a power of two (at least 2). Latency is one cycle per level.
module intersect_tree
  import gstore_pkg::*;
#(
  parameter int unsigned K = NUM_DDR,
  localparam int unsigned SW = $clog2(K)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [SW:0]      nlists,
  input  logic [K-1:0]     leaf_valid,
  output logic [K-1:0]     leaf_ready,
  input  tok_t [K-1:0]     leaf_tok,
  output logic             root_valid,
  input  logic             root_ready,
  output tok_t             root_tok
);
  localparam int unsigned NS = 2*K - 1;

  // Lowest leaf below stream s.
  function automatic int unsigned leftmost(int unsigned s);
    int unsigned x;
    x = s;
    while (x >= K) x = 2*(x - K);
    return x;
  endfunction

  logic [NS-1:0] s_valid, s_ready;
  tok_t [NS-1:0] s_tok;

  assign s_valid[K-1:0] = leaf_valid;
  assign s_tok[K-1:0]   = leaf_tok;
  assign leaf_ready     = s_ready[K-1:0];

  for (genvar n = 0; n < K-1; n++) begin : g_node
    localparam int unsigned RL = leftmost(2*n + 1);
    intersect_node u_node (
      .clk, .rst,
      .pass_a  (nlists <= (SW+1)'(RL)),
      .a_valid (s_valid[2*n]),
      .a_ready (s_ready[2*n]),
      .a_tok   (s_tok[2*n]),
      .b_valid (s_valid[2*n+1]),
      .b_ready (s_ready[2*n+1]),
      .b_tok   (s_tok[2*n+1]),
      .y_valid (s_valid[K+n]),
      .y_ready (s_ready[K+n]),
      .y_tok   (s_tok[K+n])
    );
  end

  assign root_valid     = s_valid[NS-1];
  assign root_tok       = s_tok[NS-1];
  assign s_ready[NS-1]  = root_ready;

  if (K < 2 || (K & (K-1)) != 0) begin : g_bad_k
    $error("intersect_tree: K must be a power of two, at least 2");
  end
endmodule
