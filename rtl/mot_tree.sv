// mot_tree: one row tree or column tree of the mesh of trees.
//
// A complete binary tree of LEAVES-1 internal nodes (mot_inode) over LEAVES leaf ports. The
// nodes are numbered heap-style: node 1 is the root, node k has children 2k and 2k+1, and the
// leaf ports are positions LEAVES .. 2*LEAVES-1, so leaf port j is reached by following the
// bits of j from the most significant one, which is how SENDDOWN routes. The root's downward
// input and upward output are the host's link to the tree. A packet put on root_dn reaches the
// leaf ports LEVELS = log2(LEAVES) cycles later; a packet given at a leaf port reaches root_up
// LEVELS cycles later. The tree is the same for rows and columns; only the meaning of the index
// (column index in a row tree, row index in a column tree) differs.
module mot_tree
  import mot_pkg::*;
#(
  parameter int LEAVES = 4  // a power of two, at least 2
) (
  input  logic clk,
  input  logic rst_n,
  input  dn_t  root_dn,
  output up_t  root_up,
  output dn_t  leaf_dn [LEAVES],
  input  up_t  leaf_up [LEAVES]
);

  localparam int LEVELS = $clog2(LEAVES);

  dn_t dn_w [1:2*LEAVES-1];  // dn_w[k]: input of node k, or of leaf port k-LEAVES
  up_t up_w [1:2*LEAVES-1];  // up_w[k]: output of node k, or of leaf port k-LEAVES

  assign dn_w[1] = root_dn;
  assign root_up = up_w[1];

  for (genvar k = 1; k < LEAVES; k++) begin : g_node
    mot_inode #(.LEVELS(LEVELS), .DEPTH($clog2(k + 1) - 1)) u_node (
      .clk, .rst_n,
      .dn_in (dn_w[k]),
      .dn_l  (dn_w[2*k]),
      .dn_r  (dn_w[2*k+1]),
      .up_l  (up_w[2*k]),
      .up_r  (up_w[2*k+1]),
      .up_out(up_w[k])
    );
  end

  for (genvar j = 0; j < LEAVES; j++) begin : g_leaf
    assign leaf_dn[j]       = dn_w[LEAVES+j];
    assign up_w[LEAVES+j]   = leaf_up[j];
  end

  initial begin
    assert (LEAVES >= 2 && (LEAVES & (LEAVES - 1)) == 0)
      else $error("mot_tree: LEAVES must be a power of two, at least 2");
  end

endmodule
