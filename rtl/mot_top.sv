// mot_top: M x N mesh of trees that stores a simplex tableau and performs pivot steps.
//
// M*N leaves (mot_leaf) form an array; the leaves of row i are the leaves of row tree i and
// the leaves of column j the leaves of column tree j (mot_tree), so every leaf has two parents.
// The tableau is held one entry per leaf: -z in leaf (0,0), the reduced costs c_j in row 0,
// the right-hand side d_i in column 0 and a_ij elsewhere. The host drives the roots: row_dn[i]
// and col_dn[j] are the downward inputs of row tree i and column tree j, and row_up[i] and
// col_up[j] their upward outputs. A whole simplex step is a sequence of tree procedures the
// host issues through these ports (loading, pivot column and row selection, pivoting, output);
// the mesh itself has no central controller. `datum` exposes every resident datum for
// observation only.
//
// Timing: a packet on row_dn reaches the leaves log2(N) cycles later, one on col_dn log2(M)
// cycles later; a leaf answers a send code one cycle after it arrives, and the answer reaches
// the root of a row (column) tree log2(N) (log2(M)) cycles after that. M and N default to the
// 4 x 4 mesh used as the example of the structure; both must be powers of two.
module mot_top
  import mot_pkg::*;
#(
  parameter int M = 4,  // rows: constraints + 1
  parameter int N = 4   // columns: variables + 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  dn_t   row_dn [M],
  output up_t   row_up [M],
  input  dn_t   col_dn [N],
  output up_t   col_up [N],
  output data_t datum  [M][N]
);

  dn_t rleaf_dn [M][N];  // row tree i -> leaf (i,j)
  up_t rleaf_up [M][N];
  dn_t cleaf_dn [N][M];  // column tree j -> leaf (i,j)
  up_t cleaf_up [N][M];

  for (genvar i = 0; i < M; i++) begin : g_row
    mot_tree #(.LEAVES(N)) u_rt (
      .clk, .rst_n,
      .root_dn(row_dn[i]), .root_up(row_up[i]),
      .leaf_dn(rleaf_dn[i]), .leaf_up(rleaf_up[i])
    );
  end

  for (genvar j = 0; j < N; j++) begin : g_col
    mot_tree #(.LEAVES(M)) u_ct (
      .clk, .rst_n,
      .root_dn(col_dn[j]), .root_up(col_up[j]),
      .leaf_dn(cleaf_dn[j]), .leaf_up(cleaf_up[j])
    );
  end

  for (genvar i = 0; i < M; i++) begin : g_li
    for (genvar j = 0; j < N; j++) begin : g_lj
      mot_leaf #(.ROW(i), .COL(j)) u_leaf (
        .clk, .rst_n,
        .rdn  (rleaf_dn[i][j]),
        .cdn  (cleaf_dn[j][i]),
        .rup  (rleaf_up[i][j]),
        .cup  (cleaf_up[j][i]),
        .datum(datum[i][j])
      );
    end
  end

endmodule
