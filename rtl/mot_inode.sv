// mot_inode: internal node of a row or column tree of the mesh of trees.
//
// Downward, a packet arriving from the parent is registered and copied to both children one
// cycle later (broadcast). A SENDDOWN packet is copied only to the child named by index bit
// [LEVELS-1-DEPTH], the bit that selects this level's branch on the path to the destination
// leaf; the other child gets an empty packet. Every internal-node code that passes through is
// also latched in the node's operation-code register (mode), which decides how the node
// combines the upward packets of its two children:
//   MIN     smaller datum and its index         MINPOS  smaller nonnegative datum, or -1 / -1
//   SENDUP  bitwise OR of the two children      SUM     sum of the data (index -1)
//   SELNZ   right child if it is nonzero and the left one is zero, otherwise the left child
// MIN, MINPOS and SUM ignore a child whose index is 0, so that the leaf in row 0 (column
// tree) or column 0 (row tree) takes no part; with no eligible child MIN returns the largest
// positive datum with index -1 and SUM returns 0. Ties in MIN and MINPOS go to the left
// child, i.e. to the lower index. The upward result is registered, so each level costs one
// cycle on the way up and one on the way down (T_C = 1). The upward valid bit is the OR of the
// children's; an idle node sends all zeroes.
//
// The five operations BROADCAST, MIN, MINPOS, SENDUP and SENDDOWN, the row/column-zero rule
// and the -1 result of MINPOS follow the design; SUM and SELNZ are the operations the
// two-phase method asks for. The valid bit, the one-cycle level time and bundling a code with
// its datum and index in one packet are choices of this implementation.
module mot_inode
  import mot_pkg::*;
#(
  parameter int LEVELS = 2,  // internal levels of the tree, log2 of its leaf count
  parameter int DEPTH  = 0   // this node's level, 0 at the root
) (
  input  logic clk,
  input  logic rst_n,
  input  dn_t  dn_in,     // from the parent (or the host at the root)
  output dn_t  dn_l,      // to the left child
  output dn_t  dn_r,      // to the right child
  input  up_t  up_l,      // from the left child
  input  up_t  up_r,      // from the right child
  output up_t  up_out     // to the parent (or the host at the root)
);

  localparam int RBIT = LEVELS - 1 - DEPTH;

  op_e mode;
  up_t up_nx;

  // downward path and operation-code register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dn_l <= DN_NONE;
      dn_r <= DN_NONE;
      mode <= OP_NOP;
    end else begin
      if (is_inode_op(dn_in.op)) mode <= dn_in.op;
      if (dn_in.op == OP_SENDDOWN) begin
        dn_l <= dn_in.idx[RBIT] ? DN_NONE : dn_in;
        dn_r <= dn_in.idx[RBIT] ? dn_in   : DN_NONE;
      end else begin
        dn_l <= dn_in;
        dn_r <= dn_in;
      end
    end
  end

  // upward combination
  always_comb begin
    logic el, er;  // child takes part in MIN / MINPOS / SUM
    up_nx = UP_NONE;
    up_nx.valid = up_l.valid | up_r.valid;
    el = up_l.valid && (up_l.idx != '0);
    er = up_r.valid && (up_r.idx != '0);
    unique case (mode)
      OP_MIN: begin
        if (el && (!er || up_l.data <= up_r.data)) begin
          up_nx.data = up_l.data;  up_nx.idx = up_l.idx;
        end else if (er) begin
          up_nx.data = up_r.data;  up_nx.idx = up_r.idx;
        end else begin
          up_nx.data = DATA_MAX;   up_nx.idx = IDX_M1;
        end
      end
      OP_MINPOS: begin
        el = el && (up_l.data >= 0);
        er = er && (up_r.data >= 0);
        if (el && (!er || up_l.data <= up_r.data)) begin
          up_nx.data = up_l.data;  up_nx.idx = up_l.idx;
        end else if (er) begin
          up_nx.data = up_r.data;  up_nx.idx = up_r.idx;
        end else begin
          up_nx.data = FX_M1;      up_nx.idx = IDX_M1;
        end
      end
      OP_SUM: begin
        up_nx.data = (el ? up_l.data : '0) + (er ? up_r.data : '0);
        up_nx.idx  = IDX_M1;
      end
      OP_SELNZ: begin
        if (up_r.valid && up_r.data != '0 && !(up_l.valid && up_l.data != '0)) begin
          up_nx.data = up_r.data;  up_nx.idx = up_r.idx;
        end else begin
          up_nx.data = up_l.valid ? up_l.data : '0;
          up_nx.idx  = up_l.valid ? up_l.idx  : '0;
        end
      end
      default: begin  // SENDUP, BROADCAST, SENDDOWN, NOP: logical OR of the children
        up_nx.data = up_l.data | up_r.data;
        up_nx.idx  = up_l.idx  | up_r.idx;
      end
    endcase
    if (!up_nx.valid) up_nx = UP_NONE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) up_out <= UP_NONE;
    else        up_out <= up_nx;
  end

endmodule
