// mot_pkg: types and constants shared by the mesh-of-trees simplex engine.
//
// Every link of a row or column tree is two one-way buses: a downward packet (operation code,
// datum, index) travelling from the host through the tree towards the leaves, and an upward
// packet (valid, datum, index) travelling from the leaves back to the host. The opcode, data
// and index buses are separate, so a code and its parameters travel in the same cycle.
//
// Numbers are signed two's-complement fixed point, DATA_W bits with FRAC_W fraction bits; an
// integer v is loaded as v << FRAC_W. Indexes are signed so that the value -1 returned by
// MINPOS when no nonnegative entry exists can be told from every real row or column index.
// The word sizes and the code values are this design's choice; the set of operations follows
// the node operations of the simplex mesh of trees, with the extra ones needed by the
// two-phase and revised methods.
package mot_pkg;

  localparam int DATA_W = 32;  // b, width of a datum
  localparam int FRAC_W = 16;  // fraction bits of a datum
  localparam int IDX_W  = 8;   // signed row/column index, meshes up to 128 per side

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [IDX_W-1:0]  idx_t;

  localparam data_t DATA_MAX = {1'b0, {(DATA_W-1){1'b1}}};
  localparam data_t FX_ONE   = data_t'(1) <<< FRAC_W;
  localparam data_t FX_M1    = -FX_ONE;            // -1.0 in fixed point
  localparam idx_t  IDX_M1   = '1;                 // index -1

  typedef enum logic [4:0] {
    OP_NOP        = 5'd0,
    // internal node operations
    OP_BROADCAST  = 5'd1,   // copy datum and index to both children
    OP_MIN        = 5'd2,   // upward: smaller datum with its index
    OP_MINPOS     = 5'd3,   // upward: smaller nonnegative datum, else -1 / index -1
    OP_SENDUP     = 5'd4,   // upward: bitwise OR of the children
    OP_SENDDOWN   = 5'd5,   // downward: route datum to the one leaf named by the index
    OP_SUM        = 5'd6,   // upward: sum of the children (two-phase / revised method)
    OP_SELNZ      = 5'd7,   // upward: right child if it is nonzero and left is zero, else left
    // leaf operations
    OP_STORECOL   = 5'd8,   // store datum from the column tree if its index is this row
    OP_SENDUPROW  = 5'd9,   // send resident datum and column index up the row tree
    OP_SENDUPCOL  = 5'd10,  // send resident datum and row index up the column tree
    OP_DIV        = 5'd11,  // tmp = row datum / resident, or -1 if resident <= 0
    OP_SIMPLEDIV  = 5'd12,  // resident = resident / row datum, if row datum /= 0
    OP_COMPUTE    = 5'd13,  // resident = resident - row datum * column datum
    OP_MULPOS     = 5'd14,  // tmp = resident * column datum if resident < 0 and datum >= 0,
                            // else the largest positive value (greatest decrement rule)
    OP_SUB        = 5'd15,  // resident = resident - column datum
    OP_MULROW     = 5'd16,  // tmp = resident * row datum
    OP_MULCOL     = 5'd17,  // tmp = resident * column datum
    OP_SENDUPROWT = 5'd18,  // send tmp and column index up the row tree
    OP_SENDUPCOLT = 5'd19,  // send tmp and row index up the column tree
    OP_IDLE       = 5'd20   // cancel a pending leaf operation
  } op_e;

  // downward packet: code plus its parameters
  typedef struct packed {
    op_e   op;
    data_t data;
    idx_t  idx;
  } dn_t;

  // upward packet: one-cycle pulse carrying a datum and its index
  typedef struct packed {
    logic  valid;
    data_t data;
    idx_t  idx;
  } up_t;

  localparam dn_t DN_NONE = '{op: OP_NOP, data: '0, idx: '0};
  localparam up_t UP_NONE = '{valid: 1'b0, data: '0, idx: '0};

  function automatic logic is_inode_op(op_e op);
    return op inside {OP_BROADCAST, OP_MIN, OP_MINPOS, OP_SENDUP, OP_SENDDOWN, OP_SUM, OP_SELNZ};
  endfunction

  // leaf operations that wait for an operand before they act
  function automatic logic is_pending_op(op_e op);
    return op inside {OP_STORECOL, OP_DIV, OP_SIMPLEDIV, OP_COMPUTE, OP_MULPOS, OP_SUB,
                      OP_MULROW, OP_MULCOL, OP_IDLE};
  endfunction

  // fixed-point product, truncated towards minus infinity
  function automatic data_t fx_mul(data_t a, data_t b);
    logic signed [2*DATA_W-1:0] p;
    p = a * b;
    return data_t'(p >>> FRAC_W);
  endfunction

endpackage
