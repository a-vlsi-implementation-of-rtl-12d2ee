// mot_leaf: leaf processing element lambda(ROW,COL) of the mesh of trees.
//
// A leaf holds one entry of the simplex tableau (resident datum) and a second word (tmp) for
// results that must not overwrite it, and knows its own row and column index. It is a leaf of
// row tree ROW and of column tree COL and talks to both.
//
// Codes come down either tree. Send codes act at once: one cycle after SENDUPROW (SENDUPCOL)
// arrives, the leaf puts a one-cycle packet with its datum and column (row) index on its row
// (column) upward link; SENDUPROWT and SENDUPCOLT do the same with tmp. Every other leaf code
// becomes the pending operation and waits for its operands. An operand is the datum of a
// BROADCAST or SENDDOWN packet that reaches the leaf; it is latched per tree, and a new pending
// code discards operands latched before it. When a pending operation has what it needs it runs
// once and the leaf returns to idle:
//   STORECOL   column operand whose index equals ROW -> datum
//   DIV        row operand -> tmp = operand / datum, or -1.0 if datum <= 0   (DIV_CYCLES)
//   SIMPLEDIV  row operand -> datum = datum / operand, unchanged if operand = 0 (DIV_CYCLES)
//   COMPUTE    row and column operands -> datum = datum - row * column      (1 cycle)
//   MULPOS     column operand -> tmp = datum * operand if datum < 0 and operand >= 0,
//              otherwise the largest positive number (greatest decrement rule)
//   SUB        column operand -> datum = datum - operand
//   MULROW     row operand -> tmp = datum * operand;  MULCOL likewise with the column operand
//   IDLE       cancels the pending operation
// The row and column indexes are parameters rather than loaded registers. Operand latching,
// the tmp word as the target of DIV and MULPOS, and a code from the column tree winning over
// one from the row tree in the same cycle are this implementation's choices; the operations
// themselves follow the design. Codes that arrive during a division are ignored.
module mot_leaf
  import mot_pkg::*;
#(
  parameter int ROW = 0,
  parameter int COL = 0
) (
  input  logic clk,
  input  logic rst_n,
  input  dn_t  rdn,    // from the parent in the row tree
  input  dn_t  cdn,    // from the parent in the column tree
  output up_t  rup,    // to the parent in the row tree
  output up_t  cup,    // to the parent in the column tree
  output data_t datum  // resident datum, for observation
);

  localparam idx_t MY_ROW = idx_t'(ROW);
  localparam idx_t MY_COL = idx_t'(COL);

  data_t tmp;
  op_e   pend;
  data_t ropnd, copnd;
  idx_t  cidx;
  logic  rflag, cflag;

  // the pending code of this cycle: column tree first
  logic  new_code;
  op_e   code;
  always_comb begin
    new_code = 1'b0;
    code     = OP_NOP;
    if (is_pending_op(cdn.op)) begin
      new_code = 1'b1; code = cdn.op;
    end else if (is_pending_op(rdn.op)) begin
      new_code = 1'b1; code = rdn.op;
    end
  end

  logic send_row, send_rowt, send_col, send_colt;
  assign send_row  = (rdn.op == OP_SENDUPROW)  || (cdn.op == OP_SENDUPROW);
  assign send_rowt = (rdn.op == OP_SENDUPROWT) || (cdn.op == OP_SENDUPROWT);
  assign send_col  = (rdn.op == OP_SENDUPCOL)  || (cdn.op == OP_SENDUPCOL);
  assign send_colt = (rdn.op == OP_SENDUPCOLT) || (cdn.op == OP_SENDUPCOLT);

  // divider
  logic  div_start, div_busy, div_done;
  data_t div_a, div_b, div_q;
  logic  div_is_div;    // DIV (result to tmp) rather than SIMPLEDIV
  logic  div_nonpos;    // DIV with a nonpositive resident datum

  mot_fxdiv u_div (
    .clk, .rst_n, .start(div_start), .a(div_a), .b(div_b),
    .busy(div_busy), .done(div_done), .q(div_q)
  );

  logic exec;
  assign exec = !new_code && !div_busy;

  always_comb begin
    div_start = 1'b0;
    div_a     = ropnd;
    div_b     = datum;
    if (exec && rflag) begin
      if (pend == OP_DIV) begin
        div_start = 1'b1;
        div_a     = ropnd;
        div_b     = (datum > 0) ? datum : FX_ONE;
      end else if (pend == OP_SIMPLEDIV && ropnd != '0) begin
        div_start = 1'b1;
        div_a     = datum;
        div_b     = ropnd;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      datum <= '0; tmp <= '0; pend <= OP_NOP;
      ropnd <= '0; copnd <= '0; cidx <= '0; rflag <= 1'b0; cflag <= 1'b0;
      rup <= UP_NONE; cup <= UP_NONE;
      div_is_div <= 1'b0; div_nonpos <= 1'b0;
    end else begin
      // send codes
      rup <= UP_NONE;
      cup <= UP_NONE;
      if (send_row)  rup <= '{valid: 1'b1, data: datum, idx: MY_COL};
      if (send_rowt) rup <= '{valid: 1'b1, data: tmp,   idx: MY_COL};
      if (send_col)  cup <= '{valid: 1'b1, data: datum, idx: MY_ROW};
      if (send_colt) cup <= '{valid: 1'b1, data: tmp,   idx: MY_ROW};

      // pending operation
      if (new_code) begin
        pend  <= (code == OP_IDLE) ? OP_NOP : code;
        rflag <= 1'b0;
        cflag <= 1'b0;
      end else if (exec) begin
        unique case (pend)
          OP_STORECOL: if (cflag) begin
            cflag <= 1'b0;
            if (cidx == MY_ROW) begin
              datum <= copnd;
              pend  <= OP_NOP;
            end
          end
          OP_DIV: if (rflag) begin
            div_is_div <= 1'b1;
            div_nonpos <= (datum <= 0);
            rflag      <= 1'b0;
            pend       <= OP_NOP;
          end
          OP_SIMPLEDIV: if (rflag) begin
            div_is_div <= 1'b0;
            div_nonpos <= 1'b0;
            rflag      <= 1'b0;
            pend       <= OP_NOP;
          end
          OP_COMPUTE: if (rflag && cflag) begin
            datum <= datum - fx_mul(ropnd, copnd);
            rflag <= 1'b0; cflag <= 1'b0; pend <= OP_NOP;
          end
          OP_MULPOS: if (cflag) begin
            tmp   <= (datum < 0 && copnd >= 0) ? fx_mul(datum, copnd) : DATA_MAX;
            cflag <= 1'b0; pend <= OP_NOP;
          end
          OP_SUB: if (cflag) begin
            datum <= datum - copnd;
            cflag <= 1'b0; pend <= OP_NOP;
          end
          OP_MULROW: if (rflag) begin
            tmp   <= fx_mul(datum, ropnd);
            rflag <= 1'b0; pend <= OP_NOP;
          end
          OP_MULCOL: if (cflag) begin
            tmp   <= fx_mul(datum, copnd);
            cflag <= 1'b0; pend <= OP_NOP;
          end
          default: ;
        endcase
      end

      // operands arriving this cycle
      if (rdn.op == OP_BROADCAST || rdn.op == OP_SENDDOWN) begin
        ropnd <= rdn.data;
        rflag <= 1'b1;
      end
      if (cdn.op == OP_BROADCAST || cdn.op == OP_SENDDOWN) begin
        copnd <= cdn.data;
        cidx  <= cdn.idx;
        cflag <= 1'b1;
      end

      // division result
      if (div_done) begin
        if (div_is_div) tmp   <= div_nonpos ? FX_M1 : div_q;
        else            datum <= div_q;
      end
    end
  end

endmodule
