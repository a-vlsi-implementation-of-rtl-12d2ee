// tb_mot_inode: self-checking test of one internal tree node (level 1 of a 3-level tree).
//
// Downward: BROADCAST copies to both children, SENDDOWN goes only to the child named by index
// bit 1 (this level's bit), each one cycle later, and the code is latched as the node's mode.
// Upward: for each mode (MIN, MINPOS, SENDUP, SUM, SELNZ) random child packets are applied
// and the registered result is compared, one cycle later, with a reference written here from
// the rules: row/column-zero children ignored by MIN, MINPOS and SUM, -1 / index -1 from
// MINPOS when no nonnegative datum exists, ties to the left, nothing sent when no child is
// valid.
module tb_mot_inode;
  import mot_pkg::*;

  logic clk = 0, rst_n = 0;
  dn_t  dn_in, dn_l, dn_r;
  up_t  up_l, up_r, up_out;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  mot_inode #(.LEVELS(3), .DEPTH(1)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic up_t ref_up(op_e mode, up_t l, up_t r);
    up_t o;
    bit el, er;
    o = UP_NONE;
    if (!l.valid && !r.valid) return o;
    o.valid = 1;
    el = l.valid && l.idx != 0;
    er = r.valid && r.idx != 0;
    case (mode)
      OP_MIN: begin
        if (el && er) o = (r.data < l.data) ? r : l;
        else if (el) o = l;
        else if (er) o = r;
        else begin o.data = DATA_MAX; o.idx = IDX_M1; end
      end
      OP_MINPOS: begin
        el = el && l.data >= 0;
        er = er && r.data >= 0;
        if (el && er) o = (r.data < l.data) ? r : l;
        else if (el) o = l;
        else if (er) o = r;
        else begin o.data = FX_M1; o.idx = IDX_M1; end
      end
      OP_SUM: begin
        o.data = 0;
        if (el) o.data += l.data;
        if (er) o.data += r.data;
        o.idx = IDX_M1;
      end
      OP_SELNZ: begin
        bit lnz, rnz;
        lnz = l.valid && l.data != 0;
        rnz = r.valid && r.data != 0;
        if (rnz && !lnz) o = r;
        else if (l.valid) o = l;
        else begin o.data = 0; o.idx = 0; end
      end
      default: begin
        o.data = (l.valid ? l.data : 0) | (r.valid ? r.data : 0);
        o.idx  = (l.valid ? l.idx : 0)  | (r.valid ? r.idx : 0);
      end
    endcase
    o.valid = 1;
    return o;
  endfunction

  function automatic up_t rnd_up();
    up_t u;
    u.valid = ($urandom_range(0, 4) != 0);
    case ($urandom_range(0, 3))
      0: u.data = 0;
      1: u.data = FX_M1;
      default: u.data = data_t'($urandom_range(0, 2000)) - 1000;
    endcase
    u.idx = idx_t'($urandom_range(0, 3));
    if (!u.valid) u = UP_NONE;
    return u;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static op_e modes [5] = '{OP_MIN, OP_MINPOS, OP_SENDUP, OP_SUM, OP_SELNZ};
    dn_in = DN_NONE; up_l = UP_NONE; up_r = UP_NONE;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // downward
    for (int t = 0; t < 40; t++) begin
      dn_t p;
      p.op   = ($urandom_range(0, 1) != 0) ? OP_SENDDOWN : OP_BROADCAST;
      p.data = data_t'($urandom);
      p.idx  = idx_t'($urandom_range(0, 7));
      dn_in = p;
      @(posedge clk); #1;
      dn_in = DN_NONE;
      if (p.op == OP_BROADCAST)
        check(dn_l == p && dn_r == p, "BROADCAST reaches both children");
      else if (p.idx[1])
        check(dn_r == p && dn_l == DN_NONE, $sformatf("SENDDOWN idx %0d goes right only", p.idx));
      else
        check(dn_l == p && dn_r == DN_NONE, $sformatf("SENDDOWN idx %0d goes left only", p.idx));
      @(posedge clk); #1;
      check(dn_l == DN_NONE && dn_r == DN_NONE, "children idle afterwards");
    end

    // upward, each mode
    foreach (modes[m]) begin
      dn_in = '{op: modes[m], data: '0, idx: '0};
      @(posedge clk); #1;
      dn_in = DN_NONE;
      for (int t = 0; t < 300; t++) begin
        up_t l, r, want;
        l = rnd_up(); r = rnd_up();
        up_l = l; up_r = r;
        want = ref_up(modes[m], l, r);
        @(posedge clk); #1;
        check(up_out == want, $sformatf("%s l=(%0d,%0d,%0d) r=(%0d,%0d,%0d) got (%0d,%0d,%0d) want (%0d,%0d,%0d)",
              modes[m].name(), l.valid, l.data, l.idx, r.valid, r.data, r.idx,
              up_out.valid, up_out.data, up_out.idx, want.valid, want.data, want.idx));
      end
      up_l = UP_NONE; up_r = UP_NONE;
      @(posedge clk); #1;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
