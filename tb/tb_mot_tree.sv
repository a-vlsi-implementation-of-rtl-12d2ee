// tb_mot_tree: self-checking test of an 8-leaf tree (three internal levels).
//
// Checks that a packet put on the root reaches the leaf ports three cycles later: BROADCAST at
// every port, SENDDOWN at exactly the port named by its index. Then, for MIN, MINPOS, SUM and
// SENDUP, it sets the mode through the root, applies random leaf packets (each carrying its
// port number as index) and compares what comes out of the root three cycles later with the
// minimum, nonnegative minimum, sum or single datum computed here over the ports 1..7
// (port 0 is ignored by the first three, as leaf 0 of a row or column tree is).
module tb_mot_tree;
  import mot_pkg::*;

  localparam int L = 8, LV = 3;

  logic clk = 0, rst_n = 0;
  dn_t  root_dn;
  up_t  root_up;
  dn_t  leaf_dn [L];
  up_t  leaf_up [L];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  mot_tree #(.LEAVES(L)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic tick();
    @(posedge clk); #1;
    root_dn = DN_NONE;
    foreach (leaf_up[j]) leaf_up[j] = UP_NONE;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static op_e modes [4] = '{OP_MIN, OP_MINPOS, OP_SUM, OP_SENDUP};
    root_dn = DN_NONE;
    foreach (leaf_up[j]) leaf_up[j] = UP_NONE;
    repeat (2) @(posedge clk);
    rst_n = 1;
    tick();

    // downward routing
    for (int t = 0; t < 32; t++) begin
      dn_t p;
      p.op   = (t % 4 == 3) ? OP_BROADCAST : OP_SENDDOWN;
      p.data = data_t'($urandom);
      p.idx  = idx_t'(t % L);
      root_dn = p;
      tick();
      for (int c = 1; c < LV; c++) begin
        foreach (leaf_dn[j]) check(leaf_dn[j] == DN_NONE, "nothing at the leaves too early");
        tick();
      end
      foreach (leaf_dn[j])
        if (p.op == OP_BROADCAST || j == t % L)
          check(leaf_dn[j] == p, $sformatf("%s reaches leaf %0d", p.op.name(), j));
        else
          check(leaf_dn[j] == DN_NONE, $sformatf("SENDDOWN to %0d stays away from leaf %0d", t % L, j));
      tick();
    end

    // upward combination
    foreach (modes[m]) begin
      root_dn = '{op: modes[m], data: '0, idx: '0};
      tick();
      repeat (LV) tick();
      for (int t = 0; t < 100; t++) begin
        data_t v [L];
        data_t want;
        idx_t  wix;
        int    one;
        one = $urandom_range(0, L - 1);
        for (int j = 0; j < L; j++) begin
          v[j] = data_t'($urandom_range(0, 4000)) - 2000;
          if (modes[m] == OP_SENDUP) begin
            if (j == one) leaf_up[j] = '{valid: 1'b1, data: v[j], idx: idx_t'(j)};
          end else
            leaf_up[j] = '{valid: 1'b1, data: v[j], idx: idx_t'(j)};
        end
        // reference
        case (modes[m])
          OP_MIN: begin
            want = DATA_MAX; wix = IDX_M1;
            for (int j = 1; j < L; j++) if (v[j] < want) begin want = v[j]; wix = idx_t'(j); end
          end
          OP_MINPOS: begin
            want = FX_M1; wix = IDX_M1;
            for (int j = 1; j < L; j++)
              if (v[j] >= 0 && (wix == IDX_M1 || v[j] < want)) begin want = v[j]; wix = idx_t'(j); end
          end
          OP_SUM: begin
            want = 0; wix = IDX_M1;
            for (int j = 1; j < L; j++) want += v[j];
          end
          default: begin want = v[one]; wix = idx_t'(one); end
        endcase
        tick();
        for (int c = 1; c < LV; c++) begin
          check(!root_up.valid, "no answer before the result");
          tick();
        end
        check(root_up.valid && root_up.data == want && root_up.idx == wix,
              $sformatf("%s: root gives (%0d,%0d), want (%0d,%0d)", modes[m].name(),
                        root_up.data, root_up.idx, want, wix));
        tick();
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
