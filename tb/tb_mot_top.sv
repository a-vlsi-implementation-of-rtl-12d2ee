// tb_mot_top: end-to-end test of the mesh of trees on a 4 x 8 mesh, driven by the host model.
//
// Three linear programs (3 constraints, variables x1..x4, artificials y1..y3, costs x1 + 2 x2)
// are solved with the two-phase method: phase one (artificial costs, reduced costs made zero
// by SUMMATION and INPUT-AND-SUBTRACT, most-negative pricing), the handling of artificial
// variables left basic (nonzero selection, then a pivot or the deletion of a redundant row),
// the phase-two transition (zeroing the artificial columns, new costs, BROADCAST-AND-MULTIPLY,
// SUMMATION of tmp, INPUT-AND-SUBTRACT) and phase two with the greatest decrement rule, then
// the output of the solution. A fourth problem is infeasible (phase one ends with w > 0) and
// a fifth is unbounded; both must be reported as such.
// Problem 1 runs BROADCAST-AND-COMPUTE with all roots started at once, the later problems on
// the published schedule, where the column trees start log n - log m cycles after the row
// trees. After every step the whole mesh is compared with a real-valued reference tableau, each
// pivot choice with the reference choice, and the results with the optima worked out by hand:
//   1: x1+x2+x3 = 4, x1+3x2+x4 = 6, 2x1+x2 = 5 -> phase one ends at x1 = 1.8; optimum
//      z = 2.5 at x = (2.5, 0, 1.5, 3.5)
//   2: x1+x2+x3 = 4, x1+3x2+x4 = 6, x1-2x2-x4 = 2 -> y2 stays basic at zero and is replaced
//      by x2 with pivot -1; the only vertex is x = (4, 0, 0, 2), z = 4
//   3: x1+x2+x3 = 4, x4 = 1, x1+x2+x3+x4 = 5 (redundant) -> row 3 is deleted; z = 0 at
//      x = (0, 0, 4, 1)
//   4: x1+x2 = 1, x1+x2 = 2, x3+x4 = 1 -> phase one ends with w = 1: infeasible
// The same test bench also solves a larger problem on a second, 8 x 16 mesh (deeper trees,
// log n - log m = 1): 7 constraints x1..x8 plus slacks, a_ij = 1 + (3i + 5j) mod 4,
// b_i = 10 + 3i, c_j = -(1 + 2j mod 5), by the ordinary method with the most negative rule;
// its solution is checked against the original data (constraints, x >= 0, objective).
// Every mechanism (each tree procedure, both pricing rules, replacement, deletion,
// optimality, infeasibility and unboundedness) is counted and must have happened at least once.
module tb_mot_top;
  import mot_pkg::*;

  localparam int M = 4;
  localparam int N = 8;
  localparam real TOL = 0.01;

  logic  clk = 0, rst_n = 0;
  dn_t   row_dn [M];
  up_t   row_up [M];
  dn_t   col_dn [N];
  up_t   col_up [N];
  data_t datum  [M][N];

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mot_top #(.M(M), .N(N)) dut (.*);
  mot_host #(.M(M), .N(N)) host (.clk, .row_dn, .row_up, .col_dn, .col_up, .datum);

  // second mesh, 8 x 16, with its own host
  localparam int M2 = 8;
  localparam int N2 = 16;
  localparam int NX2 = 8;  // original variables x1..x8 of the large problem
  dn_t   row_dn2 [M2];
  up_t   row_up2 [M2];
  dn_t   col_dn2 [N2];
  up_t   col_up2 [N2];
  data_t datum2  [M2][N2];
  int    n_large_pivots = 0;

  mot_top #(.M(M2), .N(N2)) dut2 (.clk, .rst_n, .row_dn(row_dn2), .row_up(row_up2),
                                  .col_dn(col_dn2), .col_up(col_up2), .datum(datum2));
  mot_host #(.M(M2), .N(N2)) host2 (.clk, .row_dn(row_dn2), .row_up(row_up2),
                                    .col_dn(col_dn2), .col_up(col_up2), .datum(datum2));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic check_tab(string what);
    real e;
    e = host.max_err();
    check(e < TOL, $sformatf("%s: mesh differs from reference by %f", what, e));
  endtask


  function automatic bit near(real a, real b);
    return (a - b < TOL) && (b - a < TOL);
  endfunction

  // The 8 x 16 problem: minimise c x subject to A x + s = b, x, s >= 0, with 7 constraints,
  // 8 variables and 7 slacks (columns 9..15, the starting basis), solved by the ordinary
  // method with the most negative rule. Pivot choices are checked by value, so that ties may
  // go either way, and the reference pivots on the mesh's choice. The solution is then
  // checked against the original data.
  task automatic large_problem();
    real orig [M2][N2];
    real x [N2];
    int  bas [M2];
    int  k, h;
    real best, r, z, lhs;
    host2.paper_timing = 1;
    for (int i = 0; i < M2; i++)
      for (int j = 0; j < N2; j++) orig[i][j] = 0.0;
    for (int j = 1; j <= NX2; j++) orig[0][j] = -(1 + (2 * j) % 5);
    for (int i = 1; i < M2; i++) begin
      orig[i][0] = 10 + 3 * i;
      for (int j = 1; j <= NX2; j++) orig[i][j] = 1 + (3 * i + 5 * j) % 4;
      orig[i][NX2 + i] = 1.0;
      bas[i] = NX2 + i;
    end
    host2.ref_tab = orig;
    host2.load(orig);
    check(host2.max_err() < TOL, "8 x 16: after loading");
    for (int it = 0; it < 20; it++) begin
      host2.select_col_mostneg(k);
      best = 0.0;
      for (int j = 1; j < N2; j++) if (host2.ref_tab[0][j] < best) best = host2.ref_tab[0][j];
      if (k < 0) begin
        check(best > -TOL, $sformatf("8 x 16: optimal reported, but reduced cost %f remains", best));
        if (best > -TOL) n_optimal++;
        break;
      end
      check(near(host2.ref_tab[0][k], best) && best < 0.0,
            $sformatf("8 x 16: column %0d has reduced cost %f, minimum %f", k, host2.ref_tab[0][k], best));
      host2.select_row(k, h);
      check(h >= 1, $sformatf("8 x 16: column %0d reported unbounded", k));
      if (h < 1) break;
      best = 1.0e9;
      for (int i = 1; i < M2; i++)
        if (host2.ref_tab[i][k] > 1e-6 && host2.ref_tab[i][0] / host2.ref_tab[i][k] < best)
          best = host2.ref_tab[i][0] / host2.ref_tab[i][k];
      r = host2.ref_tab[h][0] / host2.ref_tab[h][k];
      check(host2.ref_tab[h][k] > 1e-6 && near(r, best),
            $sformatf("8 x 16: row %0d has ratio %f, minimum %f", h, r, best));
      host2.pivot(h, k);
      host2.ref_pivot(h, k);
      bas[h] = k;
      n_large_pivots++;
      check(host2.max_err() < TOL, $sformatf("8 x 16: pivot (%0d,%0d): mesh differs by %f", h, k, host2.max_err()));
    end
    check(n_large_pivots >= 2, $sformatf("8 x 16: %0d pivot steps", n_large_pivots));
    host2.output_solution();
    foreach (x[j]) x[j] = 0.0;
    for (int i = 1; i < M2; i++) begin
      x[bas[i]] = host2.to_r(host2.rres[i]);
      check(x[bas[i]] > -TOL, $sformatf("8 x 16: x%0d = %f is negative", bas[i], x[bas[i]]));
    end
    for (int i = 1; i < M2; i++) begin
      lhs = 0.0;
      for (int j = 1; j < N2; j++) lhs += orig[i][j] * x[j];
      check(near(lhs, orig[i][0]), $sformatf("8 x 16: constraint %0d: %f, want %f", i, lhs, orig[i][0]));
    end
    z = 0.0;
    for (int j = 1; j < N2; j++) z += orig[0][j] * x[j];
    check(near(host2.to_r(host2.rres[0]), -z), $sformatf("8 x 16: -z = %f, want %f", host2.to_r(host2.rres[0]), -z));
    check(host2.timeouts == 0, "8 x 16: no procedure timed out");
    check(host2.n_out_late == 0, $sformatf("8 x 16: %0d row-tree OUTPUTs missed 2 log n + 1 cycles", host2.n_out_late));
    $display("8 x 16: %0d pivot steps, z = %f", n_large_pivots, z);
  endtask

  real tab [M][N];
  int  basis [M];
  int  n_unbounded = 0, n_optimal = 0, n_pivots = 0, n_replaced = 0, n_deleted = 0, n_infeasible = 0;

  // greatest decrement choice on the reference tableau
  task automatic ref_greatest(output int k, output int h);
    real best, r, v;
    int hh;
    k = -1; h = -1; best = 0.0;
    for (int j = 1; j < N; j++)
      if (host.ref_tab[0][j] < -1e-6) begin
        hh = host.ref_row(j);
        if (hh >= 0) begin
          r = host.ref_tab[hh][0] / host.ref_tab[hh][j];
          v = host.ref_tab[0][j] * r;
          if (k < 0 || v < best - 1e-6) begin best = v; k = j; h = hh; end
        end
      end
    if (k < 0 || best > -0.004) begin
      k = host.ref_col_mostneg();
      h = (k >= 0) ? host.ref_row(k) : -1;
    end
  endtask

  // reference for the nonzero selection: the tree rule applied pairwise
  function automatic int ref_selnz(int h);
    real  v [N];
    int   x [N];
    int   w;
    for (int j = 0; j < N; j++) begin v[j] = host.ref_tab[h][j]; x[j] = j; end
    w = N;
    while (w > 1) begin
      for (int p = 0; p < w / 2; p++) begin
        bit lnz, rnz;
        lnz = (v[2*p] > 1e-6 || v[2*p] < -1e-6);
        rnz = (v[2*p+1] > 1e-6 || v[2*p+1] < -1e-6);
        if (rnz && !lnz) begin v[p] = v[2*p+1]; x[p] = x[2*p+1]; end
        else             begin v[p] = v[2*p];   x[p] = x[2*p];   end
      end
      w = w / 2;
    end
    return x[0];
  endfunction

  // Two-phase solution of one problem held in tab (phase-one tableau: columns d, x1..x4,
  // y1..y3) with phase-two costs cost; checks the optimum -z = nzwant and x = xwant, or, if
  // feasible is 0, that phase one ends with w > 0.
  task automatic two_phase(real tab [M][N], real cost [N], bit feasible, real nzwant, real xwant [N]);
    int k, h, rk, rh, c0;
    data_t v [N];
    data_t rv [M];
      // phase one tableau: columns d, x1..x4, y1..y3
      host.ref_tab = tab;
      c0 = host.cyc;
      host.load(tab);
      check(host.cyc - c0 <= 1 + M + LM() + 3, $sformatf("loading took %0d cycles", host.cyc - c0));
      check_tab("after loading");

      // reduced costs of the artificial basis: row 0 -= sum of rows 1..M-1
      host.sum_cols('1, 1'b0);
      for (int j = 0; j < N; j++) begin
        real s;
        s = 0.0;
        for (int i = 1; i < M; i++) s += host.ref_tab[i][j];
        check(host.cres[j] == host.to_fx(s), $sformatf("SUMMATION col %0d = %f, want %f", j, host.to_r(host.cres[j]), s));
        v[j] = host.cres[j];
        host.ref_tab[0][j] -= s;
      end
      host.input_sub('1, v);
      check_tab("phase one reduced costs");
      for (int i = 1; i < M; i++) basis[i] = N - M + i;

      // phase one, most negative rule
      for (int it = 0; it < 8; it++) begin
        int lat;
        host.select_col_mostneg(k);
        lat = host.last_lat;
        check(lat == 2 * $clog2(N), $sformatf("ABSOLUTE-MINIMUM latency %0d", lat));
        rk = host.ref_col_mostneg();
        check(k == rk, $sformatf("phase 1 column %0d, want %0d", k, rk));
        if (k < 0) begin n_optimal++; break; end
        host.select_row(k, h);
        rh = host.ref_row(k);
        check(h == rh, $sformatf("phase 1 row %0d, want %0d", h, rh));
        if (h < 0) break;
        host.pivot(h, k);
        host.ref_pivot(h, k);
        basis[h] = k;
        n_pivots++;
        check_tab($sformatf("phase 1 pivot (%0d,%0d)", h, k));
      end
      if (!feasible) begin
        // case i: w = -datum[0][0] stays positive, so the problem has no feasible solution
        host.output_solution();
        check(host.to_r(host.rres[0]) < -TOL, $sformatf("infeasible: w = %f", -host.to_r(host.rres[0])));
        if (host.to_r(host.rres[0]) < -TOL) n_infeasible++;
        return;
      end
      check(host.to_r(datum[0][0]) < TOL && host.to_r(datum[0][0]) > -TOL, "phase one ends with w = 0");

      // an artificial variable still basic (at zero) is replaced by an original one found by
      // the nonzero selection, or its row is deleted if no original column is nonzero there
      for (int i = 1; i < M; i++) begin
        if (basis[i] >= N - M + 1) begin
          host.selnz_row(i);
          k = int'(host.rix[i]);
          check(k == ref_selnz(i), $sformatf("SELNZ row %0d gave %0d, want %0d", i, k, ref_selnz(i)));
          if (k >= 1 && k < N - M + 1) begin
            host.pivot(i, k); host.ref_pivot(i, k); basis[i] = k; n_replaced++;
            check_tab($sformatf("artificial variable of row %0d replaced by x%0d", i, k));
          end else begin
            for (int j = 0; j < N; j++) begin host.store(i, j, '0); host.ref_tab[i][j] = 0.0; end
            basis[i] = 0; n_deleted++;
          end
        end
      end

      // phase two transition: clear the artificial columns, load the costs, price out the basis
      for (int j = N - M + 1; j < N; j++)
        for (int i = 0; i < M; i++) begin host.store(i, j, '0); host.ref_tab[i][j] = 0.0; end
      for (int j = 0; j < N; j++) begin
        host.store(0, j, host.to_fx(cost[j]));
        host.ref_tab[0][j] = cost[j];
      end
      check_tab("phase two costs loaded");
      rv[0] = '0;
      for (int i = 1; i < M; i++) rv[i] = host.to_fx(cost[basis[i]]);  // basis 0: deleted row
      host.bcast_mul(M'({M{1'b1}}) & ~M'(1), rv);
      host.sum_cols('1, 1'b1);
      for (int j = 0; j < N; j++) begin
        real s;
        s = 0.0;
        for (int i = 1; i < M; i++) s += cost[basis[i]] * host.ref_tab[i][j];
        check(host.to_r(host.cres[j]) - s < TOL && s - host.to_r(host.cres[j]) < TOL,
              $sformatf("summed products col %0d = %f, want %f", j, host.to_r(host.cres[j]), s));
        v[j] = host.cres[j];
        host.ref_tab[0][j] -= s;
      end
      host.input_sub('1, v);
      check_tab("phase two reduced costs");

      // phase two, greatest decrement rule
      for (int it = 0; it < 8; it++) begin
        host.select_greatest(k, h);
        ref_greatest(rk, rh);
        check(k == rk && h == rh, $sformatf("phase 2 pivot (%0d,%0d), want (%0d,%0d)", h, k, rh, rk));
        if (k < 0 || h < 0) break;
        host.pivot(h, k);
        host.ref_pivot(h, k);
        basis[h] = k;
        n_pivots++;
        check_tab($sformatf("phase 2 pivot (%0d,%0d)", h, k));
      end
      host.select_col_mostneg(k);
      check(k < 0, "phase two ends optimal");
      if (k < 0) n_optimal++;

      // output of the optimal solution
      host.output_solution();
      check(host.to_r(host.rres[0]) > nzwant - TOL && host.to_r(host.rres[0]) < nzwant + TOL,
            $sformatf("-z = %f, want %f", host.to_r(host.rres[0]), nzwant));
      for (int i = 1; i < M; i++) begin
        real want;
        want = xwant[basis[i]];
        check(host.to_r(host.rres[i]) > want - TOL && host.to_r(host.rres[i]) < want + TOL,
              $sformatf("x%0d = %f, want %f", basis[i], host.to_r(host.rres[i]), want));
      end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k, h, rk, rh, c0;
    data_t v [N];
    data_t rv [M];

    foreach (row_dn[i]) row_dn[i] = DN_NONE;
    foreach (col_dn[j]) col_dn[j] = DN_NONE;
    repeat (3) @(posedge clk);
    rst_n = 1;
    host.tick();

    // problem 1: phase one ends at a vertex, phase two moves to the optimum
    tab = '{'{0, 0, 0, 0, 0, 1, 1, 1},
            '{4, 1, 1, 1, 0, 1, 0, 0},
            '{6, 1, 3, 0, 1, 0, 1, 0},
            '{5, 2, 1, 0, 0, 0, 0, 1}};
    two_phase(tab, '{0, 1, 2, 0, 0, 0, 0, 0}, 1'b1, -2.5, '{0, 2.5, 0, 1.5, 3.5, 0, 0, 0});

    // from here on BROADCAST-AND-COMPUTE follows the published schedule
    host.paper_timing = 1;

    // problem 2: phase one ends with y2 basic at zero; it is replaced by x2 (pivot -1)
    tab = '{'{0, 0, 0, 0, 0, 1, 1, 1},
            '{4, 1,  1, 1,  0, 1, 0, 0},
            '{6, 1,  3, 0,  1, 0, 1, 0},
            '{2, 1, -2, 0, -1, 0, 0, 1}};
    two_phase(tab, '{0, 1, 2, 0, 0, 0, 0, 0}, 1'b1, -4.0, '{0, 4, 0, 0, 2, 0, 0, 0});

    // problem 3: the third constraint is the sum of the others; its row is deleted
    tab = '{'{0, 0, 0, 0, 0, 1, 1, 1},
            '{4, 1, 1, 1, 0, 1, 0, 0},
            '{1, 0, 0, 0, 1, 0, 1, 0},
            '{5, 1, 1, 1, 1, 0, 0, 1}};
    two_phase(tab, '{0, 1, 2, 0, 0, 0, 0, 0}, 1'b1, 0.0, '{0, 0, 0, 4, 1, 0, 0, 0});

    // problem 4: x1+x2 = 1 and x1+x2 = 2 contradict each other; phase one ends with w = 1
    tab = '{'{0, 0, 0, 0, 0, 1, 1, 1},
            '{1, 1, 1, 0, 0, 1, 0, 0},
            '{2, 1, 1, 0, 0, 0, 1, 0},
            '{1, 0, 0, 1, 1, 0, 0, 1}};
    two_phase(tab, '{0, 1, 2, 0, 0, 0, 0, 0}, 1'b0, 0.0, '{0, 0, 0, 0, 0, 0, 0, 0});

    // an unbounded problem: x1 may grow without limit
    tab = '{'{0, -1, 0, 0, 1, 0, 0, 0},
            '{2, -1, 1, 0, 0, 0, 0, 0},
            '{3,  0, 0, 1, 0, 0, 0, 0},
            '{1, -2, 0, 0, 1, 0, 0, 0}};
    host.ref_tab = tab;
    host.load(tab);
    host.select_col_mostneg(k);
    check(k == 1, $sformatf("unbounded problem column %0d", k));
    host.select_row(k, h);
    check(h == -1 && host.cres[k] == FX_M1, $sformatf("unbounded problem row %0d", h));
    if (h == -1) n_unbounded++;

    // the same method on the 8 x 16 mesh
    large_problem();

    // every mechanism must have happened
    check(host.timeouts == 0, "no procedure timed out");
    check(host.n_out_late == 0, $sformatf("%0d row-tree OUTPUTs missed 2 log n + 1 cycles", host.n_out_late));
    check(host.n_load > 0,    "loading used");
    check(host.n_store > 0,   "INPUT-AND-STORE used");
    check(host.n_absmin > 0,  "ABSOLUTE-MINIMUM used");
    check(host.n_posmin > 0,  "POSITIVE-MINIMUM used");
    check(host.n_out_row > 0, "OUTPUT on row trees used");
    check(host.n_out_col > 0, "OUTPUT on column trees used");
    check(host.n_in_div > 0,  "INPUT-AND-DIVIDE used");
    check(host.n_bc_div > 0,  "BROADCAST-AND-DIVIDE used");
    check(host.n_bc_comp > host.n_bc_comp_pt, "BROADCAST-AND-COMPUTE used with all roots at once");
    check(host.n_bc_comp_pt > 0, "BROADCAST-AND-COMPUTE used with the published schedule");
    check(host.n_sum > 0,     "SUMMATION used");
    check(host.n_in_sub > 0,  "INPUT-AND-SUBTRACT used");
    check(host.n_bc_mul > 0,  "BROADCAST-AND-MULTIPLY used");
    check(host.n_selnz > 0,   "nonzero selection used");
    check(host.n_mulpos > 0,  "greatest decrement rule used");
    check(n_pivots > 0,       "pivot steps done");
    check(n_large_pivots > 0, "pivot steps done on the 8 x 16 mesh");
    check(n_optimal > 0,      "optimality detected");
    check(n_unbounded > 0,    "unboundedness detected");
    check(n_replaced > 0,     "basic artificial variable replaced");
    check(n_deleted > 0,      "redundant row deleted");
    check(n_infeasible > 0,   "infeasibility detected");
    $display("mechanisms: load=%0d store=%0d absmin=%0d posmin=%0d outrow=%0d outcol=%0d indiv=%0d bcdiv=%0d bccomp=%0d (published schedule %0d) sum=%0d insub=%0d bcmul=%0d selnz=%0d gdr=%0d pivots=%0d replaced=%0d deleted=%0d infeasible=%0d optimal=%0d unbounded=%0d",
             host.n_load, host.n_store, host.n_absmin, host.n_posmin, host.n_out_row, host.n_out_col,
             host.n_in_div, host.n_bc_div, host.n_bc_comp, host.n_bc_comp_pt, host.n_sum, host.n_in_sub, host.n_bc_mul,
             host.n_selnz, host.n_mulpos, n_pivots, n_replaced, n_deleted, n_infeasible, n_optimal, n_unbounded);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int LM();
    return $clog2(M);
  endfunction

endmodule
