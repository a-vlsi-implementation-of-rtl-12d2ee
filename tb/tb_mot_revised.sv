// tb_mot_revised: the revised simplex method on the default 4 x 4 mesh, i.e. the square
// (m+1) x (m+1) mesh for m = 3 (two constraints).
//
// The mesh holds only -z (leaf 0,0), -pi (row 0), d (column 0) and the basis inverse B^-1
// (rows and columns 1..2); column 3 receives the entering column. The constraint matrix stays
// in the testbench ("main memory"). Each step: reduced costs r_j = c_j - pi A_j are formed one
// nonbasic column at a time (INPUT-AND-MULTIPLY of A_j into row 0, SUMMATION on row tree 0)
// until one is negative; r_k and B^-1 A_k (BROADCAST-AND-MULTIPLY on the column trees,
// SUMMATION on the row trees) are stored into column 3; the pivot row is selected on
// column 3 and the mesh pivots as in the ordinary method. Constraints of both problems:
// x1 + x2 + x3 = 4, x1 + 3 x2 + x4 = 6, x >= 0.
//   1: minimise -x1 - 2 x2 from the slack basis; two pivots to z = -5 at x1 = 3, x2 = 1.
//   2: two-phase from the artificial basis. Phase one prices with r_j = -sum_i a_ij - pi A_j
//      (the host forms the column sums from main memory) and starts with -w = -10 in leaf
//      (0,0); two pivots reach w = 0 with basis x1, x2. For phase two, -pi = -c_B B^-1 and
//      -z = -c_B d are formed by BROADCAST-AND-MULTIPLY of each row by its basic cost and
//      SUMMATION of tmp on the column trees. Minimising -2 x1 - x2 then takes one pivot to
//      z = -8 at x1 = 4, x4 = 2.
// The mesh is compared with a real-valued mirror after every step.
module tb_mot_revised;
  import mot_pkg::*;

  localparam int M = 4;
  localparam int N = 4;
  localparam int NV = 4;  // variables x1..x4
  localparam real TOL = 0.01;

  logic  clk = 0, rst_n = 0;
  dn_t   row_dn [M];
  up_t   row_up [M];
  dn_t   col_dn [N];
  up_t   col_up [N];
  data_t datum  [M][N];

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mot_top dut (.*);
  mot_host #(.M(M), .N(N)) host (.clk, .row_dn, .row_up, .col_dn, .col_up, .datum);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit near(real a, real b);
    return (a - b < TOL) && (b - a < TOL);
  endfunction

  // main memory: A (rows 1..2, columns x1..x4) and c
  real a_mat [1:2][1:NV] = '{'{1, 1, 1, 0}, '{1, 3, 0, 1}};
  real c_two [1:NV] = '{-2, -1, 0, 0};  // phase-two costs of problem 2
  int  basis [1:2];
  int  priced = 0, n_phase1 = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Revised pivot steps with pricing costs cost (x1..x4) until no reduced cost is negative
  // or the problem is unbounded; returns the number of pivot steps.
  task automatic revised_steps(real cost [1:NV], output int steps);
    data_t v [N];
    int k, h;
    real r, want;
    steps = 0;
    for (int it = 0; it < 5; it++) begin
      // pricing, one nonbasic column at a time
      k = -1;
      for (int j = 1; j <= NV && k < 0; j++) begin
        if (j == basis[1] || j == basis[2]) continue;
        v[0] = '0; v[3] = '0;
        for (int i = 1; i <= 2; i++) v[i] = host.to_fx(a_mat[i][j]);
        host.col_mul(N'('b1110), v, 1'b0);
        host.sum_rows(M'(1));
        r = cost[j] + host.to_r(host.rres[0]);
        want = cost[j];
        for (int i = 1; i <= 2; i++) want += host.ref_tab[0][i] * a_mat[i][j];
        check(near(r, want), $sformatf("r_%0d = %f, want %f", j, r, want));
        priced++;
        if (r < -1e-4) k = j;
      end
      if (k < 0) break;

      // r_k and B^-1 A_k into column 3
      v[0] = '0; v[3] = '0;
      for (int i = 1; i <= 2; i++) v[i] = host.to_fx(a_mat[i][k]);
      host.col_mul(N'('b1110), v, 1'b1);
      host.sum_rows(M'('b0110));
      for (int i = 1; i <= 2; i++) begin
        want = host.ref_tab[i][1] * a_mat[1][k] + host.ref_tab[i][2] * a_mat[2][k];
        check(near(host.to_r(host.rres[i]), want), $sformatf("(B^-1 A_%0d)_%0d = %f, want %f", k, i, host.to_r(host.rres[i]), want));
        v[i] = host.rres[i];
      end
      host.store(0, 3, host.to_fx(r));
      host.ref_tab[0][3] = r;
      for (int i = 1; i <= 2; i++) begin
        host.store(i, 3, v[i]);
        host.ref_tab[i][3] = host.to_r(v[i]);
      end

      // pivot row on column 3, then pivoting
      host.select_row(3, h);
      check(h == host.ref_row(3), $sformatf("pivot row %0d, want %0d", h, host.ref_row(3)));
      if (h < 0) break;
      host.pivot(h, 3);
      host.ref_pivot(h, 3);
      basis[h] = k;
      steps++;
      check(host.max_err() < TOL, $sformatf("pivot %0d: mesh differs by %f", steps, host.max_err()));
    end
  endtask

  // the optimum: -z in leaf (0,0) and the basic variables in column 0
  task automatic check_output(real nzwant, real xwant [1:NV]);
    host.output_solution();
    check(near(host.to_r(host.rres[0]), nzwant), $sformatf("-z = %f, want %f", host.to_r(host.rres[0]), nzwant));
    for (int i = 1; i <= 2; i++)
      check(near(host.to_r(host.rres[i]), xwant[basis[i]]),
            $sformatf("x%0d = %f, want %f", basis[i], host.to_r(host.rres[i]), xwant[basis[i]]));
  endtask

  initial begin
    real tab [M][N];
    real c1 [1:NV];
    data_t rv [M];
    int steps;
    real want;

    foreach (row_dn[i]) row_dn[i] = DN_NONE;
    foreach (col_dn[j]) col_dn[j] = DN_NONE;
    repeat (3) @(posedge clk);
    rst_n = 1;
    host.tick();

    // problem 1, from the slack basis x3, x4: B^-1 = I, pi = 0
    tab = '{'{0, 0, 0, 0},
            '{4, 1, 0, 0},
            '{6, 0, 1, 0},
            '{0, 0, 0, 0}};
    basis[1] = 3; basis[2] = 4;
    host.ref_tab = tab;
    host.load(tab);
    check(host.max_err() < TOL, "loaded");
    revised_steps('{-1, -2, 0, 0}, steps);
    check(steps == 2, $sformatf("problem 1: %0d pivot steps, want 2", steps));
    check_output(5.0, '{3, 1, 0, 0});

    // problem 2, two-phase from the artificial basis y1, y2 (columns 5 and 6): B^-1 = I.
    // Phase one prices with r_j = -sum_i a_ij - pi A_j; leaf (0,0) starts at -w = -(4 + 6).
    tab = '{'{-10, 0, 0, 0},
            '{  4, 1, 0, 0},
            '{  6, 0, 1, 0},
            '{  0, 0, 0, 0}};
    basis[1] = 5; basis[2] = 6;
    host.ref_tab = tab;
    host.load(tab);
    check(host.max_err() < TOL, "loaded for phase one");
    for (int j = 1; j <= NV; j++) c1[j] = -(a_mat[1][j] + a_mat[2][j]);
    revised_steps(c1, steps);
    check(steps == 2, $sformatf("phase one: %0d pivot steps, want 2", steps));
    check(near(host.to_r(datum[0][0]), 0.0), $sformatf("phase one ends with w = %f", -host.to_r(datum[0][0])));
    check(basis[1] <= NV && basis[2] <= NV, "no artificial variable left in the basis");
    n_phase1 += steps;

    // phase two: -pi = -c_B B^-1 and -z = -c_B d from BROADCAST-AND-MULTIPLY of each row i by
    // the cost of its basic variable, then SUMMATION of tmp on column trees 0..2
    rv[0] = '0; rv[3] = '0;
    for (int i = 1; i <= 2; i++) rv[i] = host.to_fx(c_two[basis[i]]);
    host.bcast_mul(M'('b1110), rv);
    host.sum_cols(N'('b0111), 1'b1);
    for (int j = 0; j <= 2; j++) begin
      want = c_two[basis[1]] * host.ref_tab[1][j] + c_two[basis[2]] * host.ref_tab[2][j];
      check(near(host.to_r(host.cres[j]), want), $sformatf("c_B column %0d = %f, want %f", j, host.to_r(host.cres[j]), want));
      host.store(0, j, -host.cres[j]);
      host.ref_tab[0][j] = -want;
    end
    check(host.max_err() < TOL, "phase two row 0 in place");
    revised_steps(c_two, steps);
    check(steps == 1, $sformatf("phase two: %0d pivot steps, want 1", steps));
    check_output(8.0, '{4, 0, 0, 2});

    check(n_phase1 > 0, "revised phase one done");
    check(host.timeouts == 0, "no procedure timed out");
    check(host.n_out_late == 0, $sformatf("%0d row-tree OUTPUTs missed 2 log n + 1 cycles", host.n_out_late));
    $display("revised method: %0d reduced costs formed, %0d phase-one pivots", priced, n_phase1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
