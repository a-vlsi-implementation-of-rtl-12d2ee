// tb_mot_full: the mesh of trees at its default size (4 x 4), taken through complete simplex
// pivot steps by the host model: data loading, pivot column selection (ABSOLUTE-MINIMUM on
// row tree 0), pivot row selection (OUTPUT, INPUT-AND-DIVIDE, POSITIVE-MINIMUM), pivoting
// (BROADCAST-AND-DIVIDE, BROADCAST-AND-COMPUTE) and the output of column 0. The 4 x 4
// tableau (cost row -2 -3 0; rows x1 + 2 x2 + x3 = 8, 3 x1 + 2 x2 = 9, x1 - x2 = 3) is
// pivoted until the mesh reports optimality or unboundedness, and the whole mesh is compared
// with a real-valued reference tableau after every step. BROADCAST-AND-COMPUTE runs on the
// published schedule (COMPUTE code first, then both operands in the same cycle), and every
// row-tree OUTPUT must answer 2 log n + 1 cycles after its SENDUP code.
module tb_mot_full;
  import mot_pkg::*;

  localparam int M = 4;
  localparam int N = 4;
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
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k, h, steps;
    real tab [M][N];
    real e;
    foreach (row_dn[i]) row_dn[i] = DN_NONE;
    foreach (col_dn[j]) col_dn[j] = DN_NONE;
    repeat (3) @(posedge clk);
    rst_n = 1;
    host.tick();
    host.paper_timing = 1;  // BROADCAST-AND-COMPUTE on the published schedule

    tab = '{'{0, -2, -3, 0},
            '{8,  1,  2, 1},
            '{9,  3,  2, 0},
            '{3,  1, -1, 0}};
    host.ref_tab = tab;
    host.load(tab);
    e = host.max_err();
    check(e < TOL, $sformatf("after loading: error %f", e));

    steps = 0;
    for (int it = 0; it < 6; it++) begin
      host.select_col_mostneg(k);
      check(k == host.ref_col_mostneg(), $sformatf("column %0d, want %0d", k, host.ref_col_mostneg()));
      if (k < 0) break;
      host.select_row(k, h);
      check(h == host.ref_row(k), $sformatf("row %0d, want %0d", h, host.ref_row(k)));
      if (h < 0) break;
      host.pivot(h, k);
      host.ref_pivot(h, k);
      steps++;
      e = host.max_err();
      check(e < TOL, $sformatf("pivot (%0d,%0d): error %f", h, k, e));
    end
    check(steps > 0, "at least one pivot step");
    host.output_solution();
    for (int i = 0; i < M; i++)
      check(host.to_r(host.rres[i]) - host.ref_tab[i][0] < TOL &&
            host.ref_tab[i][0] - host.to_r(host.rres[i]) < TOL,
            $sformatf("output row %0d = %f, want %f", i, host.to_r(host.rres[i]), host.ref_tab[i][0]));
    check(host.timeouts == 0, "no procedure timed out");
    check(host.n_bc_comp_pt > 0, "BROADCAST-AND-COMPUTE on the published schedule");
    check(host.n_out_late == 0, $sformatf("%0d row-tree OUTPUTs missed 2 log n + 1 cycles", host.n_out_late));
    $display("pivot steps: %0d, -z = %f", steps, host.to_r(host.rres[0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
