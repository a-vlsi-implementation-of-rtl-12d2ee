// mot_host: behavioural model of the host processor that drives a mesh of trees (mot_top).
//
// The mesh only executes the codes it is given; the host sequences them into tree procedures
// (INPUT-AND-STORE, OUTPUT, ABSOLUTE-MINIMUM, POSITIVE-MINIMUM, INPUT-AND-DIVIDE,
// BROADCAST-AND-DIVIDE, BROADCAST-AND-COMPUTE and the two-phase ones) and those into simplex
// steps, keeping the basis itself. Every task drives the roots for whole cycles: values set
// just after a rising edge are sampled at the next one, and tick() clears the drives again.
// Results that come back up a tree are left in rres/rix (row roots) and cres/cix (column
// roots), with the number of cycles from the last code to the result in last_lat (for OUTPUT
// on the row trees, from the SENDUP code; n_out_late counts those that missed 2 log n + 1).
// A real-valued tableau (ref_tab) with its own pivot function is kept alongside for checking.
module mot_host
  import mot_pkg::*;
#(
  parameter int M = 4,
  parameter int N = 4
) (
  input  logic clk,
  output dn_t  row_dn [M],
  input  up_t  row_up [M],
  output dn_t  col_dn [N],
  input  up_t  col_up [N],
  input  data_t datum [M][N]
);

  localparam int LM = $clog2(M);
  localparam int LN = $clog2(N);
  localparam int TD = DATA_W + FRAC_W;  // division cycles
  // reduced costs within EPS of zero count as zero: fixed-point rounding leaves such residues
  localparam data_t EPS = data_t'(256);  // 2^-8

  data_t rres [M];
  idx_t  rix  [M];
  data_t cres [N];
  idx_t  cix  [N];
  int    last_lat;
  int    cyc;
  int    timeouts;

  real   ref_tab [M][N];

  // counts of tree procedures issued, for mechanism coverage
  int n_load, n_absmin, n_posmin, n_out_row, n_out_col, n_in_div, n_bc_div, n_bc_comp;
  int n_sum, n_in_sub, n_bc_mul, n_selnz, n_mulpos, n_store;
  int n_out_late;    // row-tree OUTPUTs not answered (T_C + 1) log n + T_C cycles after SENDUP
  int n_bc_comp_pt;  // BROADCAST-AND-COMPUTEs run with the published schedule
  bit paper_timing;  // select that schedule

  initial begin
    cyc = 0; timeouts = 0; last_lat = 0;
    n_load = 0; n_absmin = 0; n_posmin = 0; n_out_row = 0; n_out_col = 0; n_in_div = 0;
    n_bc_div = 0; n_bc_comp = 0; n_sum = 0; n_in_sub = 0; n_bc_mul = 0; n_selnz = 0; n_out_late = 0; n_bc_comp_pt = 0; paper_timing = 0;
    n_mulpos = 0; n_store = 0;
    foreach (row_dn[i]) row_dn[i] = DN_NONE;
    foreach (col_dn[j]) col_dn[j] = DN_NONE;
    foreach (rres[i]) begin rres[i] = '0; rix[i] = '0; end
    foreach (cres[j]) begin cres[j] = '0; cix[j] = '0; end
  end

  always @(posedge clk) cyc <= cyc + 1;

  function automatic data_t to_fx(real r);
    return data_t'($rtoi(r * 65536.0 + ((r < 0.0) ? -0.5 : 0.5)));
  endfunction

  function automatic real to_r(data_t d);
    return $itor(d) / 65536.0;
  endfunction

  function automatic dn_t pk(op_e op, data_t d = '0, idx_t x = '0);
    dn_t p;
    p.op = op; p.data = d; p.idx = x;
    return p;
  endfunction

  task automatic tick();
    @(posedge clk);
    #1;
    foreach (row_dn[i]) row_dn[i] = DN_NONE;
    foreach (col_dn[j]) col_dn[j] = DN_NONE;
  endtask

  task automatic idle(int n);
    repeat (n) tick();
  endtask

  // wait until any root in the masks answers; capture every root's answer of that cycle
  task automatic wait_up(logic [M-1:0] rmask, logic [N-1:0] cmask);
    bit got;
    got = 0;
    last_lat = 0;
    while (!got && last_lat < 400) begin
      last_lat++;
      @(posedge clk);
      #1;
      foreach (row_dn[i]) row_dn[i] = DN_NONE;
      foreach (col_dn[j]) col_dn[j] = DN_NONE;
      for (int i = 0; i < M; i++)
        if (rmask[i] && row_up[i].valid) begin got = 1; rres[i] = row_up[i].data; rix[i] = row_up[i].idx; end
      for (int j = 0; j < N; j++)
        if (cmask[j] && col_up[j].valid) begin got = 1; cres[j] = col_up[j].data; cix[j] = col_up[j].idx; end
    end
    if (!got) timeouts++;
  endtask

  // ---------------------------------------------------------------- tree procedures

  // data loading: one INPUT-AND-STORE per column tree, rows pipelined one per cycle
  task automatic load(input real tab [M][N]);
    foreach (col_dn[j]) col_dn[j] = pk(OP_STORECOL);
    tick();
    for (int r = 0; r < M; r++) begin
      foreach (col_dn[j]) col_dn[j] = pk(OP_SENDDOWN, to_fx(tab[r][j]), idx_t'(r));
      tick();
    end
    idle(LM + 2);
    n_load++;
  endtask

  // INPUT-AND-STORE of a single entry
  task automatic store(int i, int j, data_t v);
    col_dn[j] = pk(OP_STORECOL);
    tick();
    col_dn[j] = pk(OP_SENDDOWN, v, idx_t'(i));
    tick();
    idle(LM + 2);
    n_store++;
  endtask

  // ABSOLUTE-MINIMUM on rt_i (use_tmp: send tmp rather than the resident datum)
  task automatic absmin_row(int i, bit use_tmp = 0);
    row_dn[i] = pk(use_tmp ? OP_SENDUPROWT : OP_SENDUPROW);
    tick();
    row_dn[i] = pk(OP_MIN);
    wait_up(M'(1) << i, '0);
    n_absmin++;
  endtask

  // POSITIVE-MINIMUM of tmp on the column trees in cmask, in parallel
  task automatic posmin_cols(logic [N-1:0] cmask);
    for (int j = 0; j < N; j++) if (cmask[j]) col_dn[j] = pk(OP_SENDUPCOLT);
    tick();
    for (int j = 0; j < N; j++) if (cmask[j]) col_dn[j] = pk(OP_MINPOS);
    wait_up('0, cmask);
    n_posmin++;
  endtask

  // OUTPUT on the row trees in rmask, selecting the leaves of column k
  task automatic output_rows(logic [M-1:0] rmask, int k);
    for (int i = 0; i < M; i++) if (rmask[i]) row_dn[i] = pk(OP_SENDUP);
    if (LN > LM) begin tick(); idle(LN - LM - 1); end
    col_dn[k] = pk(OP_SENDUPROW);
    wait_up(rmask, '0);
    last_lat += LN - LM;  // counted from the SENDUP code
    if (last_lat != 2 * LN + 1) n_out_late++;
    n_out_row++;
  endtask

  // OUTPUT on the column trees in cmask, selecting the leaves of row h
  task automatic output_cols(logic [N-1:0] cmask, int h);
    for (int j = 0; j < N; j++) if (cmask[j]) col_dn[j] = pk(OP_SENDUP);
    row_dn[h] = pk(OP_SENDUPCOL);
    wait_up('0, cmask);
    n_out_col++;
  endtask

  // INPUT-AND-DIVIDE on the row trees in rmask: tmp(i,k) = v[i] / a_ik; bcast divides the
  // whole row instead of the one leaf (greatest decrement rule)
  task automatic input_divide(logic [M-1:0] rmask, data_t v [M], int k, bit bcast);
    for (int i = 0; i < M; i++) if (rmask[i]) row_dn[i] = pk(OP_DIV);
    tick();
    for (int i = 0; i < M; i++)
      if (rmask[i]) row_dn[i] = pk(bcast ? OP_BROADCAST : OP_SENDDOWN, v[i], idx_t'(k));
    tick();
    idle(LN + TD + 3);
    n_in_div++;
  endtask

  // BROADCAST-AND-DIVIDE: row h divided by v
  task automatic bcast_divide(int h, data_t v);
    row_dn[h] = pk(OP_BROADCAST, v);
    foreach (col_dn[j]) col_dn[j] = pk(OP_SIMPLEDIV);
    tick();
    idle(LN + TD + 3);
    n_bc_div++;
  endtask

  // BROADCAST-AND-COMPUTE: a_ij -= rv[i] * cv[j] for the rows in rmask. With paper_timing the
  // column trees start log n - log m cycles after the row trees, so every leaf receives the
  // COMPUTE code at log n - 1 and both operands together one cycle later; otherwise all roots
  // start at once and the leaves latch the operands as they come.
  task automatic bcast_compute(logic [M-1:0] rmask, data_t rv [M], data_t cv [N]);
    int s, r0, c0;
    s  = LN - LM;
    r0 = (paper_timing && s == 0) ? 1 : 0;    // cycle of the row BROADCAST
    c0 = paper_timing ? r0 + s - 1 : 0;       // cycle of the COMPUTE code on the column trees
    for (int t = 0; t <= c0 + 1 || t <= r0; t++) begin
      if (t == r0)
        for (int i = 0; i < M; i++) if (rmask[i]) row_dn[i] = pk(OP_BROADCAST, rv[i]);
      if (t == c0)     foreach (col_dn[j]) col_dn[j] = pk(OP_COMPUTE);
      if (t == c0 + 1) foreach (col_dn[j]) col_dn[j] = pk(OP_BROADCAST, cv[j]);
      tick();
    end
    idle(LN + 2);
    foreach (col_dn[j]) col_dn[j] = pk(OP_IDLE);
    tick();
    idle(LM + 1);
    n_bc_comp++;
    if (paper_timing) n_bc_comp_pt++;
  endtask

  // SUMMATION on the column trees in cmask (rows 1..M-1)
  task automatic sum_cols(logic [N-1:0] cmask, bit use_tmp);
    for (int j = 0; j < N; j++) if (cmask[j]) col_dn[j] = pk(use_tmp ? OP_SENDUPCOLT : OP_SENDUPCOL);
    tick();
    for (int j = 0; j < N; j++) if (cmask[j]) col_dn[j] = pk(OP_SUM);
    wait_up('0, cmask);
    n_sum++;
  endtask

  // INPUT-AND-SUBTRACT: row 0 entry j -= v[j] for the columns in cmask
  task automatic input_sub(logic [N-1:0] cmask, data_t v [N]);
    for (int j = 0; j < N; j++) if (cmask[j]) col_dn[j] = pk(OP_SUB);
    tick();
    for (int j = 0; j < N; j++) if (cmask[j]) col_dn[j] = pk(OP_SENDDOWN, v[j], '0);
    tick();
    idle(LM + 3);
    n_in_sub++;
  endtask

  // BROADCAST-AND-MULTIPLY: tmp(i,j) = a_ij * v[i] for the rows in rmask
  task automatic bcast_mul(logic [M-1:0] rmask, data_t v [M]);
    for (int i = 0; i < M; i++) if (rmask[i]) row_dn[i] = pk(OP_MULROW);
    tick();
    for (int i = 0; i < M; i++) if (rmask[i]) row_dn[i] = pk(OP_BROADCAST, v[i]);
    tick();
    idle(LN + 3);
    n_bc_mul++;
  endtask

  // INPUT-AND-MULTIPLY (bcast = 0: to row 0 only) or BROADCAST-AND-MULTIPLY (bcast = 1: to the
  // whole column) on the column trees in cmask: tmp(i,j) = a_ij * v[j]
  task automatic col_mul(logic [N-1:0] cmask, data_t v [N], bit bcast);
    for (int j = 0; j < N; j++) if (cmask[j]) col_dn[j] = pk(OP_MULCOL);
    tick();
    for (int j = 0; j < N; j++) if (cmask[j]) col_dn[j] = pk(bcast ? OP_BROADCAST : OP_SENDDOWN, v[j], '0);
    tick();
    idle(LM + 3);
    n_bc_mul++;
  endtask

  // SUMMATION of tmp on the row trees in rmask (columns 1..N-1)
  task automatic sum_rows(logic [M-1:0] rmask);
    for (int i = 0; i < M; i++) if (rmask[i]) row_dn[i] = pk(OP_SENDUPROWT);
    tick();
    for (int i = 0; i < M; i++) if (rmask[i]) row_dn[i] = pk(OP_SUM);
    wait_up(rmask, '0);
    n_sum++;
  endtask

  // nonzero selection on rt_h (replacing a basic artificial variable)
  task automatic selnz_row(int h);
    row_dn[h] = pk(OP_SENDUPROW);
    tick();
    row_dn[h] = pk(OP_SELNZ);
    wait_up(M'(1) << h, '0);
    n_selnz++;
  endtask

  // ---------------------------------------------------------------- simplex steps

  // pivot column by the most negative rule; returns k, or -1 if optimal
  task automatic select_col_mostneg(output int k);
    absmin_row(0);
    k = (rres[0] < -EPS) ? int'(rix[0]) : -1;
  endtask

  // pivot row for column k; returns h, or -1 if unbounded
  task automatic select_row(int k, output int h);
    data_t d [M];
    output_rows(M'({M{1'b1}}) & ~M'(1), 0);
    for (int i = 0; i < M; i++) d[i] = rres[i];
    input_divide(M'({M{1'b1}}) & ~M'(1), d, k, 1'b0);
    posmin_cols(N'(1) << k);
    h = int'(cix[k]);
  endtask

  // greatest decrement rule: returns k and h; k = -1 if optimal, h = -1 if unbounded
  task automatic select_greatest(output int k, output int h);
    data_t d [M];
    logic [N-1:0] cm;
    cm = N'({N{1'b1}}) & ~N'(1);
    output_rows(M'({M{1'b1}}) & ~M'(1), 0);
    for (int i = 0; i < M; i++) d[i] = rres[i];
    input_divide(M'({M{1'b1}}) & ~M'(1), d, 0, 1'b1);
    posmin_cols(cm);
    // minimum ratios down to row 0, multiplied there by the reduced costs
    for (int j = 1; j < N; j++) col_dn[j] = pk(OP_MULPOS);
    tick();
    for (int j = 1; j < N; j++) col_dn[j] = pk(OP_SENDDOWN, cres[j], '0);
    tick();
    idle(LM + 3);
    n_mulpos++;
    absmin_row(0, 1'b1);
    if (rres[0] < -EPS) begin
      k = int'(rix[0]);
      h = int'(cix[k]);
    end else begin
      // no step lowers the objective: fall back to the most negative rule, which finds a
      // degenerate pivot, unboundedness (h = -1) or optimality (k = -1)
      select_col_mostneg(k);
      h = -1;
      if (k >= 0) select_row(k, h);
    end
  endtask

  // pivoting on (h,k)
  task automatic pivot(int h, int k);
    data_t rv [M];
    data_t cv [N];
    output_rows(M'(1) << h, k);
    bcast_divide(h, rres[h]);
    output_rows(M'({M{1'b1}}) & ~(M'(1) << h), k);
    for (int i = 0; i < M; i++) rv[i] = rres[i];
    output_cols(N'({N{1'b1}}), h);
    for (int j = 0; j < N; j++) cv[j] = cres[j];
    bcast_compute(M'({M{1'b1}}) & ~(M'(1) << h), rv, cv);
  endtask

  // output of the solution: column 0 to the row roots
  task automatic output_solution();
    output_rows(M'({M{1'b1}}), 0);
  endtask

  // ---------------------------------------------------------------- reference tableau

  function automatic void ref_pivot(int h, int k);
    real p, f;
    p = ref_tab[h][k];
    for (int j = 0; j < N; j++) ref_tab[h][j] = ref_tab[h][j] / p;
    for (int i = 0; i < M; i++)
      if (i != h) begin
        f = ref_tab[i][k];
        for (int j = 0; j < N; j++) ref_tab[i][j] = ref_tab[i][j] - f * ref_tab[h][j];
      end
  endfunction

  function automatic int ref_col_mostneg();
    int k; real v;
    k = -1; v = 0.0;
    for (int j = 1; j < N; j++) if (ref_tab[0][j] < v - 1e-6 && ref_tab[0][j] < -0.004) begin v = ref_tab[0][j]; k = j; end
    return k;
  endfunction

  function automatic int ref_row(int k);
    int h; real v, r;
    h = -1; v = 0.0;
    for (int i = 1; i < M; i++)
      if (ref_tab[i][k] > 1e-9) begin
        r = ref_tab[i][0] / ref_tab[i][k];
        if (h < 0 || r < v - 1e-6) begin v = r; h = i; end
      end
    return h;
  endfunction

  // largest deviation of the mesh contents from the reference
  function automatic real max_err();
    real e, x;
    e = 0.0;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++) begin
        x = to_r(datum[i][j]) - ref_tab[i][j];
        if (x < 0.0) x = -x;
        if (x > e) e = x;
      end
    return e;
  endfunction

endmodule
