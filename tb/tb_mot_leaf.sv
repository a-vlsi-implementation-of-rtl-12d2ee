// tb_mot_leaf: self-checking test of one leaf (row 2, column 3).
//
// Each leaf operation is driven through the row and column inputs as the trees would deliver
// it, and the result is read back with the send codes (SENDUPROW/SENDUPCOL for the resident
// datum, SENDUPROWT/SENDUPCOLT for tmp). Expected values are computed here with 64-bit integer
// arithmetic on the fixed-point words. Checked: STORECOL with matching and non-matching index,
// the send codes and their one-cycle answer, DIV (including the -1 result for a nonpositive
// divisor and its latency of DATA_W + FRAC_W + 2 cycles from the operand), SIMPLEDIV
// (including a zero divisor), COMPUTE with skewed operands, MULPOS, SUB, MULROW, MULCOL and
// IDLE cancelling a pending operation.
module tb_mot_leaf;
  import mot_pkg::*;

  localparam int ROW = 2, COL = 3;
  localparam int TD = DATA_W + FRAC_W;

  logic  clk = 0, rst_n = 0;
  dn_t   rdn, cdn;
  up_t   rup, cup;
  data_t datum;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  mot_leaf #(.ROW(ROW), .COL(COL)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic tick();
    @(posedge clk); #1;
    rdn = DN_NONE; cdn = DN_NONE;
  endtask

  function automatic dn_t pk(op_e op, data_t d = '0, idx_t x = '0);
    dn_t p;
    p.op = op; p.data = d; p.idx = x;
    return p;
  endfunction

  function automatic data_t fxd(data_t a, data_t b);
    longint q;
    q = (longint'(a) * 65536) / longint'(b);
    return data_t'(q);
  endfunction

  function automatic data_t fxm(data_t a, data_t b);
    longint p;
    p = longint'(a) * longint'(b);
    return data_t'(p >>> 16);
  endfunction

  function automatic data_t rnd(int lim = 50);
    data_t v;
    v = data_t'($urandom_range(0, 2 * lim * 256)) - data_t'(lim * 256);
    return v <<< 8;
  endfunction

  task automatic store(data_t v);
    cdn = pk(OP_STORECOL); tick();
    cdn = pk(OP_SENDDOWN, v, idx_t'(ROW)); tick();
    tick();
  endtask

  task automatic get_row(output up_t u);
    rdn = pk(OP_SENDUPROW); tick();
    u = rup;
  endtask

  task automatic get_tmp(output up_t u);
    cdn = pk(OP_SENDUPCOLT); tick();
    u = cup;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    up_t u;
    data_t a, b, v;
    rdn = DN_NONE; cdn = DN_NONE;
    repeat (2) @(posedge clk);
    rst_n = 1;
    tick();

    for (int t = 0; t < 25; t++) begin
      // STORECOL: only the matching row index stores
      a = rnd();
      store(a);
      check(datum == a, "STORECOL stores");
      cdn = pk(OP_STORECOL); tick();
      cdn = pk(OP_SENDDOWN, a + 1, idx_t'(ROW + 1)); tick(); tick();
      check(datum == a, "STORECOL ignores another row's index");
      cdn = pk(OP_IDLE); tick();

      // send codes answer one cycle later
      rdn = pk(OP_SENDUPROW); tick();
      check(rup.valid && rup.data == a && rup.idx == COL && !cup.valid, "SENDUPROW");
      tick();
      check(!rup.valid, "SENDUPROW answers for one cycle");
      cdn = pk(OP_SENDUPCOL); tick();
      check(cup.valid && cup.data == a && cup.idx == ROW && !rup.valid, "SENDUPCOL");

      // DIV: tmp = row datum / resident, with its latency
      b = rnd();
      if (b == 0) b = 1;
      store(b);
      v = rnd();
      rdn = pk(OP_DIV); tick();
      rdn = pk(OP_SENDDOWN, v, idx_t'(COL));
      begin
        int lat;
        data_t want;
        want = (b > 0) ? fxd(v, b) : FX_M1;
        // poll tmp every cycle; the answer shows the value tmp had one cycle earlier
        lat = 0;
        tick();
        do begin
          cdn = pk(OP_SENDUPCOLT);
          tick();
          lat++;
        end while (cup.data != want && lat < 200);
        check(lat - 1 == TD + 2, $sformatf("DIV latency %0d", lat - 1));
        get_tmp(u);
        check(u.valid && u.data == want && u.idx == ROW,
              $sformatf("DIV %0d / %0d = %0d, want %0d", v, b, u.data, want));
      end

      // SIMPLEDIV: resident = resident / row datum; a zero divisor leaves it unchanged
      a = rnd(); store(a);
      b = rnd(20);
      if (b == 0) b = 3 <<< 16;
      cdn = pk(OP_SIMPLEDIV); tick();
      rdn = pk(OP_BROADCAST, b); tick();
      repeat (TD + 4) tick();
      check(datum == fxd(a, b), $sformatf("SIMPLEDIV %0d / %0d = %0d", a, b, datum));
      a = datum;
      cdn = pk(OP_SIMPLEDIV); tick();
      rdn = pk(OP_BROADCAST, '0); tick();
      repeat (TD + 4) tick();
      check(datum == a, "SIMPLEDIV by zero leaves the datum");

      // COMPUTE with the column operand arriving two cycles after the row operand
      a = rnd(); store(a);
      b = rnd(); v = rnd();
      cdn = pk(OP_COMPUTE); tick();
      rdn = pk(OP_BROADCAST, b); tick();
      tick();
      check(datum == a, "COMPUTE waits for both operands");
      cdn = pk(OP_BROADCAST, v); tick();
      tick(); tick();
      check(datum == a - fxm(b, v), $sformatf("COMPUTE %0d - %0d * %0d = %0d", a, b, v, datum));

      // MULPOS
      a = rnd(); store(a);
      v = rnd();
      cdn = pk(OP_MULPOS); tick();
      cdn = pk(OP_SENDDOWN, v, idx_t'(ROW)); tick(); tick(); tick();
      rdn = pk(OP_SENDUPROWT); tick();
      check(rup.valid && rup.data == ((a < 0 && v >= 0) ? fxm(a, v) : DATA_MAX) && rup.idx == COL,
            $sformatf("MULPOS %0d * %0d", a, v));
      check(datum == a, "MULPOS keeps the resident datum");

      // SUB
      v = rnd();
      cdn = pk(OP_SUB); tick();
      cdn = pk(OP_SENDDOWN, v, idx_t'(ROW)); tick(); tick(); tick();
      check(datum == a - v, "SUB");
      a = datum;

      // MULROW and MULCOL
      v = rnd();
      rdn = pk(OP_MULROW); tick();
      rdn = pk(OP_BROADCAST, v); tick(); tick(); tick();
      get_tmp(u);
      check(u.data == fxm(a, v), "MULROW");
      v = rnd();
      cdn = pk(OP_MULCOL); tick();
      cdn = pk(OP_BROADCAST, v); tick(); tick(); tick();
      get_tmp(u);
      check(u.data == fxm(a, v), "MULCOL");

      // IDLE cancels a pending operation
      cdn = pk(OP_SUB); tick();
      cdn = pk(OP_IDLE); tick();
      cdn = pk(OP_SENDDOWN, v, idx_t'(ROW)); tick(); tick(); tick();
      check(datum == a, "IDLE cancels SUB");
    end

    // DIV by a nonpositive resident gives -1
    store(-(5 <<< 16));
    rdn = pk(OP_DIV); tick();
    rdn = pk(OP_BROADCAST, 7 <<< 16); tick();
    repeat (TD + 4) tick();
    get_tmp(u);
    check(u.data == FX_M1, "DIV by a negative resident gives -1");
    store('0);
    rdn = pk(OP_DIV); tick();
    rdn = pk(OP_BROADCAST, 7 <<< 16); tick();
    repeat (TD + 4) tick();
    get_tmp(u);
    check(u.data == FX_M1, "DIV by a zero resident gives -1");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
