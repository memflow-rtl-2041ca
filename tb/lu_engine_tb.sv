// lu_engine_tb: runs the three LU macro nodes of the engine on random
// fixed-point blocks.
//   LU   : a diagonally dominant block is factorised in place; every element
//          is checked against a Doolittle factorisation computed here with the
//          same fixed-point rounding, and L * U, in real arithmetic, must
//          reproduce the input within a small tolerance.
//   TRS  : the factor block is a previous LU result; the output X must match
//          forward substitution with the unit lower L in the same rounding,
//          and L * X must reproduce the input in real arithmetic.
//   LUCPL: the factor block is a previous LU result; the output X must match
//          column-by-column substitution with U in the same rounding, and
//          X * U must reproduce the input in real arithmetic.
// Every run's cycle count is checked against the engine's phase count and
// against the 222 cycles given for a 16 x 16 LU, LUCPL and TRS node.
module lu_engine_tb;
  import memflow_pkg::*;
  localparam int unsigned BLK = 16, DIVS = 16, LANES = 64, ROWS = LANES / BLK;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, busy, done, el_we, el_re, el_sel;
  lu_mode_e mode;
  logic [3:0] el_row, el_col;
  data_t el_wdata, el_rdata;
  int checks = 0, failures = 0;

  lu_engine #(.BLK(BLK), .DIVS(DIVS), .LANES(LANES)) dut (.*);

  function automatic int signed rmul(int signed a, int signed b);
    longint p;
    p = longint'(a) * longint'(b);
    return int'(p >>> 16);
  endfunction
  function automatic int signed rdiv(int signed a, int signed b);
    if (b == 0) return 0;
    return int'((longint'(a) <<< 16) / longint'(b));
  endfunction

  function automatic int expected_cycles(lu_mode_e md);
    int n;
    n = 1;
    if (md == LU_FACT)
      for (int k = 0; k <= int'(BLK) - 2; k++)
        n += (BLK - 1 - k + DIVS - 1) / DIVS + (BLK - 1 - k + ROWS - 1) / ROWS;
    else if (md == LU_TRS)
      for (int k = 0; k <= int'(BLK) - 2; k++) n += (BLK - 1 - k + ROWS - 1) / ROWS;
    else
      n += BLK * ((BLK + DIVS - 1) / DIVS) + (BLK - 1) * ((BLK + ROWS - 1) / ROWS);
    return n;
  endfunction

  int signed lu_prev [BLK][BLK];   // last LU result, used as factor block

  task automatic write_blk(bit sel, int signed m [BLK][BLK]);
    for (int i = 0; i < BLK; i++)
      for (int j = 0; j < BLK; j++) begin
        @(negedge clk);
        el_we = 1; el_sel = sel; el_row = 4'(i); el_col = 4'(j); el_wdata = m[i][j];
      end
    @(negedge clk);
    el_we = 0; el_sel = 0;
  endtask

  task automatic run(lu_mode_e md);
    int cyc;
    @(negedge clk);
    start = 1; mode = md;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != expected_cycles(md) || cyc > 222) begin
      failures++;
      $display("FAIL mode %0d cycles %0d expected %0d (bound 222)", md, cyc, expected_cycles(md));
    end
  endtask

  task automatic read_cmp(int signed r [BLK][BLK], output int signed got [BLK][BLK]);
    for (int i = 0; i < BLK; i++)
      for (int j = 0; j < BLK; j++) begin
        @(negedge clk);
        el_re = 1; el_sel = 0; el_row = 4'(i); el_col = 4'(j);
        @(negedge clk);
        el_re = 0;
        got[i][j] = el_rdata;
        checks++;
        if (got[i][j] != r[i][j]) begin
          failures++;
          if (failures < 10) $display("FAIL a[%0d][%0d] = %0d expected %0d", i, j, got[i][j], r[i][j]);
        end
      end
  endtask

  // TRS (md = LU_TRS) or LUCPL on a random block with lu_prev as factor
  task automatic panel_case(lu_mode_e md);
    int signed a0 [BLK][BLK];
    int signed r  [BLK][BLK];
    int signed got [BLK][BLK];
    real s, err;
    for (int i = 0; i < BLK; i++)
      for (int j = 0; j < BLK; j++) a0[i][j] = int'($urandom_range(0, 1 << 17)) - (1 << 16);
    write_blk(1, lu_prev);
    write_blk(0, a0);
    r = a0;
    if (md == LU_TRS) begin
      // X = L^-1 A: row k of X is final once rows above are subtracted
      for (int k = 0; k < BLK - 1; k++)
        for (int i = k + 1; i < BLK; i++)
          for (int j = 0; j < BLK; j++) r[i][j] = r[i][j] - rmul(lu_prev[i][k], r[k][j]);
    end else begin
      // X = A U^-1: column k of X is divided by u_kk, then removed from the right
      for (int k = 0; k < BLK; k++) begin
        for (int i = 0; i < BLK; i++) r[i][k] = rdiv(r[i][k], lu_prev[k][k]);
        for (int i = 0; i < BLK; i++)
          for (int j = k + 1; j < BLK; j++) r[i][j] = r[i][j] - rmul(r[i][k], lu_prev[k][j]);
      end
    end
    run(md);
    read_cmp(r, got);
    // product with the factor against the input, in real arithmetic
    err = 0.0;
    for (int i = 0; i < BLK; i++)
      for (int j = 0; j < BLK; j++) begin
        s = 0.0;
        for (int k = 0; k < BLK; k++)
          if (md == LU_TRS) begin
            if (k <= i) s += ((k == i) ? 1.0 : real'(lu_prev[i][k]) / 65536.0) * (real'(got[k][j]) / 65536.0);
          end else begin
            if (k <= j) s += (real'(got[i][k]) / 65536.0) * (real'(lu_prev[k][j]) / 65536.0);
          end
        s -= real'(a0[i][j]) / 65536.0;
        if (s < 0) s = -s;
        if (s > err) err = s;
      end
    checks++;
    if (err > 0.01) begin
      failures++;
      $display("FAIL mode %0d max |F*X - A| = %f", md, err);
    end
  endtask

  task automatic one_case();
    int signed a0 [BLK][BLK];
    int signed r  [BLK][BLK];
    int signed got [BLK][BLK];
    real s, err;
    for (int i = 0; i < BLK; i++)
      for (int j = 0; j < BLK; j++)
        a0[i][j] = (i == j) ? int'($urandom_range(4 << 16, 8 << 16))
                            : int'($urandom_range(0, 1 << 16)) - (1 << 15);
    write_blk(0, a0);
    // reference
    r = a0;
    for (int k = 0; k < BLK - 1; k++) begin
      for (int i = k + 1; i < BLK; i++) r[i][k] = rdiv(r[i][k], r[k][k]);
      for (int i = k + 1; i < BLK; i++)
        for (int j = k + 1; j < BLK; j++) r[i][j] = r[i][j] - rmul(r[i][k], r[k][j]);
    end
    run(LU_FACT);
    read_cmp(r, got);
    lu_prev = got;
    // L * U against the input, in real arithmetic
    err = 0.0;
    for (int i = 0; i < BLK; i++)
      for (int j = 0; j < BLK; j++) begin
        s = 0.0;
        for (int k = 0; k <= i && k <= j; k++)
          s += ((k == i) ? 1.0 : real'(got[i][k]) / 65536.0) * (real'(got[k][j]) / 65536.0);
        s -= real'(a0[i][j]) / 65536.0;
        if (s < 0) s = -s;
        if (s > err) err = s;
      end
    checks++;
    if (err > 0.01) begin
      failures++;
      $display("FAIL max |L*U - A| = %f", err);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; start = 0; mode = LU_FACT; el_we = 0; el_re = 0; el_sel = 0; el_row = 0; el_col = 0; el_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (4) begin
      one_case();
      panel_case(LU_TRS);
      panel_case(LU_CPL);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
