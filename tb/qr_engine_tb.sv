// qr_engine_tb: loads random fixed-point blocks, runs the Householder QR
// factorisation and checks (1) every R and V element against a factorisation
// computed here with the same fixed-point operations (square root computed
// independently through real arithmetic and corrected to the exact floor),
// (2) in real arithmetic, that P_0 ... P_{BLK-1} R reproduces the input and
// that each reflector has |v|^2 = 2 (or 0 for a zero column), and (3) the
// cycle count against the engine's phase count and the 1932-cycle figure
// quoted for a 16 x 16 QR macro node.
// The update node is tested after each factorisation: the V registers keep
// the reflectors, a new random block is loaded and updated, and the result is
// checked element by element against the same reflections computed here,
// in real arithmetic against the input (applying P_0 ... P_{BLK-1} to the
// result must give it back), and its cycle count against 2*BLK*BLK + 1 and
// the 1214 cycles given for a 16 x 16 QRUpdateTr node.
// The pair nodes follow: the R of the last factorisation is stacked over a new
// random block B and QRCPL eliminates B. R' and the reflectors (heads H read
// through the following QRUpdate, tails V read directly) are checked
// element by element against the same steps computed here, R' against
// R'^T R' = R^T R + B^T B in real arithmetic, and every stacked reflector for
// |[h; v]|^2 = 2. QRUpdate then applies them to a new random pair [A; B],
// checked element by element and, in real arithmetic, for preserved column
// norms of the stacked pair. Both counts are checked against the phase count
// (417 and 513 cycles) and the 3036 and 1890 cycles given for the 16 x 16
// QRCPL and QRUpdate nodes.
module qr_engine_tb;
  import memflow_pkg::*;
  localparam int unsigned BLK = 16, DIVS = 2;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, busy, done, el_we, el_re;
  qr_mode_e mode;
  logic [1:0] el_sel;
  logic [3:0] el_row, el_col;
  data_t el_wdata, el_rdata;
  int checks = 0, failures = 0;

  qr_engine #(.BLK(BLK), .DIVS(DIVS)) dut (.*);

  function automatic int signed rmul(int signed a, int signed b);
    longint p;
    p = longint'(a) * longint'(b);
    return int'(p >>> 16);
  endfunction
  function automatic int signed rdiv(int signed a, int signed b);
    if (b == 0) return 0;
    return int'((longint'(a) <<< 16) / longint'(b));
  endfunction
  function automatic int signed rsqrt(int signed a);
    longint n, r;
    if (a <= 0) return 0;
    n = longint'(a) <<< 16;
    r = longint'($floor($sqrt(real'(n))));
    while (r * r > n) r--;
    while ((r + 1) * (r + 1) <= n) r++;
    return int'(r);
  endfunction

  function automatic int expected_cycles();
    int n;
    n = 1;
    for (int k = 0; k < BLK; k++) n += 3 + (BLK + DIVS - 1) / DIVS + 2 * (BLK - 1 - k);
    return n;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  int signed v_prev [BLK][BLK];   // reflectors left in the engine

  task automatic update_case();
    int signed b0 [BLK][BLK];
    int signed r  [BLK][BLK];
    int signed gb [BLK][BLK];
    real m [BLK][BLK];
    real s, err;
    int cyc;
    for (int i = 0; i < BLK; i++)
      for (int j = 0; j < BLK; j++) begin
        b0[i][j] = int'($urandom_range(0, 1 << 17)) - (1 << 16);
        @(negedge clk);
        el_we = 1; el_sel = 0; el_row = 4'(i); el_col = 4'(j); el_wdata = b0[i][j];
      end
    @(negedge clk);
    el_we = 0;
    r = b0;
    for (int k = 0; k < BLK; k++)
      for (int j = 0; j < BLK; j++) begin
        int signed w;
        w = 0;
        for (int i = k; i < BLK; i++) w += rmul(v_prev[i][k], r[i][j]);
        for (int i = k; i < BLK; i++) r[i][j] -= rmul(v_prev[i][k], w);
      end
    @(negedge clk);
    start = 1; mode = QR_UTR;
    @(negedge clk);
    start = 0; mode = QR_FACT;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    chk(cyc == 2 * BLK * BLK + 1 && cyc <= 1214, $sformatf("update cycles %0d expected %0d", cyc, 2 * BLK * BLK + 1));
    for (int i = 0; i < BLK; i++)
      for (int j = 0; j < BLK; j++) begin
        @(negedge clk);
        el_re = 1; el_sel = 0; el_row = 4'(i); el_col = 4'(j);
        @(negedge clk);
        el_re = 0;
        gb[i][j] = el_rdata;
        chk(gb[i][j] == r[i][j], $sformatf("updated[%0d][%0d] = %0d expected %0d", i, j, gb[i][j], r[i][j]));
      end
    for (int i = 0; i < BLK; i++) for (int j = 0; j < BLK; j++) m[i][j] = real'(gb[i][j]) / 65536.0;
    for (int k = BLK - 1; k >= 0; k--)
      for (int j = 0; j < BLK; j++) begin
        s = 0.0;
        for (int i = 0; i < BLK; i++) s += real'(v_prev[i][k]) / 65536.0 * m[i][j];
        for (int i = 0; i < BLK; i++) m[i][j] -= real'(v_prev[i][k]) / 65536.0 * s;
      end
    err = 0.0;
    for (int i = 0; i < BLK; i++)
      for (int j = 0; j < BLK; j++) begin
        s = m[i][j] - real'(b0[i][j]) / 65536.0;
        if (s < 0) s = -s;
        if (s > err) err = s;
      end
    chk(err < 0.02, $sformatf("max |H(V) X - B| = %f", err));
  endtask

  task automatic one_case(int kind);
    int signed a0 [BLK][BLK];
    int signed r  [BLK][BLK];
    int signed vv [BLK][BLK];
    int signed gr [BLK][BLK];
    int signed gv [BLK][BLK];
    real m [BLK][BLK];
    real s, err, nv;
    int cyc;
    for (int i = 0; i < BLK; i++)
      for (int j = 0; j < BLK; j++) begin
        a0[i][j] = int'($urandom_range(0, 1 << 17)) - (1 << 16);
        if (kind == 1 && j == 3) a0[i][j] = 0;          // a zero column
        @(negedge clk);
        el_we = 1; el_sel = 0; el_row = 4'(i); el_col = 4'(j); el_wdata = a0[i][j];
      end
    @(negedge clk);
    el_we = 0;
    // reference
    r = a0;
    for (int i = 0; i < BLK; i++) for (int j = 0; j < BLK; j++) vv[i][j] = 0;
    for (int k = 0; k < BLK; k++) begin
      int signed sigma, alpha, d, w;
      sigma = 0;
      for (int i = k; i < BLK; i++) sigma += rmul(r[i][k], r[i][k]);
      alpha = (r[k][k] < 0) ? rsqrt(sigma) : -rsqrt(sigma);
      d = rsqrt(sigma - rmul(r[k][k], alpha));
      for (int i = k; i < BLK; i++) vv[i][k] = rdiv((i == k) ? r[k][k] - alpha : r[i][k], d);
      r[k][k] = alpha;
      for (int i = k + 1; i < BLK; i++) r[i][k] = 0;
      for (int j = k + 1; j < BLK; j++) begin
        w = 0;
        for (int i = k; i < BLK; i++) w += rmul(vv[i][k], r[i][j]);
        for (int i = k; i < BLK; i++) r[i][j] -= rmul(vv[i][k], w);
      end
    end
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    chk(cyc == expected_cycles() && cyc <= 1932, $sformatf("cycles %0d expected %0d", cyc, expected_cycles()));
    for (int t = 0; t < 2; t++)
      for (int i = 0; i < BLK; i++)
        for (int j = 0; j < BLK; j++) begin
          @(negedge clk);
          el_re = 1; el_sel = 2'(t); el_row = 4'(i); el_col = 4'(j);
          @(negedge clk);
          el_re = 0;
          if (t == 0) begin
            gr[i][j] = el_rdata;
            chk(gr[i][j] == r[i][j], $sformatf("R[%0d][%0d] = %0d expected %0d", i, j, gr[i][j], r[i][j]));
          end else begin
            gv[i][j] = el_rdata;
            chk(gv[i][j] == vv[i][j], $sformatf("V[%0d][%0d] = %0d expected %0d", i, j, gv[i][j], vv[i][j]));
          end
        end
    // real arithmetic: M = P_0 (P_1 (... (P_{n-1} R)))
    for (int i = 0; i < BLK; i++) for (int j = 0; j < BLK; j++) m[i][j] = real'(gr[i][j]) / 65536.0;
    for (int k = BLK - 1; k >= 0; k--) begin
      nv = 0.0;
      for (int i = 0; i < BLK; i++) nv += (real'(gv[i][k]) / 65536.0) ** 2;
      chk((nv > 1.98 && nv < 2.02) || nv < 1e-6, $sformatf("|v_%0d|^2 = %f", k, nv));
      for (int j = 0; j < BLK; j++) begin
        s = 0.0;
        for (int i = 0; i < BLK; i++) s += real'(gv[i][k]) / 65536.0 * m[i][j];
        for (int i = 0; i < BLK; i++) m[i][j] -= real'(gv[i][k]) / 65536.0 * s;
      end
    end
    err = 0.0;
    for (int i = 0; i < BLK; i++)
      for (int j = 0; j < BLK; j++) begin
        s = m[i][j] - real'(a0[i][j]) / 65536.0;
        if (s < 0) s = -s;
        if (s > err) err = s;
      end
    chk(err < 0.02, $sformatf("max |H(V) R - A| = %f", err));
    v_prev = gv;
    r_prev = gr;
  endtask

  int signed r_prev [BLK][BLK];   // R left in the engine by the last QR or QRCPL
  int signed vt [BLK][BLK];       // pair reflectors: tails
  int signed ht [BLK];            // and heads

  task automatic load(int sel, ref int signed x [BLK][BLK]);
    for (int i = 0; i < BLK; i++)
      for (int j = 0; j < BLK; j++) begin
        @(negedge clk);
        el_we = 1; el_sel = 2'(sel); el_row = 4'(i); el_col = 4'(j); el_wdata = x[i][j];
      end
    @(negedge clk);
    el_we = 0;
  endtask

  task automatic fetch(int sel, ref int signed x [BLK][BLK]);
    for (int i = 0; i < BLK; i++)
      for (int j = 0; j < BLK; j++) begin
        @(negedge clk);
        el_re = 1; el_sel = 2'(sel); el_row = 4'(i); el_col = 4'(j);
        @(negedge clk);
        el_re = 0;
        x[i][j] = el_rdata;
      end
  endtask

  task automatic run_mode(qr_mode_e md, output int cyc);
    @(negedge clk);
    start = 1; mode = md;
    @(negedge clk);
    start = 0; mode = QR_FACT;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
  endtask

  // one stacked reflector step on [ra; rb] with head ht[k] and tail vt[.][k]
  task automatic pair_apply(int k, int j, ref int signed ra [BLK][BLK], ref int signed rb [BLK][BLK]);
    int signed w;
    w = rmul(ht[k], ra[k][j]);
    for (int i = 0; i < BLK; i++) w += rmul(vt[i][k], rb[i][j]);
    ra[k][j] -= rmul(ht[k], w);
    for (int i = 0; i < BLK; i++) rb[i][j] -= rmul(vt[i][k], w);
  endtask

  task automatic cpl_case();
    int signed b0 [BLK][BLK];
    int signed r  [BLK][BLK];
    int signed rb [BLK][BLK];
    int signed gr [BLK][BLK];
    int signed gb [BLK][BLK];
    int signed gv [BLK][BLK];
    real s, err, nv;
    int cyc;
    for (int i = 0; i < BLK; i++)
      for (int j = 0; j < BLK; j++) b0[i][j] = int'($urandom_range(0, 1 << 17)) - (1 << 16);
    load(0, r_prev);
    load(2, b0);
    r = r_prev; rb = b0;
    for (int k = 0; k < BLK; k++) begin
      int signed sigma, alpha, d;
      sigma = 0;
      for (int i = 0; i < BLK; i++) sigma += rmul(rb[i][k], rb[i][k]);
      sigma += rmul(r[k][k], r[k][k]);
      alpha = (r[k][k] < 0) ? rsqrt(sigma) : -rsqrt(sigma);
      d = rsqrt(sigma - rmul(r[k][k], alpha));
      for (int i = 0; i < BLK; i++) begin
        vt[i][k] = rdiv(rb[i][k], d);
        rb[i][k] = 0;
      end
      ht[k] = rdiv(r[k][k] - alpha, d);
      r[k][k] = alpha;
      for (int j = k + 1; j < BLK; j++) pair_apply(k, j, r, rb);
    end
    run_mode(QR_CPL, cyc);
    chk(cyc == expected_cycles() && cyc <= 3036, $sformatf("QRCPL cycles %0d expected %0d", cyc, expected_cycles()));
    fetch(0, gr);
    fetch(1, gv);
    fetch(2, gb);
    for (int i = 0; i < BLK; i++)
      for (int j = 0; j < BLK; j++) begin
        chk(gr[i][j] == r[i][j], $sformatf("QRCPL R'[%0d][%0d] = %0d expected %0d", i, j, gr[i][j], r[i][j]));
        chk(gv[i][j] == vt[i][j], $sformatf("QRCPL V[%0d][%0d] = %0d expected %0d", i, j, gv[i][j], vt[i][j]));
        chk(gb[i][j] == 0, $sformatf("QRCPL B[%0d][%0d] = %0d not eliminated", i, j, gb[i][j]));
      end
    for (int k = 0; k < BLK; k++) begin
      nv = (real'(ht[k]) / 65536.0) ** 2;
      for (int i = 0; i < BLK; i++) nv += (real'(gv[i][k]) / 65536.0) ** 2;
      chk((nv > 1.98 && nv < 2.02) || nv < 1e-6, $sformatf("QRCPL |[h; v]_%0d|^2 = %f", k, nv));
    end
    err = 0.0;
    for (int i = 0; i < BLK; i++)
      for (int j = 0; j < BLK; j++) begin
        s = 0.0;
        for (int t = 0; t < BLK; t++)
          s += real'(gr[t][i]) * real'(gr[t][j]) - real'(r_prev[t][i]) * real'(r_prev[t][j])
               - real'(b0[t][i]) * real'(b0[t][j]);
        s = s / 65536.0 / 65536.0;
        if (s < 0) s = -s;
        if (s > err) err = s;
      end
    chk(err < 0.05, $sformatf("QRCPL max |R'^T R' - R^T R - B^T B| = %f", err));
    r_prev = gr;
  endtask

  task automatic pair_update_case();
    int signed a0 [BLK][BLK];
    int signed b0 [BLK][BLK];
    int signed ra [BLK][BLK];
    int signed rb [BLK][BLK];
    int signed ga [BLK][BLK];
    int signed gb [BLK][BLK];
    real s0, s1, err;
    int cyc;
    for (int i = 0; i < BLK; i++)
      for (int j = 0; j < BLK; j++) begin
        a0[i][j] = int'($urandom_range(0, 1 << 17)) - (1 << 16);
        b0[i][j] = int'($urandom_range(0, 1 << 17)) - (1 << 16);
      end
    load(0, a0);
    load(2, b0);
    ra = a0; rb = b0;
    for (int k = 0; k < BLK; k++)
      for (int j = 0; j < BLK; j++) pair_apply(k, j, ra, rb);
    run_mode(QR_UPD, cyc);
    chk(cyc == 2 * BLK * BLK + 1 && cyc <= 1890, $sformatf("QRUpdate cycles %0d expected %0d", cyc, 2 * BLK * BLK + 1));
    fetch(0, ga);
    fetch(2, gb);
    for (int i = 0; i < BLK; i++)
      for (int j = 0; j < BLK; j++) begin
        chk(ga[i][j] == ra[i][j], $sformatf("QRUpdate A[%0d][%0d] = %0d expected %0d", i, j, ga[i][j], ra[i][j]));
        chk(gb[i][j] == rb[i][j], $sformatf("QRUpdate B[%0d][%0d] = %0d expected %0d", i, j, gb[i][j], rb[i][j]));
      end
    err = 0.0;
    for (int j = 0; j < BLK; j++) begin
      s0 = 0.0; s1 = 0.0;
      for (int i = 0; i < BLK; i++) begin
        s0 += (real'(a0[i][j]) ** 2 + real'(b0[i][j]) ** 2) / 65536.0 / 65536.0;
        s1 += (real'(ga[i][j]) ** 2 + real'(gb[i][j]) ** 2) / 65536.0 / 65536.0;
      end
      if (s1 - s0 > err) err = s1 - s0;
      if (s0 - s1 > err) err = s0 - s1;
    end
    chk(err < 0.05, $sformatf("QRUpdate column norms changed by %f", err));
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; start = 0; mode = QR_FACT; el_we = 0; el_re = 0; el_sel = 0; el_row = 0; el_col = 0; el_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    one_case(0);
    update_case();
    one_case(1);
    update_case();
    one_case(0);
    update_case();
    cpl_case();
    pair_update_case();
    cpl_case();
    pair_update_case();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
