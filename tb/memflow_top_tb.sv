// memflow_top_tb: end-to-end test of the accelerator at its default
// parameters, with a DRAM model that refuses requests at random.
//   1. C = A*B for 6 x 6 x 3 blocks of 16 x 16 (96x48 times 48x96) in the
//      l-i-j order: C has 36 blocks for 32 slots and A 18 blocks for 16
//      slots, so blocks are evicted and partial sums spilled and reloaded.
//   2. C = A*B on 2 x 2 x 2 blocks in every other loop order.
//   3. C = C - A*B (accumulate, negate) on 2 x 3 x 2 blocks.
//   4. In-place LU factorisation of one block.
//   5. Householder QR of one block: R over the block, V to another matrix.
//   6. Blocked LU of a 32 x 32 matrix stored as 2 x 2 tiles, by chaining
//      single-block operations: LU(A00), TRS(A01), LUCPL(A10),
//      A11 -= A10 * A01 (subtracting multiply), LU(A11). Checked word by word
//      against the same chain computed here, and L * U against the input in
//      real arithmetic.
//   7. QR of a 16 x 32 matrix stored as two tiles: QR(A0), then the update
//      node applies its reflectors to A1. Checked word by word and, in real
//      arithmetic, H(V) [R0 R1] against the input.
//   8. Blocked QR of a 32 x 32 matrix stored as 2 x 2 tiles: QR(A00),
//      QRUpdateTr(A01), QRCPL eliminating A10 below R00, QRUpdate of the pair
//      (A01, A11), QR(A11). Checked word by word against the same chain
//      computed here, and R^T R against A^T A in real arithmetic.
// Every result word in DRAM is compared with a result computed here with
// 64-bit integer arithmetic, and each MM run's event counts with a replay of
// the schedule. Each mechanism (DRAM stall, hit per region, eviction, spill,
// reload of partial sums, start from zero, accumulate, subtract, LU, TRS,
// LUCPL, QR, QRUpdateTr, QRCPL, QRUpdate) must occur at least once.
module memflow_top_tb;
  import memflow_pkg::*;
  import sched_ref_pkg::*;
  localparam int unsigned BLK = 16, WORDS = 65536;
  localparam int unsigned SA = 16, SB = 32, SC = 32;   // slots at the defaults

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, accumulate, negate, busy, done;
  op_e op;
  loop_order_e order;
  logic [7:0] nb_m, nb_n, nb_k;
  logic [31:0] a_base, b_base, c_base, mem_addr;
  stats_t stats;
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  data_t mem_wdata, mem_rdata;
  int unsigned stalls;
  int checks = 0, failures = 0;

  memflow_top dut (.*);

  dram_model #(.WORDS(WORDS), .ADDR_W(32), .LATENCY(6), .STALL_PCT(20)) u_dram (
    .clk, .rst_n, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata), .stalls
  );

  // mechanism counters
  int m_spill = 0, m_evict = 0, m_reload = 0, m_zero = 0, m_hit_a = 0, m_hit_b = 0,
      m_hit_c = 0, m_acc = 0, m_neg = 0, m_lu = 0, m_qr = 0, m_trs = 0, m_cpl = 0,
      m_qru = 0, m_qcpl = 0, m_qpupd = 0;

  typedef int signed blk_t [BLK][BLK];

  // ---- fixed-point references of the single-block operations ----
  task automatic ref_lu(inout blk_t r);
    for (int k = 0; k < BLK - 1; k++) begin
      for (int i = k + 1; i < BLK; i++) r[i][k] = rdiv(r[i][k], r[k][k]);
      for (int i = k + 1; i < BLK; i++)
        for (int j = k + 1; j < BLK; j++) r[i][j] = r[i][j] - rmul(r[i][k], r[k][j]);
    end
  endtask
  task automatic ref_trs(inout blk_t r, input blk_t f);
    for (int k = 0; k < BLK - 1; k++)
      for (int i = k + 1; i < BLK; i++)
        for (int j = 0; j < BLK; j++) r[i][j] = r[i][j] - rmul(f[i][k], r[k][j]);
  endtask
  task automatic ref_cpl(inout blk_t r, input blk_t f);
    for (int k = 0; k < BLK; k++) begin
      for (int i = 0; i < BLK; i++) r[i][k] = rdiv(r[i][k], f[k][k]);
      for (int i = 0; i < BLK; i++)
        for (int j = k + 1; j < BLK; j++) r[i][j] = r[i][j] - rmul(r[i][k], f[k][j]);
    end
  endtask
  task automatic ref_qr(inout blk_t r, output blk_t vv);
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
  endtask
  task automatic ref_qrupd(inout blk_t r, input blk_t vv);
    for (int k = 0; k < BLK; k++)
      for (int j = 0; j < BLK; j++) begin
        int signed w;
        w = 0;
        for (int i = k; i < BLK; i++) w += rmul(vv[i][k], r[i][j]);
        for (int i = k; i < BLK; i++) r[i][j] -= rmul(vv[i][k], w);
      end
  endtask

  // pair nodes: [R; B] -> [R'; 0] with heads hh and tails vv, and their
  // application to a pair [A; B]
  task automatic ref_pair_step(int k, int j, inout blk_t ra, inout blk_t rb, input blk_t vv,
                               input int signed hh [BLK]);
    int signed w;
    w = rmul(hh[k], ra[k][j]);
    for (int i = 0; i < BLK; i++) w += rmul(vv[i][k], rb[i][j]);
    ra[k][j] -= rmul(hh[k], w);
    for (int i = 0; i < BLK; i++) rb[i][j] -= rmul(vv[i][k], w);
  endtask
  task automatic ref_qrcpl(inout blk_t r, inout blk_t b, output blk_t vv, output int signed hh [BLK]);
    for (int k = 0; k < BLK; k++) begin
      int signed sigma, alpha, d;
      sigma = 0;
      for (int i = 0; i < BLK; i++) sigma += rmul(b[i][k], b[i][k]);
      sigma += rmul(r[k][k], r[k][k]);
      alpha = (r[k][k] < 0) ? rsqrt(sigma) : -rsqrt(sigma);
      d = rsqrt(sigma - rmul(r[k][k], alpha));
      for (int i = 0; i < BLK; i++) begin
        vv[i][k] = rdiv(b[i][k], d);
        b[i][k] = 0;
      end
      hh[k] = rdiv(r[k][k] - alpha, d);
      r[k][k] = alpha;
      for (int j = k + 1; j < BLK; j++) ref_pair_step(k, j, r, b, vv, hh);
    end
  endtask

  // tiles: contiguous 16 x 16 blocks (row length 16) from TILE0
  localparam int unsigned TILE0 = 50000;
  function automatic int unsigned tile(int t);
    return TILE0 + t * BLK * BLK;
  endfunction
  task automatic put_tile(int t, blk_t m);
    for (int i = 0; i < BLK; i++) for (int j = 0; j < BLK; j++) u_dram.mem[tile(t) + i * BLK + j] = m[i][j];
  endtask
  task automatic cmp_tile(int t, blk_t m, string what);
    for (int i = 0; i < BLK; i++)
      for (int j = 0; j < BLK; j++)
        chk(u_dram.mem[tile(t) + i * BLK + j] == m[i][j], $sformatf("%s[%0d][%0d] = %0d expected %0d",
            what, i, j, u_dram.mem[tile(t) + i * BLK + j], m[i][j]));
  endtask
  task automatic single(op_e o, int ta, int tb, int tc, string what);
    op = o; order = ORD_IJL; nb_m = 1; nb_n = 1; nb_k = 1;
    accumulate = (o == OP_MM); negate = (o == OP_MM);
    a_base = tile(ta); b_base = tile(tb); c_base = tile(tc);
    $display("%s", what);
    go();
  endtask

  // blocked LU of a 2 x 2 tile matrix: tiles 0 1 / 2 3
  task automatic run_blocked_lu();
    blk_t a0 [4];
    blk_t r [4];
    real s, err;
    for (int t = 0; t < 4; t++)
      for (int i = 0; i < BLK; i++)
        for (int j = 0; j < BLK; j++)
          a0[t][i][j] = (i == j && (t == 0 || t == 3)) ? int'($urandom_range(8 << 16, 12 << 16))
                                                      : int'($urandom_range(0, 1 << 16)) - (1 << 15);
    for (int t = 0; t < 4; t++) put_tile(t, a0[t]);
    r = a0;
    ref_lu(r[0]);
    ref_trs(r[1], r[0]);
    ref_cpl(r[2], r[0]);
    for (int i = 0; i < BLK; i++)
      for (int j = 0; j < BLK; j++)
        for (int k = 0; k < BLK; k++) r[3][i][j] -= rmul(r[2][i][k], r[1][k][j]);
    ref_lu(r[3]);
    single(OP_LU, 0, 0, 0, "blocked LU: LU of A00");
    single(OP_TRS, 1, 0, 0, "blocked LU: TRS of A01");
    single(OP_LUCPL, 2, 0, 0, "blocked LU: LUCPL of A10");
    single(OP_MM, 2, 1, 3, "blocked LU: A11 -= A10 * A01");
    single(OP_LU, 3, 0, 0, "blocked LU: LU of A11");
    for (int t = 0; t < 4; t++) cmp_tile(t, r[t], $sformatf("blocked LU tile %0d", t));
    // L * U against the input, from the words in DRAM, in real arithmetic
    err = 0.0;
    for (int i = 0; i < 2 * BLK; i++)
      for (int j = 0; j < 2 * BLK; j++) begin
        s = 0.0;
        for (int k = 0; k <= i && k <= j; k++) begin
          real l, u;
          l = (k == i) ? 1.0 : real'(int'(u_dram.mem[tile((i / BLK) * 2 + k / BLK) + (i % BLK) * BLK + k % BLK])) / 65536.0;
          u = real'(int'(u_dram.mem[tile((k / BLK) * 2 + j / BLK) + (k % BLK) * BLK + j % BLK])) / 65536.0;
          s += l * u;
        end
        s -= real'(a0[(i / BLK) * 2 + j / BLK][i % BLK][j % BLK]) / 65536.0;
        if (s < 0) s = -s;
        if (s > err) err = s;
      end
    chk(err < 0.02, $sformatf("blocked LU: max |L*U - A| = %f", err));
    m_lu += 2; m_trs++; m_cpl++; m_neg++; m_acc++;
  endtask

  // QR of a 16 x 32 matrix: tiles 4 5, V to tile 6
  task automatic run_wide_qr();
    blk_t a0 [2];
    blk_t r [2];
    blk_t vv;
    real m [BLK][2 * BLK];
    real s, err;
    for (int t = 0; t < 2; t++)
      for (int i = 0; i < BLK; i++)
        for (int j = 0; j < BLK; j++) a0[t][i][j] = int'($urandom_range(0, 1 << 17)) - (1 << 16);
    put_tile(4, a0[0]);
    put_tile(5, a0[1]);
    r = a0;
    ref_qr(r[0], vv);
    ref_qrupd(r[1], vv);
    single(OP_QR, 4, 0, 6, "wide QR: QR of A0");
    single(OP_QRUTR, 5, 6, 0, "wide QR: update of A1");
    cmp_tile(4, r[0], "wide QR R0");
    cmp_tile(5, r[1], "wide QR R1");
    cmp_tile(6, vv, "wide QR V");
    for (int i = 0; i < BLK; i++)
      for (int j = 0; j < 2 * BLK; j++)
        m[i][j] = real'(int'(u_dram.mem[tile(4 + j / BLK) + i * BLK + j % BLK])) / 65536.0;
    for (int k = BLK - 1; k >= 0; k--)
      for (int j = 0; j < 2 * BLK; j++) begin
        s = 0.0;
        for (int i = 0; i < BLK; i++) s += real'(vv[i][k]) / 65536.0 * m[i][j];
        for (int i = 0; i < BLK; i++) m[i][j] -= real'(vv[i][k]) / 65536.0 * s;
      end
    err = 0.0;
    for (int i = 0; i < BLK; i++)
      for (int j = 0; j < 2 * BLK; j++) begin
        s = m[i][j] - real'(a0[j / BLK][i][j % BLK]) / 65536.0;
        if (s < 0) s = -s;
        if (s > err) err = s;
      end
    chk(err < 0.03, $sformatf("wide QR: max |H(V) R - A| = %f", err));
    m_qr++; m_qru++;
  endtask

  // blocked QR of a 2 x 2 tile matrix: tiles 7 8 / 9 10; V of the diagonal
  // QRs to tiles 11 and 12, the QRCPL tails over tile 9
  task automatic run_blocked_qr();
    blk_t a0 [4];
    blk_t r [4];
    blk_t v0, v1, vt;
    int signed hh [BLK];
    real s, err;
    for (int t = 0; t < 4; t++)
      for (int i = 0; i < BLK; i++)
        for (int j = 0; j < BLK; j++) a0[t][i][j] = int'($urandom_range(0, 1 << 17)) - (1 << 16);
    for (int t = 0; t < 4; t++) put_tile(7 + t, a0[t]);
    r = a0;
    ref_qr(r[0], v0);
    ref_qrupd(r[1], v0);
    ref_qrcpl(r[0], r[2], vt, hh);
    for (int k = 0; k < BLK; k++)
      for (int j = 0; j < BLK; j++) ref_pair_step(k, j, r[1], r[3], vt, hh);
    ref_qr(r[3], v1);
    single(OP_QR, 7, 0, 11, "blocked QR: QR of A00");
    single(OP_QRUTR, 8, 11, 0, "blocked QR: QRUpdateTr of A01");
    single(OP_QRCPL, 7, 9, 0, "blocked QR: QRCPL of A10 below R00");
    single(OP_QRUPD, 8, 10, 0, "blocked QR: QRUpdate of (A01, A11)");
    single(OP_QR, 10, 0, 12, "blocked QR: QR of A11");
    cmp_tile(7, r[0], "blocked QR R00");
    cmp_tile(8, r[1], "blocked QR R01");
    cmp_tile(9, vt, "blocked QR QRCPL tails");
    cmp_tile(10, r[3], "blocked QR R11");
    cmp_tile(11, v0, "blocked QR V00");
    cmp_tile(12, v1, "blocked QR V11");
    // R^T R = A^T A, with R = [R00 R01; 0 R11] read from DRAM
    err = 0.0;
    for (int i = 0; i < 2 * BLK; i++)
      for (int j = 0; j < 2 * BLK; j++) begin
        s = 0.0;
        for (int k = 0; k < 2 * BLK; k++) begin
          real ri, rj;
          ri = (k >= BLK && i < BLK) ? 0.0 :
               real'(int'(u_dram.mem[tile(7 + (k / BLK) * 2 + i / BLK) + (k % BLK) * BLK + i % BLK])) / 65536.0;
          rj = (k >= BLK && j < BLK) ? 0.0 :
               real'(int'(u_dram.mem[tile(7 + (k / BLK) * 2 + j / BLK) + (k % BLK) * BLK + j % BLK])) / 65536.0;
          s += ri * rj - real'(a0[(k / BLK) * 2 + i / BLK][k % BLK][i % BLK]) / 65536.0
                       * real'(a0[(k / BLK) * 2 + j / BLK][k % BLK][j % BLK]) / 65536.0;
        end
        if (s < 0) s = -s;
        if (s > err) err = s;
      end
    chk(err < 0.1, $sformatf("blocked QR: max |R^T R - A^T A| = %f", err));
    $display("blocked QR 32x32: max |R^T R - A^T A| = %f", err);
    m_qr += 2; m_qru++; m_qcpl++; m_qpupd++;
  endtask

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

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  task automatic go();
    int cyc;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    $display("  finished in %0d cycles", cyc);
  endtask

  task automatic run_mm(loop_order_e o, int nm, int nn, int nk, bit acc, bit neg);
    int M, N, K, bad;
    int signed c0 [];
    node_t q[$];
    xfer_t xs[$];
    cnt_t  cnt;
    M = nm * BLK; N = nn * BLK; K = nk * BLK;
    a_base = 0; b_base = 16384; c_base = 32768;
    for (int i = 0; i < M * K; i++) u_dram.mem[a_base + i] = $urandom_range(0, 1 << 18) - (1 << 17);
    for (int i = 0; i < K * N; i++) u_dram.mem[b_base + i] = $urandom_range(0, 1 << 18) - (1 << 17);
    c0 = new[M * N];
    for (int i = 0; i < M * N; i++) begin
      c0[i] = $urandom_range(0, 1 << 22) - (1 << 21);
      u_dram.mem[c_base + i] = c0[i];
    end
    op = OP_MM; order = o; nb_m = 8'(nm); nb_n = 8'(nn); nb_k = 8'(nk);
    accumulate = acc; negate = neg;
    $display("MM order %0d, %0d x %0d x %0d blocks, accumulate %0d negate %0d", o, nm, nn, nk, acc, neg);
    go();
    bad = 0;
    for (int r = 0; r < M; r++)
      for (int c = 0; c < N; c++) begin
        int signed e;
        e = acc ? c0[r * N + c] : 0;
        for (int k = 0; k < K; k++) begin
          if (neg) e -= rmul(u_dram.mem[a_base + r * K + k], u_dram.mem[b_base + k * N + c]);
          else     e += rmul(u_dram.mem[a_base + r * K + k], u_dram.mem[b_base + k * N + c]);
        end
        checks++;
        if (u_dram.mem[c_base + r * N + c] != e) begin
          failures++;
          bad++;
          if (bad < 5) $display("FAIL C[%0d][%0d] = %0d expected %0d", r, c, u_dram.mem[c_base + r * N + c], e);
        end
      end
    node_list(o, nm, nn, nk, q);
    replay(q, SA, SB, SC, acc, xs, cnt);
    chk(int'(stats.nodes) == cnt.nodes && int'(stats.a_loads) == cnt.a_loads &&
        int'(stats.b_loads) == cnt.b_loads && int'(stats.c_loads) == cnt.c_loads &&
        int'(stats.c_stores) == cnt.c_stores && int'(stats.c_spills) == cnt.c_spills &&
        int'(stats.a_hits) == cnt.a_hits && int'(stats.b_hits) == cnt.b_hits &&
        int'(stats.c_hits) == cnt.c_hits && int'(stats.evictions) == cnt.evictions &&
        int'(stats.dram_words) == BLK * BLK * xs.size(), "event counts");
    $display("  loads A/B/C %0d/%0d/%0d, C stores %0d (spills %0d), hits %0d/%0d/%0d, evictions %0d, DRAM words %0d",
             stats.a_loads, stats.b_loads, stats.c_loads, stats.c_stores, stats.c_spills,
             stats.a_hits, stats.b_hits, stats.c_hits, stats.evictions, stats.dram_words);
    m_spill  += stats.c_spills;
    m_evict  += stats.evictions;
    m_reload += (acc ? 0 : stats.c_loads);
    m_zero   += stats.c_zero_inits;
    m_hit_a  += stats.a_hits;
    m_hit_b  += stats.b_hits;
    m_hit_c  += stats.c_hits;
    m_acc    += acc;
    m_neg    += neg;
  endtask

  task automatic run_lu();
    int signed r [BLK][BLK];
    int lda;
    lda = 3 * BLK;
    a_base = 5 * lda + 7;   // block at row 5, column 7 of a 48-wide matrix
    for (int i = 0; i < BLK; i++)
      for (int j = 0; j < BLK; j++) begin
        r[i][j] = (i == j) ? int'($urandom_range(4 << 16, 8 << 16)) : int'($urandom_range(0, 1 << 16)) - (1 << 15);
        u_dram.mem[a_base + i * lda + j] = r[i][j];
      end
    for (int k = 0; k < BLK - 1; k++) begin
      for (int i = k + 1; i < BLK; i++) r[i][k] = rdiv(r[i][k], r[k][k]);
      for (int i = k + 1; i < BLK; i++)
        for (int j = k + 1; j < BLK; j++) r[i][j] = r[i][j] - rmul(r[i][k], r[k][j]);
    end
    op = OP_LU; nb_k = 3;
    $display("LU of one block");
    go();
    for (int i = 0; i < BLK; i++)
      for (int j = 0; j < BLK; j++)
        chk(u_dram.mem[a_base + i * lda + j] == r[i][j], $sformatf("LU[%0d][%0d]", i, j));
    m_lu++;
  endtask

  task automatic run_qr();
    int signed r  [BLK][BLK];
    int signed vv [BLK][BLK];
    int lda, ldc;
    lda = 3 * BLK; ldc = 2 * BLK;
    a_base = 2 * lda + 20;
    c_base = 40000 + 3 * ldc + 16;
    for (int i = 0; i < BLK; i++)
      for (int j = 0; j < BLK; j++) begin
        r[i][j] = int'($urandom_range(0, 1 << 17)) - (1 << 16);
        vv[i][j] = 0;
        u_dram.mem[a_base + i * lda + j] = r[i][j];
        u_dram.mem[c_base + i * ldc + j] = 12345;
      end
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
    op = OP_QR; nb_k = 3; nb_n = 2;
    $display("QR of one block");
    go();
    for (int i = 0; i < BLK; i++)
      for (int j = 0; j < BLK; j++) begin
        chk(u_dram.mem[a_base + i * lda + j] == r[i][j], $sformatf("QR R[%0d][%0d]", i, j));
        chk(u_dram.mem[c_base + i * ldc + j] == vv[i][j], $sformatf("QR V[%0d][%0d]", i, j));
      end
    m_qr++;
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; start = 0; op = OP_MM; order = ORD_IJL; nb_m = 1; nb_n = 1; nb_k = 1;
    accumulate = 0; negate = 0; a_base = 0; b_base = 0; c_base = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_mm(ORD_LIJ, 6, 6, 3, 0, 0);
    for (int o = 0; o < 6; o++) if (loop_order_e'(o) != ORD_LIJ) run_mm(loop_order_e'(o), 2, 2, 2, 0, 0);
    run_mm(ORD_IJL, 2, 3, 2, 1, 1);
    run_lu();
    run_qr();
    run_blocked_lu();
    run_wide_qr();
    run_blocked_qr();
    $display("mechanisms: stalls %0d spills %0d evictions %0d reloads %0d zero-starts %0d hits A/B/C %0d/%0d/%0d accumulate %0d subtract %0d LU %0d TRS %0d LUCPL %0d QR %0d QRUpdateTr %0d QRCPL %0d QRUpdate %0d",
             stalls, m_spill, m_evict, m_reload, m_zero, m_hit_a, m_hit_b, m_hit_c, m_acc, m_neg, m_lu, m_trs, m_cpl, m_qr, m_qru, m_qcpl, m_qpupd);
    chk(stalls > 0, "no DRAM stall");
    chk(m_spill > 0, "no spill");
    chk(m_evict > 0, "no eviction");
    chk(m_reload > 0, "no reload of partial sums");
    chk(m_zero > 0, "no start from zero");
    chk(m_hit_a > 0 && m_hit_b > 0 && m_hit_c > 0, "a region never hit");
    chk(m_acc > 0 && m_neg > 0 && m_lu > 0 && m_qr > 0, "an operation never ran");
    chk(m_trs > 0 && m_cpl > 0 && m_qru > 0 && m_qcpl > 0 && m_qpupd > 0, "a panel operation never ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
