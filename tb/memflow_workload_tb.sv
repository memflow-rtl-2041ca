// memflow_workload_tb: larger workloads on the accelerator at its default
// parameters (16 x 16 blocks, 20 banks of 4 KB, 16/32/32 block slots), with
// a DRAM model of 6 cycles latency that refuses 10 % of requests.
//   1. C = A*B with 256 x 256 matrices (16 x 16 x 16 blocks, 4096 macro
//      nodes) in two loop orders, IJL and LIJ. The working set is larger
//      than the scratch-pad, so the order and the furthest-next-use
//      replacement decide how many blocks move. Each run's result is checked
//      word by word, its event counts against a replay of the schedule with
//      brute-force optimal replacement, and its DRAM traffic against the
//      compulsory minimum (A and B read once, C written once); the DRAM words
//      of both orders are printed side by side.
//   2. Blocked LU of a 64 x 64 matrix stored as 4 x 4 tiles of 16 x 16,
//      issued as single-block commands in right-looking order: LU of the
//      diagonal tile, TRS of the tiles to its right, LUCPL of the tiles below
//      it, and a subtracting multiply for every trailing tile. Checked word by
//      word against the same chain computed here in the same fixed-point
//      arithmetic, and L * U against the input in real arithmetic.
// The matrix sizes are this testbench's own, chosen to keep the run short;
// the sizes evaluated for the architecture (N = 1000 to 2500) run the same
// way with more blocks.
module memflow_workload_tb;
  import memflow_pkg::*;
  import sched_ref_pkg::*;
  localparam int unsigned BLK = 16, WORDS = 262144;
  localparam int unsigned SA = 16, SB = 32, SC = 32;   // slots at the defaults
  localparam int unsigned NB = 16, N = NB * BLK;       // multiply size
  localparam int unsigned TB = 4;                      // LU tiles per side

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

  dram_model #(.WORDS(WORDS), .ADDR_W(32), .LATENCY(6), .STALL_PCT(10)) u_dram (
    .clk, .rst_n, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata), .stalls
  );

  function automatic int signed rmul(int signed a, int signed b);
    longint p;
    p = longint'(a) * longint'(b);
    return int'(p >>> 16);
  endfunction
  function automatic int signed rdiv(int signed a, int signed b);
    if (b == 0) return 0;
    return int'((longint'(a) <<< 16) / longint'(b));
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  task automatic go(output int cyc);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
  endtask

  // ---------------- 1. matrix multiply ----------------
  int unsigned mm_words [2];

  task automatic run_mm(int idx, loop_order_e o);
    int cyc, bad;
    node_t q[$];
    xfer_t xs[$];
    cnt_t  cnt;
    a_base = 0; b_base = N * N; c_base = 2 * N * N;
    for (int i = 0; i < N * N; i++) begin
      u_dram.mem[a_base + i] = $urandom_range(0, 1 << 18) - (1 << 17);
      u_dram.mem[b_base + i] = $urandom_range(0, 1 << 18) - (1 << 17);
      u_dram.mem[c_base + i] = 32'hdead_beef;
    end
    op = OP_MM; order = o; nb_m = 8'(NB); nb_n = 8'(NB); nb_k = 8'(NB);
    accumulate = 0; negate = 0;
    go(cyc);
    bad = 0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        int signed e;
        e = 0;
        for (int k = 0; k < N; k++) e += rmul(u_dram.mem[a_base + r * N + k], u_dram.mem[b_base + k * N + c]);
        checks++;
        if (u_dram.mem[c_base + r * N + c] != e) begin
          failures++;
          bad++;
          if (bad < 5) $display("FAIL C[%0d][%0d] = %0d expected %0d", r, c, u_dram.mem[c_base + r * N + c], e);
        end
      end
    node_list(o, NB, NB, NB, q);
    replay(q, SA, SB, SC, 1'b0, xs, cnt);
    chk(int'(stats.nodes) == cnt.nodes && int'(stats.a_loads) == cnt.a_loads &&
        int'(stats.b_loads) == cnt.b_loads && int'(stats.c_loads) == cnt.c_loads &&
        int'(stats.c_stores) == cnt.c_stores && int'(stats.c_spills) == cnt.c_spills &&
        int'(stats.evictions) == cnt.evictions &&
        int'(stats.dram_words) == BLK * BLK * xs.size(), $sformatf("order %0d event counts", o));
    chk(stats.dram_words >= 3 * N * N, "DRAM traffic below the compulsory minimum");
    mm_words[idx] = stats.dram_words;
    $display("MM %0dx%0dx%0d order %0d: %0d cycles, loads A/B/C %0d/%0d/%0d, C stores %0d (spills %0d), evictions %0d, DRAM words %0d (compulsory %0d)",
             N, N, N, o, cyc, stats.a_loads, stats.b_loads, stats.c_loads, stats.c_stores,
             stats.c_spills, stats.evictions, stats.dram_words, 3 * N * N);
  endtask

  // ---------------- 2. blocked LU ----------------
  typedef int signed blk_t [BLK][BLK];
  localparam int unsigned TILE0 = 3 * N * N;

  function automatic int unsigned tile(int bi, int bj);
    return TILE0 + (bi * TB + bj) * BLK * BLK;
  endfunction

  task automatic single(op_e o, int unsigned a, int unsigned b, int unsigned c);
    int cyc;
    op = o; order = ORD_IJL; nb_m = 1; nb_n = 1; nb_k = 1;
    accumulate = (o == OP_MM); negate = (o == OP_MM);
    a_base = a; b_base = b; c_base = c;
    go(cyc);
  endtask

  task automatic run_blocked_lu();
    blk_t a0 [TB][TB];
    blk_t r  [TB][TB];
    real s, err;
    int bad;
    for (int bi = 0; bi < TB; bi++)
      for (int bj = 0; bj < TB; bj++)
        for (int i = 0; i < BLK; i++)
          for (int j = 0; j < BLK; j++) begin
            a0[bi][bj][i][j] = (bi == bj && i == j) ? int'($urandom_range(20 << 16, 24 << 16))
                                                     : int'($urandom_range(0, 1 << 16)) - (1 << 15);
            u_dram.mem[tile(bi, bj) + i * BLK + j] = a0[bi][bj][i][j];
          end
    // reference chain
    r = a0;
    for (int k = 0; k < TB; k++) begin
      for (int p = 0; p < BLK - 1; p++) begin
        for (int i = p + 1; i < BLK; i++) r[k][k][i][p] = rdiv(r[k][k][i][p], r[k][k][p][p]);
        for (int i = p + 1; i < BLK; i++)
          for (int j = p + 1; j < BLK; j++) r[k][k][i][j] -= rmul(r[k][k][i][p], r[k][k][p][j]);
      end
      for (int bj = k + 1; bj < TB; bj++)
        for (int p = 0; p < BLK - 1; p++)
          for (int i = p + 1; i < BLK; i++)
            for (int j = 0; j < BLK; j++) r[k][bj][i][j] -= rmul(r[k][k][i][p], r[k][bj][p][j]);
      for (int bi = k + 1; bi < TB; bi++)
        for (int p = 0; p < BLK; p++) begin
          for (int i = 0; i < BLK; i++) r[bi][k][i][p] = rdiv(r[bi][k][i][p], r[k][k][p][p]);
          for (int i = 0; i < BLK; i++)
            for (int j = p + 1; j < BLK; j++) r[bi][k][i][j] -= rmul(r[bi][k][i][p], r[k][k][p][j]);
        end
      for (int bi = k + 1; bi < TB; bi++)
        for (int bj = k + 1; bj < TB; bj++)
          for (int i = 0; i < BLK; i++)
            for (int j = 0; j < BLK; j++)
              for (int p = 0; p < BLK; p++) r[bi][bj][i][j] -= rmul(r[bi][k][i][p], r[k][bj][p][j]);
    end
    // the same chain on the accelerator
    for (int k = 0; k < TB; k++) begin
      single(OP_LU, tile(k, k), 0, 0);
      for (int bj = k + 1; bj < TB; bj++) single(OP_TRS, tile(k, bj), tile(k, k), 0);
      for (int bi = k + 1; bi < TB; bi++) single(OP_LUCPL, tile(bi, k), tile(k, k), 0);
      for (int bi = k + 1; bi < TB; bi++)
        for (int bj = k + 1; bj < TB; bj++) single(OP_MM, tile(bi, k), tile(k, bj), tile(bi, bj));
    end
    bad = 0;
    for (int bi = 0; bi < TB; bi++)
      for (int bj = 0; bj < TB; bj++)
        for (int i = 0; i < BLK; i++)
          for (int j = 0; j < BLK; j++) begin
            checks++;
            if (u_dram.mem[tile(bi, bj) + i * BLK + j] != r[bi][bj][i][j]) begin
              failures++;
              bad++;
              if (bad < 5) $display("FAIL LU tile (%0d,%0d)[%0d][%0d]", bi, bj, i, j);
            end
          end
    err = 0.0;
    for (int i = 0; i < TB * BLK; i++)
      for (int j = 0; j < TB * BLK; j++) begin
        s = 0.0;
        for (int k = 0; k <= i && k <= j; k++) begin
          real l, u;
          l = (k == i) ? 1.0 : real'(int'(u_dram.mem[tile(i / BLK, k / BLK) + (i % BLK) * BLK + k % BLK])) / 65536.0;
          u = real'(int'(u_dram.mem[tile(k / BLK, j / BLK) + (k % BLK) * BLK + j % BLK])) / 65536.0;
          s += l * u;
        end
        s -= real'(a0[i / BLK][j / BLK][i % BLK][j % BLK]) / 65536.0;
        if (s < 0) s = -s;
        if (s > err) err = s;
      end
    chk(err < 0.05, $sformatf("blocked LU: max |L*U - A| = %f", err));
    $display("blocked LU %0dx%0d: %0d single-block commands, max |L*U - A| = %f",
             TB * BLK, TB * BLK, TB + TB * (TB - 1) + TB * (TB - 1) * (2 * TB - 1) / 6, err);
  endtask

  initial begin
    repeat (20000000) @(posedge clk);
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
    run_mm(0, ORD_IJL);
    run_mm(1, ORD_LIJ);
    $display("DRAM words: IJL %0d, LIJ %0d", mm_words[0], mm_words[1]);
    chk(mm_words[0] != mm_words[1], "loop order made no difference to DRAM traffic");
    run_blocked_lu();
    chk(stalls > 0, "no DRAM stall");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
