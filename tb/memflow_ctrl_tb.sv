// memflow_ctrl_tb: runs the controller against simple responders (the DMA and
// the datapaths answer done after a random delay) with small scratch-pad
// regions, for every loop order. Each DMA command (direction, target, DRAM
// address, slot) and the run's event counts are compared with a reference
// that replays the schedule with brute-force furthest-next-use eviction.
// Also checks the C start-from-zero flag per macro node, the accumulate mode
// and the command sequences and engine modes of the single-block operations
// (LU, TRS, LUCPL, QR, QRUpdateTr, QRCPL, QRUpdate).
module memflow_ctrl_tb;
  import memflow_pkg::*;
  import sched_ref_pkg::*;
  localparam int unsigned BLK = 16, PA = 4, PB = 8, DEPTH = 1024, NBW = 8, AW = 32;
  localparam int unsigned SA = 2, SB = 3, SC = 2;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, accumulate, negate, busy, done;
  op_e op;
  loop_order_e order;
  logic [NBW-1:0] nb_m, nb_n, nb_k;
  logic [AW-1:0] a_base, b_base, c_base;
  stats_t stats;
  logic dma_start, dma_dir, dma_done;
  target_e dma_tgt;
  logic [AW-1:0] dma_base, dma_stride;
  logic [9:0] dma_off;
  logic mm_start, mm_negate, mm_c_zero, mm_done;
  logic [9:0] mm_a_off, mm_b_off, mm_c_off;
  logic lu_start, lu_done, qr_start, qr_done;
  qr_mode_e qr_mode;
  lu_mode_e lu_mode;
  int checks = 0, failures = 0;

  memflow_ctrl #(.BLK(BLK), .PA(PA), .PB(PB), .DEPTH(DEPTH), .NBW(NBW), .ADDR_W(AW),
                 .SLOTS_A(SA), .SLOTS_B(SB), .SLOTS_C(SC)) dut (.*);

  // responders
  int dma_cnt = -1, mm_cnt = -1, lu_cnt = -1, qr_cnt = -1;
  always @(posedge clk) begin
    dma_done <= 0; mm_done <= 0; lu_done <= 0; qr_done <= 0;
    if (qr_start) qr_cnt <= $urandom_range(1, 6);
    else if (qr_cnt > 0) qr_cnt <= qr_cnt - 1;
    else if (qr_cnt == 0) begin qr_done <= 1; qr_cnt <= -1; end
    if (dma_start) dma_cnt <= $urandom_range(1, 6);
    else if (dma_cnt > 0) dma_cnt <= dma_cnt - 1;
    else if (dma_cnt == 0) begin dma_done <= 1; dma_cnt <= -1; end
    if (mm_start) mm_cnt <= $urandom_range(1, 6);
    else if (mm_cnt > 0) mm_cnt <= mm_cnt - 1;
    else if (mm_cnt == 0) begin mm_done <= 1; mm_cnt <= -1; end
    if (lu_start) lu_cnt <= $urandom_range(1, 6);
    else if (lu_cnt > 0) lu_cnt <= lu_cnt - 1;
    else if (lu_cnt == 0) begin lu_done <= 1; lu_cnt <= -1; end
  end

  // log of DMA commands and of the zero-start flag of each macro node
  typedef struct { bit dir; target_e tgt; logic [AW-1:0] base; logic [9:0] off; } cmd_t;
  cmd_t cmds[$];
  bit   zeros[$];
  int   lu_starts, qr_starts;
  lu_mode_e last_lu_mode;
  qr_mode_e last_qr_mode;
  always @(posedge clk) begin
    if (dma_start) cmds.push_back('{dma_dir, dma_tgt, dma_base, dma_off});
    if (mm_start) zeros.push_back(mm_c_zero);
    if (lu_start && rst_n) begin lu_starts++; last_lu_mode = lu_mode; end
    if (qr_start && rst_n) begin qr_starts++; last_qr_mode = qr_mode; end
  end

  function automatic logic [AW-1:0] addr_of(target_e t, int x, int y, int nm, int nn, int nk);
    case (t)
      TGT_A:   return a_base + AW'(x * BLK * nk * BLK + y * BLK);
      TGT_B:   return b_base + AW'(x * BLK * nn * BLK + y * BLK);
      default: return c_base + AW'(x * BLK * nn * BLK + y * BLK);
    endcase
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  task automatic run_mm(loop_order_e o, int nm, int nn, int nk, bit acc);
    node_t q[$];
    xfer_t xs[$];
    cnt_t  cnt;
    node_list(o, nm, nn, nk, q);
    replay(q, SA, SB, SC, acc, xs, cnt);
    cmds.delete(); zeros.delete();
    @(negedge clk);
    op = OP_MM; order = o; nb_m = NBW'(nm); nb_n = NBW'(nn); nb_k = NBW'(nk);
    accumulate = acc; negate = 0; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    chk(cmds.size() == xs.size(), $sformatf("order %0d: %0d DMA commands, expected %0d", o, cmds.size(), xs.size()));
    for (int n = 0; n < xs.size() && n < cmds.size(); n++) begin
      int sz;
      sz = (xs[n].tgt == TGT_A) ? BLK * BLK / PA : BLK * BLK / PB;
      chk(cmds[n].dir == xs[n].dir && cmds[n].tgt == xs[n].tgt &&
          cmds[n].base == addr_of(xs[n].tgt, xs[n].x, xs[n].y, nm, nn, nk) &&
          cmds[n].off == 10'(xs[n].slot * sz),
          $sformatf("order %0d command %0d: dir %0d tgt %0d base %0d off %0d", o, n,
                    cmds[n].dir, cmds[n].tgt, cmds[n].base, cmds[n].off));
    end
    chk(zeros.size() == q.size(), "node count");
    for (int n = 0; n < q.size() && n < zeros.size(); n++)
      chk(zeros[n] == (q[n].l == 0 && !acc), $sformatf("zero flag node %0d", n));
    chk(int'(stats.nodes) == cnt.nodes && int'(stats.a_loads) == cnt.a_loads &&
        int'(stats.b_loads) == cnt.b_loads && int'(stats.c_loads) == cnt.c_loads &&
        int'(stats.c_stores) == cnt.c_stores && int'(stats.c_spills) == cnt.c_spills &&
        int'(stats.a_hits) == cnt.a_hits && int'(stats.b_hits) == cnt.b_hits &&
        int'(stats.c_hits) == cnt.c_hits && int'(stats.c_zero_inits) == cnt.c_zero_inits &&
        int'(stats.evictions) == cnt.evictions &&
        int'(stats.dram_words) == BLK * BLK * xs.size(),
        $sformatf("order %0d stats", o));
    $display("order %0d: nodes %0d loads A/B/C %0d/%0d/%0d stores %0d spills %0d hits %0d/%0d/%0d evictions %0d",
             o, stats.nodes, stats.a_loads, stats.b_loads, stats.c_loads, stats.c_stores,
             stats.c_spills, stats.a_hits, stats.b_hits, stats.c_hits, stats.evictions);
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; start = 0; op = OP_MM; order = ORD_IJL; nb_m = 1; nb_n = 1; nb_k = 1;
    accumulate = 0; negate = 0; a_base = 32'h1000; b_base = 32'h20000; c_base = 32'h40000;
    lu_starts = 0; qr_starts = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int o = 0; o < 6; o++) run_mm(loop_order_e'(o), 3, 3, 3, 0);
    run_mm(ORD_LIJ, 2, 4, 3, 1);
    run_mm(ORD_JLI, 4, 2, 1, 0);
    run_mm(ORD_IJL, 1, 1, 1, 0);
    // LU of one block
    cmds.delete();
    @(negedge clk);
    op = OP_LU; nb_k = 3; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    chk(cmds.size() == 2 && lu_starts == 1, $sformatf("LU command count %0d, LU starts %0d", cmds.size(), lu_starts));
    if (cmds.size() == 2) begin
      chk(cmds[0].dir == 0 && cmds[0].tgt == TGT_LU && cmds[0].base == a_base, "LU load");
      chk(cmds[1].dir == 1 && cmds[1].tgt == TGT_LU && cmds[1].base == a_base, "LU store");
    end
    // QR of one block
    cmds.delete();
    @(negedge clk);
    op = OP_QR; nb_k = 3; nb_n = 2; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    chk(cmds.size() == 3 && qr_starts == 1, $sformatf("QR command count %0d, QR starts %0d", cmds.size(), qr_starts));
    if (cmds.size() == 3) begin
      chk(cmds[0].dir == 0 && cmds[0].tgt == TGT_QR && cmds[0].base == a_base, "QR load");
      chk(cmds[1].dir == 1 && cmds[1].tgt == TGT_QR && cmds[1].base == a_base, "QR store R");
      chk(cmds[2].dir == 1 && cmds[2].tgt == TGT_QRV && cmds[2].base == c_base, "QR store V");
    end
    chk(lu_starts == 1, "LU started during QR");
    chk(last_qr_mode == QR_FACT, "QR factorisation started in another mode");
    chk(last_lu_mode == LU_FACT, "LU started in another mode");
    // TRS and LUCPL: factor block from B, then the block at A
    for (int t = 0; t < 2; t++) begin
      cmds.delete();
      @(negedge clk);
      op = (t == 0) ? OP_TRS : OP_LUCPL; nb_k = 3; nb_n = 2; start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      chk(cmds.size() == 3 && lu_starts == 2 + t, $sformatf("TRS/LUCPL command count %0d, LU starts %0d", cmds.size(), lu_starts));
      chk(last_lu_mode == ((t == 0) ? LU_TRS : LU_CPL), "LU engine mode");
      if (cmds.size() == 3) begin
        chk(cmds[0].dir == 0 && cmds[0].tgt == TGT_LUF && cmds[0].base == b_base, "factor load");
        chk(cmds[1].dir == 0 && cmds[1].tgt == TGT_LU && cmds[1].base == a_base, "panel load");
        chk(cmds[2].dir == 1 && cmds[2].tgt == TGT_LU && cmds[2].base == a_base, "panel store");
      end
    end
    // QRUpdateTr: V from B, block at A, result back to A
    cmds.delete();
    @(negedge clk);
    op = OP_QRUTR; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    chk(cmds.size() == 3 && qr_starts == 2 && last_qr_mode == QR_UTR, $sformatf("QRUpdateTr command count %0d, QR starts %0d", cmds.size(), qr_starts));
    if (cmds.size() == 3) begin
      chk(cmds[0].dir == 0 && cmds[0].tgt == TGT_QRV && cmds[0].base == b_base, "V load");
      chk(cmds[1].dir == 0 && cmds[1].tgt == TGT_QR && cmds[1].base == a_base, "block load");
      chk(cmds[2].dir == 1 && cmds[2].tgt == TGT_QR && cmds[2].base == a_base, "block store");
    end
    // QRCPL and QRUpdate: pair loaded from A and B, stored back to A and B
    for (int t = 0; t < 2; t++) begin
      cmds.delete();
      @(negedge clk);
      op = (t == 0) ? OP_QRCPL : OP_QRUPD; start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      chk(cmds.size() == 4 && qr_starts == 3 + t && last_qr_mode == ((t == 0) ? QR_CPL : QR_UPD),
          $sformatf("pair command count %0d, QR starts %0d", cmds.size(), qr_starts));
      if (cmds.size() == 4) begin
        chk(cmds[0].dir == 0 && cmds[0].tgt == TGT_QR && cmds[0].base == a_base, "upper load");
        chk(cmds[1].dir == 0 && cmds[1].tgt == TGT_QRB && cmds[1].base == b_base, "lower load");
        chk(cmds[2].dir == 1 && cmds[2].tgt == TGT_QR && cmds[2].base == a_base, "upper store");
        chk(cmds[3].dir == 1 && cmds[3].tgt == ((t == 0) ? TGT_QRV : TGT_QRB) && cmds[3].base == b_base, "lower store");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
