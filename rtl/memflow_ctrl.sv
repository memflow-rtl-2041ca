// memflow_ctrl: the accelerator's controller. It walks the macro nodes of a
// blocked matrix multiply in the chosen loop order, keeps the matrix blocks in
// the scratch-pad as long as they are useful, moves blocks with the DMA and
// starts the datapaths. It also runs the single-block LU and QR operations.
//
// Scratch-pad management. Each region (A, B, C) is divided into slots of one
// block each (SLOTS_A, SLOTS_B, SLOTS_C). For every macro node (i, j, l) the
// controller looks up C(i,j), A(i,l) and B(l,j) in that order. A resident
// block is a hit. On a miss the block goes to a free slot; when the region is
// full, the slots are scanned one per cycle and the block whose next use lies
// furthest in the future is evicted (optimal replacement; a block never used
// again counts as furthest). The next use is computed exactly from the loop
// nest: it is the smallest loop position after the current one whose two
// fixed indices match the block's. An evicted C block is written back to DRAM
// (a spill if it will be used again). A C block is read from DRAM only when it
// holds partial sums (l > 0) or when accumulate asks to add to the C in DRAM;
// otherwise the datapath starts it from zero. After the last node every
// resident C block is written back.
//
// Matrices are row-major in DRAM: A is (nb_m*BLK) x (nb_k*BLK), B is
// (nb_k*BLK) x (nb_n*BLK), C is (nb_m*BLK) x (nb_n*BLK). The MM operation
// computes C = A*B, or C = C + A*B (accumulate), or C = C - A*B (accumulate
// and negate). The LU operation loads the BLK x BLK block at a_base (row length
// nb_k*BLK) into the LU engine, factorises it and stores it back. TRS and
// LUCPL first load a factor block (an LU result) from b_base (row length
// nb_n*BLK) into the LU engine, then transform the block at a_base in the same
// way. The QR operation loads the block at a_base into the QR engine, stores R
// back over it and the reflector block V at c_base (row length nb_n*BLK). The
// QRUpdateTr operation loads V from b_base (row length nb_n*BLK), applies it
// to the block at a_base and stores the result back. The pair operations load
// the block at a_base (upper) and the block at b_base (lower) into the QR
// engine: QRCPL eliminates the lower block below the triangular upper one,
// stores R' back over a_base and the reflector tails V over b_base; QRUpdate
// applies the reflectors of the last QRCPL to the pair and stores both back.
//
// Interface: pulse start with the command inputs valid while idle; busy until
// the single-cycle done pulse. stats holds the counts of the last run and is
// cleared by start. Reset is synchronous, active low.
//
// From the source design: the controller role, the six loop orders, keeping
// blocks in partitioned scratch-pad regions, and eviction of the block with
// the furthest next use. This design's own choices: the lookup order, the
// serial victim scan, spilling only dirty C blocks and skipping the load of a
// C block that has no partial sums yet.
module memflow_ctrl
  import memflow_pkg::*;
#(
  parameter int unsigned BLK     = 16,
  parameter int unsigned PA      = 4,
  parameter int unsigned PB      = 8,
  parameter int unsigned DEPTH   = 1024,
  parameter int unsigned NBW     = 8,
  parameter int unsigned ADDR_W  = 32,
  parameter int unsigned SLOTS_A = DEPTH * PA / (BLK * BLK),
  parameter int unsigned SLOTS_B = DEPTH * PB / (BLK * BLK),
  parameter int unsigned SLOTS_C = DEPTH * PB / (BLK * BLK),
  localparam int unsigned AW     = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // command
  input  logic              start,
  input  op_e               op,
  input  loop_order_e       order,
  input  logic [NBW-1:0]    nb_m,
  input  logic [NBW-1:0]    nb_n,
  input  logic [NBW-1:0]    nb_k,
  input  logic              accumulate,
  input  logic              negate,
  input  logic [ADDR_W-1:0] a_base,
  input  logic [ADDR_W-1:0] b_base,
  input  logic [ADDR_W-1:0] c_base,
  output logic              busy,
  output logic              done,
  output stats_t            stats,
  // DMA
  output logic              dma_start,
  output logic              dma_dir,
  output target_e           dma_tgt,
  output logic [ADDR_W-1:0] dma_base,
  output logic [ADDR_W-1:0] dma_stride,
  output logic [AW-1:0]     dma_off,
  input  logic              dma_done,
  // matrix-multiply datapath
  output logic              mm_start,
  output logic              mm_negate,
  output logic              mm_c_zero,
  output logic [AW-1:0]     mm_a_off,
  output logic [AW-1:0]     mm_b_off,
  output logic [AW-1:0]     mm_c_off,
  input  logic              mm_done,
  // LU datapath
  output logic              lu_start,
  output lu_mode_e          lu_mode,
  input  logic              lu_done,
  // QR datapath
  output logic              qr_start,
  output qr_mode_e          qr_mode,
  input  logic              qr_done
);

  localparam int unsigned MS  = (SLOTS_A > SLOTS_B) ? ((SLOTS_A > SLOTS_C) ? SLOTS_A : SLOTS_C)
                                                    : ((SLOTS_B > SLOTS_C) ? SLOTS_B : SLOTS_C);
  localparam int unsigned SW  = $clog2(MS + 1);
  localparam int unsigned MSP = 1 << SW;          // tag entries, power of two
  localparam int unsigned SZA = BLK * BLK / PA;   // bank words of one A block
  localparam int unsigned SZB = BLK * BLK / PB;   // bank words of one B or C block

  typedef enum logic [1:0] {R_A = 2'd0, R_B = 2'd1, R_C = 2'd2} region_e;

  typedef enum logic [4:0] {
    S_IDLE, S_NODE, S_LOOK, S_SCAN, S_SPILL, S_FILL, S_DMA, S_RUN, S_RUNW,
    S_FLUSH, S_LUF_LD, S_LU_LD, S_LU_RUN, S_LU_ST, S_QRV_LD, S_QR_LD, S_QR_RUN,
    S_QRB_LD, S_QR_ST, S_QR_STV, S_FIN
  } state_e;

  // next use of a block, as a loop position (outermost level first)
  typedef struct packed {
    logic           never;
    logic [NBW-1:0] u0;
    logic [NBW-1:0] u1;
    logic [NBW-1:0] u2;
  } nu_t;

  state_e          state, ret;
  region_e         reg_q;
  loop_order_e     ord_q;
  op_e             op_q;
  logic            acc_q, neg_q;
  logic [NBW-1:0]  lim [3];          // block counts per dimension 0=i, 1=j, 2=l
  logic [NBW-1:0]  cur [3];          // current node per dimension
  logic            last_q, czero_q;
  logic [ADDR_W-1:0] a_base_q, b_base_q, c_base_q;

  // slot tags: the two fixed indices of the block, per region
  logic            tv   [3][MSP];
  logic            tdty [3][MSP];
  logic [NBW-1:0]  tx   [3][MSP];
  logic [NBW-1:0]  ty   [3][MSP];
  logic [SW-1:0]   slot [3];         // slot chosen for the current node
  logic [SW-1:0]   scan;
  logic [SW-1:0]   best;
  nu_t             best_nu;

  // scheduler
  logic            sch_start, sch_valid, sch_ready, sch_last;
  logic [NBW-1:0]  sch_i, sch_j, sch_l;

  block_scheduler #(.NBW(NBW)) u_sched (
    .clk, .rst_n, .start(sch_start), .order(ord_q),
    .nb_m(lim[0]), .nb_n(lim[1]), .nb_k(lim[2]),
    .valid(sch_valid), .ready(sch_ready),
    .i(sch_i), .j(sch_j), .l(sch_l), .last(sch_last)
  );

  // ---------------- helpers ----------------
  function automatic int unsigned nslots(region_e r);
    unique case (r)
      R_A:     return SLOTS_A;
      R_B:     return SLOTS_B;
      default: return SLOTS_C;
    endcase
  endfunction

  // dimensions of the two tag fields and the free dimension of a region
  function automatic logic [1:0] xdim(region_e r);
    return (r == R_B) ? 2'd2 : 2'd0;
  endfunction
  function automatic logic [1:0] ydim(region_e r);
    return (r == R_A) ? 2'd2 : 2'd1;
  endfunction

  // Next loop position after the current one that uses block (x, y) of
  // region r: take the longest prefix of the current position that the block
  // allows, step the first level after it, then the smallest remaining values.
  function automatic nu_t next_use(region_e r, logic [NBW-1:0] x, logic [NBW-1:0] y);
    logic [NBW-1:0] v [3];
    logic [NBW-1:0] c [3];
    logic [NBW-1:0] m [3];
    logic [NBW-1:0] u [3];
    logic           fx [3];
    logic           ok, found;
    logic [1:0]     d;
    nu_t            res;
    v = '{default: '0};
    v[xdim(r)] = x;
    v[ydim(r)] = y;
    found = 1'b0;
    res   = '{never: 1'b1, default: '0};
    for (int lv = 0; lv < 3; lv++) begin
      d      = level_dim(ord_q, lv);
      c[lv]  = cur[d];
      m[lv]  = lim[d];
      fx[lv] = (d == xdim(r)) || (d == ydim(r));
      v[lv]  = (d == xdim(r)) ? x : ((d == ydim(r)) ? y : '0);
    end
    for (int p = 2; p >= 0; p--) begin
      if (!found) begin
        ok = 1'b1;
        for (int lv = 0; lv < 3; lv++) begin
          if (lv < p) begin
            u[lv] = c[lv];
            if (fx[lv] && v[lv] != c[lv]) ok = 1'b0;
          end else if (lv == p) begin
            if (fx[lv]) begin
              u[lv] = v[lv];
              if (!(v[lv] > c[lv])) ok = 1'b0;
            end else begin
              u[lv] = c[lv] + 1'b1;
              if (!(c[lv] + 1'b1 < m[lv])) ok = 1'b0;
            end
          end else begin
            u[lv] = fx[lv] ? v[lv] : '0;
          end
        end
        if (ok) begin
          found = 1'b1;
          res   = '{never: 1'b0, u0: u[0], u1: u[1], u2: u[2]};
        end
      end
    end
    return res;
  endfunction

  function automatic logic later(nu_t a, nu_t b);
    if (a.never != b.never) return a.never;
    if (a.never) return 1'b0;
    return {a.u0, a.u1, a.u2} > {b.u0, b.u1, b.u2};
  endfunction

  // block needed by the current node in region r
  logic [NBW-1:0] need_x, need_y;
  always_comb begin
    need_x = cur[xdim(reg_q)];
    need_y = cur[ydim(reg_q)];
  end

  // lookup in the current region
  logic          hit, has_free;
  logic [SW-1:0] hit_slot, free_slot;
  always_comb begin
    hit       = 1'b0;
    has_free  = 1'b0;
    hit_slot  = '0;
    free_slot = '0;
    for (int s = MS - 1; s >= 0; s--) begin
      if (s < nslots(reg_q)) begin
        if (tv[reg_q][s] && tx[reg_q][s] == need_x && ty[reg_q][s] == need_y) begin
          hit      = 1'b1;
          hit_slot = SW'(s);
        end
        if (!tv[reg_q][s]) begin
          has_free  = 1'b1;
          free_slot = SW'(s);
        end
      end
    end
  end

  nu_t scan_nu;
  assign scan_nu = next_use(reg_q, tx[reg_q][scan], ty[reg_q][scan]);

  // DRAM address of block (x, y) of region r
  function automatic logic [ADDR_W-1:0] blk_addr(region_e r, logic [NBW-1:0] x, logic [NBW-1:0] y);
    logic [ADDR_W-1:0] ld;
    logic [ADDR_W-1:0] b;
    ld = (r == R_A) ? ADDR_W'(lim[2]) * ADDR_W'(BLK) : ADDR_W'(lim[1]) * ADDR_W'(BLK);
    b  = (r == R_A) ? a_base_q : ((r == R_B) ? b_base_q : c_base_q);
    return b + ADDR_W'(x) * ADDR_W'(BLK) * ld + ADDR_W'(y) * ADDR_W'(BLK);
  endfunction
  function automatic logic [AW-1:0] slot_off(region_e r, logic [SW-1:0] s);
    return (r == R_A) ? AW'(int'(s) * SZA) : AW'(int'(s) * SZB);
  endfunction

  function automatic region_e next_region(region_e r);
    return (r == R_C) ? R_A : R_B;
  endfunction

  // ---------------- outputs ----------------
  assign busy      = (state != S_IDLE);
  assign mm_negate = neg_q;
  assign mm_c_zero = czero_q;
  assign mm_a_off  = slot_off(R_A, slot[R_A]);
  assign mm_b_off  = slot_off(R_B, slot[R_B]);
  assign mm_c_off  = slot_off(R_C, slot[R_C]);
  assign mm_start  = (state == S_RUN);
  assign sch_ready = (state == S_RUNW) && mm_done;

  // ---------------- control ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      ret        <= S_IDLE;
      reg_q      <= R_C;
      ord_q      <= ORD_IJL;
      acc_q      <= 1'b0;
      neg_q      <= 1'b0;
      last_q     <= 1'b0;
      czero_q    <= 1'b0;
      a_base_q   <= '0;
      b_base_q   <= '0;
      c_base_q   <= '0;
      op_q       <= OP_MM;
      done       <= 1'b0;
      sch_start  <= 1'b0;
      dma_start  <= 1'b0;
      dma_dir    <= 1'b0;
      dma_tgt    <= TGT_A;
      dma_base   <= '0;
      dma_stride <= '0;
      dma_off    <= '0;
      lu_start   <= 1'b0;
      qr_start   <= 1'b0;
      scan       <= '0;
      best       <= '0;
      best_nu    <= '0;
      stats      <= '0;
      for (int d = 0; d < 3; d++) begin
        lim[d]  <= NBW'(1);
        cur[d]  <= '0;
        slot[d] <= '0;
        for (int s = 0; s < MSP; s++) begin
          tv[d][s]   <= 1'b0;
          tdty[d][s] <= 1'b0;
          tx[d][s]   <= '0;
          ty[d][s]   <= '0;
        end
      end
    end else begin
      done      <= 1'b0;
      sch_start <= 1'b0;
      dma_start <= 1'b0;
      lu_start  <= 1'b0;
      qr_start  <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          ord_q    <= order;
          op_q     <= op;
          acc_q    <= accumulate;
          neg_q    <= negate;
          lim[0]   <= nb_m;
          lim[1]   <= nb_n;
          lim[2]   <= nb_k;
          a_base_q <= a_base;
          b_base_q <= b_base;
          c_base_q <= c_base;
          stats    <= '0;
          for (int d = 0; d < 3; d++)
            for (int s = 0; s < MSP; s++) begin
              tv[d][s]   <= 1'b0;
              tdty[d][s] <= 1'b0;
            end
          if (op == OP_LU) begin
            state <= S_LU_LD;
          end else if (op == OP_TRS || op == OP_LUCPL) begin
            state <= S_LUF_LD;
          end else if (op == OP_QR || op == OP_QRCPL || op == OP_QRUPD) begin
            state <= S_QR_LD;
          end else if (op == OP_QRUTR) begin
            state <= S_QRV_LD;
          end else begin
            sch_start <= 1'b1;
            state     <= S_NODE;
          end
        end

        // ---- matrix multiply ----
        S_NODE: if (sch_valid) begin
          cur[0] <= sch_i;
          cur[1] <= sch_j;
          cur[2] <= sch_l;
          last_q <= sch_last;
          reg_q  <= R_C;
          state  <= S_LOOK;
        end
        S_LOOK: begin
          if (hit) begin
            slot[reg_q] <= hit_slot;
            unique case (reg_q)
              R_A:     stats.a_hits <= stats.a_hits + 1;
              R_B:     stats.b_hits <= stats.b_hits + 1;
              default: begin
                stats.c_hits <= stats.c_hits + 1;
                czero_q      <= 1'b0;
              end
            endcase
            if (reg_q == R_B) state <= S_RUN;
            else reg_q <= next_region(reg_q);
          end else if (has_free) begin
            slot[reg_q] <= free_slot;
            state       <= S_FILL;
          end else begin
            scan    <= '0;
            best    <= '0;
            best_nu <= '0;
            state   <= S_SCAN;
          end
        end
        S_SCAN: begin
          if (scan == '0 || later(scan_nu, best_nu)) begin
            best    <= scan;
            best_nu <= scan_nu;
          end
          if (int'(scan) == nslots(reg_q) - 1) begin
            state <= S_SPILL;
          end
          scan <= scan + 1'b1;
        end
        S_SPILL: begin
          // the victim is `best`; write it back if it is a modified C block
          slot[reg_q]     <= best;
          stats.evictions <= stats.evictions + 1;
          tv[reg_q][best] <= 1'b0;
          if (reg_q == R_C && tdty[R_C][best]) begin
            dma_start  <= 1'b1;
            dma_dir    <= 1'b1;
            dma_tgt    <= TGT_C;
            dma_base   <= blk_addr(R_C, tx[R_C][best], ty[R_C][best]);
            dma_stride <= ADDR_W'(lim[1]) * ADDR_W'(BLK);
            dma_off    <= slot_off(R_C, best);
            stats.c_stores   <= stats.c_stores + 1;
            stats.dram_words <= stats.dram_words + BLK * BLK;
            if (!best_nu.never) stats.c_spills <= stats.c_spills + 1;
            ret   <= S_FILL;
            state <= S_DMA;
          end else begin
            state <= S_FILL;
          end
        end
        S_FILL: begin
          tv[reg_q][slot[reg_q]]   <= 1'b1;
          tdty[reg_q][slot[reg_q]] <= 1'b0;
          tx[reg_q][slot[reg_q]]   <= need_x;
          ty[reg_q][slot[reg_q]]   <= need_y;
          ret        <= (reg_q == R_B) ? S_RUN : S_LOOK;
          reg_q      <= next_region(reg_q);
          dma_dir    <= 1'b0;
          dma_base   <= blk_addr(reg_q, need_x, need_y);
          dma_stride <= (reg_q == R_A) ? ADDR_W'(lim[2]) * ADDR_W'(BLK)
                                       : ADDR_W'(lim[1]) * ADDR_W'(BLK);
          dma_off    <= slot_off(reg_q, slot[reg_q]);
          dma_tgt    <= (reg_q == R_A) ? TGT_A : ((reg_q == R_B) ? TGT_B : TGT_C);
          if (reg_q == R_C && cur[2] == '0 && !acc_q) begin
            // no partial sums yet: the datapath starts this block at zero
            czero_q            <= 1'b1;
            stats.c_zero_inits <= stats.c_zero_inits + 1;
            state              <= S_LOOK;
          end else begin
            if (reg_q == R_C) czero_q <= 1'b0;
            unique case (reg_q)
              R_A:     stats.a_loads <= stats.a_loads + 1;
              R_B:     stats.b_loads <= stats.b_loads + 1;
              default: stats.c_loads <= stats.c_loads + 1;
            endcase
            stats.dram_words <= stats.dram_words + BLK * BLK;
            dma_start <= 1'b1;
            state     <= S_DMA;
          end
        end
        S_DMA: if (dma_done) state <= ret;
        S_RUN: state <= S_RUNW;
        S_RUNW: if (mm_done) begin
          tdty[R_C][slot[R_C]] <= 1'b1;
          stats.nodes <= stats.nodes + 1;
          if (last_q) begin
            scan  <= '0;
            state <= S_FLUSH;
          end else begin
            state <= S_NODE;
          end
        end
        S_FLUSH: begin
          if (int'(scan) >= SLOTS_C) begin
            state <= S_FIN;
          end else begin
            scan <= scan + 1'b1;
            if (tv[R_C][scan] && tdty[R_C][scan]) begin
              tdty[R_C][scan] <= 1'b0;
              dma_start  <= 1'b1;
              dma_dir    <= 1'b1;
              dma_tgt    <= TGT_C;
              dma_base   <= blk_addr(R_C, tx[R_C][scan], ty[R_C][scan]);
              dma_stride <= ADDR_W'(lim[1]) * ADDR_W'(BLK);
              dma_off    <= slot_off(R_C, scan);
              stats.c_stores   <= stats.c_stores + 1;
              stats.dram_words <= stats.dram_words + BLK * BLK;
              ret   <= S_FLUSH;
              state <= S_DMA;
            end
          end
        end

        // ---- LU, TRS or LUCPL node on one block ----
        S_LUF_LD: begin
          dma_start  <= 1'b1;
          dma_dir    <= 1'b0;
          dma_tgt    <= TGT_LUF;
          dma_base   <= b_base_q;
          dma_stride <= ADDR_W'(lim[1]) * ADDR_W'(BLK);
          dma_off    <= '0;
          stats.dram_words <= stats.dram_words + BLK * BLK;
          ret   <= S_LU_LD;
          state <= S_DMA;
        end
        S_LU_LD: begin
          dma_start  <= 1'b1;
          dma_dir    <= 1'b0;
          dma_tgt    <= TGT_LU;
          dma_base   <= a_base_q;
          dma_stride <= ADDR_W'(lim[2]) * ADDR_W'(BLK);
          dma_off    <= '0;
          stats.dram_words <= stats.dram_words + BLK * BLK;
          ret   <= S_LU_RUN;
          state <= S_DMA;
        end
        S_LU_RUN: begin
          lu_start <= 1'b1;
          state    <= S_LU_ST;
        end
        S_LU_ST: if (lu_done) begin
          dma_start  <= 1'b1;
          dma_dir    <= 1'b1;
          stats.nodes      <= stats.nodes + 1;
          stats.dram_words <= stats.dram_words + BLK * BLK;
          ret   <= S_FIN;
          state <= S_DMA;
        end

        // ---- QR of one block: R back over A, V to the C matrix; or the
        //      update node: V from the B matrix applied to the block at A ----
        S_QRV_LD: begin
          dma_start  <= 1'b1;
          dma_dir    <= 1'b0;
          dma_tgt    <= TGT_QRV;
          dma_base   <= b_base_q;
          dma_stride <= ADDR_W'(lim[1]) * ADDR_W'(BLK);
          dma_off    <= '0;
          stats.dram_words <= stats.dram_words + BLK * BLK;
          ret   <= S_QR_LD;
          state <= S_DMA;
        end
        S_QR_LD: begin
          dma_start  <= 1'b1;
          dma_dir    <= 1'b0;
          dma_tgt    <= TGT_QR;
          dma_base   <= a_base_q;
          dma_stride <= ADDR_W'(lim[2]) * ADDR_W'(BLK);
          dma_off    <= '0;
          stats.dram_words <= stats.dram_words + BLK * BLK;
          ret   <= (op_q == OP_QRCPL || op_q == OP_QRUPD) ? S_QRB_LD : S_QR_RUN;
          state <= S_DMA;
        end
        S_QRB_LD: begin
          dma_start  <= 1'b1;
          dma_dir    <= 1'b0;
          dma_tgt    <= TGT_QRB;
          dma_base   <= b_base_q;
          dma_stride <= ADDR_W'(lim[1]) * ADDR_W'(BLK);
          dma_off    <= '0;
          stats.dram_words <= stats.dram_words + BLK * BLK;
          ret   <= S_QR_RUN;
          state <= S_DMA;
        end
        S_QR_RUN: begin
          qr_start <= 1'b1;
          state    <= S_QR_ST;
        end
        S_QR_ST: if (qr_done) begin
          dma_start  <= 1'b1;
          dma_dir    <= 1'b1;
          dma_tgt    <= TGT_QR;
          dma_base   <= a_base_q;
          dma_stride <= ADDR_W'(lim[2]) * ADDR_W'(BLK);
          dma_off    <= '0;
          stats.nodes      <= stats.nodes + 1;
          stats.dram_words <= stats.dram_words + BLK * BLK;
          ret   <= (op_q == OP_QRUTR) ? S_FIN : S_QR_STV;
          state <= S_DMA;
        end
        S_QR_STV: begin
          dma_start  <= 1'b1;
          dma_dir    <= 1'b1;
          // QR: V to c_base; QRCPL: V over the eliminated block; QRUpdate:
          // the lower block back
          dma_tgt    <= (op_q == OP_QRUPD) ? TGT_QRB : TGT_QRV;
          dma_base   <= (op_q == OP_QR) ? c_base_q : b_base_q;
          dma_stride <= ADDR_W'(lim[1]) * ADDR_W'(BLK);
          stats.dram_words <= stats.dram_words + BLK * BLK;
          ret   <= S_FIN;
          state <= S_DMA;
        end
        S_FIN: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign lu_mode  = (op_q == OP_TRS) ? LU_TRS : ((op_q == OP_LUCPL) ? LU_CPL : LU_FACT);
  assign qr_mode  = (op_q == OP_QRUTR) ? QR_UTR : ((op_q == OP_QRCPL) ? QR_CPL
                  : ((op_q == OP_QRUPD) ? QR_UPD : QR_FACT));

  a_dma_idle_during_run: assert property (@(posedge clk)
    rst_n && state == S_RUNW |-> !dma_start);

endmodule
