// mm_engine: local computation of one matrix-multiply macro node,
// C_blk = C_blk +/- A_blk * B_blk, on BLK x BLK blocks held in the scratch-pad.
//
// The datapath has PA x PB multipliers feeding PA x PB adders whose outputs
// are held in an accumulator tile of PA x PB registers. C is computed one
// PA x PB tile at a time:
//   1. load  : PA cycles, one row segment of PB C-elements per cycle from
//              region C into the accumulator (or zeros when c_zero is set);
//   2. MAC   : BLK cycles; cycle k reads column k of the A rows (PA elements,
//              region A) and row k of the B columns (PB elements, region B)
//              and adds (or, with negate, subtracts) the PA x PB outer
//              product to the accumulator;
//   3. drain : 1 cycle for the last product;
//   4. store : PA cycles writing the tile back to region C.
// A tile takes 2*PA + BLK + 1 cycles and a block (BLK/PA)*(BLK/PB) tiles;
// with the defaults (BLK 16, PA 4, PB 8) that is 200 cycles, and the done
// pulse comes 201 cycles after the start pulse.
//
// Interface: pulse start (with negate and c_zero valid) while idle; busy is
// high until the single-cycle done pulse. a_off, b_off and c_off select the
// slots of the three blocks in their regions. Scratch-pad reads have one
// cycle latency. Reset is synchronous, active low.
//
// The PA x PB multiplier/adder array fed by PA and PB parallel region reads
// and a PA*PB-wide C path follows the source design's local-computation
// datapath; the default 32 multipliers and 32 adders are its GEMM figure for
// 16 x 16 blocks (split here as 4 x 8). The tile order, the staging into an
// accumulator tile and the subtract option (its "SUBMM" node) are this
// design's choices.
module mm_engine
  import memflow_pkg::*;
#(
  parameter int unsigned BLK   = 16,
  parameter int unsigned PA    = 4,
  parameter int unsigned PB    = 8,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          negate,   // 1: C -= A*B, 0: C += A*B
  input  logic          c_zero,   // 1: start from C = 0 instead of reading C
  input  logic [AW-1:0] a_off,    // bank address of the A, B and C block slots,
  input  logic [AW-1:0] b_off,    // held stable while busy
  input  logic [AW-1:0] c_off,
  output logic          busy,
  output logic          done,
  // scratch-pad wide ports
  output logic          a_re,
  output logic [AW-1:0] a_addr,
  input  data_t         a_rdata [PA],
  output logic          b_re,
  output logic [AW-1:0] b_addr,
  input  data_t         b_rdata [PB],
  output logic          c_re,
  output logic [AW-1:0] c_raddr,
  input  data_t         c_rdata [PB],
  output logic          c_we,
  output logic [AW-1:0] c_waddr,
  output data_t         c_wdata [PB]
);

  localparam int unsigned NRG   = BLK / PA;          // tile rows per block
  localparam int unsigned NCG   = BLK / PB;          // tile columns per block
  localparam int unsigned STEPS = 2 * PA + BLK + 1;  // cycles per tile
  localparam int unsigned SW    = $clog2(STEPS + 1);
  localparam int unsigned GW    = $clog2(BLK + 1);

  typedef enum logic [1:0] {K_NONE, K_LDC, K_MAC} kind_e;

  logic          run;
  logic          neg_q, zero_q;
  logic [SW-1:0] step;
  logic [GW-1:0] rg, cg;
  kind_e         kind_q;
  logic [SW-1:0] idx_q;
  data_t         acc [PA][PB];

  assign busy = run;

  // ---------------- issue stage ----------------
  int unsigned ldrow, kk, strow;
  always_comb begin
    a_re    = 1'b0;
    b_re    = 1'b0;
    c_re    = 1'b0;
    c_we    = 1'b0;
    ldrow   = 0;
    kk      = 0;
    strow   = 0;
    a_addr  = '0;
    b_addr  = '0;
    c_raddr = '0;
    c_waddr = '0;
    if (run) begin
      if (step < SW'(PA)) begin
        ldrow   = int'(rg) * PA + int'(step);
        c_re    = !zero_q;
        c_raddr = c_off + AW'(ldrow * NCG + int'(cg));
      end else if (step < SW'(PA + BLK)) begin
        kk     = int'(step) - PA;
        a_re   = 1'b1;
        b_re   = 1'b1;
        a_addr = a_off + AW'(int'(rg) * BLK + kk);
        b_addr = b_off + AW'(kk * NCG + int'(cg));
      end else if (step > SW'(PA + BLK)) begin
        strow   = int'(rg) * PA + (int'(step) - PA - BLK - 1);
        c_we    = 1'b1;
        c_waddr = c_off + AW'(strow * NCG + int'(cg));
      end
    end
  end

  always_comb begin
    for (int c = 0; c < PB; c++) c_wdata[c] = acc[strow % PA][c];
  end

  // ---------------- sequencing ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run    <= 1'b0;
      done   <= 1'b0;
      step   <= '0;
      rg     <= '0;
      cg     <= '0;
      neg_q  <= 1'b0;
      zero_q <= 1'b0;
      kind_q <= K_NONE;
      idx_q  <= '0;
    end else begin
      done   <= 1'b0;
      kind_q <= K_NONE;
      if (!run) begin
        if (start) begin
          run    <= 1'b1;
          step   <= '0;
          rg     <= '0;
          cg     <= '0;
          neg_q  <= negate;
          zero_q <= c_zero;
        end
      end else begin
        if (step < SW'(PA)) begin
          kind_q <= K_LDC;
          idx_q  <= step;
        end else if (step < SW'(PA + BLK)) begin
          kind_q <= K_MAC;
        end
        if (step == SW'(STEPS - 1)) begin
          step <= '0;
          if (cg == GW'(NCG - 1)) begin
            cg <= '0;
            if (rg == GW'(NRG - 1)) begin
              rg   <= '0;
              run  <= 1'b0;
              done <= 1'b1;
            end else begin
              rg <= rg + 1'b1;
            end
          end else begin
            cg <= cg + 1'b1;
          end
        end else begin
          step <= step + 1'b1;
        end
      end
    end
  end

  // ---------------- data stage: PA x PB multipliers and adders ----------------
  always_ff @(posedge clk) begin
    for (int r = 0; r < PA; r++) begin
      for (int c = 0; c < PB; c++) begin
        if (kind_q == K_LDC && int'(idx_q) == r)
          acc[r][c] <= zero_q ? '0 : c_rdata[c];
        else if (kind_q == K_MAC)
          acc[r][c] <= neg_q ? acc[r][c] - fx_mul(a_rdata[r], b_rdata[c])
                             : acc[r][c] + fx_mul(a_rdata[r], b_rdata[c]);
      end
    end
  end

  initial begin
    assert (BLK % PA == 0 && BLK % PB == 0) else $error("BLK must be a multiple of PA and PB");
  end

endmodule
