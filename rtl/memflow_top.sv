// memflow_top: a memory-driven matrix accelerator. A software-controlled
// scratch-pad of SRAM banks sits between DRAM and customised datapaths; a
// controller runs block ("macro node") computations in a chosen loop order
// and keeps blocks on chip so that few of them have to be spilled to DRAM.
//
// Parts: memflow_ctrl (controller, with block_scheduler), dma (DRAM <->
// on-chip block transfers), scratchpad (regions A, B, C of sram_bank
// instances), mm_engine (PA x PB multiply/add datapath for C +/- A*B on one
// block triple), lu_engine (div/mul/sub datapath for the LU, TRS and LUCPL
// nodes of one block) and qr_engine (mul/add/sqrt/div/mul/sub datapath for
// the QR, QRUpdateTr, QRCPL and QRUpdate nodes).
// The DMA's element port is routed to the LU engine for TGT_LU and TGT_LUF,
// to the QR engine for TGT_QR, TGT_QRV and TGT_QRB, and to the scratch-pad
// otherwise.
//
// Operations (see memflow_ctrl): OP_MM multiplies (nb_m*BLK x nb_k*BLK) A by
// (nb_k*BLK x nb_n*BLK) B into C, all row-major in DRAM; OP_LU factorises the
// BLK x BLK block at a_base in place; OP_TRS and OP_LUCPL replace it by
// L^-1 * A or A * U^-1 with L and U taken from the LU result at b_base; OP_QR
// replaces the block by R and writes the reflectors V to the block at c_base;
// OP_QRUTR applies the reflectors at b_base to the block at a_base; OP_QRCPL
// eliminates the block at b_base below the triangular block at a_base (R'
// over a_base, reflector tails over b_base); OP_QRUPD applies the reflectors
// of the last OP_QRCPL to the pair at a_base (upper) and b_base (lower). A host
// can chain these single-block operations into a blocked LU or QR. DRAM is outside: its port follows the
// request/grant, in-order read-response protocol described in dma.
//
// Interface: pulse start with the command valid while idle; busy until the
// single-cycle done pulse; stats holds the event counts of the last run.
// Reset is synchronous, active low.
//
// The organisation (DRAM, DMA, banked scratch-pad, controller, datapath of
// function units and registers) follows the source design; the default sizes
// are its 16 x 16 macro nodes, 4 KB dual-port banks and datapath unit counts.
// How the parts talk to each other is this design's choice.
module memflow_top
  import memflow_pkg::*;
#(
  parameter int unsigned BLK    = 16,
  parameter int unsigned PA     = 4,
  parameter int unsigned PB     = 8,
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned DIVS   = 16,
  parameter int unsigned LANES  = 64,
  parameter int unsigned QDIVS  = 2,
  parameter int unsigned NBW    = 8,
  parameter int unsigned ADDR_W = 32
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
  // DRAM
  output logic              mem_req,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output data_t             mem_wdata,
  input  logic              mem_gnt,
  input  logic              mem_rvalid,
  input  data_t             mem_rdata
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned IW = (BLK > 1) ? $clog2(BLK) : 1;

  // controller <-> DMA
  logic              dma_start, dma_dir, dma_busy, dma_done;
  target_e           dma_tgt;
  logic [ADDR_W-1:0] dma_base, dma_stride;
  logic [AW-1:0]     dma_off;
  // DMA local port
  logic              loc_we, loc_re;
  target_e           loc_tgt;
  logic [IW-1:0]     loc_row, loc_col;
  data_t             loc_wdata, loc_rdata, sp_rdata, lu_rdata;
  // controller <-> datapaths
  logic              mm_start, mm_negate, mm_c_zero, mm_busy, mm_done;
  logic [AW-1:0]     mm_a_off, mm_b_off, mm_c_off;
  logic              lu_start, lu_busy, lu_done;
  lu_mode_e          lu_mode;
  logic              qr_start, qr_busy, qr_done;
  qr_mode_e          qr_mode;
  data_t             qr_rdata;
  // datapath <-> scratch-pad
  logic              a_re, b_re, c_re, c_we;
  logic [AW-1:0]     a_addr, b_addr, c_raddr, c_waddr;
  data_t             a_rdata [PA];
  data_t             b_rdata [PB];
  data_t             c_rdata [PB];
  data_t             c_wdata [PB];

  memflow_ctrl #(
    .BLK(BLK), .PA(PA), .PB(PB), .DEPTH(DEPTH), .NBW(NBW), .ADDR_W(ADDR_W)
  ) u_ctrl (
    .clk, .rst_n,
    .start, .op, .order, .nb_m, .nb_n, .nb_k, .accumulate, .negate,
    .a_base, .b_base, .c_base, .busy, .done, .stats,
    .dma_start, .dma_dir, .dma_tgt, .dma_base, .dma_stride, .dma_off, .dma_done,
    .mm_start, .mm_negate, .mm_c_zero, .mm_a_off, .mm_b_off, .mm_c_off, .mm_done,
    .lu_start, .lu_mode, .lu_done, .qr_start, .qr_mode, .qr_done
  );

  dma #(.BLK(BLK), .ADDR_W(ADDR_W)) u_dma (
    .clk, .rst_n,
    .start(dma_start), .dir(dma_dir), .tgt(dma_tgt), .base(dma_base),
    .stride(dma_stride), .busy(dma_busy), .done(dma_done),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata,
    .loc_we, .loc_re, .loc_tgt, .loc_row, .loc_col, .loc_wdata, .loc_rdata
  );

  logic to_lu, to_qr, to_sp;
  assign to_lu     = (loc_tgt == TGT_LU) || (loc_tgt == TGT_LUF);
  assign to_qr     = (loc_tgt == TGT_QR) || (loc_tgt == TGT_QRV) || (loc_tgt == TGT_QRB);
  assign to_sp     = !to_lu && !to_qr;
  logic [1:0] qr_sel;   // QR engine register: A 0, V 1, B 2
  assign qr_sel    = (loc_tgt == TGT_QRV) ? 2'd1 : ((loc_tgt == TGT_QRB) ? 2'd2 : 2'd0);
  assign loc_rdata = to_lu ? lu_rdata : (to_qr ? qr_rdata : sp_rdata);

  scratchpad #(.BLK(BLK), .PA(PA), .PB(PB), .DEPTH(DEPTH)) u_spad (
    .clk,
    .dma_we(loc_we && to_sp), .dma_re(loc_re && to_sp), .dma_tgt(loc_tgt),
    .dma_row(loc_row), .dma_col(loc_col), .dma_off, .dma_wdata(loc_wdata),
    .dma_rdata(sp_rdata),
    .a_re, .a_addr, .a_rdata, .b_re, .b_addr, .b_rdata,
    .c_re, .c_raddr, .c_rdata, .c_we, .c_waddr, .c_wdata
  );

  mm_engine #(.BLK(BLK), .PA(PA), .PB(PB), .DEPTH(DEPTH)) u_mm (
    .clk, .rst_n,
    .start(mm_start), .negate(mm_negate), .c_zero(mm_c_zero),
    .a_off(mm_a_off), .b_off(mm_b_off), .c_off(mm_c_off),
    .busy(mm_busy), .done(mm_done),
    .a_re, .a_addr, .a_rdata, .b_re, .b_addr, .b_rdata,
    .c_re, .c_raddr, .c_rdata, .c_we, .c_waddr, .c_wdata
  );

  lu_engine #(.BLK(BLK), .DIVS(DIVS), .LANES(LANES)) u_lu (
    .clk, .rst_n,
    .start(lu_start), .mode(lu_mode), .busy(lu_busy), .done(lu_done),
    .el_we(loc_we && to_lu), .el_re(loc_re && to_lu), .el_sel(loc_tgt == TGT_LUF),
    .el_row(loc_row),
    .el_col(loc_col), .el_wdata(loc_wdata), .el_rdata(lu_rdata)
  );

  qr_engine #(.BLK(BLK), .DIVS(QDIVS)) u_qr (
    .clk, .rst_n,
    .start(qr_start), .mode(qr_mode), .busy(qr_busy), .done(qr_done),
    .el_we(loc_we && to_qr), .el_re(loc_re && to_qr), .el_sel(qr_sel),
    .el_row(loc_row), .el_col(loc_col), .el_wdata(loc_wdata), .el_rdata(qr_rdata)
  );

  // at most one of the DMA and the datapaths is active
  a_one_active: assert property (@(posedge clk)
    rst_n |-> $onehot0({dma_busy, mm_busy, lu_busy, qr_busy}));

endmodule
