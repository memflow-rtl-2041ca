// scratchpad: software-controlled scratch-pad memory made of SRAM banks and
// partitioned into three regions, one per matrix block of a matrix-multiply
// macro node (C += A * B).
//
// Region A has PA banks, region B and region C have PB banks each, so that
// every cycle the datapath can read a column of PA elements of block A, a row
// of PB elements of block B and a row segment of PB elements of block C, and
// write back PB elements of C. The element layout inside a BLK x BLK block is
//   A(r,k): bank r % PA, address (r / PA) * BLK + k
//   B(k,c): bank c % PB, address k * (BLK / PB) + c / PB
//   C(r,c): bank c % PB, address r * (BLK / PB) + c / PB
// relative to the bank address dma_off where the block's slot starts, so that
// one common address selects PA (or PB) elements that the datapath consumes
// together. A region can hold several blocks in different slots.
//
// Two clients share the banks: the DMA, which writes or reads one element per
// cycle by (region, row, column), and the datapath, which uses the wide ports.
// The controller never lets both run at once; the DMA has priority and an
// assertion flags overlap. All reads have one cycle latency.
//
// The regions and the per-region parallel access follow the source design's
// partitioned scratch-pad. Bank counts derived from PA and PB, the layouts
// and the one-read/one-write port use are this design's choices.
module scratchpad
  import memflow_pkg::*;
#(
  parameter int unsigned BLK   = 16,
  parameter int unsigned PA    = 4,
  parameter int unsigned PB    = 8,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned IW   = (BLK > 1) ? $clog2(BLK) : 1
) (
  input  logic          clk,
  // DMA element port
  input  logic          dma_we,
  input  logic          dma_re,
  input  target_e       dma_tgt,
  input  logic [IW-1:0] dma_row,
  input  logic [IW-1:0] dma_col,
  input  logic [AW-1:0] dma_off,   // bank address of the block's slot
  input  data_t         dma_wdata,
  output data_t         dma_rdata,
  // datapath wide ports
  input  logic          a_re,
  input  logic [AW-1:0] a_addr,
  output data_t         a_rdata [PA],
  input  logic          b_re,
  input  logic [AW-1:0] b_addr,
  output data_t         b_rdata [PB],
  input  logic          c_re,
  input  logic [AW-1:0] c_raddr,
  output data_t         c_rdata [PB],
  input  logic          c_we,
  input  logic [AW-1:0] c_waddr,
  input  data_t         c_wdata [PB]
);

  // Element (row, col) of a block -> bank and address inside its region.
  logic [AW-1:0] dma_addr;
  int unsigned   dma_bank;
  always_comb begin
    unique case (dma_tgt)
      TGT_A: begin
        dma_bank = int'(dma_row) % PA;
        dma_addr = dma_off + AW'((int'(dma_row) / PA) * BLK + int'(dma_col));
      end
      TGT_B: begin
        dma_bank = int'(dma_col) % PB;
        dma_addr = dma_off + AW'(int'(dma_row) * (BLK / PB) + int'(dma_col) / PB);
      end
      default: begin
        dma_bank = int'(dma_col) % PB;
        dma_addr = dma_off + AW'(int'(dma_row) * (BLK / PB) + int'(dma_col) / PB);
      end
    endcase
  end

  // ---------------- region A ----------------
  for (genvar g = 0; g < PA; g++) begin : g_a
    logic          re, we;
    logic [AW-1:0] raddr;
    logic          dsel;
    assign dsel  = (dma_tgt == TGT_A) && (dma_bank == g);
    assign re    = (dma_re && dsel) || (!dma_re && a_re);
    assign raddr = dma_re ? dma_addr : a_addr;
    assign we    = dma_we && dsel;
    sram_bank #(.WORD_W(DATA_W), .DEPTH(DEPTH)) u_bank (
      .clk, .re, .raddr, .rdata(a_rdata[g]), .we, .waddr(dma_addr), .wdata(dma_wdata)
    );
  end

  // ---------------- region B ----------------
  for (genvar g = 0; g < PB; g++) begin : g_b
    logic          re, we;
    logic [AW-1:0] raddr;
    logic          dsel;
    assign dsel  = (dma_tgt == TGT_B) && (dma_bank == g);
    assign re    = (dma_re && dsel) || (!dma_re && b_re);
    assign raddr = dma_re ? dma_addr : b_addr;
    assign we    = dma_we && dsel;
    sram_bank #(.WORD_W(DATA_W), .DEPTH(DEPTH)) u_bank (
      .clk, .re, .raddr, .rdata(b_rdata[g]), .we, .waddr(dma_addr), .wdata(dma_wdata)
    );
  end

  // ---------------- region C ----------------
  for (genvar g = 0; g < PB; g++) begin : g_c
    logic          re, we;
    logic [AW-1:0] raddr, waddr;
    logic [DATA_W-1:0] wdata;
    logic          dsel;
    assign dsel  = (dma_tgt == TGT_C) && (dma_bank == g);
    assign re    = (dma_re && dsel) || (!dma_re && c_re);
    assign raddr = dma_re ? dma_addr : c_raddr;
    assign we    = dma_we ? dsel : c_we;
    assign waddr = dma_we ? dma_addr : c_waddr;
    assign wdata = dma_we ? dma_wdata : c_wdata[g];
    sram_bank #(.WORD_W(DATA_W), .DEPTH(DEPTH)) u_bank (
      .clk, .re, .raddr, .rdata(c_rdata[g]), .we, .waddr, .wdata
    );
  end

  // DMA read data: remember which bank answered.
  target_e     rd_tgt_q;
  int unsigned rd_bank_q;
  always_ff @(posedge clk) begin
    if (dma_re) begin
      rd_tgt_q  <= dma_tgt;
      rd_bank_q <= dma_bank;
    end
  end

  always_comb begin
    unique case (rd_tgt_q)
      TGT_A:   dma_rdata = a_rdata[rd_bank_q % PA];
      TGT_B:   dma_rdata = b_rdata[rd_bank_q % PB];
      default: dma_rdata = c_rdata[rd_bank_q % PB];
    endcase
  end

  // The DMA and the datapath never use the banks in the same cycle.
  a_no_overlap: assert property (@(posedge clk)
    !((dma_we || dma_re) && (a_re || b_re || c_re || c_we)));

  initial begin
    assert (BLK % PA == 0 && BLK % PB == 0) else $error("BLK must be a multiple of PA and PB");
    assert ((BLK / PA) * BLK <= DEPTH && (BLK / PB) * BLK <= DEPTH) else $error("block does not fit a bank");
  end

endmodule
