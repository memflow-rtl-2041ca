// scratchpad_tb: writes random blocks through the DMA element port into
// slots of regions A, B and C and checks that the wide datapath ports return
// them in the documented layout (a column of PA A-elements, a row segment of
// PB B- or C-elements per address). Then writes C through the wide write port
// and reads it back element by element through the DMA port.
module scratchpad_tb;
  import memflow_pkg::*;
  localparam int unsigned BLK = 16, PA = 4, PB = 8, DEPTH = 1024, AW = 10;

  logic clk = 0;
  always #5 clk = ~clk;
  logic dma_we, dma_re;
  target_e dma_tgt;
  logic [3:0] dma_row, dma_col;
  logic [AW-1:0] dma_off;
  data_t dma_wdata, dma_rdata;
  logic a_re, b_re, c_re, c_we;
  logic [AW-1:0] a_addr, b_addr, c_raddr, c_waddr;
  data_t a_rdata [PA];
  data_t b_rdata [PB];
  data_t c_rdata [PB];
  data_t c_wdata [PB];
  int checks = 0, failures = 0;

  scratchpad #(.BLK(BLK), .PA(PA), .PB(PB), .DEPTH(DEPTH)) dut (.*);

  data_t blk [3][BLK][BLK];
  logic [AW-1:0] off [3];

  task automatic chk(data_t got, data_t exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h expected %h", what, got, exp);
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
    dma_we = 0; dma_re = 0; dma_tgt = TGT_A; dma_row = 0; dma_col = 0; dma_off = 0; dma_wdata = 0;
    a_re = 0; b_re = 0; c_re = 0; c_we = 0; a_addr = 0; b_addr = 0; c_raddr = 0; c_waddr = 0;
    for (int g = 0; g < PB; g++) c_wdata[g] = 0;
    off = '{AW'(3 * 64), AW'(5 * 32), AW'(31 * 32)};
    for (int t = 0; t < 3; t++)
      for (int r = 0; r < BLK; r++)
        for (int c = 0; c < BLK; c++) begin
          blk[t][r][c] = $urandom;
          @(negedge clk);
          dma_we = 1; dma_tgt = target_e'(t); dma_off = off[t];
          dma_row = 4'(r); dma_col = 4'(c); dma_wdata = blk[t][r][c];
        end
    @(negedge clk);
    dma_we = 0;
    // region A: address rg*BLK + k gives A[rg*PA + g][k] on bank g
    for (int rg = 0; rg < BLK / PA; rg++)
      for (int k = 0; k < BLK; k++) begin
        @(negedge clk); a_re = 1; a_addr = off[0] + AW'(rg * BLK + k);
        @(negedge clk); a_re = 0;
        for (int g = 0; g < PA; g++) chk(a_rdata[g], blk[0][rg * PA + g][k], "A column");
      end
    // region B: address k*(BLK/PB) + cg gives B[k][cg*PB + g]
    for (int k = 0; k < BLK; k++)
      for (int cg = 0; cg < BLK / PB; cg++) begin
        @(negedge clk); b_re = 1; b_addr = off[1] + AW'(k * (BLK / PB) + cg);
        @(negedge clk); b_re = 0;
        for (int g = 0; g < PB; g++) chk(b_rdata[g], blk[1][k][cg * PB + g], "B row");
      end
    // region C: same layout as B
    for (int r = 0; r < BLK; r++)
      for (int cg = 0; cg < BLK / PB; cg++) begin
        @(negedge clk); c_re = 1; c_raddr = off[2] + AW'(r * (BLK / PB) + cg);
        @(negedge clk); c_re = 0;
        for (int g = 0; g < PB; g++) chk(c_rdata[g], blk[2][r][cg * PB + g], "C row");
      end
    // wide C writes, read back through the DMA port
    for (int r = 0; r < BLK; r++)
      for (int cg = 0; cg < BLK / PB; cg++) begin
        @(negedge clk);
        c_we = 1; c_waddr = off[2] + AW'(r * (BLK / PB) + cg);
        for (int g = 0; g < PB; g++) begin
          blk[2][r][cg * PB + g] = $urandom;
          c_wdata[g] = blk[2][r][cg * PB + g];
        end
      end
    @(negedge clk);
    c_we = 0;
    for (int t = 0; t < 3; t++)
      for (int r = 0; r < BLK; r++)
        for (int c = 0; c < BLK; c++) begin
          @(negedge clk);
          dma_re = 1; dma_tgt = target_e'(t); dma_off = off[t]; dma_row = 4'(r); dma_col = 4'(c);
          @(negedge clk);
          dma_re = 0;
          chk(dma_rdata, blk[t][r][c], "DMA read");
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
