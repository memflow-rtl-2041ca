// mm_engine_tb: puts random fixed-point A, B and C blocks into scratch-pad
// slots, runs the matrix-multiply datapath and compares C with a product
// computed here with 64-bit integer arithmetic. Covers C += A*B, C -= A*B and
// the start from zero, and checks the cycle count from start to done against
// 2*PA + BLK + 1 cycles per tile and against the 229-cycle figure quoted for
// a 16 x 16 GEMM macro node.
module mm_engine_tb;
  import memflow_pkg::*;
  localparam int unsigned BLK = 16, PA = 4, PB = 8, DEPTH = 1024, AW = 10;
  localparam int unsigned EXP_CYC = (BLK / PA) * (BLK / PB) * (2 * PA + BLK + 1) + 1;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, negate, c_zero, busy, done;
  logic dma_we, dma_re;
  target_e dma_tgt;
  logic [3:0] dma_row, dma_col;
  logic [AW-1:0] dma_off, a_off, b_off, c_off;
  data_t dma_wdata, dma_rdata;
  logic a_re, b_re, c_re, c_we;
  logic [AW-1:0] a_addr, b_addr, c_raddr, c_waddr;
  data_t a_rdata [PA];
  data_t b_rdata [PB];
  data_t c_rdata [PB];
  data_t c_wdata [PB];
  int checks = 0, failures = 0;

  scratchpad #(.BLK(BLK), .PA(PA), .PB(PB), .DEPTH(DEPTH)) u_sp (.*);
  mm_engine  #(.BLK(BLK), .PA(PA), .PB(PB), .DEPTH(DEPTH)) dut (.*);

  int signed A [BLK][BLK];
  int signed B [BLK][BLK];
  int signed C [BLK][BLK];

  function automatic int signed ref_mul(int signed a, int signed b);
    longint p;
    p = longint'(a) * longint'(b);
    return int'(p >>> 16);
  endfunction

  task automatic put(target_e t, logic [AW-1:0] off, int r, int c, int signed v);
    @(negedge clk);
    dma_we = 1; dma_tgt = t; dma_off = off; dma_row = 4'(r); dma_col = 4'(c); dma_wdata = v;
    @(negedge clk);
    dma_we = 0;
  endtask

  task automatic get(target_e t, logic [AW-1:0] off, int r, int c, output int signed v);
    @(negedge clk);
    dma_re = 1; dma_tgt = t; dma_off = off; dma_row = 4'(r); dma_col = 4'(c);
    @(negedge clk);
    dma_re = 0;
    v = dma_rdata;
  endtask

  task automatic run_case(bit neg, bit zero);
    int signed exp [BLK][BLK];
    int signed got;
    int cyc;
    for (int r = 0; r < BLK; r++)
      for (int c = 0; c < BLK; c++) begin
        A[r][c] = $urandom_range(0, 1 << 20) - (1 << 19);
        B[r][c] = $urandom_range(0, 1 << 20) - (1 << 19);
        C[r][c] = $urandom_range(0, 1 << 24) - (1 << 23);
        put(TGT_A, a_off, r, c, A[r][c]);
        put(TGT_B, b_off, r, c, B[r][c]);
        put(TGT_C, c_off, r, c, C[r][c]);
      end
    for (int r = 0; r < BLK; r++)
      for (int c = 0; c < BLK; c++) begin
        exp[r][c] = zero ? 0 : C[r][c];
        for (int k = 0; k < BLK; k++)
          exp[r][c] = neg ? exp[r][c] - ref_mul(A[r][k], B[k][c])
                          : exp[r][c] + ref_mul(A[r][k], B[k][c]);
      end
    @(negedge clk);
    negate = neg; c_zero = zero; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != EXP_CYC || cyc > 229) begin
      failures++;
      $display("FAIL cycles %0d expected %0d (bound 229)", cyc, EXP_CYC);
    end
    for (int r = 0; r < BLK; r++)
      for (int c = 0; c < BLK; c++) begin
        get(TGT_C, c_off, r, c, got);
        checks++;
        if (got != exp[r][c]) begin
          failures++;
          if (failures < 10) $display("FAIL C[%0d][%0d] = %0d expected %0d", r, c, got, exp[r][c]);
        end
      end
    // A and B are left untouched
    for (int n = 0; n < 16; n++) begin
      int r, c;
      r = $urandom_range(BLK - 1); c = $urandom_range(BLK - 1);
      get(TGT_A, a_off, r, c, got);
      checks++;
      if (got != A[r][c]) failures++;
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; start = 0; negate = 0; c_zero = 0;
    dma_we = 0; dma_re = 0; dma_tgt = TGT_A; dma_row = 0; dma_col = 0; dma_wdata = 0; dma_off = 0;
    a_off = AW'(64); b_off = AW'(64); c_off = AW'(96);
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_case(0, 0);
    run_case(1, 0);
    a_off = 0; b_off = AW'(992); c_off = 0;
    run_case(0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
