// dma_tb: moves blocks between a DRAM model and a local block memory modelled
// here (one-cycle read latency, data held until the next read). Checks loads
// and stores at random block positions and row lengths with random DRAM
// stalls, that nothing outside the block is written, and that without stalls
// a block moves at one word per cycle plus the DRAM latency.
module dma_tb;
  import memflow_pkg::*;
  localparam int unsigned BLK = 16, AW = 32, LAT = 4;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, dir, busy, done;
  target_e tgt, loc_tgt;
  logic [AW-1:0] base, stride, mem_addr;
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  data_t mem_wdata, mem_rdata;
  logic loc_we, loc_re;
  logic [3:0] loc_row, loc_col;
  data_t loc_wdata, loc_rdata;
  int unsigned stalls;
  int checks = 0, failures = 0;

  dma #(.BLK(BLK), .ADDR_W(AW)) dut (.*);
  dram_model #(.WORDS(16384), .ADDR_W(AW), .LATENCY(LAT), .STALL_PCT(0)) u_dram (
    .clk, .rst_n, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata), .stalls
  );

  data_t loc [BLK][BLK];
  always @(posedge clk) begin
    if (loc_we) loc[loc_row][loc_col] <= loc_wdata;
    if (loc_re) loc_rdata <= loc[loc_row][loc_col];
  end

  task automatic xfer(bit d, int b, int s, output int cyc);
    @(negedge clk);
    start = 1; dir = d; base = AW'(b); stride = AW'(s); tgt = TGT_B;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
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
    int cyc;
    data_t shadow [16384];
    rst_n = 0; start = 0; dir = 0; base = 0; stride = 0; tgt = TGT_A;
    for (int a = 0; a < 16384; a++) begin
      u_dram.mem[a] = $urandom;
      shadow[a] = u_dram.mem[a];
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 8; rep++) begin
      int s, b;
      u_dram.stall_pct = (rep < 2) ? 0 : 30;
      s = 16 * $urandom_range(1, 6);
      b = 16 * $urandom_range(0, 3) + s * 16 * $urandom_range(0, 2);
      // load
      xfer(0, b, s, cyc);
      checks++;
      if (rep < 2 && cyc > BLK * BLK + LAT + 3) begin
        failures++;
        $display("FAIL load took %0d cycles", cyc);
      end
      checks++;
      if (loc_tgt != TGT_B) failures++;
      for (int r = 0; r < BLK; r++)
        for (int c = 0; c < BLK; c++) begin
          checks++;
          if (loc[r][c] != shadow[b + r * s + c]) begin
            failures++;
            if (failures < 10) $display("FAIL load (%0d,%0d)", r, c);
          end
        end
      // store new data to another block position
      for (int r = 0; r < BLK; r++)
        for (int c = 0; c < BLK; c++) loc[r][c] = $urandom;
      b = b + 16;
      xfer(1, b, s, cyc);
      checks++;
      if (rep < 2 && cyc > BLK * BLK + 4) begin
        failures++;
        $display("FAIL store took %0d cycles", cyc);
      end
      for (int r = 0; r < BLK; r++)
        for (int c = 0; c < BLK; c++) shadow[b + r * s + c] = loc[r][c];
      for (int a = 0; a < 16384; a++) begin
        checks++;
        if (u_dram.mem[a] != shadow[a]) begin
          failures++;
          if (failures < 10) $display("FAIL DRAM word %0d", a);
        end
      end
    end
    $display("stalled requests: %0d", stalls);
    checks++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
