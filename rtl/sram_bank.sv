// sram_bank: one scratch-pad SRAM bank, 4 KB by default (1024 words of 32 bits).
//
// The bank is dual-ported as the accelerator's banks are: port R reads, port W
// writes, both in the same cycle if needed. A read returns its word on the
// next clock edge (one cycle latency, registered output). A read and a write
// to the same address in one cycle return the old word (read-before-write).
// Bank size and dual porting follow the source design; the split into one
// read and one write port, the word width and the read latency are this
// design's choices. The array is not reset.
module sram_bank #(
  parameter int unsigned WORD_W = 32,
  parameter int unsigned DEPTH  = 1024,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  // read port
  input  logic              re,
  input  logic [AW-1:0]     raddr,
  output logic [WORD_W-1:0] rdata,
  // write port
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [WORD_W-1:0] wdata
);

  logic [WORD_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
    if (we) mem[waddr] <= wdata;
  end

endmodule
