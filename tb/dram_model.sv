// dram_model: behavioural model of the off-chip DRAM used by the testbenches.
// Not synthesizable design content: a word array with a request/grant port
// and in-order read responses after a fixed latency. The grant is withheld at
// random (stall_pct percent of cycles, STALL_PCT at the start) to exercise back-pressure; stalls
// counts the cycles in which a request was refused.
module dram_model
  import memflow_pkg::*;
#(
  parameter int unsigned WORDS     = 65536,
  parameter int unsigned ADDR_W    = 32,
  parameter int unsigned LATENCY   = 4,
  parameter int unsigned STALL_PCT = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  data_t             wdata,
  output logic              gnt,
  output logic              rvalid,
  output data_t             rdata,
  output int unsigned       stalls
);

  data_t       mem [WORDS];
  int unsigned stall_pct = STALL_PCT;   // may be changed by the testbench
  logic  pv [LATENCY];
  data_t pd [LATENCY];

  initial begin
    stalls = 0;
    for (int i = 0; i < LATENCY; i++) begin
      pv[i] = 1'b0;
      pd[i] = '0;
    end
    gnt = 1'b1;
  end

  assign rvalid = pv[LATENCY-1];
  assign rdata  = pd[LATENCY-1];

  always @(posedge clk) begin
    if (req && !gnt) stalls <= stalls + 1;
    for (int i = LATENCY - 1; i > 0; i--) begin
      pv[i] <= pv[i-1];
      pd[i] <= pd[i-1];
    end
    pv[0] <= req && gnt && !we;
    if (!rst_n)
      for (int i = 0; i < LATENCY; i++) pv[i] <= 1'b0;
    pd[0] <= mem[addr % WORDS];
    if (req && gnt && we) mem[addr % WORDS] <= wdata;
    gnt <= ($urandom_range(99) >= stall_pct);
  end

endmodule
