// dma: moves one BLK x BLK matrix block between DRAM and on-chip storage.
//
// The matrix lies in DRAM row-major with a row length of `stride` words; the
// block's element (r, c) is at word address base + r * stride + c. A load
// (dir = 0) reads the block from DRAM and writes it, element by element,
// through the local port to the target (a scratch-pad region or the LU
// engine's registers). A store (dir = 1) reads the target through the local
// port and writes DRAM. Elements go in row-major order.
//
// DRAM port: a request (mem_req, mem_we, mem_addr, mem_wdata) is taken in a
// cycle where mem_gnt is high; read data returns in request order with
// mem_rvalid, one or more cycles after the grant. Loads keep issuing while reads are
// outstanding, so with a DRAM that grants every cycle a block moves at one
// word per cycle after the DRAM latency. Local port: writes take effect at
// the clock edge; reads return data one cycle after loc_re and the data
// stays until the next loc_re.
//
// Interface: start with the command valid while idle; busy until the
// single-cycle done pulse. Reset is synchronous, active low.
//
// The source design only names the DMA between DRAM and the scratch-pad and
// states that whole data blocks move; the port protocol, ordering and
// addressing are this design's choices.
module dma
  import memflow_pkg::*;
#(
  parameter int unsigned BLK    = 16,
  parameter int unsigned ADDR_W = 32,
  localparam int unsigned IW    = (BLK > 1) ? $clog2(BLK) : 1,
  localparam int unsigned NW    = $clog2(BLK * BLK + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // command
  input  logic              start,
  input  logic              dir,        // 0: DRAM -> local, 1: local -> DRAM
  input  target_e           tgt,
  input  logic [ADDR_W-1:0] base,
  input  logic [ADDR_W-1:0] stride,
  output logic              busy,
  output logic              done,
  // DRAM
  output logic              mem_req,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output data_t             mem_wdata,
  input  logic              mem_gnt,
  input  logic              mem_rvalid,
  input  data_t             mem_rdata,
  // local storage
  output logic              loc_we,
  output logic              loc_re,
  output target_e           loc_tgt,
  output logic [IW-1:0]     loc_row,
  output logic [IW-1:0]     loc_col,
  output data_t             loc_wdata,
  input  data_t             loc_rdata
);

  localparam int unsigned TOTAL = BLK * BLK;

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_SRD, S_SWR} state_e;

  state_e            state;
  target_e           tgt_q;
  logic [ADDR_W-1:0] base_q, stride_q;
  logic [NW-1:0]     n_iss;   // elements requested from DRAM / written to DRAM
  logic [NW-1:0]     n_rsp;   // read responses received

  assign busy    = (state != S_IDLE);
  assign loc_tgt = tgt_q;

  function automatic logic [IW-1:0] row_of(logic [NW-1:0] n);
    return IW'(int'(n) / BLK);
  endfunction
  function automatic logic [IW-1:0] col_of(logic [NW-1:0] n);
    return IW'(int'(n) % BLK);
  endfunction

  // DRAM request for element n_iss
  always_comb begin
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = base_q + ADDR_W'(row_of(n_iss)) * stride_q + ADDR_W'(col_of(n_iss));
    mem_wdata = loc_rdata;
    if (state == S_LOAD && n_iss != NW'(TOTAL)) mem_req = 1'b1;
    if (state == S_SWR) begin
      mem_req = 1'b1;
      mem_we  = 1'b1;
    end
  end

  // local port
  always_comb begin
    loc_we    = 1'b0;
    loc_re    = 1'b0;
    loc_row   = '0;
    loc_col   = '0;
    loc_wdata = mem_rdata;
    if (state == S_LOAD) begin
      loc_we  = mem_rvalid;
      loc_row = row_of(n_rsp);
      loc_col = col_of(n_rsp);
    end else if (state == S_SRD || (state == S_SWR && mem_gnt && n_iss != NW'(TOTAL - 1))) begin
      // read the element to store next: n_iss in S_SRD, n_iss + 1 after a grant
      loc_re  = 1'b1;
      loc_row = row_of(state == S_SRD ? n_iss : n_iss + 1'b1);
      loc_col = col_of(state == S_SRD ? n_iss : n_iss + 1'b1);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      done     <= 1'b0;
      tgt_q    <= TGT_A;
      base_q   <= '0;
      stride_q <= '0;
      n_iss    <= '0;
      n_rsp    <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          tgt_q    <= tgt;
          base_q   <= base;
          stride_q <= stride;
          n_iss    <= '0;
          n_rsp    <= '0;
          state    <= dir ? S_SRD : S_LOAD;
        end
        S_LOAD: begin
          if (mem_req && mem_gnt) n_iss <= n_iss + 1'b1;
          if (mem_rvalid) begin
            n_rsp <= n_rsp + 1'b1;
            if (n_rsp == NW'(TOTAL - 1)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end
        end
        S_SRD: state <= S_SWR;
        S_SWR: if (mem_gnt) begin
          if (n_iss == NW'(TOTAL - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            n_iss <= n_iss + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_no_stray_data: assert property (@(posedge clk)
    rst_n && mem_rvalid |-> state == S_LOAD && n_rsp < n_iss);

endmodule
