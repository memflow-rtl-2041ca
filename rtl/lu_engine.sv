// lu_engine: local computation of the three LU macro nodes on one BLK x BLK
// block held in the engine's own registers:
//   LU    (mode LU_FACT): A -> L * U, in place;
//   TRS   (mode LU_TRS) : A -> L^-1 * A, with unit lower L in the factor block;
//   LUCPL (mode LU_CPL) : A -> A * U^-1, with upper U in the factor block.
// These are the diagonal, row-panel and column-panel steps of a blocked LU.
// The output of an LU node (L below the diagonal with an implied unit
// diagonal, U on and above it) can be loaded as the factor block of both TRS
// and LUCPL unchanged.
//
// All three use one datapath. For each pivot k there are two phases:
//   divide phase : DIVS dividers form x_i = a_ik / d for up to DIVS rows per
//                  cycle and write x_i over a_ik. The divisor d is a_kk (LU) or
//                  the factor's u_kk (LUCPL); the rows are i > k (LU) or all
//                  rows (LUCPL). TRS has no divide phase (unit diagonal).
//   update phase : LANES multiplier/subtractor lanes, arranged as
//                  LANES / BLK rows of BLK columns, form a_ij = a_ij - m_i * r_j
//                  for ROWS = LANES / BLK rows per cycle. m_i is a_ik (LU,
//                  LUCPL) or the factor's l_ik (TRS); r_j is a_kj (LU, TRS) or
//                  the factor's u_kj (LUCPL). Rows i > k (LU, TRS) or all rows
//                  (LUCPL); columns j > k (LU, LUCPL) or all columns (TRS).
//                  The subtractor output goes back into the block registers,
//                  which is the datapath's feedback path.
// With the defaults (BLK 16, DIVS 16, LANES 64) LU takes 52 cycles from the
// start pulse to the done pulse, TRS 37 and LUCPL 77; the testbench gives the
// formulas.
//
// Interface: while idle, elements are written (el_we) and read (el_re, data
// on el_rdata one cycle later) by row and column; el_sel picks the working
// block (0) or the factor block (1). mode is sampled with the start pulse;
// busy stays high until the single-cycle done pulse.
//
// From the source design: the three node types and their functions, the
// div -> mul -> sub datapath with a feedback path, and the unit counts (16
// dividers, 64 multipliers, 64 subtractors for 16 x 16 blocks) shared by all
// three. This design's own choices: the phase order, the lane arrangement,
// no pivoting, and holding the factor block in a second register block (the
// source design's register budget of 8704 bits is about one block plus one
// column; this engine uses two blocks). A zero divisor yields zero quotients
// (see fx_div).
module lu_engine
  import memflow_pkg::*;
#(
  parameter int unsigned BLK   = 16,
  parameter int unsigned DIVS  = 16,
  parameter int unsigned LANES = 64,
  localparam int unsigned IW   = (BLK > 1) ? $clog2(BLK) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  lu_mode_e      mode,
  output logic          busy,
  output logic          done,
  // element access while idle
  input  logic          el_we,
  input  logic          el_re,
  input  logic          el_sel,
  input  logic [IW-1:0] el_row,
  input  logic [IW-1:0] el_col,
  input  data_t         el_wdata,
  output data_t         el_rdata
);

  localparam int unsigned ROWS = LANES / BLK;   // rows updated per cycle
  localparam int unsigned KW   = $clog2(BLK + 1);

  typedef enum logic [1:0] {S_IDLE, S_DIV, S_UPD} state_e;

  state_e        state;
  lu_mode_e      mode_q;
  logic [KW-1:0] k;
  logic [KW-1:0] i0;   // first row of the current group
  data_t         a [BLK][BLK];   // working block
  data_t         f [BLK][BLK];   // factor block (TRS: L, LUCPL: U)
  logic [IW-1:0] kx;   // pivot index, always below BLK while busy

  assign kx = IW'(k);

  assign busy = (state != S_IDLE);

  // per-mode selections
  logic          all_rows;   // LUCPL: every row takes part
  logic          all_cols;   // TRS: every column is updated
  logic [KW-1:0] k_last;     // last pivot
  data_t         divisor;
  assign all_rows = (mode_q == LU_CPL);
  assign all_cols = (mode_q == LU_TRS);
  assign k_last   = (mode_q == LU_CPL) ? KW'(BLK - 1) : KW'(BLK - 2);
  assign divisor  = (mode_q == LU_CPL) ? f[kx][kx] : a[kx][kx];

  // ---------------- DIVS dividers ----------------
  data_t quo [DIVS];
  always_comb begin
    for (int d = 0; d < DIVS; d++) begin
      int unsigned i;
      i = int'(i0) + d;
      quo[d] = (i < BLK) ? fx_div(a[i % BLK][kx], divisor) : '0;
    end
  end

  // ---------------- LANES multipliers ----------------
  data_t prod [ROWS][BLK];
  always_comb begin
    for (int rr = 0; rr < ROWS; rr++) begin
      int unsigned i;
      data_t       m;
      i = int'(i0) + rr;
      m = (mode_q == LU_TRS) ? f[i % BLK][kx] : a[i % BLK][kx];
      for (int j = 0; j < BLK; j++)
        prod[rr][j] = fx_mul(m, (mode_q == LU_CPL) ? f[kx][j] : a[kx][j]);
    end
  end

  // first row of the divide and update phases for pivot kk
  function automatic logic [KW-1:0] first_row(lu_mode_e md, logic [KW-1:0] kk);
    return (md == LU_CPL) ? '0 : kk + 1'b1;
  endfunction

  // ---------------- control ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      mode_q <= LU_FACT;
      k      <= '0;
      i0     <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          mode_q <= mode;
          k      <= '0;
          i0     <= first_row(mode, '0);
          if (BLK > 1 || mode == LU_CPL) begin
            state <= (mode == LU_TRS) ? S_UPD : S_DIV;
          end else begin
            done <= 1'b1;
          end
        end
        S_DIV: begin
          if (int'(i0) + DIVS >= BLK) begin
            if (k == k_last && all_rows) begin
              // the last LUCPL column has nothing right of it to update
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_UPD;
              i0    <= first_row(mode_q, k);
            end
          end else begin
            i0 <= i0 + KW'(DIVS);
          end
        end
        S_UPD: begin
          if (int'(i0) + ROWS >= BLK) begin
            if (k == k_last) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= all_cols ? S_UPD : S_DIV;
              k     <= k + 1'b1;
              i0    <= first_row(mode_q, k + 1'b1);
            end
          end else begin
            i0 <= i0 + KW'(ROWS);
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------- block registers ----------------
  always_ff @(posedge clk) begin
    if (state == S_IDLE) begin
      if (el_we && !el_sel) a[el_row][el_col] <= el_wdata;
      if (el_we &&  el_sel) f[el_row][el_col] <= el_wdata;
      if (el_re) el_rdata <= el_sel ? f[el_row][el_col] : a[el_row][el_col];
    end else if (state == S_DIV) begin
      for (int d = 0; d < DIVS; d++) begin
        if (int'(i0) + d < BLK) a[(int'(i0) + d) % BLK][kx] <= quo[d];
      end
    end else begin
      for (int rr = 0; rr < ROWS; rr++) begin
        if (int'(i0) + rr < BLK) begin
          for (int j = 0; j < BLK; j++) begin
            if (all_cols || j > int'(k))
              a[(int'(i0) + rr) % BLK][j] <= a[(int'(i0) + rr) % BLK][j] - prod[rr][j];
          end
        end
      end
    end
  end

  initial begin
    assert (LANES % BLK == 0 && LANES >= BLK) else $error("LANES must be a multiple of BLK");
  end

endmodule
