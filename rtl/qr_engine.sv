// qr_engine: local computation of the four QR macro nodes on BLK x BLK
// blocks held in the engine's registers, by Householder reflections
// P = I - v v^T with |v|^2 = 2. Registers: block A (the R block), block V
// (reflectors), block B (the lower block of a stacked pair) and the vector H
// (the head entry of each pair reflector).
//
// QR (mode QR_FACT), A -> H(V) * R. For each column k = 0 .. BLK-1
// (x = a[k..BLK-1][k]):
//   NORM  : BLK multipliers and an adder tree form sigma = sum x_i^2;
//   ALPHA : the square-root unit forms alpha = -sign(x_k) * sqrt(sigma);
//   SCALE : it then forms d = sqrt(sigma - x_k * alpha), so that
//           v = (x - alpha e_k) / d has |v|^2 = 2;
//   VEC   : DIVS dividers form v_i = u_i / d, DIVS rows per cycle over all
//           BLK rows (zero above row k); v is written to column k of V, zeros
//           below R(k,k), and in the last VEC cycle alpha to R(k,k);
//   per column j > k, two cycles:
//   DOT   : BLK multipliers and the adder tree form w_j = sum_i v_i a_ij;
//   UPD   : BLK multiplier/subtractor lanes form a_ij = a_ij - v_i w_j.
// A = P_0 P_1 ... P_{BLK-1} R afterwards. A column takes
// 3 + BLK/DIVS + 2*(BLK-1-k) cycles: 417 from start to done at the defaults
// (BLK 16, DIVS 2).
//
// QRUpdateTr (mode QR_UTR), A -> H(V)^T * A: with V loaded from a factorised
// diagonal block, only DOT and UPD run, for every k and every column j. This
// turns the other blocks of the block row into blocks of R. 2*BLK*BLK + 1
// cycles (513).
//
// QRCPL (mode QR_CPL): eliminates the block B below an upper triangular R
// (in A): [R; B] -> H * [R'; 0]. Reflector k has the head entry h_k in row k
// of R and the tail v_k (BLK entries) in B's rows; x = [r_kk; b_0k .. b_15k].
// The steps are those of QR with pair operands: NORM adds r_kk^2 to the
// tree, VEC divides the B column (written to column k of V) and, with one
// more divider, the head h_k = (r_kk - alpha) / d; DOT forms
// w_j = h_k r_kj + sum_i v_ik b_ij and UPD updates row k of R and all of B.
// Afterwards A holds R', V the tails and H the heads. 417 cycles.
//
// QRUpdate (mode QR_UPD): applies the reflectors left in V and H by the last
// QRCPL to a stacked pair [A; B] for every k and j (the blocks to the right
// of the eliminated pair). 2*BLK*BLK + 1 cycles (513). V and H persist
// between commands, so the QRUpdate nodes of a QRCPL must follow it before
// the next QRCPL.
//
// Interface: while idle, elements are written and read by row and column;
// el_sel picks A (0), V (1) or B (2); read data comes one cycle after el_re.
// A start pulse begins, mode is sampled with it; busy stays high until the
// single-cycle done pulse. Reset is synchronous, active low.
//
// From the source design: the four nodes QR (A -> H(V_lower) R_upper),
// QRUpdateTr (H(V_lower) A -> R), QRCPL (A R_upper^-1 -> H(V)) and QRUpdate
// (H(V) [R, A] -> [R, A]), the Householder form H(V) = P_n ... P_1 with
// P_i = I - v_i v_i^T, a datapath chaining mul, add with an accumulation
// loop, a function unit (square root), div, mul and sub, two dividers for QR
// and three for QRCPL as in its unit counts. This design's choices: the
// blocks held in registers, row-parallel multipliers (BLK, plus one for the
// head), the phase order, the head vector kept in the engine, and the
// fixed-point square root (see memflow_pkg).
module qr_engine
  import memflow_pkg::*;
#(
  parameter int unsigned BLK  = 16,
  parameter int unsigned DIVS = 2,
  localparam int unsigned IW  = (BLK > 1) ? $clog2(BLK) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  qr_mode_e      mode,
  output logic          busy,
  output logic          done,
  input  logic          el_we,
  input  logic          el_re,
  input  logic [1:0]    el_sel,
  input  logic [IW-1:0] el_row,
  input  logic [IW-1:0] el_col,
  input  data_t         el_wdata,
  output data_t         el_rdata
);

  localparam int unsigned KW = $clog2(BLK + 1);

  typedef enum logic [2:0] {S_IDLE, S_NORM, S_ALPHA, S_SCALE, S_VEC, S_DOT, S_UPD} state_e;

  state_e        state;
  qr_mode_e      mode_q;
  logic [KW-1:0] k, j, i0;
  logic [IW-1:0] kx, jx;
  data_t         a [BLK][BLK];
  data_t         v [BLK][BLK];
  data_t         b [BLK][BLK];
  data_t         h [BLK];
  data_t         sigma, alpha, dd, w;
  logic          pair;   // QRCPL / QRUpdate: stacked pair [A; B]
  logic          upd;    // QRUpdateTr / QRUpdate: only DOT/UPD over all columns

  assign busy = (state != S_IDLE);
  assign kx   = IW'(k);
  assign jx   = IW'(j);
  assign pair = (mode_q == QR_CPL) || (mode_q == QR_UPD);
  assign upd  = (mode_q == QR_UTR) || (mode_q == QR_UPD);

  // ---------------- multiplier row and adder tree ----------------
  // single block: NORM x_i * x_i, DOT v_i * a_ij, rows i >= k only;
  // pair: NORM b_ik^2 (+ r_kk^2), DOT v_ik * b_ij (+ h_k * r_kj), all rows
  data_t prod [BLK];
  data_t hprod, psum;
  always_comb begin
    psum  = '0;
    hprod = (state == S_NORM) ? fx_mul(a[kx][kx], a[kx][kx]) : fx_mul(h[kx], a[kx][jx]);
    for (int i = 0; i < BLK; i++) begin
      if (pair) prod[i] = (state == S_NORM) ? fx_mul(b[i][kx], b[i][kx]) : fx_mul(v[i][kx], b[i][jx]);
      else      prod[i] = (state == S_NORM) ? fx_mul(a[i][kx], a[i][kx]) : fx_mul(v[i][kx], a[i][jx]);
      if (pair || i >= int'(k)) psum = psum + prod[i];
    end
    if (pair) psum = psum + hprod;
  end

  // ---------------- square-root unit ----------------
  data_t sq_in, sq_out;
  always_comb begin
    sq_in  = (state == S_ALPHA) ? sigma : sigma - fx_mul(a[kx][kx], alpha);
    sq_out = fx_sqrt(sq_in);
  end

  // ---------------- DIVS dividers, plus the head divider ----------------
  data_t quo [DIVS];
  data_t hquo;
  always_comb begin
    for (int d = 0; d < DIVS; d++) begin
      int unsigned i;
      data_t u;
      i = int'(i0) + d;
      if (pair) u = b[i % BLK][kx];
      else      u = (i == int'(k)) ? a[kx][kx] - alpha : a[i % BLK][kx];
      quo[d] = fx_div(u, dd);
    end
    hquo = fx_div(a[kx][kx] - alpha, dd);
  end

  // ---------------- control and registers ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      mode_q <= QR_FACT;
      k      <= '0;
      j      <= '0;
      i0     <= '0;
      done   <= 1'b0;
      sigma  <= '0;
      alpha  <= '0;
      dd     <= '0;
      w      <= '0;
      for (int i = 0; i < BLK; i++) h[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (el_we && el_sel == 2'd0) a[el_row][el_col] <= el_wdata;
          if (el_we && el_sel == 2'd1) v[el_row][el_col] <= el_wdata;
          if (el_we && el_sel == 2'd2) b[el_row][el_col] <= el_wdata;
          if (el_re) el_rdata <= (el_sel == 2'd1) ? v[el_row][el_col]
                               : ((el_sel == 2'd2) ? b[el_row][el_col] : a[el_row][el_col]);
          if (start) begin
            k      <= '0;
            j      <= '0;
            mode_q <= mode;
            state  <= (mode == QR_UTR || mode == QR_UPD) ? S_DOT : S_NORM;
          end
        end
        S_NORM: begin
          sigma <= psum;
          state <= S_ALPHA;
        end
        S_ALPHA: begin
          alpha <= a[kx][kx][DATA_W-1] ? sq_out : -sq_out;
          state <= S_SCALE;
        end
        S_SCALE: begin
          dd    <= sq_out;
          i0    <= '0;
          state <= S_VEC;
        end
        S_VEC: begin
          for (int d = 0; d < DIVS; d++) begin
            if (int'(i0) + d < BLK) begin
              if (pair || int'(i0) + d >= int'(k)) v[(int'(i0) + d) % BLK][kx] <= quo[d];
              else                                  v[(int'(i0) + d) % BLK][kx] <= '0;
              if (pair)                             b[(int'(i0) + d) % BLK][kx] <= '0;
              else if (int'(i0) + d > int'(k))      a[(int'(i0) + d) % BLK][kx] <= '0;
            end
          end
          if (int'(i0) + DIVS >= BLK) begin
            a[kx][kx] <= alpha;
            if (pair) h[kx] <= hquo;
            if (int'(k) + 1 >= BLK) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              j     <= k + 1'b1;
              state <= S_DOT;
            end
          end else begin
            i0 <= i0 + KW'(DIVS);
          end
        end
        S_DOT: begin
          w     <= psum;
          state <= S_UPD;
        end
        S_UPD: begin
          if (pair) begin
            a[kx][jx] <= a[kx][jx] - fx_mul(h[kx], w);
            for (int i = 0; i < BLK; i++) b[i][jx] <= b[i][jx] - fx_mul(v[i][kx], w);
          end else begin
            for (int i = 0; i < BLK; i++)
              if (i >= int'(k)) a[i][jx] <= a[i][jx] - fx_mul(v[i][kx], w);
          end
          if (int'(j) + 1 >= BLK) begin
            k <= k + 1'b1;
            if (!upd) begin
              state <= S_NORM;
            end else if (int'(k) + 1 >= BLK) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              j     <= '0;
              state <= S_DOT;
            end
          end else begin
            j     <= j + 1'b1;
            state <= S_DOT;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
