// sched_ref_pkg: reference model for the testbenches of the controller and
// the top. It lists the macro nodes of a loop order with plain nested loops
// and replays the scratch-pad management by brute force: the victim is found
// by searching the remaining node list for each resident block's next use.
package sched_ref_pkg;
  import memflow_pkg::*;

  typedef struct {
    int i, j, l;
  } node_t;

  // one DMA transfer: dir 0 load, 1 store
  typedef struct {
    bit      dir;
    target_e tgt;
    int      x, y;     // block indices (A: i,l  B: l,j  C: i,j)
    int      slot;
  } xfer_t;

  typedef struct {
    int nodes, a_loads, b_loads, c_loads, c_stores, c_spills;
    int a_hits, b_hits, c_hits, c_zero_inits, evictions;
  } cnt_t;

  function automatic void node_list(loop_order_e o, int nm, int nn, int nk, ref node_t q[$]);
    int lim [3];
    int d [3];
    int c [3];
    q.delete();
    lim = '{nm, nn, nk};
    case (o)
      ORD_IJL: d = '{0, 1, 2};
      ORD_JIL: d = '{1, 0, 2};
      ORD_LIJ: d = '{2, 0, 1};
      ORD_ILJ: d = '{0, 2, 1};
      ORD_LJI: d = '{2, 1, 0};
      default: d = '{1, 2, 0};
    endcase
    for (int a = 0; a < lim[d[0]]; a++)
      for (int b = 0; b < lim[d[1]]; b++)
        for (int e = 0; e < lim[d[2]]; e++) begin
          c[d[0]] = a;
          c[d[1]] = b;
          c[d[2]] = e;
          q.push_back('{c[0], c[1], c[2]});
        end
  endfunction

  function automatic void blk_of(int r, node_t n, output int x, output int y);
    case (r)
      0: begin x = n.i; y = n.l; end   // A
      1: begin x = n.l; y = n.j; end   // B
      default: begin x = n.i; y = n.j; end   // C
    endcase
  endfunction

  // Replays the schedule; fills the transfer list and the counts.
  function automatic void replay(node_t q[$], int slots_a, int slots_b, int slots_c,
                                 bit accumulate, ref xfer_t xs[$], output cnt_t cnt);
    int    ns [3];
    bit    v  [3][$];
    bit    dt [3][$];
    int    tx [3][$];
    int    ty [3][$];
    int    x, y, s, best, bnu, nu, xx, yy;
    int    reg_order [3];
    cnt = '{default: 0};
    xs.delete();
    ns = '{slots_a, slots_b, slots_c};
    reg_order = '{2, 0, 1};
    for (int r = 0; r < 3; r++)
      for (int k = 0; k < ns[r]; k++) begin
        v[r].push_back(0); dt[r].push_back(0); tx[r].push_back(0); ty[r].push_back(0);
      end
    for (int t = 0; t < q.size(); t++) begin
      foreach (reg_order[ri]) begin
        int r;
        r = reg_order[ri];
        blk_of(r, q[t], x, y);
        s = -1;
        for (int k = 0; k < ns[r]; k++) if (v[r][k] && tx[r][k] == x && ty[r][k] == y) s = k;
        if (s >= 0) begin
          if (r == 0) cnt.a_hits++; else if (r == 1) cnt.b_hits++; else cnt.c_hits++;
          continue;
        end
        for (int k = ns[r] - 1; k >= 0; k--) if (!v[r][k]) s = k;
        if (s < 0) begin
          best = 0; bnu = -1;
          for (int k = 0; k < ns[r]; k++) begin
            nu = 1 << 30;
            for (int u = t + 1; u < q.size(); u++) begin
              blk_of(r, q[u], xx, yy);
              if (xx == tx[r][k] && yy == ty[r][k]) begin nu = u; break; end
            end
            if (nu > bnu) begin bnu = nu; best = k; end
          end
          s = best;
          cnt.evictions++;
          if (r == 2 && dt[r][s]) begin
            xs.push_back('{1'b1, TGT_C, tx[r][s], ty[r][s], s});
            cnt.c_stores++;
            if (bnu != (1 << 30)) cnt.c_spills++;
          end
        end
        v[r][s] = 1; dt[r][s] = 0; tx[r][s] = x; ty[r][s] = y;
        if (r == 2 && q[t].l == 0 && !accumulate) begin
          cnt.c_zero_inits++;
        end else begin
          xs.push_back('{1'b0, (r == 0) ? TGT_A : ((r == 1) ? TGT_B : TGT_C), x, y, s});
          if (r == 0) cnt.a_loads++; else if (r == 1) cnt.b_loads++; else cnt.c_loads++;
        end
      end
      // C slot of this node becomes dirty
      blk_of(2, q[t], x, y);
      for (int k = 0; k < ns[2]; k++) if (v[2][k] && tx[2][k] == x && ty[2][k] == y) dt[2][k] = 1;
      cnt.nodes++;
    end
    for (int k = 0; k < ns[2]; k++)
      if (v[2][k] && dt[2][k]) begin
        xs.push_back('{1'b1, TGT_C, tx[2][k], ty[2][k], k});
        cnt.c_stores++;
      end
  endfunction

endpackage
