// block_scheduler_tb: for every loop order and random block counts, takes the
// macro nodes from the scheduler with random back-pressure and compares them
// with the node list written as plain nested loops, including the last flag
// and the number of nodes.
module block_scheduler_tb;
  import memflow_pkg::*;
  import sched_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, valid, ready, last;
  loop_order_e order;
  logic [7:0] nb_m, nb_n, nb_k, i, j, l;
  int checks = 0, failures = 0;

  block_scheduler #(.NBW(8)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    node_t q[$];
    rst_n = 0; start = 0; ready = 0; order = ORD_IJL; nb_m = 1; nb_n = 1; nb_k = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 30; rep++) begin
      loop_order_e o;
      int m, n, k, t, got;
      o = loop_order_e'(rep % 6);
      m = $urandom_range(1, 4); n = $urandom_range(1, 4); k = $urandom_range(1, 4);
      if (rep == 29) begin m = 1; n = 1; k = 1; end
      node_list(o, m, n, k, q);
      @(negedge clk);
      order = o; nb_m = 8'(m); nb_n = 8'(n); nb_k = 8'(k); start = 1;
      @(negedge clk);
      start = 0;
      t = 0;
      got = 0;
      while (t < 20 * q.size() + 20) begin
        ready = ($urandom_range(3) != 0);
        #1;
        if (valid && ready) begin
          checks++;
          if (got >= q.size() || i != 8'(q[got].i) || j != 8'(q[got].j) || l != 8'(q[got].l)
              || last != (got == q.size() - 1)) begin
            failures++;
            $display("FAIL order %0d node %0d: got (%0d,%0d,%0d) last %0d", o, got, i, j, l, last);
          end
          got++;
        end
        @(negedge clk);
        if (!valid) break;
        t++;
      end
      ready = 0;
      checks++;
      if (got != q.size()) begin
        failures++;
        $display("FAIL order %0d: %0d nodes, expected %0d", o, got, q.size());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
