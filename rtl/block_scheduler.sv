// block_scheduler: produces the sequence of macro nodes (i, j, l) of a blocked
// matrix multiply in one of six loop orders.
//
// Macro node (i, j, l) is the block computation C(i,j) += A(i,l) * B(l,j),
// with i over the nb_m block rows of C, j over the nb_n block columns of C
// and l over the nb_k blocks of the shared dimension. The order input names
// the nesting, outermost loop first (memflow_pkg::loop_order_e), e.g. ORD_IJL
// walks l fastest, then j, then i.
//
// Interface: a start pulse (order and sizes valid, sizes at least 1) loads
// the first node; the current node is offered with valid and taken with
// ready (valid/ready handshake; the node is held while not taken). last marks
// the final node; after it is taken the scheduler is idle again. One node per
// cycle can be taken.
//
// The six orderings and the loop nest are the source design's block
// scheduling; the handshake and counter widths are this design's choices.
module block_scheduler
  import memflow_pkg::*;
#(
  parameter int unsigned NBW = 8   // bits of a block index
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  loop_order_e    order,
  input  logic [NBW-1:0] nb_m,
  input  logic [NBW-1:0] nb_n,
  input  logic [NBW-1:0] nb_k,
  output logic           valid,
  input  logic           ready,
  output logic [NBW-1:0] i,
  output logic [NBW-1:0] j,
  output logic [NBW-1:0] l,
  output logic           last
);

  loop_order_e    ord_q;
  logic [NBW-1:0] lim [3];   // block counts of dimension 0=i, 1=j, 2=l
  logic [NBW-1:0] cnt [3];   // current index of dimension 0=i, 1=j, 2=l
  logic [1:0]     dim [3];   // dimension of loop level 0 (outer) .. 2 (inner)

  always_comb begin
    for (int v = 0; v < 3; v++) dim[v] = level_dim(ord_q, v);
  end

  logic at_end [3];
  always_comb begin
    for (int d = 0; d < 3; d++) at_end[d] = (cnt[d] == lim[d] - 1'b1);
  end

  assign i    = cnt[0];
  assign j    = cnt[1];
  assign l    = cnt[2];
  assign last = at_end[0] && at_end[1] && at_end[2];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid <= 1'b0;
      ord_q <= ORD_IJL;
      for (int d = 0; d < 3; d++) begin
        lim[d] <= NBW'(1);
        cnt[d] <= '0;
      end
    end else if (!valid) begin
      if (start) begin
        valid  <= 1'b1;
        ord_q  <= order;
        lim[0] <= nb_m;
        lim[1] <= nb_n;
        lim[2] <= nb_k;
        for (int d = 0; d < 3; d++) cnt[d] <= '0;
      end
    end else if (ready) begin
      if (last) begin
        valid <= 1'b0;
      end else if (!at_end[dim[2]]) begin
        cnt[dim[2]] <= cnt[dim[2]] + 1'b1;
      end else if (!at_end[dim[1]]) begin
        cnt[dim[2]] <= '0;
        cnt[dim[1]] <= cnt[dim[1]] + 1'b1;
      end else begin
        cnt[dim[2]] <= '0;
        cnt[dim[1]] <= '0;
        cnt[dim[0]] <= cnt[dim[0]] + 1'b1;
      end
    end
  end

  a_sizes: assert property (@(posedge clk)
    rst_n && start && !valid |-> nb_m != 0 && nb_n != 0 && nb_k != 0);
  a_hold: assert property (@(posedge clk)
    rst_n && valid && !ready |=> !rst_n || (valid && $stable(i) && $stable(j) && $stable(l)));

endmodule
