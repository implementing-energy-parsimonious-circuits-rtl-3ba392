// sparse_tree_adder: sparse-tree adder.
//
// The prefix columns are cut into groups of SPARSITY columns.  Each group's
// (G,P) pair is formed by a short ripple inside the group, and a Kogge-Stone
// tree over the groups delivers only every SPARSITY-th carry (the carry out of
// each group).  Inside a group the sums are produced carry-select style: the
// local conditional carries for an incoming carry of 0 (local G) and of 1
// (local G | local P) give two candidate sums and the group carry picks one.
// SPARSITY must be a power of two dividing N.
// Interface: a + b + cin = {cout, sum}.  Purely combinational.
module sparse_tree_adder
  import adder_pkg::*;
#(
  parameter int unsigned N        = 64,
  parameter int unsigned SPARSITY = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  localparam int unsigned NG  = N / SPARSITY;
  localparam int unsigned LVG = (NG > 1) ? $clog2(NG) : 1;

  pg_t  [N-1:0] col;
  pg_t          loc [N];
  logic [NG:0]  gcarry;       // gcarry[m] = carry into group m = G[m*S-1:0]
  logic [N-1:0] g_bit, p_bit, carry;

  prefix_pre #(.N(N)) u_pre (.a, .b, .cin, .col, .g_bit, .p_bit);

  // local ripple inside each group, then carry-select with the group carry
  for (genvar k = 0; k < N; k++) begin : g_col
    if ((k % SPARSITY) == 0) begin : g_first
      assign loc[k] = col[k];
    end else begin : g_ripple
      assign loc[k] = pg_combine(col[k], loc[k-1]);
    end
    assign carry[k] = gcarry[k / SPARSITY] ? (loc[k].g | loc[k].p) : loc[k].g;
  end

  // sparse Kogge-Stone tree over the group pairs, one generate block per level
  for (genvar l = 0; l <= LVG; l++) begin : g_lvl
    pg_t node [NG];
    for (genvar m = 0; m < NG; m++) begin : g_grp
      if (l == 0) begin : g_in
        assign node[m] = loc[m * SPARSITY + SPARSITY - 1];
      end else if (m >= (1 << (l - 1))) begin : g_node
        assign node[m] = pg_combine(g_lvl[l-1].node[m], g_lvl[l-1].node[m - (1 << (l - 1))]);
      end else begin : g_wire
        assign node[m] = g_lvl[l-1].node[m];
      end
    end
  end

  assign gcarry[0] = 1'b0;
  for (genvar m = 0; m < NG; m++) begin : g_gcarry
    assign gcarry[m+1] = g_lvl[LVG].node[m].g;
  end

  prefix_post #(.N(N)) u_post (.g_bit, .p_bit, .carry, .sum, .cout);
endmodule
