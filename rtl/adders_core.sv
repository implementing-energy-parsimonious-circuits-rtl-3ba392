// adders_core: the 30 combinational 64-bit adders of the pruned-adder test chip.
//
// This is the block that sits alone in the separately supplied power domain,
// so that the supply current of one adder at a time can be measured.  Index k
// holds the adder with select code k+1:
//   0 ripple-carry, 1 carry-select, 2 carry-increment, 3 Sklansky,
//   4 Brent-Kung, 5 Kogge-Stone, 6 Han-Carlson, 7 Ladner-Fischer,
//   8..10 sparse tree 1..3, 11..29 pruned adders (Pruned 1, 2, 18, 16, 17,
//   12, 13, 20, 21, 22, 23, 14, 10, 11, 7, 9, 19, Mixed 3, Mixed 4).
// The eleven conventional adders are exact.  The list of adders and their
// codes follows the source; the source does not say what was pruned in each
// inexact adder, so their configurations (Kogge-Stone or Sklansky network,
// levels kept per column bin) are this design's choice, set in adder_pkg.
// Sparse trees 1..3 use sparsity 2, 4 and 8 (also this design's choice).
// Purely combinational; operands and results are registered outside.
module adders_core
  import adder_pkg::*;
#(
  parameter int unsigned N          = PPA_WIDTH,
  parameter int unsigned NUM_ADDERS = PPA_NUM_ADDERS
) (
  input  logic [NUM_ADDERS-1:0][N-1:0] a,
  input  logic [NUM_ADDERS-1:0][N-1:0] b,
  input  logic [NUM_ADDERS-1:0]        cin,
  output logic [NUM_ADDERS-1:0][N-1:0] sum,
  output logic [NUM_ADDERS-1:0]        cout
);
  rca_adder            #(.N(N))              u_rca     (.a(a[0]),  .b(b[0]),  .cin(cin[0]),  .sum(sum[0]),  .cout(cout[0]));
  csla_adder           #(.N(N))              u_csla    (.a(a[1]),  .b(b[1]),  .cin(cin[1]),  .sum(sum[1]),  .cout(cout[1]));
  cia_adder            #(.N(N))              u_cia     (.a(a[2]),  .b(b[2]),  .cin(cin[2]),  .sum(sum[2]),  .cout(cout[2]));
  sklansky_adder       #(.N(N))              u_skl     (.a(a[3]),  .b(b[3]),  .cin(cin[3]),  .sum(sum[3]),  .cout(cout[3]));
  brent_kung_adder     #(.N(N))              u_bk      (.a(a[4]),  .b(b[4]),  .cin(cin[4]),  .sum(sum[4]),  .cout(cout[4]));
  kogge_stone_adder    #(.N(N))              u_ks      (.a(a[5]),  .b(b[5]),  .cin(cin[5]),  .sum(sum[5]),  .cout(cout[5]));
  han_carlson_adder    #(.N(N))              u_hc      (.a(a[6]),  .b(b[6]),  .cin(cin[6]),  .sum(sum[6]),  .cout(cout[6]));
  ladner_fischer_adder #(.N(N))              u_lf      (.a(a[7]),  .b(b[7]),  .cin(cin[7]),  .sum(sum[7]),  .cout(cout[7]));
  sparse_tree_adder    #(.N(N), .SPARSITY(2)) u_sparse1 (.a(a[8]),  .b(b[8]),  .cin(cin[8]),  .sum(sum[8]),  .cout(cout[8]));
  sparse_tree_adder    #(.N(N), .SPARSITY(4)) u_sparse2 (.a(a[9]),  .b(b[9]),  .cin(cin[9]),  .sum(sum[9]),  .cout(cout[9]));
  sparse_tree_adder    #(.N(N), .SPARSITY(8)) u_sparse3 (.a(a[10]), .b(b[10]), .cin(cin[10]), .sum(sum[10]), .cout(cout[10]));

  for (genvar k = PPA_FIRST_PRUNED; k < NUM_ADDERS; k++) begin : g_pruned
    pruned_prefix_adder #(
      .N        (N),
      .ARCH     (ppa_pruned_arch(k)),
      .BIN_LEVEL(ppa_pruned_levels(k))
    ) u_pruned (.a(a[k]), .b(b[k]), .cin(cin[k]), .sum(sum[k]), .cout(cout[k]));
  end
endmodule
