// brent_kung_adder: Brent-Kung parallel-prefix adder.
//
// An up-sweep of log2(N) levels builds the groups k:(k-2^l+1) at every column
// k with (k+1) a multiple of 2^l, ending with G[N-1:0]; a down-sweep of
// log2(N)-1 levels then fills in the remaining columns from the largest
// stride to the smallest (11:0 from 11:8 and 7:0, then 5:0, 9:0, 13:0, then
// every even column).  About 2N nodes and fan-out of two, at twice the depth
// of Kogge-Stone.  Interface: a + b + cin = {cout, sum}.  Combinational.
module brent_kung_adder
  import adder_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  localparam int unsigned LV = $clog2(N);
  localparam int unsigned NL = 2 * LV - 1;

  pg_t  [N-1:0] col;
  logic [N-1:0] g_bit, p_bit, carry;

  prefix_pre #(.N(N)) u_pre (.a, .b, .cin, .col, .g_bit, .p_bit);

  // Levels 1..LV: up-sweep, column k with (k+1) a multiple of 2^l combines
  // with k - 2^(l-1).  Levels LV+d (d = 1..LV-1): down-sweep with stride
  // s = 2^(LV-1-d), column k with (k+1) mod 2s == s and k >= 2s combines
  // with k - s.
  function automatic int partner(int l, int k);
    int s;
    if (l <= LV) return (((k + 1) % (1 << l)) == 0) ? k - (1 << (l - 1)) : -1;
    s = 1 << (2 * LV - 1 - l);
    return (((k + 1) % (2 * s)) == s && k >= 2 * s) ? k - s : -1;
  endfunction

  // One generate block per prefix level; node(l, k) is a prefix node when
  // partner(l, k) >= 0 and a wire otherwise.
  for (genvar l = 0; l <= NL; l++) begin : g_lvl
    pg_t node [N];
    for (genvar k = 0; k < N; k++) begin : g_col
      localparam int J = (l == 0) ? -1 : partner(l, k);
      if (l == 0) begin : g_in
        assign node[k] = col[k];
      end else if (J >= 0) begin : g_node
        assign node[k] = pg_combine(g_lvl[l-1].node[k], g_lvl[l-1].node[J]);
      end else begin : g_wire
        assign node[k] = g_lvl[l-1].node[k];
      end
    end
  end

  for (genvar k = 0; k < N; k++) begin : g_carry
    assign carry[k] = g_lvl[NL].node[k].g;
  end

  prefix_post #(.N(N)) u_post (.g_bit, .p_bit, .carry, .sum, .cout);
endmodule
