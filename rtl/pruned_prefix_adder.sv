// pruned_prefix_adder: probabilistically pruned Kogge-Stone or Sklansky adder.
//
// Probabilistic pruning deletes, at design time, the prefix nodes that lie on
// carry paths which are rarely active: a carry generated j columns below a
// sum bit reaches it only if all columns in between propagate, which for
// random operands happens with probability 2^-(j+1).  The nodes of the higher
// prefix levels carry exactly these long paths, so they are removed first.
//
// The prefix columns are split into four equal bins and bin b keeps only its
// first BIN_LEVEL[b] levels; a deleted node becomes a wire that passes the
// column's value on unchanged.  Equal levels in all bins is uniform pruning;
// fewer levels in the low-order bins is weighted pruning, which spends the
// error on the bits that matter least.  Which nodes to delete (the result of
// ranking nodes by significance x activity) is thus given by BIN_LEVEL.
//
// ARCH_KS: at level l a kept column k >= 2^(l-1) combines with column
// k - 2^(l-1), taking that column's value as it stands after level l-1 (its
// last kept value if its own bin stopped earlier).
// ARCH_SKLANSKY: below its last kept level a column follows the normal
// Sklansky rule; at its last kept level every column whose group does not yet
// reach column 0 combines with the column just below its group.
// Both rules reproduce the column groups of the published 16-bit uniform and
// weighted drawings, except that the weighted Sklansky drawing labels the top
// bin 15:0..12:0 where this rule gives 15:4..12:4.
//
// With BIN_LEVEL = log2(N) in every bin the adder is exact.  N must be a
// multiple of 4.  Interface: a + b + cin ~= {cout, sum}.  Combinational.
module pruned_prefix_adder
  import adder_pkg::*;
#(
  parameter int unsigned N         = 64,
  parameter arch_e       ARCH      = ARCH_KS,
  parameter bin_level_t  BIN_LEVEL = {4'd6, 4'd6, 4'd6, 4'd6}
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  localparam int unsigned LV  = $clog2(N);
  localparam int unsigned BIN = N / 4;

  pg_t  [N-1:0] col;
  logic [N-1:0] g_bit, p_bit, carry;

  prefix_pre #(.N(N)) u_pre (.a, .b, .cin, .col, .g_bit, .p_bit);

  // Levels kept by column k.
  function automatic int max_level(int k);
    return int'(BIN_LEVEL[k / BIN]);
  endfunction

  // Partner column of node (l, k), or -1 where the node is a wire.  For the
  // Sklansky rule the lowest column reached by every column is tracked level
  // by level; this runs at elaboration only.
  function automatic int partner(int l, int k);
    int low_prev [N];
    int low_cur  [N];
    int j;
    if (ARCH == ARCH_KS) begin
      if (l <= max_level(k) && k >= (1 << (l - 1))) return k - (1 << (l - 1));
      return -1;
    end
    for (int c = 0; c < N; c++) low_cur[c] = c;
    for (int ll = 1; ll <= l; ll++) begin
      for (int c = 0; c < N; c++) low_prev[c] = low_cur[c];
      for (int c = 0; c < N; c++) begin
        j = -1;
        if (ll < max_level(c) && ((c >> (ll - 1)) & 1) == 1)
          j = ((c >> (ll - 1)) << (ll - 1)) - 1;
        else if (ll == max_level(c) && low_prev[c] > 0)
          j = low_prev[c] - 1;
        low_cur[c] = (j >= 0) ? low_prev[j] : low_prev[c];
        if (ll == l && c == k) return j;
      end
    end
    return -1;
  endfunction

  // One generate block per prefix level; node(l, k) is a prefix node when
  // partner(l, k) >= 0 and a wire (a pruned node) otherwise.
  for (genvar l = 0; l <= LV; l++) begin : g_lvl
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
    assign carry[k] = g_lvl[LV].node[k].g;
  end

  prefix_post #(.N(N)) u_post (.g_bit, .p_bit, .carry, .sum, .cout);
endmodule
