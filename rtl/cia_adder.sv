// cia_adder: carry-increment adder.
//
// The prefix columns are cut into groups of BLOCK columns.  Inside a group the
// carry ripples from the group's first column, giving local groups k:start;
// the last column of each group then receives the finished carry of the group
// below (start-1:0) and one row of grey nodes "increments" every column of the
// group with it.  Group carries ripple from group to group, as in the 16-bit
// drawing with 4-column groups that this design follows.
// Interface: a + b + cin = {cout, sum}.  Purely combinational.
module cia_adder
  import adder_pkg::*;
#(
  parameter int unsigned N     = 64,
  parameter int unsigned BLOCK = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  localparam int unsigned NL = BLOCK - 1 + N / BLOCK - 1;

  pg_t  [N-1:0] col;
  logic [N-1:0] g_bit, p_bit, carry;

  prefix_pre #(.N(N)) u_pre (.a, .b, .cin, .col, .g_bit, .p_bit);

  // Levels 1..BLOCK-1: ripple inside each group of BLOCK columns.  Level
  // BLOCK-1+g (g >= 1): every column of group g combines with the last
  // column of group g-1, which finished one level earlier, so the group
  // carries ripple from group to group.
  function automatic int partner(int l, int k);
    if (l < BLOCK) return ((k % BLOCK) == l) ? k - 1 : -1;
    return ((k / BLOCK) == l - BLOCK + 1) ? (k / BLOCK) * BLOCK - 1 : -1;
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
