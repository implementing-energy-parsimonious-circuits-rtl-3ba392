// sklansky_adder: Sklansky (divide-and-conquer) parallel-prefix adder.
//
// At level l every column whose index has bit l-1 set combines with the last
// column of the block below it, ((k >> (l-1)) << (l-1)) - 1, which by then
// already holds its carry from column 0.  log2(N) levels, few nodes, but high
// fan-out at the block boundaries.
// Interface: a + b + cin = {cout, sum}.  Purely combinational.
module sklansky_adder
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
  localparam int unsigned NL = LV;

  pg_t  [N-1:0] col;
  logic [N-1:0] g_bit, p_bit, carry;

  prefix_pre #(.N(N)) u_pre (.a, .b, .cin, .col, .g_bit, .p_bit);

  // Level l: a column with bit l-1 set combines with the last column of the
  // block below it.
  function automatic int partner(int l, int k);
    return (((k >> (l - 1)) & 1) == 1) ? ((k >> (l - 1)) << (l - 1)) - 1 : -1;
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
