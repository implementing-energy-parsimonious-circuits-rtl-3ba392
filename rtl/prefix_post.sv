// prefix_post: post-computation stage shared by the prefix adders.
//
// carry[i] is the group generate G[i:0] of prefix column i, which is the carry
// into operand bit i (for a pruned adder it is an approximation of it).  The
// sum is the bit propagate XOR that carry; the carry-out is formed from the
// top bit's generate and propagate and the carry into the top bit.
// Purely combinational.
module prefix_post #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0] g_bit,
  input  logic [N-1:0] p_bit,
  input  logic [N-1:0] carry,
  output logic [N-1:0] sum,
  output logic         cout
);
  assign sum  = p_bit ^ carry;
  assign cout = g_bit[N-1] | (p_bit[N-1] & carry[N-1]);
endmodule
