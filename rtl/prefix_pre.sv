// prefix_pre: pre-computation stage shared by the prefix adders.
//
// Forms the per-bit generate (a & b) and propagate (a ^ b) signals and lays
// them out as prefix columns: column 0 holds the carry-in (G = cin, P = 0) and
// column k (1..N-1) holds the pair of operand bit k-1.  Operand bit N-1 needs
// no column of its own; its pair goes straight to the post-computation stage,
// which forms the carry-out.  Purely combinational.
module prefix_pre
  import adder_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output pg_t  [N-1:0] col,     // prefix columns
  output logic [N-1:0] g_bit,   // per-bit generate
  output logic [N-1:0] p_bit    // per-bit propagate
);
  always_comb begin
    g_bit = a & b;
    p_bit = a ^ b;
    col[0] = '{g: cin, p: 1'b0};
    for (int k = 1; k < N; k++) col[k] = '{g: g_bit[k-1], p: p_bit[k-1]};
  end
endmodule
