// plm_rca: ripple-carry adder built from probabilistically minimised full adders.
//
// A chain of N full adders; the NUM_INEXACT least significant ones use the
// minimised sum/carry functions SUM_MODE/CARRY_MODE (see plm_full_adder), the
// rest are exact.  Errors are therefore confined to the low-order bits, and,
// where a minimised carry is used, to what that carry feeds.  With
// NUM_INEXACT = 0 the adder is exact.  The 16-bit width follows the source;
// the choice of which bits are minimised and with which function is this
// design's (the source chooses per node from measured input statistics).
// Interface: a + b + cin ~= {cout, sum}.  Purely combinational.
module plm_rca
  import adder_pkg::*;
#(
  parameter int unsigned N           = 16,
  parameter int unsigned NUM_INEXACT = 8,
  parameter sum_mode_e   SUM_MODE    = SUM_F2_OR,
  parameter carry_mode_e CARRY_MODE  = CARRY_EXACT
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N:0] c;
  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_fa
    if (i < NUM_INEXACT) begin : g_inexact
      plm_full_adder #(.SUM_MODE(SUM_MODE), .CARRY_MODE(CARRY_MODE)) u_fa (
        .a(a[i]), .b(b[i]), .c(c[i]), .s(sum[i]), .co(c[i+1]));
    end else begin : g_exact
      plm_full_adder u_fa (.a(a[i]), .b(b[i]), .c(c[i]), .s(sum[i]), .co(c[i+1]));
    end
  end

  assign cout = c[N];
endmodule
