// plm_array_multiplier: N x N unsigned array multiplier with probabilistically
// minimised full adders.
//
// Partial products x[j] & y[i] are formed by AND gates.  Row 0 is the bare
// partial products of y[0]; row 1 adds the partial products of y[1] to them
// with half adders (MHA: AND + half adder); rows 2..N-1 are carry-save rows of
// MFA cells (AND + full adder), each taking the sum from the cell up and to
// the left and the carry from the cell straight above.  Each row's rightmost
// sum is one product bit; a final ripple row (one half adder, then full
// adders) adds the last sum and carry vectors to give the upper product bits.
// Every full adder whose sum has weight below 2^INEXACT_COLS uses the
// minimised functions SUM_MODE/CARRY_MODE; half adders and the other full
// adders are exact.  INEXACT_COLS = 0 gives an exact multiplier.
// The array structure and the 16-bit width follow the source; which cells are
// minimised, and how, is this design's choice.
// Interface: z ~= x * y.  Purely combinational.
module plm_array_multiplier
  import adder_pkg::*;
#(
  parameter int unsigned N            = 16,
  parameter int unsigned INEXACT_COLS = 12,
  parameter sum_mode_e   SUM_MODE     = SUM_F2_OR,
  parameter carry_mode_e CARRY_MODE   = CARRY_EXACT
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] z
);
  logic [N-1:0] pp [N];          // pp[i][j] = x[j] & y[i]
  logic [N-1:0] s  [N];          // s[i][j]: sum out of cell (i, j); s[i][N-1] = pp[i][N-1]
  logic [N-2:0] co [N];          // co[i][j]: carry out of cell (i, j), rows 1..N-1
  logic [N-2:0] rc;              // ripple carries of the final row

  for (genvar i = 0; i < N; i++) begin : g_pp
    assign pp[i] = x & {N{y[i]}};
  end

  // row 0: bare partial products
  assign s[0]  = pp[0];
  assign co[0] = '0;

  for (genvar i = 1; i < N; i++) begin : g_row
    assign s[i][N-1] = pp[i][N-1];   // leftmost AND passes straight down
    for (genvar j = 0; j < N - 1; j++) begin : g_cell
      if (i == 1) begin : g_mha
        assign s[i][j]  = pp[i][j] ^ s[i-1][j+1];
        assign co[i][j] = pp[i][j] & s[i-1][j+1];
      end else if (i + j < INEXACT_COLS) begin : g_mfa_inexact
        plm_full_adder #(.SUM_MODE(SUM_MODE), .CARRY_MODE(CARRY_MODE)) u_fa (
          .a(pp[i][j]), .b(s[i-1][j+1]), .c(co[i-1][j]), .s(s[i][j]), .co(co[i][j]));
      end else begin : g_mfa
        plm_full_adder u_fa (
          .a(pp[i][j]), .b(s[i-1][j+1]), .c(co[i-1][j]), .s(s[i][j]), .co(co[i][j]));
      end
    end
  end

  // low product bits: rightmost sum of every row
  for (genvar i = 0; i < N; i++) begin : g_zlo
    assign z[i] = s[i][0];
  end

  // final carry-propagate row
  assign z[N]  = s[N-1][1] ^ co[N-1][0];
  assign rc[0] = s[N-1][1] & co[N-1][0];
  for (genvar j = 1; j < N - 1; j++) begin : g_cpa
    if (N + j < INEXACT_COLS) begin : g_fa_inexact
      plm_full_adder #(.SUM_MODE(SUM_MODE), .CARRY_MODE(CARRY_MODE)) u_fa (
        .a(s[N-1][j+1]), .b(co[N-1][j]), .c(rc[j-1]), .s(z[N+j]), .co(rc[j]));
    end else begin : g_fa
      plm_full_adder u_fa (
        .a(s[N-1][j+1]), .b(co[N-1][j]), .c(rc[j-1]), .s(z[N+j]), .co(rc[j]));
    end
  end
  assign z[2*N-1] = rc[N-2];
endmodule
