// csla_adder: carry-select adder.
//
// The operands are cut into blocks of BLOCK bits.  Every block is added twice
// by ripple carry, once assuming a carry-in of 0 and once of 1; the real carry
// into the block, which ripples from block to block through one multiplexer
// per block, picks the sum and the carry-out.  N must be a multiple of BLOCK.
// Interface: a + b + cin = {cout, sum}.  Purely combinational.
module csla_adder #(
  parameter int unsigned N     = 64,
  parameter int unsigned BLOCK = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  localparam int unsigned NB = N / BLOCK;

  logic [NB:0] cblk;   // real carry into each block

  assign cblk[0] = cin;

  for (genvar m = 0; m < NB; m++) begin : g_blk
    logic [BLOCK-1:0] s0, s1;   // block sums for carry-in 0 and 1
    logic [BLOCK:0]   r0, r1;   // ripple carries for carry-in 0 and 1
    assign r0[0] = 1'b0;
    assign r1[0] = 1'b1;
    for (genvar i = 0; i < BLOCK; i++) begin : g_bit
      localparam int unsigned B = m * BLOCK + i;
      assign s0[i]   = a[B] ^ b[B] ^ r0[i];
      assign s1[i]   = a[B] ^ b[B] ^ r1[i];
      assign r0[i+1] = (a[B] & b[B]) | (r0[i] & (a[B] ^ b[B]));
      assign r1[i+1] = (a[B] & b[B]) | (r1[i] & (a[B] ^ b[B]));
    end
    assign sum[m*BLOCK +: BLOCK] = cblk[m] ? s1 : s0;
    assign cblk[m+1]             = cblk[m] ? r1[BLOCK] : r0[BLOCK];
  end

  assign cout = cblk[NB];
endmodule
