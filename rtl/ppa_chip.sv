// ppa_chip: the Probabilistic Pruned Adders (PPA) test chip.
//
// The chip measures, one adder at a time, the power, delay and error of 30
// 64-bit adders: 11 conventional ones and 19 probabilistically pruned ones.
// Two 64-bit pseudo-random generators produce a fresh operand pair every
// clock.  The six select pins choose one adder (select_decoder); only that
// adder's operand registers load, so only it switches.  Its registered sum and
// carry-out drive the Sum 0..63 and C_out pins through a multiplexer.  The C_in
// pin is the carry-in of every operation.  With select code 000000 (or any
// unused code) nothing loads and the outputs read zero.
//
// Pipeline (sel held constant): generator words at edge t are loaded into the
// operand registers at edge t+1 and the adder's result into its result
// registers at edge t+2, where it appears on sum/cout.  rst is synchronous and
// active high; it reseeds the generators and clears all registers.
// The select codes, widths and block list follow the source; reset polarity,
// pipeline, output multiplexer and generator type are this design's choices.
module ppa_chip
  import adder_pkg::*;
#(
  parameter int unsigned  N          = PPA_WIDTH,
  parameter int unsigned  NUM_ADDERS = PPA_NUM_ADDERS,
  parameter logic [N-1:0] SEED_A     = N'(64'hACE1_2468_1357_BDF9),
  parameter logic [N-1:0] SEED_B     = N'(64'h1F2E_3D4C_5B6A_7988)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         cin,
  input  logic [PPA_SEL_BITS-1:0] sel,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [NUM_ADDERS-1:0]        en;
  logic                         any_sel;
  logic [N-1:0]                 rnd_a, rnd_b;
  logic [NUM_ADDERS-1:0][N-1:0] op_a, op_b, res_sum, q_sum;
  logic [NUM_ADDERS-1:0]        op_cin, res_cout, q_cout;

  // ---- always-on peripheral domain -------------------------------------
  select_decoder #(.NUM_ADDERS(NUM_ADDERS)) u_dec (.sel, .en, .any(any_sel));

  prng64 #(.WIDTH(N), .SEED(SEED_A)) u_prng_a (.clk, .rst, .en(1'b1), .q(rnd_a));
  prng64 #(.WIDTH(N), .SEED(SEED_B)) u_prng_b (.clk, .rst, .en(1'b1), .q(rnd_b));

  adder_regs #(.N(N), .NUM_ADDERS(NUM_ADDERS)) u_regs (
    .clk, .rst, .en,
    .a_in(rnd_a), .b_in(rnd_b), .cin_in(cin),
    .op_a, .op_b, .op_cin,
    .res_sum, .res_cout,
    .q_sum, .q_cout
  );

  // ---- adder domain ------------------------------------------------------
  adders_core #(.N(N), .NUM_ADDERS(NUM_ADDERS)) u_core (
    .a(op_a), .b(op_b), .cin(op_cin), .sum(res_sum), .cout(res_cout)
  );

  // ---- output multiplexer (one-hot AND-OR) ------------------------------
  always_comb begin
    sum  = '0;
    cout = 1'b0;
    for (int k = 0; k < NUM_ADDERS; k++) begin
      sum  = sum  | (q_sum[k] & {N{en[k]}});
      cout = cout | (q_cout[k] & en[k]);
    end
    if (!any_sel) begin
      sum  = '0;
      cout = 1'b0;
    end
  end
endmodule
