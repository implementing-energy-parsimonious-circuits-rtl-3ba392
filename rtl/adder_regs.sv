// adder_regs: operand and result registers of every adder on the test chip.
//
// Each adder of the core has its own operand registers (A, B, carry-in) and
// result registers (sum, carry-out), all in the always-on peripheral domain.
// Only the registers of the selected adder load: the operand registers on the
// edge where en[k] is high, the result registers one edge later (en delayed by
// one clock), when the adder has had a full cycle to settle.  The operands of
// every unselected adder are held, so its logic does not switch and the
// supply current of the adder domain is that of the selected adder alone.
// The register block is only named in the source; this per-adder
// arrangement is this design's choice.
//
// Timing: operands presented with en[k] high at edge t produce the result of
// adder k in q_sum[k]/q_cout[k] after edge t+1.  rst (synchronous, active
// high) clears everything.
module adder_regs #(
  parameter int unsigned N          = 64,
  parameter int unsigned NUM_ADDERS = 30
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic [NUM_ADDERS-1:0]          en,
  input  logic [N-1:0]                   a_in,
  input  logic [N-1:0]                   b_in,
  input  logic                           cin_in,
  output logic [NUM_ADDERS-1:0][N-1:0]   op_a,
  output logic [NUM_ADDERS-1:0][N-1:0]   op_b,
  output logic [NUM_ADDERS-1:0]          op_cin,
  input  logic [NUM_ADDERS-1:0][N-1:0]   res_sum,
  input  logic [NUM_ADDERS-1:0]          res_cout,
  output logic [NUM_ADDERS-1:0][N-1:0]   q_sum,
  output logic [NUM_ADDERS-1:0]          q_cout
);
  logic [NUM_ADDERS-1:0] en_d;

  always_ff @(posedge clk) begin
    if (rst) en_d <= '0;
    else     en_d <= en;
  end

  for (genvar k = 0; k < NUM_ADDERS; k++) begin : g_slot
    always_ff @(posedge clk) begin
      if (rst) begin
        op_a[k]   <= '0;
        op_b[k]   <= '0;
        op_cin[k] <= 1'b0;
      end else if (en[k]) begin
        op_a[k]   <= a_in;
        op_b[k]   <= b_in;
        op_cin[k] <= cin_in;
      end
    end
    always_ff @(posedge clk) begin
      if (rst) begin
        q_sum[k]  <= '0;
        q_cout[k] <= 1'b0;
      end else if (en_d[k]) begin
        q_sum[k]  <= res_sum[k];
        q_cout[k] <= res_cout[k];
      end
    end
  end
endmodule
