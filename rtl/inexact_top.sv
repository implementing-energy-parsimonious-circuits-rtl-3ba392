// inexact_top: top level of the inexact-datapath design.
//
// Two independent designs stand side by side, each with its own pins:
//  * ppa_chip - the Probabilistic Pruned Adders test chip: 30 selectable
//    64-bit adders (11 conventional, 19 probabilistically pruned) fed by two
//    on-chip pseudo-random generators, with registered sum/carry outputs.
//  * plm_rca and plm_array_multiplier - a 16-bit ripple-carry adder and a
//    16 x 16 array multiplier whose full adders are probabilistically
//    logic-minimised.  They are combinational; their pins are the operands
//    and results.
// The two share nothing but the source of their ideas.
module inexact_top
  import adder_pkg::*;
(
  // pruned-adder test chip
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 cin,
  input  logic [PPA_SEL_BITS-1:0] sel,
  output logic [PPA_WIDTH-1:0] sum,
  output logic                 cout,
  // logic-minimised 16-bit adder
  input  logic [15:0]          rca_a,
  input  logic [15:0]          rca_b,
  input  logic                 rca_cin,
  output logic [15:0]          rca_sum,
  output logic                 rca_cout,
  // logic-minimised 16 x 16 multiplier
  input  logic [15:0]          mul_x,
  input  logic [15:0]          mul_y,
  output logic [31:0]          mul_z
);
  ppa_chip u_ppa (.clk, .rst, .cin, .sel, .sum, .cout);

  plm_rca u_rca (.a(rca_a), .b(rca_b), .cin(rca_cin), .sum(rca_sum), .cout(rca_cout));

  plm_array_multiplier u_mul (.x(mul_x), .y(mul_y), .z(mul_z));
endmodule
