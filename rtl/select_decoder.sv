// select_decoder: the "demultiplexer" of the pruned-adder test chip.
//
// Turns the six select pins S5..S0 into a one-hot enable over the adders of
// the core: code c (1..NUM_ADDERS) enables adder c-1, following the chip's
// select-code table (000001 ripple-carry ... 011110 Mixed 4).  Code 000000
// and every code above NUM_ADDERS select nothing ("all off"), so that no adder
// switches.  Purely combinational.
module select_decoder #(
  parameter int unsigned NUM_ADDERS = 30
) (
  input  logic [5:0]            sel,
  output logic [NUM_ADDERS-1:0] en,
  output logic                  any
);
  always_comb begin
    en = '0;
    if (sel != 6'd0 && 32'(sel) <= NUM_ADDERS) en[32'(sel) - 1] = 1'b1;
  end
  assign any = |en;

  // At most one adder is ever enabled.
  always_comb a_onehot: assert ($onehot0(en)) else $error("select_decoder: enable not one-hot");
endmodule
