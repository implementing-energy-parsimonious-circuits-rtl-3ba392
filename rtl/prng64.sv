// prng64: 64-bit pseudo-random operand generator of the pruned-adder test chip.
//
// A Galois linear-feedback shift register with the maximal-length polynomial
// x^64 + x^63 + x^61 + x^60 + 1.  So that every operand word is new, the
// register is advanced WIDTH single steps per clock: the steps are unrolled
// into one XOR network, and q is the register itself.  The chip uses two of
// these, with different seeds, for the two operands.  The source only names
// the block ("64-bit pseudo-random number generator"); the LFSR type,
// polynomial, stepping and seeds are this design's choices.
//
// Timing: rst (synchronous, active high) loads SEED; afterwards q advances on
// every rising clk edge where en is high.  SEED must not be zero.
module prng64 #(
  parameter int unsigned      WIDTH = 64,
  parameter logic [63:0]      TAPS  = 64'hD800_0000_0000_0000,
  parameter logic [WIDTH-1:0] SEED  = WIDTH'(64'hACE1_2468_1357_BDF9)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  output logic [WIDTH-1:0] q
);
  // One Galois step: shift right, fold the tap mask in when a 1 drops out.
  function automatic logic [WIDTH-1:0] step(logic [WIDTH-1:0] s);
    return (s >> 1) ^ (s[0] ? WIDTH'(TAPS) : '0);
  endfunction

  function automatic logic [WIDTH-1:0] step_word(logic [WIDTH-1:0] s);
    logic [WIDTH-1:0] r;
    r = s;
    for (int i = 0; i < WIDTH; i++) r = step(r);
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (rst)     q <= SEED;
    else if (en) q <= step_word(q);
  end

  // The all-zero state is a dead end for an LFSR.
  a_nonzero: assert property (@(posedge clk) disable iff (rst) q != '0);
endmodule
