// plm_full_adder: full adder with probabilistically minimised sum and carry.
//
// Probabilistic logic minimisation flips a few minterms of a node's truth
// table ("bit flips") so that the Karnaugh map collapses into fewer, larger
// cubes; the flips are placed on the input combinations that occur least
// often, so the error stays rare.  The sum of a full adder is an XOR, which
// no cube can cover; one to three flips turn it into cheap AND/OR logic:
//   SUM_EXACT   a ^ b ^ c
//   SUM_F1_011  minterm 011 set:                (a ^ b ^ c) | ~a&b&c
//   SUM_F1_000  minterm 000 set:                (a ^ b ^ c) | ~a&~b&~c
//   SUM_F2_OR   minterms 011, 101 set:          (a ^ b) | c
//   SUM_F2_NA   minterms 000, 011 set:          ~a | ~(b ^ c)
//   SUM_F3_OR   minterms 011, 101, 110 set:     a | b | c
//   SUM_F3_NA   minterms 000, 011, 110 set:     ~a | b | ~c
// and the majority carry can lose or gain one minterm:
//   CARRY_EXACT a&b | b&c | a&c
//   CARRY_F_001 minterm 001 set:                a&b | c
//   CARRY_F_011 minterm 011 cleared:            a & (b | c)
// Minterms are written a b c.  The set of functions is the one of the source's K-map
// examples; which node gets which function is chosen per instance.
// Purely combinational.
module plm_full_adder
  import adder_pkg::*;
#(
  parameter sum_mode_e   SUM_MODE   = SUM_EXACT,
  parameter carry_mode_e CARRY_MODE = CARRY_EXACT
) (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic co
);
  logic s_exact;
  assign s_exact = a ^ b ^ c;

  always_comb begin
    case (SUM_MODE)
      SUM_F1_011: s = s_exact | (~a & b & c);
      SUM_F1_000: s = s_exact | (~a & ~b & ~c);
      SUM_F2_OR:  s = (a ^ b) | c;
      SUM_F2_NA:  s = ~a | ~(b ^ c);
      SUM_F3_OR:  s = a | b | c;
      SUM_F3_NA:  s = ~a | b | ~c;
      default:    s = s_exact;
    endcase
    case (CARRY_MODE)
      CARRY_F_001: co = (a & b) | c;
      CARRY_F_011: co = a & (b | c);
      default:     co = (a & b) | (b & c) | (a & c);
    endcase
  end
endmodule
