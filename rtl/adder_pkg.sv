// adder_pkg: types, constants and the prefix operator shared by every adder in
// this design.
//
// Every parallel-prefix adder here works on "columns": column 0 carries the
// adder's carry-in (G0 = Cin, P0 = 0) and column k >= 1 carries the generate /
// propagate pair of operand bit k-1.  The prefix network turns the column pairs
// into group pairs G[k:j], P[k:j]; the carry into operand bit i is G[i:0].  The
// prefix operator is the "black node" (G and P) of the usual prefix-adder
// notation; a "grey node" is the same operator with its P output unused, and a
// buffer is a plain wire.
//
// The package also holds the select codes of the 30-adder test chip (in the
// order of its select-code table) and the pruning configuration of each of its
// inexact adders.  Those configurations are this design's own choice: the
// source names the pruned adders but does not list what was pruned in each.
package adder_pkg;

  // Generate / propagate pair of one column or one group of columns.
  typedef struct packed {
    logic g;
    logic p;
  } pg_t;

  // Prefix operator: (G,P)[i:j] = (G,P)[i:k] o (G,P)[k-1:j].
  function automatic pg_t pg_combine(pg_t hi, pg_t lo);
    pg_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

  // Prefix network family of a pruned adder.
  typedef enum logic [0:0] {
    ARCH_KS       = 1'b0,   // Kogge-Stone
    ARCH_SKLANSKY = 1'b1    // Sklansky
  } arch_e;

  // Number of prefix levels kept in each of the four column bins, bin 3
  // (most significant) first.  6 levels is a complete 64-column network.
  typedef logic [3:0][3:0] bin_level_t;

  // Probabilistically minimised full-adder functions (K-map bit flips).
  typedef enum logic [2:0] {
    SUM_EXACT  = 3'd0,  // A ^ B ^ C
    SUM_F1_011 = 3'd1,  // one flip, minterm 011 set
    SUM_F1_000 = 3'd2,  // one flip, minterm 000 set
    SUM_F2_OR  = 3'd3,  // two flips: (A ^ B) | C
    SUM_F2_NA  = 3'd4,  // two flips: ~A | ~(B ^ C)
    SUM_F3_OR  = 3'd5,  // three flips: A | B | C
    SUM_F3_NA  = 3'd6   // three flips: ~A | B | ~C
  } sum_mode_e;

  typedef enum logic [1:0] {
    CARRY_EXACT = 2'd0, // AB + BC + AC
    CARRY_F_001 = 2'd1, // minterm 001 set: AB + C
    CARRY_F_011 = 2'd2  // minterm 011 cleared: A(B + C)
  } carry_mode_e;

  // ---------------------------------------------------------------------
  // Probabilistic Pruned Adders test chip
  // ---------------------------------------------------------------------
  localparam int unsigned PPA_WIDTH      = 64;
  localparam int unsigned PPA_NUM_ADDERS = 30;
  localparam int unsigned PPA_SEL_BITS   = 6;

  // Select codes; adder index in the core is code - 1.
  typedef enum logic [5:0] {
    SEL_ALL_OFF  = 6'b000000,
    SEL_RCA      = 6'b000001,
    SEL_CSLA     = 6'b000010,
    SEL_CIA      = 6'b000011,
    SEL_SKLANSKY = 6'b000100,
    SEL_BK       = 6'b000101,
    SEL_KS       = 6'b000110,
    SEL_HC       = 6'b000111,
    SEL_LF       = 6'b001000,
    SEL_SPARSE1  = 6'b001001,
    SEL_SPARSE2  = 6'b001010,
    SEL_SPARSE3  = 6'b001011,
    SEL_PRUNED1  = 6'b001100,
    SEL_PRUNED2  = 6'b001101,
    SEL_PRUNED18 = 6'b001110,
    SEL_PRUNED16 = 6'b001111,
    SEL_PRUNED17 = 6'b010000,
    SEL_PRUNED12 = 6'b010001,
    SEL_PRUNED13 = 6'b010010,
    SEL_PRUNED20 = 6'b010011,
    SEL_PRUNED21 = 6'b010100,
    SEL_PRUNED22 = 6'b010101,
    SEL_PRUNED23 = 6'b010110,
    SEL_PRUNED14 = 6'b010111,
    SEL_PRUNED10 = 6'b011000,
    SEL_PRUNED11 = 6'b011001,
    SEL_PRUNED7  = 6'b011010,
    SEL_PRUNED9  = 6'b011011,
    SEL_PRUNED19 = 6'b011100,
    SEL_MIXED3   = 6'b011101,
    SEL_MIXED4   = 6'b011110
  } ppa_sel_e;

  // Core indices 0..10 are the conventional adders; 11..29 are pruned.
  localparam int unsigned PPA_FIRST_PRUNED = 11;

  // Pruning configuration of pruned adder at core index idx (11..29).
  function automatic arch_e ppa_pruned_arch(int unsigned idx);
    case (idx)
      11, 12, 16, 17, 18, 19, 22, 25, 27, 28: return ARCH_KS;
      default:                                return ARCH_SKLANSKY;
    endcase
  endfunction

  function automatic bin_level_t ppa_pruned_levels(int unsigned idx);
    case (idx)
      11: return {4'd5, 4'd5, 4'd5, 4'd5};  // Pruned 1  : KS uniform, 5 levels
      12: return {4'd4, 4'd4, 4'd4, 4'd4};  // Pruned 2  : KS uniform, 4 levels
      13: return {4'd5, 4'd4, 4'd3, 4'd2};  // Pruned 18 : Sklansky weighted
      14: return {4'd6, 4'd5, 4'd4, 4'd3};  // Pruned 16 : Sklansky weighted
      15: return {4'd6, 4'd4, 4'd3, 4'd2};  // Pruned 17 : Sklansky weighted
      16: return {4'd6, 4'd5, 4'd4, 4'd3};  // Pruned 12 : KS weighted
      17: return {4'd6, 4'd4, 4'd3, 4'd2};  // Pruned 13 : KS weighted
      18: return {4'd6, 4'd6, 4'd4, 4'd2};  // Pruned 20 : KS weighted
      19: return {4'd6, 4'd6, 4'd5, 4'd3};  // Pruned 21 : KS weighted
      20: return {4'd6, 4'd6, 4'd4, 4'd2};  // Pruned 22 : Sklansky weighted
      21: return {4'd6, 4'd6, 4'd5, 4'd3};  // Pruned 23 : Sklansky weighted
      22: return {4'd5, 4'd4, 4'd3, 4'd2};  // Pruned 14 : KS weighted
      23: return {4'd4, 4'd4, 4'd4, 4'd4};  // Pruned 10 : Sklansky uniform
      24: return {4'd3, 4'd3, 4'd3, 4'd3};  // Pruned 11 : Sklansky uniform
      25: return {4'd3, 4'd3, 4'd3, 4'd3};  // Pruned 7  : KS uniform, 3 levels
      26: return {4'd5, 4'd5, 4'd5, 4'd5};  // Pruned 9  : Sklansky uniform
      27: return {4'd2, 4'd2, 4'd2, 4'd2};  // Pruned 19 : KS uniform, 2 levels
      28: return {4'd6, 4'd6, 4'd3, 4'd1};  // Mixed 3   : KS, exact top, cut bottom
      default: return {4'd6, 4'd6, 4'd3, 4'd1};  // Mixed 4 : Sklansky
    endcase
  endfunction

endpackage
