// adder_model_pkg: reference models shared by the testbenches.
//
// * lfsr_word: the operand generator, one Galois step at a time.
// * window_lo / window_add: a pruned prefix adder seen from its outputs:
//   the carry into bit k is the exact carry of prefix columns lo(k)..k only,
//   where lo(k) follows the pruning rule level by level.
// * ppa_expected: what the test chip's adder with a given core index returns.
// * FA_* tables: truth tables of the minimised full-adder functions, copied
//   from the Karnaugh maps (bit index {a,b,c}).
package adder_model_pkg;
  import adder_pkg::*;

  function automatic logic [63:0] lfsr_word(logic [63:0] s);
    for (int i = 0; i < 64; i++) s = (s >> 1) ^ (s[0] ? 64'hD800_0000_0000_0000 : 64'd0);
    return s;
  endfunction

  // Set of prefix columns whose generate reaches column k's carry, following
  // the pruning rule level by level.  With unequal bins the set can have
  // gaps: a column may join a partner whose group stops short of its own.
  function automatic logic [63:0] group_mask(int n, bit sk, bin_level_t bl, int k);
    logic [63:0] m_prev [64];
    logic [63:0] m_cur  [64];
    int nl, ml, j;
    nl = $clog2(n);
    for (int c = 0; c < n; c++) m_cur[c] = 64'd1 << c;
    for (int l = 1; l <= nl; l++) begin
      m_prev = m_cur;
      for (int c = 0; c < n; c++) begin
        int low;
        low = 0;
        for (int i = 63; i >= 0; i--) if (m_prev[c][i]) low = i;
        ml = int'(bl[c / (n / 4)]);
        j = -1;
        if (!sk) begin
          if (l <= ml && c >= (1 << (l - 1))) j = c - (1 << (l - 1));
        end else begin
          if (l < ml && ((c >> (l - 1)) & 1) == 1) j = ((c >> (l - 1)) << (l - 1)) - 1;
          else if (l == ml && low > 0) j = low - 1;
        end
        m_cur[c] = (j >= 0) ? (m_prev[c] | m_prev[j]) : m_prev[c];
      end
    end
    return m_cur[k];
  endfunction

  // Lowest column of that set.
  function automatic int window_lo(int n, bit sk, bin_level_t bl, int k);
    logic [63:0] m;
    m = group_mask(n, sk, bl, k);
    for (int i = 0; i < 64; i++) if (m[i]) return i;
    return k;
  endfunction

  // {cout, sum} of a 64-bit pruned adder: the carry into bit k is the carry
  // of the columns in group_mask(k) only, taken in ascending order.
  function automatic logic [64:0] window_add(logic [63:0] x, logic [63:0] y, logic ci,
                                             bit sk, bin_level_t bl);
    logic [63:0] g, p, carry, gcol, pcol;
    g = x & y;
    p = x ^ y;
    gcol = {g[62:0], ci};
    pcol = {p[62:0], 1'b0};
    for (int k = 0; k < 64; k++) begin
      logic [63:0] m;
      logic cr;
      m = group_mask(64, sk, bl, k);
      cr = 1'b0;
      for (int j = 0; j <= k; j++) if (m[j]) cr = gcol[j] | (pcol[j] & cr);
      carry[k] = cr;
    end
    return {g[63] | (p[63] & carry[63]), p ^ carry};
  endfunction

  function automatic logic [64:0] ppa_expected(int idx, logic [63:0] x, logic [63:0] y, logic ci);
    if (idx < 11) return {1'b0, x} + {1'b0, y} + {64'd0, ci};
    return window_add(x, y, ci, ppa_pruned_arch(idx) == ARCH_SKLANSKY, ppa_pruned_levels(idx));
  endfunction

  // Truth tables, bit {a,b,c}.
  localparam logic [7:0] FA_SUM_EXACT  = 8'h96;
  localparam logic [7:0] FA_SUM_F1_011 = 8'h9E;  // + minterm 011
  localparam logic [7:0] FA_SUM_F1_000 = 8'h97;  // + minterm 000
  localparam logic [7:0] FA_SUM_F2_OR  = 8'hBE;  // + 011, 101
  localparam logic [7:0] FA_SUM_F2_NA  = 8'h9F;  // + 000, 011
  localparam logic [7:0] FA_SUM_F3_OR  = 8'hFE;  // + 011, 101, 110
  localparam logic [7:0] FA_SUM_F3_NA  = 8'hDF;  // + 000, 011, 110
  localparam logic [7:0] FA_CY_EXACT   = 8'hE8;
  localparam logic [7:0] FA_CY_F_001   = 8'hEA;  // + minterm 001
  localparam logic [7:0] FA_CY_F_011   = 8'hE0;  // - minterm 011

  function automatic logic [7:0] sum_table(sum_mode_e m);
    case (m)
      SUM_F1_011: return FA_SUM_F1_011;
      SUM_F1_000: return FA_SUM_F1_000;
      SUM_F2_OR:  return FA_SUM_F2_OR;
      SUM_F2_NA:  return FA_SUM_F2_NA;
      SUM_F3_OR:  return FA_SUM_F3_OR;
      SUM_F3_NA:  return FA_SUM_F3_NA;
      default:    return FA_SUM_EXACT;
    endcase
  endfunction

  function automatic logic [7:0] carry_table(carry_mode_e m);
    case (m)
      CARRY_F_001: return FA_CY_F_001;
      CARRY_F_011: return FA_CY_F_011;
      default:     return FA_CY_EXACT;
    endcase
  endfunction
endpackage
