// dtw_dpe: arithmetic of the dynamic programming equation.
//
// Implements the symmetric DTW recurrence with slope constraint P = 1:
//   S(i,j) = min{ S(i-1,j-2) + 2 d(i,j-1) + d(i,j),     (1.a)
//                 S(i-1,j-1) + 2 d(i,j),                (1.b)
//                 S(i-2,j-1) + 2 d(i-1,j) + d(i,j) }    (1.c)
// The operands come from the PE registers; which register feeds which
// operand differs between the circular and the linear array and is decided
// by the instantiating PE. All additions saturate at DIST_INF, so a candidate
// whose predecessor lies outside the search area never wins.
// Purely combinational.
module dtw_dpe
  import dtw_pkg::*;
(
  input  dist_t s_a,    // S(i-1,j-2)
  input  dist_t d_a,    // d(i,j-1)
  input  dist_t s_b,    // S(i-1,j-1)
  input  dist_t s_c,    // S(i-2,j-1)
  input  dist_t d_c,    // d(i-1,j)
  input  dist_t d,      // d(i,j)
  output dist_t s       // S(i,j)
);

  dist_t cand_a, cand_b, cand_c, m_ab;

  always_comb begin
    cand_a = sat_add(sat_add(s_a, sat_add(d_a, d_a)), d);
    cand_b = sat_add(s_b, sat_add(d, d));
    cand_c = sat_add(sat_add(s_c, sat_add(d_c, d_c)), d);
    m_ab   = (cand_a < cand_b) ? cand_a : cand_b;
    s      = (cand_c < m_ab)   ? cand_c : m_ab;
  end

endmodule
