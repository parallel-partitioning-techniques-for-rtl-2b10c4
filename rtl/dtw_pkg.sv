// dtw_pkg: types, constants and helper functions shared by both DTW arrays.
//
// Feature vector elements are signed FEAT_W-bit numbers. Local distances and
// partial sums share one unsigned DIST_W-bit type. The all-ones value
// DIST_INF stands for "no admissible path" (a point outside the adjustment
// window or outside the patterns); sat_add() saturates at DIST_INF so that
// an infinite partial sum stays infinite through every addition. Frame
// indices (i, j, the pattern lengths I and J) are IDX_W bits wide; step
// counts and rows need one more bit because a run takes I+r+1 steps.
// The widths are this design's choice; the paper gives none.
package dtw_pkg;

  parameter int unsigned FEAT_W = 8;   // bits per feature vector element
  parameter int unsigned DIST_W = 32;  // bits per local distance / partial sum
  parameter int unsigned IDX_W  = 8;   // bits per frame index (patterns up to 255 frames)

  typedef logic signed [FEAT_W-1:0] feat_t;
  typedef logic        [DIST_W-1:0] dist_t;
  typedef logic        [IDX_W-1:0]  idx_t;
  typedef logic        [IDX_W:0]    step_t;   // step number 1 .. I+r+1, row numbers
  typedef logic signed [IDX_W+1:0]  sidx_t;   // column / row that may be < 1

  localparam dist_t DIST_INF = '1;

  // Phases of one computation step, in the order the arrays run them.
  //   PH_MAC   : one feature element per cycle, local distance accumulation,
  //              new vectors streamed in from the pattern buses
  //   PH_DXFER : local distances latched and exchanged between neighbours
  //   PH_SUM   : partial sum computed and exchanged between neighbours
  //   PH_SHIFT : (circular array only) second-hop partial-sum transfer and
  //              rotation of the control token
  typedef enum logic [1:0] {PH_MAC, PH_DXFER, PH_SUM, PH_SHIFT} phase_e;

  // Saturating addition: any carry out, or an infinite operand, gives DIST_INF.
  function automatic dist_t sat_add(input dist_t a, input dist_t b);
    logic [DIST_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[DIST_W] ? DIST_INF : s[DIST_W-1:0];
  endfunction

endpackage
