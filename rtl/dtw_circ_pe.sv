// dtw_circ_pe: processing element of the circular (ring) array.
//
// In the ring every PE keeps one test frame b_j (one row j of the search
// area) for 2R+1 consecutive columns, i = j-R .. j+R, and then moves to row
// j+2R+1. A control token circulates around the ring, one PE per step; the
// PE holding it is at the bottom of the current column (j = i - R). Following
// the paper, that PE
//   - uses only (1.b) and (1.c), because S(i-1, j-2) lies outside the window,
//   - absorbs its next test vector b_{j+2R+1} from the test pattern bus,
//   - sets S2 to the largest value, because at the next step it is at the top
//     of the column where S(i-2, j-1) lies outside the window.
// Registers at the end of step t (p(K-1) is the left neighbour in the ring):
//   S0 = S_t(K), S1 = S_t(K-1), S2 = S_{t-1}(K-1), S3 = S_t(K-2)
//   d1 = d_t(K), d2 = d_{t-1}(K), d3 = d_t(K-1)
// and the new partial sum is
//   S0 = min{ S3 + 2 d3 + d1, S1 + 2 d1, S2 + 2 d2 + d1 }.
// Per step:
//   PH_MAC  : element e of Ma and Mb enters the distance unit; Ma[e] takes the
//             RPB element of a_{i+1}; the token holder's Mb[e] takes the TPB.
//   PH_DXFER: d1 <= own distance, d2 <= d1, d3 <= left neighbour's distance.
//   PH_SUM  : S0 <= new sum, S1 <= left's new sum, S2 <= S1 (DIST_INF at the
//             token holder).
//   PH_SHIFT: S3 <= left's S1; the token moves to the right neighbour; the
//             token holder takes the step number as its new row.
// These register contents are the ones the transfer order of the scheme
// produces (S0 -> S1 of the right neighbour, then S1 -> S3 of the right
// neighbour; d1 -> d3 of the right neighbour within the same step), and
// they are what terms (1.a)-(1.c) need.
// Boundary handling is this design's: a row outside 1..J, or a column < 1,
// gives DIST_INF, and the start point (1,1) gives 2 d(1,1).
module dtw_circ_pe
  import dtw_pkg::*;
#(
  parameter bit          FIRST = 1'b0,   // holds the token at step 1
  parameter int unsigned L     = 16,
  localparam int unsigned EW   = (L > 1) ? $clog2(L) : 1
)(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          init,
  input  phase_e        phase,
  input  logic          run,
  input  logic [EW-1:0] elem,
  input  step_t         step,
  input  sidx_t         col,
  input  idx_t          i_len,
  input  idx_t          j_len,
  input  feat_t         a_in,     // RPB element
  input  feat_t         b_in,     // TPB element
  input  dist_t         d_left,   // local distance of the left neighbour
  output dist_t         d_out,
  input  dist_t         s_left,   // new partial sum of the left neighbour
  output dist_t         s_out,    // new partial sum of this PE (valid in PH_SUM)
  output dist_t         s0_out,   // S0 register
  input  dist_t         s1_left,  // S1 register of the left neighbour
  output dist_t         s1_out,
  input  logic          tok_left, // control token from the left neighbour
  output logic          tok_out,
  output logic          is_end
);

  feat_t ma [L];
  feat_t mb [L];
  dist_t acc;
  dist_t s0, s1, s2, s3;
  dist_t d1, d2, d3;
  dist_t s_dpe;
  step_t row;
  logic  tok;
  logic  in_area, at_start;
  logic  mac_en;

  assign mac_en  = run && (phase == PH_MAC);
  assign d_out   = acc;
  assign s0_out  = s0;
  assign s1_out  = s1;
  assign tok_out = tok;

  always_ff @(posedge clk) begin
    if (mac_en) begin
      ma[elem] <= a_in;
      if (tok) mb[elem] <= b_in;
    end
  end

  dtw_dist_mac u_dist (
    .clk, .rst_n,
    .en  (mac_en),
    .clr (elem == '0),
    .a   (ma[elem]),
    .b   (mb[elem]),
    .acc (acc)
  );

  dtw_dpe u_dpe (
    .s_a (tok ? DIST_INF : s3), .d_a (d3),
    .s_b (s1),
    .s_c (s2), .d_c (d2),
    .d   (d1),
    .s   (s_dpe)
  );

  always_comb begin
    in_area  = (col >= 1) && (row >= 1) && (row <= step_t'(j_len));
    at_start = (col == 1) && (row == 1);
    if (!in_area)      s_out = DIST_INF;
    else if (at_start) s_out = sat_add(d1, d1);
    else               s_out = s_dpe;
    is_end   = in_area && (col == sidx_t'(i_len)) && (row == step_t'(j_len));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {s0, s1, s2, s3} <= {4{DIST_INF}};
      {d1, d2, d3}     <= '0;
      row              <= '0;
      tok              <= FIRST;
    end else if (init) begin
      {s0, s1, s2, s3} <= {4{DIST_INF}};
      {d1, d2, d3}     <= '0;
      row              <= '0;
      tok              <= FIRST;
    end else if (run) begin
      unique case (phase)
        PH_DXFER: begin
          d1 <= acc;
          d2 <= d1;
          d3 <= d_left;
        end
        PH_SUM: begin
          s0 <= s_out;
          s1 <= s_left;
          s2 <= tok ? DIST_INF : s1;
        end
        PH_SHIFT: begin
          s3  <= s1_left;
          tok <= tok_left;
          if (tok) row <= step;
        end
        default: ;
      endcase
    end
  end

endmodule
