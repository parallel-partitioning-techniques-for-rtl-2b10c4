// dtw_lin_pe: processing element p(K) of the linearly connected array.
//
// At the step that works on column i, p(K) computes the partial sum of the
// point (i, j) with j = i + K - R - 1, so each PE stays on one diagonal of the
// adjustment window |i - j| <= R (K = 1 .. 2R+1). Following the paper it
// holds two feature memories, Ma (reference vector a_i) and Mb (test vector
// b_j), and registers S0..S3 and d1..d4. At the end of step t:
//   S0 = S_t(K), S1 = S_t(K-1), S2 = S_t(K+1), S3 = S_{t-1}(K+1)
//   d1 = d_t(K), d2 = d_t(K-1), d3 = d_t(K+1), d4 = d_{t-1}(K+1)
// and the new partial sum is
//   S0 = min{ S1 + 2 d2 + d1, S0 + 2 d1, S3 + 2 d4 + d1 }.
// Per step:
//   PH_MAC  : element e of Ma and Mb enters the distance unit; in the same
//             cycle Ma[e] takes the RPB element of a_{i+1} and Mb[e] the
//             element of p(K+1)'s Mb (p(2R+1) takes the TPB), so the test
//             vectors shift down the array by one PE per step.
//   PH_DXFER: d1 <= own distance, d2 <= p(K-1)'s, d3 <= p(K+1)'s, d4 <= d3.
//   PH_SUM  : S0 <= new sum, S1 <= p(K-1)'s new sum, S2 <= p(K+1)'s, S3 <= S2.
// These follow steps a) to f) of the paper; the split into clock phases is
// this design's. Boundary handling is this design's (the paper refers to
// the Sakoe-Chiba conditions): a point outside 1 <= j <= J or with i < 1
// gets DIST_INF, and the start point (1,1) gets 2 d(1,1). `init` fills
// S0..S3 with DIST_INF so that columns 0 and -1 are infinite.
// `s_out` and `d_out` are this PE's output channels to both neighbours;
// `is_end` marks the PE that holds S(I,J) during PH_SUM of the last step.
module dtw_lin_pe
  import dtw_pkg::*;
#(
  parameter int unsigned K  = 1,
  parameter int unsigned R  = 7,
  parameter int unsigned L  = 16,
  localparam int unsigned EW = (L > 1) ? $clog2(L) : 1
)(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          init,
  input  phase_e        phase,
  input  logic          run,
  input  logic [EW-1:0] elem,
  input  sidx_t         col,
  input  idx_t          i_len,
  input  idx_t          j_len,
  input  feat_t         a_in,     // RPB element
  input  feat_t         b_in,     // Mb element of p(K+1), or TPB element for p(2R+1)
  output feat_t         b_out,    // Mb element to p(K-1)
  input  dist_t         d_left,   // local distance of p(K-1)
  input  dist_t         d_right,  // local distance of p(K+1)
  output dist_t         d_out,
  input  dist_t         s_left,   // new partial sum of p(K-1)
  input  dist_t         s_right,  // new partial sum of p(K+1)
  output dist_t         s_out,    // new partial sum of this PE (valid in PH_SUM)
  output dist_t         s0_out,   // S0 register
  output logic          is_end
);

  feat_t ma [L];
  feat_t mb [L];
  dist_t acc;
  dist_t s0, s1, s2, s3;
  dist_t d1, d2, d3, d4;
  dist_t s_dpe;
  sidx_t j;
  logic  in_area, at_start;
  logic  mac_en;

  assign mac_en = run && (phase == PH_MAC);
  assign b_out  = mb[elem];
  assign d_out  = acc;
  assign s0_out = s0;

  always_ff @(posedge clk) begin
    if (mac_en) begin
      ma[elem] <= a_in;
      mb[elem] <= b_in;
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
    .s_a (s1), .d_a (d2),
    .s_b (s0),
    .s_c (s3), .d_c (d4),
    .d   (d1),
    .s   (s_dpe)
  );

  always_comb begin
    j        = col + sidx_t'(K) - sidx_t'(R + 1);
    in_area  = (col >= 1) && (j >= 1) && (j <= sidx_t'(j_len));
    at_start = (col == 1) && (j == 1);
    if (!in_area)      s_out = DIST_INF;
    else if (at_start) s_out = sat_add(d1, d1);
    else               s_out = s_dpe;
    is_end   = in_area && (col == sidx_t'(i_len)) && (j == sidx_t'(j_len));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {s0, s1, s2, s3} <= {4{DIST_INF}};
      {d1, d2, d3, d4} <= '0;
    end else if (init) begin
      {s0, s1, s2, s3} <= {4{DIST_INF}};
      {d1, d2, d3, d4} <= '0;
    end else if (run && phase == PH_DXFER) begin
      d1 <= acc;
      d2 <= d_left;
      d3 <= d_right;
      d4 <= d3;
    end else if (run && phase == PH_SUM) begin
      s0 <= s_out;
      s1 <= s_left;
      s2 <= s_right;
      s3 <= s2;
    end
  end

endmodule
