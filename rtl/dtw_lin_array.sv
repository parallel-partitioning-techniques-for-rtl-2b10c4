// dtw_lin_array: DTW on a linearly connected array of 2R+1 processing elements.
//
// PE p(k), k = 1 .. 2R+1, computes the points (i, j) with k = j - i + R + 1,
// i.e. one diagonal of the adjustment window |i - j| <= R. A whole column of
// the window is computed in parallel in one step, from the two previous
// columns. Each PE talks only to p(k-1) and p(k+1): local distances and new
// partial sums go both ways, test vectors move one PE down per step. The
// reference vector a_{i+1} is broadcast to all PEs on the reference pattern
// bus (RPB); the test vector b_{i+R+1} enters at p(2R+1) from the test
// pattern bus (TPB). After I + R + 1 steps S(I,J) is in S0 of p(J-I+R+1).
// The array layout and data movement follow the paper; the bus protocol,
// the phase timing (see dtw_seq) and the boundary handling are this design's.
//
// Pattern buses: during the L MAC cycles of a step the array asks for
// element rpb_elem of a_{rpb_vec} (when rpb_rd) and element tpb_elem of
// b_{tpb_vec} (when tpb_rd); the source drives rpb_data / tpb_data in the same
// cycle (asynchronous read). Data for a cycle without a read is ignored.
// Result: after `done`, `result` is S(I,J) and `result_ok` says that a warping
// path exists (|I - J| <= R); both hold until the next start.
// Latency from start to done: 2 + (I+R+1) * (L+2) cycles.
module dtw_lin_array
  import dtw_pkg::*;
#(
  parameter int unsigned R  = 7,
  parameter int unsigned L  = 16,
  localparam int unsigned N  = 2 * R + 1,
  localparam int unsigned EW = (L > 1) ? $clog2(L) : 1
)(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  idx_t          i_len,
  input  idx_t          j_len,
  output logic          busy,
  output logic          done,
  output dist_t         result,
  output logic          result_ok,
  output logic          rpb_rd,
  output idx_t          rpb_vec,
  output logic [EW-1:0] rpb_elem,
  input  feat_t         rpb_data,
  output logic          tpb_rd,
  output idx_t          tpb_vec,
  output logic [EW-1:0] tpb_elem,
  input  feat_t         tpb_data
);

  logic          init;
  phase_e        phase;
  logic [EW-1:0] elem;
  step_t         step;   // not needed by the linear PEs
  sidx_t         col;
  idx_t          i_q, j_q;

  dtw_seq #(.R(R), .L(L), .HAS_SHIFT(1'b0)) u_seq (
    .clk, .rst_n, .start, .i_len, .j_len,
    .busy, .init, .done, .phase, .elem, .slot (), .step, .col,
    .i_q, .j_q, .rpb_rd, .rpb_vec, .tpb_rd, .tpb_vec
  );

  assign rpb_elem = elem;
  assign tpb_elem = elem;

  // Index 0 and N+1 are the open ends of the array.
  feat_t b_link [N+2];
  dist_t d_link [N+2];
  dist_t s_link [N+2];
  dist_t s0_pe  [N+1];
  logic  end_pe [N+1];

  assign b_link[N+1] = tpb_data;
  assign d_link[0]   = '0;
  assign d_link[N+1] = '0;
  assign s_link[0]   = DIST_INF;
  assign s_link[N+1] = DIST_INF;
  assign b_link[0]   = '0;
  assign s0_pe[0]    = DIST_INF;
  assign end_pe[0]   = 1'b0;

  for (genvar k = 1; k <= N; k++) begin : g_pe
    dtw_lin_pe #(.K(k), .R(R), .L(L)) u_pe (
      .clk, .rst_n, .init, .phase,
      .run     (busy && !init),
      .elem, .col,
      .i_len   (i_q),
      .j_len   (j_q),
      .a_in    (rpb_data),
      .b_in    (b_link[k+1]),
      .b_out   (b_link[k]),
      .d_left  (d_link[k-1]),
      .d_right (d_link[k+1]),
      .d_out   (d_link[k]),
      .s_left  (s_link[k-1]),
      .s_right (s_link[k+1]),
      .s_out   (s_link[k]),
      .s0_out  (s0_pe[k]),
      .is_end  (end_pe[k])
    );
  end

  // S(I,J) is read from S0 of the PE on the end point's diagonal.
  always_comb begin
    result    = DIST_INF;
    result_ok = 1'b0;
    for (int k = 1; k <= N; k++) begin
      if (end_pe[k]) begin
        result    = s0_pe[k];
        result_ok = (s0_pe[k] != DIST_INF);
      end
    end
    if (busy) result_ok = 1'b0;
  end

endmodule
