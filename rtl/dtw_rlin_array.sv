// dtw_rlin_array: DTW on a reduced linearly connected array of NP < 2R+1 PEs.
//
// Same computation, data movement and pattern buses as dtw_lin_array, but
// each of the NP PEs computes M = ceil((2R+1)/NP) consecutive window points
// of every column in turn (see dtw_rlin_pe). The links between neighbours
// are those of the full linear array: test vectors move down from p(Q+1) to
// p(Q), p(NP) takes the test pattern bus (TPB), the reference vector is
// broadcast on the reference pattern bus (RPB), and each PE exchanges with
// its neighbours the partial sums and distances of its edge slots.
// A run still takes I + R + 1 steps, now of M*L + M + 2 cycles each, so the
// latency from start to done is 2 + (I+R+1) * (M*L + M + 2) cycles.
// S(I,J) is copied to `result` when it is computed; `result_ok` says that a
// path exists. Defaults R = 3, NP = 2 are the example the paper uses for
// this scheme (Fig. 4.a); the feature length L is this design's choice.
// The pattern bus handshake is that of dtw_lin_array.
module dtw_rlin_array
  import dtw_pkg::*;
#(
  parameter int unsigned R  = 3,
  parameter int unsigned L  = 16,
  parameter int unsigned NP = 2,
  localparam int unsigned M  = (2 * R + 1 + NP - 1) / NP,
  localparam int unsigned EW = (L > 1) ? $clog2(L) : 1,
  localparam int unsigned SW = (M > 1) ? $clog2(M) : 1
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
  logic [SW-1:0] slot;
  step_t         step;   // not needed by the PEs
  sidx_t         col;
  idx_t          i_q, j_q;

  dtw_seq #(.R(R), .L(L), .HAS_SHIFT(1'b1), .M(M)) u_seq (
    .clk, .rst_n, .start, .i_len, .j_len,
    .busy, .init, .done, .phase, .elem, .slot, .step, .col,
    .i_q, .j_q, .rpb_rd, .rpb_vec, .tpb_rd, .tpb_vec
  );

  assign rpb_elem = elem;
  assign tpb_elem = elem;

  // Index 0 and NP+1 are the open ends of the array.
  feat_t b_link   [NP+2];
  dist_t sp_link  [NP+2];
  dist_t dc_link  [NP+2];
  dist_t spp_link [NP+2];
  dist_t dp_link  [NP+2];
  dist_t s_pe     [NP+1];
  logic  end_pe   [NP+1];

  assign b_link[NP+1]   = tpb_data;
  assign b_link[0]      = '0;
  assign sp_link[0]     = DIST_INF;
  assign dc_link[0]     = '0;
  assign sp_link[NP+1]  = DIST_INF;
  assign dc_link[NP+1]  = '0;
  assign spp_link[0]    = DIST_INF;
  assign dp_link[0]     = '0;
  assign spp_link[NP+1] = DIST_INF;
  assign dp_link[NP+1]  = '0;
  assign s_pe[0]        = DIST_INF;
  assign end_pe[0]      = 1'b0;

  for (genvar q = 1; q <= NP; q++) begin : g_pe
    dtw_rlin_pe #(.Q(q), .NP(NP), .R(R), .L(L)) u_pe (
      .clk, .rst_n, .init, .phase,
      .run       (busy && !init),
      .elem, .slot, .col,
      .i_len     (i_q),
      .j_len     (j_q),
      .a_in      (rpb_data),
      .b_in      (b_link[q+1]),
      .b_out     (b_link[q]),
      .sp_left   (sp_link[q-1]),
      .dc_left   (dc_link[q-1]),
      .sp_top    (sp_link[q]),
      .dc_top    (dc_link[q]),
      .spp_right (spp_link[q+1]),
      .dp_right  (dp_link[q+1]),
      .spp_bot   (spp_link[q]),
      .dp_bot    (dp_link[q]),
      .s_out     (s_pe[q]),
      .is_end    (end_pe[q])
    );
  end

  dist_t s_end;
  logic  found;
  always_comb begin
    s_end = DIST_INF;
    found = 1'b0;
    for (int q = 1; q <= NP; q++) begin
      if (end_pe[q]) begin
        s_end = s_pe[q];
        found = 1'b1;
      end
    end
  end

  dist_t res_q;
  logic  ok_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_q <= DIST_INF;
      ok_q  <= 1'b0;
    end else if (init) begin
      res_q <= DIST_INF;
      ok_q  <= 1'b0;
    end else if (busy && phase == PH_SUM && found) begin
      res_q <= s_end;
      ok_q  <= (s_end != DIST_INF);
    end
  end

  assign result    = res_q;
  assign result_ok = ok_q && !busy;

endmodule
