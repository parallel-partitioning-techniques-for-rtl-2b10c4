// dtw_rcirc_array: DTW on a reduced circular array (ring) of NP < 2R+1 PEs.
//
// The 2R+1 ring positions of dtw_circ_array are spread over NP PEs, M =
// ceil((2R+1)/NP) consecutive positions per PE, computed one after the other
// (see dtw_rcirc_pe). The PEs form a ring p(1) -> p(2) -> ... -> p(NP) -> p(1)
// over which they pass the partial sums and distances of their last
// positions and the control token. The reference vector is broadcast on the
// reference pattern bus (RPB); the position holding the token absorbs the
// next test vector from the test pattern bus (TPB), which is read in the slot
// of that position. A run takes I + R + 1 steps of M*L + M + 2 cycles, so the
// latency from start to done is 2 + (I+R+1) * (M*L + M + 2) cycles.
// S(I,J) is copied to `result` when it is computed; `result_ok` says that a
// path exists. Defaults R = 3, NP = 2 are the example the paper uses for
// this scheme (Fig. 4.b); the feature length L is this design's choice.
// The pattern bus handshake is that of dtw_lin_array.
module dtw_rcirc_array
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
  step_t         step;
  sidx_t         col;
  idx_t          i_q, j_q;
  logic          tpb_slot0;   // the sequencer's TPB slot; here the token decides

  dtw_seq #(.R(R), .L(L), .HAS_SHIFT(1'b1), .M(M)) u_seq (
    .clk, .rst_n, .start, .i_len, .j_len,
    .busy, .init, .done, .phase, .elem, .slot, .step, .col,
    .i_q, .j_q, .rpb_rd, .rpb_vec,
    .tpb_rd  (tpb_slot0),
    .tpb_vec (tpb_vec)
  );

  assign rpb_elem = elem;
  assign tpb_elem = elem;

  dist_t sp1 [NP], sp2 [NP], spp1 [NP], dc1 [NP];
  logic  tk [NP];
  dist_t s_pe [NP];
  logic  end_pe [NP], tok_now [NP];

  for (genvar q = 0; q < NP; q++) begin : g_pe
    localparam int unsigned QL = (q == 0) ? NP - 1 : q - 1;   // left neighbour
    dtw_rcirc_pe #(.Q(q + 1), .NP(NP), .R(R), .L(L)) u_pe (
      .clk, .rst_n, .init, .phase,
      .run     (busy && !init),
      .elem, .slot, .step, .col,
      .i_len   (i_q),
      .j_len   (j_q),
      .a_in    (rpb_data),
      .b_in    (tpb_data),
      .l_sp1   (sp1[QL]),
      .l_sp2   (sp2[QL]),
      .l_spp1  (spp1[QL]),
      .l_dc1   (dc1[QL]),
      .l_tok   (tk[QL]),
      .o_sp1   (sp1[q]),
      .o_sp2   (sp2[q]),
      .o_spp1  (spp1[q]),
      .o_dc1   (dc1[q]),
      .o_tok   (tk[q]),
      .tok_now (tok_now[q]),
      .s_out   (s_pe[q]),
      .is_end  (end_pe[q])
    );
  end

  dist_t s_end;
  logic  found, tok_here;
  always_comb begin
    s_end    = DIST_INF;
    found    = 1'b0;
    tok_here = 1'b0;
    for (int q = 0; q < NP; q++) begin
      if (end_pe[q]) begin
        s_end = s_pe[q];
        found = 1'b1;
      end
      tok_here |= tok_now[q];
    end
  end

  // The TPB is read for b_t (t <= J) in the slot of the token holder.
  assign tpb_rd = busy && !init && (phase == PH_MAC) && tok_here &&
                  (step <= step_t'(j_q));

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
