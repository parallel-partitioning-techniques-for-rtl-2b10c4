// dtw_circ_array: DTW on a circular array (ring) of 2R+1 processing elements.
//
// Each PE p(k) passes data to p(k+1) and receives from p(k-1), modulo 2R+1.
// A PE stays on one row j of the search area (one test frame b_j) while the
// adjustment window sweeps over it, 2R+1 columns, and then takes row
// j + 2R + 1. The PE at the bottom of the current column holds a control
// token that rotates one PE per step around the ring; it absorbs the next
// test vector from the test pattern bus (TPB) and applies the boundary rules
// of the window (see dtw_circ_pe). The reference vector a_{i+1} is broadcast
// on the reference pattern bus (RPB). After I + R + 1 steps S(I,J) is the
// content of S0 of the PE that holds row J, copied to `result`. The ring, the token and the data movement
// follow the paper; the bus protocol, the phase timing (see dtw_seq) and
// the boundary handling are this design's.
//
// At step t the token is in PE (t-1) mod (2R+1), which takes b_t from the
// TPB; the first R+1 steps only load b_1 .. b_{R+1} and a_1.
// The pattern bus handshake and the result outputs are those of
// dtw_lin_array. Latency from start to done: 2 + (I+R+1) * (L+3) cycles.
module dtw_circ_array
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
  step_t         step;
  sidx_t         col;
  idx_t          i_q, j_q;

  dtw_seq #(.R(R), .L(L), .HAS_SHIFT(1'b1)) u_seq (
    .clk, .rst_n, .start, .i_len, .j_len,
    .busy, .init, .done, .phase, .elem, .slot (), .step, .col,
    .i_q, .j_q, .rpb_rd, .rpb_vec, .tpb_rd, .tpb_vec
  );

  assign rpb_elem = elem;
  assign tpb_elem = elem;

  dist_t d_ring   [N];
  dist_t s_ring   [N];
  dist_t s1_ring  [N];
  dist_t s0_ring  [N];
  logic  tok_ring [N];
  logic  end_pe   [N];

  for (genvar k = 0; k < N; k++) begin : g_pe
    localparam int unsigned KL = (k == 0) ? N - 1 : k - 1;   // left neighbour
    dtw_circ_pe #(.FIRST(k == 0), .L(L)) u_pe (
      .clk, .rst_n, .init, .phase,
      .run      (busy && !init),
      .elem, .step, .col,
      .i_len    (i_q),
      .j_len    (j_q),
      .a_in     (rpb_data),
      .b_in     (tpb_data),
      .d_left   (d_ring[KL]),
      .d_out    (d_ring[k]),
      .s_left   (s_ring[KL]),
      .s_out    (s_ring[k]),
      .s0_out   (s0_ring[k]),
      .s1_left  (s1_ring[KL]),
      .s1_out   (s1_ring[k]),
      .tok_left (tok_ring[KL]),
      .tok_out  (tok_ring[k]),
      .is_end   (end_pe[k])
    );
  end

  // S(I,J) is read from S0 of the PE on row J in PH_SHIFT of the last step,
  // and held: at the end of that phase the token holder already moves on to
  // a new row.
  dist_t s_end;
  logic  found;
  always_comb begin
    s_end = DIST_INF;
    found = 1'b0;
    for (int k = 0; k < N; k++) begin
      if (end_pe[k]) begin
        s_end = s0_ring[k];
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
    end else if (busy && phase == PH_SHIFT && found) begin
      res_q <= s_end;
      ok_q  <= (s_end != DIST_INF);
    end
  end

  assign result    = res_q;
  assign result_ok = ok_q && !busy;

  // Exactly one PE holds the control token while a run is in progress.
  logic [N-1:0] tok_vec;
  always_comb for (int k = 0; k < N; k++) tok_vec[k] = tok_ring[k];
  a_one_token: assert property (@(posedge clk) disable iff (!rst_n)
                 (busy && !init) |-> $onehot(tok_vec));

endmodule
