// dtw_top: the two proposed DTW arrays side by side.
//
// Both arrays compute the same symmetric, slope-constrained (P = 1) DTW
// distance S(I,J) of a reference pattern A (I frames) and a test pattern B
// (J frames) inside the adjustment window |i - j| <= R, sweeping the search
// area column by column with 2R+1 processing elements:
//   circ_* : the circular array (ring, rotating control token, dtw_circ_array)
//   lin_*  : the linearly connected array (dtw_lin_array)
//   rlin_* : the linear array reduced to NP < 2R+1 PEs (dtw_rlin_array)
//   rcirc_*: the circular array reduced to NP < 2R+1 PEs (dtw_rcirc_array)
// They are alternatives; each has its own start, result and pattern-bus
// ports and they may run independently. NP = 2 is the PE count of the
// paper's example of the reduced schemes. Defaults: R = 7 (15 PEs), the
// typical value used in the paper's performance figures; L = 16
// elements per feature vector, FEAT_W = 8 bits per element (dtw_pkg), which
// are this design's choices. Port timing: see dtw_lin_array.
module dtw_top
  import dtw_pkg::*;
#(
  parameter int unsigned R  = 7,
  parameter int unsigned L  = 16,
  parameter int unsigned NP = 2,
  localparam int unsigned EW = (L > 1) ? $clog2(L) : 1
)(
  input  logic          clk,
  input  logic          rst_n,
  // circular array
  input  logic          circ_start,
  input  idx_t          circ_i_len,
  input  idx_t          circ_j_len,
  output logic          circ_busy,
  output logic          circ_done,
  output dist_t         circ_result,
  output logic          circ_result_ok,
  output logic          circ_rpb_rd,
  output idx_t          circ_rpb_vec,
  output logic [EW-1:0] circ_rpb_elem,
  input  feat_t         circ_rpb_data,
  output logic          circ_tpb_rd,
  output idx_t          circ_tpb_vec,
  output logic [EW-1:0] circ_tpb_elem,
  input  feat_t         circ_tpb_data,
  // linearly connected array
  input  logic          lin_start,
  input  idx_t          lin_i_len,
  input  idx_t          lin_j_len,
  output logic          lin_busy,
  output logic          lin_done,
  output dist_t         lin_result,
  output logic          lin_result_ok,
  output logic          lin_rpb_rd,
  output idx_t          lin_rpb_vec,
  output logic [EW-1:0] lin_rpb_elem,
  input  feat_t         lin_rpb_data,
  output logic          lin_tpb_rd,
  output idx_t          lin_tpb_vec,
  output logic [EW-1:0] lin_tpb_elem,
  input  feat_t         lin_tpb_data,
  // reduced linearly connected array (NP PEs)
  input  logic          rlin_start,
  input  idx_t          rlin_i_len,
  input  idx_t          rlin_j_len,
  output logic          rlin_busy,
  output logic          rlin_done,
  output dist_t         rlin_result,
  output logic          rlin_result_ok,
  output logic          rlin_rpb_rd,
  output idx_t          rlin_rpb_vec,
  output logic [EW-1:0] rlin_rpb_elem,
  input  feat_t         rlin_rpb_data,
  output logic          rlin_tpb_rd,
  output idx_t          rlin_tpb_vec,
  output logic [EW-1:0] rlin_tpb_elem,
  input  feat_t         rlin_tpb_data,
  // reduced circular array (NP PEs)
  input  logic          rcirc_start,
  input  idx_t          rcirc_i_len,
  input  idx_t          rcirc_j_len,
  output logic          rcirc_busy,
  output logic          rcirc_done,
  output dist_t         rcirc_result,
  output logic          rcirc_result_ok,
  output logic          rcirc_rpb_rd,
  output idx_t          rcirc_rpb_vec,
  output logic [EW-1:0] rcirc_rpb_elem,
  input  feat_t         rcirc_rpb_data,
  output logic          rcirc_tpb_rd,
  output idx_t          rcirc_tpb_vec,
  output logic [EW-1:0] rcirc_tpb_elem,
  input  feat_t         rcirc_tpb_data
);

  dtw_circ_array #(.R(R), .L(L)) u_circ (
    .clk, .rst_n,
    .start     (circ_start),
    .i_len     (circ_i_len),
    .j_len     (circ_j_len),
    .busy      (circ_busy),
    .done      (circ_done),
    .result    (circ_result),
    .result_ok (circ_result_ok),
    .rpb_rd    (circ_rpb_rd),
    .rpb_vec   (circ_rpb_vec),
    .rpb_elem  (circ_rpb_elem),
    .rpb_data  (circ_rpb_data),
    .tpb_rd    (circ_tpb_rd),
    .tpb_vec   (circ_tpb_vec),
    .tpb_elem  (circ_tpb_elem),
    .tpb_data  (circ_tpb_data)
  );

  dtw_lin_array #(.R(R), .L(L)) u_lin (
    .clk, .rst_n,
    .start     (lin_start),
    .i_len     (lin_i_len),
    .j_len     (lin_j_len),
    .busy      (lin_busy),
    .done      (lin_done),
    .result    (lin_result),
    .result_ok (lin_result_ok),
    .rpb_rd    (lin_rpb_rd),
    .rpb_vec   (lin_rpb_vec),
    .rpb_elem  (lin_rpb_elem),
    .rpb_data  (lin_rpb_data),
    .tpb_rd    (lin_tpb_rd),
    .tpb_vec   (lin_tpb_vec),
    .tpb_elem  (lin_tpb_elem),
    .tpb_data  (lin_tpb_data)
  );

  dtw_rlin_array #(.R(R), .L(L), .NP(NP)) u_rlin (
    .clk, .rst_n,
    .start     (rlin_start),
    .i_len     (rlin_i_len),
    .j_len     (rlin_j_len),
    .busy      (rlin_busy),
    .done      (rlin_done),
    .result    (rlin_result),
    .result_ok (rlin_result_ok),
    .rpb_rd    (rlin_rpb_rd),
    .rpb_vec   (rlin_rpb_vec),
    .rpb_elem  (rlin_rpb_elem),
    .rpb_data  (rlin_rpb_data),
    .tpb_rd    (rlin_tpb_rd),
    .tpb_vec   (rlin_tpb_vec),
    .tpb_elem  (rlin_tpb_elem),
    .tpb_data  (rlin_tpb_data)
  );

  dtw_rcirc_array #(.R(R), .L(L), .NP(NP)) u_rcirc (
    .clk, .rst_n,
    .start     (rcirc_start),
    .i_len     (rcirc_i_len),
    .j_len     (rcirc_j_len),
    .busy      (rcirc_busy),
    .done      (rcirc_done),
    .result    (rcirc_result),
    .result_ok (rcirc_result_ok),
    .rpb_rd    (rcirc_rpb_rd),
    .rpb_vec   (rcirc_rpb_vec),
    .rpb_elem  (rcirc_rpb_elem),
    .rpb_data  (rcirc_rpb_data),
    .tpb_rd    (rcirc_tpb_rd),
    .tpb_vec   (rcirc_tpb_vec),
    .tpb_elem  (rcirc_tpb_elem),
    .tpb_data  (rcirc_tpb_data)
  );

endmodule
