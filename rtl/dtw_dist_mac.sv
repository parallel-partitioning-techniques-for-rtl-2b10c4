// dtw_dist_mac: serial local-distance unit of a processing element.
//
// Computes d(a_i, b_j) = sum_e (a_ie - b_je)^2, the squared Euclidean distance
// between two feature vectors, one element per clock. The paper defines
// the local distance as |a - b|^2; doing it one element per cycle, reading the
// element from the PE's Ma and Mb memories, is this design's choice.
//
// Interface: while `en` is high the square of (a - b) is added to `acc`;
// `clr` together with `en` marks the first element and restarts the sum.
// Timing: `acc` holds the complete distance one cycle after the last element.
// The sum saturates at DIST_INF.
module dtw_dist_mac
  import dtw_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  clr,
  input  feat_t a,
  input  feat_t b,
  output dist_t acc
);

  logic signed [FEAT_W:0]   diff;
  logic        [2*FEAT_W+1:0] sq;
  dist_t                    base;

  always_comb begin
    diff = {a[FEAT_W-1], a} - {b[FEAT_W-1], b};
    sq   = (2*FEAT_W+2)'(diff * diff);
    base = clr ? '0 : acc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= sat_add(base, DIST_W'(sq));
  end

endmodule
