// dtw_rcirc_pe: processing element p(Q) of the reduced circular array.
//
// The ring of the circular scheme has 2R+1 positions; with NP < 2R+1 PEs each
// PE hosts M = ceil((2R+1)/NP) consecutive positions (slots) and computes
// them one after the other. The last PE hosts only the remaining positions;
// its extra slots are idle. A position keeps one row j of the search area
// and its test vector for 2R+1 columns, as in dtw_circ_pe, and the control
// token still walks one position per step around the ring; it now moves from
// slot to slot inside a PE and from the last real slot of p(Q) to slot 0 of
// p(Q+1), with p(NP) closing the ring to p(1).
// Per position the PE stores the test vector, its row, the local distance
// of this step and the last one (dc, dp), its partial sums of the last two
// columns (sp = S_{t-1}, spp = S_{t-2}), the token and a flag for "held the
// token last step" (top of the window). For the position k (point (i,j)):
//   S(i,j) = min{ sp[k-2] + 2 dc[k-1] + dc[k],   (1.a)  unusable at the token holder
//                 sp[k-1] + 2 dc[k],             (1.b)
//                 spp[k-1] + 2 dp[k] + dc[k] }   (1.c)  unusable at the top position
// Positions k-1 and k-2 of slots 0 and 1 live in p(Q-1); that PE exports the
// values of its last two real positions. Inside a PE they are read directly,
// so the per-position neighbour copies (S1, S3, d3) of dtw_circ_pe are not
// needed.
// Per step (phases from dtw_seq with M slots and HAS_SHIFT):
//   PH_MAC  : slot s accumulates its local distance from Ma and its Mb; the
//             token holder overwrites its Mb with the TPB vector element by
//             element; in slot M-1 Ma takes a_{i+1} from the RPB.
//   PH_DXFER: the last slot's distance is latched.
//   PH_SUM  : one new partial sum per cycle into sn[s].
//   PH_SHIFT: spp <= sp, sp <= sn, dp <= dc; the token moves one position;
//             the old holder takes the step number as its row.
// The paper gives the partitioning (Section V, Fig. 4.b: n = 2, r = 3)
// and says the interconnect is that of the full ring and the PE memory grows
// with m; the slot schedule, the position-to-PE mapping and the storage are
// this design's. Boundary handling is that of dtw_circ_pe.
module dtw_rcirc_pe
  import dtw_pkg::*;
#(
  parameter int unsigned Q  = 1,
  parameter int unsigned NP = 2,
  parameter int unsigned R  = 3,
  parameter int unsigned L  = 16,
  localparam int unsigned N     = 2 * R + 1,
  localparam int unsigned M     = (N + NP - 1) / NP,
  localparam int unsigned NREAL = (Q == NP) ? N - (NP - 1) * M : M,
  localparam int unsigned EW    = (L > 1) ? $clog2(L) : 1,
  localparam int unsigned SW    = (M > 1) ? $clog2(M) : 1
)(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          init,
  input  phase_e        phase,
  input  logic          run,
  input  logic [EW-1:0] elem,
  input  logic [SW-1:0] slot,
  input  step_t         step,
  input  sidx_t         col,
  input  idx_t          i_len,
  input  idx_t          j_len,
  input  feat_t         a_in,     // RPB element
  input  feat_t         b_in,     // TPB element
  input  dist_t         l_sp1,    // sp of the last real position of p(Q-1)
  input  dist_t         l_sp2,    // sp of the position before it
  input  dist_t         l_spp1,   // spp of the last real position of p(Q-1)
  input  dist_t         l_dc1,    // dc of the last real position of p(Q-1)
  input  logic          l_tok,    // token of the last real position of p(Q-1)
  output dist_t         o_sp1,
  output dist_t         o_sp2,
  output dist_t         o_spp1,
  output dist_t         o_dc1,
  output logic          o_tok,
  output logic          tok_now,  // the current slot holds the token (TPB read)
  output dist_t         s_out,    // new partial sum of the current slot (PH_SUM)
  output logic          is_end    // current slot computes (I,J)
);

  feat_t ma [L];
  feat_t mb [M][L];
  dist_t dc [M], dp [M], sp [M], spp [M], sn [M];
  step_t row [M];
  logic  tok [M], top [M];
  dist_t acc, s_dpe;
  dist_t sa, da, sb, sc, dcc, dd;
  logic  mac_en, real_slot;
  logic  in_area, at_start;
  int    si;

  assign mac_en    = run && (phase == PH_MAC);
  assign real_slot = (int'(slot) < NREAL);
  assign tok_now   = real_slot && tok[slot];

  assign o_sp1  = sp[NREAL-1];
  assign o_sp2  = (NREAL >= 2) ? sp[(NREAL >= 2) ? NREAL - 2 : 0] : l_sp1;
  assign o_spp1 = spp[NREAL-1];
  assign o_dc1  = dc[NREAL-1];
  assign o_tok  = tok[NREAL-1];

  always_ff @(posedge clk) begin
    if (mac_en) begin
      if (slot == SW'(M - 1)) ma[elem] <= a_in;
      if (tok_now)            mb[slot][elem] <= b_in;
    end
  end

  dtw_dist_mac u_dist (
    .clk, .rst_n,
    .en  (mac_en),
    .clr (elem == '0),
    .a   (ma[elem]),
    .b   (mb[slot][elem]),
    .acc (acc)
  );

  // Operands of the current slot; positions before slot 0 come from p(Q-1).
  always_comb begin
    si = int'(slot);
    if (si >= 2)      sa = sp[si - 2];
    else if (si == 1) sa = l_sp1;
    else              sa = l_sp2;
    if (si >= 1) begin
      sb  = sp[si - 1];
      sc  = spp[si - 1];
      da  = dc[si - 1];
    end else begin
      sb  = l_sp1;
      sc  = l_spp1;
      da  = l_dc1;
    end
    if (tok[slot]) sa = DIST_INF;
    if (top[slot]) sc = DIST_INF;
    dcc = dp[slot];
    dd  = dc[slot];
  end

  dtw_dpe u_dpe (
    .s_a (sa), .d_a (da),
    .s_b (sb),
    .s_c (sc), .d_c (dcc),
    .d   (dd),
    .s   (s_dpe)
  );

  always_comb begin
    in_area  = real_slot && (col >= 1) && (row[slot] >= 1) &&
               (row[slot] <= step_t'(j_len));
    at_start = (col == 1) && (row[slot] == 1);
    if (!in_area)      s_out = DIST_INF;
    else if (at_start) s_out = sat_add(dd, dd);
    else               s_out = s_dpe;
    is_end   = in_area && (col == sidx_t'(i_len)) && (row[slot] == step_t'(j_len));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < M; s++) begin
        dc[s] <= '0; dp[s] <= '0;
        sp[s] <= DIST_INF; spp[s] <= DIST_INF; sn[s] <= DIST_INF;
        row[s] <= '0; top[s] <= 1'b0;
        tok[s] <= (Q == 1) && (s == 0);
      end
    end else if (init) begin
      for (int s = 0; s < M; s++) begin
        dc[s] <= '0; dp[s] <= '0;
        sp[s] <= DIST_INF; spp[s] <= DIST_INF; sn[s] <= DIST_INF;
        row[s] <= '0; top[s] <= 1'b0;
        tok[s] <= (Q == 1) && (s == 0);
      end
    end else if (run) begin
      unique case (phase)
        PH_MAC:   if (elem == '0 && slot != '0) dc[slot - 1'b1] <= acc;
        PH_DXFER: dc[M-1] <= acc;
        PH_SUM:   sn[slot] <= s_out;
        PH_SHIFT: begin
          for (int s = 0; s < M; s++) begin
            spp[s] <= sp[s];
            sp[s]  <= sn[s];
            dp[s]  <= dc[s];
            top[s] <= tok[s];
            if (tok[s]) row[s] <= step;
            if (s >= NREAL)  tok[s] <= 1'b0;
            else if (s == 0) tok[s] <= l_tok;
            else             tok[s] <= tok[s - 1];
          end
        end
        default: ;
      endcase
    end
  end

endmodule
