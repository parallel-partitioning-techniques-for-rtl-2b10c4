// dtw_rlin_pe: processing element p(Q) of the reduced linear array.
//
// When fewer PEs than window points are available (NP < 2R+1), each PE
// computes M = ceil((2R+1)/NP) consecutive points of every column, one after
// the other. PE p(Q) serves the diagonals k = (Q-1)*M + s + 1 - PAD for the
// slots s = 0 .. M-1, where PAD = NP*M - (2R+1) padding slots at the bottom
// of p(1) are always outside the window. For each of its slots the PE keeps
// what a PE of the full linear array keeps, so its memory grows with M as
// the paper says: test vectors Mb, and for every slot the current and the
// previous local distance (dc, dp) and the partial sums of the last two
// columns (sp = S_{t-1}, spp = S_{t-2}). The reference vector Ma is shared.
// For slot s (diagonal k, point (i,j), j = i + k - R - 1):
//   S(i,j) = min{ sp[s-1] + 2 dc[s-1] + dc[s],    (1.a)
//                 sp[s]   + 2 dc[s],              (1.b)
//                 spp[s+1] + 2 dp[s+1] + dc[s] }  (1.c)
// where slot -1 is the top slot of p(Q-1) and slot M the bottom slot of
// p(Q+1), reached over the neighbour links.
// Per step (phases from dtw_seq with M slots and HAS_SHIFT):
//   PH_MAC  : M x L cycles. Slot s accumulates its local distance from Ma and
//             its Mb vector. In slot 0 the spare Mb entry takes the bottom
//             vector of p(Q+1) (p(NP) takes the TPB); in slot M-1 Ma takes
//             a_{i+1} from the RPB, element by element after it was read.
//   PH_DXFER: the last slot's distance is latched (the others were latched at
//             the start of the next slot).
//   PH_SUM  : M cycles, one new partial sum per cycle into sn[s].
//   PH_SHIFT: spp <= sp, sp <= sn, dp <= dc; the Mb ring pointer advances
//             by one, which moves every test vector down one slot.
// The paper gives the partitioning (Section V, Fig. 4.a: n = 2 PEs,
// r = 3, PE memory proportional to m) but not the PE's insides; the slot
// schedule, the Mb ring of M+1 entries and the padding at the bottom are this
// design's. Boundary handling is that of dtw_lin_pe.
module dtw_rlin_pe
  import dtw_pkg::*;
#(
  parameter int unsigned Q  = 1,
  parameter int unsigned NP = 2,
  parameter int unsigned R  = 3,
  parameter int unsigned L  = 16,
  localparam int unsigned M   = (2 * R + 1 + NP - 1) / NP,
  localparam int unsigned PAD = NP * M - (2 * R + 1),
  localparam int unsigned EW  = (L > 1) ? $clog2(L) : 1,
  localparam int unsigned SW  = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned BW  = $clog2(M + 1)
)(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          init,
  input  phase_e        phase,
  input  logic          run,
  input  logic [EW-1:0] elem,
  input  logic [SW-1:0] slot,
  input  sidx_t         col,
  input  idx_t          i_len,
  input  idx_t          j_len,
  input  feat_t         a_in,      // RPB element
  input  feat_t         b_in,      // bottom Mb element of p(Q+1), or TPB
  output feat_t         b_out,     // bottom Mb element, to p(Q-1)
  input  dist_t         sp_left,   // sp of the top slot of p(Q-1)
  input  dist_t         dc_left,   // dc of the top slot of p(Q-1)
  output dist_t         sp_top,
  output dist_t         dc_top,
  input  dist_t         spp_right, // spp of the bottom slot of p(Q+1)
  input  dist_t         dp_right,  // dp of the bottom slot of p(Q+1)
  output dist_t         spp_bot,
  output dist_t         dp_bot,
  output dist_t         s_out,     // new partial sum of the current slot (PH_SUM)
  output logic          is_end     // current slot computes (I,J)
);

  feat_t ma [L];
  feat_t mb [M+1][L];
  logic [BW-1:0] base;
  dist_t dc [M], dp [M], sp [M], spp [M], sn [M];
  dist_t acc, s_dpe;
  dist_t sa, da, sb, sc, dcc, dd;
  logic  mac_en;
  logic [BW-1:0] vs, spare;
  sidx_t k, j;
  logic  in_area, at_start;

  function automatic logic [BW-1:0] ring_idx(int unsigned x);
    return BW'(x % (M + 1));
  endfunction

  assign mac_en = run && (phase == PH_MAC);
  assign vs     = ring_idx(int'(base) + int'(slot));
  assign spare  = ring_idx(int'(base) + M);
  assign b_out  = mb[base][elem];
  assign sp_top = sp[M-1];
  assign dc_top = dc[M-1];
  assign spp_bot = spp[0];
  assign dp_bot  = dp[0];

  always_ff @(posedge clk) begin
    if (mac_en) begin
      if (slot == SW'(M - 1)) ma[elem] <= a_in;
      if (slot == '0)         mb[spare][elem] <= b_in;
    end
  end

  dtw_dist_mac u_dist (
    .clk, .rst_n,
    .en  (mac_en),
    .clr (elem == '0),
    .a   (ma[elem]),
    .b   (mb[vs][elem]),
    .acc (acc)
  );

  // Operands of the current slot.
  always_comb begin
    if (slot == '0) begin
      sa = sp_left;
      da = dc_left;
    end else begin
      sa = sp[slot - 1'b1];
      da = dc[slot - 1'b1];
    end
    if (slot == SW'(M - 1)) begin
      sc  = spp_right;
      dcc = dp_right;
    end else begin
      sc  = spp[slot + 1'b1];
      dcc = dp[slot + 1'b1];
    end
    sb = sp[slot];
    dd = dc[slot];
  end

  dtw_dpe u_dpe (
    .s_a (sa), .d_a (da),
    .s_b (sb),
    .s_c (sc), .d_c (dcc),
    .d   (dd),
    .s   (s_dpe)
  );

  always_comb begin
    k        = sidx_t'((Q - 1) * M + 1) + sidx_t'(slot) - sidx_t'(PAD);
    j        = col + k - sidx_t'(R + 1);
    in_area  = (k >= 1) && (col >= 1) && (j >= 1) && (j <= sidx_t'(j_len));
    at_start = (col == 1) && (j == 1);
    if (!in_area)      s_out = DIST_INF;
    else if (at_start) s_out = sat_add(dd, dd);
    else               s_out = s_dpe;
    is_end   = in_area && (col == sidx_t'(i_len)) && (j == sidx_t'(j_len));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base <= '0;
      for (int s = 0; s < M; s++) begin
        dc[s] <= '0; dp[s] <= '0;
        sp[s] <= DIST_INF; spp[s] <= DIST_INF; sn[s] <= DIST_INF;
      end
    end else if (init) begin
      base <= '0;
      for (int s = 0; s < M; s++) begin
        dc[s] <= '0; dp[s] <= '0;
        sp[s] <= DIST_INF; spp[s] <= DIST_INF; sn[s] <= DIST_INF;
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
          end
          base <= ring_idx(int'(base) + 1);
        end
        default: ;
      endcase
    end
  end

endmodule
