// tb_dtw_top: end-to-end test of dtw_top at its default size (R = 7, 15 PEs
// in each full array, NP = 2 PEs with M = 8 points each in each reduced
// array, L = 16 elements per feature vector).
//
// All four arrays run at the same time on the same random patterns, served from
// dtw_ref_pkg on their own RPB/TPB ports. The first run is the typical case
// of the paper's performance discussion, I = J = 40 frames with r = 7;
// further runs use unequal lengths, the window edge |I-J| = R, an end point
// outside the window, one-frame patterns and a 200-frame pair. Every result
// is compared with the dynamic-programming reference and every latency with
// 2 + (I+R+1)(L+2) (linear), 2 + (I+R+1)(L+3) (circular) and
// 2 + (I+R+1)(M*L+M+2) (reduced).
// It also counts how often the design's mechanisms occur and fails if one
// never does: the start point (1,1), points masked outside 1..J, the
// bottom-of-window rule of the ring (token holder computing a real point),
// the token wrapping from the last PE to the first, test vectors absorbed
// by the token holder, the test-vector shift of the linear array, runs
// with no admissible path, and for the reduced arrays the idle padding slot,
// the token crossing between PEs, the bottom rule, and test vector input.
module tb_dtw_top;
  import dtw_pkg::*;
  import dtw_ref_pkg::*;

  localparam int unsigned R  = 7;
  localparam int unsigned L  = 16;
  localparam int unsigned N  = 2 * R + 1;
  localparam int unsigned EW = $clog2(L);
  localparam int unsigned NP = 2;                       // reduced arrays
  localparam int unsigned M  = (N + NP - 1) / NP;       // points per reduced PE

  logic clk = 1'b0, rst_n = 1'b0;
  logic circ_start = 1'b0, lin_start = 1'b0;
  idx_t circ_i_len = '0, circ_j_len = '0, lin_i_len = '0, lin_j_len = '0;
  logic circ_busy, circ_done, circ_result_ok, lin_busy, lin_done, lin_result_ok;
  dist_t circ_result, lin_result;
  logic circ_rpb_rd, circ_tpb_rd, lin_rpb_rd, lin_tpb_rd;
  idx_t circ_rpb_vec, circ_tpb_vec, lin_rpb_vec, lin_tpb_vec;
  logic [EW-1:0] circ_rpb_elem, circ_tpb_elem, lin_rpb_elem, lin_tpb_elem;
  feat_t circ_rpb_data, circ_tpb_data, lin_rpb_data, lin_tpb_data;
  logic rlin_start = 1'b0, rcirc_start = 1'b0;
  idx_t rlin_i_len = '0, rlin_j_len = '0, rcirc_i_len = '0, rcirc_j_len = '0;
  logic rlin_busy, rlin_done, rlin_result_ok, rcirc_busy, rcirc_done, rcirc_result_ok;
  dist_t rlin_result, rcirc_result;
  logic rlin_rpb_rd, rlin_tpb_rd, rcirc_rpb_rd, rcirc_tpb_rd;
  idx_t rlin_rpb_vec, rlin_tpb_vec, rcirc_rpb_vec, rcirc_tpb_vec;
  logic [EW-1:0] rlin_rpb_elem, rlin_tpb_elem, rcirc_rpb_elem, rcirc_tpb_elem;
  feat_t rlin_rpb_data, rlin_tpb_data, rcirc_rpb_data, rcirc_tpb_data;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dtw_top dut (.*);

  assign circ_rpb_data = circ_rpb_rd ? feat_t'(pat_a[circ_rpb_vec][int'(circ_rpb_elem)]) : feat_t'(0);
  assign circ_tpb_data = circ_tpb_rd ? feat_t'(pat_b[circ_tpb_vec][int'(circ_tpb_elem)]) : feat_t'(0);
  assign lin_rpb_data  = lin_rpb_rd  ? feat_t'(pat_a[lin_rpb_vec][int'(lin_rpb_elem)])   : feat_t'(0);
  assign lin_tpb_data  = lin_tpb_rd  ? feat_t'(pat_b[lin_tpb_vec][int'(lin_tpb_elem)])   : feat_t'(0);
  assign rlin_rpb_data  = rlin_rpb_rd  ? feat_t'(pat_a[rlin_rpb_vec][int'(rlin_rpb_elem)])   : feat_t'(0);
  assign rlin_tpb_data  = rlin_tpb_rd  ? feat_t'(pat_b[rlin_tpb_vec][int'(rlin_tpb_elem)])   : feat_t'(0);
  assign rcirc_rpb_data = rcirc_rpb_rd ? feat_t'(pat_a[rcirc_rpb_vec][int'(rcirc_rpb_elem)]) : feat_t'(0);
  assign rcirc_tpb_data = rcirc_tpb_rd ? feat_t'(pat_b[rcirc_tpb_vec][int'(rcirc_tpb_elem)]) : feat_t'(0);

  // ---- mechanism counters -------------------------------------------------
  int n_start_pt, n_masked, n_bottom_rule, n_tok_wrap, n_absorb, n_mb_shift, n_no_path;
  int n_pad_slot, n_r_bottom_rule, n_r_tok_cross, n_r_absorb, n_r_mb_shift;

  logic [N-1:0] c_start, c_masked, c_bottom, l_start, l_masked;
  for (genvar k = 0; k < N; k++) begin : g_mon
    assign c_start[k]  = dut.u_circ.g_pe[k].u_pe.at_start;
    assign c_masked[k] = !dut.u_circ.g_pe[k].u_pe.in_area && dut.u_circ.col >= 1;
    assign c_bottom[k] = dut.u_circ.g_pe[k].u_pe.tok && dut.u_circ.g_pe[k].u_pe.in_area;
    assign l_start[k]  = dut.u_lin.g_pe[k+1].u_pe.at_start;
    assign l_masked[k] = !dut.u_lin.g_pe[k+1].u_pe.in_area && dut.u_lin.col >= 1;
  end

  wire c_sum = dut.u_circ.busy && !dut.u_circ.init && dut.u_circ.phase == PH_SUM;
  wire c_shf = dut.u_circ.busy && !dut.u_circ.init && dut.u_circ.phase == PH_SHIFT;
  wire l_sum = dut.u_lin.busy && !dut.u_lin.init && dut.u_lin.phase == PH_SUM;
  wire rl_sum = dut.u_rlin.busy && !dut.u_rlin.init && dut.u_rlin.phase == PH_SUM;
  wire rc_sum = dut.u_rcirc.busy && !dut.u_rcirc.init && dut.u_rcirc.phase == PH_SUM;
  wire rc_shf = dut.u_rcirc.busy && !dut.u_rcirc.init && dut.u_rcirc.phase == PH_SHIFT;

  logic [NP-1:0] rc_bottom, rc_start, rl_start, rc_cross;
  for (genvar q = 0; q < NP; q++) begin : g_rmon
    assign rc_bottom[q] = dut.u_rcirc.g_pe[q].u_pe.tok_now && dut.u_rcirc.g_pe[q].u_pe.in_area;
    assign rc_start[q]  = dut.u_rcirc.g_pe[q].u_pe.in_area && dut.u_rcirc.g_pe[q].u_pe.at_start;
    assign rl_start[q]  = dut.u_rlin.g_pe[q+1].u_pe.in_area && dut.u_rlin.g_pe[q+1].u_pe.at_start;
    assign rc_cross[q]  = dut.u_rcirc.g_pe[q].u_pe.o_tok;
  end

  always @(posedge clk) begin
    if (c_sum) begin
      n_start_pt    += $countones(c_start);
      n_masked      += $countones(c_masked);
      n_bottom_rule += $countones(c_bottom);
    end
    if (l_sum) begin
      n_start_pt += $countones(l_start);
      n_masked   += $countones(l_masked);
    end
    if (c_shf && dut.u_circ.g_pe[N-1].u_pe.tok) n_tok_wrap++;
    if (rl_sum) begin
      n_start_pt += $countones(rl_start);
      if (dut.u_rlin.g_pe[1].u_pe.k < 1) n_pad_slot++;
    end
    if (rc_sum) begin
      n_start_pt      += $countones(rc_start);
      n_r_bottom_rule += $countones(rc_bottom);
    end
    if (rc_shf) n_r_tok_cross += $countones(rc_cross);
    if (rcirc_tpb_rd && rcirc_tpb_elem == '0) n_r_absorb++;
    if (rlin_tpb_rd && rlin_tpb_elem == '0) n_r_mb_shift++;
    if (circ_tpb_rd && circ_tpb_elem == '0) n_absorb++;
    if (lin_tpb_rd && lin_tpb_elem == '0) n_mb_shift++;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run_lin(int ni, int nj, longint exp);
    int cyc = 1;
    @(negedge clk);
    lin_i_len = idx_t'(ni); lin_j_len = idx_t'(nj); lin_start = 1'b1;
    @(negedge clk);
    lin_start = 1'b0;
    while (!lin_done) begin @(negedge clk); cyc++; end
    check($sformatf("lin latency I=%0d J=%0d", ni, nj), longint'(cyc), longint'(int'(2 + (ni + R + 1) * (L + 2))));
    check($sformatf("lin ok I=%0d J=%0d", ni, nj), longint'(lin_result_ok), longint'(exp >= 0));
    if (exp >= 0) check($sformatf("lin S(I,J) I=%0d J=%0d", ni, nj), longint'(lin_result), exp);
  endtask

  task automatic run_circ(int ni, int nj, longint exp);
    int cyc = 1;
    @(negedge clk);
    circ_i_len = idx_t'(ni); circ_j_len = idx_t'(nj); circ_start = 1'b1;
    @(negedge clk);
    circ_start = 1'b0;
    while (!circ_done) begin @(negedge clk); cyc++; end
    check($sformatf("circ latency I=%0d J=%0d", ni, nj), longint'(cyc), longint'(int'(2 + (ni + R + 1) * (L + 3))));
    check($sformatf("circ ok I=%0d J=%0d", ni, nj), longint'(circ_result_ok), longint'(exp >= 0));
    if (exp >= 0) check($sformatf("circ S(I,J) I=%0d J=%0d", ni, nj), longint'(circ_result), exp);
  endtask

  task automatic run_rlin(int ni, int nj, longint exp);
    int cyc = 1;
    @(negedge clk);
    rlin_i_len = idx_t'(ni); rlin_j_len = idx_t'(nj); rlin_start = 1'b1;
    @(negedge clk);
    rlin_start = 1'b0;
    while (!rlin_done) begin @(negedge clk); cyc++; end
    check($sformatf("rlin latency I=%0d J=%0d", ni, nj), longint'(cyc), longint'(int'(2 + (ni + R + 1) * (M * L + M + 2))));
    check($sformatf("rlin ok I=%0d J=%0d", ni, nj), longint'(rlin_result_ok), longint'(exp >= 0));
    if (exp >= 0) check($sformatf("rlin S(I,J) I=%0d J=%0d", ni, nj), longint'(rlin_result), exp);
  endtask

  task automatic run_rcirc(int ni, int nj, longint exp);
    int cyc = 1;
    @(negedge clk);
    rcirc_i_len = idx_t'(ni); rcirc_j_len = idx_t'(nj); rcirc_start = 1'b1;
    @(negedge clk);
    rcirc_start = 1'b0;
    while (!rcirc_done) begin @(negedge clk); cyc++; end
    check($sformatf("rcirc latency I=%0d J=%0d", ni, nj), longint'(cyc), longint'(int'(2 + (ni + R + 1) * (M * L + M + 2))));
    check($sformatf("rcirc ok I=%0d J=%0d", ni, nj), longint'(rcirc_result_ok), longint'(exp >= 0));
    if (exp >= 0) check($sformatf("rcirc S(I,J) I=%0d J=%0d", ni, nj), longint'(rcirc_result), exp);
  endtask

  task automatic run_both(int ni, int nj);
    longint exp = dtw_ref(ni, nj, R, L);
    if (exp < 0) n_no_path++;
    fork
      run_lin(ni, nj, exp);
      run_circ(ni, nj, exp);
      run_rlin(ni, nj, exp);
      run_rcirc(ni, nj, exp);
    join
  endtask

  initial begin
    n_start_pt = 0; n_masked = 0; n_bottom_rule = 0; n_tok_wrap = 0;
    n_absorb = 0; n_mb_shift = 0; n_no_path = 0;
    n_pad_slot = 0; n_r_bottom_rule = 0; n_r_tok_cross = 0; n_r_absorb = 0; n_r_mb_shift = 0;
    fill_random(128);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_both(40, 40);
    run_both(40, 33);
    run_both(33, 40);
    run_both(37, 44);
    run_both(30, 30 + R + 1);
    run_both(1, 1);
    run_both(200, 195);
    for (int n = 0; n < 4; n++) begin
      int ni, nj;
      ni = 1 + int'($urandom_range(60));
      nj = ni + int'($urandom_range(2 * R)) - int'(R);
      if (nj < 1) nj = 1;
      run_both(ni, nj);
    end
    $display("mechanisms: start_point=%0d masked=%0d bottom_rule=%0d token_wrap=%0d absorb=%0d mb_shift=%0d no_path=%0d",
             n_start_pt, n_masked, n_bottom_rule, n_tok_wrap, n_absorb, n_mb_shift, n_no_path);
    checks++; if (n_start_pt    == 0) begin failures++; $display("FAIL start point never computed"); end
    checks++; if (n_masked      == 0) begin failures++; $display("FAIL no point masked"); end
    checks++; if (n_bottom_rule == 0) begin failures++; $display("FAIL bottom rule never used"); end
    checks++; if (n_tok_wrap    == 0) begin failures++; $display("FAIL token never wrapped"); end
    checks++; if (n_absorb      == 0) begin failures++; $display("FAIL no test vector absorbed"); end
    checks++; if (n_mb_shift    == 0) begin failures++; $display("FAIL no test vector shifted in"); end
    checks++; if (n_no_path     == 0) begin failures++; $display("FAIL no run without a path"); end
    $display("reduced arrays: padding_slot=%0d bottom_rule=%0d token_crossings=%0d absorb=%0d mb_shift=%0d",
             n_pad_slot, n_r_bottom_rule, n_r_tok_cross, n_r_absorb, n_r_mb_shift);
    checks++; if (n_pad_slot      == 0) begin failures++; $display("FAIL padding slot never visited"); end
    checks++; if (n_r_bottom_rule == 0) begin failures++; $display("FAIL reduced ring bottom rule never used"); end
    checks++; if (n_r_tok_cross   == 0) begin failures++; $display("FAIL token never crossed between reduced PEs"); end
    checks++; if (n_r_absorb      == 0) begin failures++; $display("FAIL reduced ring absorbed nothing"); end
    checks++; if (n_r_mb_shift    == 0) begin failures++; $display("FAIL reduced linear array took no test vector"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
