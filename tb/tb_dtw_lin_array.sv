// tb_dtw_lin_array: end-to-end test of the linearly connected DTW array.
//
// Random reference and test patterns are served on the RPB/TPB ports from
// dtw_ref_pkg; each run's S(I,J) is compared with the dynamic-programming
// reference, and the start-to-done latency with 2 + (I+R+1)(L+2) cycles.
// Runs cover I = J, I < J, I > J, the window edge |I-J| = R, an end point
// outside the window (no path, result_ok low) and one-frame patterns.
// R = 2 (5 PEs) is the example of the figures; a small L keeps it short; every run also checks how many pattern
// elements the array requested.
module tb_dtw_lin_array;
  import dtw_pkg::*;
  import dtw_ref_pkg::*;

  localparam int unsigned R  = 2;   // the 5-PE example of the figures
  localparam int unsigned L  = 4;
  localparam int unsigned EW = (L > 1) ? $clog2(L) : 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  idx_t i_len = '0, j_len = '0;
  logic busy, done, result_ok;
  dist_t result;
  logic rpb_rd, tpb_rd;
  idx_t rpb_vec, tpb_vec;
  logic [EW-1:0] rpb_elem, tpb_elem;
  feat_t rpb_data, tpb_data;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dtw_lin_array #(.R(R), .L(L)) dut (.*);

  assign rpb_data = rpb_rd ? feat_t'(pat_a[rpb_vec][int'(rpb_elem)]) : feat_t'(0);
  assign tpb_data = tpb_rd ? feat_t'(pat_b[tpb_vec][int'(tpb_elem)]) : feat_t'(0);

  int n_rpb, n_tpb;
  always @(posedge clk) begin
    if (rpb_rd) n_rpb++;
    if (tpb_rd) n_tpb++;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic checki(string what, int got, int exp);
    check(what, longint'(got), longint'(exp));
  endtask

  task automatic run(int ni, int nj);
    longint exp;
    int cyc;
    exp = dtw_ref(ni, nj, R, L);
    n_rpb = 0; n_tpb = 0;
    @(negedge clk);
    i_len = idx_t'(ni); j_len = idx_t'(nj); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checki($sformatf("latency I=%0d J=%0d", ni, nj), cyc, 2 + (ni + R + 1) * (L + 2));
    check($sformatf("result_ok I=%0d J=%0d", ni, nj), longint'(result_ok), longint'(exp >= 0));
    if (exp >= 0)
      check($sformatf("S(I,J) I=%0d J=%0d", ni, nj), longint'(result), exp);
    checki("RPB reads", n_rpb, ni * L);
    checki("TPB reads", n_tpb, ((nj < ni + R + 1) ? nj : ni + R + 1) * L);
  endtask

  initial begin
    fill_random(100);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(1, 1);
    run(6, 6);
    run(8, 11);
    run(11, 8);
    run(5, 5 + R);
    run(9 + R, 9);
    run(4, 4 + R + 1);          // end point outside the window
    run(2, 1);
    for (int n = 0; n < 6; n++) begin
      int ni, nj;
      ni = 1 + int'($urandom_range(20));
      nj = ni + int'($urandom_range(2 * R)) - int'(R);
      if (nj < 1) nj = 1;
      run(ni, nj);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
