// tb_dtw_seq: checks the step/phase sequence of the array controller, with
// and without the PH_SHIFT phase. For several (I,J) it checks the number of
// steps (I+R+1), the phase order inside each step, the element counter,
// the frame indices requested on RPB (a_{t-R}, only 1..I) and TPB (b_t, only
// up to J), the one-cycle init, and the start-to-done cycle count
// 2 + (I+R+1)(L+2+HAS_SHIFT).
module tb_dtw_seq;
  import dtw_pkg::*;

  localparam int R = 2;
  localparam int L = 3;
  localparam int EW = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  idx_t i_len = '0, j_len = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic          busy [2], init [2], done [2], rpb_rd [2], tpb_rd [2];
  phase_e        phase [2];
  logic [EW-1:0] elem [2];
  step_t         step [2];
  sidx_t         col [2];
  idx_t          i_q [2], j_q [2], rpb_vec [2], tpb_vec [2];

  for (genvar s = 0; s < 2; s++) begin : g_dut
    dtw_seq #(.R(R), .L(L), .HAS_SHIFT(s == 1)) dut (
      .clk, .rst_n, .start, .i_len, .j_len,
      .busy (busy[s]), .init (init[s]), .done (done[s]), .phase (phase[s]),
      .elem (elem[s]), .slot (), .step (step[s]), .col (col[s]), .i_q (i_q[s]), .j_q (j_q[s]),
      .rpb_rd (rpb_rd[s]), .rpb_vec (rpb_vec[s]), .tpb_rd (tpb_rd[s]), .tpb_vec (tpb_vec[s])
    );
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic checki(string what, int got, int exp);
    check(what, longint'(got), longint'(exp));
  endtask

  task automatic run(int ni, int nj);
    int cyc, n_init [2], n_rd_a [2], n_rd_b [2], n_steps [2], cyc_done [2];
    int exp_phase [2], exp_elem [2], exp_step [2];
    bit fin [2];
    @(negedge clk);
    i_len = idx_t'(ni); j_len = idx_t'(nj); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int s = 0; s < 2; s++) begin
      n_init[s] = 0; n_rd_a[s] = 0; n_rd_b[s] = 0; n_steps[s] = 0; fin[s] = 0;
      exp_phase[s] = 0; exp_elem[s] = 0; exp_step[s] = 1;
    end
    cyc = 1;
    while (!(fin[0] && fin[1])) begin
      for (int s = 0; s < 2; s++) if (!fin[s]) begin
        if (init[s]) n_init[s]++;
        else if (busy[s]) begin
          checki("phase", int'(phase[s]), exp_phase[s]);
          checki("step", int'(step[s]), exp_step[s]);
          checki("col", int'(col[s]), exp_step[s] - R - 1);
          if (phase[s] == PH_MAC) begin
            checki("elem", int'(elem[s]), exp_elem[s]);
            if (rpb_rd[s]) begin
              n_rd_a[s]++;
              checki("rpb_vec", int'(rpb_vec[s]), exp_step[s] - R);
            end
            if (tpb_rd[s]) begin
              n_rd_b[s]++;
              checki("tpb_vec", int'(tpb_vec[s]), exp_step[s]);
            end
          end else begin
            checki("no bus read outside PH_MAC", int'(rpb_rd[s]) | int'(tpb_rd[s]), 0);
          end
          // next expected position
          if (exp_phase[s] == 0 && exp_elem[s] < L - 1) exp_elem[s]++;
          else if (exp_phase[s] == 0) begin exp_elem[s] = 0; exp_phase[s] = 1; end
          else if (exp_phase[s] == 1) exp_phase[s] = 2;
          else if (exp_phase[s] == 2 && s == 1) exp_phase[s] = 3;
          else begin exp_phase[s] = 0; exp_step[s]++; n_steps[s]++; end
        end
        if (done[s]) begin fin[s] = 1; cyc_done[s] = cyc; end
      end
      @(negedge clk);
      cyc++;
    end
    for (int s = 0; s < 2; s++) begin
      checki("init cycles", n_init[s], 1);
      checki("steps", n_steps[s], ni + R + 1);
      checki("RPB reads", n_rd_a[s], ni * L);
      checki("TPB reads", n_rd_b[s], ((nj < ni + R + 1) ? nj : ni + R + 1) * L);
      checki("latency", cyc_done[s], 2 + (ni + R + 1) * (L + 2 + s));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(1, 1);
    run(5, 7);
    run(9, 4);
    run(12, 12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
