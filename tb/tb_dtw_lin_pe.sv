// tb_dtw_lin_pe: register-level test of one PE of the linear array.
//
// The testbench plays the sequencer and both neighbours. For many random
// steps it streams random RPB and right-neighbour elements, and random
// neighbour distances and partial sums (some DIST_INF), with a random column
// and pattern length. A model of Ma, Mb, S0..S3 and d1..d4 written from the
// PE's register-transfer rules gives the expected Mb output to the left
// neighbour, the local distance and the new partial sum, including the
// masking outside 1 <= j <= J and the start point (1,1).
module tb_dtw_lin_pe;
  import dtw_pkg::*;

  localparam int R = 2;
  localparam int K = 3;     // j = i + K - R - 1 = i (main diagonal)
  localparam int L = 4;
  localparam int EW = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic init = 1'b0, run = 1'b0;
  phase_e phase = PH_MAC;
  logic [EW-1:0] elem = '0;
  sidx_t col = '0;
  idx_t i_len = '0, j_len = '0;
  feat_t a_in = '0, b_in = '0, b_out;
  dist_t d_left = '0, d_right = '0, d_out, s_left = '0, s_right = '0, s_out, s0_out;
  logic is_end;
  int checks = 0, failures = 0;
  int n_start = 0, n_masked = 0, n_dpe = 0;

  always #5 clk = ~clk;

  dtw_lin_pe #(.K(K), .R(R), .L(L)) dut (.*);

  longint ma [L], mb [L];
  longint s0, s1, s2, s3, d1, d2, d3, d4;
  localparam longint INF = longint'(DIST_INF);

  function automatic longint sat(longint v);
    return (v >= INF) ? INF : v;
  endfunction
  function automatic longint sadd(longint x, longint y);
    return (x == INF || y == INF) ? INF : sat(x + y);
  endfunction
  function automatic longint rnd_s();
    return ($urandom_range(4) == 0) ? INF : longint'($urandom_range(1 << 22));
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    longint acc, exp_s, ca, cb, cc, nd_l, nd_r, ns_l, ns_r;
    int j;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    init = 1'b1;
    @(negedge clk);
    init = 1'b0;
    {s0, s1, s2, s3} = {4{INF}};
    {d1, d2, d3, d4} = '0;
    for (int e = 0; e < L; e++) begin ma[e] = 0; mb[e] = 0; end
    run = 1'b1;
    for (int st = 0; st < 300; st++) begin
      // PH_MAC
      acc = 0;
      phase = PH_MAC;
      for (int e = 0; e < L; e++) begin
        elem = EW'(e);
        a_in = feat_t'($urandom);
        b_in = feat_t'($urandom);
        #1;
        if (st > 0) check("b_out", longint'(b_out), mb[e]);
        acc += (ma[e] - mb[e]) * (ma[e] - mb[e]);
        ma[e] = longint'(a_in);
        mb[e] = longint'(b_in);
        @(negedge clk);
      end
      // PH_DXFER
      phase = PH_DXFER;
      nd_l = longint'($urandom_range(1 << 18));
      nd_r = longint'($urandom_range(1 << 18));
      d_left = dist_t'(nd_l); d_right = dist_t'(nd_r);
      #1;
      if (st > 0) check("d_out", longint'(d_out), acc);
      @(negedge clk);
      d4 = d3; d1 = acc; d2 = nd_l; d3 = nd_r;
      // PH_SUM
      phase = PH_SUM;
      col = sidx_t'(int'($urandom_range(6)) - 1);
      j_len = idx_t'(1 + $urandom_range(5));
      i_len = idx_t'(1 + $urandom_range(5));
      ns_l = rnd_s(); ns_r = rnd_s();
      s_left = dist_t'(ns_l); s_right = dist_t'(ns_r);
      #1;
      j = int'(col) + K - R - 1;
      if (int'(col) < 1 || j < 1 || j > int'(j_len)) begin
        exp_s = INF; n_masked++;
      end else if (int'(col) == 1 && j == 1) begin
        exp_s = sadd(d1, d1); n_start++;
      end else begin
        ca = sadd(sadd(s1, sadd(d2, d2)), d1);
        cb = sadd(s0, sadd(d1, d1));
        cc = sadd(sadd(s3, sadd(d4, d4)), d1);
        exp_s = (ca < cb) ? ca : cb;
        exp_s = (cc < exp_s) ? cc : exp_s;
        n_dpe++;
      end
      if (st > 0) begin
        check("s_out", longint'(s_out), exp_s);
        check("is_end", longint'(is_end),
              longint'(int'(col) >= 1 && j >= 1 && j <= int'(j_len) &&
                       int'(col) == int'(i_len) && j == int'(j_len)));
      end
      @(negedge clk);
      s3 = s2; s0 = exp_s; s1 = ns_l; s2 = ns_r;
      if (st > 0) check("S0", longint'(s0_out), s0);
    end
    check("start point seen", longint'(n_start > 0), 1);
    check("masking seen", longint'(n_masked > 0), 1);
    check("recurrence seen", longint'(n_dpe > 0), 1);
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
