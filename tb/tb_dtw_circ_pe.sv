// tb_dtw_circ_pe: register-level test of one PE of the circular array.
//
// The testbench plays the sequencer and both ring neighbours. For many random
// steps it streams random RPB and TPB elements, random left-neighbour
// distances, partial sums and S1 values (some DIST_INF), a random token input,
// step number, column and pattern length. A model of Ma, Mb, S0..S3, d1..d3,
// the token and the row, written from the PE's register-transfer rules,
// gives the expected distance, partial sum, S1 and token outputs. It checks
// in particular that only the token holder absorbs test vectors, that the
// token holder drops (1.a) and clears S2, and that it takes a new row.
module tb_dtw_circ_pe;
  import dtw_pkg::*;

  localparam int L = 4;
  localparam int EW = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic init = 1'b0, run = 1'b0;
  phase_e phase = PH_MAC;
  logic [EW-1:0] elem = '0;
  step_t step = '0;
  sidx_t col = '0;
  idx_t i_len = '0, j_len = '0;
  feat_t a_in = '0, b_in = '0;
  dist_t d_left = '0, d_out, s_left = '0, s_out, s0_out, s1_left = '0, s1_out;
  logic tok_left = 1'b0, tok_out, is_end;
  int checks = 0, failures = 0;
  int n_start = 0, n_masked = 0, n_dpe = 0, n_tok_dpe = 0;

  always #5 clk = ~clk;

  dtw_circ_pe #(.FIRST(1'b1), .L(L)) dut (.*);

  longint ma [L], mb [L];
  longint s0, s1, s2, s3, d1, d2, d3, row;
  bit tok;
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
    longint acc, exp_s, ca, cb, cc, nd_l, ns_l, ns1_l;
    bit in_area;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    init = 1'b1;
    @(negedge clk);
    init = 1'b0;
    {s0, s1, s2, s3} = {4{INF}};
    {d1, d2, d3} = '0;
    row = 0; tok = 1;
    for (int e = 0; e < L; e++) begin ma[e] = 0; mb[e] = 0; end
    run = 1'b1;
    for (int st = 0; st < 400; st++) begin
      step = step_t'(1 + $urandom_range(5));
      // PH_MAC
      acc = 0;
      phase = PH_MAC;
      check("token out", longint'(tok_out), longint'(tok));
      for (int e = 0; e < L; e++) begin
        elem = EW'(e);
        a_in = feat_t'($urandom);
        b_in = feat_t'($urandom);
        #1;
        acc += (ma[e] - mb[e]) * (ma[e] - mb[e]);
        ma[e] = longint'(a_in);
        if (tok) mb[e] = longint'(b_in);
        @(negedge clk);
      end
      // PH_DXFER
      phase = PH_DXFER;
      nd_l = longint'($urandom_range(1 << 18));
      d_left = dist_t'(nd_l);
      #1;
      if (st > 0) check("d_out", longint'(d_out), acc);
      @(negedge clk);
      d2 = d1; d1 = acc; d3 = nd_l;
      // PH_SUM
      phase = PH_SUM;
      col = sidx_t'(int'($urandom_range(6)) - 1);
      j_len = idx_t'(1 + $urandom_range(5));
      i_len = idx_t'(1 + $urandom_range(5));
      ns_l = rnd_s();
      s_left = dist_t'(ns_l);
      #1;
      in_area = (int'(col) >= 1) && (row >= 1) && (row <= longint'(j_len));
      if (!in_area) begin
        exp_s = INF; n_masked++;
      end else if (int'(col) == 1 && row == 1) begin
        exp_s = sadd(d1, d1); n_start++;
      end else begin
        ca = tok ? INF : sadd(sadd(s3, sadd(d3, d3)), d1);
        cb = sadd(s1, sadd(d1, d1));
        cc = sadd(sadd(s2, sadd(d2, d2)), d1);
        exp_s = (ca < cb) ? ca : cb;
        exp_s = (cc < exp_s) ? cc : exp_s;
        n_dpe++;
        if (tok) n_tok_dpe++;
      end
      if (st > 0) begin
        check("s_out", longint'(s_out), exp_s);
        check("is_end", longint'(is_end),
              longint'(in_area && int'(col) == int'(i_len) && row == longint'(j_len)));
      end
      @(negedge clk);
      s0 = exp_s;
      s2 = tok ? INF : s1;
      s1 = ns_l;
      if (st > 0) begin
        check("S0", longint'(s0_out), s0);
        check("S1 out", longint'(s1_out), s1);
      end
      // PH_SHIFT
      phase = PH_SHIFT;
      ns1_l = rnd_s();
      s1_left = dist_t'(ns1_l);
      tok_left = ($urandom_range(2) == 0);
      @(negedge clk);
      s3 = ns1_l;
      if (tok) row = longint'(step);
      tok = tok_left;
    end
    check("start point seen", longint'(n_start > 0), 1);
    check("masking seen", longint'(n_masked > 0), 1);
    check("token-holder recurrence seen", longint'(n_tok_dpe > 0), 1);
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
