// tb_dtw_dpe: checks the recurrence arithmetic against a 64-bit model.
// Random operands, some of them DIST_INF and some large enough for the
// 32-bit sums to saturate; the model computes the three candidates exactly
// and maps anything >= 2^32-1 to DIST_INF.
module tb_dtw_dpe;
  import dtw_pkg::*;

  dist_t s_a, d_a, s_b, s_c, d_c, d, s;
  int checks = 0, failures = 0;

  dtw_dpe dut (.*);

  function automatic longint sat(longint v);
    return (v >= longint'(DIST_INF)) ? longint'(DIST_INF) : v;
  endfunction

  function automatic dist_t pick(int big);
    int sel = int'($urandom_range(9));
    if (sel == 0) return DIST_INF;
    if (sel == 1 && big != 0) return dist_t'($urandom) | 32'hc000_0000;
    return dist_t'($urandom_range(1 << 20));
  endfunction

  initial begin
    for (int n = 0; n < 2000; n++) begin
      longint ca, cb, cc, e;
      s_a = pick(1); s_b = pick(1); s_c = pick(1);
      d_a = pick(0); d_c = pick(0); d = pick(0);
      #1;
      ca = sat(longint'(s_a) + 2 * longint'(d_a) + longint'(d));
      cb = sat(longint'(s_b) + 2 * longint'(d));
      cc = sat(longint'(s_c) + 2 * longint'(d_c) + longint'(d));
      if (s_a == DIST_INF || d_a == DIST_INF || d == DIST_INF) ca = longint'(DIST_INF);
      if (s_b == DIST_INF || d == DIST_INF) cb = longint'(DIST_INF);
      if (s_c == DIST_INF || d_c == DIST_INF || d == DIST_INF) cc = longint'(DIST_INF);
      e = ca;
      if (cb < e) e = cb;
      if (cc < e) e = cc;
      checks++;
      if (longint'(s) != e) begin
        failures++;
        if (failures < 10) $display("FAIL %0d %0d %0d %0d %0d %0d -> %0d expected %0d",
                                    s_a, d_a, s_b, s_c, d_c, d, s, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
