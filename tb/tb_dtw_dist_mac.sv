// tb_dtw_dist_mac: feeds random vector pairs of L elements, one element per
// cycle, and checks the squared Euclidean distance one cycle after the last
// element. Extreme values (-128, 127) are included; back-to-back vectors
// check that `clr` restarts the sum.
module tb_dtw_dist_mac;
  import dtw_pkg::*;

  localparam int L = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0, clr = 1'b0;
  feat_t a = '0, b = '0;
  dist_t acc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dtw_dist_mac dut (.*);

  function automatic feat_t rnd();
    int sel = int'($urandom_range(7));
    if (sel == 0) return feat_t'(-128);
    if (sel == 1) return feat_t'(127);
    return feat_t'($urandom);
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < 200; v++) begin
      longint exp;
      exp = 0;
      for (int e = 0; e < L; e++) begin
        en = 1'b1; clr = (e == 0);
        a = rnd(); b = rnd();
        exp += (longint'(a) - longint'(b)) * (longint'(a) - longint'(b));
        @(negedge clk);
      end
      en = 1'b0; clr = 1'b0;
      checks++;
      if (longint'(acc) != exp) begin
        failures++;
        $display("FAIL vector %0d: %0d expected %0d", v, acc, exp);
      end
      if (v % 3 == 0) @(negedge clk);   // sometimes an idle cycle in between
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
