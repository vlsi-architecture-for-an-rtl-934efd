// tb_branch_metric_unit: checks G1 = Ls+La+Lp and G2 = Ls+La-Lp over the
// full input ranges (random) and the extreme corners.
module tb_branch_metric_unit;
  import turbo_pkg::*;

  int checks = 0, failures = 0;
  llr_t ls, lp;
  ext_t la;
  bm_pair_t g;

  branch_metric_unit dut (.ls, .la, .lp, .g);

  task automatic check(input int s, input int a, input int p);
    ls = llr_t'(s); la = ext_t'(a); lp = llr_t'(p);
    #1;
    checks++;
    if (int'(g.g1) != s + a + p || int'(g.g2) != s + a - p) begin
      failures++;
      $display("FAIL ls=%0d la=%0d lp=%0d got %0d %0d", s, a, p, g.g1, g.g2);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(31, 127, 31);
    check(-32, -128, -32);
    check(31, 127, -32);
    check(-32, -128, 31);
    for (int i = 0; i < 2000; i++)
      check(int'($urandom % 64) - 32, int'($urandom % 256) - 128, int'($urandom % 64) - 32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
