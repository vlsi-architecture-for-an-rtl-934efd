// tb_state_metric_unit: runs the forward and the backward radix-4 MSR
// recursion for 300 double steps on random branch metrics and compares all
// eight metrics after every step with two radix-2 steps of the reference
// log-MAP model (modulo the metric width, so wrap-around is exercised).
// Also checks init and that the metrics hold while en is low.
module tb_state_metric_unit;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, init = 0, en = 0;
  sm_vec_t init_val, alpha, beta;
  bm_pair_t g_early, g_late;

  state_metric_unit #(.BACKWARD(1'b0)) u_fwd (.clk, .rst_n, .init, .init_val, .en,
                                              .g_early, .g_late, .sm(alpha));
  state_metric_unit #(.BACKWARD(1'b1)) u_bwd (.clk, .rst_n, .init, .init_val, .en,
                                              .g_early, .g_late, .sm(beta));

  always #5 clk = ~clk;

  int ra[8], rb[8], tmp[8];
  int sys_e, lp_e, sys_l, lp_l;

  task automatic compare(input string what);
    for (int s = 0; s < 8; s++) begin
      checks += 2;
      if (alpha[s] !== sm_t'(ra[s])) begin
        failures++;
        if (failures < 10) $display("FAIL %s alpha[%0d] got %0d exp %0d", what, s, alpha[s], ra[s]);
      end
      if (beta[s] !== sm_t'(rb[s])) begin
        failures++;
        if (failures < 10) $display("FAIL %s beta[%0d] got %0d exp %0d", what, s, beta[s], rb[s]);
      end
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int s = 0; s < 8; s++) begin
      ra[s] = int'($urandom % 200) - 100;
      init_val[s] = sm_t'(ra[s]);
      rb[s] = ra[s];
    end
    init = 1;
    @(negedge clk);
    init = 0;
    compare("init");
    for (int step = 0; step < 300; step++) begin
      sys_e = int'($urandom % 200) - 100;  lp_e = int'($urandom % 64) - 32;
      sys_l = int'($urandom % 200) - 100;  lp_l = int'($urandom % 64) - 32;
      if (step < 100) begin  // small metrics keep the correction terms active
        sys_e /= 8; lp_e /= 8; sys_l /= 8; lp_l /= 8;
      end
      g_early.g1 = bm_t'(sys_e + lp_e); g_early.g2 = bm_t'(sys_e - lp_e);
      g_late.g1  = bm_t'(sys_l + lp_l); g_late.g2  = bm_t'(sys_l - lp_l);
      en = (step % 7) != 3;
      @(negedge clk);
      if (en) begin
        fwd_step(5, ra, sys_e, lp_e, tmp);
        fwd_step(5, tmp, sys_l, lp_l, ra);
        bwd_step(5, rb, sys_l, lp_l, tmp);
        bwd_step(5, tmp, sys_e, lp_e, rb);
      end
      compare(en ? "step" : "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
