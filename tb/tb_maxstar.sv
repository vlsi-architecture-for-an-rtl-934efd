// tb_maxstar: checks the max* unit for all six correction algorithms
// against the reference formulas (the exact table via ln/exp), on directed
// differences around every breakpoint and on random operands, including
// operands whose difference wraps around the metric width.
module tb_maxstar;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  sm_t a, b;
  sm_t y [6];

  maxstar #(.ALG(CORR_MAX_LOG))    u0 (.a, .b, .y(y[0]));
  maxstar #(.ALG(CORR_CONSTANT))   u1 (.a, .b, .y(y[1]));
  maxstar #(.ALG(CORR_LINEAR))     u2 (.a, .b, .y(y[2]));
  maxstar #(.ALG(CORR_MULTI_STEP)) u3 (.a, .b, .y(y[3]));
  maxstar #(.ALG(CORR_HYBRID))     u4 (.a, .b, .y(y[4]));
  maxstar #(.ALG(CORR_LOG_LUT))    u5 (.a, .b, .y(y[5]));

  task automatic check(input int av, input int bv);
    int exp_v;
    a = sm_t'(av);
    b = sm_t'(bv);
    #1;
    for (int k = 0; k < 6; k++) begin
      exp_v = mstar(k, av, bv);
      checks++;
      if (y[k] !== sm_t'(exp_v)) begin
        failures++;
        if (failures < 10)
          $display("FAIL alg %0d a=%0d b=%0d got %0d exp %0d", k, av, bv, y[k], exp_v);
      end
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
    for (int d = -30; d <= 30; d++) check(100, 100 + d);
    for (int i = 0; i < 2000; i++) begin
      int base, d;
      base = int'($urandom % 16384) - 8192;
      d    = int'($urandom % 64) - 32;
      check(base, base + d);
    end
    // wrap-around: 8190 and -8190 are 4 apart modulo 2^14
    check(8190, 8194);
    check(8191, 8191 + 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
