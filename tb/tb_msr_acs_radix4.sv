// tb_msr_acs_radix4: checks the shared-resource radix-4 ACS pair against
// a conventional radix-4 ACS computed without sharing: each output state
// merges its four two-step paths in its own max* tree,
//   ya = max*(max*(m00+c0+t, m01-c0+t), max*(m10+c1-t, m11-c1-t))
//   yb = max*(max*(m00+c0-t, m01-c0-t), max*(m10+c1+t, m11-c1+t))
// for every correction algorithm used in the decoder tests.
module tb_msr_acs_radix4;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  sm_t m00, m01, m10, m11, c0, c1, t;
  sm_t ya [3], yb [3];
  localparam int ALGS [3] = '{5, 1, 2};

  msr_acs_radix4 #(.ALG(CORR_LOG_LUT))  u0 (.m00, .m01, .m10, .m11, .c0, .c1, .t, .ya(ya[0]), .yb(yb[0]));
  msr_acs_radix4 #(.ALG(CORR_CONSTANT)) u1 (.m00, .m01, .m10, .m11, .c0, .c1, .t, .ya(ya[1]), .yb(yb[1]));
  msr_acs_radix4 #(.ALG(CORR_LINEAR))   u2 (.m00, .m01, .m10, .m11, .c0, .c1, .t, .ya(ya[2]), .yb(yb[2]));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int v[4], x0, x1, tt, ea, eb, al;
      int span;
      span = (i < 1500) ? 16 : 256;
      foreach (v[j]) v[j] = int'($urandom % span) - span / 2 + 300;
      x0 = int'($urandom % span) - span / 2;
      x1 = int'($urandom % span) - span / 2;
      tt = int'($urandom % span) - span / 2;
      m00 = sm_t'(v[0]); m01 = sm_t'(v[1]); m10 = sm_t'(v[2]); m11 = sm_t'(v[3]);
      c0 = sm_t'(x0); c1 = sm_t'(x1); t = sm_t'(tt);
      #1;
      for (int k = 0; k < 3; k++) begin
        al = ALGS[k];
        ea = mstar(al, mstar(al, v[0] + x0 + tt, v[1] - x0 + tt),
                       mstar(al, v[2] + x1 - tt, v[3] - x1 - tt));
        eb = mstar(al, mstar(al, v[0] + x0 - tt, v[1] - x0 - tt),
                       mstar(al, v[2] + x1 + tt, v[3] - x1 + tt));
        checks += 2;
        if (ya[k] !== sm_t'(ea)) begin
          failures++;
          if (failures < 10) $display("FAIL alg %0d ya got %0d exp %0d", al, ya[k], ea);
        end
        if (yb[k] !== sm_t'(eb)) begin
          failures++;
          if (failures < 10) $display("FAIL alg %0d yb got %0d exp %0d", al, yb[k], eb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
