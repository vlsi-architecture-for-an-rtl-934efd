// tb_acs_radix2: checks y = max*(m0 + g, m1 - g) of the radix-2 ACS for
// the exact-table and the max-log correction, on random metrics and branch
// metrics, against the reference max*.
module tb_acs_radix2;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  sm_t m0, m1, g, y_lut, y_max;

  acs_radix2 #(.ALG(CORR_LOG_LUT)) u_lut (.m0, .m1, .g, .y(y_lut));
  acs_radix2 #(.ALG(CORR_MAX_LOG)) u_max (.m0, .m1, .g, .y(y_max));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int a, b, c;
      a = int'($urandom % 2048) - 1024;
      b = a + int'($urandom % 128) - 64;
      c = int'($urandom % 400) - 200;
      if (i < 20) b = a + 2 * c + (i - 10);   // operands within the table range
      m0 = sm_t'(a); m1 = sm_t'(b); g = sm_t'(c);
      #1;
      checks += 2;
      if (y_lut !== sm_t'(mstar(5, a + c, b - c))) begin
        failures++;
        $display("FAIL lut m0=%0d m1=%0d g=%0d got %0d", a, b, c, y_lut);
      end
      if (y_max !== sm_t'(mstar(0, a + c, b - c))) begin
        failures++;
        $display("FAIL max m0=%0d m1=%0d g=%0d got %0d", a, b, c, y_max);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
