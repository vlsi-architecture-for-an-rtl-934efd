// tb_llr_unit: feeds random forward/backward metrics and branch inputs to
// the LLR unit and compares the a-posteriori LLR, the extrinsic LLR and the
// hard decision with the reference model (same pairwise max* tree order),
// for the exact-table and the max-log correction.
module tb_llr_unit;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  sm_vec_t alpha, beta;
  bm_pair_t g;
  llr_t ls;
  ext_t la;
  ext_t llr [2], le [2];
  logic hard [2];

  llr_unit #(.ALG(CORR_LOG_LUT)) u0 (.alpha, .beta, .g, .ls, .la, .llr(llr[0]), .le(le[0]), .hard(hard[0]));
  llr_unit #(.ALG(CORR_MAX_LOG)) u1 (.alpha, .beta, .g, .ls, .la, .llr(llr[1]), .le(le[1]), .hard(hard[1]));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a[8], b[8], s, p, al, d, base;
    for (int i = 0; i < 3000; i++) begin
      int span;
      span = (i % 2) ? 24 : 300;
      base = int'($urandom % 16000) - 8000;    // wraps metrics around
      for (int k = 0; k < 8; k++) begin
        a[k] = base + int'($urandom % span);
        b[k] = int'($urandom % span) - base / 3;
        alpha[k] = sm_t'(a[k]);
        beta[k]  = sm_t'(b[k]);
      end
      s  = int'($urandom % 64) - 32;
      al = int'($urandom % 256) - 128;
      p  = int'($urandom % 64) - 32;
      ls = llr_t'(s); la = ext_t'(al);
      g.g1 = bm_t'(s + al + p); g.g2 = bm_t'(s + al - p);
      #1;
      for (int k = 0; k < 2; k++) begin
        d = llr_step(k == 0 ? 5 : 0, a, b, s + al, p);
        checks += 3;
        if (llr[k] !== ext_t'(sat(half(d), 8))) begin
          failures++;
          if (failures < 10) $display("FAIL llr alg%0d got %0d exp %0d", k, llr[k], half(d));
        end
        if (le[k] !== ext_t'(sat(half(d - 2 * (s + al)), 8))) begin
          failures++;
          if (failures < 10) $display("FAIL le alg%0d got %0d", k, le[k]);
        end
        if (hard[k] !== (d > 0)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
