// tb_turbo_codec_top: end-to-end test of the codec at its default
// parameters (K = 40, QPP F1 = 3 / F2 = 10, up to 8 iterations, exact-table
// max*). Each block: random information bits go through the turbo encoder;
// its output is checked against a reference encoder, sent over a BPSK/AWGN
// channel model, quantised to LLRs and decoded by the turbo decoder. The
// decoded bits and iteration count are compared with a bit-exact reference
// decoder, and at moderate noise with the information bits themselves.
// The last blocks replace the channel output by strong random LLRs that fit
// no codeword, so the decoder keeps changing its decisions.
// The test counts the mechanisms of the design and fails if one never
// occurred: early stop, running to the iteration limit, decoder-2 passes in
// interleaved order, correction of channel errors and a nonzero max*
// correction. Wrap-around of the modulo state metrics is counted and shown.
module tb_turbo_codec_top;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  localparam int K = 40, F1 = 3, F2 = 10, MAX_ITER = 8, NBLK = 24;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic enc_in_valid = 0, enc_in_bit = 0;
  logic enc_in_ready, enc_out_valid, enc_out_sys, enc_out_p1, enc_out_p2, enc_out_last;
  logic dec_in_valid = 0;
  llr_t dec_in_ls, dec_in_lp1, dec_in_lp2;
  logic dec_in_ready, dec_out_valid, dec_out_bit, dec_out_last;
  logic [3:0] dec_iterations;

  turbo_codec_top dut (.*);

  always #5 clk = ~clk;

  // mechanism counters
  int n_early = 0, n_max = 0, n_pass2 = 0, n_corrected = 0, n_wrap = 0, n_corr = 0;
  logic second_q = 0;
  sm_vec_t alpha_q, beta_q;
  // a metric moved between the top and the bottom quarter of its range
  function automatic bit wrapped(input sm_t a, input sm_t b);
    return (a[SM_W-1:SM_W-2] == 2'b01 && b[SM_W-1:SM_W-2] == 2'b10) ||
           (a[SM_W-1:SM_W-2] == 2'b10 && b[SM_W-1:SM_W-2] == 2'b01);
  endfunction
  always @(posedge clk) begin
    second_q <= dut.u_dec.second;
    if (dut.u_dec.second && !second_q) n_pass2++;
    alpha_q <= dut.u_dec.u_siso.alpha_cur;
    beta_q  <= dut.u_dec.u_siso.beta_cur;
    for (int s = 0; s < 8; s++) begin
      if (wrapped(alpha_q[s], dut.u_dec.u_siso.alpha_cur[s])) n_wrap++;
      if (wrapped(beta_q[s], dut.u_dec.u_siso.beta_cur[s])) n_wrap++;
    end
    // alpha + beta in the LLR unit leaves the metric range and wraps
    if (dut.u_dec.u_siso.out_valid &&
        (int'(dut.u_dec.u_siso.alpha_pair[0]) + int'(dut.u_dec.u_siso.beta_cur[0]) > 8191 ||
         int'(dut.u_dec.u_siso.alpha_pair[0]) + int'(dut.u_dec.u_siso.beta_cur[0]) < -8192))
      n_wrap++;
    if (dut.u_dec.u_siso.u_alpha.g_pair[0].u_msr.u_shared0.u_max.corr != 0) n_corr++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit info[K];
  int ls[], lp1[], lp2[];
  bit dec_ref[];
  bit sys[K], p1[K], p2[K];

  initial begin
    logic [2:0] s1, s2;
    logic [3:0] r;
    real sigma;
    int it_ref, n, errs, chan_errs;
    ls = new[K]; lp1 = new[K]; lp2 = new[K];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < NBLK; blk++) begin
      sigma = (blk < 4) ? 0.5 : (blk < 12) ? 0.75 : 2.5;
      foreach (info[i]) info[i] = $urandom % 2;
      // encode
      for (int i = 0; i < K; i++) begin
        @(negedge clk);
        enc_in_valid = 1; enc_in_bit = info[i];
      end
      @(negedge clk);
      enc_in_valid = 0;
      n = 0;
      while (n < K) begin
        if (enc_out_valid) begin
          sys[n] = enc_out_sys; p1[n] = enc_out_p1; p2[n] = enc_out_p2;
          n++;
        end
        @(negedge clk);
      end
      s1 = '0; s2 = '0; errs = 0;
      for (int i = 0; i < K; i++) begin
        r = rsc_step(s1, info[i]); s1 = r[3:1];
        if (sys[i] != info[i] || p1[i] != r[0]) errs++;
        r = rsc_step(s2, info[qpp(i, K, F1, F2)]); s2 = r[3:1];
        if (p2[i] != r[0]) errs++;
      end
      checks++;
      if (errs != 0) begin
        failures++;
        $display("FAIL blk %0d: %0d encoder bit errors", blk, errs);
      end
      // channel
      chan_errs = 0;
      for (int i = 0; i < K; i++) begin
        ls[i]  = chan_llr(sys[i], sigma);
        lp1[i] = chan_llr(p1[i], sigma);
        lp2[i] = chan_llr(p2[i], sigma);
        if (blk >= 12) begin
          // strong interference: random LLRs unrelated to the codeword
          ls[i]  = ($urandom % 2) ? 20 + int'($urandom % 12) : -20 - int'($urandom % 12);
          lp1[i] = ($urandom % 2) ? 20 + int'($urandom % 12) : -20 - int'($urandom % 12);
          lp2[i] = ($urandom % 2) ? 20 + int'($urandom % 12) : -20 - int'($urandom % 12);
        end
        if ((ls[i] > 0) != info[i]) chan_errs++;
      end
      it_ref = turbo_ref(5, K, F1, F2, MAX_ITER, ls, lp1, lp2, dec_ref);
      // decode
      for (int i = 0; i < K; i++) begin
        @(negedge clk);
        dec_in_valid = 1;
        dec_in_ls = llr_t'(ls[i]); dec_in_lp1 = llr_t'(lp1[i]); dec_in_lp2 = llr_t'(lp2[i]);
      end
      @(negedge clk);
      dec_in_valid = 0;
      n = 0; errs = 0;
      while (n < K) begin
        if (dec_out_valid) begin
          if (dec_out_bit != dec_ref[n]) errs++;
          if (sigma < 1.0 && dec_out_bit != info[n]) errs++;
          n++;
        end
        @(negedge clk);
      end
      checks += 2;
      if (errs != 0) begin
        failures++;
        $display("FAIL blk %0d: %0d decoded bit mismatches", blk, errs);
      end
      if (int'(dec_iterations) != it_ref) begin
        failures++;
        $display("FAIL blk %0d: %0d iterations, expected %0d", blk, dec_iterations, it_ref);
      end
      if (it_ref < MAX_ITER) n_early++; else n_max++;
      if (sigma < 1.0) n_corrected += chan_errs;
    end
    $display("early stop %0d, iteration limit %0d, decoder-2 passes %0d, channel errors corrected %0d, metric wraps %0d, max* corrections %0d",
             n_early, n_max, n_pass2, n_corrected, n_wrap, n_corr);
    // metric wrap-around is reported only: at K = 40 the metrics rarely reach
    // the end of their range (it is checked in the state metric unit test)
    checks += 5;
    if (n_early == 0) failures++;
    if (n_max == 0) failures++;
    if (n_pass2 == 0) failures++;
    if (n_corrected == 0) failures++;
    if (n_corr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
