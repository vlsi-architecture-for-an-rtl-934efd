// tb_turbo_decoder: decodes noisy LTE turbo codewords with six decoders
// side by side, one per max* correction algorithm, and compares each
// decoder's output bits and iteration count with a bit-exact reference
// turbo decoder. Blocks range from clean channels (early stop after two
// iterations) to very noisy ones and blocks of random LLRs that match no
// codeword (all MAX_ITER iterations). It checks the
// block timing (2K+1 cycles per half iteration) and that the exact-table
// decoder corrects all channel errors at moderate noise.
module tb_turbo_decoder;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  localparam int K = 40, F1 = 3, F2 = 10, MAX_ITER = 8, NBLK = 16;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, in_valid = 0;
  llr_t in_ls, in_lp1, in_lp2;
  logic in_ready [6], out_valid [6], out_bit [6], out_last [6];
  logic [3:0] iterations [6];

  for (genvar a = 0; a < 6; a++) begin : g_dec
    turbo_decoder #(.ALG(corr_alg_e'(a))) dut (
      .clk, .rst_n, .in_valid, .in_ls, .in_lp1, .in_lp2,
      .in_ready(in_ready[a]), .out_valid(out_valid[a]), .out_bit(out_bit[a]),
      .out_last(out_last[a]), .iterations(iterations[a])
    );
  end

  always #5 clk = ~clk;

  int ls[], lp1[], lp2[];
  bit info[K];
  bit dec_ref[6][];
  int it_ref[6];
  int n_early = 0, n_max = 0, n_chan_err = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-decoder output monitors
  bit   got [6][K];
  int   got_n [6];
  int   done_cycle [6];
  int   cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int a = 0; a < 6; a++)
      if (out_valid[a]) begin
        got[a][got_n[a]] = out_bit[a];
        got_n[a] = got_n[a] + 1;
        if (out_last[a]) done_cycle[a] = cyc;
      end
  end

  initial begin
    logic [2:0] s1, s2;
    logic [3:0] r;
    real sigma;
    int start_cycle, errs, chan_errs;
    ls = new[K]; lp1 = new[K]; lp2 = new[K];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < NBLK; blk++) begin
      sigma = (blk < 3) ? 0.5 : (blk < 8) ? 0.75 : 2.0;
      s1 = '0; s2 = '0; chan_errs = 0;
      foreach (info[i]) info[i] = $urandom % 2;
      for (int i = 0; i < K; i++) begin
        r = rsc_step(s1, info[i]); s1 = r[3:1];
        lp1[i] = chan_llr(r[0], sigma);
        r = rsc_step(s2, info[qpp(i, K, F1, F2)]); s2 = r[3:1];
        lp2[i] = chan_llr(r[0], sigma);
        ls[i] = chan_llr(info[i], sigma);
        if (blk >= 12) begin
          // inconsistent inputs: no codeword fits, decisions keep changing
          ls[i]  = int'($urandom % 64) - 32;
          lp1[i] = int'($urandom % 64) - 32;
          lp2[i] = int'($urandom % 64) - 32;
        end
        if ((ls[i] > 0) != info[i]) chan_errs++;
      end
      for (int a = 0; a < 6; a++) begin
        it_ref[a] = turbo_ref(a, K, F1, F2, MAX_ITER, ls, lp1, lp2, dec_ref[a]);
        got_n[a] = 0;
        done_cycle[a] = -1;
      end
      for (int i = 0; i < K; i++) begin
        @(negedge clk);
        in_valid = 1;
        in_ls = llr_t'(ls[i]); in_lp1 = llr_t'(lp1[i]); in_lp2 = llr_t'(lp2[i]);
      end
      @(negedge clk);
      start_cycle = cyc;          // first cycle after the last input
      in_valid = 0;
      while (done_cycle[0] < 0 || done_cycle[1] < 0 || done_cycle[2] < 0 ||
             done_cycle[3] < 0 || done_cycle[4] < 0 || done_cycle[5] < 0)
        @(negedge clk);
      for (int a = 0; a < 6; a++) begin
        errs = 0;
        for (int i = 0; i < K; i++) begin
          if (got[a][i] != dec_ref[a][i]) errs++;
          if (a == 5 && sigma < 1.0 && got[a][i] != info[i]) errs++;
        end
        checks += 4;
        if (errs != 0) begin
          failures++;
          $display("FAIL blk %0d alg %0d: %0d bit mismatches", blk, a, errs);
        end
        if (got_n[a] != K) failures++;
        if (int'(iterations[a]) != it_ref[a]) begin
          failures++;
          $display("FAIL blk %0d alg %0d: %0d iterations, expected %0d", blk, a, iterations[a], it_ref[a]);
        end
        // decode time: 2 half iterations of 2K+1 cycles each, then K outputs
        if (done_cycle[a] - start_cycle + 1 != it_ref[a] * 2 * (2 * K + 1) + K) begin
          failures++;
          $display("FAIL blk %0d alg %0d: %0d cycles", blk, a, done_cycle[a] - start_cycle + 1);
        end
      end
      if (it_ref[5] < MAX_ITER) n_early++; else n_max++;
      if (sigma < 1.0) n_chan_err += chan_errs;
      repeat (2) @(negedge clk);
    end
    $display("blocks stopped early %0d, at MAX_ITER %0d, channel errors corrected %0d",
             n_early, n_max, n_chan_err);
    checks += 3;
    if (n_early == 0) failures++;
    if (n_max == 0) failures++;
    if (n_chan_err == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
