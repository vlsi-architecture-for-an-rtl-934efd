// tb_turbo_decoder_lte_k6144: runs the turbo decoder at the largest LTE
// block size, K = 6144 with QPP coefficients F1 = 263, F2 = 480, on two
// noisy codewords. Decoded bits and iteration counts are compared with the
// bit-exact reference decoder and with the information bits. At this
// length the modulo state metrics wrap around many times per pass; the test
// counts the wraps of the alpha and beta registers and fails if none
// happened.
module tb_turbo_decoder_lte_k6144;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  localparam int K = 6144, F1 = 263, F2 = 480, MAX_ITER = 8, NBLK = 2;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, in_valid = 0;
  llr_t in_ls, in_lp1, in_lp2;
  logic in_ready, out_valid, out_bit, out_last;
  logic [3:0] iterations;

  turbo_decoder #(.K(K), .F1(F1), .F2(F2)) dut (
    .clk, .rst_n, .in_valid, .in_ls, .in_lp1, .in_lp2, .in_ready,
    .out_valid, .out_bit, .out_last, .iterations
  );

  always #5 clk = ~clk;

  int n_wrap = 0;
  sm_vec_t alpha_q, beta_q;
  always @(posedge clk) begin
    alpha_q <= dut.u_siso.alpha_cur;
    beta_q  <= dut.u_siso.beta_cur;
    for (int s = 0; s < 8; s++) begin
      if (alpha_q[s][SM_W-1:SM_W-2] == 2'b01 && dut.u_siso.alpha_cur[s][SM_W-1:SM_W-2] == 2'b10) n_wrap++;
      if (beta_q[s][SM_W-1:SM_W-2]  == 2'b01 && dut.u_siso.beta_cur[s][SM_W-1:SM_W-2]  == 2'b10) n_wrap++;
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ls[], lp1[], lp2[];
  bit info[], dec_ref[];

  initial begin
    logic [2:0] s1, s2;
    logic [3:0] r;
    int it_ref, n, errs_ref, errs_info, cycles;
    ls = new[K]; lp1 = new[K]; lp2 = new[K]; info = new[K];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < NBLK; blk++) begin
      s1 = '0; s2 = '0;
      foreach (info[i]) info[i] = $urandom % 2;
      for (int i = 0; i < K; i++) begin
        r = rsc_step(s1, info[i]); s1 = r[3:1];
        lp1[i] = chan_llr(r[0], 0.8);
        r = rsc_step(s2, info[qpp(i, K, F1, F2)]); s2 = r[3:1];
        lp2[i] = chan_llr(r[0], 0.8);
        ls[i] = chan_llr(info[i], 0.8);
      end
      it_ref = turbo_ref(5, K, F1, F2, MAX_ITER, ls, lp1, lp2, dec_ref);
      for (int i = 0; i < K; i++) begin
        @(negedge clk);
        in_valid = 1;
        in_ls = llr_t'(ls[i]); in_lp1 = llr_t'(lp1[i]); in_lp2 = llr_t'(lp2[i]);
      end
      @(negedge clk);
      in_valid = 0;
      cycles = 1;
      while (!out_valid) begin @(negedge clk); cycles++; end
      n = 0; errs_ref = 0; errs_info = 0;
      while (n < K) begin
        if (out_bit != dec_ref[n]) errs_ref++;
        if (out_bit != info[n]) errs_info++;
        n++;
        @(negedge clk);
      end
      checks += 4;
      if (errs_ref != 0) begin
        failures++;
        $display("FAIL blk %0d: %0d bits differ from the reference decoder", blk, errs_ref);
      end
      if (errs_info != 0) begin
        failures++;
        $display("FAIL blk %0d: %0d residual bit errors", blk, errs_info);
      end
      if (int'(iterations) != it_ref) begin
        failures++;
        $display("FAIL blk %0d: %0d iterations, expected %0d", blk, iterations, it_ref);
      end
      if (cycles != it_ref * 2 * (2 * K + 1) + 1) begin
        failures++;
        $display("FAIL blk %0d: %0d cycles to first output", blk, cycles);
      end
      $display("block %0d: %0d iterations, %0d cycles", blk, it_ref, cycles);
    end
    $display("state metric wraps: %0d", n_wrap);
    checks++;
    if (n_wrap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
