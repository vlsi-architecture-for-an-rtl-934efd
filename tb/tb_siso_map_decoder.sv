// tb_siso_map_decoder: runs four decoding passes of the SISO decoder on
// noisy codewords of the RSC code with random a-priori values and compares
// every extrinsic LLR, a-posteriori LLR and hard decision with a radix-2
// log-MAP reference (same max* tree order, plain integers). It also checks
// the pass latency: K/2 forward plus K/2 backward cycles after the last
// input, two bits per backward cycle.
module tb_siso_map_decoder;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  localparam int K = 40;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, in_valid = 0;
  llr_t in_ls, in_lp;
  ext_t in_la;
  logic busy, out_valid, done;
  logic [$clog2(K)-1:0] out_idx;
  ext_t out_le [2], out_llr [2];
  logic out_hard [2];

  siso_map_decoder #(.K(K)) dut (
    .clk, .rst_n, .in_valid, .in_ls, .in_la, .in_lp, .busy,
    .out_valid, .out_idx, .out_le, .out_llr, .out_hard, .done
  );

  always #5 clk = ~clk;

  int ls[K], la[K], lp[K];
  int alpha[K+1][8], beta[K+1][8];
  int exp_llr[K], exp_le[K];
  int got_le[K], got_llr[K];
  bit got_hard[K], seen[K];
  int cycles, pairs;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic make_block(input real sigma);
    logic [2:0] st;
    logic [3:0] r;
    logic u;
    st = '0;
    for (int i = 0; i < K; i++) begin
      u = $urandom % 2;
      r = rsc_step(st, u);
      st = r[3:1];
      ls[i] = chan_llr(u, sigma);
      lp[i] = chan_llr(r[0], sigma);
      la[i] = int'($urandom % 97) - 48;
    end
  endtask

  task automatic reference();
    int d;
    alpha[0] = '{0, -1024, -1024, -1024, -1024, -1024, -1024, -1024};
    for (int i = 0; i < K; i++) fwd_step(5, alpha[i], ls[i] + la[i], lp[i], alpha[i+1]);
    beta[K] = '{default: 0};
    for (int i = K - 1; i >= 0; i--) bwd_step(5, beta[i+1], ls[i] + la[i], lp[i], beta[i]);
    for (int i = 0; i < K; i++) begin
      d = llr_step(5, alpha[i], beta[i+1], ls[i] + la[i], lp[i]);
      exp_llr[i] = sat(half(d), 8);
      exp_le[i]  = sat(half(d - 2 * (ls[i] + la[i])), 8);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 4; blk++) begin
      make_block(blk == 0 ? 0.6 : 1.0);
      reference();
      foreach (seen[i]) seen[i] = 0;
      for (int i = 0; i < K; i++) begin
        @(negedge clk);
        in_valid = 1;
        in_ls = llr_t'(ls[i]); in_la = ext_t'(la[i]); in_lp = llr_t'(lp[i]);
      end
      @(negedge clk);
      in_valid = 0;
      cycles = 1;
      pairs = 0;
      while (!done) begin
        if (out_valid) begin
          pairs++;
          for (int b = 0; b < 2; b++) begin
            got_le[2*out_idx + b]   = out_le[b];
            got_llr[2*out_idx + b]  = out_llr[b];
            got_hard[2*out_idx + b] = out_hard[b];
            seen[2*out_idx + b] = 1;
          end
        end
        @(negedge clk);
        cycles++;
      end
      checks += 2;
      if (cycles != K + 1) begin
        failures++;
        $display("FAIL latency %0d cycles, expected %0d", cycles, K + 1);
      end
      if (pairs != K / 2) begin
        failures++;
        $display("FAIL %0d output pairs", pairs);
      end
      for (int i = 0; i < K; i++) begin
        checks += 3;
        if (!seen[i] || got_le[i] != exp_le[i]) begin
          failures++;
          if (failures < 10) $display("FAIL blk %0d bit %0d le got %0d exp %0d", blk, i, got_le[i], exp_le[i]);
        end
        if (!seen[i] || got_llr[i] != exp_llr[i]) failures++;
        if (!seen[i] || got_hard[i] != (exp_llr[i] > 0 || (exp_llr[i] == 0 && got_hard[i]))) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
