// tb_turbo_encoder: encodes five random blocks (with gaps in the input
// stream) and compares the systematic, parity-1 and parity-2 streams with
// a reference built from the RSC shift-register model and the closed-form
// QPP permutation. Checks that the K outputs follow the last input
// directly, one per cycle, and that out_last marks the last one.
module tb_turbo_encoder;
  import tb_ref_pkg::*;

  localparam int K = 40;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, in_bit = 0;
  logic in_ready, out_valid, out_sys, out_p1, out_p2, out_last;

  turbo_encoder dut (.clk, .rst_n, .in_valid, .in_bit, .in_ready,
                     .out_valid, .out_sys, .out_p1, .out_p2, .out_last);

  always #5 clk = ~clk;

  logic e [K];
  logic p1 [K], p2 [K];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] s1, s2;
    logic [3:0] r;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 5; blk++) begin
      foreach (e[i]) e[i] = $urandom % 2;
      s1 = '0; s2 = '0;
      for (int i = 0; i < K; i++) begin
        r = rsc_step(s1, e[i]);               p1[i] = r[0]; s1 = r[3:1];
        r = rsc_step(s2, e[qpp(i, K, 3, 10)]); p2[i] = r[0]; s2 = r[3:1];
      end
      for (int i = 0; i < K; i++) begin
        @(negedge clk);
        while ($urandom % 5 == 0) begin in_valid = 0; @(negedge clk); end
        checks++;
        if (!in_ready) failures++;
        in_valid = 1; in_bit = e[i];
      end
      @(negedge clk);
      in_valid = 0;
      for (int i = 0; i < K; i++) begin
        checks += 5;
        if (!out_valid) failures++;
        if (out_sys !== e[i]) failures++;
        if (out_p1 !== p1[i]) failures++;
        if (out_p2 !== p2[i]) begin
          failures++;
          if (failures < 10) $display("FAIL blk %0d p2[%0d]", blk, i);
        end
        if (out_last !== (i == K - 1)) failures++;
        @(negedge clk);
      end
      checks++;
      if (out_valid || !in_ready) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
