// tb_qpp_interleaver: compares the recursive address sequence with the
// closed form (F1*i + F2*i^2) mod K for the default K = 40 and for two
// larger LTE sizes (K = 1024 and the largest, K = 6144), checks that every
// sequence is a permutation, and that start restarts it.
module tb_qpp_interleaver;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, next = 0;
  logic [5:0]  a40;
  logic [9:0]  a1024;
  logic [12:0] a6144;

  qpp_interleaver                                   u40   (.clk, .rst_n, .start, .next, .addr(a40));
  qpp_interleaver #(.K(1024), .F1(31), .F2(64))     u1024 (.clk, .rst_n, .start, .next, .addr(a1024));
  qpp_interleaver #(.K(6144), .F1(263), .F2(480))   u6144 (.clk, .rst_n, .start, .next, .addr(a6144));

  always #5 clk = ~clk;

  bit seen40 [40];
  bit seen1024 [1024];
  bit seen6144 [6144];

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 2; rep++) begin
      @(negedge clk); start = 1;
      @(negedge clk); start = 0; next = 1;
      foreach (seen40[i]) seen40[i] = 0;
      foreach (seen1024[i]) seen1024[i] = 0;
      foreach (seen6144[i]) seen6144[i] = 0;
      for (int i = 0; i < 6144; i++) begin
        if (i < 40) begin
          checks++;
          if (int'(a40) != qpp(i, 40, 3, 10)) failures++;
          seen40[a40] = 1;
        end
        if (i < 1024) begin
          checks++;
          if (int'(a1024) != qpp(i, 1024, 31, 64)) failures++;
          seen1024[a1024] = 1;
        end
        checks++;
        if (int'(a6144) != qpp(i, 6144, 263, 480)) begin
          failures++;
          if (failures < 5) $display("FAIL i=%0d got %0d", i, a6144);
        end
        seen6144[a6144] = 1;
        @(negedge clk);
        if (rep == 1 && i == 40) break;   // second round: restart check only
      end
      next = 0;
      if (rep == 0) begin
        checks += 3;
        foreach (seen40[i]) if (!seen40[i]) begin failures++; break; end
        foreach (seen1024[i]) if (!seen1024[i]) begin failures++; break; end
        foreach (seen6144[i]) if (!seen6144[i]) begin failures++; break; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
