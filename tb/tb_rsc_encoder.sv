// tb_rsc_encoder: drives random bit blocks into the RSC encoder and
// compares every parity bit and the state with the shift-register model
// of the reference package; also checks that clear restarts from zero.
module tb_rsc_encoder;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, in_bit = 0;
  logic parity;
  logic [2:0] state;
  logic [2:0] ref_st;
  logic [3:0] r;

  rsc_encoder dut (.clk, .rst_n, .clear, .in_valid, .in_bit, .parity, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 20; blk++) begin
      @(negedge clk);
      clear = 1;
      @(negedge clk);
      clear = 0;
      ref_st = 3'b000;
      for (int i = 0; i < 60; i++) begin
        in_valid = ($urandom % 4) != 0;
        in_bit   = $urandom % 2;
        #1;
        r = rsc_step(ref_st, in_bit);
        checks += 2;
        if (state !== ref_st) failures++;
        if (parity !== r[0]) failures++;
        @(negedge clk);
        if (in_valid) ref_st = r[3:1];
      end
      in_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
