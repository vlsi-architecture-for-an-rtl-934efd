// state_metric_unit: radix-4 forward (alpha) or backward (beta) state metric
// recursion over the 8-state LTE trellis, built from four MSR radix-4 ACS
// pairs.
//
// Each enabled cycle advances the eight metrics by two trellis steps:
//   forward  (BACKWARD = 0): alpha_k     from alpha_{k-2}
//   backward (BACKWARD = 1): beta_{k-2}  from beta_k
// g_early holds the branch metrics of the step from k-2 to k-1, g_late those
// of the step from k-1 to k. The pairing of states onto the MSR units follows
// from the trellis (turbo_pkg):
//   backward, unit q = {s1,s2}: sources {s1,s2,0} and {s1,s2,1} share the
//     four successors {a2,a1,s1}; the shared first level merges paths with
//     the same middle state and uses g_late, the second level uses g_early.
//   forward, unit q = {d2,d3}: targets {0,d2,d3} and {1,d2,d3} share the
//     four predecessors {d3,x,y}; the first level merges paths with the same
//     middle state and uses g_early, the second level uses g_late.
// init loads init_val (start of a recursion); en performs one radix-4 step;
// init has priority. sm holds the current metrics (registered).
module state_metric_unit
  import turbo_pkg::*;
#(
  parameter bit        BACKWARD = 1'b0,
  parameter corr_alg_e ALG      = CORR_LOG_LUT
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     init,
  input  sm_vec_t  init_val,
  input  logic     en,
  input  bm_pair_t g_early,
  input  bm_pair_t g_late,
  output sm_vec_t  sm
);

  sm_vec_t nxt;

  for (genvar q = 0; q < 4; q++) begin : g_pair
    sm_t m00, m01, m10, m11, c0, c1, t, ya, yb;
    if (BACKWARD) begin : g_bwd
      localparam int unsigned S1 = q / 2;
      localparam int unsigned S2 = q % 2;
      localparam int unsigned SA = 4*S1 + 2*S2;     // {s1,s2,0}
      localparam int unsigned M0 = 2*S1 + S2;       // {0,s1,s2}
      localparam int unsigned M1 = 4 + 2*S1 + S2;   // {1,s1,s2}
      assign m00 = sm[0 + 0 + S1];                  // {0,0,s1}
      assign m01 = sm[4 + 0 + S1];                  // {1,0,s1}
      assign m10 = sm[0 + 2 + S1];                  // {0,1,s1}
      assign m11 = sm[4 + 2 + S1];                  // {1,1,s1}
      assign c0  = sm_t'(branch_metric(g_late,  M0, 0));
      assign c1  = sm_t'(branch_metric(g_late,  M1, 0));
      assign t   = sm_t'(branch_metric(g_early, SA, 0));
      assign nxt[SA]     = ya;
      assign nxt[SA + 1] = yb;
    end else begin : g_fwd
      localparam int unsigned D2 = q / 2;
      localparam int unsigned D3 = q % 2;
      localparam int unsigned DA = 2*D2 + D3;        // {0,d2,d3}
      localparam int unsigned S00 = 4*D3;            // {d3,0,0}
      localparam int unsigned S10 = 4*D3 + 2;        // {d3,1,0}
      localparam int unsigned MM0 = 4*D2 + 2*D3;     // {d2,d3,0}
      assign m00 = sm[S00];
      assign m01 = sm[S00 + 1];
      assign m10 = sm[S10];
      assign m11 = sm[S10 + 1];
      assign c0  = sm_t'(branch_metric(g_early, S00, D2));
      assign c1  = sm_t'(branch_metric(g_early, S10, D2));
      assign t   = sm_t'(branch_metric(g_late,  MM0, 0));
      assign nxt[DA]     = ya;
      assign nxt[DA + 4] = yb;
    end
    msr_acs_radix4 #(.ALG(ALG)) u_msr (
      .m00(m00), .m01(m01), .m10(m10), .m11(m11),
      .c0(c0), .c1(c1), .t(t), .ya(ya), .yb(yb)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sm <= '0;
    else if (init) sm <= init_val;
    else if (en)   sm <= nxt;
  end

endmodule
