// msr_acs_radix4: radix-4 add-compare-select for a pair of trellis states
// with Maximum Shared Resource (MSR).
//
// A radix-4 ACS merges the four two-step paths that reach one state. In the
// 8-state LTE trellis two states always share the same four source metrics,
// and when the four paths are grouped by their middle state, the two
// operands of each first-level max* differ by the same distance for both
// states. The first-level compare, select and correction are therefore
// computed once and shared:
//     u0 = max*(m00 + c0, m01 - c0)          shared first level
//     u1 = max*(m10 + c1, m11 - c1)          shared first level
//     ya = max*(u0 + t, u1 - t)              state A
//     yb = max*(u0 - t, u1 + t)              state B
// c0/c1 are the signed branch metrics of the first-level step, t that of the
// second-level step; the state_metric_unit wires them from the trellis for
// the forward and the backward recursion. A conventional radix-4 pair needs
// six radix-2 ACS; this one needs four. Combinational.
module msr_acs_radix4
  import turbo_pkg::*;
#(
  parameter corr_alg_e ALG = CORR_LOG_LUT
) (
  input  sm_t m00, m01, m10, m11,  // source metrics, two groups of two
  input  sm_t c0,                  // first-level branch metric, group 0
  input  sm_t c1,                  // first-level branch metric, group 1
  input  sm_t t,                   // second-level branch metric
  output sm_t ya,
  output sm_t yb
);

  sm_t u0, u1, t_neg;

  assign t_neg = -t;

  acs_radix2 #(.ALG(ALG)) u_shared0 (.m0(m00), .m1(m01), .g(c0),    .y(u0));
  acs_radix2 #(.ALG(ALG)) u_shared1 (.m0(m10), .m1(m11), .g(c1),    .y(u1));
  acs_radix2 #(.ALG(ALG)) u_state_a (.m0(u0),  .m1(u1),  .g(t),     .y(ya));
  acs_radix2 #(.ALG(ALG)) u_state_b (.m0(u0),  .m1(u1),  .g(t_neg), .y(yb));

endmodule
