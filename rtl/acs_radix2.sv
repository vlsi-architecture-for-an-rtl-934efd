// acs_radix2: radix-2 add-compare-select unit for the log-MAP recursions.
//
// It adds an antipodal branch metric pair to two incoming state metrics and
// merges them with max*:   y = max*(m0 + g, m1 - g).
// In the LTE trellis the two branches that meet in one state (forward) or
// that leave one state (backward) always carry +G and -G, so one signed
// branch metric input is enough; the caller picks G and its sign from the
// trellis. The compare, select and correction are done by maxstar.
// Combinational; modulo arithmetic as in turbo_pkg.
module acs_radix2
  import turbo_pkg::*;
#(
  parameter corr_alg_e ALG = CORR_LOG_LUT
) (
  input  sm_t m0,   // metric reached through the +g branch
  input  sm_t m1,   // metric reached through the -g branch
  input  sm_t g,    // signed branch metric (sign-extended)
  output sm_t y
);

  sm_t add0, add1;

  always_comb begin
    add0 = m0 + g;
    add1 = m1 - g;
  end

  maxstar #(.ALG(ALG)) u_max (.a(add0), .b(add1), .y(y));

endmodule
