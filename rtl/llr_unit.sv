// llr_unit: a-posteriori and extrinsic LLR of one trellis step.
//
// For each of the 16 branches s -> s' of a step it forms
// alpha(s) + G(s,s') + beta(s') and merges the eight branches with u = 1 and
// the eight with u = 0 in two max* trees of three levels. Their difference
// is, in the doubled metric domain of turbo_pkg, twice the a-posteriori LLR:
//   d   = max*_{u=1} - max*_{u=0}
//   llr = d / 2,  le = d/2 - Ls - La  (extrinsic, saturated to EXT_W bits)
//   hard = (d > 0)
// The halving truncates towards minus infinity. Combinational.
module llr_unit
  import turbo_pkg::*;
#(
  parameter corr_alg_e ALG = CORR_LOG_LUT
) (
  input  sm_vec_t  alpha,   // forward metrics at the start of the step
  input  sm_vec_t  beta,    // backward metrics at the end of the step
  input  bm_pair_t g,       // branch metrics of the step
  input  llr_t     ls,      // systematic LLR of the step
  input  ext_t     la,      // a-priori LLR of the step
  output ext_t     llr,     // a-posteriori LLR, saturated
  output ext_t     le,      // extrinsic LLR, saturated
  output logic     hard     // hard decision
);

  sm_t br [2][8];           // [u][index]
  sm_t lvl1 [2][4];
  sm_t lvl2 [2][2];
  sm_t top  [2];

  for (genvar s = 0; s < 8; s++) begin : g_br
    for (genvar a = 0; a < 2; a++) begin : g_a
      localparam int unsigned U  = {31'd0, trel_u(s, a)};
      localparam int unsigned NX = trel_next(s, a);
      // of the two branches leaving s exactly one has u = 1
      assign br[U][s] = alpha[s] + sm_t'(branch_metric(g, s, a)) + beta[NX];
    end
  end

  for (genvar u = 0; u < 2; u++) begin : g_tree
    for (genvar i = 0; i < 4; i++) begin : g_l1
      maxstar #(.ALG(ALG)) u_m (.a(br[u][2*i]), .b(br[u][2*i+1]), .y(lvl1[u][i]));
    end
    for (genvar i = 0; i < 2; i++) begin : g_l2
      maxstar #(.ALG(ALG)) u_m (.a(lvl1[u][2*i]), .b(lvl1[u][2*i+1]), .y(lvl2[u][i]));
    end
    maxstar #(.ALG(ALG)) u_top (.a(lvl2[u][0]), .b(lvl2[u][1]), .y(top[u]));
  end

  sm_t d, ext_wide, sys;

  always_comb begin
    d        = top[1] - top[0];
    sys      = sm_t'(ls) + sm_t'(la);
    ext_wide = (d - (sys <<< 1)) >>> 1;
    llr      = sat_ext(d >>> 1);
    le       = sat_ext(ext_wide);
    hard     = !d[SM_W-1] && (d != '0);
  end

endmodule
