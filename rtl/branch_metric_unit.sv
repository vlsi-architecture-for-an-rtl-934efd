// branch_metric_unit: branch metrics (gamma) of one trellis step.
//
// For the LTE RSC code every branch carries one of four symbol pairs (u,p);
// with antipodal symbols the branch metric of the log-MAP recursion is
//     G(u,p) = u*(Ls + La) + p*Lp
// (twice gamma' of the textbook form, see turbo_pkg). Only two magnitudes
// occur, G1 = (Ls+La)+Lp for u = p and G2 = (Ls+La)-Lp for u != p; the other
// two branch metrics are their negations and are formed where they are used.
// Combinational: two adders and a subtractor.
module branch_metric_unit
  import turbo_pkg::*;
(
  input  llr_t     ls,   // systematic channel LLR
  input  ext_t     la,   // a-priori LLR (extrinsic of the other decoder)
  input  llr_t     lp,   // parity channel LLR
  output bm_pair_t g
);

  bm_t sys;

  always_comb begin
    sys  = bm_t'(ls) + bm_t'(la);
    g.g1 = sys + bm_t'(lp);
    g.g2 = sys - bm_t'(lp);
  end

endmodule
