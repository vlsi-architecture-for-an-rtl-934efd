// turbo_pkg: types, widths and trellis helpers shared by the LTE turbo
// encoder and the radix-4 MSR turbo decoder.
//
// Number representation. Channel and a-priori values are two's-complement
// log-likelihood ratios L = ln(P(u=1)/P(u=0)) in units of 1/4 (two fractional
// bits). Branch and state metrics are kept in a "doubled" domain: the branch
// metric of a transition with antipodal symbols u,p in {-1,+1} is
//     G = u*(Ls + La) + p*Lp          (= 2 * gamma' of the log-MAP recursion)
// which avoids the halving of the textbook formula. State metrics use modulo
// (wrap-around) arithmetic of SM_W bits; every comparison is done on a
// difference, so no normalisation step is needed as long as the spread of the
// metrics stays below 2^(SM_W-1).
//
// Trellis. The constituent code is the 8-state LTE RSC code with feedback
// polynomial 1+D^2+D^3 and parity polynomial 1+D+D^3. A state is written
// s = {s1,s2,s3} with s1 the most recent register bit (s[2]). With feedback
// bit a, the systematic bit is u = a^s2^s3, the parity bit p = a^s1^s3 and the
// next state is {a,s1,s2}. Both branches that leave one state (a=0/1), and
// both branches that enter one state, carry antipodal symbol pairs, so their
// branch metrics are +G and -G of one of two values G1 = (Ls+La)+Lp or
// G2 = (Ls+La)-Lp. The helpers below return, for a transition, which of the
// two values it uses and with which sign.
package turbo_pkg;

  // Widths of the fixed-point datapath.
  localparam int unsigned LLR_W = 6;    // channel LLR inputs (Ls, Lp)
  localparam int unsigned EXT_W = 8;    // extrinsic / a-priori LLR
  localparam int unsigned BM_W  = 10;   // one-step branch metric G1/G2
  localparam int unsigned SM_W  = 14;   // state metric, modulo arithmetic

  typedef logic signed [LLR_W-1:0] llr_t;
  typedef logic signed [EXT_W-1:0] ext_t;
  typedef logic signed [BM_W-1:0]  bm_t;
  typedef logic signed [SM_W-1:0]  sm_t;

  localparam int unsigned NSTATES = 8;

  // Initial metric of the states the encoder cannot start in.
  localparam sm_t SM_UNLIKELY = sm_t'(-1024);

  // Correction term of the max* operator (Jacobian logarithm).
  typedef enum logic [2:0] {
    CORR_MAX_LOG    = 3'd0,  // no correction
    CORR_CONSTANT   = 3'd1,  // one constant below a threshold
    CORR_LINEAR     = 3'd2,  // straight line clipped at zero
    CORR_MULTI_STEP = 3'd3,  // staircase of several constants
    CORR_HYBRID     = 3'd4,  // linear near zero, constant further out
    CORR_LOG_LUT    = 3'd5   // rounded table of ln(1+exp(-x))
  } corr_alg_e;

  // One-step branch metric pair of a trellis step.
  typedef struct packed {
    bm_t g1;  // u = p     : +G1 for (1,1), -G1 for (0,0)
    bm_t g2;  // u != p    : +G2 for (1,0), -G2 for (0,1)
  } bm_pair_t;

  typedef sm_t [NSTATES-1:0] sm_vec_t;

  // Systematic bit of the branch leaving state s with feedback bit a.
  function automatic logic trel_u(input int unsigned s, input int unsigned a);
    logic [2:0] st;
    st = 3'(s);
    return logic'(a[0] ^ st[1] ^ st[0]);
  endfunction

  // Parity bit of the branch leaving state s with feedback bit a.
  function automatic logic trel_p(input int unsigned s, input int unsigned a);
    logic [2:0] st;
    st = 3'(s);
    return logic'(a[0] ^ st[2] ^ st[0]);
  endfunction

  // Next state after state s with feedback bit a.
  function automatic int unsigned trel_next(input int unsigned s, input int unsigned a);
    logic [2:0] st;
    st = 3'(s);
    return int'({a[0], st[2], st[1]});
  endfunction

  // 1 when the branch uses G2 (u != p), 0 when it uses G1.
  function automatic logic trel_sel(input int unsigned s, input int unsigned a);
    return trel_u(s, a) ^ trel_p(s, a);
  endfunction

  // 1 when the branch metric is the negated value (u = 0).
  function automatic logic trel_neg(input int unsigned s, input int unsigned a);
    return ~trel_u(s, a);
  endfunction

  // Branch metric of the branch leaving state s with feedback bit a.
  function automatic bm_t branch_metric(input bm_pair_t g, input int unsigned s,
                                        input int unsigned a);
    bm_t v;
    v = trel_sel(s, a) ? g.g2 : g.g1;
    return trel_neg(s, a) ? -v : v;
  endfunction

  // Saturate a wide signed value to the extrinsic width.
  function automatic ext_t sat_ext(input logic signed [SM_W-1:0] v);
    localparam logic signed [SM_W-1:0] MAXV = (1 <<< (EXT_W-1)) - 1;
    localparam logic signed [SM_W-1:0] MINV = -(1 <<< (EXT_W-1));
    if (v > MAXV) return ext_t'(MAXV);
    if (v < MINV) return ext_t'(MINV);
    return ext_t'(v);
  endfunction

endpackage
