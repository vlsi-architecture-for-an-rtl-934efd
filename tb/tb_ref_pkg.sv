// tb_ref_pkg: reference models used by the testbenches, written
// independently of the RTL: the LTE RSC trellis from its shift-register
// equations, the max* operator with each correction algorithm (the exact
// table is evaluated with ln/exp), a radix-2 log-MAP decoder on plain
// integers, the QPP permutation by its closed formula and a BPSK/AWGN
// channel that produces quantised LLRs.
package tb_ref_pkg;

  // --- trellis: state {s1,s2,s3}, input bit u -------------------------------
  // returns {next_state[2:0], parity} for systematic input u
  function automatic logic [3:0] rsc_step(input logic [2:0] st, input logic u);
    logic fb, p;
    fb = u ^ st[1] ^ st[0];
    p  = fb ^ st[2] ^ st[0];
    return {fb, st[2], st[1], p};
  endfunction

  function automatic int qpp(input int i, input int k, input int f1, input int f2);
    longint v;
    v = (longint'(f1) * i + longint'(f2) * i * i) % k;
    return int'(v);
  endfunction

  // --- max* -----------------------------------------------------------------
  // alg numbering follows the RTL enum: 0 max-log, 1 constant, 2 linear,
  // 3 multi-step, 4 hybrid, 5 exact table
  function automatic int corr(input int alg, input int d);
    int x;
    x = (d < 0) ? -d : d;
    case (alg)
      0: return 0;
      1: return (x < 16) ? 3 : 0;
      2: return (x < 22) ? (22 - x) / 4 : 0;
      3: return (x < 8) ? 5 : (x < 16) ? 3 : (x < 24) ? 1 : 0;
      4: return (x < 12) ? (22 - x) / 4 : (x < 24) ? 1 : 0;
      default: return $rtoi(8.0 * $ln(1.0 + $exp(-real'(x) / 8.0)) + 0.5);
    endcase
  endfunction

  function automatic int mstar(input int alg, input int a, input int b);
    return ((a >= b) ? a : b) + corr(alg, a - b);
  endfunction

  // branch metric of systematic u, parity p (bits) in the doubled domain
  function automatic int gam(input int sys_la, input int lp, input logic u, input logic p);
    return (u ? sys_la : -sys_la) + (p ? lp : -lp);
  endfunction

  // one forward step: alpha_out[s'] = max* over predecessors
  function automatic void fwd_step(input int alg, input int a_in[8], input int sys_la,
                                   input int lp, output int a_out[8]);
    bit   seen[8];
    logic [3:0] r;
    int   m;
    foreach (seen[i]) seen[i] = 0;
    for (int s = 0; s < 8; s++) begin
      for (int u = 0; u < 2; u++) begin
        r = rsc_step(3'(s), u[0]);
        m = a_in[s] + gam(sys_la, lp, u[0], r[0]);
        if (!seen[r[3:1]]) begin a_out[r[3:1]] = m; seen[r[3:1]] = 1; end
        else a_out[r[3:1]] = mstar(alg, a_out[r[3:1]], m);
      end
    end
  endfunction

  // one backward step: beta_out[s] = max* over successors
  function automatic void bwd_step(input int alg, input int b_in[8], input int sys_la,
                                   input int lp, output int b_out[8]);
    logic [3:0] r;
    int m[2];
    for (int s = 0; s < 8; s++) begin
      for (int u = 0; u < 2; u++) begin
        r = rsc_step(3'(s), u[0]);
        m[u] = b_in[r[3:1]] + gam(sys_la, lp, u[0], r[0]);
      end
      b_out[s] = mstar(alg, m[0], m[1]);
    end
  endfunction

  // doubled a-posteriori LLR of one step. The eight branches of each input
  // value are merged pairwise in order of their start state (0,1)(2,3)...
  function automatic int llr_step(input int alg, input int a_in[8], input int b_out[8],
                                  input int sys_la, input int lp);
    int br[2][8];
    int l1[4], l2[2], top[2];
    logic [3:0] r;
    for (int s = 0; s < 8; s++)
      for (int u = 0; u < 2; u++) begin
        r = rsc_step(3'(s), u[0]);
        br[u][s] = a_in[s] + gam(sys_la, lp, u[0], r[0]) + b_out[r[3:1]];
      end
    for (int u = 0; u < 2; u++) begin
      for (int i = 0; i < 4; i++) l1[i] = mstar(alg, br[u][2*i], br[u][2*i+1]);
      for (int i = 0; i < 2; i++) l2[i] = mstar(alg, l1[2*i], l1[2*i+1]);
      top[u] = mstar(alg, l2[0], l2[1]);
    end
    return top[1] - top[0];
  endfunction

  function automatic int sat(input int v, input int w);
    int mx;
    mx = (1 << (w - 1)) - 1;
    return (v > mx) ? mx : (v < -mx - 1) ? -mx - 1 : v;
  endfunction

  // arithmetic shift right by one (floor division by two)
  function automatic int half(input int v);
    return v >>> 1;
  endfunction

  // --- channel --------------------------------------------------------------
  // approximately Gaussian sample (sum of 12 uniforms), unit variance
  function automatic real gauss();
    real s;
    s = 0.0;
    repeat (12) s += real'($urandom % 65536) / 65536.0;
    return s - 6.0;
  endfunction

  // BPSK (bit 1 -> +1) through AWGN of standard deviation sigma; LLR
  // 2y/sigma^2 quantised to units of 1/4 and saturated to 6 bits
  function automatic int chan_llr(input logic b, input real sigma);
    real y, l;
    int  q;
    y = (b ? 1.0 : -1.0) + sigma * gauss();
    l = 2.0 * y / (sigma * sigma) * 4.0;
    q = (l >= 0.0) ? $rtoi(l + 0.5) : -$rtoi(-l + 0.5);
    return sat(q, 6);
  endfunction

  // --- SISO and turbo decoder -----------------------------------------------
  // radix-2 log-MAP pass over k positions: extrinsic and hard decisions
  function automatic void siso_ref(input int alg, input int k, input int ls[], input int la[],
                                   input int lp[], output int le[], output bit hard[]);
    int alpha[][8], beta[][8];
    int d;
    alpha = new[k + 1];
    beta  = new[k + 1];
    le    = new[k];
    hard  = new[k];
    alpha[0] = '{0, -1024, -1024, -1024, -1024, -1024, -1024, -1024};
    for (int i = 0; i < k; i++) fwd_step(alg, alpha[i], ls[i] + la[i], lp[i], alpha[i+1]);
    beta[k] = '{default: 0};
    for (int i = k - 1; i >= 0; i--) bwd_step(alg, beta[i+1], ls[i] + la[i], lp[i], beta[i]);
    for (int i = 0; i < k; i++) begin
      d = llr_step(alg, alpha[i], beta[i+1], ls[i] + la[i], lp[i]);
      le[i]   = sat(half(d - 2 * (ls[i] + la[i])), 8);
      hard[i] = d > 0;
    end
  endfunction

  // iterative decoder: decoder 1 in natural order, decoder 2 in QPP order,
  // stop after max_iter iterations or when an iteration after the first
  // changes no decision. Returns the number of iterations.
  function automatic int turbo_ref(input int alg, input int k, input int f1, input int f2,
                                   input int max_iter, input int ls[], input int lp1[],
                                   input int lp2[], output bit dec[]);
    int ext[], a_ls[], a_la[], le[];
    bit hd[];
    bit changed;
    int pi;
    ext  = new[k];
    a_ls = new[k];
    a_la = new[k];
    dec  = new[k];
    foreach (ext[i]) ext[i] = 0;
    foreach (dec[i]) dec[i] = 0;
    for (int it = 0; it < max_iter; it++) begin
      siso_ref(alg, k, ls, ext, lp1, le, hd);
      foreach (ext[i]) ext[i] = le[i];
      for (int i = 0; i < k; i++) begin
        pi = qpp(i, k, f1, f2);
        a_ls[i] = ls[pi];
        a_la[i] = ext[pi];
      end
      siso_ref(alg, k, a_ls, a_la, lp2, le, hd);
      changed = 0;
      for (int i = 0; i < k; i++) begin
        pi = qpp(i, k, f1, f2);
        ext[pi] = le[i];
        if (dec[pi] != hd[i]) changed = 1;
        dec[pi] = hd[i];
      end
      if (it != 0 && !changed) return it + 1;
    end
    return max_iter;
  endfunction

endpackage
