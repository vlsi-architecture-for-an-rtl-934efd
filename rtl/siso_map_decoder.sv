// siso_map_decoder: soft-input soft-output log-MAP decoder for one
// constituent code of the LTE turbo code, with radix-4 MSR state metric
// recursions.
//
// A decoding pass has three phases:
//   LOAD : K triples (Ls, La, Lp) are accepted, one per in_valid cycle, in
//          trellis order and kept in local buffers.
//   FWD  : K/2 cycles. Each cycle the forward state_metric_unit advances
//          alpha by two trellis steps; alpha at every even step is stored
//          in the alpha memory (K/2 words of eight metrics).
//   BWD  : K/2 cycles, pair index j = K/2-1 down to 0. The backward
//          state_metric_unit moves beta from step 2j+2 to 2j. In the same
//          cycle two radix-2 ACS banks rebuild alpha_{2j+1} and beta_{2j+1},
//          and two llr_units deliver the LLRs of bits 2j and 2j+1.
// Recursions start from the all-zero encoder state (alpha) and, as the
// trellis is not terminated, from equal metrics at the end of the block
// (beta).
// Output: during BWD, out_valid is high and out_idx = j; out_le/out_llr/
// out_hard[0] belong to bit 2j and [1] to bit 2j+1 (combinational outputs,
// to be captured at the clock edge). done pulses for one cycle after the
// last pair; in_valid must stay low from the last input until then (an
// assertion checks it). Throughput: 2K cycles per pass (K load, K/2 + K/2
// recursion).
// K must be even.
module siso_map_decoder
  import turbo_pkg::*;
#(
  parameter int unsigned K   = 40,
  parameter corr_alg_e   ALG = CORR_LOG_LUT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  llr_t in_ls,
  input  ext_t in_la,
  input  llr_t in_lp,
  output logic busy,                       // high from the first input to done
  output logic out_valid,
  output logic [$clog2(K)-1:0] out_idx,    // pair index j
  output ext_t out_le   [2],
  output ext_t out_llr  [2],
  output logic out_hard [2],
  output logic done
);

  localparam int unsigned KW = $clog2(K);
  localparam int unsigned NP = K / 2;

  typedef enum logic [1:0] {S_LOAD, S_FWD, S_BWD, S_DONE} state_e;
  state_e state;

  llr_t ls_buf [K];
  ext_t la_buf [K];
  llr_t lp_buf [K];
  sm_vec_t alpha_mem [NP];

  logic [KW-1:0] cnt;       // load index or pair index
  logic [KW-1:0] idx0, idx1;   // bit indices 2j and 2j+1

  bm_pair_t g_early, g_late;
  sm_vec_t  alpha_cur, beta_cur, alpha_init, beta_init;
  sm_vec_t  alpha_pair, alpha_mid, beta_mid;
  logic     fwd_init, bwd_init, fwd_en, bwd_en;

  assign idx0 = {cnt[KW-2:0], 1'b0};
  assign idx1 = {cnt[KW-2:0], 1'b1};

  // branch metrics of the two steps of the current pair
  branch_metric_unit u_bmu0 (.ls(ls_buf[idx0]), .la(la_buf[idx0]),
                             .lp(lp_buf[idx0]), .g(g_early));
  branch_metric_unit u_bmu1 (.ls(ls_buf[idx1]), .la(la_buf[idx1]),
                             .lp(lp_buf[idx1]), .g(g_late));

  always_comb begin
    alpha_init = '{default: SM_UNLIKELY};
    alpha_init[0] = '0;
    beta_init  = '{default: '0};
  end

  assign fwd_init = (state == S_LOAD) && in_valid && (cnt == KW'(K-1));
  assign fwd_en   = (state == S_FWD);
  assign bwd_init = (state == S_FWD) && (cnt == KW'(NP-1));
  assign bwd_en   = (state == S_BWD);

  state_metric_unit #(.BACKWARD(1'b0), .ALG(ALG)) u_alpha (
    .clk, .rst_n, .init(fwd_init), .init_val(alpha_init), .en(fwd_en),
    .g_early, .g_late, .sm(alpha_cur)
  );
  state_metric_unit #(.BACKWARD(1'b1), .ALG(ALG)) u_beta (
    .clk, .rst_n, .init(bwd_init), .init_val(beta_init), .en(bwd_en),
    .g_early, .g_late, .sm(beta_cur)
  );

  // alpha at step 2j from memory; alpha at 2j+1 and beta at 2j+1 by radix-2
  assign alpha_pair = alpha_mem[cnt[$clog2(NP)-1:0]];

  for (genvar s = 0; s < 8; s++) begin : g_r2
    // forward: state {a,s1,s2} is entered from {s1,s2,0} (+c) and {s1,s2,1} (-c)
    localparam int unsigned A   = s / 4;
    localparam int unsigned SRC = (s % 4) * 2;
    acs_radix2 #(.ALG(ALG)) u_fwd (
      .m0(alpha_pair[SRC]), .m1(alpha_pair[SRC+1]),
      .g(sm_t'(branch_metric(g_early, SRC, A))), .y(alpha_mid[s])
    );
    // backward: state s leaves to next(s,0) (+c) and next(s,1) (-c)
    acs_radix2 #(.ALG(ALG)) u_bwd (
      .m0(beta_cur[trel_next(s, 0)]), .m1(beta_cur[trel_next(s, 1)]),
      .g(sm_t'(branch_metric(g_late, s, 0))), .y(beta_mid[s])
    );
  end

  llr_unit #(.ALG(ALG)) u_llr0 (
    .alpha(alpha_pair), .beta(beta_mid), .g(g_early),
    .ls(ls_buf[idx0]), .la(la_buf[idx0]),
    .llr(out_llr[0]), .le(out_le[0]), .hard(out_hard[0])
  );
  llr_unit #(.ALG(ALG)) u_llr1 (
    .alpha(alpha_mid), .beta(beta_cur), .g(g_late),
    .ls(ls_buf[idx1]), .la(la_buf[idx1]),
    .llr(out_llr[1]), .le(out_le[1]), .hard(out_hard[1])
  );

  assign out_valid = (state == S_BWD);
  assign out_idx   = cnt;
  assign done      = (state == S_DONE);
  assign busy      = (state != S_LOAD) || (cnt != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_LOAD: if (in_valid) begin
          if (cnt == KW'(K-1)) begin
            state <= S_FWD;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_FWD: begin
          if (cnt == KW'(NP-1)) state <= S_BWD;
          else                  cnt   <= cnt + 1'b1;
        end
        S_BWD: begin
          if (cnt == '0) state <= S_DONE;
          else           cnt   <= cnt - 1'b1;
        end
        S_DONE: state <= S_LOAD;
        default: state <= S_LOAD;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_LOAD && in_valid) begin
      ls_buf[cnt] <= in_ls;
      la_buf[cnt] <= in_la;
      lp_buf[cnt] <= in_lp;
    end
    if (state == S_FWD) alpha_mem[cnt[$clog2(NP)-1:0]] <= alpha_cur;
  end

  // inputs are accepted only in the load phase
  a_in_handshake: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> state == S_LOAD)
    else $error("siso_map_decoder: in_valid outside the load phase");

endmodule
