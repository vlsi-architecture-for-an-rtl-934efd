// turbo_decoder: iterative LTE turbo decoder. One radix-4 MSR log-MAP SISO
// decoder is used in turn as MAP decoder 1 (natural order, parity 1) and MAP
// decoder 2 (QPP-interleaved order, parity 2); extrinsic information is
// exchanged through one extrinsic memory kept in natural order.
//
// IN   : K channel triples (Ls, Lp1, Lp2) are stored, one per in_valid cycle
//        while in_ready is high; the extrinsic memory is cleared.
// FEED : K cycles. Position k of the SISO input is address a = k (half 1)
//        or a = pi(k) (half 2, addresses from qpp_interleaver). The SISO gets
//        Ls[a], La = Le[a] and Lp1[k] or Lp2[k]; a is kept in an address
//        buffer for the write-back.
// RUN  : the SISO runs its forward and backward recursions; the two
//        extrinsic values it delivers per cycle for positions 2j and 2j+1
//        are written to Le at the buffered addresses, which interleaves the
//        writes of decoder 1 and de-interleaves those of decoder 2. After
//        decoder 2, the hard decisions are written to the decision memory
//        in natural order as well.
// Iterations stop after MAX_ITER full iterations, or earlier once a whole
// iteration (from the second on) leaves every hard decision unchanged.
// OUT  : the K decoded bits are streamed in natural order with out_valid.
// in_valid must only be raised while in_ready is high (asserted).
// A half iteration takes 2K+1 cycles (K feed, K/2 + K/2 recursion, 1).
module turbo_decoder
  import turbo_pkg::*;
#(
  parameter int unsigned K        = 40,
  parameter int unsigned F1       = 3,
  parameter int unsigned F2       = 10,
  parameter int unsigned MAX_ITER = 8,
  parameter corr_alg_e   ALG      = CORR_LOG_LUT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  llr_t in_ls,
  input  llr_t in_lp1,
  input  llr_t in_lp2,
  output logic in_ready,
  output logic out_valid,
  output logic out_bit,
  output logic out_last,
  output logic [$clog2(MAX_ITER+1)-1:0] iterations  // iterations used by the last block
);

  localparam int unsigned AW = $clog2(K);
  localparam int unsigned IW = $clog2(MAX_ITER+1);

  typedef enum logic [2:0] {S_IN, S_FEED, S_RUN, S_OUT} state_e;
  state_e state;

  llr_t ls_mem  [K];
  llr_t lp1_mem [K];
  llr_t lp2_mem [K];
  ext_t ext_mem [K];
  logic [K-1:0] dec_mem;
  logic [AW-1:0] addr_buf [K];

  logic [AW-1:0] cnt;
  logic [AW-1:0] pi_addr, rd_addr;
  logic          second;       // 0: MAP decoder 1, 1: MAP decoder 2
  logic [IW-1:0] iter;         // completed full iterations
  logic          changed;      // a hard decision changed in this decoder-2 pass
  logic          qpp_start, last_in, feed_last;

  logic siso_valid, siso_done;
  logic [AW-1:0] siso_idx;
  ext_t siso_le [2];
  logic siso_hard [2];
  logic [AW-1:0] wa0, wa1;

  assign in_ready  = (state == S_IN);
  assign last_in   = in_valid && in_ready && (cnt == AW'(K-1));
  assign feed_last = (state == S_FEED) && (cnt == AW'(K-1));
  assign rd_addr   = second ? pi_addr : cnt;
  assign qpp_start = last_in || siso_done;

  qpp_interleaver #(.K(K), .F1(F1), .F2(F2)) u_pi (
    .clk, .rst_n, .start(qpp_start), .next(state == S_FEED), .addr(pi_addr)
  );

  siso_map_decoder #(.K(K), .ALG(ALG)) u_siso (
    .clk, .rst_n,
    .in_valid(state == S_FEED),
    .in_ls(ls_mem[rd_addr]),
    .in_la(ext_mem[rd_addr]),
    .in_lp(second ? lp2_mem[cnt] : lp1_mem[cnt]),
    .busy(),
    .out_valid(siso_valid), .out_idx(siso_idx),
    .out_le(siso_le), .out_llr(), .out_hard(siso_hard),
    .done(siso_done)
  );

  assign wa0 = addr_buf[{siso_idx[AW-2:0], 1'b0}];
  assign wa1 = addr_buf[{siso_idx[AW-2:0], 1'b1}];

  assign out_valid = (state == S_OUT);
  assign out_bit   = dec_mem[cnt];
  assign out_last  = out_valid && (cnt == AW'(K-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IN;
      cnt        <= '0;
      second     <= 1'b0;
      iter       <= '0;
      changed    <= 1'b0;
      iterations <= '0;
    end else begin
      unique case (state)
        S_IN: if (in_valid) begin
          cnt <= last_in ? '0 : cnt + 1'b1;
          if (last_in) begin
            state  <= S_FEED;
            second <= 1'b0;
            iter   <= '0;
          end
        end
        S_FEED: begin
          cnt <= feed_last ? '0 : cnt + 1'b1;
          if (feed_last) begin
            state   <= S_RUN;
            changed <= 1'b0;
          end
        end
        S_RUN: begin
          if (siso_valid && second &&
              ((dec_mem[wa0] != siso_hard[0]) || (dec_mem[wa1] != siso_hard[1])))
            changed <= 1'b1;
          if (siso_done) begin
            if (!second) begin
              second <= 1'b1;
              state  <= S_FEED;
            end else begin
              second <= 1'b0;
              iter   <= iter + 1'b1;
              if ((iter + 1'b1 == IW'(MAX_ITER)) || (iter != '0 && !changed)) begin
                state      <= S_OUT;
                iterations <= iter + 1'b1;
              end else begin
                state <= S_FEED;
              end
            end
          end
        end
        S_OUT: begin
          cnt <= out_last ? '0 : cnt + 1'b1;
          if (out_last) state <= S_IN;
        end
        default: state <= S_IN;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_IN && in_valid) begin
      ls_mem[cnt]  <= in_ls;
      lp1_mem[cnt] <= in_lp1;
      lp2_mem[cnt] <= in_lp2;
      ext_mem[cnt] <= '0;
    end
    if (state == S_FEED) addr_buf[cnt] <= rd_addr;
    if (state == S_RUN && siso_valid) begin
      ext_mem[wa0] <= siso_le[0];
      ext_mem[wa1] <= siso_le[1];
      if (second) begin
        dec_mem[wa0] <= siso_hard[0];
        dec_mem[wa1] <= siso_hard[1];
      end
    end
  end

  // handshake rule: channel values are offered only while the decoder loads
  a_in_handshake: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> in_ready)
    else $error("turbo_decoder: in_valid while in_ready is low");

endmodule
