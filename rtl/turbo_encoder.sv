// turbo_encoder: rate-1/3 LTE turbo encoder, two RSC encoders in parallel
// concatenation separated by a QPP interleaver.
//
// LOAD: K information bits are accepted (one per in_valid cycle while
// in_ready is high) into a block buffer; the interleaver needs the whole
// block before its first output.
// OUT:  K cycles with out_valid high. In cycle i the systematic bit E[i] is
// sent, RSC encoder 1 encodes E[i] (parity 1) and RSC encoder 2 encodes the
// interleaved bit E[pi(i)] (parity 2); both read ports of the buffer are
// used in the same cycle. Both encoders start every block in the all-zero
// state; no tail bits are appended.
// A block therefore takes 2K cycles; a new block can be loaded right after
// the last output. in_valid must only be raised while in_ready is high (an
// assertion checks it).
module turbo_encoder #(
  parameter int unsigned K  = 40,
  parameter int unsigned F1 = 3,
  parameter int unsigned F2 = 10
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_bit,
  output logic in_ready,
  output logic out_valid,
  output logic out_sys,
  output logic out_p1,
  output logic out_p2,
  output logic out_last
);

  localparam int unsigned AW = $clog2(K);

  typedef enum logic {S_LOAD, S_OUT} state_e;
  state_e state;

  logic [K-1:0]  buf_bits;
  logic [AW-1:0] cnt;
  logic [AW-1:0] pi_addr;
  logic          last_in, last_out;
  logic          bit_nat, bit_int;

  assign in_ready  = (state == S_LOAD);
  assign out_valid = (state == S_OUT);
  assign last_in   = (cnt == AW'(K-1)) && in_valid && in_ready;
  assign last_out  = (cnt == AW'(K-1)) && out_valid;
  assign out_last  = last_out;
  assign bit_nat   = buf_bits[cnt];
  assign bit_int   = buf_bits[pi_addr];
  assign out_sys   = bit_nat;

  qpp_interleaver #(.K(K), .F1(F1), .F2(F2)) u_pi (
    .clk, .rst_n, .start(last_in), .next(out_valid), .addr(pi_addr)
  );

  rsc_encoder u_rsc1 (
    .clk, .rst_n, .clear(last_in), .in_valid(out_valid), .in_bit(bit_nat),
    .parity(out_p1), .state()
  );
  rsc_encoder u_rsc2 (
    .clk, .rst_n, .clear(last_in), .in_valid(out_valid), .in_bit(bit_int),
    .parity(out_p2), .state()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      cnt   <= '0;
    end else if (state == S_LOAD) begin
      if (in_valid) begin
        cnt <= last_in ? '0 : cnt + 1'b1;
        if (last_in) state <= S_OUT;
      end
    end else begin
      cnt <= last_out ? '0 : cnt + 1'b1;
      if (last_out) state <= S_LOAD;
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_LOAD && in_valid) buf_bits[cnt] <= in_bit;
  end

  // handshake rule: bits are offered only while the encoder is loading
  a_in_handshake: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> in_ready)
    else $error("turbo_encoder: in_valid while in_ready is low");

endmodule
