// turbo_codec_top: the LTE turbo encoder and the radix-4 MSR turbo decoder
// side by side, with the same block length and QPP interleaver parameters.
//
// The two halves are independent: the encoder turns K information bits
// into K (systematic, parity 1, parity 2) bit triples; the decoder takes K
// triples of channel LLRs (modulation and channel lie outside this design)
// and returns K decoded bits. All encoder and decoder ports are brought out
// unchanged; see turbo_encoder and turbo_decoder for their timing.
module turbo_codec_top
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
  // encoder
  input  logic enc_in_valid,
  input  logic enc_in_bit,
  output logic enc_in_ready,
  output logic enc_out_valid,
  output logic enc_out_sys,
  output logic enc_out_p1,
  output logic enc_out_p2,
  output logic enc_out_last,
  // decoder
  input  logic dec_in_valid,
  input  llr_t dec_in_ls,
  input  llr_t dec_in_lp1,
  input  llr_t dec_in_lp2,
  output logic dec_in_ready,
  output logic dec_out_valid,
  output logic dec_out_bit,
  output logic dec_out_last,
  output logic [$clog2(MAX_ITER+1)-1:0] dec_iterations
);

  turbo_encoder #(.K(K), .F1(F1), .F2(F2)) u_enc (
    .clk, .rst_n,
    .in_valid(enc_in_valid), .in_bit(enc_in_bit), .in_ready(enc_in_ready),
    .out_valid(enc_out_valid), .out_sys(enc_out_sys), .out_p1(enc_out_p1),
    .out_p2(enc_out_p2), .out_last(enc_out_last)
  );

  turbo_decoder #(.K(K), .F1(F1), .F2(F2), .MAX_ITER(MAX_ITER), .ALG(ALG)) u_dec (
    .clk, .rst_n,
    .in_valid(dec_in_valid), .in_ls(dec_in_ls), .in_lp1(dec_in_lp1),
    .in_lp2(dec_in_lp2), .in_ready(dec_in_ready),
    .out_valid(dec_out_valid), .out_bit(dec_out_bit), .out_last(dec_out_last),
    .iterations(dec_iterations)
  );

endmodule
