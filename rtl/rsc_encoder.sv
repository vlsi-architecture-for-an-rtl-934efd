// rsc_encoder: 8-state recursive systematic convolutional encoder, the
// constituent code of the LTE turbo code (feedback 1+D^2+D^3, parity
// 1+D+D^3, octal 13/15).
//
// Three registers s1 s2 s3 hold the last three feedback bits. For input bit
// u the feedback bit is a = u ^ s2 ^ s3 and the parity bit p = a ^ s1 ^ s3;
// the registers then shift to {a, s1, s2}. The parity output is
// combinational from the current state and in_bit; the state advances on a
// clock edge with in_valid. clear returns the encoder to the all-zero state
// (start of a block) and has priority. The trellis is not terminated.
module rsc_encoder (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic in_valid,
  input  logic in_bit,
  output logic parity,
  output logic [2:0] state   // {s1,s2,s3}
);

  logic fb;

  always_comb begin
    fb     = in_bit ^ state[1] ^ state[0];
    parity = fb ^ state[2] ^ state[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        state <= '0;
    else if (clear)    state <= '0;
    else if (in_valid) state <= {fb, state[2], state[1]};
  end

endmodule
