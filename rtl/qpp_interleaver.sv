// qpp_interleaver: address generator of the quadratic permutation
// polynomial (QPP) interleaver  pi(i) = (F1*i + F2*i^2) mod K.
//
// The addresses are produced in order i = 0,1,2,... without a multiplier,
// by the recursion
//     pi(i+1) = (pi(i) + g(i)) mod K,   g(i+1) = (g(i) + 2*F2) mod K,
//     pi(0) = 0,                        g(0)   = (F1 + F2) mod K,
// where each "mod K" is an add followed by one conditional subtraction.
// start loads pi(0); next advances to the following index. addr is the
// registered current address. The defaults are the LTE parameters of the
// smallest block size, K = 40 (F1 = 3, F2 = 10).
module qpp_interleaver #(
  parameter int unsigned K  = 40,
  parameter int unsigned F1 = 3,
  parameter int unsigned F2 = 10
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic next,
  output logic [$clog2(K)-1:0] addr
);

  localparam int unsigned AW = $clog2(K);
  localparam logic [AW:0] KK = (AW+1)'(K);
  localparam logic [AW-1:0] G0  = AW'((F1 + F2) % K);
  localparam logic [AW-1:0] INC = AW'((2 * F2) % K);

  logic [AW-1:0] g;
  logic [AW:0]   sum_a, sum_g;
  logic [AW-1:0] addr_nxt, g_nxt;

  always_comb begin
    sum_a    = {1'b0, addr} + {1'b0, g};
    sum_g    = {1'b0, g} + {1'b0, INC};
    addr_nxt = (sum_a >= KK) ? AW'(sum_a - KK) : AW'(sum_a);
    g_nxt    = (sum_g >= KK) ? AW'(sum_g - KK) : AW'(sum_g);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr <= '0;
      g    <= G0;
    end else if (start) begin
      addr <= '0;
      g    <= G0;
    end else if (next) begin
      addr <= addr_nxt;
      g    <= g_nxt;
    end
  end

endmodule
