// maxstar: the max* operator max*(a,b) = max(a,b) + f(|a-b|) that replaces
// the log of a sum of exponentials in the log-MAP recursions.
//
// The difference a-b is formed once; its sign selects the larger operand and
// its magnitude addresses the correction term f. Six correction algorithms
// are selectable by the ALG parameter: max-log-MAP (f = 0), constant
// log-MAP, linear log-MAP, multi-step log-MAP, hybrid log-MAP and a rounded
// table of the exact term ln(1+exp(-x)). All metrics are in the doubled
// domain of turbo_pkg (units of 1/4, twice the natural value), so a metric
// difference d stands for x = d/8 in natural units and the added term is
// 8*f(x) rounded to an integer:
//   LOG_LUT    : round(8*ln(1+exp(-d/8)))  -> 6,5,5,4,4,3,3,3,3,2,2,2,2 for
//                d = 0..12, 1 for d = 13..21, 0 beyond
//   CONSTANT   : 3 for d < 16 (f = 3/8 below x = 2), else 0
//   LINEAR     : max(0, (22 - d) >> 2)       (f = ln2 - x/4, clipped)
//   MULTI_STEP : 5 for d < 8, 3 for d < 16, 1 for d < 24, else 0
//   HYBRID     : the linear term for d < 12, then 1 up to d < 24, else 0
// The algorithms are named by the source; the constants and breakpoints are
// this design's choice. The unit is purely combinational. Operands are
// modulo (wrap-around) numbers: the larger one is decided by the sign of the
// SM_W-bit difference, which is correct while |a-b| < 2^(SM_W-1).
module maxstar
  import turbo_pkg::*;
#(
  parameter corr_alg_e ALG = CORR_LOG_LUT
) (
  input  sm_t a,
  input  sm_t b,
  output sm_t y
);

  sm_t diff;
  logic [SM_W-1:0] mag;
  sm_t larger;
  logic [2:0] corr;

  always_comb begin
    diff   = a - b;
    larger = diff[SM_W-1] ? b : a;
    mag    = diff[SM_W-1] ? SM_W'(-diff) : SM_W'(diff);
    corr   = '0;
    unique case (ALG)
      CORR_MAX_LOG:    corr = '0;
      CORR_CONSTANT:   corr = (mag < 16) ? 3'd3 : 3'd0;
      CORR_LINEAR:     corr = (mag < 22) ? 3'(((SM_W)'(22) - mag) >> 2) : 3'd0;
      CORR_MULTI_STEP: corr = (mag < 8) ? 3'd5 : (mag < 16) ? 3'd3 : (mag < 24) ? 3'd1 : 3'd0;
      CORR_HYBRID:     corr = (mag < 12) ? 3'(((SM_W)'(22) - mag) >> 2) :
                              (mag < 24) ? 3'd1 : 3'd0;
      CORR_LOG_LUT: begin
        if (mag == 0)       corr = 3'd6;
        else if (mag < 3)   corr = 3'd5;
        else if (mag < 5)   corr = 3'd4;
        else if (mag < 9)   corr = 3'd3;
        else if (mag < 13)  corr = 3'd2;
        else if (mag < 22)  corr = 3'd1;
        else                corr = 3'd0;
      end
      default:         corr = '0;
    endcase
    y = larger + sm_t'(corr);
  end

endmodule
