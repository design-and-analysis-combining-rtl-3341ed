// max_star: the Jacobian logarithm max*(a,b) = ln(e^a + e^b), the operator
// that separates the two decoding algorithms.
//
// ALGO = MAX_LOG_MAP gives max(a,b), the Max-Log-MAP approximation.
// ALGO = LOG_MAP adds the correction ln(1 + e^-|a-b|), which makes the
// recursion exact (Log-MAP). Operands are in Q.2 (quarter units); the
// correction is a small comparison table for round(4*ln(1+exp(-d/4))),
// d = |a-b| in quarter units: 3 at d = 0, 2 for d < 4, 1 for d < 9, else 0.
// The table and word lengths are this design's choice.
//
// Purely combinational. The caller keeps enough headroom in W for the +3.
module max_star
  import turbo_pkg::*;
#(
  parameter algo_e ALGO = MAX_LOG_MAP,
  parameter int    W    = MET_W + 2
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] y
);

  logic signed [W-1:0] mx;
  logic        [W-1:0] diff;
  logic signed [W-1:0] corr;

  always_comb begin
    if (a >= b) begin
      mx   = a;
      diff = W'(a - b);
    end else begin
      mx   = b;
      diff = W'(b - a);
    end
    if (ALGO == LOG_MAP) begin
      if (diff == '0)    corr = W'(3);
      else if (diff < 4) corr = W'(2);
      else if (diff < 9) corr = W'(1);
      else               corr = '0;
    end else begin
      corr = '0;
    end
    y = mx + corr;
  end

endmodule
