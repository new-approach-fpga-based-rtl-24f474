// Constant multiplier by +sqrt(3) or -sqrt(3) for the sector test.
//
// Takes a centred (signed) V_alpha and returns +/-sqrt(3)*V_alpha in Q10
// fixed point (NEGATE selects the sign), ready to be compared with V_beta
// scaled by 2^10. One instance with each sign feeds the two sector
// comparisons. The two multipliers are the document's; the Q10 precision
// (sqrt(3) = 1774/1024) is this design's choice.
// Interface: a (11-bit signed) -> p (24-bit signed). Timing: combinational.
module x_akar
  import svpwm_pkg::*;
#(
  parameter bit NEGATE  = 1'b0,
  parameter int SQRT3_Q = K_SQRT3
) (
  input  logic signed [10:0] a,
  output logic signed [23:0] p
);

  logic signed [23:0] prod;

  always_comb begin
    prod = 24'(a) * 24'(SQRT3_Q);
    p    = NEGATE ? -prod : prod;
  end

endmodule
