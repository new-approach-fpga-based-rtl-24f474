// Sector identification by three comparisons, without trigonometry.
//
// The reference vector lies in one of six 60-degree sectors. Instead of an
// angle or the sign of three projected components, three comparisons decide
// it: c2 = V_beta > 0 (compa), c1 = V_beta > sqrt(3)*V_alpha and
// c0 = V_beta > -sqrt(3)*V_alpha (x_akar multipliers feeding comp9a
// comparators). csector maps {c2,c1,c0} to the sector:
//   101 -> I, 111 -> II, 110 -> III, 010 -> IV, 000 -> V, 001 -> VI;
// codes 011 and 100 cannot occur and give SEC_NONE. The structure and the
// truth table are the document's; the Q10 precision of the sqrt(3) products
// is this design's choice. The inputs are offset codes (BASE = zero) and are
// re-centred before the multiplications.
// Interface: valpha, vbeta -> cmp, sector. Timing: purely combinational.
module find_sector
  import svpwm_pkg::*;
#(
  parameter int unsigned BASE    = 224,
  parameter int unsigned FRAC    = 10,
  parameter int          SQRT3_Q = 1774
) (
  input  code_t       valpha,
  input  code_t       vbeta,
  output logic [2:0]  cmp,
  output sector_t     sector
);

  logic signed [10:0] a;          // centred V_alpha
  logic signed [10:0] b;          // centred V_beta
  logic signed [23:0] b_scaled;   // V_beta * 2^FRAC
  logic signed [23:0] a_pos;      //  sqrt(3) * V_alpha
  logic signed [23:0] a_neg;      // -sqrt(3) * V_alpha

  always_comb begin
    a        = $signed({2'b00, valpha}) - 11'(BASE);
    b        = $signed({2'b00, vbeta}) - 11'(BASE);
    b_scaled = 24'(b) <<< FRAC;
  end

  x_akar #(.NEGATE(1'b0), .SQRT3_Q(SQRT3_Q)) u_x_pos_akar (.a(a), .p(a_pos));
  x_akar #(.NEGATE(1'b1), .SQRT3_Q(SQRT3_Q)) u_x_neg_akar (.a(a), .p(a_neg));

  compa  #(.BASE(BASE)) u_compa     (.vbeta(vbeta), .pos(cmp[2]));
  comp9a                u_comp9a_p  (.x(b_scaled), .y(a_pos), .gt(cmp[1]));
  comp9a                u_comp9a_n  (.x(b_scaled), .y(a_neg), .gt(cmp[0]));

  csector u_csector (.cmp(cmp), .sector(sector));

endmodule
