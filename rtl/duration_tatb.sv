// Sum T_a + T_b of the two active-vector half dwell times of the sector.
//
// Computed directly from V_alpha and V_beta rather than by adding T_a and
// T_b, one linear formula per sector:
//   I:  3/4*Va + r3/4*Vb      II: r3/2*Vb             III: -3/4*Va + r3/4*Vb
//   IV: -3/4*Va - r3/4*Vb     V: -r3/2*Vb             VI: 3/4*Va - r3/4*Vb
// (each equals the T_a formula of the following sector). These formulas are
// the document's, and they agree with resolving the reference vector onto
// the sector's two active vectors; T_b itself is never formed. Rounding
// from Q10, clamping to 0..AMP and the offset output code (BASE + T_a + T_b)
// are this design's choice, identical to duration_ta.
// Interface: valpha, vbeta, sector -> tatb. Timing: purely combinational.
module duration_tatb
  import svpwm_pkg::*;
#(
  parameter int unsigned BASE = 224,
  parameter int unsigned AMP  = 128,
  parameter int unsigned FRAC = 10
) (
  input  code_t   valpha,
  input  code_t   vbeta,
  input  sector_t sector,
  output code_t   tatb
);

  logic signed [10:0] a;
  logic signed [10:0] b;
  logic signed [23:0] a34;
  logic signed [23:0] br34;
  logic signed [23:0] br32;
  logic signed [23:0] acc;
  logic signed [23:0] t;

  always_comb begin
    a    = $signed({2'b00, valpha}) - 11'(BASE);
    b    = $signed({2'b00, vbeta}) - 11'(BASE);
    a34  = 24'(a) * 24'(K_3_4);
    br34 = 24'(b) * 24'(K_R3_4);
    br32 = 24'(b) * 24'(K_R3_2);
    unique case (sector)
      SEC_I:   acc =  a34 + br34;
      SEC_II:  acc =  br32;
      SEC_III: acc = -a34 + br34;
      SEC_IV:  acc = -a34 - br34;
      SEC_V:   acc = -br32;
      SEC_VI:  acc =  a34 - br34;
      default: acc = '0;
    endcase
    t = (acc + (24'sd1 <<< (FRAC - 1))) >>> FRAC;
    if (t < 0)
      tatb = code_t'(BASE);
    else if (t > 24'(AMP))
      tatb = code_t'(BASE + AMP);
    else
      tatb = code_t'(BASE) + code_t'(t);
  end

endmodule
