// Half dwell time T_a of the first active vector of the sector.
//
// For each sector T_a is a linear combination of V_alpha and V_beta with
// the constants 3/4, sqrt(3)/4 and sqrt(3)/2 (V_dc/T normalised to 1, the
// carrier amplitude of 128 codes being half a switching period):
//   I:  3/4*Va - r3/4*Vb      II: 3/4*Va + r3/4*Vb     III: r3/2*Vb
//   IV: -3/4*Va + r3/4*Vb     V: -3/4*Va - r3/4*Vb     VI: -r3/2*Vb
// These per-sector formulas are the document's. The result is rounded from
// Q10, clamped to 0..AMP and returned as an offset code (BASE + T_a), so it
// compares directly with the triangle carrier; precision, rounding and
// clamping are this design's choice.
// Interface: valpha, vbeta, sector -> ta. Timing: purely combinational.
module duration_ta
  import svpwm_pkg::*;
#(
  parameter int unsigned BASE = 224,
  parameter int unsigned AMP  = 128,
  parameter int unsigned FRAC = 10
) (
  input  code_t   valpha,
  input  code_t   vbeta,
  input  sector_t sector,
  output code_t   ta
);

  logic signed [10:0] a;
  logic signed [10:0] b;
  logic signed [23:0] a34;    // 3/4 * Va
  logic signed [23:0] br34;   // sqrt(3)/4 * Vb
  logic signed [23:0] br32;   // sqrt(3)/2 * Vb
  logic signed [23:0] acc;
  logic signed [23:0] t;

  always_comb begin
    a    = $signed({2'b00, valpha}) - 11'(BASE);
    b    = $signed({2'b00, vbeta}) - 11'(BASE);
    a34  = 24'(a) * 24'(K_3_4);
    br34 = 24'(b) * 24'(K_R3_4);
    br32 = 24'(b) * 24'(K_R3_2);
    unique case (sector)
      SEC_I:   acc =  a34 - br34;
      SEC_II:  acc =  a34 + br34;
      SEC_III: acc =  br32;
      SEC_IV:  acc = -a34 + br34;
      SEC_V:   acc = -a34 - br34;
      SEC_VI:  acc = -br32;
      default: acc = '0;
    endcase
    t = (acc + (24'sd1 <<< (FRAC - 1))) >>> FRAC;
    if (t < 0)
      ta = code_t'(BASE);
    else if (t > 24'(AMP))
      ta = code_t'(BASE + AMP);
    else
      ta = code_t'(BASE) + code_t'(t);
  end

endmodule
