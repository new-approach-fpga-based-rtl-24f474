// Shared types and constants of the discontinuous SVPWM generator.
//
// Every analogue quantity in the datapath (V_alpha, V_beta, the triangle
// carrier and the two switching thresholds) is a 9-bit unsigned code with a
// common offset: CODE_BASE stands for zero and CODE_AMP is the reference
// amplitude, so the sine/cosine tables span 96..352 and the carrier spans
// 224..352. The carrier amplitude (128 codes) equals half a switching period
// and the DC-link voltage is normalised so that V_dc/T = 1; with these scales
// the per-sector dwell-time formulas reduce to sums of V_alpha and V_beta
// multiplied by 3/4, sqrt(3)/4 and sqrt(3)/2, kept here as Q10 constants
// (fraction width and rounding are this design's choice).
package svpwm_pkg;

  localparam int unsigned CODE_W    = 9;    // width of every datapath code
  localparam int unsigned CODE_BASE = 224;  // code of the value zero
  localparam int unsigned CODE_AMP  = 128;  // reference amplitude, half carrier period

  typedef logic [CODE_W-1:0] code_t;

  // Sector of the reference vector; SEC_NONE marks the two comparison codes
  // that cannot occur.
  typedef enum logic [2:0] {
    SEC_NONE = 3'd0,
    SEC_I    = 3'd1,
    SEC_II   = 3'd2,
    SEC_III  = 3'd3,
    SEC_IV   = 3'd4,
    SEC_V    = 3'd5,
    SEC_VI   = 3'd6
  } sector_t;

  // Fixed-point constants, FRAC_W fraction bits.
  localparam int unsigned FRAC_W   = 10;
  localparam int          K_3_4    = 768;   // 3/4
  localparam int          K_R3_4   = 443;   // sqrt(3)/4 = 3/(4*sqrt(3))
  localparam int          K_R3_2   = 887;   // sqrt(3)/2 = 2*3/(4*sqrt(3))
  localparam int          K_SQRT3  = 1774;  // sqrt(3)

endpackage
