// Discontinuous (five-segment) space-vector PWM generator, top level.
//
// Signal flow: ajust_freq divides the clock into a carrier-sample enable
// (clk/26, 32 samples per 40 kHz carrier period) and a reference-step
// enable (clk/1852, 360 steps per 50 Hz period). vbeta_valfa turns the
// reference vector one degree per step, reading V_alpha and V_beta from
// cosine and sine tables. find_sector locates the vector's sector by three
// comparisons; svm_generator computes the half dwell times T_a and T_a+T_b
// from per-sector linear formulas and compares them with the triangle
// carrier, clamping one leg per sector; deadtime_system then produces the
// complementary gate signals with a 2 us dead time. This partition is the
// document's; clock enables in a single clock domain and the synchronous
// active-low reset are this design's choice.
// Interface: clk (33.33 MHz), rst_n -> six gate signals, plus the switching
// states, sector, reference codes, angle and carrier for observation.
// Timing: V_alpha/V_beta follow the angle counter by one cycle; the states
// sa/sb/sc are combinational from registers; gate outputs are registered.
module svpwm_top
  import svpwm_pkg::*;
#(
  parameter int unsigned CARRIER_DIV = 26,
  parameter int unsigned SAMPLES     = 32,
  parameter int unsigned REF_DIV     = 1852,
  parameter int unsigned DEAD_CYCLES = 67
) (
  input  logic    clk,
  input  logic    rst_n,
  output logic    sa_up,
  output logic    sa_lw,
  output logic    sb_up,
  output logic    sb_lw,
  output logic    sc_up,
  output logic    sc_lw,
  output logic    sa,
  output logic    sb,
  output logic    sc,
  output sector_t sector,
  output code_t   valpha,
  output code_t   vbeta,
  output code_t   tri_code,
  output logic [$clog2(SAMPLES)-1:0] carrier_phase,
  output logic [8:0] angle
);

  logic       carrier_en;
  logic       ref_en;
  logic [2:0] cmp;
  code_t      ta;
  code_t      tatb;
  logic [2:0] up;
  logic [2:0] lw;

  ajust_freq #(.CARRIER_DIV(CARRIER_DIV), .REF_DIV(REF_DIV)) u_ajust_freq (
    .clk        (clk),
    .rst_n      (rst_n),
    .carrier_en (carrier_en),
    .ref_en     (ref_en)
  );

  vbeta_valfa #(.ENTRIES(360), .BASE(CODE_BASE), .AMP(CODE_AMP)) u_vbeta_valfa (
    .clk    (clk),
    .rst_n  (rst_n),
    .ref_en (ref_en),
    .angle  (angle),
    .valpha (valpha),
    .vbeta  (vbeta)
  );

  find_sector #(.BASE(CODE_BASE)) u_find_sector (
    .valpha (valpha),
    .vbeta  (vbeta),
    .cmp    (cmp),
    .sector (sector)
  );

  svm_generator #(.SAMPLES(SAMPLES), .BASE(CODE_BASE), .AMP(CODE_AMP)) u_svm_generator (
    .clk        (clk),
    .rst_n      (rst_n),
    .carrier_en (carrier_en),
    .valpha     (valpha),
    .vbeta      (vbeta),
    .sector     (sector),
    .sa         (sa),
    .sb         (sb),
    .sc         (sc),
    .phase      (carrier_phase),
    .tri_code   (tri_code),
    .ta         (ta),
    .tatb       (tatb)
  );

  deadtime_system #(.DEAD_CYCLES(DEAD_CYCLES)) u_deadtime (
    .clk   (clk),
    .rst_n (rst_n),
    .s     ({sc, sb, sa}),
    .up    (up),
    .lw    (lw)
  );

  assign {sc_up, sb_up, sa_up} = up;
  assign {sc_lw, sb_lw, sa_lw} = lw;

endmodule
