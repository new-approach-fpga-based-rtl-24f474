// Three-phase SVPWM signal generator.
//
// Joins the triangle carrier, the two dwell-time calculators and the
// switching-pattern logic. The thresholds T_a and T_a+T_b are computed from
// the present V_alpha, V_beta and sector and compared with the carrier every
// cycle; only the carrier phase is stored, as in the document's generator.
// The structure is the document's.
// Interface: clk, rst_n, carrier_en (one carrier sample per pulse), valpha,
// vbeta, sector -> sa, sb, sc, plus the carrier phase, tri_code, ta and
// tatb for observation.
// Timing: sa/sb/sc are combinational from the carrier phase register and the
// inputs.
module svm_generator
  import svpwm_pkg::*;
#(
  parameter int unsigned SAMPLES = 32,
  parameter int unsigned BASE    = 224,
  parameter int unsigned AMP     = 128
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    carrier_en,
  input  code_t   valpha,
  input  code_t   vbeta,
  input  sector_t sector,
  output logic    sa,
  output logic    sb,
  output logic    sc,
  output logic [$clog2(SAMPLES)-1:0] phase,
  output code_t   tri_code,
  output code_t   ta,
  output code_t   tatb
);

  logic period_start;   // valley marker, not needed here

  triangle #(.SAMPLES(SAMPLES), .TRI_MIN(BASE), .TRI_MAX(BASE + AMP)) u_triangle (
    .clk          (clk),
    .rst_n        (rst_n),
    .step_en      (carrier_en),
    .phase        (phase),
    .tri_code     (tri_code),
    .period_start (period_start)
  );

  duration_ta #(.BASE(BASE), .AMP(AMP)) u_duration_ta (
    .valpha (valpha),
    .vbeta  (vbeta),
    .sector (sector),
    .ta     (ta)
  );

  duration_tatb #(.BASE(BASE), .AMP(AMP)) u_duration_tatb (
    .valpha (valpha),
    .vbeta  (vbeta),
    .sector (sector),
    .tatb   (tatb)
  );

  svm_pattern u_pattern (
    .sector   (sector),
    .tri_code (tri_code),
    .ta       (ta),
    .tatb     (tatb),
    .sa       (sa),
    .sb       (sb),
    .sc       (sc)
  );

endmodule
