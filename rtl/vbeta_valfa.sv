// Open-loop reference vector generator (V_alpha, V_beta).
//
// A modulo-360 counter steps through a cosine table (V_alpha) and a sine
// table (V_beta) on every ref_en pulse, so the reference vector turns one
// degree per step and one revolution per 360 steps (50 Hz with the default
// enable rate). This is the document's structure; the registered table read
// is this design's choice.
// Interface: clk, rst_n, ref_en -> angle, valpha, vbeta (9-bit codes, 224 =
// zero, amplitude 128). Timing: valpha/vbeta follow angle by one cycle.
module vbeta_valfa #(
  parameter int unsigned ENTRIES = 360,
  parameter int unsigned BASE    = 224,
  parameter int unsigned AMP     = 128
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       ref_en,
  output logic [$clog2(ENTRIES)-1:0] angle,
  output svpwm_pkg::code_t           valpha,
  output svpwm_pkg::code_t           vbeta
);

  counter360 #(.MOD(ENTRIES)) u_counter (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (ref_en),
    .count (angle)
  );

  wave_lut #(.ENTRIES(ENTRIES), .BASE(BASE), .AMP(AMP), .COSINE(1'b1)) u_alfa_cos (
    .clk  (clk),
    .addr (angle),
    .data (valpha)
  );

  wave_lut #(.ENTRIES(ENTRIES), .BASE(BASE), .AMP(AMP), .COSINE(1'b0)) u_beta_sin (
    .clk  (clk),
    .addr (angle),
    .data (vbeta)
  );

endmodule
