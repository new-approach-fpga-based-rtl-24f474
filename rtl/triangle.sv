// Triangle carrier for the pulse-width comparison.
//
// A phase counter of log2(SAMPLES) bits advances on every step_en pulse; the
// carrier code rises from TRI_MIN at phase 0 to TRI_MAX at phase SAMPLES/2
// and falls back, in steps of (TRI_MAX-TRI_MIN)/(SAMPLES/2). With the
// document's 32 samples between 224 and 352 the step is 8 codes and, with
// samples every 26 clocks, one carrier period is 40 kHz. The placement of
// the valley at phase 0 is this design's choice.
// Interface: clk, rst_n, step_en -> phase, tri_code, period_start (high
// while phase is 0, the carrier valley). Timing: tri_code is combinational
// from the phase register.
module triangle
  import svpwm_pkg::*;
#(
  parameter int unsigned SAMPLES = 32,
  parameter int unsigned TRI_MIN = 224,
  parameter int unsigned TRI_MAX = 352
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       step_en,
  output logic [$clog2(SAMPLES)-1:0] phase,
  output code_t                      tri_code,
  output logic                       period_start
);

  localparam int unsigned PW   = $clog2(SAMPLES);
  localparam int unsigned HALF = SAMPLES / 2;
  localparam int unsigned STEP = (TRI_MAX - TRI_MIN) / HALF;

  logic [PW-1:0] offs;   // samples away from the valley, 0..HALF

  always_ff @(posedge clk) begin
    if (!rst_n)
      phase <= '0;
    else if (step_en)
      phase <= (phase == PW'(SAMPLES - 1)) ? '0 : phase + 1'b1;
  end

  always_comb begin
    offs         = (int'(phase) <= int'(HALF)) ? phase : PW'(SAMPLES) - phase;
    tri_code     = code_t'(TRI_MIN + STEP * int'(offs));
    period_start = (phase == '0);
  end

endmodule
