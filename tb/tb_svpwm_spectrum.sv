// Line-to-line voltage spectrum of svpwm_top at its default parameters
// (40 kHz carrier, 50 Hz reference), over one full reference revolution.
//
// The line-to-line switching state v_ab = S_a - S_b (in units of V_dc) is
// sampled every clock, and its Fourier coefficients at the reference
// frequency and at its 2nd to 13th harmonics are accumulated here over
// exactly one revolution (666720 clocks). With a reference amplitude of
// 128 codes against V_dc = 256 codes, the phase voltage fundamental is
// 0.5 V_dc and the line-to-line fundamental sqrt(3)*0.5 = 0.866 V_dc,
// leading the reference vector by 30 degrees. The test checks that
// amplitude to 2 %, the phase to 2 degrees, and that every low-order
// harmonic stays below 2 % of the fundamental. The same is done for
// v_bc and v_ca.
module tb_svpwm_spectrum;
  import svpwm_pkg::*;
  localparam int  REV = 360 * 1852;
  localparam real PI  = 3.141592653589793;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       sa_up, sa_lw, sb_up, sb_lw, sc_up, sc_lw, sa, sb, sc;
  sector_t    sector;
  logic [8:0] valpha, vbeta, tri_code, angle;
  logic [4:0] carrier_phase;

  svpwm_top dut (
    .clk(clk), .rst_n(rst_n),
    .sa_up(sa_up), .sa_lw(sa_lw), .sb_up(sb_up), .sb_lw(sb_lw), .sc_up(sc_up), .sc_lw(sc_lw),
    .sa(sa), .sb(sb), .sc(sc), .sector(sector), .valpha(valpha), .vbeta(vbeta),
    .tri_code(tri_code), .carrier_phase(carrier_phase), .angle(angle));

  always #15 clk = ~clk;

  int  checks = 0, failures = 0;
  real re [3][14];
  real im [3][14];
  real v [3];
  real x, amp, ph, h, exp_ph, worst;

  initial begin
    repeat (REV + 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < 3; l++)
      for (int k = 0; k < 14; k++) begin re[l][k] = 0.0; im[l][k] = 0.0; end
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // one revolution covers exactly 360 table steps
    for (int t = 1; t <= REV; t++) begin
      @(posedge clk); #1;
      v[0] = real'(int'(sa)) - real'(int'(sb));
      v[1] = real'(int'(sb)) - real'(int'(sc));
      v[2] = real'(int'(sc)) - real'(int'(sa));
      // the table value in use follows the angle counter by one clock
      x = 2.0 * PI * real'(t - 1) / real'(REV);
      for (int k = 1; k < 14; k++)
        for (int l = 0; l < 3; l++) begin
          re[l][k] += v[l] * $cos(k * x);
          im[l][k] += v[l] * $sin(k * x);
        end
    end
    for (int l = 0; l < 3; l++) begin
      amp = 2.0 * $sqrt(re[l][1] * re[l][1] + im[l][1] * im[l][1]) / real'(REV);
      ph  = $atan2(im[l][1], re[l][1]) * 180.0 / PI;   // v = amp*cos(x - ph), a lead of -ph
      // v_ab leads the reference by 30 degrees (ph = -30); v_bc and v_ca
      // follow 120 and 240 degrees later.
      // The table holds each step for its whole interval, which delays the
      // staircase by half a step (0.5 degree).
      exp_ph = -30.0 + 120.0 * l + 0.5;
      while (ph - exp_ph > 180.0) ph -= 360.0;
      while (exp_ph - ph > 180.0) ph += 360.0;
      $display("line %0d: fundamental %f V_dc (expected %f), leads the reference by %f deg (expected %f)",
               l, amp, 0.866, -ph, -exp_ph);
      checks += 2;
      if (amp < 0.866 * 0.98 || amp > 0.866 * 1.02) begin failures++; $display("amplitude off"); end
      if (ph - exp_ph > 2.0 || exp_ph - ph > 2.0) begin failures++; $display("phase off"); end
      worst = 0.0;
      for (int k = 2; k < 14; k++) begin
        h = 2.0 * $sqrt(re[l][k] * re[l][k] + im[l][k] * im[l][k]) / real'(REV) / amp;
        if (h > worst) worst = h;
        checks++;
        if (h > 0.02) begin failures++; $display("harmonic %0d at %f of fundamental", k, h); end
      end
      $display("line %0d: largest harmonic 2..13 is %f of the fundamental", l, worst);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
