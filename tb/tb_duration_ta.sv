// Testbench for duration_ta: applies random reference vectors of random
// magnitude (up to 128 codes) and angle, with the sector worked out here
// from the angle, and compares the output with the half dwell times of the
// sector's two active vectors obtained by resolving the vector onto them:
// for an angle th inside the sector (0..60 degrees), T_a = 3/4*|V|*sin(60-th)/
// sin(60) and T_b = 3/4*|V|*sin(th)/sin(60). A difference of one code is
// allowed for rounding.
module tb_duration_ta;
  import svpwm_pkg::*;
  logic [8:0] valpha, vbeta, y;
  sector_t    sector;
  int         checks = 0, failures = 0;
  int         a, b, k, expv, got;
  real        mag, ang, th, tar, tbr, r3;

  duration_ta dut (.valpha(valpha), .vbeta(vbeta), .sector(sector), .ta(y));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r3 = $sqrt(3.0);
    for (int n = 0; n < 20000; n++) begin
      mag = real'($urandom_range(0, 128));
      ang = real'($urandom_range(0, 35999)) / 100.0;
      a = $rtoi($floor(mag * $cos(ang * 3.141592653589793 / 180.0) + 0.5));
      b = $rtoi($floor(mag * $sin(ang * 3.141592653589793 / 180.0) + 0.5));
      // recompute the angle of the rounded vector
      ang = $atan2(real'(b), real'(a)) * 180.0 / 3.141592653589793;
      if (ang < 0.0) ang += 360.0;
      k  = $rtoi(ang / 60.0);
      th = (ang - 60.0 * k) * 3.141592653589793 / 180.0;
      mag = $sqrt(real'(a * a + b * b));
      tar = 0.75 * mag * $sin(3.141592653589793 / 3.0 - th) / (r3 / 2.0);
      tbr = 0.75 * mag * $sin(th) / (r3 / 2.0);
      valpha = 9'(224 + a);
      vbeta  = 9'(224 + b);
      sector = sector_t'(k + 1);
      #1;
      expv = 224 + $rtoi($floor(tar + 0.5));
      got  = int'(y);
      checks++;
      if (got > expv + 1 || got < expv - 1) begin
        failures++;
        if (failures < 10) $display("a=%0d b=%0d sector=%0d got %0d expected %0d", a, b, k + 1, got, expv);
      end
    end
    // an unreachable sector code gives a zero duration
    valpha = 9'd300; vbeta = 9'd250; sector = SEC_NONE;
    #1;
    checks++;
    if (y != 9'd224) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
