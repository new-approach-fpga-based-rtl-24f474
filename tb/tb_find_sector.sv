// Testbench for find_sector: applies every pair of 9-bit codes inside the
// reference circle (radius 130 codes around 224) and compares the sector
// with floor(angle/60)+1, the angle taken with atan2 here. Points within
// 0.05 code of a sector boundary, and the origin, are skipped, since there
// the answer depends only on how a boundary point is assigned.
module tb_find_sector;
  import svpwm_pkg::*;
  logic [8:0] valpha, vbeta;
  logic [2:0] cmp;
  sector_t    sector;
  int         checks = 0, failures = 0, skipped = 0;
  int         a, b, exp_sec;
  int         seen [7];
  real        ang, d1, d2;

  find_sector dut (.valpha(valpha), .vbeta(vbeta), .cmp(cmp), .sector(sector));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 7; i++) seen[i] = 0;
    for (a = -130; a <= 130; a++) begin
      for (b = -130; b <= 130; b++) begin
        if (a * a + b * b > 130 * 130) continue;
        d1 = real'(b) - 1.7320508075688772 * real'(a);
        d2 = real'(b) + 1.7320508075688772 * real'(a);
        if (b == 0 || (d1 < 0.05 && d1 > -0.05) || (d2 < 0.05 && d2 > -0.05)) begin
          skipped++;
          continue;
        end
        valpha = 9'(224 + a);
        vbeta  = 9'(224 + b);
        #1;
        ang = $atan2(real'(b), real'(a)) * 180.0 / 3.141592653589793;
        if (ang < 0.0) ang += 360.0;
        exp_sec = $rtoi(ang / 60.0) + 1;
        checks++;
        if (int'(sector) != exp_sec) begin
          failures++;
          if (failures < 10) $display("a=%0d b=%0d sector=%0d expected %0d", a, b, sector, exp_sec);
        end
        seen[int'(sector) % 7]++;
      end
    end
    // each sector must have been produced
    for (int s = 1; s <= 6; s++) begin
      checks++;
      if (seen[s] == 0) begin failures++; $display("sector %0d never seen", s); end
    end
    $display("skipped %0d boundary points", skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
