// Testbench for svm_generator: the carrier is stepped every clock, and a
// random reference vector (radius up to 128 codes), with its sector worked
// out here from atan2, is held for each 32-sample carrier period. Every
// sample is compared with the vector the five-segment sequence calls for,
// derived here from exact dwell times: the first active vector V_k while the
// carrier (8*min(n,32-n) above 224) is below T_a, V_k+1 up to T_a+T_b, then
// the zero vector (V7 in odd, V0 in even sectors). Samples within one code
// of a threshold are not compared. Per period it checks that the clamped
// leg never moves, that at most four transitions occur, and the triangle
// period of 32 enables.
module tb_svm_generator;
  import svpwm_pkg::*;
  logic       clk = 1'b0;
  logic       rst_n, carrier_en;
  logic [8:0] valpha, vbeta, tri_code, ta, tatb;
  logic [4:0] phase;
  sector_t    sector;
  logic       sa, sb, sc;
  int         checks = 0, failures = 0, skipped = 0;
  int         a, b, k, tv, trans, clamp_hi, clamp_lo;
  real        mag, ang, th, tar, tbr;
  logic [2:0] vec [8];
  logic [2:0] expv, prevs;

  svm_generator dut (.clk(clk), .rst_n(rst_n), .carrier_en(carrier_en), .valpha(valpha), .vbeta(vbeta),
                     .sector(sector), .sa(sa), .sb(sb), .sc(sc), .phase(phase), .tri_code(tri_code),
                     .ta(ta), .tatb(tatb));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec[0] = 3'b000; vec[1] = 3'b100; vec[2] = 3'b110; vec[3] = 3'b010;
    vec[4] = 3'b011; vec[5] = 3'b001; vec[6] = 3'b101; vec[7] = 3'b111;
    clamp_hi = 0; clamp_lo = 0;
    rst_n = 1'b0; carrier_en = 1'b1; valpha = 9'd224; vbeta = 9'd224; sector = SEC_V;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int p = 0; p < 2000; p++) begin
      // choose the next vector while the phase is 0
      mag = real'($urandom_range(10, 128));
      ang = real'($urandom_range(0, 35999)) / 100.0;
      a = $rtoi($floor(mag * $cos(ang * 3.141592653589793 / 180.0) + 0.5));
      b = $rtoi($floor(mag * $sin(ang * 3.141592653589793 / 180.0) + 0.5));
      ang = $atan2(real'(b), real'(a)) * 180.0 / 3.141592653589793;
      if (ang < 0.0) ang += 360.0;
      k  = $rtoi(ang / 60.0);
      th = (ang - 60.0 * k) * 3.141592653589793 / 180.0;
      mag = $sqrt(real'(a * a + b * b));
      tar = 0.75 * mag * $sin(3.141592653589793 / 3.0 - th) / ($sqrt(3.0) / 2.0);
      tbr = 0.75 * mag * $sin(th) / ($sqrt(3.0) / 2.0);
      k = k + 1;
      valpha = 9'(224 + a);
      vbeta  = 9'(224 + b);
      sector = sector_t'(k);
      trans = 0;
      for (int n = 0; n < 32; n++) begin
        #1;
        checks++;
        if (int'(phase) != n) begin failures++; if (failures < 10) $display("phase %0d expected %0d", phase, n); end
        tv = 8 * ((n <= 16) ? n : 32 - n);
        if (real'(tv) < tar) expv = vec[k];
        else if (real'(tv) < tar + tbr) expv = vec[(k % 6) + 1];
        else expv = (k % 2 == 1) ? vec[7] : vec[0];
        if ((real'(tv) - tar < 1.0 && tar - real'(tv) < 1.0) ||
            (real'(tv) - tar - tbr < 1.0 && tar + tbr - real'(tv) < 1.0)) begin
          skipped++;
        end else begin
          checks++;
          if ({sa, sb, sc} != expv) begin
            failures++;
            if (failures < 10) $display("sector %0d n=%0d ta=%f tab=%f got %b%b%b exp %b", k, n, tar, tar + tbr, sa, sb, sc, expv);
          end
        end
        if (n != 0 && {sa, sb, sc} != prevs) trans += $countones({sa, sb, sc} ^ prevs);
        prevs = {sa, sb, sc};
        // the clamped leg: a in I/IV, b in III/VI, c in V/II
        checks++;
        case (k)
          1: if (sa != 1'b1) failures++;
          2: if (sc != 1'b0) failures++;
          3: if (sb != 1'b1) failures++;
          4: if (sa != 1'b0) failures++;
          5: if (sc != 1'b1) failures++;
          default: if (sb != 1'b0) failures++;
        endcase
        @(posedge clk);
      end
      if (k % 2 == 1) clamp_hi++; else clamp_lo++;
      checks++;
      if (trans > 4) begin failures++; $display("%0d transitions in one period", trans); end
    end
    checks++;
    if (clamp_hi == 0 || clamp_lo == 0) failures++;
    $display("periods with a leg clamped high %0d, low %0d; samples skipped %0d", clamp_hi, clamp_lo, skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
