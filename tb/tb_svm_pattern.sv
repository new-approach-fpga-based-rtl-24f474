// Testbench for svm_pattern: for every sector, random thresholds
// T_a <= T_a+T_b and every carrier code, the legs must show the sector's
// first active vector V_k while the carrier is below T_a, the second active
// vector V_k+1 between T_a and T_a+T_b, and the zero vector above it: V7
// (111) in odd sectors, V0 (000) in even ones. The vector table
// V1..V6 = 100, 110, 010, 011, 001, 101 (legs a, b, c) is the reference.
module tb_svm_pattern;
  import svpwm_pkg::*;
  sector_t    sector;
  logic [8:0] tri_code, ta, tatb;
  logic       sa, sb, sc;
  int         checks = 0, failures = 0;
  int         k, tv, xa, xab;
  logic [2:0] vec [8];
  logic [2:0] expv;

  svm_pattern dut (.sector(sector), .tri_code(tri_code), .ta(ta), .tatb(tatb), .sa(sa), .sb(sb), .sc(sc));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec[0] = 3'b000; vec[1] = 3'b100; vec[2] = 3'b110; vec[3] = 3'b010;
    vec[4] = 3'b011; vec[5] = 3'b001; vec[6] = 3'b101; vec[7] = 3'b111;
    for (int r = 0; r < 300; r++) begin
      k   = 1 + (r % 6);
      xa  = $urandom_range(0, 128);
      xab = $urandom_range(xa, 128);
      sector = sector_t'(k);
      ta     = 9'(224 + xa);
      tatb   = 9'(224 + xab);
      for (tv = 0; tv <= 128; tv++) begin
        tri_code = 9'(224 + tv);
        #1;
        if (tv < xa)       expv = vec[k];
        else if (tv < xab) expv = vec[(k % 6) + 1];
        else               expv = (k % 2 == 1) ? vec[7] : vec[0];
        checks++;
        if ({sa, sb, sc} != expv) begin
          failures++;
          if (failures < 10) $display("sector %0d tri %0d ta %0d tatb %0d: got %b%b%b exp %b", k, tv, xa, xab, sa, sb, sc, expv);
        end
      end
    end
    sector = SEC_NONE; #1;
    checks++;
    if ({sa, sb, sc} != 3'b000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
