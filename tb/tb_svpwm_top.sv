// End-to-end testbench for svpwm_top at its default parameters: one full
// 50 Hz reference revolution (360 table steps of 1852 clocks, about
// 20 ms at 33.33 MHz) plus a margin.
//
// The testbench keeps its own time base: after t clock edges since reset
// the carrier sample index is (t/26) mod 32 and the table angle is
// (t/1852) mod 360. From these it checks
//   - the reference codes, 224 + round(128*cos/sin(angle)), one cycle
//     behind the angle;
//   - the sector, floor(angle/60)+1 (boundary angles 0, 60, ... skipped);
//   - the switching states against the five-segment sequence built from
//     exact dwell times (samples within one code of a threshold skipped);
//   - the carrier period (832 clocks, 40.06 kHz) and the reference period
//     (666720 clocks, 49.99 Hz);
//   - the gates: never both on in a leg, an off gap of at least 67 clocks
//     at every handover, and after a state has held 68 clocks the gate
//     pair equal to (state, ~state).
// It counts each mechanism and fails if one never happened: all six
// sectors, periods with a leg clamped high (odd sectors) and low (even
// sectors), five-segment periods (four transitions), and dead-time
// handovers of exactly 67 clocks.
module tb_svpwm_top;
  import svpwm_pkg::*;
  localparam int CDIV = 26, NS = 32, RDIV = 1852, DT = 67;
  localparam int REV = 360 * RDIV;

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
  int  t, n, ang_now, ang_tab, a, b, k, tv, skipped;
  real th, mag, tar, tbr, angd;
  logic [2:0] vec [8];
  logic [2:0] expv, st, prev_st, up3, lw3, last_on;
  int  stable [3], gap [3];
  bit  seen_on [3];
  int  sec_seen [7];
  int  clamp_hi, clamp_lo, five_seg, handovers_exact, trans, wraps_c, wraps_r, last_wrap_c, last_wrap_r;

  function automatic int tab(input int i, input bit cosine);
    real x;
    x = 2.0 * 3.141592653589793 * i / 360.0;
    return 224 + $rtoi($floor(128.0 * (cosine ? $cos(x) : $sin(x)) + 0.5));
  endfunction

  task automatic fail(input string msg);
    failures++;
    if (failures < 15) $display("t=%0d: %s", t, msg);
  endtask

  initial begin
    repeat (REV + 60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec[0] = 3'b000; vec[1] = 3'b100; vec[2] = 3'b110; vec[3] = 3'b010;
    vec[4] = 3'b011; vec[5] = 3'b001; vec[6] = 3'b101; vec[7] = 3'b111;
    for (int i = 0; i < 7; i++) sec_seen[i] = 0;
    for (int i = 0; i < 3; i++) begin stable[i] = 0; gap[i] = 0; seen_on[i] = 1'b0; end
    clamp_hi = 0; clamp_lo = 0; five_seg = 0; handovers_exact = 0; trans = 0; skipped = 0;
    wraps_c = 0; wraps_r = 0; last_wrap_c = 0; last_wrap_r = 0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    prev_st = 3'b000;
    for (t = 1; t <= REV + 2000; t++) begin
      @(posedge clk); #1;
      n       = (t / CDIV) % NS;
      ang_now = (t / RDIV) % 360;
      ang_tab = ((t - 1) / RDIV) % 360;
      // time base
      checks += 2;
      if (int'(carrier_phase) != n) fail($sformatf("carrier phase %0d expected %0d", carrier_phase, n));
      if (int'(angle) != ang_now) fail($sformatf("angle %0d expected %0d", angle, ang_now));
      if (t % (CDIV * NS) == 0) begin
        if (wraps_c > 0) begin
          checks++;
          if (t - last_wrap_c != CDIV * NS) fail("carrier period");
        end
        wraps_c++; last_wrap_c = t;
      end
      if (t % REV == 0) begin wraps_r++; last_wrap_r = t; end
      // reference codes
      a = tab(ang_tab, 1'b1) - 224;
      b = tab(ang_tab, 1'b0) - 224;
      checks += 2;
      if (int'(valpha) != a + 224) fail($sformatf("valpha %0d expected %0d", valpha, a + 224));
      if (int'(vbeta) != b + 224) fail($sformatf("vbeta %0d expected %0d", vbeta, b + 224));
      // sector and switching states
      if (ang_tab % 60 != 0) begin
        k = ang_tab / 60 + 1;
        checks++;
        if (int'(sector) != k) fail($sformatf("sector %0d expected %0d", sector, k));
        sec_seen[int'(sector) % 7]++;
        angd = $atan2(real'(b), real'(a));
        if (angd < 0.0) angd += 2.0 * 3.141592653589793;
        th  = angd - (k - 1) * 3.141592653589793 / 3.0;
        mag = $sqrt(real'(a * a + b * b));
        tar = 0.75 * mag * $sin(3.141592653589793 / 3.0 - th) / ($sqrt(3.0) / 2.0);
        tbr = 0.75 * mag * $sin(th) / ($sqrt(3.0) / 2.0);
        tv  = 8 * ((n <= NS / 2) ? n : NS - n);
        if (real'(tv) < tar) expv = vec[k];
        else if (real'(tv) < tar + tbr) expv = vec[(k % 6) + 1];
        else expv = (k % 2 == 1) ? vec[7] : vec[0];
        if ((real'(tv) - tar < 1.0 && tar - real'(tv) < 1.0) ||
            (real'(tv) - tar - tbr < 1.0 && tar + tbr - real'(tv) < 1.0)) skipped++;
        else begin
          checks++;
          if ({sa, sb, sc} != expv) fail($sformatf("states %b%b%b expected %b (sector %0d, sample %0d)", sa, sb, sc, expv, k, n));
        end
      end
      // five-segment periods and clamped legs, judged at the end of a period
      st = {sc, sb, sa};
      if (t % CDIV == 0 && n == 0) begin
        if (trans == 4) five_seg++;
        trans = 0;
      end
      trans += $countones(st ^ prev_st);
      if (n == NS / 2 && t % CDIV == 0) begin
        // mid-period: the leg the sector clamps must sit at its rail
        if ((sector == SEC_I && sa) || (sector == SEC_III && sb) || (sector == SEC_V && sc)) clamp_hi++;
        if ((sector == SEC_II && !sc) || (sector == SEC_IV && !sa) || (sector == SEC_VI && !sb)) clamp_lo++;
      end
      // gates
      up3 = {sc_up, sb_up, sa_up};
      lw3 = {sc_lw, sb_lw, sa_lw};
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (up3[i] && lw3[i]) fail($sformatf("leg %0d both gates on", i));
        if (up3[i] || lw3[i]) begin
          if (seen_on[i] && up3[i] != last_on[i]) begin
            checks++;
            if (gap[i] < DT) fail($sformatf("leg %0d dead gap %0d", i, gap[i]));
            if (gap[i] == DT) handovers_exact++;
          end
          seen_on[i] = 1'b1; last_on[i] = up3[i]; gap[i] = 0;
        end else gap[i]++;
        // state held for DT+1 edges: the gates must follow it
        if (stable[i] >= DT + 1) begin
          checks++;
          if (up3[i] != prev_st[i] || lw3[i] != !prev_st[i]) fail($sformatf("leg %0d gates %b%b after a stable state", i, up3[i], lw3[i]));
        end
        if (st[i] == prev_st[i]) stable[i]++; else stable[i] = 1;
      end
      prev_st = st;
    end
    // mechanisms and rates
    checks++;
    if (wraps_r != 1 || last_wrap_r != REV) fail($sformatf("reference revolutions %0d", wraps_r));
    for (int s = 1; s <= 6; s++) begin
      checks++;
      if (sec_seen[s] == 0) fail($sformatf("sector %0d never seen", s));
    end
    checks += 4;
    if (clamp_hi == 0) fail("no period with a leg clamped high");
    if (clamp_lo == 0) fail("no period with a leg clamped low");
    if (five_seg == 0) fail("no five-segment period");
    if (handovers_exact == 0) fail("no dead-time handover");
    $display("carrier periods %0d, five-segment periods %0d, clamped high %0d, clamped low %0d",
             wraps_c, five_seg, clamp_hi, clamp_lo);
    $display("dead-time handovers of exactly %0d clocks: %0d; samples skipped %0d", DT, handovers_exact, skipped);
    $display("sector samples: %0d %0d %0d %0d %0d %0d", sec_seen[1], sec_seen[2], sec_seen[3], sec_seen[4], sec_seen[5], sec_seen[6]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
