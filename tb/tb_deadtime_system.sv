// Testbench for deadtime_system at its default of 67 cycles (2 us at
// 33.33 MHz). Random switching states, with both long and very short
// pulses, drive the three legs. A reference model kept here says a gate is
// on exactly when the state sampled at the last 68 clock edges was
// constant and equal to that gate's level (and at least 67 cycles have
// passed since reset). It also checks the two gates are never on
// together, that the off-gap around each handover is never shorter than 67
// cycles, and that it is exactly 67 when no pulse was swallowed in between.
module tb_deadtime_system;
  localparam int DT = 67;
  logic       clk = 1'b0;
  logic       rst_n;
  logic [2:0] s, up, lw;
  int         checks = 0, failures = 0;
  int         stable [3];    // edges for which the sampled state has not changed
  logic [2:0] prev;
  int         gap [3];
  int         handovers, swallowed, exact_gaps;
  logic [2:0] last_on;       // 1: upper was the last gate on
  bit         first_on [3];
  int         hold;

  deadtime_system dut (.clk(clk), .rst_n(rst_n), .s(s), .up(up), .lw(lw));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model and checks, evaluated after every clock edge
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      for (int i = 0; i < 3; i++) begin
        logic eu, el;
        eu = s_sampled[i] && stable[i] >= DT;
        el = !s_sampled[i] && stable[i] >= DT;
        checks++;
        if (up[i] != eu || lw[i] != el) begin
          failures++;
          if (failures < 10) $display("%0t leg %0d: up=%0b lw=%0b expected %0b %0b", $time, i, up[i], lw[i], eu, el);
        end
        checks++;
        if (up[i] && lw[i]) failures++;
        // measure the off gap between an on-gate and the other gate
        if (up[i] || lw[i]) begin
          if (first_on[i] && (up[i] != last_on[i])) begin
            handovers++;
            checks++;
            if (gap[i] == DT) exact_gaps++;
            if (gap[i] < DT) begin
              failures++;
              $display("leg %0d handover gap %0d", i, gap[i]);
            end
          end
          first_on[i] = 1'b1;
          last_on[i]  = up[i];
          gap[i] = 0;
        end else begin
          gap[i]++;
        end
      end
    end
  end

  // state as sampled at each clock edge, and how long it has been constant
  logic [2:0] s_sampled;
  always @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) stable[i] = 0;
      s_sampled = s;
    end else begin
      for (int i = 0; i < 3; i++) begin
        if (s[i] == prev[i] && stable[i] < 1000000) stable[i]++;
        else if (s[i] != prev[i]) stable[i] = 0;
      end
      s_sampled = s;
    end
    prev = s;
  end

  initial begin
    handovers = 0; swallowed = 0; exact_gaps = 0;
    for (int i = 0; i < 3; i++) begin gap[i] = 0; first_on[i] = 1'b0; end
    rst_n = 1'b0; s = 3'b000;
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      s[$urandom_range(0, 2)] ^= 1'b1;
      hold = ($urandom_range(0, 3) == 0) ? $urandom_range(1, 60) : $urandom_range(68, 300);
      if (hold < DT) swallowed++;
      repeat (hold) @(posedge clk);
      #2;
    end
    checks++;
    if (handovers < 500 || swallowed < 100 || exact_gaps < 500) begin
      failures++;
      $display("handovers %0d short pulses %0d", handovers, swallowed);
    end
    $display("handovers %0d (exact gaps %0d), short pulses %0d", handovers, exact_gaps, swallowed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
