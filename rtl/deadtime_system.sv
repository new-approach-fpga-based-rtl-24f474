// Dead-time insertion for the three inverter legs.
//
// Each leg's switching state s[i] (1 = upper switch on) becomes a pair of
// gate signals up[i], lw[i] that are never on together. Whenever s[i]
// changes, both gates of that leg go off and a counter is loaded with
// DEAD_CYCLES; only when it has run down does the gate matching the new
// state turn on. A state that changes again before the counter expires
// restarts it, so a pulse shorter than the dead time is swallowed. The
// default of 67 cycles is the document's 2 us dead time at 33.33 MHz; the
// counter scheme is this design's choice. After reset both gates of every
// leg stay off for DEAD_CYCLES cycles.
// Interface: clk, rst_n, s[2:0] = {c, b, a} -> up[2:0], lw[2:0].
// Timing: outputs are registered. A change of s at a clock edge turns the
// conducting gate off at the next edge and the other gate on DEAD_CYCLES
// edges after that.
module deadtime_system #(
  parameter int unsigned DEAD_CYCLES = 67
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] s,
  output logic [2:0] up,
  output logic [2:0] lw
);

  localparam int unsigned DW = $clog2(DEAD_CYCLES + 1);

  logic [2:0]    s_q;
  logic [DW-1:0] cnt   [3];
  logic [DW-1:0] cnt_n [3];

  always_comb begin
    for (int i = 0; i < 3; i++) begin
      if (s[i] != s_q[i])
        cnt_n[i] = DW'(DEAD_CYCLES);
      else if (cnt[i] != '0)
        cnt_n[i] = cnt[i] - 1'b1;
      else
        cnt_n[i] = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_q <= '0;
      up  <= '0;
      lw  <= '0;
      for (int i = 0; i < 3; i++)
        cnt[i] <= DW'(DEAD_CYCLES);
    end else begin
      s_q <= s;
      for (int i = 0; i < 3; i++) begin
        cnt[i] <= cnt_n[i];
        up[i]  <= s[i] && (cnt_n[i] == '0);
        lw[i]  <= !s[i] && (cnt_n[i] == '0);
      end
    end
  end

  // The two gates of a leg must never conduct together.
  assert property (@(posedge clk) disable iff (!rst_n) (up & lw) == 3'b000);

endmodule
