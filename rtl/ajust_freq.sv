// Clock-enable generator for the carrier and the reference.
//
// The board clock (33.33 MHz) is divided twice. Dividing by CARRIER_DIV = 26
// gives the carrier sample rate; with 32 samples per carrier period this is
// a 40 kHz switching frequency (33.33 MHz / 26 / 32). Dividing by REF_DIV
// gives the rate at which the 360-entry sine/cosine tables are stepped;
// 1852 yields a 49.99 Hz reference. The carrier divider is the document's;
// the reference divider value is this design's, computed for 50 Hz.
//
// Rather than producing slower clocks, both outputs are single-cycle enable
// pulses in the clk domain, high on the last cycle of each count.
// Interface: clk, synchronous active-low rst_n; carrier_en, ref_en.
// Timing: the first carrier_en comes CARRIER_DIV cycles after reset is
// released, then every CARRIER_DIV cycles; likewise for ref_en.
module ajust_freq #(
  parameter int unsigned CARRIER_DIV = 26,
  parameter int unsigned REF_DIV     = 1852
) (
  input  logic clk,
  input  logic rst_n,
  output logic carrier_en,
  output logic ref_en
);

  localparam int unsigned CW = (CARRIER_DIV > 1) ? $clog2(CARRIER_DIV) : 1;
  localparam int unsigned RW = (REF_DIV > 1) ? $clog2(REF_DIV) : 1;

  logic [CW-1:0] carrier_cnt;
  logic [RW-1:0] ref_cnt;

  assign carrier_en = (carrier_cnt == CW'(CARRIER_DIV - 1));
  assign ref_en     = (ref_cnt == RW'(REF_DIV - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      carrier_cnt <= '0;
      ref_cnt     <= '0;
    end else begin
      carrier_cnt <= carrier_en ? '0 : carrier_cnt + 1'b1;
      ref_cnt     <= ref_en ? '0 : ref_cnt + 1'b1;
    end
  end

endmodule
