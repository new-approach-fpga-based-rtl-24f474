// Modulo-360 address counter for the sine and cosine tables.
//
// Counts 0..MOD-1 and wraps, one step per en pulse, so one full table sweep
// (one reference period) takes MOD enables. The modulus follows the
// document's 360-entry tables; the enable input and the synchronous
// active-low reset are this design's choice.
// Interface: clk, rst_n, en -> count. Timing: count changes on the clock
// edge at which en is high.
module counter360 #(
  parameter int unsigned MOD = 360
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  output logic [$clog2(MOD)-1:0] count
);

  localparam int unsigned W = $clog2(MOD);

  always_ff @(posedge clk) begin
    if (!rst_n)
      count <= '0;
    else if (en)
      count <= (count == W'(MOD - 1)) ? '0 : count + 1'b1;
  end

endmodule
