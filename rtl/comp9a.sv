// Signed magnitude comparator of the sector test: gt = (x > y).
//
// Compares V_beta, scaled to the same Q10 fraction as the multiplier
// output, with +/-sqrt(3)*V_alpha. Used twice in find_sector; the name and
// role are the document's, the width is this design's.
// Interface: x, y (24-bit signed) -> gt. Timing: combinational.
module comp9a (
  input  logic signed [23:0] x,
  input  logic signed [23:0] y,
  output logic               gt
);

  assign gt = (x > y);

endmodule
