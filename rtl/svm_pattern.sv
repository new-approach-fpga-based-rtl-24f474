// Five-segment discontinuous switching pattern from two comparisons.
//
// In every sector one leg is held for the whole carrier period: at 1 in the
// odd sectors, whose zero vector is V7 (pattern X-Y-V7-Y-X), and at 0 in the
// even sectors, whose zero vector is V0 (pattern X-Y-V0-Y-X). The other two
// legs come from comparing the carrier with T_a and with T_a+T_b: in odd
// sectors the first leg to turn on switches when the carrier reaches T_a and
// the second when it reaches T_a+T_b; in even sectors the complements of the
// same comparisons turn legs off. Per sector (ca = tri>=T_a,
// cab = tri>=T_a+T_b):
//   I:   a=1,   b=ca,   c=cab     II: c=0, a=~ca,  b=~cab
//   III: b=1,   c=ca,   a=cab     IV: a=0, b=~ca,  c=~cab
//   V:   c=1,   a=ca,   b=cab     VI: b=0, c=~ca,  a=~cab
// The scheme (clamped leg, plain comparisons in odd and complemented ones
// in even sectors) is the document's; the leg assignment outside sector I
// follows from the sector's two active vectors, and ">=" (so that T_a = 0
// leaves a leg unswitched) is this design's choice.
// Interface: sector, tri_code, ta, tatb -> sa, sb, sc (1 = upper switch on).
// Timing: purely combinational.
module svm_pattern
  import svpwm_pkg::*;
(
  input  sector_t sector,
  input  code_t   tri_code,
  input  code_t   ta,
  input  code_t   tatb,
  output logic    sa,
  output logic    sb,
  output logic    sc
);

  logic ca;
  logic cab;

  always_comb begin
    ca  = (tri_code >= ta);
    cab = (tri_code >= tatb);
    unique case (sector)
      SEC_I:   {sa, sb, sc} = {1'b1, ca,   cab };
      SEC_II:  {sa, sb, sc} = {~ca,  ~cab, 1'b0};
      SEC_III: {sa, sb, sc} = {cab,  1'b1, ca  };
      SEC_IV:  {sa, sb, sc} = {1'b0, ~ca,  ~cab};
      SEC_V:   {sa, sb, sc} = {ca,   cab,  1'b1};
      SEC_VI:  {sa, sb, sc} = {~cab, 1'b0, ~ca };
      default: {sa, sb, sc} = 3'b000;
    endcase
  end

endmodule
