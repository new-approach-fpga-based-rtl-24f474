// Sign test of the sector identification: pos = (V_beta > 0).
//
// V_beta arrives as an offset code (BASE stands for zero), so the test is
// an unsigned comparison with BASE. Name and role are the document's.
// Interface: vbeta (9-bit code) -> pos. Timing: combinational.
module compa
  import svpwm_pkg::*;
#(
  parameter int unsigned BASE = 224
) (
  input  code_t vbeta,
  output logic  pos
);

  assign pos = (vbeta > code_t'(BASE));

endmodule
