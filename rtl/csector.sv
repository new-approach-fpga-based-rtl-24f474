// Truth table from the three comparison bits to the sector number.
//
// cmp = {V_beta > 0, V_beta > sqrt(3)*V_alpha, V_beta > -sqrt(3)*V_alpha}:
//   101 -> I, 111 -> II, 110 -> III, 010 -> IV, 000 -> V, 001 -> VI.
// The codes 011 and 100 cannot occur and give SEC_NONE. The table is the
// document's; the SEC_NONE output for the two impossible codes is this
// design's choice.
// Interface: cmp -> sector. Timing: combinational.
module csector
  import svpwm_pkg::*;
(
  input  logic [2:0] cmp,
  output sector_t    sector
);

  always_comb begin
    unique case (cmp)
      3'b101:  sector = SEC_I;
      3'b111:  sector = SEC_II;
      3'b110:  sector = SEC_III;
      3'b010:  sector = SEC_IV;
      3'b000:  sector = SEC_V;
      3'b001:  sector = SEC_VI;
      default: sector = SEC_NONE;
    endcase
  end

endmodule
