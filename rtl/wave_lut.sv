// Sine or cosine look-up table, one entry per degree.
//
// Entry i holds BASE + round(AMP * f(2*pi*i/ENTRIES)), with f = cos when
// COSINE = 1 (the V_alpha table) and f = sin otherwise (the V_beta table).
// With the document's numbers (360 entries, base 224, amplitude 128) the
// codes run from 96 to 352 in 9 unsigned bits. The contents are computed
// at elaboration from that formula; the table is a ROM with a registered
// output (one cycle of latency), which is this design's choice and maps to
// an embedded memory block.
// Interface: clk, addr (0..ENTRIES-1) -> data. Timing: data is valid one
// cycle after addr.
module wave_lut #(
  parameter int unsigned ENTRIES = 360,
  parameter int unsigned BASE    = 224,
  parameter int unsigned AMP     = 128,
  parameter bit          COSINE  = 1'b0
) (
  input  logic                       clk,
  input  logic [$clog2(ENTRIES)-1:0] addr,
  output svpwm_pkg::code_t           data
);

  typedef svpwm_pkg::code_t rom_t [ENTRIES];

  function automatic rom_t make_table();
    rom_t t;
    real  ang;
    real  f;
    for (int i = 0; i < int'(ENTRIES); i++) begin
      ang  = 2.0 * 3.14159265358979323846 * real'(i) / real'(ENTRIES);
      f    = COSINE ? $cos(ang) : $sin(ang);
      t[i] = svpwm_pkg::code_t'(int'(BASE) + $rtoi($floor(real'(AMP) * f + 0.5)));
    end
    return t;
  endfunction

  localparam rom_t TABLE = make_table();

  always_ff @(posedge clk)
    data <= (int'(addr) < int'(ENTRIES)) ? TABLE[addr] : svpwm_pkg::code_t'(BASE);

endmodule
