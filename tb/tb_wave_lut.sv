// Testbench for wave_lut: reads every entry of a cosine and a sine table and
// compares it, one cycle after the address, with 224 + round(128*cos/sin)
// computed here; also checks the extreme codes 96 and 352.
module tb_wave_lut;
  logic       clk = 1'b0;
  logic [8:0] addr;
  logic [8:0] dcos, dsin;
  int         checks = 0, failures = 0;
  int         ec, es, mn, mx;
  real        ang;

  wave_lut #(.COSINE(1'b1)) u_cos (.clk(clk), .addr(addr), .data(dcos));
  wave_lut #(.COSINE(1'b0)) u_sin (.clk(clk), .addr(addr), .data(dsin));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mn = 1000; mx = 0;
    for (int i = 0; i < 360; i++) begin
      addr = 9'(i);
      @(posedge clk); #1;
      ang = 2.0 * 3.141592653589793 * i / 360.0;
      ec = 224 + $rtoi($floor(128.0 * $cos(ang) + 0.5));
      es = 224 + $rtoi($floor(128.0 * $sin(ang) + 0.5));
      checks += 2;
      if (int'(dcos) != ec) begin failures++; if (failures < 10) $display("cos[%0d]=%0d exp %0d", i, dcos, ec); end
      if (int'(dsin) != es) begin failures++; if (failures < 10) $display("sin[%0d]=%0d exp %0d", i, dsin, es); end
      if (int'(dsin) < mn) mn = int'(dsin);
      if (int'(dsin) > mx) mx = int'(dsin);
    end
    checks++;
    if (mn != 96 || mx != 352) begin failures++; $display("range %0d..%0d", mn, mx); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
