// Testbench for vbeta_valfa: steps the reference through more than one full
// revolution and checks the angle against a modulo-360 model and, one cycle
// later, V_alpha/V_beta against 224 + round(128*cos/sin(angle)).
module tb_vbeta_valfa;
  logic       clk = 1'b0;
  logic       rst_n, ref_en;
  logic [8:0] angle, valpha, vbeta;
  int         checks = 0, failures = 0;
  int         model, ea, eb, wraps;
  real        ang;

  vbeta_valfa dut (.clk(clk), .rst_n(rst_n), .ref_en(ref_en), .angle(angle), .valpha(valpha), .vbeta(vbeta));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; ref_en = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    model = 0; wraps = 0;
    for (int i = 0; i < 400; i++) begin
      ref_en = 1'b1;
      @(posedge clk); #1;
      ref_en = 1'b0;
      if (model == 359) wraps++;
      model = (model + 1) % 360;
      checks++;
      if (int'(angle) != model) begin failures++; if (failures < 10) $display("angle %0d exp %0d", angle, model); end
      @(posedge clk); #1;   // table output follows one cycle later
      ang = 2.0 * 3.141592653589793 * model / 360.0;
      ea = 224 + $rtoi($floor(128.0 * $cos(ang) + 0.5));
      eb = 224 + $rtoi($floor(128.0 * $sin(ang) + 0.5));
      checks += 2;
      if (int'(valpha) != ea) begin failures++; if (failures < 10) $display("valpha %0d exp %0d at %0d", valpha, ea, model); end
      if (int'(vbeta) != eb) begin failures++; if (failures < 10) $display("vbeta %0d exp %0d at %0d", vbeta, eb, model); end
    end
    checks++;
    if (wraps != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
