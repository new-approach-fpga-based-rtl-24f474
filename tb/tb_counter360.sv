// Testbench for counter360: drives a random enable and checks the count
// against a reference modulo-360 counter kept in the testbench, including
// several wraps from 359 to 0, holding while disabled and reset.
module tb_counter360;
  logic       clk = 1'b0;
  logic       rst_n, en;
  logic [8:0] count;
  int         checks = 0, failures = 0;
  int         model, wraps;

  counter360 dut (.clk(clk), .rst_n(rst_n), .en(en), .count(count));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; en = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    model = 0; wraps = 0;
    for (int i = 0; i < 3000; i++) begin
      en = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (en) begin
        if (model == 359) wraps++;
        model = (model + 1) % 360;
      end
      #1;
      checks++;
      if (int'(count) != model) begin
        failures++;
        if (failures < 10) $display("count=%0d expected %0d", count, model);
      end
    end
    checks++;
    if (wraps < 2) begin failures++; $display("only %0d wraps", wraps); end
    rst_n = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (count != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
