// Testbench for triangle: steps the carrier with an irregular enable and
// checks each sample against 224 + 8*min(n, 32-n) for sample index n, the
// period of 32 samples, the valley marker and the 224..352 range.
module tb_triangle;
  logic       clk = 1'b0;
  logic       rst_n, step_en;
  logic [4:0] phase;
  logic [8:0] tri_code;
  logic       period_start;
  int         checks = 0, failures = 0;
  int         n, expc, periods, mn, mx;

  triangle dut (.clk(clk), .rst_n(rst_n), .step_en(step_en), .phase(phase), .tri_code(tri_code), .period_start(period_start));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; step_en = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    n = 0; periods = 0; mn = 1000; mx = 0;
    for (int i = 0; i < 5000; i++) begin
      step_en = ($urandom_range(0, 2) == 0);
      @(posedge clk); #1;
      if (step_en) begin
        n = (n + 1) % 32;
        if (n == 0) periods++;
      end
      expc = 224 + 8 * ((n <= 16) ? n : 32 - n);
      checks += 3;
      if (int'(tri_code) != expc) begin failures++; if (failures < 10) $display("n=%0d tri=%0d exp %0d", n, tri_code, expc); end
      if (int'(phase) != n) failures++;
      if (period_start != (n == 0)) failures++;
      if (int'(tri_code) < mn) mn = int'(tri_code);
      if (int'(tri_code) > mx) mx = int'(tri_code);
    end
    checks++;
    if (mn != 224 || mx != 352 || periods < 10) begin failures++; $display("range %0d..%0d periods %0d", mn, mx, periods); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
