// Testbench for ajust_freq: checks that carrier_en and ref_en are single-cycle
// pulses with periods of exactly 26 and 1852 clocks, the first one coming a
// full period after reset, and that a reset in mid-count restarts both.
module tb_ajust_freq;
  localparam int CDIV = 26;
  localparam int RDIV = 1852;

  logic clk = 1'b0;
  logic rst_n;
  logic carrier_en, ref_en;
  int   checks = 0, failures = 0;
  int   cyc, last_c, last_r, n_c, n_r;

  ajust_freq dut (.clk(clk), .rst_n(rst_n), .carrier_en(carrier_en), .ref_en(ref_en));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int cycles);
    // cyc = 1 is the first cycle sampled; the dividers have then counted
    // one cycle, so a pulse is due whenever cyc + 1 is a multiple of the
    // division ratio
    cyc = 0; last_c = 0; last_r = 0; n_c = 0; n_r = 0;
    repeat (cycles) begin
      @(negedge clk);
      cyc++;
      checks++;
      if (carrier_en !== (((cyc + 1) % CDIV) == 0)) begin
        failures++;
        if (failures < 10) $display("carrier_en=%0b at cycle %0d", carrier_en, cyc);
      end
      checks++;
      if (ref_en !== (((cyc + 1) % RDIV) == 0)) begin
        failures++;
        if (failures < 10) $display("ref_en=%0b at cycle %0d", ref_en, cyc);
      end
      if (carrier_en) n_c++;
      if (ref_en) n_r++;
      @(posedge clk);
    end
    checks++;
    if (n_c != (cycles + 1) / CDIV || n_r != (cycles + 1) / RDIV) begin
      failures++;
      $display("pulse counts %0d %0d", n_c, n_r);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // cycle 1 is the cycle right after the edge that released reset
    @(posedge clk);
    run(10000);
    // mid-count reset
    #1 rst_n = 1'b0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    run(4000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
