// Test of the conversion clock divider: adc_clk has a period of exactly 10
// input clocks, high for 5, and sample_en is high in exactly one cycle per
// period, the last one before the next adc_clk rising edge.
`timescale 1ns/1ps
module tb_adc_clk_div;
  logic clk = 1'b0, rst_n = 1'b0, adc_clk, sample_en;
  int   checks = 0, failures = 0;

  adc_clk_div dut (.clk(clk), .rst_n(rst_n), .adc_clk(adc_clk), .sample_en(sample_en));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, last_rise, n_rise, n_high, n_en;
    logic prev;
    cyc = 0; last_rise = -1; n_rise = 0; n_high = 0; n_en = 0; prev = 1'b0;
    #12 rst_n = 1'b1;
    repeat (205) begin
      @(posedge clk);
      #1;
      cyc++;
      if (adc_clk && !prev) begin
        if (last_rise >= 0) check(cyc - last_rise == 10, "adc_clk period is 10 clocks");
        check(n_en == 1 || last_rise < 0, "one sample_en per period");
        if (last_rise >= 0) check(n_high == 5, "adc_clk high for 5 clocks");
        last_rise = cyc; n_rise++; n_high = 0; n_en = 0;
      end
      if (adc_clk) n_high++;
      if (sample_en) begin
        n_en++;
        check(cyc - last_rise == 9, "sample_en in the last cycle of the period");
      end
      prev = adc_clk;
    end
    check(n_rise == 21, "21 conversions in 205 clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
