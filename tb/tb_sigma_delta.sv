// Test of the first-order sigma-delta modulator: starting from reset, any
// 256 consecutive clocks with a constant input u give exactly u ones, and
// the ones are spread (no run of more than ceil(256/(256-u)) ones).
`timescale 1ns/1ps
module tb_sigma_delta;
  logic       clk = 1'b0, rst_n = 1'b0, bit_o;
  logic [7:0] u;
  int         checks = 0, failures = 0;

  sigma_delta dut (.clk(clk), .rst_n(rst_n), .u(u), .bit_o(bit_o));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int vals [8] = '{0, 1, 37, 64, 128, 200, 254, 255};
    foreach (vals[i]) begin
      int ones, run, maxrun, lim;
      u = 8'(vals[i]);
      rst_n = 1'b0;
      #12 rst_n = 1'b1;
      ones = 0; run = 0; maxrun = 0;
      repeat (256) begin
        @(posedge clk);
        #1;
        ones += int'(bit_o);
        run = bit_o ? run + 1 : 0;
        if (run > maxrun) maxrun = run;
      end
      check(ones == vals[i], $sformatf("u=%0d gives %0d ones", vals[i], ones));
      lim = (vals[i] == 255) ? 256 : (256 + 255 - vals[i]) / (256 - vals[i]);
      check(maxrun <= lim, $sformatf("u=%0d longest run %0d", vals[i], maxrun));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
