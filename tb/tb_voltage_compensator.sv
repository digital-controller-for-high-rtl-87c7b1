// Test of the voltage compensator against a reference model of
// acc[n] = sat(acc[n-1] + (KP+KI)*e[n] - KP*e[n-1]), u = acc >> FRAC,
// zb = max(3 - u[7:6], ZB_MIN), with random errors in -4..4, random enable
// gaps and both saturation limits reached.
`timescale 1ns/1ps
module tb_voltage_compensator;
  import pfc_pkg::*;
  localparam int KP = 640, KI = 2, FRAC = 4, ZB_MIN = 1;
  logic       clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  err_t       e_v = '0;
  logic [7:0] u;
  logic [1:0] zb;
  int         checks = 0, failures = 0;

  voltage_compensator dut (.clk(clk), .rst_n(rst_n), .en(en), .e_v(e_v), .u(u), .zb(zb));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int acc, ep, zexp, n_hi, n_lo;
    acc = 64 << FRAC; ep = 0; zexp = 3; n_hi = 0; n_lo = 0;
    #12 rst_n = 1'b1;
    check(u == 8'd64 && zb == 2'd3, "reset values");
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      en  = ($urandom % 3) != 0;
      // long runs of one sign drive u into both limits
      e_v = err_t'(((n / 400) % 2 == 0) ? int'($urandom % 5) - 1 : int'($urandom % 5) - 3);
      if (en) begin
        zexp = 3 - ((acc >> FRAC) >> 6);
        if (zexp < ZB_MIN) zexp = ZB_MIN;
        acc = acc + (KP + KI) * int'(e_v) - KP * ep;
        if (acc < 0) acc = 0;
        if (acc > 4095) acc = 4095;
        ep = int'(e_v);
      end
      @(posedge clk);
      #1;
      check(int'(u) == (acc >> FRAC), $sformatf("u=%0d expect %0d", u, acc >> FRAC));
      check(int'(zb) == zexp, "zero-bin control");
      if (u == 8'd255) n_hi++;
      if (u == 8'd0) n_lo++;
    end
    check(n_hi > 0 && n_lo > 0, "both saturation limits reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
