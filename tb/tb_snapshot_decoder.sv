// Test of the snapshot register and error decoder: every thermometer code
// of the eight captured taps gives e = 4 - (number of ones); a bubble is
// counted the same way; the output only changes on a strobe edge; reset
// gives e = 0.
`timescale 1ns/1ps
module tb_snapshot_decoder;
  import pfc_pkg::*;
  logic       strobe = 1'b0, rst_n = 1'b1;
  logic [7:0] taps;
  err_t       e;
  int         checks = 0, failures = 0;

  snapshot_decoder dut (.strobe(strobe), .rst_n(rst_n), .taps(taps), .e(e));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (e=%0d)", what, e); end
  endtask

  task automatic capture(input logic [7:0] t);
    taps = t;
    #5 strobe = 1'b1;
    #5 strobe = 1'b0;
    #1;
  endtask

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    taps = 8'hFF;
    #1 rst_n = 1'b0;
    #2 check(e == 0, "reset value is zero error");
    rst_n = 1'b1;
    for (int k = 0; k <= 8; k++) begin
      capture(8'((1 << k) - 1));
      check(e == err_t'(4 - k), $sformatf("thermometer with %0d ones", k));
    end
    taps = 8'h00;
    #5 check(e == -4, "output holds between strobes");
    capture(8'b0000_1011);
    check(e == 1, "bubble counted by ones");
    rst_n = 1'b0;
    #1 check(e == 0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
