// Test of the current compensator against a reference model of the
// velocity-form PID d[n] = sat(d[n-1] + (KP+KI+KD)e[n] - (KP+2KD)e[n-1] +
// KD e[n-2], 0, 240), run with a nonzero KD so all three tables are used.
`timescale 1ns/1ps
module tb_current_compensator;
  import pfc_pkg::*;
  localparam int KP = 4, KI = 1, KD = 2, DMAX = 240;
  logic       clk = 1'b0, rst_n = 1'b0;
  err_t       e_i = '0;
  logic [7:0] d;
  int         checks = 0, failures = 0;

  current_compensator #(.KP(KP), .KI(KI), .KD(KD)) dut (.clk(clk), .rst_n(rst_n), .e_i(e_i), .d(d));

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
    int dm, e1, e2, n_hi, n_lo;
    dm = 0; e1 = 0; e2 = 0; n_hi = 0; n_lo = 0;
    #12 rst_n = 1'b1;
    check(d == 8'd0, "reset value");
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      e_i = err_t'(((n / 300) % 2 == 0) ? int'($urandom % 9) - 3 : int'($urandom % 9) - 5);
      dm = dm + (KP + KI + KD) * int'(e_i) - (KP + 2 * KD) * e1 + KD * e2;
      if (dm < 0) dm = 0;
      if (dm > DMAX) dm = DMAX;
      e2 = e1; e1 = int'(e_i);
      @(posedge clk);
      #1;
      check(int'(d) == dm, $sformatf("d=%0d expect %0d", d, dm));
      if (d == 8'(DMAX)) n_hi++;
      if (d == 8'd0) n_lo++;
    end
    check(n_hi > 0 && n_lo > 0, "both duty limits reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
