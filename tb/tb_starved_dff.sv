// Test of the supply-starved flip-flop model: clock-to-output and
// reset-to-output delays equal K/vdd, and a reset cancels a clock edge that
// is still propagating.
`timescale 1ns/1ps
module tb_starved_dff;
  real  vdd;
  logic clk = 1'b0, rst = 1'b0, q;
  int   checks = 0, failures = 0;

  starved_dff #(.K_NS_V(20.0)) dut (.vdd(vdd), .clk(clk), .rst(rst), .q(q));

  // waits a run-time number of nanoseconds in 10 ps steps
  task automatic wait_ns(input real ns);
    repeat (int'(ns * 100.0)) #0.01;
  endtask

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
    real v;
    #1;
    check(q == 1'b0, "starts cleared");
    foreach (v_list[i]) begin
      v = v_list[i];
      vdd = v;
      clk = 1'b1;
      wait_ns(20.0 / v - 0.05); check(q == 1'b0, "q still low just before K/vdd");
      #0.1               check(q == 1'b1, "q high just after K/vdd");
      clk = 1'b0;
      #5 rst = 1'b1;
      wait_ns(20.0 / v - 0.05); check(q == 1'b1, "q still high just before reset delay");
      #0.1               check(q == 1'b0, "q cleared after reset delay");
      rst = 1'b0;
      #5;
    end
    // a reset during the clock delay wins
    vdd = 1.0;
    clk = 1'b1;
    #5 rst = 1'b1;
    #2 rst = 1'b0;
    #30 check(q == 1'b0, "reset cancels a clock edge in flight");
    clk = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real v_list [4] = '{0.5, 1.0, 2.0, 3.3};
endmodule
