// Test of the segmented-ring DPWM with the ring oscillator model (1 ns cell
// delay, so one switching period is 256 ns): the clk_sw period is 256 cell
// delays, and for each duty command d (all 256 values, then random) the
// gate pulse starts at the period start and is exactly d cell delays long,
// in the second period after the command is applied (one period of
// latency, d being sampled at position 240).
`timescale 1ns/1ps
module tb_segmented_dpwm;
  logic [15:0] taps;
  logic        rst_n = 1'b0, pwm, clk_sw;
  logic [7:0]  d = '0;
  int          checks = 0, failures = 0;
  realtime     t_start, t_rise, t_fall;

  ring_oscillator #(.NCELL(16), .TD_PS(1000)) u_ring (.en(rst_n), .taps(taps));
  segmented_dpwm dut (.taps(taps), .rst_n(rst_n), .d(d), .pwm(pwm), .clk_sw(clk_sw));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge pwm) t_rise = $realtime;
  always @(negedge pwm) t_fall = $realtime;

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_duty(input int dv);
    realtime w;
    @(posedge clk_sw);
    d = 8'(dv);
    @(posedge clk_sw);   // command sampled during this period
    @(posedge clk_sw);
    t_start = $realtime;
    t_rise = -1.0; t_fall = -1.0;
    #255.5;
    if (dv == 0) begin
      check(t_rise < 0.0 && !pwm, "zero duty keeps the gate low");
    end else begin
      w = t_fall - t_rise;
      check(t_rise > t_start - 1.001 && t_rise < t_start + 0.001, $sformatf("d=%0d pulse starts with the period", dv));
      check(w > dv - 0.01 && w < dv + 0.01, $sformatf("d=%0d width %0.2f", dv, w));
    end
  endtask

  initial begin
    realtime p0;
    #20 rst_n = 1'b1;
    @(posedge clk_sw);
    p0 = $realtime;
    @(posedge clk_sw);
    check($realtime - p0 > 255.99 && $realtime - p0 < 256.01, "switching period is 256 cell delays");
    for (int dv = 0; dv < 256; dv++) run_duty(dv);
    repeat (50) run_duty(int'($urandom % 256));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
