// Test of the ring oscillator model: taps stay low while disabled; when
// enabled, tap i rises at (i+1)*TD and falls at (NCELL+i+1)*TD, and the
// oscillation period is 2*NCELL*TD.
`timescale 1ns/1ps
module tb_ring_oscillator;
  localparam int NC = 16, TD = 1000;   // ps
  logic          en = 1'b0;
  logic [NC-1:0] taps;
  int            checks = 0, failures = 0;
  realtime       t0, t_r [NC], t_f [NC], t_r2;

  ring_oscillator #(.NCELL(NC), .TD_PS(TD)) dut (.en(en), .taps(taps));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  for (genvar i = 0; i < NC; i++) begin : g_mon
    always @(posedge taps[i]) if (t_r[i] < 0.0) t_r[i] = $realtime - t0; else if (i == 0 && t_r2 < 0.0) t_r2 = $realtime - t0;
    always @(negedge taps[i]) if (t_f[i] < 0.0) t_f[i] = $realtime - t0;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50 check(taps == '0, "idle while disabled");
    foreach (t_r[i]) begin t_r[i] = -1.0; t_f[i] = -1.0; end
    t_r2 = -1.0;
    t0 = $realtime;
    en = 1'b1;
    #100;
    for (int i = 0; i < NC; i++) begin
      check(t_r[i] > (i + 1) - 0.001 && t_r[i] < (i + 1) + 0.001, $sformatf("tap %0d rise", i));
      check(t_f[i] > (NC + i + 1) - 0.001 && t_f[i] < (NC + i + 1) + 0.001, $sformatf("tap %0d fall", i));
    end
    check(t_r2 - t_r[0] > 2 * NC - 0.001 && t_r2 - t_r[0] < 2 * NC + 0.001, "period 2*NCELL*TD");
    en = 1'b0;
    #100 check(taps == '0, "stops when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
