// Test of the delay line: with 3 programmable cells followed by 3 single
// cells, tap i rises at its cumulative delay, computed here as
// (programmable cells passed)*(zb+1) + (single cells passed) flip-flop
// delays; reset clears every tap.
`timescale 1ns/1ps
module tb_delay_line;
  localparam int NC = 6, NP = 3;
  real           vdd = 1.0;
  logic          start = 1'b0, rst = 1'b0;
  logic [1:0]    zb;
  logic [NC-1:0] taps;
  int            checks = 0, failures = 0;
  realtime       t0, t_rise [NC];

  delay_line #(.NCELLS(NC), .NPROG(NP), .K_NS_V(10.0)) dut (
    .vdd(vdd), .start(start), .rst(rst), .zb(zb), .taps(taps));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  for (genvar i = 0; i < NC; i++) begin : g_mon
    always @(posedge taps[i]) t_rise[i] = $realtime - t0;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real expect_t;
    for (int z = 0; z < 4; z++) begin
      zb = 2'(z);
      #1;
      check(taps == '0, "all taps low before start");
      t0 = $realtime;
      start = 1'b1;
      #300;
      check(taps == '1, "pulse reached the end");
      for (int i = 0; i < NC; i++) begin
        expect_t = 10.0 * real'((i < NP) ? (i + 1) * (z + 1) : NP * (z + 1) + (i + 1 - NP));
        check(t_rise[i] > expect_t - 0.01 && t_rise[i] < expect_t + 0.01,
              $sformatf("tap %0d rises at %0.1f ns for zb=%0d", i, expect_t, z));
      end
      start = 1'b0;
      rst = 1'b1;
      #15 check(taps == '0, "reset clears all taps");
      rst = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
