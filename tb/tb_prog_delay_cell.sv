// Test of the programmable delay cell: for each zb the rising edge leaves
// after zb+1 flip-flop delays (20 ns each at 1 V, 10 ns at 2 V), and reset
// clears the output one flip-flop delay later.
`timescale 1ns/1ps
module tb_prog_delay_cell;
  real        vdd;
  logic       in = 1'b0, rst = 1'b0, out;
  logic [1:0] zb;
  int         checks = 0, failures = 0;

  prog_delay_cell #(.K_NS_V(20.0)) dut (.vdd(vdd), .in(in), .rst(rst), .zb(zb), .out(out));

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
    realtime t0, dly, tff;
    for (int v = 1; v <= 2; v++) begin
      vdd = real'(v);
      tff = 20.0 / real'(v);
      for (int z = 0; z < 4; z++) begin
        zb = 2'(z);
        #1;
        check(out == 1'b0, "output low before the edge");
        t0 = $realtime;
        in = 1'b1;
        @(posedge out);
        dly = $realtime - t0;
        check(dly > (z + 1) * tff - 0.01 && dly < (z + 1) * tff + 0.01,
              $sformatf("delay for zb=%0d is %0d flip-flop delays", z, z + 1));
        wait_ns(4 * tff);
        check(out == 1'b1, "output stays high");
        in = 1'b0;
        rst = 1'b1;
        t0 = $realtime;
        @(negedge out);
        dly = $realtime - t0;
        check(dly > tff - 0.01 && dly < tff + 0.01, "reset delay is one flip-flop delay");
        #1 rst = 1'b0;
        wait_ns(2 * tff);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
