// Test of the windowed ADC in both forms: programmable cells (voltage loop)
// for every zb, and uniform cells (current loop). For each measured voltage
// the expected error is worked out from the cell delays: cell j of a line
// is passed after D_j unit delays, D_j = j*(zb+1) for the first N-1 cells
// and (N-1)*(zb+1) + (j-N+1) after them (zb taken as 0 in the uniform
// form); the strobe comes at D_N*K/v_ref, the measurement line has passed
// every j with D_j*K/v_meas <= that time, and e = clamp(N - k, -4, 4).
// Points within 2% of a unit delay from a threshold are skipped. The
// strobe time (conversion latency) is also checked, and conversions are
// repeated so the self-reset is exercised.
`timescale 1ns/1ps
module tb_windowed_adc;
  import pfc_pkg::*;
  localparam int  N = 16, M = 4;
  localparam real K = 20.0;

  real        v_ref = 2.0, v_meas;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic [1:0] zb = 2'd0;
  err_t       e_p, e_u;
  logic       done_p, done_u;
  int         checks = 0, failures = 0, skipped = 0;

  windowed_adc #(.N(N), .M(M), .PROG(1'b1), .K_NS_V(K)) dut_p (
    .v_ref(v_ref), .v_meas(v_meas), .clk(clk), .rst_n(rst_n), .zb(zb), .e(e_p), .done(done_p));
  windowed_adc #(.N(N), .M(M), .PROG(1'b0), .K_NS_V(K)) dut_u (
    .v_ref(v_ref), .v_meas(v_meas), .clk(clk), .rst_n(rst_n), .zb(2'd3), .e(e_u), .done(done_u));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real dcum(int j, int z);
    return (j <= N - 1) ? real'(j * (z + 1)) : real'((N - 1) * (z + 1) + (j - N + 1));
  endfunction

  // expected error, or 99 when the point is too close to a threshold
  function automatic int expect_e(real vm, int z);
    real lim;
    int  k;
    lim = dcum(N, z) * vm / v_ref;
    k = 0;
    for (int j = 1; j <= N + M; j++) begin
      if (dcum(j, z) - lim < 0.02 && lim - dcum(j, z) < 0.02) return 99;
      if (dcum(j, z) <= lim) k = j;
    end
    k = N - k;
    return (k > 4) ? 4 : (k < -4) ? -4 : k;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime t_clk, t_done_p;
  always @(posedge done_p) t_done_p = $realtime - t_clk;

  initial begin
    int ep, eu;
    real lat;
    v_meas = 2.0;
    #10 rst_n = 1'b1;
    for (int z = 0; z < 4; z++) begin
      zb = 2'(z);
      for (int s = 0; s <= 60; s++) begin
        v_meas = 1.4 + 0.02 * real'(s) + 0.0013;
        #10 t_clk = $realtime;
        clk = 1'b1;
        #3000 clk = 1'b0;
        #10;
        ep = expect_e(v_meas, z);
        eu = expect_e(v_meas, 0);
        if (ep == 99) skipped++;
        else check(e_p == err_t'(ep), $sformatf("programmable ADC zb=%0d v=%0.3f e=%0d expect %0d", z, v_meas, e_p, ep));
        if (eu == 99) skipped++;
        else check(e_u == err_t'(eu), $sformatf("uniform ADC v=%0.3f e=%0d expect %0d", v_meas, e_u, eu));
        lat = dcum(N, z) * K / v_ref;
        check(t_done_p > lat - 0.05 && t_done_p < lat + 0.05, "strobe after D_N unit delays");
        check(dut_p.ref_taps == '0 && dut_p.meas_taps == '0, "lines reset after conversion");
      end
    end
    $display("skipped %0d points near thresholds", skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
