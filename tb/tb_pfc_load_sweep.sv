// Steady-state load sweep of the PFC controller: power factor at 20 %,
// 50 % and 100 % of a 300 W rating on a 110 Vrms / 60 Hz line.
//
// Same behavioural boost PFC as the end-to-end test (1 mH, 220 uF, 380 V
// target, 1 V front-end offset on the ADC supplies), controller at default
// parameters. The output starts at 385 V; each load is held for 30 ms and
// the power factor (sum of vg*iL over sqrt of sum vg^2 * sum iL^2) and the
// average input power are measured over the last line cycle of each step.
// Checks: power factor above 0.98 at 150 W and 300 W and above 0.90 at
// 60 W (where one current-ADC level is a quarter of the peak current), the measured input power
// within 15 % of the load power plus the change in stored energy, and the
// output voltage inside 360..410 V at the end of each step.
`timescale 1ns/1ps
module tb_pfc_load_sweep;
  import pfc_pkg::*;

  localparam real VPK   = 155.56;
  localparam real FLINE = 60.0;
  localparam real L_H   = 1.0e-3;
  localparam real C_F   = 220.0e-6;
  localparam real VREF  = 2.5;
  localparam real VTARG = 380.0;
  localparam real H1    = VREF / VTARG;
  localparam real H2    = 0.00987;
  localparam real GI    = 0.4;
  localparam real VOS   = 1.0;
  localparam real TAU_F = 50.0e-6;
  localparam real DT    = 20.0e-9;
  localparam real PI    = 3.14159265358979;

  logic rst_n = 1'b0;
  real  v_ref, v_fb, v_iref, v_isense;
  logic gate, sd_bit, clk_sw;
  err_t e_v, e_i;
  logic [UW-1:0] u;
  logic [DW-1:0] d;
  logic [1:0] zb;

  pfc_controller dut (
    .rst_n(rst_n), .v_ref(v_ref), .v_fb(v_fb), .v_iref(v_iref), .v_isense(v_isense),
    .gate(gate), .sd_bit(sd_bit), .clk_sw(clk_sw), .e_v(e_v), .e_i(e_i),
    .u(u), .d(d), .zb(zb));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  real t = 0.0, il = 0.0, vout = 385.0, vcap = 0.0, rload, vg;
  real sum_p = 0.0, sum_v2 = 0.0, sum_i2 = 0.0;
  int  n_meas = 0;
  bit  measure = 1'b0;

  initial begin
    rload = VTARG * VTARG / 60.0;
    v_ref = VREF;
    forever begin
      vg = VPK * $sin(2.0 * PI * FLINE * t);
      if (vg < 0.0) vg = -vg;
      if (gate) il = il + vg / L_H * DT;
      else      il = il + (vg - vout) / L_H * DT;
      if (il < 0.0) il = 0.0;
      vout = vout + ((gate ? 0.0 : il) - vout / rload) / C_F * DT;
      vcap = vcap + ((sd_bit ? H2 * vg : 0.0) - vcap) / TAU_F * DT;
      v_fb     = H1 * vout;
      v_iref   = VOS + vcap;
      v_isense = VOS + GI * il;
      if (measure) begin
        sum_p  += vg * il;
        sum_v2 += vg * vg;
        sum_i2 += il * il;
        n_meas++;
      end
      #20;
      t = t + DT;
    end
  end

  initial begin
    #(100.0e6);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static real loads [3] = '{60.0, 150.0, 300.0};
    real pf, pin, pload, v0, dwdt;
    #1000.0 rst_n = 1'b1;
    foreach (loads[k]) begin
      rload = VTARG * VTARG / loads[k];
      if (k == 0) #(30.0e6 - 1.0e9 / FLINE - 1000.0);
      else        #(30.0e6 - 1.0e9 / FLINE);
      sum_p = 0.0; sum_v2 = 0.0; sum_i2 = 0.0; n_meas = 0;
      v0 = vout;
      measure = 1'b1;
      #(1.0e9 / FLINE);
      measure = 1'b0;
      pf    = sum_p / $sqrt(sum_v2 * sum_i2);
      pin   = sum_p / real'(n_meas);
      pload = vout * vout / rload;
      dwdt  = 0.5 * C_F * (vout * vout - v0 * v0) * FLINE;
      $display("load %0.0f W: pf=%0.3f pin=%0.1f W (load %0.1f W, storage %0.1f W) vout=%0.1f u=%0d zb=%0d",
               loads[k], pf, pin, pload, dwdt, vout, u, zb);
      check(pf > ((k == 0) ? 0.90 : 0.98), $sformatf("power factor above %0.2f at %0.0f W", (k == 0) ? 0.90 : 0.98, loads[k]));
      check(pin > 0.85 * (pload + dwdt) && pin < 1.15 * (pload + dwdt),
            $sformatf("input power balances output at %0.0f W", loads[k]));
      check(vout > 360.0 && vout < 410.0, $sformatf("output regulated at %0.0f W", loads[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
