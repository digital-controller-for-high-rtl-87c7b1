// End-to-end test of the PFC controller on a behavioural boost PFC.
//
// The testbench models what sits outside the chip: a 110 Vrms / 60 Hz line,
// the diode bridge, a 1 mH boost inductor, a 220 uF output capacitor and a
// resistive load, the attenuators H1 and H2, the current-sense amplifier and
// the floating-reference switch with its filter capacitor (time constant
// 50 us, holding 0.5 V at start so the first current conversions
// saturate). The analog inputs of the delay-line ADCs carry a 1 V offset so
// their supplies never reach zero at the line zero crossing.
// The controller runs with all parameters at their defaults (200 kHz).
// Sequence: start-up from 290 V at 100 W, load step to 175 W at
// 30 ms, run to 65 ms. Checks: switching period and 1/10 voltage-ADC rate,
// output voltage band, input power factor over the last line cycle, and
// that every mechanism was exercised: zero-error bin (dead zone), both
// error signs and saturation of each ADC, a change of zero-bin size, duty
// saturation and sigma-delta activity.
`timescale 1ns/1ps
module tb_pfc_controller;
  import pfc_pkg::*;

  // plant constants
  localparam real VPK    = 155.56;       // 110 Vrms peak
  localparam real FLINE  = 60.0;
  localparam real L_H    = 1.0e-3;
  localparam real C_F    = 220.0e-6;
  localparam real VREF   = 2.5;
  localparam real VTARG  = 380.0;        // bottom of the zero bin
  localparam real H1     = VREF / VTARG;
  localparam real H2     = 0.00987;
  localparam real GI     = 0.4;          // current sense, V/A
  localparam real VOS    = 1.0;          // front-end offset
  localparam real TAU_F  = 50.0e-6;      // floating-reference filter
  localparam real DT     = 20.0e-9;      // plant step
  localparam real PI     = 3.14159265358979;

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

  // ---------------- plant ----------------
  real t = 0.0, il = 0.0, vout = 290.0, vcap = 0.5, rload, vg;
  real sum_p = 0.0, sum_v2 = 0.0, sum_i2 = 0.0;
  real vmin_after = 1.0e9, vmax_after = 0.0;
  bit  measure = 1'b0, after_step = 1'b0;

  initial begin
    rload = VTARG * VTARG / 100.0;
    v_ref = VREF;
    forever begin
      vg = VPK * ((t == 0.0) ? 0.0 : $sin(2.0 * PI * FLINE * t));
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
      end
      if (after_step) begin
        if (vout < vmin_after) vmin_after = vout;
        if (vout > vmax_after) vmax_after = vout;
      end
      #(DT * 1.0e9);
      t = t + DT;
    end
  end

  // ---------------- mechanism counters ----------------
  int n_per = 0, n_vconv = 0;
  int n_ev_zero = 0, n_ev_pos = 0, n_ev_neg = 0, n_ev_sat = 0;
  int n_ei_pos = 0, n_ei_neg = 0, n_ei_sat = 0, n_dmax = 0, n_sd = 0;
  int n_zb_change = 0;
  logic [1:0] zb_prev;
  realtime t_per0, t_per1;

  always @(posedge clk_sw) if (rst_n) begin
    n_per++;
    if (n_per == 100) t_per0 = $realtime;
    if (n_per == 1100) t_per1 = $realtime;
    if (e_i > 0) n_ei_pos++;
    if (e_i < 0) n_ei_neg++;
    if (e_i == 4 || e_i == -4) n_ei_sat++;
    if (d == 8'd240) n_dmax++;
    if (sd_bit) n_sd++;
    if (n_per > 2 && zb != zb_prev) n_zb_change++;
    zb_prev = zb;
  end


  always @(posedge dut.v_done) if (rst_n) begin
    n_vconv++;
  end

  always @(posedge clk_sw) if (rst_n && dut.v_sample) begin
    if (e_v == 0) n_ev_zero++;
    if (e_v > 0)  n_ev_pos++;
    if (e_v < 0)  n_ev_neg++;
    if (e_v == 4 || e_v == -4) n_ev_sat++;
  end

  // ---------------- watchdog ----------------
  initial begin
    #(75.0e6);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- sequence ----------------
  real pf;
  int  nconv_a;
  initial begin
    #1000.0 rst_n = 1'b1;
    #(30.0e6 - 1000.0);
    $display("t=30ms vout=%0.1f u=%0d zb=%0d d=%0d", vout, u, zb, d);
    rload = VTARG * VTARG / 175.0;
    after_step = 1'b1;
    #(18.3e6);
    $display("t=48.3ms vout=%0.1f u=%0d zb=%0d", vout, u, zb);
    measure = 1'b1;
    #(1.0e9 / FLINE);
    measure = 1'b0;
    pf = sum_p / $sqrt(sum_v2 * sum_i2);
    $display("t=65ms vout=%0.1f u=%0d zb=%0d pf=%0.3f vout range after step %0.1f..%0.1f",
             vout, u, zb, pf, vmin_after, vmax_after);
    $display("periods=%0d vconv=%0d ev0=%0d ev+=%0d ev-=%0d evsat=%0d ei+=%0d ei-=%0d eisat=%0d dmax=%0d sd=%0d zbchg=%0d",
             n_per, n_vconv, n_ev_zero, n_ev_pos, n_ev_neg, n_ev_sat, n_ei_pos, n_ei_neg, n_ei_sat,
             n_dmax, n_sd, n_zb_change);
    check((t_per1 - t_per0) > 4.99e6 && (t_per1 - t_per0) < 5.01e6, "1000 switching periods take 5 ms");
    nconv_a = n_per / 10;
    check(n_vconv >= nconv_a - 1 && n_vconv <= nconv_a + 1, "voltage ADC converts once per 10 periods");
    check(vmin_after > 340.0 && vmax_after < 430.0, "output voltage stays within 340..430 V after the load step");
    check(vout > 370.0 && vout < 400.0, "output voltage regulated near the reference at the end");
    check(pf > 0.95, "power factor above 0.95");
    check(n_ev_zero > 0, "voltage error inside the zero bin (dead zone)");
    check(n_ev_pos > 0,  "positive voltage error");
    check(n_ev_neg > 0,  "negative voltage error");
    check(n_ev_sat > 0,  "voltage ADC saturation");
    check(n_ei_pos > 0,  "positive current error");
    check(n_ei_neg > 0,  "negative current error");
    check(n_ei_sat > 0,  "current ADC saturation");
    check(n_dmax > 0,    "duty limit reached");
    check(n_sd > 0,      "sigma-delta output active");
    check(n_zb_change > 0, "zero-bin size changed with load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
