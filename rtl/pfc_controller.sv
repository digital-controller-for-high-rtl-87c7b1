// Digital PFC controller with delay-line ADCs and a segmented-ring DPWM.
//
// The controller regulates a boost PFC rectifier with two loops, without a
// conventional ADC, multiplier or external clock:
//  - Outer loop: the voltage windowed ADC compares the attenuated output
//    voltage v_fb with v_ref once every 10 switching periods and gives a
//    4-bit error e_v with a wide, programmable zero bin. The look-up-table
//    PI compensator integrates it into u, the emulated conductance, and
//    sets the zero-bin size zb from u.
//  - Floating reference: a 1-bit sigma-delta modulator turns u into sd_bit,
//    which (off chip) switches the scaled line voltage onto a filter
//    capacitor; that capacitor voltage v_iref, about u*H2*vg, is the
//    current reference.
//  - Inner loop: the current windowed ADC (uniform cells) compares the
//    sensed current v_isense with v_iref every switching period, and the
//    look-up-table PID compensator turns e_i into the duty command d.
//  - The segmented-ring DPWM produces the gate drive and clk_sw, the clock
//    of all synchronous logic. The ring runs while rst_n is high.
// This structure follows the published controller. Cell delays, ADC
// sizes, loop gains, the zero-bin policy and the instants at which the
// ADCs sample are this design's choices; the analog inputs are `real`
// voltages as seen by the delay-line supplies.
// Timing: the current conversion starts at mid-period and e_i is used at
// the next period start; e_v is used once per 10 periods; d reaches the DPWM
// at position 240 of the following period.
`timescale 1ns/1ps
module pfc_controller
  import pfc_pkg::*;
#(
  parameter int unsigned N_V    = 16,     // voltage ADC: cells to the strobe
  parameter int unsigned M_V    = 4,      // voltage ADC: cells past the strobe
  parameter int unsigned N_I    = 16,     // current ADC: cells to the strobe
  parameter int unsigned M_I    = 4,      // current ADC: cells past the strobe
  parameter real         K_NS_V = 20.0,   // ADC flip-flop delay at 1 V, ns
  parameter int unsigned TD_PS  = 19531   // ring cell delay: 200 kHz switching
) (
  input  logic          rst_n,
  input  real           v_ref,
  input  real           v_fb,
  input  real           v_iref,
  input  real           v_isense,
  output logic          gate,
  output logic          sd_bit,
  output logic          clk_sw,
  output err_t          e_v,
  output err_t          e_i,
  output logic [UW-1:0] u,
  output logic [DW-1:0] d,
  output logic [1:0]    zb
);
  logic [15:0] taps;
  logic        adc_clk, v_sample, v_done, i_done, i_conv;

  // The current conversion starts half-way through the switching period
  // (falling edge of clk_sw), inside the on-time for the usual duty range,
  // so the ADC sees the rising inductor current rather than its valley,
  // which is zero in discontinuous conduction at light load.
  assign i_conv = ~clk_sw;

  ring_oscillator #(.NCELL(16), .TD_PS(TD_PS)) u_ring (.en(rst_n), .taps(taps));

  segmented_dpwm u_dpwm (
    .taps(taps), .rst_n(rst_n), .d(d), .pwm(gate), .clk_sw(clk_sw));

  adc_clk_div #(.DIV(10)) u_div (
    .clk(clk_sw), .rst_n(rst_n), .adc_clk(adc_clk), .sample_en(v_sample));

  windowed_adc #(.N(N_V), .M(M_V), .PROG(1'b1), .K_NS_V(K_NS_V)) u_vadc (
    .v_ref(v_ref), .v_meas(v_fb), .clk(adc_clk), .rst_n(rst_n), .zb(zb),
    .e(e_v), .done(v_done));

  voltage_compensator u_vcomp (
    .clk(clk_sw), .rst_n(rst_n), .en(v_sample), .e_v(e_v), .u(u), .zb(zb));

  sigma_delta u_sd (.clk(clk_sw), .rst_n(rst_n), .u(u), .bit_o(sd_bit));

  windowed_adc #(.N(N_I), .M(M_I), .PROG(1'b0), .K_NS_V(K_NS_V)) u_iadc (
    .v_ref(v_iref), .v_meas(v_isense), .clk(i_conv), .rst_n(rst_n), .zb(2'd0),
    .e(e_i), .done(i_done));

  current_compensator u_icomp (.clk(clk_sw), .rst_n(rst_n), .e_i(e_i), .d(d));

  // The conversion done strobes are observed by testbenches only.
  logic unused_done;
  assign unused_done = v_done ^ i_done;
endmodule
