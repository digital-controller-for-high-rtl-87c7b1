// Voltage-loop compensator with zero-bin control.
//
// Incremental PI law u[n] = u[n-1] + (KP+KI)*e_v[n] - KP*e_v[n-1], with
// both products taken from 16-entry look-up tables indexed by the 4-bit
// error (filled at elaboration), so no multiplier is built. With KP = 0 it
// is the pure incremental law u[n] = u[n-1] + a*e_v[n], a = KI; the
// proportional table is this design's addition, needed for a damped
// response because the output capacitor integrates u. The accumulator
// carries FRAC extra fraction bits below u, and the gains are given in
// those units (KI = 2 is 1/8 LSB of u per sample), so a slow integral and a
// strong proportional action can coexist in an 8-bit u. The accumulator
// saturates to 0..2^UW-1 in u units; u is its integer part. Because e_v is zero while the
// output voltage stays inside the zero-error bin, u holds still there: the
// ADC's wide zero bin makes this a dead-zone (regulation-band) controller.
//
// The controller also sets zb, the zero-bin control of the voltage ADC.
// u is proportional to the power drawn, so it serves as the load
// estimate: the two MSBs of u select zb = 3 - u[UW-1:UW-2], limited to at
// least ZB_MIN, so the smallest zero bin (zb = 3) is used at light load and
// the largest allowed one (zb = ZB_MIN) near full load.
// Using u as the load measure and this mapping are choices of this design.
// Timing: u and zb update on the rising clk edge when en is high; the
// gains KP and KI and the reset value U_INIT are this design's choices.
`timescale 1ns/1ps
module voltage_compensator
  import pfc_pkg::*;
#(
  parameter int unsigned UW_P   = UW,
  parameter int unsigned FRAC   = 4,      // fraction bits of the accumulator
  parameter int          KP     = 640,    // proportional gain, 2^-FRAC units
  parameter int          KI     = 2,      // integral gain, 2^-FRAC units
  parameter int unsigned U_INIT = 64,
  parameter int unsigned ZB_MIN = 1       // largest zero bin allowed
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  err_t            e_v,
  output logic [UW_P-1:0] u,
  output logic [1:0]      zb
);
  typedef int lut_t [16];

  function automatic lut_t make_lut(int gain);
    lut_t t;
    for (int i = 0; i < 16; i++) t[i] = gain * int'(err_t'(i));
    return t;
  endfunction

  localparam lut_t LUT_A = make_lut(KP + KI);
  localparam lut_t LUT_B = make_lut(-KP);

  localparam int   AMAX = (1 << (UW_P + FRAC)) - 1;

  err_t                 e_prev;
  logic [UW_P+FRAC-1:0] acc;
  int                   u_next;

  assign u = acc[UW_P+FRAC-1:FRAC];

  always_comb begin
    u_next = int'(acc) + LUT_A[e_v] + LUT_B[e_prev];
    if (u_next < 0)    u_next = 0;
    if (u_next > AMAX) u_next = AMAX;
  end

  logic [1:0] zb_next;

  always_comb begin
    zb_next = 2'd3 - u[UW_P-1 -: 2];
    if (zb_next < 2'(ZB_MIN)) zb_next = 2'(ZB_MIN);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc    <= (UW_P+FRAC)'(U_INIT << FRAC);
      zb     <= 2'd3;
      e_prev <= '0;
    end else if (en) begin
      acc    <= (UW_P+FRAC)'(u_next);
      zb     <= zb_next;
      e_prev <= e_v;
    end
  end
endmodule
