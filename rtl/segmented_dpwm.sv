// Segmented-ring digital pulse-width modulator (8 bits) and system clock.
//
// The ring oscillator provides 2*NT = 32 evenly spaced edge positions per
// oscillation (rising edges of taps 0..15, then their falling edges). The
// switching period is 2^(DW-5) = 8 oscillations: a 3-bit lap counter,
// clocked by the ring itself, names the current segment of the period, and
// a 16:1 tap multiplexer with a polarity bit picks the fine position. So an
// 8-bit pulse width needs a 16:1 multiplexer instead of the 256:1
// multiplexer of a plain ring DPWM, and no clock faster than the ring.
// This lap-counting arrangement is this design's reading of the
// segmented ring; the published design gives its 8-bit resolution, its
// small multiplexer and its role as the system clock source.
//
// Operation, positions counted in tap delays from the period start:
//  - period start = rising edge of tap 0 while the lap counter wraps 7->0.
//    The output is set (s <= ~r) unless the command is zero.
//  - the pulse ends at position d: lap d[7:5], tap d[3:0], polarity d[4]
//    (0 = rising, 1 = falling edge of the tap); the multiplexed edge clocks
//    r <= s. When d[4:0] = 0 that edge is the tap-0 edge that advances the
//    lap counter, so the flop sees the previous lap value: compare with
//    d[7:5]-1.
//  - pwm = s ^ r, high for d/256 of the period (d = 0 keeps it low).
//  - d is sampled at the falling edge of tap 0 in the last lap (position
//    240), half an oscillation before the period it applies to. In the
//    period where the command changes, an off edge due after position 240
//    may come at 240 instead.
// clk_sw = ~lap[2] rises at each period start and is the system clock.
// Lint tools note that d_q is both flopped and used in a clock path: it
// steers the tap multiplexer whose output clocks r. That is how a
// tap-selecting DPWM works; d_q only changes at position 240, away from
// the edges it selects in the first seven laps.
`timescale 1ns/1ps
module segmented_dpwm
  import pfc_pkg::*;
#(
  parameter int unsigned DW_P = DW
) (
  input  logic [15:0]     taps,
  input  logic            rst_n,
  input  logic [DW_P-1:0] d,
  output logic            pwm,
  output logic            clk_sw
);
  localparam int unsigned LW = DW_P - 5;   // lap counter width
  localparam logic [LW-1:0] LAST = '1;

  logic [LW-1:0]   lap, exp_lap;
  logic [DW_P-1:0] d_q;
  logic            s, r, sel;

  always_ff @(posedge taps[0] or negedge rst_n) begin
    if (!rst_n) lap <= LAST;
    else        lap <= lap + 1'b1;
  end

  always_ff @(negedge taps[0] or negedge rst_n) begin
    if (!rst_n)          d_q <= '0;
    else if (lap == LAST) d_q <= d;
  end

  always_ff @(posedge taps[0] or negedge rst_n) begin
    if (!rst_n)           s <= 1'b0;
    else if (lap == LAST) s <= (d_q != '0) ? ~r : r;
  end

  assign sel     = taps[d_q[3:0]] ^ d_q[4];
  assign exp_lap = (d_q[4:0] == 5'd0) ? d_q[DW_P-1:5] - 1'b1 : d_q[DW_P-1:5];

  always_ff @(posedge sel or negedge rst_n) begin
    if (!rst_n)               r <= 1'b0;
    else if (lap == exp_lap)  r <= s;
  end

  assign pwm    = s ^ r;
  assign clk_sw = ~lap[LW-1];
endmodule
