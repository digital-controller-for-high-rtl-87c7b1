// Behavioural model: ring oscillator of the segmented-ring DPWM.
//
// NCELL non-inverting delay cells closed into a ring through one
// inversion, each cell delaying by TD_PS picoseconds. While en is high a
// rising edge runs round the ring, then a falling edge, so one oscillation
// is 2*NCELL*TD_PS and the taps give 2*NCELL evenly spaced edge positions
// (rising edges of taps 0..NCELL-1, then their falling edges). With en low
// all taps settle to 0. On silicon this is a chain of logic cells; its
// delay (and with it the switching frequency) is set by the cell supply.
// The default TD_PS gives a 5 us switching period (200 kHz) with the
// 8-oscillation segmented DPWM.
`timescale 1ns/1ps
module ring_oscillator #(
  parameter int unsigned NCELL = 16,
  parameter int unsigned TD_PS = 19531
) (
  input  logic             en,
  output logic [NCELL-1:0] taps
);
  localparam realtime TD = TD_PS * 1ps;

  logic [NCELL-1:0] nxt;

  assign nxt = {taps[NCELL-2:0], en & ~taps[NCELL-1]};

  initial taps = '0;

  for (genvar i = 0; i < NCELL; i++) begin : g_cell
    always @(nxt[i]) taps[i] <= #(TD) nxt[i];
  end
endmodule
