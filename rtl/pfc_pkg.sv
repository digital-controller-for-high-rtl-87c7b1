`timescale 1ns/1ps
// Shared types and constants of the PFC controller.
// err_t is the signed error word produced by both windowed ADCs; the
// controller uses a 4-bit error whose useful range is -EMAX..+EMAX.
package pfc_pkg;
  localparam int unsigned EW   = 4;   // error word width (4-bit e[n])
  localparam int unsigned EMAX = 4;   // saturation level of the error decoder
  localparam int unsigned UW   = 8;   // voltage-loop control word width
  localparam int unsigned DW   = 8;   // DPWM resolution
  typedef logic signed [EW-1:0] err_t;
endpackage
