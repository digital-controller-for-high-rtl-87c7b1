`timescale 1ns/1ps
// Snapshot register and error decoder of the windowed ADC.
//
// On the rising edge of `strobe` (the reference pulse has passed cell N of
// the reference line) the outputs of measurement cells N-EMAX+1 .. N+EMAX
// are captured. They form a thermometer code: the number of ones c tells
// how far the measurement pulse got, relative to cell N-EMAX. The error is
// e = EMAX - c, so a pulse that passed exactly N cells gives e = 0, fewer
// cells (output voltage below reference) a positive error and more cells a
// negative error, saturating at +/-EMAX (the nine levels -4..4 of the
// published characteristic). Counting ones instead of finding the edge
// makes the decoder tolerant of a bubble in the captured code.
// Timing: e is valid from the strobe edge until the next strobe; rst_n
// sets it to zero asynchronously.
module snapshot_decoder
  import pfc_pkg::*;
#(
  parameter int unsigned EMAX_P = EMAX
) (
  input  logic                  strobe,
  input  logic                  rst_n,
  input  logic [2*EMAX_P-1:0]   taps,
  output err_t                  e
);
  logic [2*EMAX_P-1:0] snap;

  always_ff @(posedge strobe or negedge rst_n) begin
    if (!rst_n) snap <= {{EMAX_P{1'b0}}, {EMAX_P{1'b1}}};  // e = 0
    else        snap <= taps;
  end

  always_comb begin
    int c;
    c = 0;
    for (int i = 0; i < 2*EMAX_P; i++) c += int'(snap[i]);
    e = err_t'(int'(EMAX_P) - c);
  end
endmodule
