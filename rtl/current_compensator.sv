// Current-loop compensator: small look-up-table PID.
//
// Velocity-form PID on the current error:
//   d[n] = d[n-1] + (KP+KI+KD)*e[n] - (KP+2KD)*e[n-1] + KD*e[n-2]
// Each product comes from its own 16-entry table indexed by the 4-bit
// error, filled at elaboration from the gains, so no multiplier is built;
// a small table is enough because the current error has a narrow range.
// d saturates to DMIN..DMAX. A look-up-table PID follows the published
// design; the velocity form, the gains, the limits and the reset value
// are this design's choices.
// Timing: one update per rising clk (the switching period); d is
// registered.
`timescale 1ns/1ps
module current_compensator
  import pfc_pkg::*;
#(
  parameter int unsigned DW_P   = DW,
  parameter int          KP     = 4,
  parameter int          KI     = 1,
  parameter int          KD     = 0,
  parameter int unsigned DMIN   = 0,
  parameter int unsigned DMAX   = 240,
  parameter int unsigned D_INIT = 0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  err_t            e_i,
  output logic [DW_P-1:0] d
);
  typedef int lut_t [16];

  function automatic lut_t make_lut(int gain);
    lut_t t;
    for (int i = 0; i < 16; i++) t[i] = gain * int'(err_t'(i));
    return t;
  endfunction

  localparam lut_t LUT_A = make_lut(KP + KI + KD);
  localparam lut_t LUT_B = make_lut(-(KP + 2 * KD));
  localparam lut_t LUT_C = make_lut(KD);

  err_t e1, e2;
  int   d_next;

  always_comb begin
    d_next = int'(d) + LUT_A[e_i] + LUT_B[e1] + LUT_C[e2];
    if (d_next < int'(DMIN)) d_next = int'(DMIN);
    if (d_next > int'(DMAX)) d_next = int'(DMAX);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d  <= DW_P'(D_INIT);
      e1 <= '0;
      e2 <= '0;
    end else begin
      d  <= DW_P'(d_next);
      e1 <= e_i;
      e2 <= e1;
    end
  end
endmodule
