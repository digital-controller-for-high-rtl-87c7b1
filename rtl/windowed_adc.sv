// Delay-line windowed ADC (used for the output voltage and, with uniform
// cells, for the input current).
//
// A rising edge on clk launches a pulse down two delay lines at once. The
// reference line (N+1 cells) is supplied by v_ref, the measurement line
// (N+M cells) by v_meas; cell delay is inversely proportional to supply.
// When the reference pulse leaves cell N the strobe captures the
// measurement line in the snapshot register, and the error decoder turns
// the number of cells passed into e (positive when v_meas < v_ref). When
// the reference pulse leaves cell N+1 it resets every cell of both lines,
// so the ADC is ready for the next clk edge.
//
// With PROG=1 the first N-1 cells of both lines are programmable cells
// (zb+1 flip-flop delays), so the strobe comes after (N-1)(zb+1)+1 unit
// delays and each measurement cell after the N-th is one unit: the zero
// bin is about v_ref/((zb+1)(N-1)+1) wide and shrinks as zb grows. With
// PROG=0 every cell is one flip-flop (current-loop ADC).
// N and M are not given by the published design; 16 and 4 are this
// design's choice (M must be at least EMAX). The conversion takes
// ((N-1)(zb+1)+2) unit delays, which must be shorter than the clk period.
`timescale 1ns/1ps
module windowed_adc
  import pfc_pkg::*;
#(
  parameter int unsigned N      = 16,
  parameter int unsigned M      = 4,
  parameter bit          PROG   = 1'b1,
  parameter real         K_NS_V = 20.0
) (
  input  real        v_ref,
  input  real        v_meas,
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] zb,
  output err_t       e,
  output logic       done
);
  localparam int unsigned NPROG = PROG ? N - 1 : 0;

  logic [N:0]     ref_taps;
  logic [N+M-1:0] meas_taps;
  logic           line_rst;

  assign line_rst = ref_taps[N] | !rst_n;
  assign done     = ref_taps[N-1];

  delay_line #(.NCELLS(N+1), .NPROG(NPROG), .K_NS_V(K_NS_V)) u_ref_line (
    .vdd(v_ref), .start(clk), .rst(line_rst), .zb(zb), .taps(ref_taps));

  delay_line #(.NCELLS(N+M), .NPROG(NPROG), .K_NS_V(K_NS_V)) u_meas_line (
    .vdd(v_meas), .start(clk), .rst(line_rst), .zb(zb), .taps(meas_taps));

  snapshot_decoder #(.EMAX_P(EMAX)) u_snap (
    .strobe(ref_taps[N-1]),
    .rst_n (rst_n),
    .taps  (meas_taps[N+EMAX-1 -: 2*EMAX]),
    .e     (e)
  );

  initial assert (M >= EMAX) else $error("windowed_adc: M must be at least EMAX");
endmodule
