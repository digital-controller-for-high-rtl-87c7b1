// Delay line of the windowed ADC (reference or measurement line).
//
// NCELLS cells in series, started by a rising edge on `start`. The first
// NPROG cells are programmable cells (zb+1 flip-flop delays each); the rest
// are single supply-starved flip-flops. All cells share `rst`. Every cell
// output is brought out on `taps` (taps[i] is cell i+1), so the reference
// line can take its strobe and self-reset from it and the snapshot register
// can read the measurement line. The cell structure and the
// programmable-first arrangement follow the published ADC; all cell
// delays scale with 1/vdd.
`timescale 1ns/1ps
module delay_line #(
  parameter int unsigned NCELLS = 17,
  parameter int unsigned NPROG  = 15,
  parameter real         K_NS_V = 20.0
) (
  input  real               vdd,
  input  logic              start,
  input  logic              rst,
  input  logic [1:0]        zb,
  output logic [NCELLS-1:0] taps
);
  logic [NCELLS:0] chain;
  assign chain[0] = start;

  for (genvar i = 0; i < NCELLS; i++) begin : g_cell
    if (i < NPROG) begin : g_prog
      prog_delay_cell #(.K_NS_V(K_NS_V)) u_cell (
        .vdd(vdd), .in(chain[i]), .rst(rst), .zb(zb), .out(chain[i+1]));
    end else begin : g_unit
      starved_dff #(.K_NS_V(K_NS_V)) u_cell (
        .vdd(vdd), .clk(chain[i]), .rst(rst), .q(chain[i+1]));
    end
  end

  assign taps = chain[NCELLS:1];
endmodule
