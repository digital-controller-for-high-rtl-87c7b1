// Single-bit sigma-delta modulator for the floating current reference.
//
// First-order modulator: an UW-bit accumulator adds u every clock and the
// carry out is the output bit, so the density of ones is u/2^UW and the
// quantisation error is pushed to high frequency. The bit switches the
// transistor that charges the filtering capacitor from the scaled line
// voltage, whose voltage then follows (u/2^UW)*H2*vg. A single-bit
// modulator driving a transistor and capacitor follows the published
// design; the first-order structure and the clock (the switching
// frequency) are this design's choice.
// Timing: bit_o is registered and changes after each rising clk edge.
`timescale 1ns/1ps
module sigma_delta
  import pfc_pkg::*;
#(
  parameter int unsigned UW_P = UW
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [UW_P-1:0] u,
  output logic            bit_o
);
  logic [UW_P-1:0] acc;
  logic [UW_P:0]   sum;

  assign sum = {1'b0, acc} + {1'b0, u};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      bit_o <= 1'b0;
    end else begin
      acc   <= sum[UW_P-1:0];
      bit_o <= sum[UW_P];
    end
  end
endmodule
