// Behavioural model: supply-starved D flip-flop used as the unit delay of
// the windowed ADCs.
//
// The delay lines are made of ordinary D flip-flops whose supply is the
// analog voltage being measured, so their propagation time falls as the
// supply rises. This model has D tied high: a rising edge on clk sets q and
// a high rst clears it, each after K_NS_V / vdd nanoseconds (vdd clamped to
// at least VMIN). The 1/vdd law follows the description of the measurement
// line; the constant K_NS_V and the clamp are choices of this model. Not
// synthesizable: on silicon this is a standard-cell flip-flop on its own
// supply rail.
`timescale 1ns/1ps
module starved_dff #(
  parameter real K_NS_V = 20.0,   // delay in ns at 1 V supply
  parameter real VMIN   = 0.05    // supply clamp, avoids an endless delay
) (
  input  real  vdd,
  input  logic clk,
  input  logic rst,
  output logic q
);
`include "vdelay.svh"

  function automatic int unsigned delay_ps(real v);
    real vv;
    vv = (v < VMIN) ? VMIN : v;
    return int'(K_NS_V * 1000.0 / vv);
  endfunction

  int unsigned gen = 0;   // bumped by every reset, cancels clock events in flight

  initial q = 1'b0;

  always @(posedge clk) begin
    automatic int unsigned g = gen;
    if (!rst) begin
      vdelay_ps(delay_ps(vdd));
      if (g == gen && !rst) q = 1'b1;
    end
  end

  always @(posedge rst) begin
    gen = gen + 1;
    vdelay_ps(delay_ps(vdd));
    q = 1'b0;
  end
endmodule
