// Conversion clock of the voltage ADC.
//
// Divides the switching-frequency system clock by DIV (10, as published)
// into adc_clk, high for the first DIV/2 cycles of each group, so a
// voltage conversion starts every DIV switching periods. sample_en is high
// in the last cycle of the group, when the conversion started DIV-1
// periods earlier has long finished: the voltage compensator takes e_v on
// that edge. Both outputs are registered.
`timescale 1ns/1ps
module adc_clk_div #(
  parameter int unsigned DIV = 10
) (
  input  logic clk,
  input  logic rst_n,
  output logic adc_clk,
  output logic sample_en
);
  localparam int unsigned CW = $clog2(DIV);
  logic [CW-1:0] cnt, cnt_next;

  assign cnt_next = (cnt == CW'(DIV - 1)) ? '0 : cnt + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= CW'(DIV - 1);
      adc_clk   <= 1'b0;
      sample_en <= 1'b0;
    end else begin
      cnt       <= cnt_next;
      adc_clk   <= (cnt_next < CW'(DIV / 2));
      sample_en <= (cnt_next == CW'(DIV - 1));
    end
  end
endmodule
