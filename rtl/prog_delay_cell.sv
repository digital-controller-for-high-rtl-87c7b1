// Digitally programmable delay cell of the windowed ADC delay lines.
//
// Four supply-starved D flip-flops (D high, common reset) are chained so
// that each flip-flop's output clocks the next one; a 4:1 multiplexer
// selects which flip-flop output leaves the cell. An edge on `in` therefore
// leaves through zb+1 flip-flop delays, which sets the size of the ADC's
// zero-error bin. The chain of four flip-flops, the shared reset and the
// 4:1 multiplexer follow the published cell; the mapping of zb code i to
// the output of flip-flop i+1 is this design's reading of it.
// Timing: purely asynchronous; out rises (zb+1)*t_ff after in rises and
// falls t_ff after rst rises, t_ff being set by vdd.
`timescale 1ns/1ps
module prog_delay_cell #(
  parameter real K_NS_V = 20.0
) (
  input  real        vdd,
  input  logic       in,
  input  logic       rst,
  input  logic [1:0] zb,
  output logic       out
);
  logic [3:0] q;

  for (genvar i = 0; i < 4; i++) begin : g_ff
    logic ck;
    if (i == 0) begin : g_first
      assign ck = in;
    end else begin : g_next
      assign ck = q[i-1];
    end
    starved_dff #(.K_NS_V(K_NS_V)) u_ff (.vdd(vdd), .clk(ck), .rst(rst), .q(q[i]));
  end

  always_comb begin
    unique case (zb)
      2'd0:    out = q[0];
      2'd1:    out = q[1];
      2'd2:    out = q[2];
      default: out = q[3];
    endcase
  end
endmodule
