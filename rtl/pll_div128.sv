// pll_div128: divide-by-128 feedback divider of the PLL.
//
// A 7-bit binary counter on the VCO clock; its MSB is the divided clock, a
// square wave at f_vco/128 (39.06 MHz for 5 GHz) that the phase detector
// compares with the reference. The divide ratio is the source design's
// (built there from dynamic TSPC flip-flops); the synchronous counter form
// is this design's choice. Asynchronous active-low reset to zero.
`timescale 1ps/1fs
module pll_div128 #(
  parameter int unsigned LOG2_DIV = 7  // divide by 2**LOG2_DIV = 128
) (
  input  logic clk,
  input  logic rst_n,
  output logic clk_div
);

  logic [LOG2_DIV-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end

  assign clk_div = cnt[LOG2_DIV-1];

endmodule
