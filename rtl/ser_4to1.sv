// ser_4to1: 4-to-1 serialiser, four retimed bits to one 5 Gb/s stream.
//
// On each rising edge of clk the output register takes one of the four
// inputs, selected one-hot from the state of the 4-bit shift counter that
// generated the phase clocks: sel[k] = ring[k] & ~ring[(k+1)%4] is high in
// the cycle after phase k rose, so bit k is sampled one 200 ps cycle after
// it was retimed onto its phase, half way through its 800 ps window. The
// output therefore sends din[0..3] in order, one per clock cycle. The
// source design names 4-to-1 serialisers; the ring-decoded select is this
// design's choice. For the odd stream the block is clocked by the
// inverted 5 GHz clock with the falling-edge ring.
`timescale 1ps/1fs
module ser_4to1 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] ring,   // shift-counter state, pattern 0011 rotating
  input  logic [3:0] din,    // din[k] retimed onto phase k of this ring
  output logic       dout
);

  logic [3:0] sel;

  always_comb begin
    for (int k = 0; k < 4; k++) sel[k] = ring[k] & ~ring[(k+1)%4];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout <= 1'b0;
    else        dout <= |(din & sel);
  end

endmodule
