// aurora_scrambler: Aurora 64b66b self-synchronous scrambler, 8 bits/cycle.
//
// Polynomial x^58 + x^39 + 1: every payload bit is XORed with the scrambled
// bits sent 39 and 58 bit times earlier, which makes the line DC balanced
// and rich in transitions. Eight serial steps are unrolled per clock; din[0]
// is the first bit in time. The state advances only when 'en' is high, so
// the sync headers that the encoder inserts bypass it (64b66b scrambles the
// payload only). Output is combinational (same cycle as din); the 58-bit
// history is registered. The history resets to all ones (this design's
// choice; a self-synchronous descrambler does not depend on it).
`timescale 1ps/1fs
module aurora_scrambler
  import aurora_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,      // consume din this cycle
  input  logic [7:0] din,     // bit 0 first
  output logic [7:0] dout     // scrambled, bit 0 first
);

  // hist[0] = most recent scrambled bit
  logic [SCR_LEN-1:0] hist, hist_nxt;

  always_comb begin
    logic [SCR_LEN-1:0] h;
    logic               s;
    h = hist;
    for (int i = 0; i < 8; i++) begin
      s       = din[i] ^ h[SCR_TAP1-1] ^ h[SCR_TAP2-1];
      dout[i] = s;
      h       = {h[SCR_LEN-2:0], s};
    end
    hist_nxt = h;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  hist <= '1;
    else if (en) hist <= hist_nxt;
  end

endmodule
