// prbs11_gen: PRBS-11 test-pattern source, 8 bits per word clock.
//
// Sequence x^11 + x^9 + 1 (period 2047 bits): bit n = bit(n-9) XOR bit(n-11).
// Eight steps of the Fibonacci LFSR are unrolled per clock; dout[0] is the
// earliest bit. dout shows the current word; 'adv' moves to the next one at
// the clock edge, so a consumer reads dout and raises adv in the same cycle.
// The register resets to all ones. The PRBS-11 pattern is the test data of
// the source design; the 8-bit parallel form is this design's choice.
`timescale 1ps/1fs
module prbs11_gen (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       adv,
  output logic [7:0] dout
);

  // st[0] = most recent bit, st[10] = oldest
  logic [10:0] st, st_nxt;

  always_comb begin
    logic [10:0] h;
    logic        b;
    h = st;
    for (int i = 0; i < 8; i++) begin
      b       = h[8] ^ h[10];
      dout[i] = b;
      h       = {h[9:0], b};
    end
    st_nxt = h;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   st <= '1;
    else if (adv) st <= st_nxt;
  end

endmodule
