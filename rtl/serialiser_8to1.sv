// serialiser_8to1: 8-bit words at 1.25 GHz to a 10 Gb/s bit stream.
//
// Structure, as in the source design:
//  1. phase_clock_gen makes eight 1.25 GHz phase clocks ph[0..7], 100 ps
//     apart; ph[0] is also the word clock of the whole encoder side.
//  2. Retiming: the word is captured on ph[0]; bit i is then moved onto
//     phase i so that each bit is valid for a full 800 ps window starting
//     i*100 ps into the word. Bits 1-4 go from ph[0] straight to ph[i];
//     bits 5-7 pass through ph[4] first, so no hop is longer than 400 ps.
//  3. Even bits (0,2,4,6) feed a 4:1 serialiser on the rising edge, odd
//     bits (1,3,5,7) one on the falling edge: two 5 Gb/s streams.
//  4. A 2:1 multiplexer steered by clk5g itself sends the even stream while
//     clk5g is high and the odd stream while it is low: 10 Gb/s.
// The hop plan in step 2 and the mux polarity are this design's choices.
//
// Timing: din is sampled on the rising edge of clk_word (= ph[0]); bit 0 of
// that word appears on sout 200 ps later (the next rising edge of clk5g)
// and bits 0..7 follow every 100 ps, LSB first. Bits per word clock: 8.
`timescale 1ps/1fs
module serialiser_8to1 (
  input  logic       clk5g,
  input  logic       rst_n,
  input  logic [7:0] din,
  output logic       clk_word,
  output logic       sout
);

  logic [7:0] ph;
  logic [3:0] ring_a, ring_b;
  logic [7:0] w;      // word on ph[0]
  logic [7:5] hop;    // bits 5-7 on ph[4]
  logic [7:1] r;      // bit i on ph[i]
  logic       even_s, odd_s;

  phase_clock_gen u_ph (
    .clk5g (clk5g),
    .rst_n (rst_n),
    .ph    (ph),
    .ring_a(ring_a),
    .ring_b(ring_b)
  );

  assign clk_word = ph[0];

  always_ff @(posedge ph[0] or negedge rst_n)
    if (!rst_n) w <= '0; else w <= din;

  always_ff @(posedge ph[1] or negedge rst_n)
    if (!rst_n) r[1] <= 1'b0; else r[1] <= w[1];
  always_ff @(posedge ph[2] or negedge rst_n)
    if (!rst_n) r[2] <= 1'b0; else r[2] <= w[2];
  always_ff @(posedge ph[3] or negedge rst_n)
    if (!rst_n) r[3] <= 1'b0; else r[3] <= w[3];
  always_ff @(posedge ph[4] or negedge rst_n)
    if (!rst_n) begin
      r[4] <= 1'b0;
      hop  <= '0;
    end else begin
      r[4] <= w[4];
      hop  <= w[7:5];
    end
  always_ff @(posedge ph[5] or negedge rst_n)
    if (!rst_n) r[5] <= 1'b0; else r[5] <= hop[5];
  always_ff @(posedge ph[6] or negedge rst_n)
    if (!rst_n) r[6] <= 1'b0; else r[6] <= hop[6];
  always_ff @(posedge ph[7] or negedge rst_n)
    if (!rst_n) r[7] <= 1'b0; else r[7] <= hop[7];

  ser_4to1 u_even (
    .clk  (clk5g),
    .rst_n(rst_n),
    .ring (ring_a),
    .din  ({r[6], r[4], r[2], w[0]}),
    .dout (even_s)
  );

  ser_4to1 u_odd (
    .clk  (~clk5g),
    .rst_n(rst_n),
    .ring (ring_b),
    .din  ({r[7], r[5], r[3], r[1]}),
    .dout (odd_s)
  );

  // 2:1 multiplexer steered by the 5 GHz clock
  assign sout = clk5g ? even_s : odd_s;

endmodule
