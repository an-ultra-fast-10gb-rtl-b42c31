// ser10g_top: 10 Gb/s Aurora 64b66b serialiser back end.
//
// Data path, one 8-bit word per 1.25 GHz word clock:
//   tx_fifo (32-bit words from the ASIC clock domain, read as bytes)
//     or prbs11_gen (test pattern, prbs_mode = 1)
//   -> aurora_framer  (data / idle / clock-compensation / end-of-frame blocks)
//   -> aurora_encoder (scrambler, sync headers, 66-to-8 gearbox, hold 1/33)
//   -> serialiser_8to1 (phase clocks, retiming, 2 x 4:1, 2:1 on clk5g)
//   -> ser_out, the 10 Gb/s stream for the off-chip CML line driver.
// Clocking: lc_pll (behavioural model of the analogue PLL) makes clk5g from
// ref_clk; the serialiser divides it into the eight phase clocks, of which
// ph[0] is the word clock of the framer, encoder and FIFO read side.
// Resets: rst_n resets the PLL and the serialiser asynchronously; the word
// domain is held in reset until the PLL reports lock, then released
// synchronously to the word clock. wr_rst_n resets the FIFO write side.
// prbs_mode selects the PRBS-11 test pattern instead of the FIFO; it is
// sampled at each block start, so it may change at any time.
// The chain of blocks is the source design's; the test-pattern switch
// (the source design sends PRBS-11 in its link tests), the lock-gated reset
// and the 16-bit interval inputs are this design's choices.
// The line rate is 2 x f(clk5g): 10 Gb/s for a 39.0625 MHz reference.
`timescale 1ps/1fs
module ser10g_top
  import aurora_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  // clocking
  input  logic        ref_clk,
  input  logic        rst_n,
  input  logic [2:0]  cap_sel,
  output logic        pll_lock,
  // ASIC-side write port
  input  logic        wr_clk,
  input  logic        wr_rst_n,
  input  logic        wr_en,
  input  logic [31:0] wr_data,
  output logic        wr_full,
  // configuration
  input  logic        prbs_mode,
  input  logic [15:0] idle_interval,
  input  logic [15:0] eof_interval,
  // serial output to the CML driver
  output logic        ser_out
);

  logic       clk5g, clk_word, word_rst_n;
  logic [7:0] fifo_byte, prbs_byte, src_byte, enc_din, enc_dout;
  logic       fifo_blk, src_rd, enc_ctrl, enc_hold, enc_first;
  logic       blk_start, mode_q, use_prbs;

  lc_pll u_pll (
    .ref_clk(ref_clk),
    .rst_n  (rst_n),
    .cap_sel(cap_sel),
    .clk5g  (clk5g),
    .fb_clk (),
    .lock   (pll_lock)
  );

  reset_sync u_word_rst (
    .clk      (clk_word),
    .rst_in_n (rst_n && pll_lock),
    .rst_out_n(word_rst_n)
  );

  tx_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .wr_clk        (wr_clk),
    .wr_rst_n      (wr_rst_n),
    .wr_en         (wr_en),
    .wr_data       (wr_data),
    .wr_full       (wr_full),
    .rd_clk        (clk_word),
    .rd_rst_n      (word_rst_n),
    .rd_en         (src_rd && !use_prbs),
    .rd_data       (fifo_byte),
    .rd_empty      (),
    .rd_block_avail(fifo_blk)
  );

  prbs11_gen u_prbs (
    .clk  (clk_word),
    .rst_n(word_rst_n),
    .adv  (src_rd && use_prbs),
    .dout (prbs_byte)
  );

  // the source is chosen per block: prbs_mode is looked at when a block
  // starts and held for the rest of it, so a block never mixes sources
  always_ff @(posedge clk_word or negedge word_rst_n) begin
    if (!word_rst_n)    mode_q <= 1'b0;
    else if (blk_start) mode_q <= prbs_mode;
  end

  assign use_prbs = blk_start ? prbs_mode : mode_q;
  assign src_byte = use_prbs ? prbs_byte : fifo_byte;

  aurora_framer u_framer (
    .clk            (clk_word),
    .rst_n          (word_rst_n),
    .idle_interval  (idle_interval),
    .eof_interval   (eof_interval),
    .src_data       (src_byte),
    .src_block_avail(use_prbs || fifo_blk),
    .src_rd         (src_rd),
    .hold           (enc_hold),
    .enc_din        (enc_din),
    .enc_ctrl       (enc_ctrl),
    .blk_start      (blk_start),
    .blk_kind       ()
  );

  aurora_encoder u_enc (
    .clk      (clk_word),
    .rst_n    (word_rst_n),
    .din      (enc_din),
    .din_ctrl (enc_ctrl),
    .hold     (enc_hold),
    .blk_first(enc_first),
    .dout     (enc_dout)
  );

  serialiser_8to1 u_ser (
    .clk5g   (clk5g),
    .rst_n   (rst_n),
    .din     (enc_dout),
    .clk_word(clk_word),
    .sout    (ser_out)
  );

  // framer and encoder count the same block boundaries
  a_blk_align: assert property (@(posedge clk_word) disable iff (!word_rst_n)
    blk_start == enc_first);

endmodule
