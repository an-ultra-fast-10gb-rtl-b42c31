// aurora_encoder: 64b66b sync-header insertion and 66-to-8 gearbox.
//
// Each cycle the encoder takes one 8-bit payload word, scrambles it and
// outputs (registered, one cycle later) the next 8 bits of the line stream.
// At the first word of every 64-bit block it also inserts the 2-bit sync
// header (data "01" or control "10", chosen by din_ctrl on that word). The
// extra 2 bits per block are kept in an elastic shift buffer of up to 8
// bits. After four blocks the buffer holds 8 bits: for one cycle the encoder
// raises 'hold', does not take an input word, and sends the buffered 8 bits
// instead. So 4 blocks = 264 line bits = 33 cycles, of which 32 take input;
// a block is never split by a hold, so its 8 words arrive on consecutive
// accepted cycles. This mechanism is the source design's; the buffer
// layout and the hold falling on a block boundary are this design's.
//
// Interface (word clock, 1.25 GHz in the full design):
//   din/din_ctrl  payload word (bit 0 first) and, on word 0 of a block,
//                 whether the block is a control block
//   hold          1: din is not taken this cycle (combinational from state)
//   blk_first     1: the word taken this cycle is word 0 of a block
//   dout          line bits, bit 0 first, one cycle after the input
`timescale 1ps/1fs
module aurora_encoder
  import aurora_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] din,
  input  logic       din_ctrl,
  output logic       hold,
  output logic       blk_first,
  output logic [7:0] dout
);

  logic [2:0]  idx;       // word index within the block
  logic [3:0]  cnt;       // bits waiting in buf_q (0..8)
  logic [7:0]  buf_q;     // elastic buffer, bit 0 goes out first
  logic [7:0]  scr;
  logic [2:0]  idx_nxt;
  logic [3:0]  cnt_nxt;
  logic [7:0]  buf_nxt;
  logic [7:0]  word;
  logic [17:0] ext;

  assign hold      = (idx == 3'd0) && (cnt == 4'd8);
  assign blk_first = (idx == 3'd0) && !hold;

  aurora_scrambler u_scr (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (!hold),
    .din  (din),
    .dout (scr)
  );

  always_comb begin
    ext     = '0;
    idx_nxt = idx;
    cnt_nxt = cnt;
    if (hold) begin
      ext     = {10'd0, buf_q};
      cnt_nxt = 4'd0;
    end else if (idx == 3'd0) begin
      ext     = {10'd0, buf_q} | ({8'd0, scr, din_ctrl ? SYNC_CTRL : SYNC_DATA} << cnt);
      cnt_nxt = cnt + 4'd2;
      idx_nxt = idx + 3'd1;
    end else begin
      ext     = {10'd0, buf_q} | ({10'd0, scr} << cnt);
      idx_nxt = idx + 3'd1;
    end
    word    = ext[7:0];
    buf_nxt = ext[15:8];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx   <= '0;
      cnt   <= '0;
      buf_q <= '0;
      dout  <= '0;
    end else begin
      idx   <= idx_nxt;
      cnt   <= cnt_nxt;
      buf_q <= buf_nxt;
      dout  <= word;
    end
  end

  // the elastic buffer never holds more than one word
  a_cnt_range: assert property (@(posedge clk) disable iff (!rst_n) cnt <= 4'd8);
  // nothing is lost above the 16 bits that are kept
  a_no_spill: assert property (@(posedge clk) disable iff (!rst_n) ext[17:16] == 2'b00);

endmodule
