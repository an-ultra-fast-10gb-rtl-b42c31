// aurora_framer: interface logic that decides, block by block, what the
// Aurora 64b66b encoder sends, and feeds it one 8-bit word per cycle.
//
// At the start of every 64-bit block (and only there: a block's 8 words go
// out back to back) it picks one of four packets, in this priority:
//   1. clock-compensation idle block, every 'idle_interval' blocks, so the
//      receiver's clock recovery sees it regularly (0 disables);
//   2. end-of-frame (separator) block, once 'eof_interval' data blocks have
//      been sent in the current frame (0 disables);
//   3. data block, if the source has a whole block (8 words) ready;
//   4. plain idle block otherwise, so an empty source sends idles.
// Programmable idle and end-frame intervals and automatic idles on an empty
// source follow the source design; the priority order, the 16-bit interval
// registers and the control-block contents are this design's choices.
//
// Timing: combinational from the encoder's 'hold' and the source flag to
// enc_din/enc_ctrl/src_rd; src_rd pops one source word in the cycle it is
// used (first-word-fall-through source). 'hold' from the encoder freezes
// everything for a cycle. blk_start/blk_kind report each block as it begins.
`timescale 1ps/1fs
module aurora_framer
  import aurora_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] idle_interval,
  input  logic [15:0] eof_interval,
  // source of payload words
  input  logic [7:0]  src_data,
  input  logic        src_block_avail,  // at least 8 words ready
  output logic        src_rd,
  // to the encoder
  input  logic        hold,
  output logic [7:0]  enc_din,
  output logic        enc_ctrl,
  // block events
  output logic        blk_start,
  output blk_kind_e   blk_kind
);

  logic [2:0]  idx;
  blk_kind_e   kind_q, kind_now, kind_cur;
  logic [15:0] cc_cnt;     // blocks since the last clock-compensation block
  logic [15:0] frame_cnt;  // data blocks in the current frame

  always_comb begin
    if (idle_interval != 16'd0 && cc_cnt >= idle_interval - 16'd1)
      kind_now = BLK_CC;
    else if (eof_interval != 16'd0 && frame_cnt >= eof_interval)
      kind_now = BLK_EOF;
    else if (src_block_avail)
      kind_now = BLK_DATA;
    else
      kind_now = BLK_IDLE;
  end

  assign kind_cur  = (idx == 3'd0) ? kind_now : kind_q;
  assign blk_start = (idx == 3'd0) && !hold;
  assign blk_kind  = kind_now;
  assign enc_ctrl  = (kind_cur != BLK_DATA);
  assign enc_din   = (kind_cur == BLK_DATA) ? src_data : ctrl_byte(kind_cur, idx);
  assign src_rd    = !hold && (kind_cur == BLK_DATA);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx       <= '0;
      kind_q    <= BLK_IDLE;
      cc_cnt    <= '0;
      frame_cnt <= '0;
    end else if (!hold) begin
      idx <= idx + 3'd1;
      if (idx == 3'd0) begin
        kind_q <= kind_now;
        cc_cnt <= (kind_now == BLK_CC) ? 16'd0 : cc_cnt + 16'd1;
        if (kind_now == BLK_DATA)     frame_cnt <= frame_cnt + 16'd1;
        else if (kind_now == BLK_EOF) frame_cnt <= 16'd0;
      end
    end
  end

  // a data block is only started with a whole block in the source
  a_block_ready: assert property (@(posedge clk) disable iff (!rst_n)
    (blk_start && kind_now == BLK_DATA) |-> src_block_avail);

endmodule
