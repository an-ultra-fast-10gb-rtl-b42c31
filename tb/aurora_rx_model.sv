// aurora_rx_model: behavioural Aurora 64b66b receiver for testbenches,
// standing in for the FPGA receiver of a link test.
//
// It samples the serial line 50 ps after every edge of the 5 GHz clock
// (one sample per 100 ps bit), finds the 66-bit block boundary by slipping
// one bit whenever a sync header is not 01 or 10, declares lock after 16
// good headers in a row, and descrambles the payload with the
// self-synchronous x^58 + x^39 + 1 descrambler. Each received block is
// published on blk_ctrl/blk_data (payload byte 0 in bits 7:0, bit 0 first
// on the line) and blk_cnt is incremented; a testbench waits on blk_cnt.
`timescale 1ps/1fs
module aurora_rx_model (
  input  logic        bit_clk,   // 5 GHz, both edges used
  input  logic        sin,
  output logic        locked,
  output int          blk_cnt,
  output logic        blk_ctrl,
  output logic [63:0] blk_data,
  output int          slips
);

  logic [65:0] win;       // win[0] = oldest bit
  int          pos;
  int          good;
  logic [57:0] dh;        // descrambler history, [0] newest

  initial begin
    locked   = 1'b0;
    blk_cnt  = 0;
    blk_ctrl = 1'b0;
    blk_data = '0;
    slips    = 0;
    win      = '0;
    pos      = 0;
    good     = 0;
    dh       = '0;
  end

  always @(bit_clk) begin
    logic [63:0] d;
    #50;
    win = {sin, win[65:1]};
    pos++;
    if (pos == 66) begin
      if (win[0] != win[1]) begin
        for (int j = 0; j < 64; j++) begin
          d[j] = win[2+j] ^ dh[38] ^ dh[57];
          dh   = {dh[56:0], win[2+j]};
        end
        pos = 0;
        if (good < 16) good++;
        else           locked = 1'b1;
        if (locked) begin
          blk_ctrl = win[0];   // line order 1,0 = control
          blk_data = d;
          blk_cnt++;
        end
      end else begin
        // slip one bit
        pos    = 65;
        good   = 0;
        locked = 1'b0;
        slips++;
      end
    end
  end

endmodule
