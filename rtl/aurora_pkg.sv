// aurora_pkg: constants and types shared by the Aurora 64b66b transmit path.
//
// Bit order convention used throughout the design: every 8-bit word is sent
// LSB first, and within a 66-bit block the 2-bit sync header goes first,
// followed by payload byte 0 .. byte 7. Header values are written as vectors
// whose bit 0 is the first bit on the line: a data block starts "0,1" on the
// line and a control block "1,0", as in 64b66b.
//
// The block-type values and the idle-block flag bits follow this design's
// reading of Aurora 64b66b (idle block type 0x78, separator 0x1E); the source
// design names the packets but not their codes.
`timescale 1ps/1fs
package aurora_pkg;

  // sync headers, bit 0 = first bit transmitted
  localparam logic [1:0] SYNC_DATA = 2'b10;  // line order 0,1
  localparam logic [1:0] SYNC_CTRL = 2'b01;  // line order 1,0

  // control block type field (first payload byte of a control block)
  localparam logic [7:0] BTF_IDLE = 8'h78;  // idle / clock compensation
  localparam logic [7:0] BTF_SEP  = 8'h1E;  // separator = end of frame

  // flags carried in byte 1 of an idle block
  localparam logic [7:0] IDLE_FLAG_CC   = 8'h80;  // clock compensation

  // scrambler polynomial x^58 + x^39 + 1
  localparam int unsigned SCR_LEN  = 58;
  localparam int unsigned SCR_TAP1 = 39;
  localparam int unsigned SCR_TAP2 = 58;


  // kind of 64-bit block the framer is sending
  typedef enum logic [1:0] {
    BLK_DATA = 2'd0,
    BLK_IDLE = 2'd1,
    BLK_CC   = 2'd2,
    BLK_EOF  = 2'd3
  } blk_kind_e;

  // payload byte k (0..7) of a control block of the given kind
  function automatic logic [7:0] ctrl_byte(blk_kind_e kind, logic [2:0] k);
    logic [7:0] b;
    b = 8'h00;
    unique case (kind)
      BLK_IDLE: b = (k == 3'd0) ? BTF_IDLE : 8'h00;
      BLK_CC:   b = (k == 3'd0) ? BTF_IDLE : (k == 3'd1) ? IDLE_FLAG_CC : 8'h00;
      BLK_EOF:  b = (k == 3'd0) ? BTF_SEP : 8'h00;  // byte 1 = 0 valid bytes
      default:  b = 8'h00;
    endcase
    return b;
  endfunction

endpackage
