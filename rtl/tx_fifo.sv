// tx_fifo: asynchronous transfer FIFO between the ASIC and the serialiser.
//
// 32-bit words are written in the ASIC's own clock domain (wr_clk) and read
// out as 8-bit words in the serialiser's word-clock domain (rd_clk), byte 0
// = wr_data[7:0] first. The source design specifies exactly this (32-bit in,
// 8-bit out, standard clock-domain-crossing techniques, an empty flag that
// lets the framer send idles); the construction below is this design's:
// a dual-port array of DEPTH 32-bit words with Gray-coded read and write
// pointers, each crossing into the other domain through two flip-flops.
//
// Read side is first-word-fall-through: rd_data shows the next byte whenever
// rd_empty is low, and rd_en takes it. rd_block_avail is high when at least
// 8 bytes (one 64-bit block) are readable, which the framer needs because
// a block cannot be interrupted. Flags are conservative: full may stay high
// and empty/block_avail low for two cycles of the other clock after a change.
// Resets are asynchronous, one per domain, and should be applied together.
`timescale 1ps/1fs
module tx_fifo #(
  parameter int unsigned DEPTH = 16  // 32-bit words, power of two
) (
  input  logic        wr_clk,
  input  logic        wr_rst_n,
  input  logic        wr_en,
  input  logic [31:0] wr_data,
  output logic        wr_full,

  input  logic        rd_clk,
  input  logic        rd_rst_n,
  input  logic        rd_en,
  output logic [7:0]  rd_data,
  output logic        rd_empty,
  output logic        rd_block_avail
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [31:0] mem [DEPTH];

  // ---------------- write domain ----------------
  logic [AW:0] wbin, wgray, wbin_nxt;
  logic [AW:0] rbin, rgray, rbin_nxt;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer synchronised into wr_clk
  logic [AW:0] rbin_w;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  assign rbin_w   = gray2bin(rgray_w2);
  assign wr_full  = (wbin[AW] != rbin_w[AW]) && (wbin[AW-1:0] == rbin_w[AW-1:0]);
  assign wbin_nxt = wbin + (AW+1)'(wr_en && !wr_full);

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_nxt;
      wgray    <= bin2gray(wbin_nxt);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge wr_clk) begin
    if (wr_en && !wr_full) mem[wbin[AW-1:0]] <= wr_data;
  end

  // ---------------- read domain ----------------
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer synchronised into rd_clk
  logic [AW:0] wbin_r, words;
  logic [1:0]  bsel;                 // byte within the current word
  logic        pop;
  logic [31:0] rword;

  assign wbin_r   = gray2bin(wgray_r2);
  assign words    = wbin_r - rbin;
  assign rd_empty = (words == '0);
  // readable bytes = 4*words - bsel >= 8
  assign rd_block_avail = ({words, 2'b00} - {{AW+1{1'b0}}, bsel}) >= (AW+3)'(8);
  assign rword    = mem[rbin[AW-1:0]];
  assign rd_data  = rword[8*bsel +: 8];
  assign pop      = rd_en && !rd_empty && (bsel == 2'd3);
  assign rbin_nxt = rbin + (AW+1)'(pop);

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      bsel     <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_nxt;
      rgray    <= bin2gray(rbin_nxt);
      if (rd_en && !rd_empty) bsel <= bsel + 2'd1;
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

  a_no_underflow: assert property (@(posedge rd_clk) disable iff (!rd_rst_n) rd_en |-> !rd_empty);

endmodule
