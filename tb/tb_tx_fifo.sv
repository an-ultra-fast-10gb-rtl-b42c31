// tb_tx_fifo: writes random 32-bit words on a slow clock and reads bytes on
// an unrelated fast clock. Checks byte order (byte 0 = bits 7:0 first),
// that full, empty and block_avail never claim more than is true, that
// full is reached after DEPTH words with the reader stopped, and that
// everything written comes out.
`timescale 1ps/1fs
module tb_tx_fifo;
  localparam int DEPTH = 16;
  logic        wr_clk = 1'b0, rd_clk = 1'b0, wr_rst_n = 1'b0, rd_rst_n = 1'b0;
  logic        wr_en = 1'b0, wr_full, rd_en = 1'b0, rd_empty, rd_block_avail;
  logic [31:0] wr_data = '0;
  logic [7:0]  rd_data;
  int          checks = 0, failures = 0;

  tx_fifo #(.DEPTH(DEPTH)) dut (
    .wr_clk(wr_clk), .wr_rst_n(wr_rst_n), .wr_en(wr_en), .wr_data(wr_data), .wr_full(wr_full),
    .rd_clk(rd_clk), .rd_rst_n(rd_rst_n), .rd_en(rd_en), .rd_data(rd_data),
    .rd_empty(rd_empty), .rd_block_avail(rd_block_avail)
  );

  always #1650 wr_clk = ~wr_clk;
  always #400  rd_clk = ~rd_clk;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] q[$];
  int  written = 0, read_bytes = 0, n_words = 400;
  bit  rd_stop = 1'b0, wr_done = 1'b0;
  int  rd_pct = 50;

  // writer
  initial begin
    repeat (3) @(posedge wr_clk);
    wr_rst_n = 1'b1;
    rd_rst_n = 1'b1;
    // fill with the reader stopped: full after DEPTH words
    rd_stop = 1'b1;
    while (written < DEPTH + 4) begin
      @(negedge wr_clk);
      wr_en   = 1'b1;
      wr_data = $urandom;
      #1;
      if (!wr_full) begin
        for (int b = 0; b < 4; b++) q.push_back(wr_data[8*b +: 8]);
        written++;
      end else begin
        checks++;
        if (written != DEPTH) failures++;
        break;
      end
    end
    checks++;
    if (written != DEPTH) failures++;
    wr_en = 1'b0;
    rd_stop = 1'b0;
    // random traffic
    while (written < n_words) begin
      @(negedge wr_clk);
      wr_en   = ($urandom % 3) != 0;
      wr_data = $urandom;
      #1;
      if (wr_en && !wr_full) begin
        for (int b = 0; b < 4; b++) q.push_back(wr_data[8*b +: 8]);
        written++;
      end
    end
    @(negedge wr_clk);
    wr_en = 1'b0;
    wr_done = 1'b1;
  end

  // reader
  initial begin
    int  avail_seen = 0;
    logic [7:0] e;
    forever begin
      @(negedge rd_clk);
      rd_en = !rd_stop && !rd_empty && (($urandom % 100) < rd_pct);
      #1;
      // flags are never optimistic
      if (!rd_empty) begin
        checks++;
        if (q.size() == 0) failures++;
      end
      if (rd_block_avail) begin
        avail_seen++;
        checks++;
        if (q.size() < 8) failures++;
      end
      if (rd_en) begin
        e = q.pop_front();
        checks++;
        read_bytes++;
        if (rd_data !== e) begin
          failures++;
          if (failures < 10) $display("byte %0d: got %h expected %h", read_bytes, rd_data, e);
        end
      end
      if (wr_done && q.size() == 0) begin
        @(negedge rd_clk);
        rd_en = 1'b0;
        repeat (10) @(negedge rd_clk);
        checks++;
        if (!rd_empty || rd_block_avail || read_bytes != 4 * n_words) failures++;
        checks++;
        if (avail_seen == 0) failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
