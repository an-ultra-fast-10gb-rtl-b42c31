// tb_serialiser_8to1: drives random 8-bit words on the word clock made by
// the serialiser and samples the serial output in the middle of every
// 100 ps bit slot. Each word must appear LSB first, one bit per 100 ps
// (10 Gb/s from a 5 GHz clock), with bit 0 starting exactly 200 ps after
// the word-clock edge that captured the word.
`timescale 1ps/1fs
module tb_serialiser_8to1;
  logic       clk5g = 1'b0, rst_n = 1'b0;
  logic [7:0] din = '0;
  logic       clk_word, sout;
  int         checks = 0, failures = 0;

  serialiser_8to1 dut (.clk5g(clk5g), .rst_n(rst_n), .din(din), .clk_word(clk_word), .sout(sout));

  always #100 clk5g = ~clk5g;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit      q[$];
  realtime first_slot = -1.0;
  bit      running = 1'b0;
  int      words = 0;

  // word source: a new word just after each word-clock edge
  always @(posedge clk_word) begin
    if (running) begin
      // this edge captures the current din
      for (int i = 0; i < 8; i++) q.push_back(din[i]);
      if (first_slot < 0.0) first_slot = $realtime + 200.0;
      words++;
    end
    #1 din = 8'($urandom);
  end

  // sampler: middle of every bit slot
  always @(clk5g) begin
    realtime slot;
    bit      e;
    slot = $realtime;
    #50;
    if (first_slot >= 0.0 && slot >= first_slot && q.size() > 0) begin
      e = q.pop_front();
      checks++;
      if (sout !== e) begin
        failures++;
        if (failures < 10) $display("slot at %0t: got %b expected %b", slot, sout, e);
      end
    end
  end

  initial begin
    #330 rst_n = 1'b1;
    repeat (3) @(posedge clk_word);
    running = 1'b1;
    repeat (300) @(posedge clk_word);
    running = 1'b0;
    #1000;
    checks++;
    if (q.size() != 0) failures++;
    $display("words %0d bits checked %0d", words, checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
