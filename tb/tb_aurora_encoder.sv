// tb_aurora_encoder: drives random data and control blocks into the
// encoder and rebuilds the expected line stream independently: 2-bit sync
// header (line order 0,1 for data, 1,0 for control) before each 64-bit
// block, payload scrambled bit-serially with x^58 + x^39 + 1. Checks every
// output word, the one-cycle latency, that exactly one cycle in 33 is a hold
// (32 payload words per 33 cycles), that holds fall on block boundaries,
// and that blk_first marks word 0 of each block.
`timescale 1ps/1fs
module tb_aurora_encoder;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic [7:0] din = '0, dout;
  logic       din_ctrl = 1'b0, hold, blk_first;
  int         checks = 0, failures = 0;

  aurora_encoder dut (
    .clk(clk), .rst_n(rst_n), .din(din), .din_ctrl(din_ctrl),
    .hold(hold), .blk_first(blk_first), .dout(dout)
  );

  always #400 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [57:0] h = '1;
  bit          q[$];   // expected line bits, front = next out
  int          widx = 0, holds = 0, cycles = 0, last_hold = -1;

  task automatic push_word(logic [7:0] d, logic first, logic ctrl);
    logic s;
    if (first) begin
      q.push_back(ctrl ? 1'b1 : 1'b0);
      q.push_back(ctrl ? 1'b0 : 1'b1);
    end
    for (int i = 0; i < 8; i++) begin
      s = d[i] ^ h[38] ^ h[57];
      h = {h[56:0], s};
      q.push_back(s);
    end
  endtask

  initial begin
    logic [7:0] exp_w;
    logic       expect_word;
    logic       blk_ctrl;
    expect_word = 1'b0;
    blk_ctrl    = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 33 * 60; n++) begin
      // choose the word for this cycle
      din = 8'($urandom);
      if (widx == 0) blk_ctrl = ($urandom % 3) == 0;
      din_ctrl = (widx == 0) ? blk_ctrl : 1'($urandom);  // ignored off word 0
      #1;
      checks++;
      if (blk_first !== (widx == 0 && !hold)) failures++;
      if (hold) begin
        holds++;
        checks++;
        if (widx != 0) failures++;               // never inside a block
        if (last_hold >= 0) begin
          checks++;
          if (n - last_hold != 33) begin
            failures++;
            $display("hold spacing %0d", n - last_hold);
          end
        end else begin
          checks++;
          if (n != 32) failures++;               // first hold after 4 blocks
        end
        last_hold = n;
      end else begin
        push_word(din, widx == 0, blk_ctrl);
        widx = (widx + 1) % 8;
      end
      @(negedge clk);
      cycles++;
      // the word for the cycle just ended is on dout now (latency 1)
      exp_w = '0;
      for (int i = 0; i < 8; i++) exp_w[i] = q.pop_front();
      checks++;
      if (dout !== exp_w) begin
        failures++;
        if (failures < 10) $display("cycle %0d: got %h expected %h", n, dout, exp_w);
      end
    end
    checks++;
    if (holds != 60 || q.size() != 0) begin
      failures++;
      $display("holds %0d, bits left %0d", holds, q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
