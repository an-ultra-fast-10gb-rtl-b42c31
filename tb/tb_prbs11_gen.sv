// tb_prbs11_gen: checks the 8-bit parallel PRBS-11 generator against a
// bit-serial model of x^11 + x^9 + 1, over more than one full period
// (2047 bits), and checks that the word holds while adv is low.
`timescale 1ps/1fs
module tb_prbs11_gen;
  logic       clk = 1'b0, rst_n = 1'b0, adv = 1'b0;
  logic [7:0] dout;
  int         checks = 0, failures = 0;

  prbs11_gen dut (.clk(clk), .rst_n(rst_n), .adv(adv), .dout(dout));

  always #400 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [10:0] ref_st = '1;   // ref_st[0] = newest bit
  logic [7:0]  exp_w;
  logic [7:0]  first_w;
  int          ones;

  function automatic logic [7:0] ref_word();
    logic [7:0] w;
    for (int i = 0; i < 8; i++) begin
      w[i]   = ref_st[8] ^ ref_st[10];
      ref_st = {ref_st[9:0], w[i]};
    end
    return w;
  endfunction

  initial begin
    ones = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 2047 + 5; n++) begin
      exp_w = ref_word();
      if (n == 0) first_w = exp_w;
      checks++;
      if (dout !== exp_w) begin
        failures++;
        if (failures < 10) $display("word %0d: got %h expected %h", n, dout, exp_w);
      end
      if (n < 2047) ones += $countones(exp_w);
      // every tenth word, hold adv low for a cycle and check the word stays
      if (n % 10 == 3) begin
        adv = 1'b0;
        @(negedge clk);
        checks++;
        if (dout !== exp_w) failures++;
      end
      adv = 1'b1;
      @(negedge clk);
      adv = 1'b0;
    end
    // a maximal-length 11-bit sequence has 1024 ones in 2047 bits; 8 periods
    checks++;
    if (ones != 8 * 1024) begin
      failures++;
      $display("ones in 8 periods: %0d", ones);
    end
    // 2047 words = 8 full periods: the sequence restarts
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
