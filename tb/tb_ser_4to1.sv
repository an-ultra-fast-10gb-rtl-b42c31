// tb_ser_4to1: rotates a 0011 shift-counter pattern like the phase
// generator does, updates input bit k just after phase k rises (as the
// retiming stage would) and checks that the output sends each new bit on
// the following clock edge: four bits per four cycles, in order.
`timescale 1ps/1fs
module tb_ser_4to1;
  logic       clk = 1'b0, rst_n = 1'b0, dout;
  logic [3:0] ring = 4'b0011, din = '0;
  int         checks = 0, failures = 0;

  ser_4to1 dut (.clk(clk), .rst_n(rst_n), .ring(ring), .din(din), .dout(dout));

  always #100 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  k;
    bit  e, have;
    int  ones;
    have = 1'b0;
    ones = 0;
    #250 rst_n = 1'b1;
    repeat (2000) begin
      @(posedge clk);
      #1;
      // the edge just passed: dout took the bit set one cycle earlier
      if (have) begin
        checks++;
        if (dout !== e) failures++;
        ones += int'(e);
      end
      ring = {ring[2:0], ring[3]};
      // phase k is the one that has just risen
      k = 0;
      for (int j = 0; j < 4; j++) if (ring[j] && !ring[(j+1)%4]) k = j;
      e = 1'($urandom);
      din[k] = e;
      have = 1'b1;
    end
    checks++;
    if (ones < 800 || ones > 1200) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
