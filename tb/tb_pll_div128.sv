// tb_pll_div128: counts input clocks between output edges; the output must
// be a square wave of 128 input periods, 64 high and 64 low.
`timescale 1ps/1fs
module tb_pll_div128;
  logic clk = 1'b0, rst_n = 1'b0, clk_div;
  int   checks = 0, failures = 0;

  pll_div128 dut (.clk(clk), .rst_n(rst_n), .clk_div(clk_div));

  always #100 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int   n, edges;
    logic prev;
    #250 rst_n = 1'b1;
    // first change comes 64 cycles after reset
    n = 0;
    prev = clk_div;
    edges = 0;
    while (edges < 40) begin
      @(posedge clk);
      #1;
      n++;
      if (clk_div !== prev) begin
        checks++;
        if (n != 64) begin
          failures++;
          $display("half period %0d cycles", n);
        end
        n = 0;
        edges++;
        prev = clk_div;
      end
      if (n > 200) begin
        failures++;
        break;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
