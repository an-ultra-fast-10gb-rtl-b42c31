// tb_lc_pll: runs the PLL model from a 39.0625 MHz reference and checks
// that it locks and that the output then runs at 128 x f_ref = 5 GHz
// (12800 cycles in 100 reference periods); that a capacitor setting whose
// band cannot reach 5 GHz does not lock; and that a 40.283 MHz reference
// gives the 5.156 GHz of a 10.3125 Gb/s line.
`timescale 1ps/1fs
module tb_lc_pll;
  logic       ref_clk = 1'b0, rst_n = 1'b0, clk5g, fb_clk, lock;
  logic [2:0] cap_sel = 3'd3;
  realtime    ref_half = 12800.0;
  int         checks = 0, failures = 0;

  lc_pll dut (.ref_clk(ref_clk), .rst_n(rst_n), .cap_sel(cap_sel),
              .clk5g(clk5g), .fb_clk(fb_clk), .lock(lock));

  always #(ref_half) ref_clk = ~ref_clk;

  int vco_edges = 0;
  always @(posedge clk5g) vco_edges++;

  initial begin
    #200_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try_lock(input logic [2:0] cs, input realtime half, input bit expect_lock,
                          input int expect_cycles);
    int n, c0;
    rst_n    = 1'b0;
    cap_sel  = cs;
    ref_half = half;
    repeat (4) @(posedge ref_clk);
    rst_n = 1'b1;
    n = 0;
    while (!lock && n < 3000) begin
      @(posedge ref_clk);
      n++;
    end
    checks++;
    if (lock !== expect_lock) begin
      failures++;
      $display("cap_sel %0d: lock %b after %0d reference cycles", cs, lock, n);
    end
    if (expect_lock) begin
      $display("cap_sel %0d locked after %0d reference cycles", cs, n);
      repeat (50) @(posedge ref_clk);
      c0 = vco_edges;
      repeat (100) @(posedge ref_clk);
      checks++;
      if (vco_edges - c0 < expect_cycles - 2 || vco_edges - c0 > expect_cycles + 2) begin
        failures++;
        $display("VCO cycles in 100 reference periods: %0d", vco_edges - c0);
      end
      checks++;
      if (!lock) failures++;
    end
  endtask

  initial begin
    try_lock(3'd3, 12800.0, 1'b1, 12800);   // 5 GHz from 39.0625 MHz
    try_lock(3'd0, 12800.0, 1'b0, 0);       // band 5.4 GHz +/- 150 MHz: no lock
    try_lock(3'd2, 12412.0, 1'b1, 12800);   // 5.156 GHz from 40.283 MHz
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
