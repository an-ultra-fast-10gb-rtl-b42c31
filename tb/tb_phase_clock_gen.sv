// tb_phase_clock_gen: runs the phase generator from an ideal 5 GHz clock and
// measures every phase: each must rise every 800 ps (1.25 GHz), stay high
// 400 ps (50 % duty) and rise i*100 ps after ph[0].
`timescale 1ps/1fs
module tb_phase_clock_gen;
  logic       clk5g = 1'b0, rst_n = 1'b0;
  logic [7:0] ph;
  logic [3:0] ring_a, ring_b;
  int         checks = 0, failures = 0;

  phase_clock_gen dut (.clk5g(clk5g), .rst_n(rst_n), .ph(ph), .ring_a(ring_a), .ring_b(ring_b));

  always #100 clk5g = ~clk5g;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime t_rise[8], t_fall[8], t_ref;
  int      rises[8];
  bit      measuring = 1'b0;

  for (genvar i = 0; i < 8; i++) begin : g_mon
    always @(posedge ph[i]) begin
      if (measuring) begin
        if (rises[i] > 0) begin
          checks++;
          if ($realtime - t_rise[i] != 800.0) failures++;
        end
        // offset from the most recent rise of ph[0]
        if (i == 0) t_ref = $realtime;
        else if (rises[0] > 0) begin
          checks++;
          if ($realtime - t_ref != 100.0 * i) begin
            failures++;
            if (failures < 10) $display("ph%0d offset %0t", i, $realtime - t_ref);
          end
        end
        rises[i]++;
      end
      t_rise[i] = $realtime;
    end
    always @(negedge ph[i]) begin
      if (measuring && rises[i] > 0) begin
        checks++;
        if ($realtime - t_rise[i] != 400.0) failures++;
      end
    end
  end

  initial begin
    for (int i = 0; i < 8; i++) rises[i] = 0;
    #350 rst_n = 1'b1;
    // start measuring just before a rise of ph[0], so ph[1..7] follow it
    @(posedge ph[0]);
    #700;
    measuring = 1'b1;
    #(800 * 100);
    measuring = 1'b0;
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (rises[i] < 99) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
