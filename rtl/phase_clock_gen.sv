// phase_clock_gen: eight 1.25 GHz clocks, 100 ps apart, from the 5 GHz clock.
//
// Two 4-bit shift counters hold the pattern 0011, which moves by one place
// per cycle: ring A rotates on the rising edge of clk5g; ring B, on the
// falling edge, loads ring A's state, so it steps through the same sequence
// exactly half a cycle later whatever edge reset is released on. Bit k of a ring is a 50 %-duty square wave at clk5g/4 delayed by k
// cycles, so ring A gives phases 0, 200, 400, 600 ps and ring B, half a
// cycle later, 100, 300, 500, 700 ps:
//   ph[2k] = ring_a[k],  ph[2k+1] = ring_b[k],  ph[i] = ph[0] delayed i*100 ps
// Two shift counters on opposite edges are the source design's; the 0011
// pattern, slaving ring B to ring A and the reset value are this design's. The ring states are also
// output, because the 4:1 serialisers use them as one-hot selects.
// Asynchronous active-low reset; ph[0] rises on the third rising edge of
// clk5g after reset is released.
`timescale 1ps/1fs
module phase_clock_gen (
  input  logic       clk5g,
  input  logic       rst_n,
  output logic [7:0] ph,
  output logic [3:0] ring_a,
  output logic [3:0] ring_b
);

  always_ff @(posedge clk5g or negedge rst_n) begin
    if (!rst_n) ring_a <= 4'b0011;
    else        ring_a <= {ring_a[2:0], ring_a[3]};
  end

  always_ff @(negedge clk5g or negedge rst_n) begin
    if (!rst_n) ring_b <= 4'b0011;
    else        ring_b <= ring_a;
  end

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      ph[2*k]   = ring_a[k];
      ph[2*k+1] = ring_b[k];
    end
  end

endmodule
