// reset_sync: asynchronous-assert, synchronous-release reset for one clock
// domain. rst_out_n goes low as soon as rst_in_n does and returns high on the
// second rising edge of clk after rst_in_n is released.
`timescale 1ps/1fs
module reset_sync (
  input  logic clk,
  input  logic rst_in_n,
  output logic rst_out_n
);

  logic meta;

  always_ff @(posedge clk or negedge rst_in_n) begin
    if (!rst_in_n) begin
      meta      <= 1'b0;
      rst_out_n <= 1'b0;
    end else begin
      meta      <= 1'b1;
      rst_out_n <= meta;
    end
  end

endmodule
