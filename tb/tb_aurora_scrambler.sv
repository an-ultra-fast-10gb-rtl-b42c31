// tb_aurora_scrambler: compares the 8-bit parallel scrambler with a
// bit-serial x^58 + x^39 + 1 model for random data and random enables, and
// checks that a self-synchronous descrambler, started from a wrong state,
// recovers the data after 58 bits.
`timescale 1ps/1fs
module tb_aurora_scrambler;
  logic       clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [7:0] din = '0, dout;
  int         checks = 0, failures = 0;

  aurora_scrambler dut (.clk(clk), .rst_n(rst_n), .en(en), .din(din), .dout(dout));

  always #400 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [57:0] tx_h = '1;  // model scrambler history, [0] newest
  logic [57:0] rx_h = '0;  // descrambler history, deliberately wrong
  int          nbits = 0;

  function automatic logic [7:0] scr_model(logic [7:0] d, logic commit);
    logic [7:0]  s;
    logic [57:0] h;
    h = tx_h;
    for (int i = 0; i < 8; i++) begin
      s[i] = d[i] ^ h[38] ^ h[57];
      h    = {h[56:0], s[i]};
    end
    if (commit) tx_h = h;
    return s;
  endfunction

  initial begin
    logic [7:0] exp_s, rec;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      din = 8'($urandom);
      en  = ($urandom % 4) != 0;
      #1;
      exp_s = scr_model(din, en);
      checks++;
      if (dout !== exp_s) begin
        failures++;
        if (failures < 10) $display("cycle %0d: got %h expected %h", n, dout, exp_s);
      end
      if (en) begin
        for (int i = 0; i < 8; i++) begin
          rec[i] = dout[i] ^ rx_h[38] ^ rx_h[57];
          rx_h   = {rx_h[56:0], dout[i]};
          if (nbits >= 58) begin
            checks++;
            if (rec[i] !== din[i]) failures++;
          end
          nbits++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
