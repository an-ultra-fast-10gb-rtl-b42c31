// tb_link_prbs_10g3125: the link test of the original chip, in simulation.
// The PLL runs from a 40.283 MHz reference (cap_sel = 2) to 5.15625 GHz, so
// the line carries the standard Aurora 64b66b rate of 10.3125 Gb/s. The
// payload is a continuous PRBS-11 sequence with clock-compensation and
// end-of-frame blocks at programmed intervals. A behavioural receiver
// recovers the blocks; the test checks the measured line rate, that the
// PRBS-11 payload is error free over about 2000 blocks, and the spacing
// of the control blocks.
`timescale 1ps/1fs
module tb_link_prbs_10g3125;
  import aurora_pkg::*;
  localparam int IDLE_INT = 64;
  localparam int EOF_INT  = 16;

  logic        ref_clk = 1'b0, rst_n = 1'b0;
  logic        pll_lock, wr_full, ser_out;
  int          checks = 0, failures = 0;

  ser10g_top dut (
    .ref_clk(ref_clk), .rst_n(rst_n), .cap_sel(3'd2), .pll_lock(pll_lock),
    .wr_clk(1'b0), .wr_rst_n(1'b0), .wr_en(1'b0), .wr_data(32'd0), .wr_full(wr_full),
    .prbs_mode(1'b1), .idle_interval(16'(IDLE_INT)), .eof_interval(16'(EOF_INT)),
    .ser_out(ser_out)
  );

  // 128 / 5156.25 MHz = 24.824 ns
  always #12412 ref_clk = ~ref_clk;

  logic        rx_locked, rx_ctrl;
  logic [63:0] rx_data;
  int          rx_cnt, rx_slips;

  aurora_rx_model u_rx (
    .bit_clk(dut.clk5g), .sin(ser_out), .locked(rx_locked), .blk_cnt(rx_cnt),
    .blk_ctrl(rx_ctrl), .blk_data(rx_data), .slips(rx_slips)
  );

  initial begin
    #400_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [10:0] prbs_h;
  int          prbs_sync = 0, prbs_bits = 0, prbs_err = 0;
  int          n_data = 0, n_cc = 0, n_eof = 0, since_cc = -1, data_in_frame = -1;

  always @(rx_cnt) begin
    if (rx_cnt == 0) begin
      // no block yet
    end else if (rx_ctrl) begin
      checks++;
      if (rx_data[7:0] == BTF_IDLE && rx_data[15:8] == IDLE_FLAG_CC) begin
        if (since_cc >= 0 && since_cc != IDLE_INT - 1) failures++;
        since_cc = 0;
        n_cc++;
      end else begin
        if (since_cc >= 0) since_cc++;
        if (rx_data == 64'(BTF_SEP)) begin
          if (data_in_frame >= 0 && data_in_frame != EOF_INT) failures++;
          data_in_frame = 0;
          n_eof++;
        end else failures++;   // no plain idles expected: PRBS always has data
      end
    end else begin
      n_data++;
      if (since_cc >= 0) since_cc++;
      if (data_in_frame >= 0) data_in_frame++;
      for (int j = 0; j < 64; j++) begin
        if (prbs_sync >= 11) begin
          checks++;
          prbs_bits++;
          if (rx_data[j] != (prbs_h[8] ^ prbs_h[10])) begin
            failures++;
            prbs_err++;
          end
        end else prbs_sync++;
        prbs_h = {prbs_h[9:0], rx_data[j]};
      end
    end
  end

  int edges = 0;
  always @(dut.clk5g) edges++;

  initial begin
    int      e0, c0;
    realtime t0, rate_gbps;
    repeat (3) @(posedge ref_clk);
    rst_n = 1'b1;
    wait (pll_lock);
    wait (rx_locked);
    $display("PLL locked, receiver locked at %0t", $realtime);
    repeat (20) @(posedge ref_clk);
    // line rate: one bit per clk5g edge, over 100 reference periods
    e0 = edges;
    t0 = $realtime;
    repeat (100) @(posedge ref_clk);
    rate_gbps = real'(edges - e0) / ($realtime - t0) * 1000.0;
    checks++;
    if (rate_gbps < 10.30 || rate_gbps > 10.325) failures++;
    $display("line rate %f Gb/s", rate_gbps);
    c0 = rx_cnt;
    while (rx_cnt < c0 + 2000) @(rx_cnt);
    checks++;
    if (n_cc == 0 || n_eof == 0 || prbs_bits < 100000) failures++;
    $display("blocks: data %0d cc %0d eof %0d; PRBS bits %0d errors %0d",
             n_data, n_cc, n_eof, prbs_bits, prbs_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
