// tb_ser10g_top: end-to-end test of the serialiser back end at its default
// parameters. The PLL locks to a 39.0625 MHz reference (5 GHz, 10 Gb/s);
// a behavioural receiver recovers the 66-bit blocks from the serial line.
//  Phase 1, test pattern: PRBS-11 payload with a clock-compensation block
//    every IDLE_INT blocks and an end-of-frame block every EOF_INT data
//    blocks; the received PRBS-11 sequence must be error free and the
//    packet spacing exact.
//  Phase 2, FIFO data: after switching prbs_mode, 32-bit words are written
//    in bursts on an unrelated 400 MHz clock, faster than the link drains
//    them (so the FIFO fills and wr_full pushes back) and with gaps (so the
//    FIFO empties and idles are sent). Every byte must arrive in order.
// Also checked: one encoder hold per 33 word clocks (32/33 payload duty),
// the 1.25 GHz word clock, and that each mechanism happened at least once.
`timescale 1ps/1fs
module tb_ser10g_top;
  import aurora_pkg::*;
  localparam int IDLE_INT = 20;
  localparam int EOF_INT  = 6;

  logic        ref_clk = 1'b0, rst_n = 1'b0, wr_clk = 1'b0, wr_rst_n = 1'b0;
  logic [2:0]  cap_sel = 3'd3;
  logic        pll_lock, wr_en = 1'b0, wr_full, prbs_mode = 1'b1, ser_out;
  logic [31:0] wr_data = '0;
  logic [15:0] idle_interval = 16'(IDLE_INT), eof_interval = 16'(EOF_INT);
  int          checks = 0, failures = 0;

  ser10g_top dut (
    .ref_clk(ref_clk), .rst_n(rst_n), .cap_sel(cap_sel), .pll_lock(pll_lock),
    .wr_clk(wr_clk), .wr_rst_n(wr_rst_n), .wr_en(wr_en), .wr_data(wr_data), .wr_full(wr_full),
    .prbs_mode(prbs_mode), .idle_interval(idle_interval), .eof_interval(eof_interval),
    .ser_out(ser_out)
  );

  always #12800 ref_clk = ~ref_clk;   // 39.0625 MHz
  always #1250  wr_clk  = ~wr_clk;    // 400 MHz ASIC clock

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

  // ---------------- mechanism counters ----------------
  int n_hold = 0, n_word = 0, n_full = 0;
  int n_data = 0, n_idle = 0, n_cc = 0, n_eof = 0;
  always @(posedge dut.clk_word) if (dut.word_rst_n) begin
    n_word++;
    if (dut.enc_hold) n_hold++;
  end
  always @(posedge wr_clk) if (wr_en && wr_full) n_full++;

  // ---------------- received block checker ----------------
  logic [10:0] prbs_h;
  int          prbs_sync = 0, prbs_bits = 0;
  logic [7:0]  fifo_q[$];
  int          fifo_bytes = 0;
  int          blocks_since_cc = -1, data_since_eof = -1;
  bit          fifo_phase = 1'b0;

  always @(rx_cnt) begin
    if (rx_cnt == 0) begin
      // no block yet
    end else if (rx_ctrl) begin
      checks++;
      if (rx_data[7:0] == BTF_IDLE && rx_data[15:8] == IDLE_FLAG_CC && rx_data[63:16] == '0) begin
        n_cc++;
        if (blocks_since_cc >= 0 && blocks_since_cc != IDLE_INT - 1) begin
          failures++;
          $display("clock compensation after %0d blocks", blocks_since_cc);
        end
        blocks_since_cc = 0;
      end else begin
        if (blocks_since_cc >= 0) blocks_since_cc++;
        if (rx_data == 64'(BTF_IDLE)) n_idle++;
        else if (rx_data == 64'(BTF_SEP)) begin
          n_eof++;
          if (data_since_eof >= 0 && data_since_eof != EOF_INT) begin
            failures++;
            $display("end of frame after %0d data blocks", data_since_eof);
          end
          data_since_eof = 0;
        end else begin
          failures++;
          $display("unknown control block %h", rx_data);
        end
      end
    end else begin
      n_data++;
      if (blocks_since_cc >= 0) blocks_since_cc++;
      if (data_since_eof >= 0) data_since_eof++;
      if (!fifo_phase || fifo_bytes == 0 && fifo_q.size() == 0) begin
        // PRBS-11 payload: bit n = bit(n-9) ^ bit(n-11)
        for (int j = 0; j < 64; j++) begin
          if (prbs_sync >= 11) begin
            checks++;
            if (rx_data[j] != (prbs_h[8] ^ prbs_h[10])) begin
              failures++;
              if (failures < 10) $display("PRBS error at bit %0d, block %0d", prbs_bits, rx_cnt);
            end
            prbs_bits++;
          end else prbs_sync++;
          prbs_h = {prbs_h[9:0], rx_data[j]};
        end
      end else begin
        for (int b = 0; b < 8; b++) begin
          checks++;
          fifo_bytes++;
          if (fifo_q.size() == 0 || rx_data[8*b +: 8] != fifo_q.pop_front()) begin
            failures++;
            if (failures < 10) $display("FIFO byte %0d wrong", fifo_bytes);
          end
        end
      end
    end
  end

  // ---------------- stimulus ----------------
  task automatic wait_blocks(int n);
    int c;
    c = rx_cnt;
    while (rx_cnt < c + n) @(rx_cnt);
  endtask

  task automatic write_burst(int nwords);
    int done;
    done = 0;
    while (done < nwords) begin
      @(negedge wr_clk);
      wr_en   = 1'b1;
      wr_data = $urandom;
      #1;
      if (!wr_full) begin
        for (int b = 0; b < 4; b++) fifo_q.push_back(wr_data[8*b +: 8]);
        done++;
      end
    end
    @(negedge wr_clk);
    wr_en = 1'b0;
  endtask

  initial begin
    realtime t0;
    int      w0, h0;
    repeat (3) @(posedge ref_clk);
    rst_n    = 1'b1;
    wr_rst_n = 1'b1;
    wait (pll_lock);
    $display("PLL locked at %0t", $realtime);
    wait (rx_locked);
    $display("receiver locked at %0t after %0d slips", $realtime, rx_slips);
    checks++;
    if (rx_slips == 0) begin  // the receiver had to search for the boundary
      failures++;
      $display("no slips");
    end

    // word clock: 1.25 GHz = 125 cycles in 100 ns; one hold per 33 cycles
    t0 = $realtime;
    w0 = n_word;
    h0 = n_hold;
    #100_000;
    checks++;
    if (n_word - w0 < 124 || n_word - w0 > 126) begin
      failures++;
      $display("%0d word clocks in 100 ns", n_word - w0);
    end
    wait_blocks(200);
    @(posedge dut.clk_word);
    w0 = n_word - w0;
    h0 = n_hold - h0;
    checks++;
    if (h0 < w0 / 33 - 1 || h0 > w0 / 33 + 1) begin
      failures++;
      $display("%0d holds in %0d word clocks", h0, w0);
    end

    // phase 2: switch to FIFO data
    prbs_mode = 1'b0;
    wait_blocks(4);
    fifo_phase = 1'b1;
    for (int burst = 0; burst < 6; burst++) begin
      write_burst(80 + 40 * burst);
      wait_blocks(30);
    end
    while (fifo_q.size() != 0) wait_blocks(1);
    wait_blocks(20);

    checks++;
    if (fifo_bytes == 0 || prbs_bits == 0) failures++;
    $display("blocks: data %0d idle %0d cc %0d eof %0d; holds %0d; wr_full pushes %0d",
             n_data, n_idle, n_cc, n_eof, n_hold, n_full);
    $display("PRBS bits checked %0d, FIFO bytes checked %0d", prbs_bits, fifo_bytes);
    // every mechanism must have happened
    checks++; if (n_hold == 0) begin failures++; $display("no encoder hold"); end
    checks++; if (n_idle == 0) begin failures++; $display("no idle block"); end
    checks++; if (n_cc   == 0) begin failures++; $display("no clock compensation"); end
    checks++; if (n_eof  == 0) begin failures++; $display("no end of frame"); end
    checks++; if (n_full == 0) begin failures++; $display("FIFO never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
