// tb_aurora_framer: feeds the framer from a counting source whose
// "block available" flag changes at random, stalls it with random holds at
// block boundaries, and checks every block against a separate model of the
// packet rules: clock-compensation idle every idle_interval blocks,
// end-of-frame after eof_interval data blocks, data when a block is ready,
// idle otherwise. Checks block contents, control flag, source reads and
// data order, and counts each packet kind (each must occur).
`timescale 1ps/1fs
module tb_aurora_framer;
  import aurora_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [15:0] idle_interval = 16'd5, eof_interval = 16'd3;
  logic [7:0]  src_data;
  logic        src_block_avail = 1'b0, src_rd, hold = 1'b0;
  logic [7:0]  enc_din;
  logic        enc_ctrl, blk_start;
  blk_kind_e   blk_kind;
  int          checks = 0, failures = 0;

  aurora_framer dut (
    .clk(clk), .rst_n(rst_n), .idle_interval(idle_interval), .eof_interval(eof_interval),
    .src_data(src_data), .src_block_avail(src_block_avail), .src_rd(src_rd),
    .hold(hold), .enc_din(enc_din), .enc_ctrl(enc_ctrl),
    .blk_start(blk_start), .blk_kind(blk_kind)
  );

  always #400 clk = ~clk;

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // counting source
  logic [7:0] src_cnt, exp_src = 8'd0;
  assign src_data = src_cnt;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      src_cnt <= 8'd0;
    else if (src_rd) src_cnt <= src_cnt + 8'd1;

  int        widx = 0, m_cc = 0, m_frame = 0;
  blk_kind_e m_kind = BLK_IDLE;
  int        n_kind[4] = '{0, 0, 0, 0};

  function automatic logic [7:0] exp_ctrl(blk_kind_e k, int i);
    case (k)
      BLK_IDLE: return (i == 0) ? 8'h78 : 8'h00;
      BLK_CC:   return (i == 0) ? 8'h78 : (i == 1) ? 8'h80 : 8'h00;
      default:  return (i == 0) ? 8'h1E : 8'h00;
    endcase
  endfunction

  task automatic run(int ncycles);
    for (int n = 0; n < ncycles; n++) begin
      hold = (widx == 0) && (($urandom % 5) == 0);
      src_block_avail = ($urandom % 3) != 0;
      #1;
      checks++;
      if (blk_start !== (widx == 0 && !hold)) failures++;
      if (!hold) begin
        if (widx == 0) begin
          // model of the packet rules
          if (idle_interval != 0 && m_cc >= idle_interval - 1) m_kind = BLK_CC;
          else if (eof_interval != 0 && m_frame >= eof_interval) m_kind = BLK_EOF;
          else if (src_block_avail) m_kind = BLK_DATA;
          else m_kind = BLK_IDLE;
          m_cc = (m_kind == BLK_CC) ? 0 : m_cc + 1;
          if (m_kind == BLK_DATA) m_frame++;
          if (m_kind == BLK_EOF)  m_frame = 0;
          n_kind[m_kind]++;
          checks++;
          if (blk_kind !== m_kind) begin
            failures++;
            if (failures < 10) $display("cycle %0d: kind %0d expected %0d", n, blk_kind, m_kind);
          end
        end
        checks++;
        if (m_kind == BLK_DATA) begin
          if (!(src_rd && !enc_ctrl && enc_din == exp_src)) begin
            failures++;
            if (failures < 5) $display("cycle %0d: data %h expected %h rd %b", n, enc_din, exp_src, src_rd);
          end
          exp_src++;
        end else begin
          if (src_rd || !enc_ctrl || enc_din !== exp_ctrl(m_kind, widx)) failures++;
        end
        widx = (widx + 1) % 8;
      end else begin
        checks++;
        if (src_rd) failures++;
      end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    run(8 * 400);
    // change the intervals at a block boundary
    while (widx != 0) run(1);
    idle_interval = 16'd0;
    eof_interval  = 16'd7;
    run(8 * 200);
    checks++;
    if (n_kind[BLK_DATA] == 0 || n_kind[BLK_IDLE] == 0 || n_kind[BLK_CC] == 0 || n_kind[BLK_EOF] == 0)
      failures++;
    $display("blocks: data %0d idle %0d cc %0d eof %0d",
             n_kind[BLK_DATA], n_kind[BLK_IDLE], n_kind[BLK_CC], n_kind[BLK_EOF]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
