// tb_spi_cfg_seq: the sequencer drives a real spi_master; an SPI slave model
// logs each frame as {chip select, bit count, bits}. After cfg_start the log
// must hold the six table entries in order; a host frame requested while the
// table runs must follow them; a host frame on an idle sequencer must go out
// alone, with the length and device from the host word.
`timescale 1ns/1ps
module tb_spi_cfg_seq;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic        cfg_start = 1'b0, host_req = 1'b0, busy;
  logic [31:0] host_word = '0;
  logic [15:0] done_cnt;
  logic        spi_start, spi_busy, spi_done, sclk, mosi;
  logic [1:0]  spi_dev;
  logic [5:0]  spi_nbits;
  logic [31:0] spi_data;
  logic [2:0]  cs_n;
  typedef struct { int dev; int n; logic [31:0] bits; } frame_t;
  frame_t      log_q [$];
  int          nrise = 0, cur_dev = -1;
  logic [31:0] rx = '0;

  spi_cfg_seq dut (.clk(clk), .rst_n(rst_n), .cfg_start(cfg_start), .host_req(host_req),
    .host_word(host_word), .busy(busy), .done_cnt(done_cnt),
    .spi_start(spi_start), .spi_dev(spi_dev), .spi_nbits(spi_nbits), .spi_data(spi_data),
    .spi_busy(spi_busy), .spi_done(spi_done));
  spi_master #(.HALF(2)) u_spi (.clk(clk), .rst_n(rst_n), .start(spi_start), .dev(spi_dev),
    .nbits(spi_nbits), .data(spi_data), .busy(spi_busy), .done(spi_done), .rdata(),
    .sclk(sclk), .mosi(mosi), .miso(1'b0), .cs_n(cs_n));

  always #4 clk = ~clk;

  always @(posedge sclk) if (rst_n && cs_n != 3'b111) begin rx = {rx[30:0], mosi}; nrise++; end
  always @(cs_n) if (rst_n) begin
    if (cs_n != 3'b111) begin
      nrise = 0; rx = '0;
      for (int i = 0; i < 3; i++) if (!cs_n[i]) cur_dev = i;
    end else if (cur_dev >= 0) begin
      log_q.push_back('{cur_dev, nrise, rx});
      cur_dev = -1;
    end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 6) $display("FAIL: %s", msg);
    end
  endtask

  task automatic expect_frame(input int d, input int n, input logic [31:0] bits);
    frame_t f;
    check(log_q.size() > 0, "frame missing");
    if (log_q.size() > 0) begin
      f = log_q.pop_front();
      check(f.dev == d && f.n == n && f.bits == bits,
            $sformatf("frame dev %0d n %0d bits %h, expected %0d %0d %h", f.dev, f.n, f.bits, d, n, bits));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk) cfg_start = 1'b1;
    @(negedge clk) cfg_start = 1'b0;
    repeat (20) @(negedge clk);
    // host frame: amplifier, 16 bits, data 0x0217 (queued behind the table)
    host_req = 1'b1; host_word = {2'd2, 5'd15, 1'b0, 24'h00_0217};
    @(negedge clk) host_req = 1'b0;
    wait (!busy);
    repeat (5) @(posedge clk);
    check(done_cnt == 16'd7, $sformatf("done_cnt %0d", done_cnt));
    expect_frame(0, 16, 32'h0001);
    expect_frame(0, 16, 32'h0100);
    expect_frame(0, 16, 32'h0200);
    expect_frame(1, 24, 32'h00_1234);
    expect_frame(1, 24, 32'h01_5678);
    expect_frame(2, 16, 32'h0200);
    expect_frame(2, 16, 32'h0217);
    // idle sequencer: PLL, 24 bits
    @(negedge clk) host_req = 1'b1; host_word = {2'd1, 5'd23, 1'b0, 24'hABCDEF};
    @(negedge clk) host_req = 1'b0;
    @(negedge clk);
    wait (!busy);
    repeat (5) @(posedge clk);
    expect_frame(1, 24, 32'hABCDEF);
    check(log_q.size() == 0 && done_cnt == 16'd8, "no extra frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
