// tb_fifo_64i_512o: writes a counting pattern of 64-bit words at 250 MHz
// (with gaps), reads 512-bit words at 200 MHz and checks that each holds eight
// consecutive words, oldest in bits [63:0]; a flush in the middle of a word
// must restart packing; with the reader stopped the FIFO must fill and count
// the dropped words.
`timescale 1ns/1ps
module tb_fifo_64i_512o;
  int checks = 0, failures = 0;
  logic wclk = 1'b0, rclk = 1'b0, rst_n = 1'b0;
  logic         flush = 1'b0, wr_en = 1'b0, rd_en = 1'b0, empty;
  logic [63:0]  wdata = '0;
  logic [511:0] rdata;
  logic [15:0]  drop_cnt;
  logic [6:0]   rlevel;
  longint       wnext = 0, rexp = 0;
  int           nread = 0;
  bit           reading = 1'b1;

  fifo_64i_512o dut (.wclk(wclk), .wrst_n(rst_n), .flush(flush), .wr_en(wr_en), .wdata(wdata),
                     .drop_cnt(drop_cnt), .rclk(rclk), .rrst_n(rst_n), .rd_en(rd_en),
                     .rdata(rdata), .empty(empty), .rlevel(rlevel));

  always #2.0 wclk = ~wclk;
  always #2.5 rclk = ~rclk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 6) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge rclk) rd_en <= reading && !empty;
  always @(posedge rclk) begin
    if (rd_en && !empty) begin
      for (int i = 0; i < 8; i++)
        check(rdata[64*i +: 64] == 64'(rexp + i), $sformatf("word %0d lane %0d", nread, i));
      rexp += 8;
      nread++;
    end
  end

  initial begin
    repeat (4) @(posedge wclk);
    rst_n = 1'b1;
    repeat (4) @(posedge wclk);
    for (int i = 0; i < 8 * 200; ) begin
      @(negedge wclk);
      wr_en = ($urandom % 5 != 0);
      wdata = 64'(wnext);
      if (wr_en) begin wnext++; i++; end
    end
    // three stray words, then a flush: they must never appear
    @(negedge wclk) wr_en = 1'b1; wdata = 64'hDEAD;
    @(negedge wclk); @(negedge wclk);
    @(negedge wclk) wr_en = 1'b0; flush = 1'b1;
    @(negedge wclk) flush = 1'b0;
    for (int i = 0; i < 8 * 10; i++) begin
      @(negedge wclk) wr_en = 1'b1; wdata = 64'(wnext); wnext++;
    end
    @(negedge wclk) wr_en = 1'b0;
    repeat (100) @(posedge rclk);
    check(nread == 210, $sformatf("read %0d words", nread));
    check(drop_cnt == 0, "no drops while reading");
    // overflow: stop reading, push 80 words of 512 bit
    reading = 1'b0;
    repeat (4) @(posedge rclk);
    for (int i = 0; i < 8 * 80; i++) begin
      @(negedge wclk) wr_en = 1'b1; wdata = 64'(wnext); wnext++;
    end
    @(negedge wclk) wr_en = 1'b0;
    repeat (20) @(posedge rclk);
    check(rlevel == 7'd64, $sformatf("level %0d at full", rlevel));
    check(drop_cnt == 16'd16, $sformatf("dropped %0d", drop_cnt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
