// tb_async_fifo: random writes at 250 MHz and random reads at 200 MHz through
// the 14 x 8 dual-clock FIFO. Every word read must equal the oldest word
// written (reference queue); the FIFO must report full after 8 unread words
// and empty once drained.
`timescale 1ns/1ps
module tb_async_fifo;
  int checks = 0, failures = 0;
  logic wclk = 1'b0, rclk = 1'b0, rst_n = 1'b0;
  logic        wr_en = 1'b0, rd_en = 1'b0;
  logic [13:0] wdata = '0, rdata;
  logic        full, empty;
  logic [3:0]  wlevel, rlevel;
  logic [13:0] ref_q [$];
  int          nread = 0;
  bit          fill_phase = 1'b1;

  async_fifo #(.W(14), .DEPTH_LOG2(3)) dut (
    .wclk(wclk), .wrst_n(rst_n), .wr_en(wr_en), .wdata(wdata), .full(full), .wlevel(wlevel),
    .rclk(rclk), .rrst_n(rst_n), .rd_en(rd_en), .rdata(rdata), .empty(empty), .rlevel(rlevel));

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
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    repeat (4) @(posedge wclk);
    rst_n = 1'b1;
    // phase 1: fill without reading until full
    for (int i = 0; i < 12; i++) begin
      @(negedge wclk);
      if (!full) begin
        wr_en = 1'b1; wdata = 14'($urandom); ref_q.push_back(wdata);
      end else wr_en = 1'b0;
    end
    @(negedge wclk) wr_en = 1'b0;
    check(full && wlevel == 4'd8, "full after 8 writes");
    check(ref_q.size() == 8, "exactly 8 words accepted");
    fill_phase = 1'b0;
    // phase 2: random traffic
    for (int i = 0; i < 3000; i++) begin
      @(negedge wclk);
      if (!full && ($urandom % 3 != 0)) begin
        wr_en = 1'b1; wdata = 14'($urandom); ref_q.push_back(wdata);
      end else wr_en = 1'b0;
    end
    @(negedge wclk) wr_en = 1'b0;
    // wait for drain
    repeat (200) @(posedge rclk);
    check(empty && rlevel == 0 && ref_q.size() == 0, "empty after drain");
    check(nread > 1000, "enough words moved");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reader
  always @(negedge rclk) begin
    rd_en <= 1'b0;
    if (!fill_phase && !empty && ($urandom % 4 != 0)) begin
      rd_en <= 1'b1;
    end
  end
  always @(posedge rclk) begin
    if (rd_en && !empty) begin
      check(ref_q.size() > 0 && rdata == ref_q[0], $sformatf("read %0d data %h", nread, rdata));
      if (ref_q.size() > 0) void'(ref_q.pop_front());
      nread++;
    end
  end
endmodule
