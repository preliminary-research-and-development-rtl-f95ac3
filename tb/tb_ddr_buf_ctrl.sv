// tb_ddr_buf_ctrl: the controller writes 300 words from a stream source into
// the DDR3 model (with 20 % handshake stalls), then reads back words 100..199
// while a second capture writes more words; every read-back word must equal
// what was written at that index, the read-back FIFO must never overflow and
// the written word count must match. A TBT stream of 40 words runs at the
// same time as the second capture and must land in the TBT region, word for
// word, without disturbing the raw words.
`timescale 1ns/1ps
module tb_ddr_buf_ctrl;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic         calib;
  logic         cap_start = 1'b0, rd_start = 1'b0;
  logic [23:0]  wr_words, rd_addr = '0, rd_len = '0;
  logic [511:0] cf_data;
  logic         cf_empty, cf_rd, rd_busy, rb_wr;
  logic [511:0] rb_data;
  logic [5:0]   rb_wlevel;
  logic [28:0]  app_addr;
  logic [2:0]   app_cmd;
  logic         app_en, app_rdy, app_wdf_wren, app_wdf_end, app_wdf_rdy, app_rd_data_valid;
  logic [511:0] app_wdf_data, app_rd_data;
  logic [63:0]  app_wdf_mask;
  int           n_writes, n_reads, n_stalls;
  int           src_n = 0, src_lim = 0;
  int           rb_level = 0, rb_seen = 0, rb_max = 0;
  logic         tbt_start = 1'b0, tq_empty, tq_rd;
  logic [511:0] tq_data;
  logic [23:0]  tbt_words;
  int           tq_n = 0, tq_lim = 0;
  localparam int TBASE = 1 << 23;

  function automatic logic [511:0] tpat(int i);
    return {16{~(i * 32'h0101_0101 + 32'h55)}};
  endfunction

  assign tq_empty = (tq_n >= tq_lim);
  assign tq_data  = tpat(tq_n);
  always @(posedge clk) if (rst_n && tq_rd) tq_n <= tq_n + 1;

  function automatic logic [511:0] pattern(int i);
    return {16{32'(i * 32'h9E37_79B9 + 32'h1234)}};
  endfunction

  assign cf_empty = (src_n >= src_lim);
  assign cf_data  = pattern(src_n);
  always @(posedge clk) if (rst_n && cf_rd) src_n <= src_n + 1;

  // read-back FIFO: counts only, drained slowly
  assign rb_wlevel = 6'(rb_level);
  always @(posedge clk) begin
    if (rst_n && rb_wr) begin
      check(rb_data == pattern(100 + rb_seen), $sformatf("readback %0d", rb_seen));
      rb_seen++;
    end
    rb_level <= rb_level + int'(rb_wr) - ((rb_level > 0 && ($urandom % 3 == 0)) ? 1 : 0);
    if (rb_level > rb_max) rb_max = rb_level;
  end

  ddr_buf_ctrl dut (
    .ui_clk(clk), .rst_n(rst_n), .init_calib_complete(calib),
    .cap_start(cap_start), .wr_words(wr_words),
    .cf_data(cf_data), .cf_empty(cf_empty), .cf_rd(cf_rd),
    .tbt_start(tbt_start), .tq_data(tq_data), .tq_empty(tq_empty), .tq_rd(tq_rd),
    .tbt_words(tbt_words),
    .rd_start(rd_start), .rd_addr(rd_addr), .rd_len(rd_len), .rd_busy(rd_busy),
    .rb_wr(rb_wr), .rb_data(rb_data), .rb_wlevel(rb_wlevel),
    .app_addr(app_addr), .app_cmd(app_cmd), .app_en(app_en), .app_rdy(app_rdy),
    .app_wdf_data(app_wdf_data), .app_wdf_wren(app_wdf_wren), .app_wdf_end(app_wdf_end),
    .app_wdf_mask(app_wdf_mask), .app_wdf_rdy(app_wdf_rdy),
    .app_rd_data(app_rd_data), .app_rd_data_valid(app_rd_data_valid));

  mig_model u_mig (
    .ui_clk(clk), .rst_n(rst_n), .init_calib_complete(calib),
    .app_addr(app_addr), .app_cmd(app_cmd), .app_en(app_en), .app_rdy(app_rdy),
    .app_wdf_data(app_wdf_data), .app_wdf_wren(app_wdf_wren), .app_wdf_end(app_wdf_end),
    .app_wdf_mask(app_wdf_mask), .app_wdf_rdy(app_wdf_rdy),
    .app_rd_data(app_rd_data), .app_rd_data_valid(app_rd_data_valid),
    .n_writes(n_writes), .n_reads(n_reads), .n_stalls(n_stalls));

  always #2.5 clk = ~clk;

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

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk) cap_start = 1'b1;
    @(negedge clk) cap_start = 1'b0;
    src_lim = 300;
    wait (src_n == 300);
    repeat (50) @(posedge clk);
    check(wr_words == 24'd300, $sformatf("wr_words %0d", wr_words));
    check(n_writes == 300, $sformatf("model saw %0d writes", n_writes));
    for (int i = 0; i < 300; i += 37)
      check(u_mig.peek(i) == pattern(i), $sformatf("memory word %0d", i));
    // readback of words 100..199 while 50 more words are written
    @(negedge clk) rd_addr = 24'd100; rd_len = 24'd100; rd_start = 1'b1; src_lim = 350;
    @(negedge clk) rd_start = 1'b0; tbt_start = 1'b1;
    @(negedge clk) tbt_start = 1'b0; tq_lim = 40;
    wait (rb_seen == 100);
    repeat (30) @(posedge clk);
    check(!rd_busy, "readout finished");
    check(rb_max <= 32, $sformatf("read-back FIFO peak %0d", rb_max));
    check(n_reads == 100, $sformatf("%0d reads", n_reads));
    wait (tq_n == 40);
    repeat (30) @(posedge clk);
    check(n_writes == 390 && wr_words == 24'd350, $sformatf("writes during readout: %0d", n_writes));
    check(tbt_words == 24'd40, $sformatf("tbt_words %0d", tbt_words));
    for (int i = 0; i < 40; i++)
      check(u_mig.peek(TBASE + i) == tpat(i), $sformatf("TBT word %0d", i));
    for (int i = 300; i < 350; i++)
      check(u_mig.peek(i) == pattern(i), $sformatf("memory word %0d", i));
    check(n_stalls > 0, "controller stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
