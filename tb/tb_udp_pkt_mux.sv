// tb_udp_pkt_mux: show-ahead queue models stand in for the TBT and raw FIFOs
// and a simple transmitter model pulls the payload bytes. The scheduler
// must send a reply packet first, TBT packets of 16 records once 16 are
// waiting, and raw packets of 16 words plus a shorter last packet for a
// readout of 40 words; every packet's header (type, record count, sequence)
// and every record byte (LSB first for TBT/raw, MSB first for the reply)
// are checked against the queued data.
`timescale 1ns/1ps
module tb_udp_pkt_mux;
  import fec_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic         reply_req = 1'b0, reply_ack;
  logic [63:0]  reply = '0;
  logic [127:0] tbt_q [$];
  logic [511:0] raw_q [$];
  logic [127:0] tbt_data;
  logic [511:0] raw_data;
  logic [6:0]   tbt_level, raw_level;
  logic         tbt_rd, raw_rd, rd_start = 1'b0;
  logic [23:0]  rd_len = '0;
  logic         tx_start, tx_busy = 1'b0, pl_req = 1'b0;
  logic [15:0]  tx_len;
  logic [7:0]   pl_data;
  logic [15:0]  n_reply, n_tbt, n_raw;
  logic [7:0]   pkt [$];
  logic [7:0]   pkts [$][$];
  logic [7:0]   exp_reply [$];
  logic [127:0] tbt_sent [$];
  logic [511:0] raw_sent [$];

  udp_pkt_mux dut (.clk(clk), .rst_n(rst_n), .reply_req(reply_req), .reply(reply),
    .reply_ack(reply_ack), .tbt_data(tbt_data), .tbt_level(tbt_level), .tbt_rd(tbt_rd),
    .raw_data(raw_data), .raw_level(raw_level), .raw_rd(raw_rd), .rd_start(rd_start),
    .rd_len(rd_len), .tx_start(tx_start), .tx_len(tx_len), .tx_busy(tx_busy),
    .pl_req(pl_req), .pl_data(pl_data), .n_reply(n_reply), .n_tbt(n_tbt), .n_raw(n_raw));

  always #4 clk = ~clk;

  assign tbt_data  = tbt_q.size() ? tbt_q[0] : '0;
  assign raw_data  = raw_q.size() ? raw_q[0] : '0;
  assign tbt_level = 7'(tbt_q.size());
  assign raw_level = 7'(raw_q.size());
  always @(posedge clk) begin
    if (rst_n && tbt_rd) void'(tbt_q.pop_front());
    if (rst_n && raw_rd) void'(raw_q.pop_front());
    if (rst_n && reply_ack) reply_req <= 1'b0;
  end

  // transmitter model: pulls tx_len bytes back to back, then stays busy 20 clocks
  initial begin
    int L;
    forever begin
      @(posedge clk);
      if (rst_n && tx_start) begin
        L = tx_len;
        tx_busy <= 1'b1;
        pkt = {};
        repeat (5) @(posedge clk);
        for (int i = 0; i < L; i++) begin
          pl_req <= 1'b1;
          @(posedge clk);
          pkt.push_back(pl_data);
        end
        pl_req <= 1'b0;
        pkts.push_back(pkt);
        repeat (20) @(posedge clk);
        tx_busy <= 1'b0;
      end
    end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 6) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] p [$];
    int seq = 0, ti = 0, ri = 0, nrec;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // 20 TBT records and a reply arrive together; raw readout of 40 words
    @(negedge clk);
    reply = 64'h0200_0011_DEAD_BEEF; reply_req = 1'b1;
    for (int i = 0; i < 20; i++) begin
      logic [127:0] r;
      r = {$urandom, $urandom, $urandom, $urandom};
      tbt_q.push_back(r); tbt_sent.push_back(r);
    end
    rd_len = 24'd40; rd_start = 1'b1;
    @(negedge clk) rd_start = 1'b0;
    for (int i = 0; i < 40; i++) begin
      logic [511:0] w;
      for (int j = 0; j < 16; j++) w[32*j +: 32] = $urandom;
      raw_q.push_back(w); raw_sent.push_back(w);
      if (i % 4 == 3) repeat (30) @(negedge clk);
    end
    wait (pkts.size() == 5);
    repeat (50) @(posedge clk);
    check(pkts.size() == 5, $sformatf("%0d packets", pkts.size()));
    check(n_reply == 1 && n_tbt == 1 && n_raw == 3, "packet counts");
    check(tbt_q.size() == 4, "4 TBT records wait for a full packet");
    // packet 0: reply
    p = pkts[0];
    check(p.size() == 12 && p[0] == PKT_REPLY && p[1] == 8'd1 && {p[2], p[3]} == 16'd0, "reply header");
    for (int i = 0; i < 8; i++) check(p[4+i] == reply[8*(7-i) +: 8], "reply byte");
    seq = 1;
    for (int k = 1; k < 5; k++) begin
      p = pkts[k];
      check({p[2], p[3]} == 16'(seq), "sequence number");
      seq++;
      nrec = p[1];
      if (p[0] == PKT_TBT) begin
        check(nrec == 16 && p.size() == 4 + 16 * 16, "TBT packet size");
        for (int r = 0; r < nrec; r++, ti++)
          for (int i = 0; i < 16; i++)
            check(p[4 + 16*r + i] == tbt_sent[ti][8*i +: 8], $sformatf("TBT record %0d byte %0d", ti, i));
      end else begin
        check(p[0] == PKT_RAW && p.size() == 4 + 64 * nrec, "raw packet size");
        check(nrec == ((ri < 32) ? 16 : 8), $sformatf("raw packet of %0d words", nrec));
        for (int r = 0; r < nrec; r++, ri++)
          for (int i = 0; i < 64; i++)
            check(p[4 + 64*r + i] == raw_sent[ri][8*i +: 8], $sformatf("raw word %0d byte %0d", ri, i));
      end
    end
    check(ti == 16 && ri == 40, "all records delivered once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
