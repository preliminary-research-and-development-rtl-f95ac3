// tb_udp_rx: feeds frames built by an independent frame builder: good
// command frames (own MAC and broadcast), and frames that must be rejected
// (bad CRC, wrong port, wrong MAC, not UDP). Only good frames may produce
// cmd_valid, with the first eight payload bytes as the command, one clock
// after the last byte; the good/bad counters must match.
`timescale 1ns/1ps
module tb_udp_rx;
  import fec_pkg::*;
  `include "eth_tb_util.svh"
  int checks = 0, failures = 0;
  localparam logic [47:0] LMAC = 48'h02_00_C5_B0_00_01, HMAC = 48'h02_00_00_00_00_FE;
  localparam logic [31:0] LIP = 32'hC0A8_0A0A, HIP = 32'hC0A8_0A01;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0]  rxd = '0;
  logic        rx_dv = 1'b0, cmd_valid;
  host_cmd_t   cmd;
  logic [15:0] good_cnt, bad_cnt;
  int          nvalid = 0;
  logic [63:0] last_cmd;

  udp_rx dut (.clk(clk), .rst_n(rst_n), .rxd(rxd), .rx_dv(rx_dv), .local_mac(LMAC),
              .local_port(16'd5000), .cmd(cmd), .cmd_valid(cmd_valid),
              .good_cnt(good_cnt), .bad_cnt(bad_cnt));

  always #4 clk = ~clk;
  always @(posedge clk) if (rst_n && cmd_valid) begin nvalid++; last_cmd = cmd; end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 6) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input bytes_t f);
    for (int i = 0; i < f.size(); i++) begin
      @(negedge clk) rx_dv = 1'b1; rxd = f[i];
    end
    @(negedge clk) rx_dv = 1'b0; rxd = 8'h00;
  endtask

  initial begin
    bytes_t pay, f;
    logic [63:0] c;
    int n_prev, exp_good = 0, exp_bad = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      int kind;
      kind = (t < 10) ? 0 : int'($urandom % 6);
      c = {$urandom, $urandom};
      pay = {};
      for (int i = 7; i >= 0; i--) pay.push_back(c[8*i +: 8]);
      if (kind == 5) for (int i = 0; i < 20; i++) pay.push_back(8'($urandom));   // longer datagram
      unique case (kind)
        1:       f = build(LMAC, HMAC, HIP, LIP, 16'd6000, 16'd5000, pay, 1);   // bad CRC
        2:       f = build(LMAC, HMAC, HIP, LIP, 16'd6000, 16'd5001, pay);      // wrong port
        3:       f = build(48'h02_00_C5_B0_00_02, HMAC, HIP, LIP, 16'd6000, 16'd5000, pay);
        4:       f = build('1, HMAC, HIP, LIP, 16'd6000, 16'd5000, pay);        // broadcast
        default: f = build(LMAC, HMAC, HIP, LIP, 16'd6000, 16'd5000, pay);
      endcase
      if (kind == 1 || kind == 2 || kind == 3) exp_bad++; else exp_good++;
      n_prev = nvalid;
      send(f);
      repeat (2) @(posedge clk); #0.1;
      if (kind == 1 || kind == 2 || kind == 3)
        check(nvalid == n_prev, $sformatf("frame kind %0d accepted", kind));
      else begin
        check(nvalid == n_prev + 1, $sformatf("frame %0d kind %0d not accepted", t, kind));
        check(last_cmd == c, "command bytes");
      end
      repeat ($urandom % 12 + 1) @(negedge clk);
    end
    // a non-UDP frame (protocol byte changed, CRC recomputed)
    pay = {};
    for (int i = 0; i < 8; i++) pay.push_back(8'(i));
    f = build(LMAC, HMAC, HIP, LIP, 16'd6000, 16'd5000, pay);
    f[31] = 8'h06;
    begin
      logic [31:0] cc;
      for (int i = 0; i < 4; i++) void'(f.pop_back());
      cc = fcs(f, 8, f.size());
      for (int i = 0; i < 4; i++) f.push_back(cc[8*i +: 8]);
    end
    n_prev = nvalid;
    send(f);
    exp_bad++;
    repeat (3) @(posedge clk);
    check(nvalid == n_prev, "TCP frame rejected");
    check(good_cnt == 16'(exp_good) && bad_cnt == 16'(exp_bad),
          $sformatf("counters %0d/%0d expected %0d/%0d", good_cnt, bad_cnt, exp_good, exp_bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
