// tb_udp_tx: sends payloads of random content and lengths 0..1472 bytes
// (including the sizes that need padding), collects the bytes while tx_en is
// high and checks each frame with an independent frame checker (preamble,
// addresses, IPv4 header checksum, lengths, padding, CRC-32) and the
// payload against what was offered. Also checks the byte time of each frame
// plus its inter-frame gap.
`timescale 1ns/1ps
module tb_udp_tx;
  `include "eth_tb_util.svh"
  int checks = 0, failures = 0;
  localparam logic [47:0] SMAC = 48'h02_00_C5_B0_00_01, DMAC = 48'h02_00_00_00_00_FE;
  localparam logic [31:0] SIP = 32'hC0A8_0A0A, DIP = 32'hC0A8_0A01;
  localparam logic [15:0] SPORT = 16'd5000, DPORT = 16'd6000;
  logic clk = 1'b0, rst_n = 1'b0;
  logic        start = 1'b0, pl_req, busy, tx_en;
  logic [15:0] len = '0;
  logic [7:0]  pl_data, txd;
  logic [31:0] frames;
  bytes_t      pay, rxf, got;
  int          pidx = 0;

  udp_tx dut (.clk(clk), .rst_n(rst_n), .start(start), .len(len),
    .src_mac(SMAC), .dst_mac(DMAC), .src_ip(SIP), .dst_ip(DIP), .src_port(SPORT), .dst_port(DPORT),
    .pl_req(pl_req), .pl_data(pl_data), .busy(busy), .frames(frames), .txd(txd), .tx_en(tx_en));

  always #4 clk = ~clk;

  assign pl_data = (pidx < pay.size()) ? pay[pidx] : 8'hEE;
  always @(posedge clk) if (pl_req) pidx <= pidx + 1;
  always @(posedge clk) if (tx_en) rxf.push_back(txd);

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

  initial begin
    int L, cyc;
    string err;
    bit ok;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      L = (t < 6) ? t * 4 : (t == 6) ? 1472 : ($urandom % 600);
      pay = {};
      for (int i = 0; i < L; i++) pay.push_back(8'($urandom));
      rxf = {};
      @(negedge clk);
      pidx = 0; start = 1'b1; len = 16'(L);
      @(negedge clk) start = 1'b0;
      cyc = 1;
      while (busy) begin @(negedge clk); cyc++; end
      ok = check_frame(rxf, DMAC, SMAC, SIP, DIP, SPORT, DPORT, got, err);
      check(ok, $sformatf("frame %0d: %s", t, err));
      check(got == pay, $sformatf("payload of frame %0d", t));
      check(pidx == L, "payload bytes consumed");
      check(cyc == ((L < 18) ? 18 : L) + 54 + 12 + 1, $sformatf("frame time %0d for %0d bytes", cyc, L));
    end
    check(frames == 32'd40, "frame counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
