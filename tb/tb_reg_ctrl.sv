// tb_reg_ctrl: checks the reset values, writes and reads back every
// read/write register with random data (reads return {op, 0, addr, value}
// through the reply handshake), the control-register pulses, the TBT enable
// level, the direct SPI request, the read-only ID, status and TBT count and that
// unknown addresses read as zero.
`timescale 1ns/1ps
module tb_reg_ctrl;
  import fec_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  host_cmd_t   cmd = '0;
  logic        cmd_valid = 1'b0, reply_ack = 1'b0;
  logic [31:0] status = 32'h0000_0055;
  logic [23:0] tbt_words = 24'h12_3456;
  logic        arm, rd_start, spi_cfg_start, spi_host_req, tbt_en, reply_req;
  logic [31:0] spi_host_word;
  logic [1:0]  att_sel;
  logic [23:0] cap_len, rd_addr, rd_len;
  logic [11:0] ws, we;
  logic [3:0][17:0] k;
  logic [3:0][15:0] b;
  logic [63:0] reply;
  int          n_arm = 0, n_rd = 0, n_cfg = 0, n_spi = 0;

  reg_ctrl dut (.clk(clk), .rst_n(rst_n), .cmd(cmd), .cmd_valid(cmd_valid), .status(status),
    .tbt_words(tbt_words),
    .arm(arm), .rd_start(rd_start), .spi_cfg_start(spi_cfg_start), .spi_host_req(spi_host_req),
    .spi_host_word(spi_host_word), .tbt_en(tbt_en), .att_sel(att_sel), .cap_len(cap_len),
    .rd_addr(rd_addr), .rd_len(rd_len), .ws(ws), .we(we), .k(k), .b(b),
    .reply_req(reply_req), .reply_ack(reply_ack), .reply(reply));

  always #4 clk = ~clk;
  always @(posedge clk) begin
    if (rst_n) begin
      n_arm += int'(arm); n_rd += int'(rd_start); n_cfg += int'(spi_cfg_start);
      n_spi += int'(spi_host_req);
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
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk) cmd = '{op: CMD_WRITE, rsvd: 8'h00, addr: a, data: d}; cmd_valid = 1'b1;
    @(negedge clk) cmd_valid = 1'b0;
  endtask

  task automatic rd(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk) cmd = '{op: CMD_READ, rsvd: 8'h00, addr: a, data: 32'h0}; cmd_valid = 1'b1;
    @(negedge clk) cmd_valid = 1'b0;
    check(reply_req, "reply requested");
    check(reply[63:32] == {CMD_READ, 8'h00, a}, "reply header");
    d = reply[31:0];
    reply_ack = 1'b1;
    @(negedge clk) reply_ack = 1'b0;
    check(!reply_req, "reply released");
  endtask

  initial begin
    logic [31:0] v, d;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // reset values
    check(cap_len == 24'd625000, "capture length resets to 20 ms");
    check(k[0] == 18'd65536 && k[3] == 18'd65536 && b[2] == 16'd0, "unity gain, zero offset");
    check(ws == 12'd0 && we == 12'd99 && !tbt_en && att_sel == 2'd0, "window and control reset");
    rd(REG_ID, d);      check(d == FEC_ID, "ID");
    rd(REG_STATUS, d);  check(d == status, "status");
    rd(REG_TBT_WORDS, d); check(d == 32'h0012_3456, "TBT word count");
    rd(16'h0123, d);    check(d == 32'h0, "unknown address");
    // read/write registers
    for (int r = 0; r < 40; r++) begin
      logic [15:0] a;
      logic [31:0] m;
      a = 16'(2 + ($urandom % 14));
      if (a == REG_CTRL) a = REG_ATT;
      v = $urandom;
      unique case (a)
        REG_ATT:                           m = 32'h3;
        REG_CAP_LEN, REG_RD_ADDR, REG_RD_LEN: m = 32'hFF_FFFF;
        REG_WS, REG_WE:                    m = 32'hFFF;
        16'h0008, 16'h0009, 16'h000A, 16'h000B: m = 32'h3_FFFF;
        default:                           m = 32'hFFFF;
      endcase
      wr(a, v);
      rd(a, d);
      if (a >= 16'h0008)   // signed registers read back sign-extended
        check((d & m) == (v & m) && (d & ~m) == ((v & (m ^ (m >> 1))) != 0 ? ~m : 32'h0),
              $sformatf("register %h: %h vs %h", a, d, v));
      else
        check(d == (v & m), $sformatf("register %h: %h vs %h", a, d, v));
    end
    wr(REG_WS, 32'd7);  check(ws == 12'd7, "ws output");
    wr(REG_K0 + 16'd2, 32'h1_2345); check(k[2] == 18'h1_2345, "k[2] output");
    // control pulses
    wr(REG_CTRL, 32'h0000_000F);
    @(negedge clk);
    check(n_arm == 1 && n_rd == 1 && n_cfg == 1, "one pulse each");
    check(tbt_en && !arm && !rd_start, "TBT level stays, pulses clear");
    rd(REG_CTRL, d); check(d == 32'h2, "control read-back");
    wr(REG_CTRL, 32'h0);
    check(!tbt_en, "TBT disabled");
    // each control bit on its own
    wr(REG_CTRL, 32'h0000_0001);
    @(negedge clk);
    check(n_arm == 2 && n_rd == 1 && n_cfg == 1 && !tbt_en, "bit 0 arms only");
    wr(REG_CTRL, 32'h0000_0002);
    @(negedge clk);
    check(n_arm == 2 && n_rd == 1 && n_cfg == 1 && tbt_en, "bit 1 enables TBT only");
    wr(REG_CTRL, 32'h0000_0004);
    @(negedge clk);
    check(n_arm == 2 && n_rd == 2 && n_cfg == 1 && !tbt_en, "bit 2 starts readout only");
    wr(REG_CTRL, 32'h0000_0008);
    @(negedge clk);
    check(n_arm == 2 && n_rd == 2 && n_cfg == 2 && !tbt_en, "bit 3 starts SPI table only");
    wr(REG_SPI, 32'h9E00_0217);
    @(negedge clk);
    check(n_spi == 1 && spi_host_word == 32'h9E00_0217, "SPI host request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
