// fec_top_tb_body.svh: body shared by the end-to-end testbenches of fec_top.
// The including module defines CAP (capture length in 512-bit words, equal
// to the design's CAP_LEN) and instantiates fec_top as `dut` between the
// signals declared here.
//
// A host model talks to the FEC over the GMII-style byte interface with real
// Ethernet/IPv4/UDP frames; an ADC model feeds the LVDS inputs; a DDR3
// controller model stands behind the user interface; an SPI slave model
// counts configuration frames. The run:
//   1. register read of the ID, attenuator setting, SPI table and one direct
//      amplifier frame, a frame with a bad CRC (must be ignored),
//   2. raw capture: arm, T0, CAP words of a counting pattern into DDR3, then
//      readout of the first RD1 words and of the last 24 words over UDP; every
//      sample is checked (no gap, right channel, right position in the
//      record), and the capture must end within the 20 ms-per-CAP time; a
//      256-word readout must deliver more than 800 Mb/s of payload,
//   3. turn-by-turn: bunches on the four electrodes with a known offset,
//      window and TBT enable set over UDP, TBT packets checked against the
//      offset; then a gain change on channel A (mode switch) must move X to
//      the value the corrected signals give; finally the TBT region of DDR3
//      is read back and must hold the same records as the UDP stream.
// Each mechanism's occurrences are counted; one that never happened fails.
  import fec_pkg::*;
  `include "eth_tb_util.svh"

  localparam logic [47:0] LMAC = 48'h02_00_C5_B0_00_01, HMAC = 48'h02_00_00_00_00_FE;
  localparam logic [31:0] LIP = 32'hC0A8_0A0A, HIP = 32'hC0A8_0A01;
  localparam int PERIOD = 102;

  int checks = 0, failures = 0;
  logic rst_n = 1'b1, clk = 1'b0, ui_clk = 1'b0, eth_clk = 1'b0;
  initial #1 rst_n = 1'b0;   // power-on reset: a real falling edge, so every
                               // asynchronous reset fires before the first clock
  logic [1:0]       adc_clk;
  logic [3:0][6:0]  adc_d;
  logic [3:0][13:0] adc_in = '0;
  logic             t0 = 1'b0, rf_win = 1'b0;
  logic             calib;
  logic [28:0]      app_addr;
  logic [2:0]       app_cmd;
  logic             app_en, app_rdy, app_wdf_wren, app_wdf_end, app_wdf_rdy, app_rd_data_valid;
  logic [511:0]     app_wdf_data, app_rd_data;
  logic [63:0]      app_wdf_mask;
  logic [7:0]       gmii_rxd = '0, gmii_txd;
  logic             gmii_rx_dv = 1'b0, gmii_tx_en;
  logic             spi_sclk, spi_mosi;
  logic [2:0]       spi_cs_n;
  logic [1:0]       att_sel;
  int               n_writes, n_reads, n_stalls;

  always #2 clk = ~clk;
  always #2.5 ui_clk = ~ui_clk;
  always #4 eth_clk = ~eth_clk;

  ads4449_model u_adc (.clk_in(clk), .smp_in(adc_in), .adc_clk(adc_clk), .adc_d(adc_d));

  mig_model u_mig (
    .ui_clk(ui_clk), .rst_n(rst_n), .init_calib_complete(calib),
    .app_addr(app_addr), .app_cmd(app_cmd), .app_en(app_en), .app_rdy(app_rdy),
    .app_wdf_data(app_wdf_data), .app_wdf_wren(app_wdf_wren), .app_wdf_end(app_wdf_end),
    .app_wdf_mask(app_wdf_mask), .app_wdf_rdy(app_wdf_rdy),
    .app_rd_data(app_rd_data), .app_rd_data_valid(app_rd_data_valid),
    .n_writes(n_writes), .n_reads(n_reads), .n_stalls(n_stalls));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  // ---------------- SPI slave model ----------------
  int spi_frames [3] = '{0, 0, 0};
  always @(negedge spi_cs_n[0]) if (rst_n) spi_frames[0]++;
  always @(negedge spi_cs_n[1]) if (rst_n) spi_frames[1]++;
  always @(negedge spi_cs_n[2]) if (rst_n) spi_frames[2]++;

  // ---------------- ADC stimulus ----------------
  // mode 0: counting pattern, channel c = n + 1000*c (14 bit)
  // mode 1: one bunch per turn of PERIOD samples, offsets bx, by
  int      adc_mode = 0;
  longint  n_smp = 0;
  real     bx = 0.25, by = -0.1;
  int      turn_gen = 0;
  always @(posedge clk) begin
    n_smp <= n_smp + 1;
    if (adc_mode == 0) begin
      for (int c = 0; c < 4; c++) adc_in[c] <= 14'(n_smp + 1000 * c);
      rf_win <= 1'b0;
    end else begin
      int  j;
      real p;
      j = int'(n_smp % PERIOD);
      if (j == 0) turn_gen <= turn_gen + 1;
      rf_win <= (j < 40);
      p = (j >= 20 && j < 50) ? 3000.0 * (1.0 - $cos(2.0 * 3.14159265 * real'(j - 20) / 30.0)) : 0.0;
      adc_in[0] <= 14'(int'(p * (1.0 + bx)));
      adc_in[2] <= 14'(int'(p * (1.0 - bx)));
      adc_in[1] <= 14'(int'(p * (1.0 + by)));
      adc_in[3] <= 14'(int'(p * (1.0 - by)));
    end
  end

  // ---------------- host: frame receiver ----------------
  bytes_t rxq, pay;
  bytes_t pkt_q [$];
  int     n_bad_frames = 0;
  always @(posedge eth_clk) begin
    if (rst_n && gmii_tx_en) rxq.push_back(gmii_txd);
    else if (rxq.size() > 0) begin
      string err;
      bytes_t p;
      if (check_frame(rxq, HMAC, LMAC, LIP, HIP, 16'd5000, 16'd6000, p, err)) pkt_q.push_back(p);
      else begin
        n_bad_frames++;
        check(0, $sformatf("frame from FEC: %s", err));
      end
      rxq = {};
    end
  end

  // ---------------- host: command sender ----------------
  task automatic send_frame(input bytes_t f);
    for (int i = 0; i < f.size(); i++) begin
      @(negedge eth_clk) gmii_rx_dv = 1'b1; gmii_rxd = f[i];
    end
    @(negedge eth_clk) gmii_rx_dv = 1'b0; gmii_rxd = 8'h00;
    repeat (12) @(negedge eth_clk);
  endtask

  task automatic send_cmd(input logic [7:0] op, input logic [15:0] a, input logic [31:0] d,
                          input bit bad = 0);
    bytes_t p;
    logic [63:0] c;
    c = {op, 8'h00, a, d};
    for (int i = 7; i >= 0; i--) p.push_back(c[8*i +: 8]);
    send_frame(build(LMAC, HMAC, HIP, LIP, 16'd6000, 16'd5000, p, bad));
  endtask

  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    send_cmd(CMD_WRITE, a, d);
  endtask

  // waits for the next packet of the given type
  int n_seq_err = 0, last_seq = -1;
  task automatic get_pkt(input logic [7:0] typ, output bytes_t p, input int tmo_us = 2000);
    int t = 0;
    forever begin
      while (pkt_q.size() == 0 && t < tmo_us * 125) begin @(posedge eth_clk); t++; end
      if (pkt_q.size() == 0) begin
        check(0, $sformatf("no packet of type %h", typ));
        p = {};
        return;
      end
      p = pkt_q.pop_front();
      if (last_seq >= 0 && int'({p[2], p[3]}) != ((last_seq + 1) & 16'hFFFF)) n_seq_err++;
      last_seq = int'({p[2], p[3]});
      if (p[0] == typ) return;
    end
  endtask

  task automatic rd(input logic [15:0] a, output logic [31:0] d);
    bytes_t p;
    send_cmd(CMD_READ, a, 32'h0);
    get_pkt(PKT_REPLY, p);
    d = '0;
    if (p.size() == 12) begin
      check({p[4], p[5], p[6], p[7]} == {CMD_READ, 8'h00, a}, "reply header");
      d = {p[8], p[9], p[10], p[11]};
    end else check(0, "reply size");
  endtask

  // ---------------- raw readout check ----------------
  longint first_ch0 = -1;
  int     n_raw_words = 0, n_raw_pkts = 0, n_raw_partial = 0;
  task automatic read_raw(input int from, input int len);
    bytes_t p;
    int got = 0;
    logic [13:0] exp0;
    bit have = 0;
    wr(REG_RD_ADDR, 32'(from));
    wr(REG_RD_LEN, 32'(len));
    wr(REG_CTRL, 32'h4);
    while (got < len) begin
      get_pkt(PKT_RAW, p, 20000);
      if (p.size() == 0) return;
      n_raw_pkts++;
      if (p[1] != 8'd16) n_raw_partial++;
      for (int w = 0; w < int'(p[1]); w++) begin
        for (int s = 0; s < 8; s++) begin
          logic [15:0] ch [4];
          for (int c = 0; c < 4; c++)
            ch[c] = {p[4 + 64*w + 8*s + 2*c + 1], p[4 + 64*w + 8*s + 2*c]};
          for (int c = 1; c < 4; c++)
            check(ch[c][13:0] == 14'(ch[0][13:0] + 14'(1000 * c)), "channel pattern");
          check(ch[0][15:14] == {2{ch[0][13]}}, "sign extension");
          if (!have) begin
            if (from == 0) first_ch0 = longint'(ch[0][13:0]);
            else check(ch[0][13:0] == 14'(first_ch0 + longint'(from) * 8), "record position");
            have = 1;
          end else check(ch[0][13:0] == exp0, "sample continuity");
          exp0 = ch[0][13:0] + 14'd1;
        end
        n_raw_words++;
      end
      got += int'(p[1]);
    end
    check(got == len, "raw words read");
  endtask

  // Raw readout throughput: payload bits per second from the readout start
  // to the last packet, which must reach the link's 800 Mb/s class.
  real raw_mbps = 0.0;
  task automatic read_rate(input int from, input int len);
    bytes_t   p;
    int       got = 0, bytes = 0;
    realtime  t_start;
    wr(REG_RD_ADDR, 32'(from));
    wr(REG_RD_LEN, 32'(len));
    t_start = $realtime;
    wr(REG_CTRL, 32'h4);
    while (got < len) begin
      get_pkt(PKT_RAW, p, 20000);
      if (p.size() == 0) return;
      got   += int'(p[1]);
      bytes += p.size() - 4;
    end
    raw_mbps = real'(bytes) * 8.0 / (($realtime - t_start) / 1ns) * 1000.0;
    check(bytes == 64 * len, "readout size");
    check(raw_mbps > 800.0, $sformatf("raw readout %0.1f Mb/s", raw_mbps));
  endtask

  // ---------------- TBT check ----------------
  int n_tbt_rec = 0, n_tbt_pkts = 0, n_mode_b = 0, n_tbt_ddr = 0;
  logic [127:0] tbt_log[$];      // every record received over UDP, in order
  task automatic read_tbt(input int npkt, input real ex_a, input real ey_a,
                          input real ex_b, input bit allow_b);
    bytes_t p;
    bit seen_b = 0;
    for (int k = 0; k < npkt; k++) begin
      get_pkt(PKT_TBT, p, 200);
      if (p.size() == 0) return;
      n_tbt_pkts++;
      for (int r = 0; r < int'(p[1]); r++) begin
        logic [127:0] rec;
        tbt_rec_t     t;
        real          x, y;
        for (int i = 0; i < 16; i++) rec[8*i +: 8] = p[4 + 16*r + i];
        tbt_log.push_back(rec);
        t = rec;
        x = real'(t.x) / 32768.0;
        y = real'(t.y) / 32768.0;
        check(t.sum_x > 0 && t.sum_y > 0, "window sums positive");
        check((y - ey_a) < 0.005 && (ey_a - y) < 0.005, $sformatf("Y %f expected %f", y, ey_a));
        if ((x - ex_a) < 0.005 && (ex_a - x) < 0.005) begin
          check(!seen_b, "X went back after the gain change");
        end else begin
          check(allow_b && (x - ex_b) < 0.005 && (ex_b - x) < 0.005,
                $sformatf("X %f expected %f or %f", x, ex_a, ex_b));
          seen_b = 1;
          n_mode_b++;
        end
        n_tbt_rec++;
      end
    end
  endtask

  // The same records, read back from the DDR3 TBT region: each 512-bit word
  // holds four records, the first in the low 128 bits.
  task automatic read_tbt_ddr(input int nwords);
    bytes_t p;
    int got = 0;
    wr(REG_RD_ADDR, 32'(TBT_BASE_WORD));
    wr(REG_RD_LEN, 32'(nwords));
    wr(REG_CTRL, 32'h4);
    while (got < nwords) begin
      get_pkt(PKT_RAW, p, 20000);
      if (p.size() == 0) return;
      for (int w = 0; w < int'(p[1]); w++)
        for (int j = 0; j < 4; j++) begin
          logic [127:0] rec;
          int           n;
          for (int i = 0; i < 16; i++) rec[8*i +: 8] = p[4 + 64*w + 16*j + i];
          n = 4 * (got + w) + j;
          if (n < tbt_log.size()) begin
            check(rec == tbt_log[n], $sformatf("TBT record %0d in DDR3", n));
            n_tbt_ddr++;
          end
        end
      got += int'(p[1]);
    end
    check(got == nwords, "TBT words read");
  endtask

  // ---------------- watchdog ----------------
  initial begin
    #((CAP * 32.0 + 600000.0) * 1ns);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- the run ----------------
  initial begin
    logic [31:0] d;
    realtime     t_t0, t_done;
    repeat (10) @(posedge eth_clk);
    rst_n = 1'b1;
    wait (calib);
    // 1. registers, attenuator, SPI, bad frame
    rd(REG_ID, d);
    check(d == FEC_ID, "ID register");
    wr(REG_ATT, 32'd2);
    repeat (4) @(posedge eth_clk);
    check(att_sel == 2'd2, "attenuator select");
    wr(REG_CTRL, 32'h8);                       // SPI table
    wr(REG_SPI, {2'd2, 5'd15, 1'b0, 24'h00_0213});
    send_cmd(CMD_WRITE, REG_ATT, 32'd3, 1);     // bad CRC: ignored
    repeat (2000) @(posedge eth_clk);
    check(att_sel == 2'd2, "bad frame ignored");
    check(spi_frames[0] == 3 && spi_frames[1] == 2 && spi_frames[2] == 2,
          $sformatf("SPI frames %0d/%0d/%0d", spi_frames[0], spi_frames[1], spi_frames[2]));
    rd(REG_STATUS, d);
    check(d[8] && d[4] && !d[0], $sformatf("status %h", d));

    // 2. raw capture of CAP words after T0
    if (CAP != 625000) wr(REG_CAP_LEN, 32'(CAP));
    wr(REG_CTRL, 32'h1);                       // arm
    repeat (50) @(posedge clk);
    t0 = 1'b1;
    t_t0 = $realtime;
    repeat (100) @(posedge clk);
    t0 = 1'b0;
    do begin
      repeat (2000) @(posedge eth_clk);
      rd(REG_STATUS, d);
    end while (!d[1]);
    t_done = $realtime;
    check((t_done - t_t0) < (CAP * 32.0 + 40000.0) * 1ns, "capture time");
    repeat (200) @(posedge ui_clk);
    check(n_writes == CAP && dut.u_ddr.wr_words == 24'(CAP), $sformatf("%0d DDR3 writes", n_writes));
    check(d[6:5] == 2'b00, "no samples dropped");
    read_raw(0, (CAP < 40) ? CAP : 40);
    read_raw(CAP - 24, 24);
    read_rate(0, 256);

    // 3. turn-by-turn
    adc_mode = 1;
    wr(REG_WS, 32'd5);
    wr(REG_WE, 32'd90);
    wr(REG_CTRL, 32'h2);                       // TBT enable
    read_tbt(3, 0.25, -0.1, 0.0, 0);
    // gain of channel A to 1.25: X = (1.25(1+x) - (1-x)) / (1.25(1+x) + (1-x))
    wr(REG_K0, 32'(int'(1.25 * 65536.0)));
    read_tbt(4, 0.25, -0.1, (1.25 * 1.25 - 0.75) / (1.25 * 1.25 + 0.75), 1);
    wr(REG_CTRL, 32'h0);
    repeat (3000) @(posedge eth_clk);
    rd(REG_TBT_WORDS, d);
    check(d == 32'(dut.u_ddr.tbt_words) && int'(d) * 4 >= n_tbt_rec,
          $sformatf("TBT words in DDR3 %0d for %0d records", d, n_tbt_rec));
    read_tbt_ddr(int'(d));

    // mechanisms that must have happened
    check(n_raw_partial > 0, "short last raw packet");
    check(n_stalls > 0, "DDR3 controller stalls");
    check(n_mode_b > 0, "gain change took effect");
    check(n_tbt_pkts >= 7 && n_raw_pkts >= 3, "TBT and raw packets");
    check(n_seq_err == 0, "packet sequence numbers");
    check(n_tbt_ddr >= n_tbt_rec, "TBT records buffered in DDR3");
    check(dut.u_udp_rx.bad_cnt >= 1, "bad frame counted");
    $display("mechanisms: raw packets %0d (short %0d), raw words %0d, TBT packets %0d, records %0d, after gain change %0d, TBT records from DDR3 %0d, DDR3 stalls %0d, writes %0d, reads %0d, SPI frames %0d, raw readout %0.1f Mb/s",
             n_raw_pkts, n_raw_partial, n_raw_words, n_tbt_pkts, n_tbt_rec, n_mode_b, n_tbt_ddr, n_stalls,
             n_writes, n_reads, spi_frames[0] + spi_frames[1] + spi_frames[2], raw_mbps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
