// fec_top: FPGA design of the BPM front-end controller (FEC) readout board.
//
// One FEC digitises the four electrode signals (A, B, C, D) of one beam
// position monitor at 250 MS/s with 14 bit and does three things with them:
//   1. buffers a raw record (20 ms after the T0 timing signal by default) in
//      the 4 GB DDR3 memory through the 64-in/512-out FIFO and the DDR3
//      controller's user interface,
//   2. computes the beam position turn by turn in real time (gain/offset
//      correction, difference and sum, window integration, ratio), and
//      buffers these turn-by-turn records in a second DDR3 region,
//   3. talks to the host over UDP: register writes and reads, turn-by-turn
//      packets and readback of the raw record from DDR3.
// An SPI sequencer configures the ADC, the clock PLL and the programmable
// amplifier; att_sel drives the analog switches of the input attenuator.
//
// Clock domains: adc_clk[1:0] (ADC output clocks, channels 1-2 and 3-4),
// clk (250 MHz system clock from the on-board PLL, also the ADC sampling
// clock), ui_clk (200 MHz user clock of the DDR3 controller), eth_clk (125 MHz
// byte clock of the Ethernet link). Data cross between them in dual-clock
// FIFOs, command pulses in pulse_sync and status levels in two-flop
// synchronisers. The configuration registers (window, gains, offsets,
// lengths) live in the eth_clk domain and are used directly in the other
// domains: they are static while a capture, readout or TBT run is active,
// which the host must respect.
//
// Ports outside the FPGA logic: the DDR3 controller's user interface (app_*),
// a GMII-style byte interface to the Ethernet transceiver, the ADC's LVDS
// data after the input buffers, SPI pins, and the attenuator select.
// Following the document: the blocks and data paths of the FPGA framework,
// the ADC-to-DDR3 path and the position algorithm. Own choices: the clock
// and register crossing scheme, addresses and ports of the UDP link.
module fec_top
  import fec_pkg::*;
#(
  parameter logic [47:0] LOCAL_MAC  = 48'h02_00_C5_B0_00_01,
  parameter logic [31:0] LOCAL_IP   = 32'hC0A8_0A0A,   // 192.168.10.10
  parameter logic [15:0] LOCAL_PORT = 16'd5000,
  parameter logic [47:0] HOST_MAC   = 48'h02_00_00_00_00_FE,
  parameter logic [31:0] HOST_IP    = 32'hC0A8_0A01,   // 192.168.10.1
  parameter logic [15:0] HOST_PORT  = 16'd6000,
  parameter int unsigned CAP_LEN    = CAP_WORDS_20MS, // 512-bit words
  parameter int unsigned SPI_HALF   = 4
) (
  input  logic                 rst_n,
  // ADC
  input  logic                 clk,
  input  logic [1:0]           adc_clk,
  input  logic [3:0][6:0]      adc_d,
  // timing
  input  logic                 t0,
  input  logic                 rf_win,
  // DDR3 controller user interface
  input  logic                 ui_clk,
  input  logic                 ui_rst,
  input  logic                 init_calib_complete,
  output logic [28:0]          app_addr,
  output logic [2:0]           app_cmd,
  output logic                 app_en,
  input  logic                 app_rdy,
  output logic [511:0]         app_wdf_data,
  output logic                 app_wdf_wren,
  output logic                 app_wdf_end,
  output logic [63:0]          app_wdf_mask,
  input  logic                 app_wdf_rdy,
  input  logic [511:0]         app_rd_data,
  input  logic                 app_rd_data_valid,
  // Ethernet byte interface
  input  logic                 eth_clk,
  input  logic [7:0]           gmii_rxd,
  input  logic                 gmii_rx_dv,
  output logic [7:0]           gmii_txd,
  output logic                 gmii_tx_en,
  // SPI configuration (0 = ADC, 1 = PLL, 2 = amplifier)
  output logic                 spi_sclk,
  output logic                 spi_mosi,
  input  logic                 spi_miso,
  output logic [2:0]           spi_cs_n,
  // analog front end
  output logic [1:0]           att_sel
);
  localparam int unsigned LEN_W = 24;
  localparam int unsigned CNT_W = 12;

  // ---------------- resets ----------------
  logic rst_sys_n, rst_ui_n, rst_eth_n;
  rst_sync u_rs_sys (.clk(clk),     .arst_n(rst_n),           .rst_n(rst_sys_n));
  rst_sync u_rs_ui  (.clk(ui_clk),  .arst_n(rst_n && !ui_rst), .rst_n(rst_ui_n));
  rst_sync u_rs_eth (.clk(eth_clk), .arst_n(rst_n),           .rst_n(rst_eth_n));

  // ---------------- host side: UDP receive and registers ----------------
  host_cmd_t          cmd;
  logic               cmd_valid;
  logic [15:0]        rx_good, rx_bad;
  logic               arm_e, rd_start_e, spi_cfg_start, spi_host_req, tbt_en;
  logic [31:0]        spi_host_word, status;
  logic [23:0]        tbt_words_e, tbt_words_s1;   // TBT word count, eth_clk domain
  logic [LEN_W-1:0]   cap_len, rd_addr, rd_len;
  logic [CNT_W-1:0]   ws, we;
  logic [3:0][K_W-1:0] k;
  logic [3:0][B_W-1:0] b;
  logic               reply_req, reply_ack;
  logic [63:0]        reply;

  udp_rx u_udp_rx (
    .clk(eth_clk), .rst_n(rst_eth_n), .rxd(gmii_rxd), .rx_dv(gmii_rx_dv),
    .local_mac(LOCAL_MAC), .local_port(LOCAL_PORT),
    .cmd(cmd), .cmd_valid(cmd_valid), .good_cnt(rx_good), .bad_cnt(rx_bad)
  );

  reg_ctrl #(.CNT_W(CNT_W), .LEN_W(LEN_W), .CAP_LEN_RST(LEN_W'(CAP_LEN))) u_regs (
    .clk(eth_clk), .rst_n(rst_eth_n), .cmd(cmd), .cmd_valid(cmd_valid), .status(status),
    .tbt_words(tbt_words_e),
    .arm(arm_e), .rd_start(rd_start_e), .spi_cfg_start(spi_cfg_start),
    .spi_host_req(spi_host_req), .spi_host_word(spi_host_word), .tbt_en(tbt_en),
    .att_sel(att_sel), .cap_len(cap_len), .rd_addr(rd_addr), .rd_len(rd_len),
    .ws(ws), .we(we), .k(k), .b(b),
    .reply_req(reply_req), .reply_ack(reply_ack), .reply(reply)
  );

  // ---------------- SPI configuration ----------------
  logic       spi_start, spi_busy, spi_done, cfg_busy;
  logic [1:0] spi_dev;
  logic [5:0] spi_nbits;
  logic [31:0] spi_data;
  logic [15:0] spi_frames;

  spi_cfg_seq u_cfg (
    .clk(eth_clk), .rst_n(rst_eth_n), .cfg_start(spi_cfg_start),
    .host_req(spi_host_req), .host_word(spi_host_word),
    .busy(cfg_busy), .done_cnt(spi_frames),
    .spi_start(spi_start), .spi_dev(spi_dev), .spi_nbits(spi_nbits), .spi_data(spi_data),
    .spi_busy(spi_busy), .spi_done(spi_done)
  );

  spi_master #(.HALF(SPI_HALF), .MAX_BITS(32), .N_CS(3)) u_spi (
    .clk(eth_clk), .rst_n(rst_eth_n), .start(spi_start), .dev(spi_dev),
    .nbits(spi_nbits), .data(spi_data), .busy(spi_busy), .done(spi_done), .rdata(),
    .sclk(spi_sclk), .mosi(spi_mosi), .miso(spi_miso), .cs_n(spi_cs_n)
  );

  // ---------------- ADC data interface ----------------
  logic [3:0][15:0] smp;
  logic             smp_valid;
  logic [15:0]      adc_ovf;

  adc_frontend #(.NCH(4), .AW(14), .FIFO_LOG2(3)) u_adc (
    .clk(clk), .rst_n(rst_sys_n), .adc_clk(adc_clk), .adc_d(adc_d),
    .smp(smp), .smp_valid(smp_valid), .ovf_cnt(adc_ovf)
  );

  // ---------------- raw record: capture gate, 64i/512o FIFO, DDR3 ----------------
  logic         arm_s, cap_start_u, rd_start_u;
  logic [63:0]  cap_smp;
  logic         cap_valid, cap_flush, cap_busy, cap_done;
  logic [15:0]  cf_drop;
  logic [511:0] cf_data;
  logic         cf_empty, cf_rd;
  logic [6:0]   cf_level;
  logic [LEN_W-1:0] wr_words;
  logic         rd_busy;
  logic         rb_wr;
  logic [511:0] rb_data;
  logic [5:0]   rb_wlevel;
  // TBT records on their way into the DDR3 TBT region
  logic         tbt_on, tbt_start_u, tq_empty, tq_rd;
  logic [511:0] tq_data;
  logic [15:0]  tq_drop;
  logic [LEN_W-1:0] tbt_words;

  pulse_sync u_ps_arm (.src_clk(eth_clk), .src_rst_n(rst_eth_n), .src_pulse(arm_e),
                       .dst_clk(clk), .dst_rst_n(rst_sys_n), .dst_pulse(arm_s));
  pulse_sync u_ps_cap (.src_clk(eth_clk), .src_rst_n(rst_eth_n), .src_pulse(arm_e),
                       .dst_clk(ui_clk), .dst_rst_n(rst_ui_n), .dst_pulse(cap_start_u));
  pulse_sync u_ps_rd  (.src_clk(eth_clk), .src_rst_n(rst_eth_n), .src_pulse(rd_start_e),
                       .dst_clk(ui_clk), .dst_rst_n(rst_ui_n), .dst_pulse(rd_start_u));

  raw_capture #(.LEN_W(LEN_W)) u_cap (
    .clk(clk), .rst_n(rst_sys_n), .arm(arm_s), .t0(t0), .cap_len(cap_len),
    .smp_in(smp), .smp_valid(smp_valid),
    .smp_out(cap_smp), .smp_out_valid(cap_valid), .flush(cap_flush),
    .busy(cap_busy), .done(cap_done)
  );

  fifo_64i_512o #(.IN_W(64), .RATIO(8), .DEPTH_LOG2(6)) u_cf (
    .wclk(clk), .wrst_n(rst_sys_n), .flush(cap_flush), .wr_en(cap_valid), .wdata(cap_smp),
    .drop_cnt(cf_drop),
    .rclk(ui_clk), .rrst_n(rst_ui_n), .rd_en(cf_rd), .rdata(cf_data),
    .empty(cf_empty), .rlevel(cf_level)
  );

  ddr_buf_ctrl #(.DATA_W(512), .ADDR_W(29), .LEN_W(LEN_W), .RB_LOG2(5),
                 .TBT_LOG2(23), .TBT_BASE(TBT_BASE_WORD)) u_ddr (
    .ui_clk(ui_clk), .rst_n(rst_ui_n), .init_calib_complete(init_calib_complete),
    .cap_start(cap_start_u), .wr_words(wr_words),
    .cf_data(cf_data), .cf_empty(cf_empty), .cf_rd(cf_rd),
    .tbt_start(tbt_start_u), .tq_data(tq_data), .tq_empty(tq_empty), .tq_rd(tq_rd),
    .tbt_words(tbt_words),
    .rd_start(rd_start_u), .rd_addr(rd_addr), .rd_len(rd_len), .rd_busy(rd_busy),
    .rb_wr(rb_wr), .rb_data(rb_data), .rb_wlevel(rb_wlevel),
    .app_addr(app_addr), .app_cmd(app_cmd), .app_en(app_en), .app_rdy(app_rdy),
    .app_wdf_data(app_wdf_data), .app_wdf_wren(app_wdf_wren), .app_wdf_end(app_wdf_end),
    .app_wdf_mask(app_wdf_mask), .app_wdf_rdy(app_wdf_rdy),
    .app_rd_data(app_rd_data), .app_rd_data_valid(app_rd_data_valid)
  );

  logic [511:0] raw_data;
  logic [5:0]   raw_level;
  logic         raw_rd;

  async_fifo #(.W(512), .DEPTH_LOG2(5)) u_rb (
    .wclk(ui_clk), .wrst_n(rst_ui_n), .wr_en(rb_wr), .wdata(rb_data),
    .full(), .wlevel(rb_wlevel),
    .rclk(eth_clk), .rrst_n(rst_eth_n), .rd_en(raw_rd), .rdata(raw_data),
    .empty(), .rlevel(raw_level)
  );

  // ---------------- position processing (TBT) ----------------
  logic        tbt_en_s;
  tbt_rec_t    tbt;
  logic        tbt_valid;
  logic [15:0] tbt_ovr;
  logic [2:0]  tbt_en_sync;

  always_ff @(posedge clk or negedge rst_sys_n) begin
    if (!rst_sys_n) tbt_en_sync <= '0;
    else            tbt_en_sync <= {tbt_en_sync[1:0], tbt_en};
  end
  assign tbt_en_s = tbt_en_sync[1];
  assign tbt_on   = tbt_en_sync[1] && !tbt_en_sync[2];   // TBT just enabled

  pos_calc #(.CNT_W(CNT_W)) u_pos (
    .clk(clk), .rst_n(rst_sys_n), .enable(tbt_en_s), .smp(smp), .smp_valid(smp_valid),
    .rf_win(rf_win), .ws(ws), .we(we), .k(k), .b(b),
    .tbt(tbt), .tbt_valid(tbt_valid), .ovr_cnt(tbt_ovr)
  );

  logic [127:0] tbt_data;
  logic [6:0]   tbt_level;
  logic         tbt_rd, tbt_full;
  logic [15:0]  tbt_drop;

  always_ff @(posedge clk or negedge rst_sys_n) begin
    if (!rst_sys_n)                 tbt_drop <= '0;
    else if (tbt_valid && tbt_full) tbt_drop <= tbt_drop + 16'd1;
  end

  // Four records per 512-bit word into the DDR3 TBT region; a new TBT run
  // starts on a word boundary at the start of the region.
  fifo_64i_512o #(.IN_W(128), .RATIO(4), .DEPTH_LOG2(4)) u_tq (
    .wclk(clk), .wrst_n(rst_sys_n), .flush(tbt_on), .wr_en(tbt_valid), .wdata(tbt),
    .drop_cnt(tq_drop),
    .rclk(ui_clk), .rrst_n(rst_ui_n), .rd_en(tq_rd), .rdata(tq_data),
    .empty(tq_empty), .rlevel()
  );
  pulse_sync u_ps_tbt (.src_clk(clk), .src_rst_n(rst_sys_n), .src_pulse(tbt_on),
                       .dst_clk(ui_clk), .dst_rst_n(rst_ui_n), .dst_pulse(tbt_start_u));

  async_fifo #(.W(128), .DEPTH_LOG2(6)) u_tbtq (
    .wclk(clk), .wrst_n(rst_sys_n), .wr_en(tbt_valid && !tbt_full), .wdata(tbt),
    .full(tbt_full), .wlevel(),
    .rclk(eth_clk), .rrst_n(rst_eth_n), .rd_en(tbt_rd), .rdata(tbt_data),
    .empty(), .rlevel(tbt_level)
  );

  // ---------------- UDP transmit ----------------
  logic        tx_start, tx_busy, pl_req;
  logic [15:0] tx_len;
  logic [7:0]  pl_data;
  logic [31:0] tx_frames;
  logic [15:0] n_reply, n_tbt, n_raw;

  udp_pkt_mux #(.TBT_PKT(16), .RAW_PKT(16), .LVL_W(7), .LEN_W(LEN_W)) u_mux (
    .clk(eth_clk), .rst_n(rst_eth_n),
    .reply_req(reply_req), .reply(reply), .reply_ack(reply_ack),
    .tbt_data(tbt_data), .tbt_level(tbt_level), .tbt_rd(tbt_rd),
    .raw_data(raw_data), .raw_level(7'(raw_level)), .raw_rd(raw_rd),
    .rd_start(rd_start_e), .rd_len(rd_len),
    .tx_start(tx_start), .tx_len(tx_len), .tx_busy(tx_busy),
    .pl_req(pl_req), .pl_data(pl_data),
    .n_reply(n_reply), .n_tbt(n_tbt), .n_raw(n_raw)
  );

  udp_tx u_udp_tx (
    .clk(eth_clk), .rst_n(rst_eth_n), .start(tx_start), .len(tx_len),
    .src_mac(LOCAL_MAC), .dst_mac(HOST_MAC), .src_ip(LOCAL_IP), .dst_ip(HOST_IP),
    .src_port(LOCAL_PORT), .dst_port(HOST_PORT),
    .pl_req(pl_req), .pl_data(pl_data), .busy(tx_busy), .frames(tx_frames),
    .txd(gmii_txd), .tx_en(gmii_tx_en)
  );

  // ---------------- status word (eth_clk domain) ----------------
  // [0] capture busy [1] capture done [2] DDR3 readout busy [3] SPI busy
  // [4] DDR3 calibrated [5] ADC FIFO drop seen [6] DDR3 FIFO drop seen
  // [7] TBT record lost [8] bad frame seen
  logic [6:0] st_raw, st_s1, st_s2;
  assign st_raw = {tbt_ovr != 0 || tbt_drop != 0 || tq_drop != 0, cf_drop != 0, adc_ovf != 0,
                   init_calib_complete, rd_busy, cap_done, cap_busy};
  always_ff @(posedge eth_clk or negedge rst_eth_n) begin
    if (!rst_eth_n) begin
      st_s1 <= '0;
      st_s2 <= '0;
    end else begin
      st_s1 <= st_raw;
      st_s2 <= st_s1;
    end
  end
  assign status = {23'd0, rx_bad != 0, st_s2[6:3], cfg_busy, st_s2[2:0]};

  // TBT word count for the host: a plain two-flop copy, exact once TBT is
  // disabled and the last words are written (the host reads it then).
  always_ff @(posedge eth_clk or negedge rst_eth_n) begin
    if (!rst_eth_n) begin
      tbt_words_s1 <= '0;
      tbt_words_e  <= '0;
    end else begin
      tbt_words_s1 <= tbt_words;
      tbt_words_e  <= tbt_words_s1;
    end
  end

  // unused bookkeeping outputs of the sub-blocks
  logic unused;
  assign unused = ^{rx_good, spi_frames, cf_level, wr_words, tx_frames,
                    n_reply, n_tbt, n_raw};
endmodule
