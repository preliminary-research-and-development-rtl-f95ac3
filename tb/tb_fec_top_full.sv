// tb_fec_top_full: end-to-end test of the FEC with every parameter at its
// default, i.e. a full 20 ms raw capture (625000 DDR3 words, 5 million sample
// words) followed by readout of its first 40 and last 24 words and the
// turn-by-turn run; see fec_top_tb_body.svh.
`timescale 1ns/1ps
module tb_fec_top_full;
  localparam int CAP = 625000;        // the design default: 20 ms
  `include "fec_top_tb_body.svh"

  fec_top dut (
    .rst_n(rst_n), .clk(clk), .adc_clk(adc_clk), .adc_d(adc_d), .t0(t0), .rf_win(rf_win),
    .ui_clk(ui_clk), .ui_rst(1'b0), .init_calib_complete(calib),
    .app_addr(app_addr), .app_cmd(app_cmd), .app_en(app_en), .app_rdy(app_rdy),
    .app_wdf_data(app_wdf_data), .app_wdf_wren(app_wdf_wren), .app_wdf_end(app_wdf_end),
    .app_wdf_mask(app_wdf_mask), .app_wdf_rdy(app_wdf_rdy),
    .app_rd_data(app_rd_data), .app_rd_data_valid(app_rd_data_valid),
    .eth_clk(eth_clk), .gmii_rxd(gmii_rxd), .gmii_rx_dv(gmii_rx_dv),
    .gmii_txd(gmii_txd), .gmii_tx_en(gmii_tx_en),
    .spi_sclk(spi_sclk), .spi_mosi(spi_mosi), .spi_miso(1'b0), .spi_cs_n(spi_cs_n),
    .att_sel(att_sel));
endmodule
