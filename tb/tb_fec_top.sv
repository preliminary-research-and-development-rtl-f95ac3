// tb_fec_top: end-to-end test of the FEC at a reduced capture length of 100
// DDR3 words (800 sample words) instead of 20 ms; see fec_top_tb_body.svh.
`timescale 1ns/1ps
module tb_fec_top;
  localparam int CAP = 100;
  `include "fec_top_tb_body.svh"

  fec_top #(.CAP_LEN(CAP)) dut (
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
