// adc_frontend: ADC data interface of one BPM (four electrodes A, B, C, D).
//
// Each channel's DDR LVDS bus is turned into 14-bit words by adc_ddr_rx in its
// ADC output clock domain and written into its own small dual-clock FIFO
// (14 bit x 8). The ADC provides two output clocks: adc_clk[0] times channels
// 1 and 2, adc_clk[1] times channels 3 and 4. On the 250 MHz system clock the
// four FIFOs are popped together whenever all four hold a word, and the
// samples, sign-extended to 16 bit, form one 64-bit word {D, C, B, A}
// (channel 1 in the low bits) for the DDR3 path and the position processor.
//
// Interface: adc_clk[1:0], adc_d[ch] (7 pairs per channel), clk/rst_n of the
// system domain, smp[ch] and smp_valid out, ovf_cnt counting samples dropped
// because a channel FIFO was full (which only happens if the system clock is
// slower than the ADC clocks).
// Timing: a sample reaches smp about 5 system clocks after its falling-edge
// bits are captured.
// Following the document: 4 channels of 14 bit at 250 MHz, per-channel
// "FIFO14bit*8", two ADC clocks shared by channel pairs, a 64-bit 250 MHz
// output. Own choices: two's-complement ADC format, sign extension, the
// all-channels-ready merge and the drop counter.
module adc_frontend
  import fec_pkg::*;
#(
  parameter int unsigned NCH        = 4,
  parameter int unsigned AW         = 14,
  parameter int unsigned FIFO_LOG2  = 3
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [1:0]                adc_clk,
  input  logic [NCH-1:0][AW/2-1:0]  adc_d,
  output logic [NCH-1:0][15:0]      smp,
  output logic                      smp_valid,
  output logic [15:0]               ovf_cnt
);
  logic [NCH-1:0][AW-1:0] word, rdata;
  logic [NCH-1:0]         wvalid, full, empty, wr, ovf_evt;
  logic [NCH-1:0][2:0]    ovf_s;
  logic [NCH-1:0]         ovf_tog;
  logic                   pop;

  assign pop = ~|empty;

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    localparam int unsigned CK = (c < 2) ? 0 : 1;
    logic arst_n_s1, arst_n_s2;
    // reset release synchronised into the ADC clock domain
    always_ff @(posedge adc_clk[CK] or negedge rst_n) begin
      if (!rst_n) {arst_n_s2, arst_n_s1} <= 2'b00;
      else        {arst_n_s2, arst_n_s1} <= {arst_n_s1, 1'b1};
    end

    adc_ddr_rx #(.DATA_W(AW)) u_rx (
      .adc_clk   (adc_clk[CK]),
      .rst_n     (arst_n_s2),
      .din       (adc_d[c]),
      .dout      (word[c]),
      .dout_valid(wvalid[c])
    );

    assign wr[c] = wvalid[c] && !full[c];

    // a dropped sample flips a toggle that the system domain counts
    always_ff @(posedge adc_clk[CK] or negedge arst_n_s2) begin
      if (!arst_n_s2) ovf_tog[c] <= 1'b0;
      else if (wvalid[c] && full[c]) ovf_tog[c] <= ~ovf_tog[c];
    end

    async_fifo #(.W(AW), .DEPTH_LOG2(FIFO_LOG2)) u_fifo (
      .wclk  (adc_clk[CK]), .wrst_n(arst_n_s2), .wr_en(wr[c]), .wdata(word[c]),
      .full  (full[c]),     .wlevel(),
      .rclk  (clk),         .rrst_n(rst_n),     .rd_en(pop),   .rdata(rdata[c]),
      .empty (empty[c]),    .rlevel()
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) ovf_s[c] <= '0;
      else        ovf_s[c] <= {ovf_s[c][1:0], ovf_tog[c]};
    end
    assign ovf_evt[c] = ovf_s[c][2] ^ ovf_s[c][1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      smp       <= '0;
      smp_valid <= 1'b0;
      ovf_cnt   <= '0;
    end else begin
      smp_valid <= pop;
      if (pop)
        for (int c = 0; c < NCH; c++) smp[c] <= 16'(signed'(rdata[c]));
      if (|ovf_evt) ovf_cnt <= ovf_cnt + 16'd1;
    end
  end
endmodule
