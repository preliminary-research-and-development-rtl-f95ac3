// adc_ddr_rx: double-data-rate LVDS to parallel converter for one ADC channel.
//
// The ADC drives a 14-bit sample over 7 LVDS pairs, two bits per pair per clock
// period: the even bits are valid around the rising edge of the ADC output
// clock and the odd bits around the falling edge. This module plays the role
// of the FPGA input DDR register (IDDR, "same edge pipelined"): it samples the
// pairs on both edges and presents the whole word, aligned to the rising edge,
// one clock later. The differential input buffers and the input delay taps that
// trim the clock/data skew are vendor primitives and sit outside this module.
//
// Interface: adc_clk (ADC output clock, 250 MHz), din (DATA_W/2 pairs after
// the input buffers), dout (DATA_W bits), dout_valid (high from the second
// rising edge after reset release).
// Timing: the word whose even bits arrive at rising edge n (odd bits at the
// falling edge that follows) appears on dout after rising edge n+1.
// Following the document: DDR LVDS to parallel conversion in an IDDR stage.
// Own choices: even bits on the rising edge, the valid flag, the reset.
module adc_ddr_rx #(
  parameter int unsigned DATA_W = 14
) (
  input  logic                adc_clk,
  input  logic                rst_n,
  input  logic [DATA_W/2-1:0] din,
  output logic [DATA_W-1:0]   dout,
  output logic                dout_valid
);
  localparam int unsigned PAIRS = DATA_W / 2;

  logic [PAIRS-1:0] rise_q, fall_q;
  logic [1:0]       vcnt;

  always_ff @(posedge adc_clk) rise_q <= din;
  always_ff @(negedge adc_clk) fall_q <= din;

  always_ff @(posedge adc_clk or negedge rst_n) begin
    if (!rst_n) begin
      dout       <= '0;
      dout_valid <= 1'b0;
      vcnt       <= '0;
    end else begin
      for (int i = 0; i < PAIRS; i++) begin
        dout[2*i]   <= rise_q[i];
        dout[2*i+1] <= fall_q[i];
      end
      if (vcnt != 2'd2) vcnt <= vcnt + 2'd1;
      dout_valid <= (vcnt == 2'd2);
    end
  end
endmodule
