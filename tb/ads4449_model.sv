// ads4449_model: behavioural model of the digital output of the four-channel
// 14-bit, 250 MS/s ADC (testbench only, not synthesizable).
//
// smp_in[c] is taken on each rising edge of the sampling clock and driven,
// two bits per pair, on seven DDR LVDS pairs per channel: the even bits
// before the rising edge of the output clock, the odd bits before the falling
// edge. Channels 1-2 use adc_clk[0], channels 3-4 use adc_clk[1], which lags
// by SKEW ns. The converter's pipeline latency is not modelled.
`timescale 1ns/1ps
module ads4449_model #(
  parameter real SKEW = 0.4
) (
  input  logic             clk_in,
  input  logic [3:0][13:0] smp_in,
  output logic [1:0]       adc_clk,
  output logic [3:0][6:0]  adc_d
);
  logic [3:0][13:0] nxt = '0, cur = '0;

  initial adc_d = '0;

  assign adc_clk[0] = clk_in;
  assign #(SKEW) adc_clk[1] = clk_in;

  function automatic logic [6:0] half_bits(logic [13:0] w, bit odd);
    for (int i = 0; i < 7; i++) half_bits[i] = w[2*i + int'(odd)];
  endfunction

  always @(posedge clk_in) nxt <= smp_in;

  for (genvar k = 0; k < 2; k++) begin : g_clk
    always @(posedge adc_clk[k]) begin
      #0.3;
      for (int c = 2*k; c < 2*k+2; c++) adc_d[c] = half_bits(cur[c], 1'b1);
    end
    always @(negedge adc_clk[k]) begin
      #0.3;
      for (int c = 2*k; c < 2*k+2; c++) begin
        cur[c]   = nxt[c];
        adc_d[c] = half_bits(nxt[c], 1'b0);
      end
    end
  end
endmodule
