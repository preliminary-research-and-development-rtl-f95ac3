// adc_corr: gain and offset correction of one ADC channel, A' = K*A + b.
//
// K is a signed fixed-point gain with KFRAC fraction bits (Q2.16 by default,
// 1.0 = 65536) and b an offset in ADC counts. The product is shifted right
// arithmetically by KFRAC (rounding towards minus infinity) before b is added.
// Two register stages: the multiply and the add, which map onto one DSP slice.
//
// Interface: clk, rst_n, din/din_valid in, k and b (quasi-static), dout and
// dout_valid out.
// Timing: latency 2 clocks, one sample per clock.
// Following the document: equations (1) and (2). Own choices: the number
// formats, the rounding and the pipeline depth.
module adc_corr #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned K_W   = 18,
  parameter int unsigned KFRAC = 16,
  parameter int unsigned B_W   = 16,
  parameter int unsigned OUT_W = 18
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  din,
  input  logic                    din_valid,
  input  logic signed [K_W-1:0]   k,
  input  logic signed [B_W-1:0]   b,
  output logic signed [OUT_W-1:0] dout,
  output logic                    dout_valid
);
  localparam int unsigned P_W = IN_W + K_W;

  logic signed [P_W-1:0] prod;
  logic                  v1;
  logic signed [P_W-1:0] shifted;

  assign shifted = prod >>> KFRAC;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod       <= '0;
      v1         <= 1'b0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      prod       <= P_W'(din) * P_W'(k);
      v1         <= din_valid;
      dout       <= OUT_W'(shifted) + OUT_W'(b);
      dout_valid <= v1;
    end
  end
endmodule
