// tb_adc_frontend: an ADC model sends a different ramp on each channel
// (channel c: 7*n + 1000*c, 14-bit two's complement wrapping); the checks are
// that every output word carries four samples of the same instant (channel
// offsets intact), that consecutive words step by 7 without gaps, that the
// samples are sign-extended to 16 bit, and that no sample was dropped.
`timescale 1ns/1ps
module tb_adc_frontend;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0][13:0] smp_in = '0;
  logic [1:0]       adc_clk;
  logic [3:0][6:0]  adc_d;
  logic [3:0][15:0] smp;
  logic             smp_valid;
  logic [15:0]      ovf_cnt;
  int               n = 0, nout = 0;
  logic [15:0]      prev0;
  bit               have_prev = 0;

  ads4449_model u_adc (.clk_in(clk), .smp_in(smp_in), .adc_clk(adc_clk), .adc_d(adc_d));
  adc_frontend dut (.clk(clk), .rst_n(rst_n), .adc_clk(adc_clk), .adc_d(adc_d),
                    .smp(smp), .smp_valid(smp_valid), .ovf_cnt(ovf_cnt));

  always #2 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 6) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    n <= n + 1;
    for (int c = 0; c < 4; c++) smp_in[c] <= 14'(7 * (n + 1) + 1000 * c);
  end

  always @(posedge clk) begin
    if (rst_n && smp_valid) begin
      logic [13:0] s0;
      s0 = smp[0][13:0];
      for (int c = 0; c < 4; c++) begin
        check(smp[c][13:0] == 14'(s0 + 14'(1000 * c)), $sformatf("channel %0d alignment", c));
        check(smp[c][15:14] == {2{smp[c][13]}}, "sign extension");
      end
      if (have_prev) check(smp[0][13:0] == 14'(prev0[13:0] + 14'd7), "ramp continuity");
      prev0     <= smp[0];
      have_prev <= 1'b1;
      nout++;
    end
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (2000) @(posedge clk);
    check(nout > 1900, "throughput one word per clock");
    check(ovf_cnt == 0, "no dropped samples");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
