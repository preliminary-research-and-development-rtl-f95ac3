// tb_adc_corr: random samples, gains and offsets; the output two clocks later
// must equal floor(K*A / 2^16) + b computed in the testbench with 64-bit
// integers. Also checks the two-clock latency of the valid flag.
`timescale 1ns/1ps
module tb_adc_corr;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [15:0] din = '0;
  logic               din_valid = 1'b0;
  logic signed [17:0] k = 18'sd65536;
  logic signed [15:0] b = '0;
  logic signed [17:0] dout;
  logic               dout_valid;
  longint             expq [$];
  logic               vhist [$];

  adc_corr dut (.clk(clk), .rst_n(rst_n), .din(din), .din_valid(din_valid), .k(k), .b(b),
                .dout(dout), .dout_valid(dout_valid));

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

  initial begin
    longint e, p;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      din       = 16'(signed'(14'($urandom)));      // 14-bit ADC range
      din_valid = ($urandom % 4 != 0);
      if (i % 100 == 0) begin
        // new quasi-static gain in [0.5, 1.5) and offset in [-2048, 2047]
        k = 18'(32768 + ($urandom % 65536));
        b = 16'(int'($urandom % 4096) - 2048);
      end
      p = longint'(din) * longint'(k);
      // floor division; b is added at compare time because the design adds
      // it one stage after the multiply
      e = (p - (p % 65536) - ((p % 65536 < 0) ? 65536 : 0)) / 65536;
      expq.push_back(e);
      vhist.push_back(din_valid);
      @(posedge clk); #0.1;
      if (expq.size() >= 2) begin
        check(longint'(dout) == expq[expq.size()-2] + longint'(b),
              $sformatf("dout %0d expected %0d", dout, expq[expq.size()-2] + longint'(b)));
        check(dout_valid == vhist[vhist.size()-2], "valid latency 2");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
