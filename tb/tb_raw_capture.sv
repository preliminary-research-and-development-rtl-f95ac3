// tb_raw_capture: a counting sample stream runs continuously; after an arm
// request the gate must stay closed until T0 rises, then pass exactly
// cap_len * 8 consecutive samples starting within three clocks of T0, then
// report done. A second T0 without a new arm must pass nothing.
`timescale 1ns/1ps
module tb_raw_capture;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic        arm = 1'b0, t0 = 1'b0, smp_valid = 1'b1;
  logic [23:0] cap_len = 24'd5;
  logic [63:0] smp_in = '0, smp_out;
  logic        smp_out_valid, flush, busy, done;
  int          npass = 0, nflush = 0;
  longint      first = -1, last = -1;

  raw_capture dut (.clk(clk), .rst_n(rst_n), .arm(arm), .t0(t0), .cap_len(cap_len),
                   .smp_in(smp_in), .smp_valid(smp_valid), .smp_out(smp_out),
                   .smp_out_valid(smp_out_valid), .flush(flush), .busy(busy), .done(done));

  always #2 clk = ~clk;
  always @(posedge clk) smp_in <= smp_in + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 6) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && smp_out_valid) begin
      if (first < 0) first = longint'(smp_out);
      else check(longint'(smp_out) == last + 1, "consecutive samples");
      last = longint'(smp_out);
      npass++;
    end
    if (rst_n && flush) nflush++;
  end

  initial begin
    longint t0_smp;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    @(negedge clk) arm = 1'b1;
    @(negedge clk) arm = 1'b0;
    check(busy && !done, "busy after arm");
    repeat (30) @(posedge clk);
    check(npass == 0, "nothing passed before T0");
    @(negedge clk) t0 = 1'b1; t0_smp = longint'(smp_in);
    repeat (80) @(posedge clk);
    check(npass == 40, $sformatf("passed %0d samples", npass));
    check(first >= t0_smp && first <= t0_smp + 3, $sformatf("start %0d vs T0 %0d", first, t0_smp));
    check(done && !busy, "done after record");
    check(nflush == 1, "one flush per arm");
    @(negedge clk) t0 = 1'b0;
    repeat (5) @(posedge clk);
    @(negedge clk) t0 = 1'b1;
    repeat (60) @(posedge clk);
    check(npass == 40, "no capture without arm");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
