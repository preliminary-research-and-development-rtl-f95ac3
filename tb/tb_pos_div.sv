// tb_pos_div: random signed numerator/denominator pairs with |num| < |den|
// must give q = trunc(num * 2^15 / den) (truncation towards zero, sign
// applied to the magnitude quotient) after exactly 17 clocks; pairs with
// |num| >= |den| must saturate to +/-32767 after one clock, and a zero
// denominator must give 0 with sat set.
`timescale 1ns/1ps
module tb_pos_div;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic               start = 1'b0, busy, sat, done;
  logic signed [31:0] num = '0, den = '0;
  logic signed [15:0] q;

  pos_div dut (.clk(clk), .rst_n(rst_n), .start(start), .num(num), .den(den),
               .busy(busy), .q(q), .sat(sat), .done(done));

  always #2 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 6) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input longint n, input longint d);
    longint an, ad, e;
    int     lat;
    bit     esat;
    an = (n < 0) ? -n : n;
    ad = (d < 0) ? -d : d;
    esat = (ad == 0) || (an >= ad);
    if (ad == 0)       e = 0;
    else if (an >= ad) e = ((n < 0) != (d < 0)) ? -32767 : 32767;
    else begin
      e = (an * 32768) / ad;
      if ((n < 0) != (d < 0)) e = -e;
    end
    @(negedge clk) start = 1'b1; num = 32'(n); den = 32'(d);
    @(negedge clk) start = 1'b0; num = 32'($urandom); den = 32'($urandom);
    lat = 1;
    while (!done && lat < 40) begin
      @(negedge clk);
      lat++;
    end
    check(done && longint'(q) == e, $sformatf("%0d/%0d: q %0d expected %0d", n, d, q, e));
    check(sat == esat, "sat flag");
    check(lat == (esat ? 1 : 17), $sformatf("latency %0d", lat));
  endtask

  initial begin
    longint n, d;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      d = longint'(signed'(32'($urandom))) / ((i % 7) + 1);
      n = longint'(signed'(32'($urandom))) % ((d == 0) ? 1 : d);
      if (i % 50 == 0) n = d + ((d < 0) ? -5 : 5);      // saturating case
      run(n, d);
    end
    run(1000, 0);
    run(-3, 7);
    run(1, 2147483647);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
