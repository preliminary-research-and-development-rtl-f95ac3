// tb_spi_master: an SPI slave model (mode 0) records every frame: which chip
// select was low, how many rising clock edges occurred and the MOSI bits
// sampled on them. Random frames of 1..32 bits to the three devices must
// arrive bit-exact, MSB first, on the right chip select only; the slave's
// MISO pattern must come back in rdata; the frame time must be
// (2n + 2) * HALF clocks.
`timescale 1ns/1ps
module tb_spi_master;
  int checks = 0, failures = 0;
  localparam int HALF = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic        start = 1'b0, busy, done, sclk, mosi, miso;
  logic [1:0]  dev = '0;
  logic [5:0]  nbits = '0;
  logic [31:0] data = '0, rdata;
  logic [2:0]  cs_n;
  logic [31:0] rx = '0, tx_pat = '0;
  int          nrise = 0;
  int          cs_seen = -1;
  bit          multi_cs = 0;

  spi_master #(.HALF(HALF)) dut (.clk(clk), .rst_n(rst_n), .start(start), .dev(dev),
    .nbits(nbits), .data(data), .busy(busy), .done(done), .rdata(rdata),
    .sclk(sclk), .mosi(mosi), .miso(miso), .cs_n(cs_n));

  always #4 clk = ~clk;

  // slave model
  always @(negedge cs_n[0] or negedge cs_n[1] or negedge cs_n[2]) begin
    nrise = 0; rx = '0;
    miso  = tx_pat[31];
  end
  always @(posedge sclk) begin
    if (cs_n != 3'b111) begin
      rx = {rx[30:0], mosi};
      nrise++;
    end
  end
  always @(negedge sclk) if (cs_n != 3'b111) miso = tx_pat[31 - nrise];
  always @(cs_n) if (cs_n != 3'b111) begin
    if ($countones(~cs_n) != 1) multi_cs = 1;
    for (int i = 0; i < 3; i++) if (!cs_n[i]) cs_seen = i;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 6) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, cyc;
    logic [31:0] mask;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk) multi_cs = 0;     // lines were undefined before reset
    for (int i = 0; i < 200; i++) begin
      n = (i < 3) ? (i == 0 ? 32 : i == 1 ? 1 : 16) : 1 + ($urandom % 32);
      mask = (n == 32) ? '1 : ((32'd1 << n) - 1);
      tx_pat = $urandom;
      @(negedge clk);
      start = 1'b1; dev = 2'($urandom % 3); nbits = 6'(n); data = $urandom;
      cs_seen = -1;
      @(negedge clk) start = 1'b0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      check(nrise == n, $sformatf("%0d clocks for %0d bits", nrise, n));
      check((rx & mask) == (data & mask), $sformatf("frame %0d: got %h sent %h", i, rx & mask, data & mask));
      check(cs_seen == int'(dev) && !multi_cs, $sformatf("chip select seen %0d dev %0d multi %0d", cs_seen, dev, multi_cs));
      check((rdata & mask) == (tx_pat >> (32 - n)), $sformatf("miso %h expected %h", rdata & mask, tx_pat >> (32 - n)));
      check(cyc == (2 * n + 2) * HALF + 1, $sformatf("frame time %0d for %0d bits", cyc, n));
      check(cs_n == 3'b111 && !sclk, "idle lines");
      repeat ($urandom % 5) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
