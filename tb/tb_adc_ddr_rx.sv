// tb_adc_ddr_rx: drives random 14-bit words onto 7 DDR pairs (even bits
// around the rising edge, odd bits around the falling edge) and checks that
// each word appears whole on dout one clock later.
`timescale 1ns/1ps
module tb_adc_ddr_rx;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [6:0]  din = '0;
  logic [13:0] dout;
  logic        dout_valid;
  logic [13:0] words [$];

  adc_ddr_rx #(.DATA_W(14)) dut (.adc_clk(clk), .rst_n(rst_n), .din(din),
                                 .dout(dout), .dout_valid(dout_valid));

  always #2 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [6:0] even_bits(logic [13:0] w);
    for (int i = 0; i < 7; i++) even_bits[i] = w[2*i];
  endfunction
  function automatic logic [6:0] odd_bits(logic [13:0] w);
    for (int i = 0; i < 7; i++) odd_bits[i] = w[2*i+1];
  endfunction

  initial begin
    logic [13:0] w, exp_w;
    int n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      w = 14'($urandom);
      @(negedge clk); #0.5 din = even_bits(w);
      @(posedge clk); #0.5 din = odd_bits(w);
      words.push_back(w);
      // dout now holds the word whose bits finished one cycle earlier
      if (words.size() > 1) begin
        exp_w = words.pop_front();
        checks++;
        if (!dout_valid || dout !== exp_w) begin
          failures++;
          if (failures < 5) $display("word %0d: got %h expected %h", n, dout, exp_w);
        end
        n++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
