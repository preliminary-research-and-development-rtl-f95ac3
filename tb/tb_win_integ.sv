// tb_win_integ: random sample stream with a turn marker every PERIOD valid
// samples (and random invalid cycles); for each turn the sum over sample
// indices ws..we is computed in the testbench and compared with acc at the
// done pulse, which must come exactly one clock after sample we.
`timescale 1ns/1ps
module tb_win_integ;
  int checks = 0, failures = 0;
  localparam int PERIOD = 60;
  logic clk = 1'b0, rst_n = 1'b0;
  logic               mark = 1'b0, din_valid = 1'b0;
  logic signed [18:0] din = '0;
  logic [11:0]        ws = 12'd5, we = 12'd40;
  logic signed [31:0] acc;
  logic               done;
  longint             exp_q [$];
  longint             sum = 0;
  int                 idx = 0, turns = 0, ndone = 0;
  bit                 expect_done = 0;

  win_integ dut (.clk(clk), .rst_n(rst_n), .mark(mark), .din(din), .din_valid(din_valid),
                 .ws(ws), .we(we), .acc(acc), .done(done));

  always #2 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 6) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #0.1;
    check(done == expect_done, $sformatf("done timing t=%0t done=%0d turns=%0d idx=%0d", $time, done, turns, idx));
    if (done) begin
      check(exp_q.size() > 0 && longint'(acc) == exp_q[0],
            $sformatf("turn %0d acc %0d expected %0d", ndone, acc, exp_q.size() ? exp_q[0] : 0));
      if (exp_q.size() > 0) void'(exp_q.pop_front());
      ndone++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (turns < 40) begin
      @(negedge clk);
      expect_done = 0;
      // previous cycle's sample: was it the window end?
      din_valid = ($urandom % 5 != 0);
      if (turns == 20) begin ws = 12'd0; we = 12'd59; end
      if (din_valid) begin
        din  = 19'(signed'(int'($urandom % 200000) - 100000));
        mark = (idx == 0);
        if (idx >= ws && idx <= we) sum += longint'(din);
        if (idx == we) begin exp_q.push_back(sum); sum = 0; end
        idx = (idx == PERIOD - 1) ? 0 : idx + 1;
        if (idx == 0) turns++;
      end else begin
        mark = 1'b0;
        din  = 19'($urandom);
      end
      @(posedge clk);
      expect_done = din_valid && (((idx == 0) ? PERIOD - 1 : idx - 1) == we);
    end
    @(negedge clk) din_valid = 1'b0; mark = 1'b0; expect_done = 0;
    repeat (3) @(posedge clk);
    check(ndone == 40 && exp_q.size() == 0, $sformatf("%0d windows closed", ndone));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
