// tb_pos_calc: synthetic bunch signals on the four electrodes, one bunch per
// turn: first 30 turns of 102 samples (2.44 MHz revolution at 250 MS/s,
// 200 ns bunch), then 10 turns of 250 samples (1 MHz, 500 ns bunch),
// with a beam offset that changes every turn: A = p*(1+x), C = p*(1-x),
// B = p*(1+y), D = p*(1-y) plus noise. Gains and offsets differ per channel.
// The testbench recomputes equations (1)-(7) with integer arithmetic
// (floor after the gain, window ws..we counted from the sample two clocks
// after the RF window edge, quotient truncated towards zero in Q1.15) and
// compares every turn-by-turn record exactly, checks that X and Y follow the
// injected offsets (within the 5 % bias that the unequal channel gains
// leave), and checks the fixed latency from the last window sample
// to the record.
`timescale 1ns/1ps
module tb_pos_calc;
  import fec_pkg::*;
  int checks = 0, failures = 0;
  localparam int LAT    = 22;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0][15:0]    smp = '0;
  logic                smp_valid = 1'b0, rf_win = 1'b0;
  logic [11:0]         ws = 12'd10, we = 12'd60;
  logic [3:0][17:0]    k;
  logic [3:0][15:0]    b;
  tbt_rec_t            tbt;
  logic                tbt_valid;
  logic [15:0]         ovr_cnt;
  tbt_rec_t            exp_q [$];
  longint              due_q [$];
  real                 xin_q [$], yin_q [$];
  longint              cyc = 0;
  int                  nrec = 0;

  pos_calc dut (.clk(clk), .rst_n(rst_n), .enable(1'b1), .smp(smp), .smp_valid(smp_valid),
                .rf_win(rf_win), .ws(ws), .we(we), .k(k), .b(b),
                .tbt(tbt), .tbt_valid(tbt_valid), .ovr_cnt(ovr_cnt));

  always #2 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 8) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint corr(longint s, int c);
    longint p, f;
    p = s * longint'(signed'(k[c]));
    f = p / 65536;
    if (p < 0 && (p % 65536) != 0) f = f - 1;     // floor
    return f + longint'(signed'(b[c]));
  endfunction

  function automatic longint ratio(longint n, longint d);
    longint an, ad, q;
    an = (n < 0) ? -n : n;
    ad = (d < 0) ? -d : d;
    if (ad == 0) return 0;
    if (an >= ad) return ((n < 0) != (d < 0)) ? -32767 : 32767;
    q = (an * 32768) / ad;
    return ((n < 0) != (d < 0)) ? -q : q;
  endfunction

  always @(posedge clk) begin
    if (rst_n && tbt_valid) begin
      check(exp_q.size() > 0, "unexpected record");
      if (exp_q.size() > 0) begin
        tbt_rec_t e;
        real xm, ym;
        e = exp_q.pop_front();
        check(tbt == e, $sformatf("turn %0d: got %h expected %h", nrec, tbt, e));
        check(cyc == due_q[0], $sformatf("latency: at %0d, due %0d", cyc, due_q[0]));
        void'(due_q.pop_front());
        xm = real'(tbt.x) / 32768.0;
        ym = real'(tbt.y) / 32768.0;
        check((xm - xin_q[0]) < 0.05 && (xin_q[0] - xm) < 0.05, $sformatf("X %f vs beam %f", xm, xin_q[0]));
        check((ym - yin_q[0]) < 0.05 && (yin_q[0] - ym) < 0.05, $sformatf("Y %f vs beam %f", ym, yin_q[0]));
        void'(xin_q.pop_front());
        void'(yin_q.pop_front());
      end
      nrec++;
    end
  end

  // One run of nturn turns of period samples; the bunch (raised cosine)
  // covers samples b0 .. b0+bw-1 of each turn. idx counts samples; index 0
  // of a turn is two samples after rf_win rises.
  int t = 0;
  task automatic run(input int period, input int b0, input int bw, input int nturn);
    longint vd [2], vs [2], cs [4];
    longint s [4];
    real    x, y, p;
    int     idx, t_end;
    idx   = -2;
    t_end = t + nturn;
    while (t < t_end) begin
      @(negedge clk);
      smp_valid = 1'b1;
      rf_win    = ((idx + 2) % period) < 40 && idx >= -2 && idx + 2 < nturn * period;
      if (idx >= 0) begin
        int j;
        j = idx % period;
        if (j == 0) begin
          x = 0.3 * $sin(real'(t) * 0.7);
          y = -0.2 + 0.01 * real'(t);
          vd = '{0, 0}; vs = '{0, 0};
        end
        p = (j >= b0 && j < b0 + bw)
            ? 3000.0 * (1.0 - $cos(2.0 * 3.14159265 * real'(j - b0) / real'(bw))) : 0.0;
        s[0] = longint'(p * (1.0 + x)) + longint'($urandom % 9) - 4;
        s[2] = longint'(p * (1.0 - x)) + longint'($urandom % 9) - 4;
        s[1] = longint'(p * (1.0 + y)) + longint'($urandom % 9) - 4;
        s[3] = longint'(p * (1.0 - y)) + longint'($urandom % 9) - 4;
        for (int c = 0; c < 4; c++) begin
          smp[c] = 16'(s[c]);
          cs[c]  = corr(s[c], c);
        end
        if (j >= int'(ws) && j <= int'(we)) begin
          vd[0] += cs[0] - cs[2]; vs[0] += cs[0] + cs[2];
          vd[1] += cs[1] - cs[3]; vs[1] += cs[1] + cs[3];
        end
        if (j == int'(we)) begin
          tbt_rec_t e;
          e.turn  = 32'(t);
          e.x     = 16'(ratio(vd[0], vs[0]));
          e.y     = 16'(ratio(vd[1], vs[1]));
          e.sum_x = 32'(vs[0]);
          e.sum_y = 32'(vs[1]);
          exp_q.push_back(e);
          // the sample is taken at the next rising edge (cycle cyc+1)
          due_q.push_back(cyc + 1 + LAT);
          xin_q.push_back(x);
          yin_q.push_back(y);
        end
        if (j == period - 1) t++;
      end else begin
        smp = '0;
      end
      idx++;
    end
  endtask

  initial begin
    for (int c = 0; c < 4; c++) begin
      k[c] = 18'(65536 + (c - 2) * 1500);    // gains 0.95 .. 1.02
      b[c] = 16'(c * 7 - 10);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    // 2.44 MHz revolution: 102 samples per turn, 200 ns bunch, window 10..60
    run(102, 10, 50, 30);
    repeat (60) @(posedge clk);
    check(nrec == 30 && exp_q.size() == 0, $sformatf("%0d records at 102 samples per turn", nrec));
    // 1 MHz revolution: 250 samples per turn, 500 ns bunch, window 15..150
    ws = 12'd15;
    we = 12'd150;
    run(250, 20, 125, 10);
    repeat (60) @(posedge clk);
    check(nrec == 40 && exp_q.size() == 0, $sformatf("%0d records in all", nrec));
    check(ovr_cnt == 0, "no overruns");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
