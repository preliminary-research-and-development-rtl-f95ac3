// win_integ: window integrator, V = sum of x[n] for Ws <= n <= We.
//
// A sample counter restarts at 0 on the sample that carries the turn marker
// (the start of a bunch period). Samples whose index lies inside the window
// [ws, we] are accumulated; on the sample with index we the finished sum is
// presented with a one-clock done pulse and the accumulator clears. The sum is
// the discrete form of the window integral; scaling by the sample period is
// left out because it cancels in the difference-over-sum ratio.
//
// Interface: clk, rst_n, mark (turn marker, qualified by din_valid), din,
// din_valid, ws, we (quasi-static, we >= ws), acc and done out.
// Timing: done one clock after the sample with index we; a window can close
// on every turn.
// Following the document: equations (5) and (6). Own choices: marker-relative
// sample counting, inclusive bounds, widths.
module win_integ #(
  parameter int unsigned IN_W  = 19,
  parameter int unsigned CNT_W = 12,
  parameter int unsigned ACC_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    mark,
  input  logic signed [IN_W-1:0]  din,
  input  logic                    din_valid,
  input  logic [CNT_W-1:0]        ws,
  input  logic [CNT_W-1:0]        we,
  output logic signed [ACC_W-1:0] acc,
  output logic                    done
);
  logic [CNT_W-1:0]        cnt, idx;
  logic                    run;      // counter running (a marker was seen)
  logic signed [ACC_W-1:0] sum;
  logic                    in_win;

  assign idx    = mark ? '0 : cnt;
  assign in_win = (idx >= ws) && (idx <= we);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      run  <= 1'b0;
      sum  <= '0;
      acc  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (din_valid && (run || mark)) begin
        if (mark) run <= 1'b1;
        if (idx != {CNT_W{1'b1}}) cnt <= idx + 1'b1;
        if (in_win) begin
          if (idx == we) begin
            acc  <= sum + ACC_W'(din);
            sum  <= '0;
            done <= 1'b1;
            run  <= 1'b0;
          end else begin
            sum <= sum + ACC_W'(din);
          end
        end
      end
    end
  end
endmodule
