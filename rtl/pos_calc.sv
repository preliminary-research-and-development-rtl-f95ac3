// pos_calc: real-time beam position (turn-by-turn) by difference over sum.
//
// Per turn, for the horizontal pair of electrodes A (channel 1) and C
// (channel 3) and the vertical pair B (channel 2) and D (channel 4):
//   A' = K_A*A + b_A, C' = K_C*C + b_C          (gain/offset correction)
//   delta = A' - C', sigma = A' + C'             (difference and sum)
//   V_delta, V_sigma = sums over the window Ws..We
//   X = V_delta / V_sigma                        (and likewise Y from B, D)
// The turn marker is the rising edge of the RF window timing input, brought
// into the system clock domain; the window bounds count samples from that
// marker. At the end of each window the two ratios are formed by two
// bit-serial dividers and one turn-by-turn record {turn, X, Y, V_sigmaX,
// V_sigmaY} is emitted.
//
// Interface: clk (250 MHz system clock), rst_n, enable, smp[4]/smp_valid
// from the ADC front end, rf_win (asynchronous), ws/we, k[4], b[4]; tbt and
// tbt_valid out; ovr_cnt counts windows lost because the dividers were still
// busy (needs a turn shorter than about 20 samples).
// Timing: tbt_valid rises 22 clocks after the edge that takes the sample
// with index We (correction 2, sum/difference 1, integrator 1, divider 17,
// pairing of the two quotients 1).
// Following the document: equations (1)-(7), X from channels 1 and 3, Y from
// channels 2 and 4, real-time TBT output. Own choices: RF window edge as the
// turn marker, fixed-point formats, Q1.15 ratio.
module pos_calc
  import fec_pkg::*;
#(
  parameter int unsigned CNT_W = 12
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   enable,
  input  logic [3:0][15:0]       smp,
  input  logic                   smp_valid,
  input  logic                   rf_win,
  input  logic [CNT_W-1:0]       ws,
  input  logic [CNT_W-1:0]       we,
  input  logic [3:0][K_W-1:0]    k,
  input  logic [3:0][B_W-1:0]    b,
  output tbt_rec_t               tbt,
  output logic                   tbt_valid,
  output logic [15:0]            ovr_cnt
);
  localparam int unsigned CW = 18;   // corrected sample
  localparam int unsigned SW = 19;   // sum / difference

  // ---------------- turn marker ----------------
  logic [2:0] rf_s;
  logic       mark_pend, mark0;
  logic [3:0] mark_d;                // marker travelling with the samples
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rf_s      <= '0;
      mark_pend <= 1'b0;
    end else begin
      rf_s <= {rf_s[1:0], rf_win};
      // hold an edge that found no sample until the next valid sample
      if (rf_s[1] && !rf_s[2] && enable && !smp_valid) mark_pend <= 1'b1;
      else if (smp_valid)                              mark_pend <= 1'b0;
    end
  end
  assign mark0 = (mark_pend || (rf_s[1] && !rf_s[2] && enable)) && smp_valid;

  // ---------------- correction (eq. 1, 2) ----------------
  logic signed [3:0][CW-1:0] cor;
  logic [3:0]                cor_v;
  for (genvar c = 0; c < 4; c++) begin : g_cor
    adc_corr #(.IN_W(16), .K_W(K_W), .KFRAC(K_FRAC), .B_W(B_W), .OUT_W(CW)) u_cor (
      .clk(clk), .rst_n(rst_n),
      .din(signed'(smp[c])), .din_valid(smp_valid),
      .k(signed'(k[c])), .b(signed'(b[c])),
      .dout(cor[c]), .dout_valid(cor_v[c])
    );
  end

  // marker delayed by the correction latency (2)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mark_d <= '0;
    else        mark_d <= {mark_d[2:0], mark0};
  end

  // ---------------- difference and sum (eq. 3, 4) ----------------
  logic signed [SW-1:0] dx, sx, dy, sy;
  logic                 ds_v, ds_mark;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {dx, sx, dy, sy} <= '0;
      ds_v    <= 1'b0;
      ds_mark <= 1'b0;
    end else begin
      dx      <= SW'(signed'(cor[0])) - SW'(signed'(cor[2]));
      sx      <= SW'(signed'(cor[0])) + SW'(signed'(cor[2]));
      dy      <= SW'(signed'(cor[1])) - SW'(signed'(cor[3]));
      sy      <= SW'(signed'(cor[1])) + SW'(signed'(cor[3]));
      ds_v    <= cor_v[0];
      ds_mark <= mark_d[1] && cor_v[0];
    end
  end

  // ---------------- window integration (eq. 5, 6) ----------------
  logic signed [3:0][31:0] v;
  logic [3:0]              vdone;
  logic signed [3:0][SW-1:0] ds;
  assign ds = {sy, dy, sx, dx};
  for (genvar i = 0; i < 4; i++) begin : g_win
    win_integ #(.IN_W(SW), .CNT_W(CNT_W), .ACC_W(32)) u_win (
      .clk(clk), .rst_n(rst_n), .mark(ds_mark), .din(ds[i]), .din_valid(ds_v),
      .ws(ws), .we(we), .acc(v[i]), .done(vdone[i])
    );
  end

  // ---------------- ratio (eq. 7) ----------------
  logic               busy_x, busy_y, dn_x, dn_y, sat_x, sat_y;
  logic signed [15:0] qx, qy;
  logic               go;
  logic               got_x, got_y;
  logic signed [31:0] hold_sx, hold_sy;
  logic [31:0]        turn;

  assign go = vdone[0] && !busy_x && !busy_y && !got_x && !got_y;

  pos_div #(.W(32), .FRAC(15)) u_div_x (
    .clk(clk), .rst_n(rst_n), .start(go), .num(v[0]), .den(v[1]),
    .busy(busy_x), .q(qx), .sat(sat_x), .done(dn_x)
  );
  pos_div #(.W(32), .FRAC(15)) u_div_y (
    .clk(clk), .rst_n(rst_n), .start(go), .num(v[2]), .den(v[3]),
    .busy(busy_y), .q(qy), .sat(sat_y), .done(dn_y)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tbt       <= '0;
      tbt_valid <= 1'b0;
      got_x     <= 1'b0;
      got_y     <= 1'b0;
      hold_sx   <= '0;
      hold_sy   <= '0;
      turn      <= '0;
      ovr_cnt   <= '0;
    end else begin
      tbt_valid <= 1'b0;
      if (vdone[0] && !go) ovr_cnt <= ovr_cnt + 16'd1;
      if (go) begin
        hold_sx <= v[1];
        hold_sy <= v[3];
      end
      if (dn_x) begin
        got_x  <= 1'b1;
        tbt.x  <= qx;
      end
      if (dn_y) begin
        got_y  <= 1'b1;
        tbt.y  <= qy;
      end
      if (got_x && got_y) begin
        got_x         <= 1'b0;
        got_y         <= 1'b0;
        tbt.turn      <= turn;
        tbt.sum_x     <= hold_sx;
        tbt.sum_y     <= hold_sy;
        tbt_valid     <= 1'b1;
        turn          <= turn + 32'd1;
      end
    end
  end
endmodule
