// async_fifo: dual-clock first-in first-out buffer with Gray-coded pointers.
//
// Used three times in the FEC: as the per-channel "FIFO14bit*8" that moves
// 14-bit ADC samples from the ADC output clock into the 250 MHz system clock,
// as the 512-bit store inside the 64-in/512-out FIFO in front of the DDR3
// controller, and for the DDR3 readback and turn-by-turn result queues towards
// the UDP transmitter.
//
// Interface: write side (wclk, wrst_n, wr_en, wdata, full, wlevel) and read
// side (rclk, rrst_n, rd_en, rdata, empty, rlevel). The read side is
// show-ahead: rdata holds the oldest word whenever empty is low, and rd_en
// pops it. Levels are exact in their own domain's view, i.e. wlevel may
// over-count and rlevel under-count by the pointers still in the two-flop
// synchronisers, which is the safe side for both.
// Timing: a written word becomes visible to the reader three read clocks
// after the write.
// Width 14 and depth 8 follow the name printed in the FIFO diagram; the Gray
// pointer scheme and the show-ahead read are this design's own choices.
module async_fifo #(
  parameter int unsigned W          = 14,
  parameter int unsigned DEPTH_LOG2 = 3
) (
  input  logic                wclk,
  input  logic                wrst_n,
  input  logic                wr_en,
  input  logic [W-1:0]        wdata,
  output logic                full,
  output logic [DEPTH_LOG2:0] wlevel,
  input  logic                rclk,
  input  logic                rrst_n,
  input  logic                rd_en,
  output logic [W-1:0]        rdata,
  output logic                empty,
  output logic [DEPTH_LOG2:0] rlevel
);
  localparam int unsigned DEPTH = 1 << DEPTH_LOG2;
  localparam int unsigned PW    = DEPTH_LOG2 + 1;

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] wbin, rbin, wgray, rgray;
  logic [PW-1:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [PW-1:0] bin2gray(input logic [PW-1:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [PW-1:0] gray2bin(input logic [PW-1:0] g);
    logic [PW-1:0] b;
    b[PW-1] = g[PW-1];
    for (int i = PW - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  logic [PW-1:0] rbin_w;
  assign rbin_w = gray2bin(rgray_w2);
  assign wlevel = wbin - rbin_w;
  assign full   = (wlevel == PW'(DEPTH));

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[DEPTH_LOG2-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !full) begin
        wbin  <= wbin + PW'(1);
        wgray <= bin2gray(wbin + PW'(1));
      end
    end
  end

  // ---------------- read side ----------------
  logic [PW-1:0] wbin_r;
  assign wbin_r = gray2bin(wgray_r2);
  assign rlevel = wbin_r - rbin;
  assign empty  = (rlevel == '0);
  assign rdata  = mem[rbin[DEPTH_LOG2-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_en && !empty) begin
        rbin  <= rbin + PW'(1);
        rgray <= bin2gray(rbin + PW'(1));
      end
    end
  end

  // Rules of use: no write into a full FIFO, no read from an empty one.
  a_no_overflow:  assert property (@(posedge wclk) disable iff (!wrst_n) !(wr_en && full));
  a_no_underflow: assert property (@(posedge rclk) disable iff (!rrst_n) !(rd_en && empty));
endmodule
