// fifo_64i_512o: width-converting dual-clock FIFO between the 64-bit raw ADC
// sample stream (250 MHz) and the 512-bit user port of the DDR3 controller
// (200 MHz user clock).
//
// The write side packs eight consecutive 64-bit words into one 512-bit word,
// the first word in bits [63:0], and pushes it into a 512-bit async_fifo read
// in the DDR3 user clock domain. The DDR3 port (512 bit x 200 MHz = 102.4 Gb/s)
// is faster than the ADC stream (64 bit x 250 MHz = 16 Gb/s), so the FIFO only
// has to ride out the controller's short stalls (refresh, turnarounds). A
// 512-bit word that finds the FIFO full is dropped and counted in drop_cnt.
//
// Interface: wclk/wrst_n/wr_en/wdata (64 bit) in; rclk/rrst_n/rd_en/rdata
// (512 bit, show-ahead), empty and rlevel out. flush (write domain) discards a
// partly packed word so that a new record starts on a 512-bit boundary.
// Timing: one 512-bit word per eight 64-bit writes; it is visible on the read
// side three read clocks after the eighth write.
// Following the document: 64-bit in, 512-bit out, 250 MHz to 200 MHz. Own
// choices: packing order, depth (64 words of 512 bit), drop counter, flush.
module fifo_64i_512o #(
  parameter int unsigned IN_W       = 64,
  parameter int unsigned RATIO      = 8,
  parameter int unsigned DEPTH_LOG2 = 6
) (
  input  logic                     wclk,
  input  logic                     wrst_n,
  input  logic                     flush,
  input  logic                     wr_en,
  input  logic [IN_W-1:0]          wdata,
  output logic [15:0]              drop_cnt,
  input  logic                     rclk,
  input  logic                     rrst_n,
  input  logic                     rd_en,
  output logic [IN_W*RATIO-1:0]    rdata,
  output logic                     empty,
  output logic [DEPTH_LOG2:0]      rlevel
);
  localparam int unsigned OUT_W = IN_W * RATIO;
  localparam int unsigned CW    = $clog2(RATIO);

  logic [RATIO-1:0][IN_W-1:0] pack;
  logic [CW-1:0]              idx;
  logic                       push, full;
  logic [OUT_W-1:0]           pword;

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      pack     <= '0;
      idx      <= '0;
      push     <= 1'b0;
      drop_cnt <= '0;
    end else begin
      push <= 1'b0;
      if (flush) begin
        idx <= '0;
      end else if (wr_en) begin
        pack[idx] <= wdata;
        idx       <= (idx == CW'(RATIO - 1)) ? '0 : idx + CW'(1);
        push      <= (idx == CW'(RATIO - 1));
      end
      if (push && full) drop_cnt <= drop_cnt + 16'd1;
    end
  end

  assign pword = pack;

  async_fifo #(.W(OUT_W), .DEPTH_LOG2(DEPTH_LOG2)) u_fifo (
    .wclk (wclk), .wrst_n(wrst_n), .wr_en(push && !full), .wdata(pword),
    .full (full), .wlevel(),
    .rclk (rclk), .rrst_n(rrst_n), .rd_en(rd_en), .rdata(rdata),
    .empty(empty), .rlevel(rlevel)
  );
endmodule
