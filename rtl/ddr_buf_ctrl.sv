// ddr_buf_ctrl: DDR3 buffer controller (raw record and turn-by-turn records)
// on the MIG user interface.
//
// Write path: every 512-bit word that the 64-in/512-out FIFO delivers is
// written to the next DDR3 location, starting at address 0 after each capture
// start (cap_start). One DDR3 word occupies 8 address units of the 64-bit
// memory, so the 20 ms record of 625000 words spans 40 MB of the 4 GB device.
// Command and data are offered together; each is held until the controller
// takes it (app_rdy, app_wdf_rdy), and the FIFO is popped when both are taken.
//
// TBT path: 512-bit words of four turn-by-turn records (tq_*) are written to
// a second region starting at word TBT_BASE, wrapping after 2^TBT_LOG2 words,
// from its start again after each tbt_start; tbt_words counts the words
// written since then. A raw record longer than TBT_BASE words would run into
// this region. Raw words are served before TBT words when both wait.
// The source of a write is held until both its command and its data are
// taken, so the two streams never mix within one write.
//
// Read path: a readout request (rd_start with rd_addr, rd_len in 512-bit
// words) issues read commands, but only while the readback FIFO has room for
// every word already requested, so returning data can never be lost. Returned
// words go to the readback FIFO through rb_wr/rb_data. Writes take priority
// over reads, so a readout running during a capture never delays the capture.
//
// Interface: clock ui_clk (200 MHz user clock of the MIG), MIG user-interface
// signals (app_*), capture FIFO read port (cf_*), readback FIFO write port
// (rb_*), TBT FIFO read port (tq_*), status wr_words, tbt_words and rd_busy.
// Timing: one 512-bit write per clock while the FIFO holds data and the
// controller is ready.
// Following the document: 512-bit user data at 200 MHz, raw data from the
// 64i/512o FIFO into the MIG, buffering of raw and position data, DDR3
// readout towards UDP. Own choices: the
// linear address map starting at 0, the TBT region, write priority, the
// readback flow control.
module ddr_buf_ctrl #(
  parameter int unsigned DATA_W  = 512,
  parameter int unsigned ADDR_W  = 29,
  parameter int unsigned LEN_W   = 24,
  parameter int unsigned RB_LOG2 = 5,
  parameter int unsigned TBT_LOG2 = 23,                  // TBT region: 2^23 words (512 MB)
  parameter logic [LEN_W-1:0] TBT_BASE = LEN_W'(1) << 23 // word index of the TBT region
) (
  input  logic                ui_clk,
  input  logic                rst_n,
  input  logic                init_calib_complete,
  // capture control
  input  logic                cap_start,
  output logic [LEN_W-1:0]    wr_words,
  // capture FIFO (show-ahead)
  input  logic [DATA_W-1:0]   cf_data,
  input  logic                cf_empty,
  output logic                cf_rd,
  // TBT record FIFO (show-ahead, four records per word)
  input  logic                tbt_start,
  input  logic [DATA_W-1:0]   tq_data,
  input  logic                tq_empty,
  output logic                tq_rd,
  output logic [LEN_W-1:0]    tbt_words,
  // readout request
  input  logic                rd_start,
  input  logic [LEN_W-1:0]    rd_addr,
  input  logic [LEN_W-1:0]    rd_len,
  output logic                rd_busy,
  // readback FIFO write port
  output logic                rb_wr,
  output logic [DATA_W-1:0]   rb_data,
  input  logic [RB_LOG2:0]    rb_wlevel,
  // MIG user interface
  output logic [ADDR_W-1:0]   app_addr,
  output logic [2:0]          app_cmd,
  output logic                app_en,
  input  logic                app_rdy,
  output logic [DATA_W-1:0]   app_wdf_data,
  output logic                app_wdf_wren,
  output logic                app_wdf_end,
  output logic [DATA_W/8-1:0] app_wdf_mask,
  input  logic                app_wdf_rdy,
  input  logic [DATA_W-1:0]   app_rd_data,
  input  logic                app_rd_data_valid
);
  localparam logic [2:0] CMD_WR = 3'b000;
  localparam logic [2:0] CMD_RD = 3'b001;
  localparam int unsigned STEP  = DATA_W / 64;   // address units per word
  localparam int unsigned RB_DEPTH = 1 << RB_LOG2;

  logic [LEN_W-1:0]   waddr;       // next write word index
  logic               wcmd_done, wdat_done;
  logic               wr_act;      // a write is being offered
  logic               wsel, wsel_q;  // source of the current write: 1 = TBT
  logic [LEN_W-1:0]   tptr;        // TBT words written since tbt_start
  logic [LEN_W-1:0]   taddr;
  logic [LEN_W-1:0]   raddr, rleft;
  logic [RB_LOG2+1:0] outst;       // read words requested but not returned
  logic               rd_issue, rd_ok;

  // a half-taken write keeps its source; otherwise raw data first
  assign wsel     = (wcmd_done || wdat_done) ? wsel_q : (cf_empty && !tq_empty);
  assign wr_act   = init_calib_complete && (wsel ? !tq_empty : !cf_empty);
  assign taddr    = TBT_BASE + LEN_W'(tptr[TBT_LOG2-1:0]);
  assign tbt_words = tptr;
  assign rd_ok    = (32'(rb_wlevel) + 32'(outst) + 32'(rb_wr)) < RB_DEPTH;
  assign rd_issue = init_calib_complete && !wr_act && (rleft != '0) && rd_ok;
  assign rd_busy  = (rleft != '0) || (outst != '0);
  assign wr_words = waddr;

  // command channel
  always_comb begin
    app_en   = 1'b0;
    app_cmd  = CMD_WR;
    app_addr = ADDR_W'(wsel ? taddr : waddr) * ADDR_W'(STEP);
    if (wr_act && !wcmd_done) begin
      app_en = 1'b1;
    end else if (rd_issue) begin
      app_en   = 1'b1;
      app_cmd  = CMD_RD;
      app_addr = ADDR_W'(raddr) * ADDR_W'(STEP);
    end
  end

  // write data channel
  assign app_wdf_data = wsel ? tq_data : cf_data;
  assign app_wdf_wren = wr_act && !wdat_done;
  assign app_wdf_end  = app_wdf_wren;
  assign app_wdf_mask = '0;

  logic cmd_take, dat_take;
  assign cmd_take = wr_act && (wcmd_done || app_rdy);
  assign dat_take = wr_act && (wdat_done || app_wdf_rdy);
  assign cf_rd    = cmd_take && dat_take && !wsel;
  assign tq_rd    = cmd_take && dat_take && wsel;

  always_ff @(posedge ui_clk or negedge rst_n) begin
    if (!rst_n) begin
      waddr     <= '0;
      tptr      <= '0;
      wsel_q    <= 1'b0;
      wcmd_done <= 1'b0;
      wdat_done <= 1'b0;
      raddr     <= '0;
      rleft     <= '0;
      outst     <= '0;
      rb_wr     <= 1'b0;
      rb_data   <= '0;
    end else begin
      // ---- write path ----
      if (cap_start) begin
        waddr <= '0;
      end else if (cf_rd) begin
        waddr <= waddr + 1'b1;
      end
      if (tbt_start) begin
        tptr <= '0;
      end else if (tq_rd) begin
        tptr <= tptr + 1'b1;
      end
      wsel_q <= wsel;
      if (cf_rd || tq_rd) begin
        wcmd_done <= 1'b0;
        wdat_done <= 1'b0;
      end else begin
        if (wr_act && app_rdy)     wcmd_done <= 1'b1;
        if (wr_act && app_wdf_rdy) wdat_done <= 1'b1;
      end
      // ---- read path ----
      if (rd_start) begin
        raddr <= rd_addr;
        rleft <= rd_len;
      end else if (rd_issue && app_rdy) begin
        raddr <= raddr + 1'b1;
        rleft <= rleft - 1'b1;
      end
      outst <= outst + (RB_LOG2+2)'(rd_issue && app_rdy)
                     - (RB_LOG2+2)'(app_rd_data_valid);
      rb_wr   <= app_rd_data_valid;
      rb_data <= app_rd_data;
    end
  end

  a_rb_room: assert property (@(posedge ui_clk) disable iff (!rst_n)
                              rb_wr |-> (rb_wlevel < (RB_LOG2+1)'(RB_DEPTH)));
endmodule
