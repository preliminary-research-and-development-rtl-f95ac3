// mig_model: behavioural model of the DDR3 memory controller's user interface
// together with the DDR3 memory behind it (testbench only).
//
// Write commands and write data are queued separately and paired in order,
// as the real controller does. Reads return their 512-bit word, in order,
// RD_LAT user clocks after the command is accepted. app_rdy and app_wdf_rdy
// drop on a pseudo-random STALL_PCT percent of cycles (refresh, bank
// conflicts), and calibration completes CAL_CYC clocks after reset. The
// memory is sparse: only written words are stored.
`timescale 1ns/1ps
module mig_model #(
  parameter int unsigned RD_LAT    = 12,
  parameter int unsigned STALL_PCT = 20,
  parameter int unsigned CAL_CYC   = 50
) (
  input  logic         ui_clk,
  input  logic         rst_n,
  output logic         init_calib_complete,
  input  logic [28:0]  app_addr,
  input  logic [2:0]   app_cmd,
  input  logic         app_en,
  output logic         app_rdy,
  input  logic [511:0] app_wdf_data,
  input  logic         app_wdf_wren,
  input  logic         app_wdf_end,
  input  logic [63:0]  app_wdf_mask,
  output logic         app_wdf_rdy,
  output logic [511:0] app_rd_data,
  output logic         app_rd_data_valid,
  output int           n_writes,
  output int           n_reads,
  output int           n_stalls
);
  logic [511:0] mem [int];
  int           wcmd_q [$];
  logic [511:0] wdat_q [$];
  int           rd_addr_q [$];
  longint       rd_time_q [$];
  longint       cyc = 0;
  int           cal = 0;

  initial begin
    n_writes = 0; n_reads = 0; n_stalls = 0;
    app_rdy = 1'b0; app_wdf_rdy = 1'b0; app_rd_data_valid = 1'b0; app_rd_data = '0;
    init_calib_complete = 1'b0;
  end

  function automatic logic [511:0] peek(int word);
    return mem.exists(word) ? mem[word] : '0;
  endfunction

  always @(posedge ui_clk) begin
    cyc++;
    if (!rst_n) begin
      cal = 0;
      init_calib_complete <= 1'b0;
    end else begin
      if (cal < CAL_CYC) cal++;
      init_calib_complete <= (cal >= CAL_CYC);
    end
    // accept on the current handshake values
    if (app_en && app_rdy) begin
      if (app_cmd == 3'b000) wcmd_q.push_back(int'(app_addr >> 3));
      else begin
        rd_addr_q.push_back(int'(app_addr >> 3));
        rd_time_q.push_back(cyc + RD_LAT);
        n_reads++;
      end
    end
    if (app_wdf_wren && app_wdf_rdy) begin
      if (!app_wdf_end || app_wdf_mask != '0) $display("mig_model: unexpected wdf_end/mask");
      wdat_q.push_back(app_wdf_data);
    end
    while (wcmd_q.size() > 0 && wdat_q.size() > 0) begin
      mem[wcmd_q.pop_front()] = wdat_q.pop_front();
      n_writes++;
    end
    app_rd_data_valid <= 1'b0;
    if (rd_time_q.size() > 0 && rd_time_q[0] <= cyc) begin
      void'(rd_time_q.pop_front());
      app_rd_data       <= peek(rd_addr_q.pop_front());
      app_rd_data_valid <= 1'b1;
    end
    app_rdy     <= init_calib_complete && (($urandom % 100) >= STALL_PCT);
    app_wdf_rdy <= init_calib_complete && (($urandom % 100) >= STALL_PCT);
    if (init_calib_complete && !app_rdy) n_stalls++;
  end
endmodule
