// udp_rx: Ethernet / IPv4 / UDP command receiver on an 8-bit GMII-style
// interface.
//
// The receiver skips the preamble up to the start delimiter, then runs the
// CRC-32 over every frame byte including the frame check sequence while it
// checks the destination MAC (own address or broadcast), the EtherType
// (IPv4), the IP protocol (UDP) and the UDP destination port, and keeps the
// first eight payload bytes: one host command. When rx_dv drops, the command
// is released with a one-clock cmd_valid pulse if every check passed and the
// CRC register holds the CRC-32 residue; otherwise the frame is counted as
// dropped.
//
// Interface: clk (byte clock), rst_n, rxd/rx_dv, local_mac, local_port,
// cmd (host_cmd_t) and cmd_valid, good_cnt and bad_cnt.
// Timing: cmd_valid one clock after the last frame byte.
// Following the document: host-to-FPGA register configuration over UDP.
// Own choices: one command per datagram, the checks made, no IP header
// checksum check, no ARP (the host uses a static ARP entry).
module udp_rx
  import fec_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  rxd,
  input  logic        rx_dv,
  input  logic [47:0] local_mac,
  input  logic [15:0] local_port,
  output host_cmd_t   cmd,
  output logic        cmd_valid,
  output logic [15:0] good_cnt,
  output logic [15:0] bad_cnt
);
  typedef enum logic [1:0] {S_IDLE, S_PRE, S_FRAME, S_DROP} st_e;
  st_e         st;
  logic [15:0] idx;
  logic [31:0] crc;
  logic        ok;
  logic [63:0] pay;
  logic [47:0] mac_sh;
  logic [15:0] w16;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      idx       <= '0;
      crc       <= '1;
      ok        <= 1'b0;
      pay       <= '0;
      mac_sh    <= '0;
      w16       <= '0;
      cmd       <= '0;
      cmd_valid <= 1'b0;
      good_cnt  <= '0;
      bad_cnt   <= '0;
    end else begin
      cmd_valid <= 1'b0;
      unique case (st)
        S_IDLE: if (rx_dv) st <= (rxd == 8'h55) ? S_PRE : S_DROP;
        S_PRE: begin
          if (!rx_dv)              st <= S_IDLE;
          else if (rxd == 8'hD5) begin
            st  <= S_FRAME;
            idx <= '0;
            crc <= '1;
            ok  <= 1'b1;
          end else if (rxd != 8'h55) st <= S_DROP;
        end
        S_FRAME: begin
          if (rx_dv) begin
            crc <= crc32_byte(crc, rxd);
            idx <= idx + 16'd1;
            w16 <= {w16[7:0], rxd};
            if (idx < 16'd6) mac_sh <= {mac_sh[39:0], rxd};
            if (idx == 16'd6 && mac_sh != local_mac && mac_sh != '1) ok <= 1'b0;
            if (idx == 16'd14 && w16 != 16'h0800) ok <= 1'b0;
            if (idx == 16'd23 && rxd != 8'h11) ok <= 1'b0;
            if (idx == 16'd38 && w16 != local_port) ok <= 1'b0;
            if (idx >= 16'd42 && idx < 16'd50) pay <= {pay[55:0], rxd};
          end else begin
            st <= S_IDLE;
            if (ok && crc == CRC32_RESIDUE && idx >= 16'd54) begin
              cmd       <= pay;
              cmd_valid <= 1'b1;
              good_cnt  <= good_cnt + 16'd1;
            end else begin
              bad_cnt <= bad_cnt + 16'd1;
            end
          end
        end
        S_DROP: if (!rx_dv) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
