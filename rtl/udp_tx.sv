// udp_tx: Ethernet / IPv4 / UDP frame transmitter on an 8-bit GMII-style
// interface (125 MHz byte clock, 1 Gb/s line rate).
//
// On start the 42 header bytes (MAC, IPv4 with header checksum, UDP with the
// optional checksum left at zero) are assembled from the address inputs and
// the payload length. The frame is then sent byte by byte: 7 preamble bytes,
// the start delimiter, the header, len payload bytes pulled from the source,
// zero padding up to the 60-byte Ethernet minimum, and the CRC-32 frame check
// sequence, followed by a 12-byte inter-frame gap. The payload source is
// show-ahead: pl_data must hold the next byte, and pl_req consumes it.
//
// Interface: clk (byte clock), rst_n, start/len (payload bytes, at most 1472),
// address inputs, pl_req/pl_data, busy, frames (count), txd/tx_en.
// Timing: a frame of len payload bytes occupies max(len, 18) + 54 + 12 byte
// clocks; the next start is accepted when busy is low.
// Following the document: UDP transport to the host through the SFP port.
// Own choices: GMII byte interface to the transceiver, zero UDP checksum, the
// identification counter, the don't-fragment flag.
module udp_tx
  import fec_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] len,
  input  logic [47:0] src_mac,
  input  logic [47:0] dst_mac,
  input  logic [31:0] src_ip,
  input  logic [31:0] dst_ip,
  input  logic [15:0] src_port,
  input  logic [15:0] dst_port,
  output logic        pl_req,
  input  logic [7:0]  pl_data,
  output logic        busy,
  output logic [31:0] frames,
  output logic [7:0]  txd,
  output logic        tx_en
);
  localparam int unsigned HDR = 42;

  typedef enum logic [2:0] {S_IDLE, S_PRE, S_HDR, S_PAY, S_PAD, S_FCS, S_IFG} st_e;
  st_e               st;
  logic [HDR*8-1:0]  hdr;          // byte 0 in bits [HDR*8-1 -: 8]
  logic [15:0]       cnt, plen, ip_id;
  logic [31:0]       crc;
  logic [15:0]       ip_len, ip_csum;

  assign ip_len = len + 16'd28;

  // IPv4 header checksum: one's complement of the one's complement sum
  always_comb begin
    logic [19:0] s;
    s = 20'h04500 + 20'(ip_len) + 20'(ip_id) + 20'h04000 + 20'h04011
      + 20'(src_ip[31:16]) + 20'(src_ip[15:0]) + 20'(dst_ip[31:16]) + 20'(dst_ip[15:0]);
    s = 20'(s[15:0]) + 20'(s[19:16]);
    s = 20'(s[15:0]) + 20'(s[19:16]);
    ip_csum = ~s[15:0];
  end

  logic [7:0] byte_out;
  always_comb begin
    byte_out = 8'h00;
    pl_req   = 1'b0;
    unique case (st)
      S_PRE:   byte_out = (cnt == 16'd7) ? 8'hD5 : 8'h55;
      S_HDR:   byte_out = hdr[HDR*8-1 -: 8];
      S_PAY:   begin byte_out = pl_data; pl_req = 1'b1; end
      S_PAD:   byte_out = 8'h00;
      S_FCS:   byte_out = ~crc[7:0];
      default: byte_out = 8'h00;
    endcase
  end

  assign busy = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= S_IDLE;
      hdr    <= '0;
      cnt    <= '0;
      plen   <= '0;
      ip_id  <= '0;
      crc    <= '1;
      frames <= '0;
      txd    <= '0;
      tx_en  <= 1'b0;
    end else begin
      txd   <= byte_out;
      tx_en <= (st != S_IDLE) && (st != S_IFG);
      cnt   <= cnt + 16'd1;
      unique case (st)
        S_IDLE: begin
          cnt <= '0;
          if (start) begin
            st   <= S_PRE;
            plen <= len;
            crc  <= '1;
            hdr  <= {dst_mac, src_mac, 16'h0800,
                     8'h45, 8'h00, ip_len, ip_id, 16'h4000, 8'h40, 8'h11, ip_csum,
                     src_ip, dst_ip,
                     src_port, dst_port, len + 16'd8, 16'h0000};
            ip_id <= ip_id + 16'd1;
          end
        end
        S_PRE: if (cnt == 16'd7) begin
          st  <= S_HDR;
          cnt <= '0;
        end
        S_HDR: begin
          crc <= crc32_byte(crc, byte_out);
          hdr <= hdr << 8;
          if (cnt == 16'(HDR - 1)) begin
            cnt <= '0;
            st  <= (plen != 0) ? S_PAY : S_PAD;
          end
        end
        S_PAY: begin
          crc <= crc32_byte(crc, byte_out);
          if (cnt == plen - 16'd1) begin
            cnt <= plen;
            st  <= (plen < 16'd18) ? S_PAD : S_FCS;
            if (plen >= 16'd18) cnt <= '0;
          end
        end
        S_PAD: begin
          crc <= crc32_byte(crc, byte_out);
          if (cnt == 16'd17) begin
            cnt <= '0;
            st  <= S_FCS;
          end
        end
        S_FCS: begin
          crc <= crc >> 8;
          if (cnt == 16'd3) begin
            cnt    <= '0;
            st     <= S_IFG;
            frames <= frames + 32'd1;
          end
        end
        S_IFG: if (cnt == 16'd11) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
