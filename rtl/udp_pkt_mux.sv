// udp_pkt_mux: packet scheduler between the FEC's data sources and udp_tx.
//
// Three sources share the UDP link:
//   reply  - one 8-byte register read reply (highest priority),
//   TBT    - turn-by-turn records (128 bit) from the position processor,
//            sent TBT_PKT records per packet,
//   raw    - 512-bit words read back from DDR3, RAW_PKT words per packet;
//            the last packet of a readout carries what is left of rd_len.
// A source is served when the link is idle and a whole packet's worth of
// records is waiting in its show-ahead FIFO, so udp_tx is never starved in
// the middle of a frame. Each payload starts with a 4-byte header {type,
// record count, 16-bit sequence number (big-endian)}. Record bytes follow,
// least significant byte first for TBT and raw records (raw samples arrive as
// little-endian 16-bit values in time order), most significant first for the
// reply, which mirrors the command format. A record is popped from its FIFO
// when its first byte is sent.
//
// Interface: clk (byte clock), rst_n; reply_req/reply/reply_ack; TBT FIFO read
// side (tbt_data, tbt_level, tbt_rd); raw FIFO read side (raw_data, raw_level,
// raw_rd); rd_start/rd_len to follow the readout length; udp_tx control
// (tx_start, tx_len, tx_busy, pl_req, pl_data); packet counters.
// Timing: a new packet can start one clock after udp_tx drops busy.
// Following the document: DDR3 data and TBT data to the host over UDP. Own
// choices: the payload format, the priorities and packet sizes.
module udp_pkt_mux
  import fec_pkg::*;
#(
  parameter int unsigned TBT_PKT  = 16,
  parameter int unsigned RAW_PKT  = 16,
  parameter int unsigned LVL_W    = 7,
  parameter int unsigned LEN_W    = 24
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               reply_req,
  input  logic [63:0]        reply,
  output logic               reply_ack,
  input  logic [127:0]       tbt_data,
  input  logic [LVL_W-1:0]   tbt_level,
  output logic               tbt_rd,
  input  logic [511:0]       raw_data,
  input  logic [LVL_W-1:0]   raw_level,
  output logic               raw_rd,
  input  logic               rd_start,
  input  logic [LEN_W-1:0]   rd_len,
  output logic               tx_start,
  output logic [15:0]        tx_len,
  input  logic               tx_busy,
  input  logic               pl_req,
  output logic [7:0]         pl_data,
  output logic [15:0]        n_reply,
  output logic [15:0]        n_tbt,
  output logic [15:0]        n_raw
);
  typedef enum logic [1:0] {SRC_REPLY, SRC_TBT, SRC_RAW} src_e;

  src_e             sel;
  logic             sending;
  logic [15:0]      bidx, plen, seq;
  logic [6:0]       rbyte, rbytes;     // byte within record, record size
  logic [7:0]       nrec;
  logic [511:0]     head, shreg;
  logic [LEN_W-1:0] raw_left;
  logic [7:0]       raw_n;
  logic [63:0]      reply_le;

  // reply is sent most significant byte first
  for (genvar i = 0; i < 8; i++) begin : g_rev
    assign reply_le[8*i +: 8] = reply[8*(7-i) +: 8];
  end

  always_comb begin
    unique case (sel)
      SRC_REPLY: head = 512'(reply_le);
      SRC_TBT:   head = 512'(tbt_data);
      default:   head = raw_data;
    endcase
  end

  assign raw_n = (raw_left >= LEN_W'(RAW_PKT)) ? 8'(RAW_PKT) : 8'(raw_left);

  always_comb begin
    pl_data = 8'h00;
    if (bidx < 16'd4) begin
      unique case (bidx[1:0])
        2'd0: pl_data = (sel == SRC_REPLY) ? PKT_REPLY : (sel == SRC_TBT) ? PKT_TBT : PKT_RAW;
        2'd1: pl_data = nrec;
        2'd2: pl_data = seq[15:8];
        default: pl_data = seq[7:0];
      endcase
    end else if (rbyte == '0) begin
      pl_data = head[7:0];
    end else begin
      pl_data = shreg[7:0];
    end
  end

  logic first_byte;
  assign first_byte = sending && pl_req && (bidx >= 16'd4) && (rbyte == '0);
  assign reply_ack  = first_byte && (sel == SRC_REPLY);
  assign tbt_rd     = first_byte && (sel == SRC_TBT);
  assign raw_rd     = first_byte && (sel == SRC_RAW);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel      <= SRC_REPLY;
      sending  <= 1'b0;
      bidx     <= '0;
      plen     <= '0;
      seq      <= '0;
      rbyte    <= '0;
      rbytes   <= 7'd8;
      nrec     <= '0;
      shreg    <= '0;
      raw_left <= '0;
      tx_start <= 1'b0;
      tx_len   <= '0;
      n_reply  <= '0;
      n_tbt    <= '0;
      n_raw    <= '0;
    end else begin
      tx_start <= 1'b0;
      if (rd_start) raw_left <= rd_len;
      if (!sending) begin
        if (!tx_busy && !tx_start) begin
          bidx  <= '0;
          rbyte <= '0;
          if (reply_req) begin
            sel <= SRC_REPLY; nrec <= 8'd1; rbytes <= 7'd8;
            plen <= 16'd12; tx_len <= 16'd12;
            sending <= 1'b1; tx_start <= 1'b1; n_reply <= n_reply + 16'd1;
          end else if (32'(tbt_level) >= TBT_PKT) begin
            sel <= SRC_TBT; nrec <= 8'(TBT_PKT); rbytes <= 7'd16;
            plen <= 16'(4 + 16 * TBT_PKT); tx_len <= 16'(4 + 16 * TBT_PKT);
            sending <= 1'b1; tx_start <= 1'b1; n_tbt <= n_tbt + 16'd1;
          end else if (raw_n != 0 && 8'(raw_level) >= raw_n) begin
            sel <= SRC_RAW; nrec <= raw_n; rbytes <= 7'd64;
            plen <= 16'd4 + 16'(raw_n) * 16'd64; tx_len <= 16'd4 + 16'(raw_n) * 16'd64;
            raw_left <= raw_left - LEN_W'(raw_n);
            sending <= 1'b1; tx_start <= 1'b1; n_raw <= n_raw + 16'd1;
          end
        end
      end else if (pl_req) begin
        bidx <= bidx + 16'd1;
        if (bidx >= 16'd4) begin
          if (rbyte == '0) shreg <= head >> 8;
          else             shreg <= shreg >> 8;
          rbyte <= (rbyte == rbytes - 7'd1) ? '0 : rbyte + 7'd1;
        end
        if (bidx == plen - 16'd1) begin
          sending <= 1'b0;
          seq     <= seq + 16'd1;
        end
      end
    end
  end
endmodule
