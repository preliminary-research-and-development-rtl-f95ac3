// reg_ctrl: register file of the FEC, written and read by host commands.
//
// Each host command (host_cmd_t: op, address, 32-bit data) either writes a
// register or asks for one to be read. A write to REG_CTRL produces one-clock
// pulses for the self-clearing bits (capture arm, raw readout start, SPI table
// start) and sets the level bits (TBT enable). A write to REG_SPI passes one
// frame to the SPI sequencer. A read loads the reply word {op, 0, address,
// value} and raises reply_req until the packet scheduler takes it with
// reply_ack. Unknown addresses read as 0 and ignore writes.
//
// Interface: clk (byte clock domain), rst_n, cmd/cmd_valid, status and
// tbt_words (read-only words), the register outputs, the command pulses, reply_req/reply_ack/reply.
// Timing: outputs change one clock after cmd_valid.
// Following the document: host software configures FPGA registers over UDP;
// four attenuator settings (x1, x0.25, x0.1, x0.025) chosen by att_sel.
// Own choices: the whole register map and its reset values (gain 1.0, offset
// 0, window 0..99 samples, 20 ms capture length).
module reg_ctrl
  import fec_pkg::*;
#(
  parameter int unsigned CNT_W = 12,
  parameter int unsigned LEN_W = 24,
  parameter logic [LEN_W-1:0] CAP_LEN_RST = LEN_W'(CAP_WORDS_20MS)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  host_cmd_t              cmd,
  input  logic                   cmd_valid,
  input  logic [31:0]            status,
  input  logic [LEN_W-1:0]       tbt_words,
  output logic                   arm,
  output logic                   rd_start,
  output logic                   spi_cfg_start,
  output logic                   spi_host_req,
  output logic [31:0]            spi_host_word,
  output logic                   tbt_en,
  output logic [1:0]             att_sel,
  output logic [LEN_W-1:0]       cap_len,
  output logic [LEN_W-1:0]       rd_addr,
  output logic [LEN_W-1:0]       rd_len,
  output logic [CNT_W-1:0]       ws,
  output logic [CNT_W-1:0]       we,
  output logic [3:0][K_W-1:0]    k,
  output logic [3:0][B_W-1:0]    b,
  output logic                   reply_req,
  input  logic                   reply_ack,
  output logic [63:0]            reply
);
  logic [31:0] rval;

  always_comb begin
    rval = '0;
    unique casez (cmd.addr)
      REG_ID:      rval = FEC_ID;
      REG_CTRL:    rval = {30'd0, tbt_en, 1'b0};
      REG_ATT:     rval = 32'(att_sel);
      REG_CAP_LEN: rval = 32'(cap_len);
      REG_RD_ADDR: rval = 32'(rd_addr);
      REG_RD_LEN:  rval = 32'(rd_len);
      REG_WS:      rval = 32'(ws);
      REG_WE:      rval = 32'(we);
      16'h0008, 16'h0009, 16'h000A, 16'h000B:
                   rval = 32'(signed'(k[cmd.addr[1:0]]));
      16'h000C, 16'h000D, 16'h000E, 16'h000F:
                   rval = 32'(signed'(b[cmd.addr[1:0]]));
      REG_SPI:     rval = spi_host_word;
      REG_STATUS:  rval = status;
      REG_TBT_WORDS: rval = 32'(tbt_words);
      default:     rval = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      arm           <= 1'b0;
      rd_start      <= 1'b0;
      spi_cfg_start <= 1'b0;
      spi_host_req  <= 1'b0;
      spi_host_word <= '0;
      tbt_en        <= 1'b0;
      att_sel       <= '0;
      cap_len       <= CAP_LEN_RST;
      rd_addr       <= '0;
      rd_len        <= '0;
      ws            <= '0;
      we            <= CNT_W'(99);
      for (int i = 0; i < 4; i++) begin
        k[i] <= K_W'(1) << K_FRAC;
        b[i] <= '0;
      end
      reply_req     <= 1'b0;
      reply         <= '0;
    end else begin
      arm           <= 1'b0;
      rd_start      <= 1'b0;
      spi_cfg_start <= 1'b0;
      spi_host_req  <= 1'b0;
      if (reply_ack) reply_req <= 1'b0;
      if (cmd_valid && cmd.op == CMD_WRITE) begin
        unique casez (cmd.addr)
          REG_CTRL: begin
            arm           <= cmd.data[0];
            tbt_en        <= cmd.data[1];
            rd_start      <= cmd.data[2];
            spi_cfg_start <= cmd.data[3];
          end
          REG_ATT:     att_sel <= cmd.data[1:0];
          REG_CAP_LEN: cap_len <= cmd.data[LEN_W-1:0];
          REG_RD_ADDR: rd_addr <= cmd.data[LEN_W-1:0];
          REG_RD_LEN:  rd_len  <= cmd.data[LEN_W-1:0];
          REG_WS:      ws      <= cmd.data[CNT_W-1:0];
          REG_WE:      we      <= cmd.data[CNT_W-1:0];
          16'h0008, 16'h0009, 16'h000A, 16'h000B:
                       k[cmd.addr[1:0]] <= cmd.data[K_W-1:0];
          16'h000C, 16'h000D, 16'h000E, 16'h000F:
                       b[cmd.addr[1:0]] <= cmd.data[B_W-1:0];
          REG_SPI: begin
            spi_host_word <= cmd.data;
            spi_host_req  <= 1'b1;
          end
          default: ;
        endcase
      end
      if (cmd_valid && cmd.op == CMD_READ) begin
        reply     <= {CMD_READ, 8'h00, cmd.addr, rval};
        reply_req <= 1'b1;
      end
    end
  end
endmodule
