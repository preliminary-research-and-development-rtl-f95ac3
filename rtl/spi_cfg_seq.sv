// spi_cfg_seq: configuration sequencer with the register configuration table.
//
// On cfg_start the sequencer walks a table of SPI frames, one after the
// other, through spi_master: each entry names the device (0 = ADC, 1 = clock
// PLL, 2 = programmable amplifier), the frame length and the frame bits. When
// the table is idle, a single frame requested by the host (host_req with
// host_word = {dev[1:0], nbits-1[4:0], 1'b0, data[23:0]}) is sent instead,
// which is how the amplifier gain is changed at run time.
//
// The entries below are placeholders in the devices' usual format
// (16-bit address/data frames for the ADC and the amplifier, 24-bit frames for
// the PLL); the real values come from the chosen parts' data sheets.
//
// Interface: clk, rst_n, cfg_start, host_req/host_word, busy, done_cnt
// (number of frames sent since reset), spi_* towards spi_master.
// Timing: one frame after the other, one idle clock between frames.
// Following the document: an ADC register configuration table feeding the SPI
// controller, SPI configuration of amplifier, ADC and PLL. Own choices: the
// entry format, the table contents, the host path.
module spi_cfg_seq #(
  parameter int unsigned N_ENT = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_start,
  input  logic        host_req,
  input  logic [31:0] host_word,
  output logic        busy,
  output logic [15:0] done_cnt,
  // towards spi_master
  output logic        spi_start,
  output logic [1:0]  spi_dev,
  output logic [5:0]  spi_nbits,
  output logic [31:0] spi_data,
  input  logic        spi_busy,
  input  logic        spi_done
);
  typedef struct packed {
    logic [1:0]  dev;
    logic [5:0]  nbits;
    logic [23:0] data;
  } entry_t;

  function automatic entry_t table_entry(input int unsigned i);
    unique case (i)
      0:       return '{dev: 2'd0, nbits: 6'd16, data: 24'h00_0001}; // ADC: software reset
      1:       return '{dev: 2'd0, nbits: 6'd16, data: 24'h00_0100}; // ADC: output format
      2:       return '{dev: 2'd0, nbits: 6'd16, data: 24'h00_0200}; // ADC: LVDS DDR mode
      3:       return '{dev: 2'd1, nbits: 6'd24, data: 24'h00_1234}; // PLL: reference divider
      4:       return '{dev: 2'd1, nbits: 6'd24, data: 24'h01_5678}; // PLL: 250 MHz output
      default: return '{dev: 2'd2, nbits: 6'd16, data: 24'h00_0200}; // AMP: gain
    endcase
  endfunction

  localparam int unsigned IW = $clog2(N_ENT + 1);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} st_e;
  st_e           st;
  logic [IW-1:0] idx;
  logic          table_run;
  entry_t        cur;
  logic          host_pend;
  logic [31:0]   host_q;

  assign busy = (st != S_IDLE) || host_pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      idx       <= '0;
      table_run <= 1'b0;
      cur       <= '0;
      host_pend <= 1'b0;
      host_q    <= '0;
      done_cnt  <= '0;
      spi_start <= 1'b0;
      spi_dev   <= '0;
      spi_nbits <= '0;
      spi_data  <= '0;
    end else begin
      spi_start <= 1'b0;
      if (host_req) begin
        host_pend <= 1'b1;
        host_q    <= host_word;
      end
      unique case (st)
        S_IDLE: begin
          if (cfg_start) begin
            table_run <= 1'b1;
            idx       <= '0;
            cur       <= table_entry(0);
            st        <= S_ISSUE;
          end else if (host_pend) begin
            host_pend <= 1'b0;
            table_run <= 1'b0;
            cur       <= '{dev: host_q[31:30], nbits: 6'(host_q[29:25]) + 6'd1,
                           data: host_q[23:0]};
            st        <= S_ISSUE;
          end
        end
        S_ISSUE: if (!spi_busy) begin
          spi_start <= 1'b1;
          spi_dev   <= cur.dev;
          spi_nbits <= cur.nbits;
          spi_data  <= 32'(cur.data);
          st        <= S_WAIT;
        end
        S_WAIT: if (spi_done) begin
          done_cnt <= done_cnt + 16'd1;
          if (table_run && (32'(idx) + 1 < N_ENT)) begin
            idx <= idx + 1'b1;
            cur <= table_entry(32'(idx) + 1);
            st  <= S_ISSUE;
          end else begin
            table_run <= 1'b0;
            st        <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
