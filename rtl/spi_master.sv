// spi_master: SPI master used to configure the ADC, the clock PLL and the
// programmable amplifier.
//
// Mode 0 (clock idle low, data changed on the falling edge and sampled on the
// rising edge), most significant bit first, one frame of 1..MAX_BITS bits per
// request. The word to send is right-aligned in data (bit nbits-1 goes out
// first). One chip select per device, active low, framed around the whole
// transfer with half a clock period of set-up and hold. MISO is sampled on
// each rising edge so that register read-back frames return data in rdata.
//
// Interface: clk, rst_n, start (accepted while busy is low), dev (chip select
// index), nbits (frame length), data; busy, done (one-clock pulse), rdata;
// sclk, mosi, miso, cs_n.
// Timing: a frame of n bits takes (2n + 2) * HALF clocks from start to done;
// sclk runs at clk / (2 * HALF) (15.6 MHz for a 125 MHz clock and HALF = 4).
// Following the document: SPI controller for amplifier, ADC and PLL
// configuration. Own choices: mode 0, frame length per request, clock divider.
module spi_master #(
  parameter int unsigned HALF     = 4,
  parameter int unsigned MAX_BITS = 32,
  parameter int unsigned N_CS     = 3
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [$clog2(N_CS)-1:0]      dev,
  input  logic [$clog2(MAX_BITS+1)-1:0] nbits,
  input  logic [MAX_BITS-1:0]          data,
  output logic                         busy,
  output logic                         done,
  output logic [MAX_BITS-1:0]          rdata,
  output logic                         sclk,
  output logic                         mosi,
  input  logic                         miso,
  output logic [N_CS-1:0]              cs_n
);
  localparam int unsigned DW = $clog2(HALF + 1);
  localparam int unsigned BW = $clog2(MAX_BITS + 1);

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_SHIFT, S_HOLD} st_e;
  st_e                 st;
  logic [DW-1:0]       div;
  logic [BW-1:0]       left;
  logic [MAX_BITS-1:0] sh;
  logic                tick;

  assign tick = (div == DW'(HALF - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= S_IDLE;
      div   <= '0;
      left  <= '0;
      sh    <= '0;
      sclk  <= 1'b0;
      mosi  <= 1'b0;
      cs_n  <= '1;
      busy  <= 1'b0;
      done  <= 1'b0;
      rdata <= '0;
    end else begin
      done <= 1'b0;
      div  <= tick ? '0 : div + 1'b1;
      unique case (st)
        S_IDLE: begin
          div <= '0;
          if (start && nbits != '0) begin
            st        <= S_SETUP;
            busy      <= 1'b1;
            left      <= nbits;
            sh        <= data << (MAX_BITS - 32'(nbits));
            mosi      <= data[$clog2(MAX_BITS)'(nbits - 1'b1)];
            cs_n      <= '1;
            cs_n[dev] <= 1'b0;
            rdata     <= '0;
          end
        end
        S_SETUP: if (tick) st <= S_SHIFT;
        S_SHIFT: if (tick) begin
          sclk <= ~sclk;
          if (!sclk) begin                      // rising edge: sample
            rdata <= {rdata[MAX_BITS-2:0], miso};
            sh    <= sh << 1;
            left  <= left - 1'b1;
          end else begin                        // falling edge: next bit
            if (left == '0) st <= S_HOLD;
            else            mosi <= sh[MAX_BITS-1];
          end
        end
        S_HOLD: if (tick) begin
          st   <= S_IDLE;
          cs_n <= '1;
          busy <= 1'b0;
          done <= 1'b1;
          mosi <= 1'b0;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
