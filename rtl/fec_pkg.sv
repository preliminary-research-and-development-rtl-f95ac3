// fec_pkg: types, constants and helper functions shared by the BPM front-end
// controller (FEC) readout FPGA.
//
// The sample rate (250 MHz), ADC resolution (14 bit), the 16-bit x 4-channel
// sample word, the 512-bit DDR3 user word and the 20 ms raw record follow the
// design description. The register map, the host command format, the UDP
// packet types and the Ethernet CRC helper are this design's own choices.
package fec_pkg;

  // ---------------- sizes ----------------
  localparam int unsigned ADC_W       = 14;   // ADC resolution
  localparam int unsigned SMP_W       = 16;   // sample slot in the 64-bit word
  localparam int unsigned N_CH        = 4;    // electrodes per BPM (A,B,C,D)
  localparam int unsigned RAW_W       = SMP_W * N_CH;   // 64
  localparam int unsigned DDR_W       = 512;  // MIG user data width
  localparam int unsigned DDR_ADDR_W  = 29;   // 4 GB / 8 byte per address unit
  // 20 ms at 250 MHz, 64 bit per sample word, 512 bit per DDR word:
  // 20e-3 * 250e6 * 64 / 512 = 625000
  localparam int unsigned CAP_WORDS_20MS = 625000;

  // Per-turn (turn-by-turn, TBT) result
  typedef struct packed {
    logic [31:0]        turn;    // turn counter since reset / TBT enable
    logic signed [15:0] x;       // X = dA/sA, Q1.15
    logic signed [15:0] y;       // Y = dB/sB, Q1.15
    logic signed [31:0] sum_x;   // window sum of A'+C'
    logic signed [31:0] sum_y;   // window sum of B'+D'
  } tbt_rec_t;                   // 128 bit

  // ---------------- host command (UDP payload) ----------------
  typedef enum logic [7:0] {
    CMD_WRITE = 8'h01,
    CMD_READ  = 8'h02
  } cmd_op_e;

  typedef struct packed {
    logic [7:0]  op;
    logic [7:0]  rsvd;
    logic [15:0] addr;
    logic [31:0] data;
  } host_cmd_t;                  // 64 bit, first byte on the wire = op

  // ---------------- register map ----------------
  localparam logic [15:0] REG_ID       = 16'h0000; // RO
  localparam logic [15:0] REG_CTRL     = 16'h0001; // [0] capture arm (pulse) [1] TBT enable
                                                   // [2] raw readout start (pulse) [3] SPI table start (pulse)
  localparam logic [15:0] REG_ATT      = 16'h0002; // [1:0] attenuator select
  localparam logic [15:0] REG_CAP_LEN  = 16'h0003; // capture length, 512-bit words
  localparam logic [15:0] REG_RD_ADDR  = 16'h0004; // readout start, 512-bit word index
  localparam logic [15:0] REG_RD_LEN   = 16'h0005; // readout length, 512-bit words
  localparam logic [15:0] REG_WS       = 16'h0006; // window start (samples after RF window edge)
  localparam logic [15:0] REG_WE       = 16'h0007; // window end (inclusive)
  localparam logic [15:0] REG_K0       = 16'h0008; // K of channel 0..3 at 0x08..0x0B
  localparam logic [15:0] REG_B0       = 16'h000C; // b of channel 0..3 at 0x0C..0x0F
  localparam logic [15:0] REG_SPI      = 16'h0010; // direct SPI word: [31:30] dev [29:25] nbits-1 [23:0] data
  localparam logic [15:0] REG_STATUS   = 16'h0011; // RO
  localparam logic [15:0] REG_TBT_WORDS = 16'h0012; // RO: 512-bit TBT words in DDR3 since TBT enable
  localparam logic [23:0] TBT_BASE_WORD = 24'h80_0000; // DDR3 word index of the TBT region (512 MB)
  localparam logic [31:0] FEC_ID       = 32'hC5B0_0001;

  // ---------------- UDP payload types ----------------
  localparam logic [7:0] PKT_REPLY = 8'hA0;
  localparam logic [7:0] PKT_TBT   = 8'hB0;
  localparam logic [7:0] PKT_RAW   = 8'hC0;

  // Gain/offset format: K is signed Q2.16 (1.0 = 65536), b in ADC counts.
  localparam int unsigned K_W    = 18;
  localparam int unsigned K_FRAC = 16;
  localparam int unsigned B_W    = 16;

  // Ethernet CRC-32 (IEEE 802.3, reflected, polynomial 0xEDB88320), one byte.
  function automatic logic [31:0] crc32_byte(input logic [31:0] crc, input logic [7:0] d);
    logic [31:0] c;
    c = crc;
    for (int i = 0; i < 8; i++) begin
      if (c[0] ^ d[i]) c = (c >> 1) ^ 32'hEDB8_8320;
      else             c = c >> 1;
    end
    return c;
  endfunction

  // Register value left after running the CRC over a frame and its own FCS.
  localparam logic [31:0] CRC32_RESIDUE = 32'hDEBB_20E3;

endpackage
