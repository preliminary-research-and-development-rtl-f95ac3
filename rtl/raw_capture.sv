// raw_capture: T0-triggered gate that selects the 20 ms raw ADC record.
//
// After an arm request the gate waits for the next rising edge of the
// (synchronised) T0 timing signal and then passes exactly cap_len x 8 sample
// words (cap_len 512-bit DDR3 words) to the DDR3 path. The default length of
// 625000 DDR3 words is 20 ms of four 16-bit channels at 250 MHz.
//
// Interface (system clock): arm (one-cycle pulse), t0 (asynchronous level),
// cap_len, smp_in/smp_valid in; smp_out/smp_out_valid out; flush is a
// one-cycle pulse on arm so the packer starts on a 512-bit boundary; busy is
// high from arm until the last word has passed, done from then until the next
// arm.
// Timing: the first passed sample is the one valid two clocks after T0 rises.
// Following the document: 20 ms record per acceleration cycle, T0 as the
// timing input of each FEC. Own choices: arm-then-trigger sequence, length
// register, the two-flop synchroniser.
module raw_capture #(
  parameter int unsigned LEN_W = 24
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             arm,
  input  logic             t0,
  input  logic [LEN_W-1:0] cap_len,
  input  logic [63:0]      smp_in,
  input  logic             smp_valid,
  output logic [63:0]      smp_out,
  output logic             smp_out_valid,
  output logic             flush,
  output logic             busy,
  output logic             done
);
  typedef enum logic [1:0] {IDLE, ARMED, RUN} state_e;
  state_e           st;
  logic [2:0]       t0_s;
  logic             t0_rise;
  logic [LEN_W+2:0] left;

  assign t0_rise = t0_s[1] & ~t0_s[2];
  assign busy    = (st != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st            <= IDLE;
      t0_s          <= '0;
      left          <= '0;
      smp_out       <= '0;
      smp_out_valid <= 1'b0;
      flush         <= 1'b0;
      done          <= 1'b0;
    end else begin
      t0_s          <= {t0_s[1:0], t0};
      flush         <= 1'b0;
      smp_out_valid <= 1'b0;
      if (arm) begin
        st    <= ARMED;
        flush <= 1'b1;
        done  <= 1'b0;
      end else begin
        unique case (st)
          IDLE:  ;
          ARMED: if (t0_rise) begin
                   st   <= (cap_len == '0) ? IDLE : RUN;
                   done <= (cap_len == '0);
                   left <= {cap_len, 3'b000};
                 end
          RUN:   if (smp_valid) begin
                   smp_out       <= smp_in;
                   smp_out_valid <= 1'b1;
                   left          <= left - 1'b1;
                   if (left == (LEN_W+3)'(1)) begin
                     st   <= IDLE;
                     done <= 1'b1;
                   end
                 end
          default: st <= IDLE;
        endcase
      end
    end
  end
endmodule
