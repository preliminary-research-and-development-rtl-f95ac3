// pulse_sync: carries a one-cycle pulse from one clock domain to another.
//
// The source pulse flips a toggle flop; the destination synchronises the
// toggle through two flops and emits a one-cycle pulse on each change.
// Pulses must be at least three destination clocks apart.
// Interface: src_clk/src_rst_n/src_pulse, dst_clk/dst_rst_n/dst_pulse.
// Timing: dst_pulse follows src_pulse by two to three destination clocks.
module pulse_sync (
  input  logic src_clk,
  input  logic src_rst_n,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst_n,
  output logic dst_pulse
);
  logic       tog;
  logic [2:0] s;

  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n)    tog <= 1'b0;
    else if (src_pulse) tog <= ~tog;
  end

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) s <= '0;
    else            s <= {s[1:0], tog};
  end

  assign dst_pulse = s[2] ^ s[1];
endmodule
