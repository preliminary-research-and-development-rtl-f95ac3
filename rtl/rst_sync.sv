// rst_sync: reset synchroniser. Assertion is asynchronous, release is
// synchronised to clk through two flops, so every flop of a clock domain
// leaves reset on the same edge.
// Interface: clk, arst_n (asynchronous, active low), rst_n (synchronised).
// Timing: rst_n rises on the second clk edge after arst_n rises.
module rst_sync (
  input  logic clk,
  input  logic arst_n,
  output logic rst_n
);
  logic s1;
  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) {rst_n, s1} <= 2'b00;
    else         {rst_n, s1} <= {s1, 1'b1};
  end
endmodule
