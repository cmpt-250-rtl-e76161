// flip_flop -- one bit of storage with a clock enable.
//
// On a rising clock edge the bit takes d when en is 1 and keeps its value otherwise;
// rst (synchronous, active high) clears it. q is the stored bit.
// Interface: clk, rst, en, d in; q out. Timing: q changes one clock edge after en/d.
// The clock-enabled storage bit is the lecture's; the reset is this design's own choice.
// The optional tri-state output buffer is left out: on-chip buses here are multiplexed.
module flip_flop (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic d,
  output logic q
);
  always_ff @(posedge clk) begin
    if (rst)     q <= 1'b0;
    else if (en) q <= d;
  end
endmodule
