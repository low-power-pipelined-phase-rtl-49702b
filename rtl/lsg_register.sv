// lsg_register: one cell of the load signal generator chain.
//
// Two latches in series form a rising-edge D flip-flop: the first latch is
// transparent while clk is low, the second while clk is high. D is the output
// of the second latch, i.e. the input delayed by one clock cycle, and is used
// as the loading signal LD. H is the OR of the two latch outputs and is used
// as the holding signal HD. Because the first latch already follows the input
// during the low half of the cycle before the edge, H rises half a clock
// before D and, for a one-cycle input pulse, stays high for 1.5 cycles.
//
// The latch/latch/OR structure follows the published cell; which clock phase
// opens which latch is this design's reading, chosen because it is the one
// that yields the stated half-cycle lead and 1.5-cycle width of HD.
//
// The first latch is an intended level-sensitive latch (always_latch); the
// latch warning the tools print for it is expected. The second latch is
// written as a rising-edge register, which is what the transparent-high latch
// behind a transparent-low latch amounts to. Asynchronous active-low reset to
// 0 is this design's own choice.
module lsg_register (
  input  logic clk,
  input  logic rst_n,
  input  logic in,
  output logic d,
  output logic h
);

  logic l1;  // first latch, transparent while clk is low

  always_latch begin
    if (!rst_n)    l1 = 1'b0;
    else if (!clk) l1 = in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) d <= 1'b0;
    else        d <= l1;
  end

  assign h = l1 | d;

endmodule
