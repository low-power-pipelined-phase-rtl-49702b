// hybrid_ff4: W-bit CMOS-CML hybrid flip-flop of the pre-skewing block.
//
// The circuit is a static CMOS master latch, opened by the loading signal LD,
// followed by a level-converting CML slave latch clocked by the CML clock.
// The slave has two tail current sources, a large one for tracking and a small
// one for latching, and both are switched on only while the holding signal HD
// is high. HD rises half a clock before LD and lasts 1.5 cycles, so the
// tracking current is settled when LD arrives and no static current flows for
// the many cycles in which the frequency word does not change.
//
// Logically the cell is a D flip-flop with load enable: at the rising edge of
// clk that follows the cycle in which LD is high, q takes d and then holds it.
// The current-source switching has no logic meaning; the only logic effect of
// HD kept here is that an unpowered slave (HD low) cannot take a new value, so
// the update needs LD and HD both high. The assertion states the rule the load
// signal generator guarantees: LD is never high at an edge without HD.
// Differential pairs (FCW_P/N, D_P/N, V_OP/ON) are single bits here. The
// asynchronous active-low reset to 0 is this design's own choice.
module hybrid_ff4 #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ld,
  input  logic         hd,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          q <= '0;
    else if (ld && hd)   q <= d;
  end

  // LD must always be covered by HD (the tracking current source is on).
  a_ld_within_hd: assert property (@(posedge clk) disable iff (!rst_n) ld |-> hd)
    else $error("hybrid_ff4: LD high without HD");

endmodule
