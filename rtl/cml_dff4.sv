// cml_dff4: W-bit D flip-flop of the post-skewing block.
//
// The published part is a current-mode-logic D-F/F; its logic function, a
// rising-edge register, is what is modelled. q takes d at every rising edge
// of clk. The asynchronous active-low reset clearing q to 0 is this design's
// own addition (the source circuit has none shown).
module cml_dff4 #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

endmodule
