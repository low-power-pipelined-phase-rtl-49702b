// cmos_dff4: W-bit static CMOS D flip-flop of the first pre-skewing column.
//
// When a new frequency control word arrives, LOAD is raised for one cycle and
// this register captures its W-bit slice of the word at the next rising edge
// of clk; between updates it holds the value so that the hybrid flip-flops
// behind it can take it one stage per cycle. LOAD acts as a synchronous load
// enable here (how LOAD gates the static flip-flop is not specified by the
// source circuit). The asynchronous active-low reset to 0 is this design's
// own choice.
module cmos_dff4 #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end

endmodule
