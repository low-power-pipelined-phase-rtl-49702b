// acc4: one M-bit pipelined accumulator stage.
//
// An M-bit ripple adder built from full_adder cells adds the stage's FCW
// slice, the stage's own registered sum and the registered carry of the stage
// below. At each rising edge of clk the M-bit sum register (sum) and the
// one-bit carry register (co) take the adder's sum and carry out. The carry
// out thus reaches the stage above one cycle later, which is what the
// skewing blocks compensate. Structure follows the published 4-bit ACC
// (4-bit full adder, 4-bit sum F/F, 1-bit carry F/F); reset to 0 is this
// design's own choice.
module acc4 #(
  parameter int unsigned M = pacc_pkg::PACC_M
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-1:0] fcw,
  input  logic         ci,
  output logic [M-1:0] sum,
  output logic         co
);

  logic [M:0]   c;
  logic [M-1:0] s;

  assign c[0] = ci;

  for (genvar b = 0; b < M; b++) begin : g_fa
    full_adder u_fa (
      .a (fcw[b]),
      .b (sum[b]),
      .ci(c[b]),
      .s (s[b]),
      .co(c[b+1])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum <= '0;
      co  <= 1'b0;
    end else begin
      sum <= s;
      co  <= c[M];
    end
  end

endmodule
