// acc_core: N/M pipelined M-bit accumulator stages.
//
// Stage 0 holds the least significant M bits. The registered carry out of
// stage i is the carry in of stage i+1, so a carry crosses one stage per
// clock and no carry path is longer than M full adders. The carry into stage
// 0 is 0. The registered carry out of the top stage (the phase wrap-around)
// is kept, as in the published stage, but nothing uses it, so lint reports
// that bit as unused. If stage i receives the FCW slices with i cycles of skew, the value
// of stage i at cycle n+i is bits M*i+M-1 .. M*i of the ideal N-bit phase
// accumulator at cycle n.
module acc_core #(
  parameter int unsigned N = pacc_pkg::PACC_N,
  parameter int unsigned M = pacc_pkg::PACC_M
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] fcw_skewed,
  output logic [N-1:0] sum
);

  localparam int unsigned S = pacc_pkg::num_stages(N, M);

  logic [S:0] carry;

  assign carry[0] = 1'b0;

  for (genvar i = 0; i < S; i++) begin : g_stage
    acc4 #(.M(M)) u_acc (
      .clk  (clk),
      .rst_n(rst_n),
      .fcw  (fcw_skewed[M*i +: M]),
      .ci   (carry[i]),
      .sum  (sum[M*i +: M]),
      .co   (carry[i+1])
    );
  end

endmodule
