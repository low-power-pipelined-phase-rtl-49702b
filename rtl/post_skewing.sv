// post_skewing: alignment of the upper K bits of the pipelined accumulator.
//
// The top K/M stage sums of acc_core are skewed by one cycle per stage. The
// top stage goes to the output unchanged; each stage below it passes through
// one more M-bit register (cml_dff4), so stage S-1-j is delayed by j cycles.
// All K output bits then belong to the same accumulator sample, which lags
// the bottom stage by S-1 cycles. For K = 12, M = 4 this is 0, 1 and 2
// registers, 12 flip-flops in total, as in the published block. The lower
// N-K stage sums are truncated: those input bits are intentionally unused,
// so a lint tool's unused-signal warning on sum is expected.
module post_skewing #(
  parameter int unsigned N = pacc_pkg::PACC_N,
  parameter int unsigned K = pacc_pkg::PACC_K,
  parameter int unsigned M = pacc_pkg::PACC_M
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] sum,
  output logic [K-1:0] phase
);

  localparam int unsigned S  = pacc_pkg::num_stages(N, M);
  localparam int unsigned SO = pacc_pkg::num_out_stages(K, M);

  // j = 0 is the top stage (no delay), j = SO-1 the lowest output stage.
  for (genvar j = 0; j < SO; j++) begin : g_out
    localparam int unsigned STG = S - 1 - j;  // accumulator stage index
    logic [M-1:0] dl [j+1];                   // dl[0] = stage sum, dl[j] = delayed

    assign dl[0] = sum[M*STG +: M];

    for (genvar k = 0; k < j; k++) begin : g_dly
      cml_dff4 #(.W(M)) u_dff (
        .clk  (clk),
        .rst_n(rst_n),
        .d    (dl[k]),
        .q    (dl[k+1])
      );
    end

    assign phase[K-1-M*j -: M] = dl[j];
  end

endmodule
