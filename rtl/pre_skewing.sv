// pre_skewing: sequential-loading pre-skewing block.
//
// A pipelined accumulator needs stage i to see a new frequency control word
// (FCW) one cycle after stage i-1, matching the one-cycle carry delay between
// stages. Instead of a triangle of delay flip-flops, this block holds the FCW
// in one column of N/M static CMOS M-bit flip-flops (cmos_dff4, loaded by
// LOAD) and hands each M-bit slice to its stage through a CMOS-CML hybrid
// flip-flop (hybrid_ff4) that is loaded only when LD(i) is high, one stage per
// cycle. Slice i (bits M*i+M-1 .. M*i, stage i = 0 at the bottom) uses LD(i),
// HD(i).
//
// Timing: LOAD high in cycle t -> CMOS column holds the FCW from edge t+1 ->
// slice i appears on fcw_skewed at edge t+2+i. LOAD must not be raised again
// until every slice has been taken (N/M cycles); the top level checks this.
module pre_skewing #(
  parameter int unsigned N = pacc_pkg::PACC_N,
  parameter int unsigned M = pacc_pkg::PACC_M
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic [N-1:0]        fcw,
  input  logic [N/M-1:0]      ld,
  input  logic [N/M-1:0]      hd,
  output logic [N-1:0]        fcw_skewed
);

  localparam int unsigned S = pacc_pkg::num_stages(N, M);

  logic [N-1:0] fcw_held;

  for (genvar i = 0; i < S; i++) begin : g_stage
    cmos_dff4 #(.W(M)) u_cmos (
      .clk  (clk),
      .rst_n(rst_n),
      .load (load),
      .d    (fcw[M*i +: M]),
      .q    (fcw_held[M*i +: M])
    );

    hybrid_ff4 #(.W(M)) u_hyb (
      .clk  (clk),
      .rst_n(rst_n),
      .ld   (ld[i]),
      .hd   (hd[i]),
      .d    (fcw_held[M*i +: M]),
      .q    (fcw_skewed[M*i +: M])
    );
  end

endmodule
