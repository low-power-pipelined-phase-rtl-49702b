// pacc_top: low-power pipelined phase accumulator with sequential pre-skewing.
//
// The phase accumulator of a direct digital frequency synthesizer adds the
// N-bit frequency control word (FCW) to its phase every clock and outputs the
// upper K bits. To run at multi-GHz clocks the accumulator is pipelined into
// N/M stages of M bits (acc_core), each passing its carry to the next stage
// through a register. The stages therefore work on skewed samples: the FCW
// must reach stage i one cycle after stage i-1 (pre_skewing) and the output
// stages must be re-aligned (post_skewing).
//
// The pre-skewing here is the low-power sequential-loading scheme: a new FCW
// is announced by a one-cycle LOAD pulse and captured by one column of static
// CMOS flip-flops; the load_signal_generator then sends LD(i)/HD(i) pulses up
// a register chain so that the hybrid flip-flop of stage i takes its slice in
// cycle t+1+i. Between updates nothing in the pre-skewing block toggles.
//
// Interface and timing (all relative to rising edges of clk):
//   load high in cycle t, fcw valid in cycle t
//   -> stage 0 first adds the new FCW at edge t+3, stage i at edge t+3+i
//   -> phase after edge e equals bits N-1..N-K of the ideal accumulator
//      P(e-(S-1)), where P(e) = P(e-1) + FCW seen by stage 0 at edge e and
//      S = N/M. With the defaults the new word first shows in the phase
//      slope at edge t+8.
// load must not be asserted again within S cycles of the previous pulse
// (the column must hold one word until the last stage has taken it); an
// assertion checks this. ld and hd are brought out for observation.
//
// The block structure, sizes and the LD/HD sequencing follow the published
// design; the single clock (the published CMOS to CML clock converter is a
// level shifter), the reset and the LOAD spacing rule are this design's own.
module pacc_top #(
  parameter int unsigned N = pacc_pkg::PACC_N,
  parameter int unsigned K = pacc_pkg::PACC_K,
  parameter int unsigned M = pacc_pkg::PACC_M
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  logic [N-1:0]   fcw,
  output logic [K-1:0]   phase,
  output logic [N/M-1:0] ld,
  output logic [N/M-1:0] hd
);

  localparam int unsigned S = pacc_pkg::num_stages(N, M);

  logic [N-1:0] fcw_skewed;
  logic [N-1:0] sum;

  load_signal_generator #(.STAGES(S)) u_lsg (
    .clk  (clk),
    .rst_n(rst_n),
    .load (load),
    .ld   (ld),
    .hd   (hd)
  );

  pre_skewing #(.N(N), .M(M)) u_pre (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (load),
    .fcw       (fcw),
    .ld        (ld),
    .hd        (hd),
    .fcw_skewed(fcw_skewed)
  );

  acc_core #(.N(N), .M(M)) u_core (
    .clk       (clk),
    .rst_n     (rst_n),
    .fcw_skewed(fcw_skewed),
    .sum       (sum)
  );

  post_skewing #(.N(N), .K(K), .M(M)) u_post (
    .clk  (clk),
    .rst_n(rst_n),
    .sum  (sum),
    .phase(phase)
  );

  // A new LOAD may only come once every slice of the previous word is loaded:
  // LD(0..S-2) still pending means the column is still being read.
  a_load_spacing: assert property (@(posedge clk) disable iff (!rst_n)
                                   load |-> (ld[S-2:0] == '0))
    else $error("pacc_top: LOAD asserted again within %0d cycles", S);

  initial begin
    assert (N % M == 0 && K % M == 0 && K <= N && S >= 2)
      else $fatal(1, "pacc_top: N and K must be multiples of M, K <= N, N/M >= 2");
  end

endmodule
