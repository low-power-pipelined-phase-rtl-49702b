// load_signal_generator: sequential LD/HD pulses for the hybrid flip-flops.
//
// A chain of STAGES lsg_register cells. LOAD drives the first cell; the D
// output of cell i is LD(i) and feeds cell i+1; the H output of cell i is
// HD(i). A one-cycle LOAD pulse in cycle t therefore produces LD(i) high in
// cycle t+i, and HD(i) high from the middle of cycle t+i-1 to the end of cycle
// t+i (half a cycle ahead of LD(i), 1.5 cycles long). Chain structure and
// STAGES = 6 follow the published design; reset is this design's own choice.
module load_signal_generator #(
  parameter int unsigned STAGES = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  output logic [STAGES-1:0] ld,
  output logic [STAGES-1:0] hd
);

  logic [STAGES:0] chain;

  assign chain[0] = load;

  for (genvar i = 0; i < STAGES; i++) begin : g_reg
    lsg_register u_reg (
      .clk  (clk),
      .rst_n(rst_n),
      .in   (chain[i]),
      .d    (chain[i+1]),
      .h    (hd[i])
    );
  end

  assign ld = chain[STAGES:1];

endmodule
