// pacc_pkg: shared sizes of the pipelined phase accumulator.
//
// The accumulator is N bits wide and is cut into N/M pipeline stages of M
// bits; the phase output is the upper K bits. The defaults (24, 12, 4) are
// the sizes of the published design. The helper functions derive the stage
// counts that the blocks need, so that every block uses the same arithmetic.
package pacc_pkg;

  localparam int unsigned PACC_N = 24;  // FCW / accumulator width
  localparam int unsigned PACC_K = 12;  // truncated phase output width
  localparam int unsigned PACC_M = 4;   // bits per pipeline stage

  // Number of M-bit pipeline stages in an N-bit accumulator.
  function automatic int unsigned num_stages(int unsigned n, int unsigned m);
    return n / m;
  endfunction

  // Number of stages that contribute to the K-bit phase output.
  function automatic int unsigned num_out_stages(int unsigned k, int unsigned m);
    return k / m;
  endfunction

endpackage
