// full_adder: one-bit full adder of the accumulator stages.
//
// In the published circuit the carry and sum are two separate differential
// cascode voltage switch logic (DCVSL) networks sharing the inputs A, B and
// C_I. Only their logic function is kept here: C_O is the majority of the
// three inputs and S their exclusive OR. Purely combinational, no timing of
// its own; differential signal pairs are represented by single bits.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end

endmodule
