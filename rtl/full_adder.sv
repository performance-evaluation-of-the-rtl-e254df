// full_adder: one-bit full adder.
//
// Counts three bits of equal weight: s is the parity of a, b and ci and co
// is 1 when at least two of them are 1. It is the three-input counter used in
// the 5-3 (traditional form), 7-4, 10-4, 15-4 and 20-5 compressors, in the
// parallel adder and for three-input product columns.
// Purely combinational.
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
