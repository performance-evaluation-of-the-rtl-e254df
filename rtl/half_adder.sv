// half_adder: one-bit half adder.
//
// Adds two bits of equal weight: s is their sum bit (XOR) and co the carry
// into the next weight (AND). It is the smallest counter of the compressor
// tree, used inside the 5-3, 7-4, 10-4 and 20-5 compressors, in the ripple
// chain of the parallel adder and for two-input product columns.
// Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b;
    co = a & b;
  end
endmodule
