// compressor_10_4: counts the ones among ten bits.
//
// Interface: x[9:0] are X9..X0, all of the same weight; o[3:0] is the count
// {O4,O3,O2,O1} (O1 least significant), 0 to 10.
//
// Structure (as published: two 5-3 compressors, two full adders, one half
// adder): one 5-3 compressor counts X0..X4 into r[2:0], the other X5..X9
// into l[2:0]. The two three-bit counts are added by a ripple chain: a half
// adder on the weight-1 bits (O1), a full adder on the weight-2 bits and that
// carry (O2), a full adder on the weight-4 bits and that carry (O3, O4).
// Purely combinational.
module compressor_10_4 (
  input  logic [9:0] x,
  output logic [3:0] o
);
  logic [2:0] r, l;
  logic       c1, c2;

  compressor_5_3 u_c53_lo (.x(x[4:0]), .o(r));
  compressor_5_3 u_c53_hi (.x(x[9:5]), .o(l));

  half_adder u_ha (.a(r[0]), .b(l[0]), .s(o[0]), .co(c1));
  full_adder u_fa1 (.a(r[1]), .b(l[1]), .ci(c1), .s(o[1]), .co(c2));
  full_adder u_fa2 (.a(r[2]), .b(l[2]), .ci(c2), .s(o[2]), .co(o[3]));
endmodule
