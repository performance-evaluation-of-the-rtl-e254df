// compressor_7_4: counts the ones among seven bits.
//
// Interface: x[6:0] are X6..X0, all of the same weight; o[3:0] is the count
// {O4,O3,O2,O1} (O1 least significant), 0 to 7, so O4 is always 0; it is
// kept because the published block has a four-bit result.
//
// Structure (as published): a 5-3 compressor counts X0..X4 into q[2:0]; X5
// and X6 are reduced to a sum bit X5^X6 (weight 1) and a carry X5&X6
// (weight 2). A half adder adds q[0] and X5^X6 (O1), a full adder adds q[1],
// X5&X6 and that carry (O2), a half adder adds q[2] and the full adder's
// carry (O3, O4). Purely combinational.
module compressor_7_4 (
  input  logic [6:0] x,
  output logic [3:0] o
);
  logic [2:0] q;
  logic       x56_s, x56_c, c1, c2;

  compressor_5_3 u_c53 (.x(x[4:0]), .o(q));

  assign x56_s = x[5] ^ x[6];
  assign x56_c = x[5] & x[6];

  half_adder u_ha1 (.a(q[0]), .b(x56_s), .s(o[0]), .co(c1));
  full_adder u_fa2 (.a(q[1]), .b(x56_c), .ci(c1), .s(o[1]), .co(c2));
  half_adder u_ha3 (.a(q[2]), .b(c2), .s(o[2]), .co(o[3]));
endmodule
