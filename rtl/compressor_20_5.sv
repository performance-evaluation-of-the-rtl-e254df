// compressor_20_5: counts the ones among twenty bits.
//
// Interface: x[19:0] are X19..X0, all of the same weight; o[4:0] is the
// count, o[0] least significant, 0 to 20.
//
// Structure: built from the published parts list (one 15-4 compressor, one
// 5-3 compressor, two full adders, two half adders); how they are joined is
// this design's choice. The 15-4 counts X0..X14 into p[3:0], the 5-3 counts
// X15..X19 into q[2:0], and a ripple chain adds the two counts: half adder
// on bit 0, full adders on bits 1 and 2, half adder on p[3] and the carry,
// whose carry is o[4]. Purely combinational.
module compressor_20_5 (
  input  logic [19:0] x,
  output logic [4:0]  o
);
  logic [3:0] p;
  logic [2:0] q;
  logic [3:1] c;

  compressor_15_4 u_c154 (.x(x[14:0]),  .o(p));
  compressor_5_3  u_c53  (.x(x[19:15]), .o(q));

  half_adder u_ha0 (.a(p[0]), .b(q[0]),           .s(o[0]), .co(c[1]));
  full_adder u_fa1 (.a(p[1]), .b(q[1]), .ci(c[1]), .s(o[1]), .co(c[2]));
  full_adder u_fa2 (.a(p[2]), .b(q[2]), .ci(c[2]), .s(o[2]), .co(c[3]));
  half_adder u_ha3 (.a(p[3]), .b(c[3]),           .s(o[3]), .co(o[4]));
endmodule
