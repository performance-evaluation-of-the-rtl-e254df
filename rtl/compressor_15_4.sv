// compressor_15_4: counts the ones among fifteen bits.
//
// Interface: x[14:0] are X14..X0, all of the same weight; o[3:0] is the count
// {O3,O2,O1,O0} (O0 least significant), 0 to 15.
//
// Structure (as published: five full adders, two 5-3 compressors, one 4-bit
// parallel adder): full adders count the triples (X0..X2), (X3..X5),
// (X6..X8), (X9..X11) and (X12..X14). Their five sum bits have weight 1 and
// are counted by one 5-3 compressor into B2 B1 B0; their five carries have
// weight 2 and are counted by the other into A3 A2 A1. The parallel adder
// adds {A3,A2,A1,A0} and {B3,B2,B1,B0} with A0 and B3 tied to 0. Its carry
// out is always 0 (the count never exceeds 15) and is not used.
// Purely combinational.
module compressor_15_4 (
  input  logic [14:0] x,
  output logic [3:0]  o
);
  logic [4:0] fa_s, fa_c;
  logic [3:1] a_hi;   // A3..A1
  logic [2:0] b_lo;   // B2..B0
  logic       co_unused;

  for (genvar i = 0; i < 5; i++) begin : g_fa
    full_adder u_fa (.a(x[3*i]), .b(x[3*i+1]), .ci(x[3*i+2]), .s(fa_s[i]), .co(fa_c[i]));
  end

  compressor_5_3 u_c53_a (.x(fa_c), .o(a_hi));
  compressor_5_3 u_c53_b (.x(fa_s), .o(b_lo));

  parallel_adder_4 #(.W(4)) u_add (
    .a ({a_hi, 1'b0}),
    .b ({1'b0, b_lo}),
    .s (o),
    .co(co_unused)
  );
endmodule
