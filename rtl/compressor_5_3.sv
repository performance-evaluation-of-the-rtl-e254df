// compressor_5_3: counts the ones among five bits.
//
// Interface: x[4:0] are the inputs X4..X0, all of the same weight; o[2:0] is
// the count {O3,O2,O1} (O1 the least significant bit), 0 to 5.
//
// Two structures are available through MUX_BASED:
//  * MUX_BASED = 1 (default, the "modified" compressor): the outputs come
//    from three 4:1 multiplexers, one per output bit, all selected by
//    {X4,X3}. Their data inputs depend only on X0..X2, so they are ready
//    while X3/X4 are still settling, and the late inputs pass through one
//    multiplexer only. With p = parity(X0..X2), m = majority(X0..X2) and
//    t = X0&X1&X2, the count is c3 + c34 where c34 = X3 + X4:
//        select  c34   O1    O2           O3
//          00     0    p     m            0
//          01     1    ~p    (X0|X1|X2)&~t t
//          10     1    ~p    (X0|X1|X2)&~t t
//          11     2    p     ~m           m
//    The multiplexer arrangement and the constant-zero input of the O3
//    multiplexer follow the published modified design; the data-input
//    functions above are derived here from the count.
//  * MUX_BASED = 0 (the "traditional" compressor): a full adder on X0..X2
//    and a half adder on X3,X4; a second half adder adds their sum bits (O1)
//    and a second full adder adds the three carries (O2, O3).
// Purely combinational.
module compressor_5_3 #(
  parameter bit MUX_BASED = 1'b1
) (
  input  logic [4:0] x,
  output logic [2:0] o
);
  if (MUX_BASED) begin : g_mux
    logic       p, m, t, one_or_two;
    logic [3:0] d1, d2, d3;   // data inputs of the O1, O2, O3 multiplexers
    logic [1:0] sel;

    always_comb begin
      p          = x[0] ^ x[1] ^ x[2];
      m          = (x[0] & x[1]) | (x[0] & x[2]) | (x[1] & x[2]);
      t          = x[0] & x[1] & x[2];
      one_or_two = (x[0] | x[1] | x[2]) & ~t;
      sel        = {x[4], x[3]};
      d1         = {p, ~p, ~p, p};
      d2         = {~m, one_or_two, one_or_two, m};
      d3         = {m, t, t, 1'b0};
      o          = {d3[sel], d2[sel], d1[sel]};
    end
  end else begin : g_adders
    logic s_fa, c_fa, s_ha, c_ha, c_ha2;

    full_adder u_fa0 (.a(x[0]), .b(x[1]), .ci(x[2]), .s(s_fa), .co(c_fa));
    half_adder u_ha0 (.a(x[3]), .b(x[4]), .s(s_ha), .co(c_ha));
    half_adder u_ha1 (.a(s_fa), .b(s_ha), .s(o[0]), .co(c_ha2));
    full_adder u_fa1 (.a(c_fa), .b(c_ha), .ci(c_ha2), .s(o[1]), .co(o[2]));
  end
endmodule
