// parallel_adder_4: W-bit (default 4) ripple-carry adder.
//
// Adds the words a and b and gives the W-bit sum s and the carry out co.
// Bit 0 is a half adder, every higher bit a full adder fed by the carry of
// the bit below. The 15-4 compressor uses it to add the counts of its two
// 5-3 compressors. Only its name and width are given for this adder; the
// ripple structure is this design's choice, the simplest that adds.
// Purely combinational; the delay grows with W.
module parallel_adder_4 #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s,
  output logic         co
);
  logic [W:1] c;  // c[i] is the carry into bit i

  half_adder u_ha0 (.a(a[0]), .b(b[0]), .s(s[0]), .co(c[1]));

  for (genvar i = 1; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end

  assign co = c[W];
endmodule
