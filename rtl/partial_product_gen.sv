// partial_product_gen: the vertical and crosswise products.
//
// Interface: a and b are N-bit unsigned operands; pp[i][j] = a[i] & b[j] is
// the one-bit product of weight 2^(i+j). In the vertical-and-crosswise
// (Urdhva-tiryagbhyam) scheme, result column k is formed from the products
// that pair bit i of one operand with bit k-i of the other: one vertical
// pair for k = 0, then ever wider crossings up to column N-1 and narrower
// ones down to column 2N-2. All N*N products are formed at once, in
// parallel; the multiplier picks them out column by column.
// Purely combinational, one AND gate deep.
module partial_product_gen #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]          a,
  input  logic [N-1:0]          b,
  output logic [N-1:0][N-1:0]   pp
);
  always_comb begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        pp[i][j] = a[i] & b[j];
  end
endmodule
