// vedic_mult_16x16: N x N unsigned multiplier (N = 16) with compressor-adder
// columns.
//
// Interface: a and b are N-bit unsigned operands, r = a * b is the 2N-bit
// product. Purely combinational: r settles one propagation delay after a or
// b changes; there is no clock, register or handshake.
//
// How it works. The vertical-and-crosswise method writes every result bit
// as one column sum: column k adds the crosswise products a[i]&b[k-i] and all
// carries of weight 2^k from the columns to its right. Instead of adding the
// partial-product rows two at a time, each column is reduced in one step by
// a compressor adder, a counter that takes up to 20 equal-weight bits and
// returns their number in binary. The count of column k has w bits: bit 0 is
// r[k] and bit j travels as a carry to column k+j. For N = 16 the columns
// hold 1, 2, 4, 5, 7, 8, 9, 10, 12, ..., 19, 19, ..., 3, 2 inputs (the two
// middle ones 19), so they use half and full adders and the 5-3, 7-4, 10-4,
// 15-4 and 20-5 compressors (see column_adder). The longest path runs
// through the chain of columns, since each waits for the carries of the
// columns to its right.
//
// The column sums follow the published equations s0..s30: every column has
// the same number of inputs and count bits as there. The equations do not
// write out the top bit; here columns 29 and 30 each send a carry into
// column 31, which a half adder sums to give r[2N-1]. Carries of weight
// 2^(2N) and above are dropped because they are provably 0 (all weighted
// bits together equal a*b < 2^(2N)); an assertion checks it.
// The column bookkeeping (inputs per column, carry positions) is computed at
// elaboration time by the functions of vedic_pkg. N is a parameter; N = 16
// is the published size and the largest whose columns fit the 20-5
// compressor.
module vedic_mult_16x16 #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] r
);
  import vedic_pkg::*;

  localparam int unsigned NCOL = 2 * N;

  if (max_col_inputs(N) > MAX_COL_INPUTS) begin : g_too_big
    $error("vedic_mult_16x16: N=%0d needs a %0d-input column", N, max_col_inputs(N));
  end

  logic [N-1:0][N-1:0] pp;

  partial_product_gen #(.N(N)) u_pp (.a(a), .b(b), .pp(pp));

  for (genvar k = 0; k < NCOL; k++) begin : g_col
    localparam int unsigned NPP = pp_count(N, k);
    localparam int unsigned NIN = col_inputs(N, k);
    localparam int unsigned W   = col_width(N, k);
    localparam int unsigned ILO = (k < N) ? 0 : k - N + 1;  // first i of the crossing

    logic [NIN-1:0] col_in;
    logic [W-1:0]   cnt;

    // Crosswise products a[i] & b[k-i].
    for (genvar p = 0; p < NPP; p++) begin : g_pp
      assign col_in[p] = pp[ILO + p][k - ILO - p];
    end

    // Carries: bit c of column j lands here when j + c == k.
    for (genvar j = 0; j < k; j++) begin : g_src
      if (k - j < col_width(N, j)) begin : g_carry
        localparam int unsigned SLOT = carry_slot(N, j, k - j);
        assign col_in[SLOT] = g_col[j].cnt[k - j];
      end
    end

    column_adder #(.NIN(NIN)) u_add (.x(col_in), .sum(cnt));

    assign r[k] = cnt[0];

    // Count bits of weight 2^(2N) and above have no column to go to; they
    // can never be 1.
    if (k + W > NCOL) begin : g_drop
      always_comb assert (cnt[W-1:NCOL-k] == '0);
    end
  end
endmodule
