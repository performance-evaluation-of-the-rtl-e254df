// tb_vedic_mult_16x16: end-to-end check of the 16 x 16 multiplier at its
// default size.
//
// Operands: corner values (0, 1, all ones, single high bits, alternating
// patterns), every pair of one-hot operands, then random pairs. Each
// product is compared with a * b computed by the testbench in 64-bit
// arithmetic.
//
// Coverage of the column mechanism: for every column the testbench works
// out, with its own column walk, the most significant bit of the column's
// count (the longest carry that column sends). For each kind of column counter (half adder, full adder,
// 5-3, 7-4, 10-4, 15-4, 20-5) it counts the products in which some column
// of that kind set its top count bit, and it counts a failure for a kind
// that never did. The multiplier is combinational; no latency applies.
//
// Column structure: the number of inputs and of count bits of every column
// is compared with the published column equations s0..s30 (for example 16
// inputs and 5 count bits in column 12, 19 inputs in columns 15 and 16).
module tb_vedic_mult_16x16;
  localparam int N    = 16;
  localparam int NCOL = 2 * N;
  localparam int NKIND = 7;
  localparam string KIND_NAME [NKIND] =
    '{"half adder", "full adder", "5-3", "7-4", "10-4", "15-4", "20-5"};

  logic [N-1:0]   a, b;
  logic [2*N-1:0] r;
  logic           top_bit [NCOL];
  int             col_kind [NCOL];
  int             col_w [NCOL];
  int             kind_hits [NKIND];
  int             checks = 0, failures = 0;

  // Inputs (products + carries) and count bits per column, s0..s30.
  localparam int PUB_INPUTS [31] = '{1, 2, 4, 5, 7, 8, 9, 10, 12, 13, 14, 15, 16, 17, 18,
                                     19, 19, 18, 17, 16, 15, 14, 13, 12, 10, 9, 8, 7, 6,
                                     5, 3};
  localparam int PUB_BITS [31]   = '{1, 2, 3, 3, 3, 4, 4, 4, 4, 4, 4, 4, 5, 5, 5,
                                     5, 5, 5, 5, 5, 4, 4, 4, 4, 4, 4, 4, 3, 3,
                                     3, 2};

  vedic_mult_16x16 dut (.a(a), .b(b), .r(r));

  function automatic int kind_of(int unsigned nin);
    if (nin <= 1)  return -1;  // a plain wire
    if (nin == 2)  return 0;
    if (nin == 3)  return 1;
    if (nin <= 5)  return 2;
    if (nin <= 7)  return 3;
    if (nin <= 10) return 4;
    if (nin <= 15) return 5;
    return 6;
  endfunction

  for (genvar k = 0; k < NCOL; k++) begin : g_kind
    localparam int unsigned NIN = vedic_pkg::col_inputs(N, k);
    localparam int unsigned W   = vedic_pkg::col_width(N, k);
    localparam int KIND = (W > 1) ? kind_of(NIN) : -1;
    assign col_kind[k] = KIND;
    assign col_w[k]    = W;
  end

  // Column walk of the testbench's own: the count of every column for the
  // current operands, from the right, with carries passed to the left.
  task automatic column_tops(input logic [N-1:0] va, input logic [N-1:0] vb);
    int carry [NCOL + 8];
    for (int k = 0; k < NCOL + 8; k++) carry[k] = 0;
    for (int k = 0; k < NCOL; k++) begin
      int count = carry[k];
      for (int i = 0; i < N; i++)
        if (k - i >= 0 && k - i < N && va[i] && vb[k-i]) count++;
      for (int j = 1; j < col_w[k]; j++) carry[k+j] += (count >> j) & 1;
      // A count bit that would land beyond the product is not a carry.
      top_bit[k] = (k + col_w[k] <= NCOL) && (((count >> (col_w[k] - 1)) & 1) == 1);
    end
  endtask

  task automatic check(input logic [N-1:0] va, input logic [N-1:0] vb);
    bit seen [NKIND];
    a = va;
    b = vb;
    #1;
    checks++;
    if (r != (2*N)'(longint'(va) * longint'(vb))) begin
      failures++;
      $display("FAIL %0d * %0d -> %0d", va, vb, r);
    end
    column_tops(va, vb);
    for (int k = 0; k < NKIND; k++) seen[k] = 1'b0;
    for (int k = 1; k < NCOL; k++)
      if (top_bit[k] && col_kind[k] >= 0) seen[col_kind[k]] = 1'b1;
    for (int k = 0; k < NKIND; k++) if (seen[k]) kind_hits[k]++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NKIND; k++) kind_hits[k] = 0;
    for (int k = 0; k < 31; k++) begin
      checks++;
      if (vedic_pkg::col_inputs(N, k) != PUB_INPUTS[k] ||
          vedic_pkg::col_width(N, k) != PUB_BITS[k]) begin
        failures++;
        $display("FAIL column %0d: %0d inputs, %0d bits; published %0d, %0d", k,
                 vedic_pkg::col_inputs(N, k), vedic_pkg::col_width(N, k),
                 PUB_INPUTS[k], PUB_BITS[k]);
      end
    end
    check('0, '0);
    check('1, '1);
    check('1, '0);
    check('0, '1);
    check(16'h0001, 16'hFFFF);
    check(16'h8000, 16'h8000);
    check(16'hAAAA, 16'h5555);
    check(16'h5555, 16'h5555);
    check(16'hAAAA, 16'hAAAA);
    check(16'hFFFF, 16'h7FFF);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        check(N'(1) << i, N'(1) << j);
    for (int k = 0; k < 1000000; k++)
      check(N'($urandom), N'($urandom));
    for (int k = 0; k < NKIND; k++) begin
      $display("column kind %-10s top count bit set in %0d products", KIND_NAME[k], kind_hits[k]);
      checks++;
      if (kind_hits[k] == 0) begin
        failures++;
        $display("FAIL no column of kind %s ever produced its top carry", KIND_NAME[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
