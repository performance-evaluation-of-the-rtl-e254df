// vedic_pkg: column bookkeeping for the vertical-and-crosswise multiplier.
//
// An N x N multiplication has 2N result columns. Column k receives the
// crosswise products a[i]&b[k-i] (pp_count of them) and every carry bit of
// weight 2^k produced by the columns to its right. Each column counts its
// inputs; the count has col_width bits: bit 0 is result bit k, bit j is a
// carry into column k+j. These constant functions compute, column by column
// from the right, how many inputs each column has and where in a column's
// input vector each incoming carry sits. The multiplier uses them at
// elaboration time only; nothing here becomes hardware.
//
// Input order inside column k: first the products a[i]&b[k-i] with rising
// i, then the carries, ordered by the column they come from (rightmost first).
package vedic_pkg;

  // Largest number of result columns the functions track (N <= 64).
  localparam int unsigned MAX_COLS = 128;

  // Number of one-bit inputs the largest compressor accepts (20-5).
  localparam int unsigned MAX_COL_INPUTS = 20;

  // Bits needed to hold a count of 0..n (at least 1).
  function automatic int unsigned count_width(int unsigned n);
    int unsigned w = 1;
    while ((1 << w) <= n) w++;
    return w;
  endfunction

  // Number of crosswise products of weight 2^k in an n x n product.
  function automatic int unsigned pp_count(int unsigned n, int unsigned k);
    if (k < n)               return k + 1;
    else if (k <= 2 * n - 2) return 2 * n - 1 - k;
    else                     return 0;
  endfunction

  // Number of carries entering column k from columns 0..k-1.
  function automatic int unsigned carries_in(int unsigned n, int unsigned k);
    int unsigned inc [MAX_COLS];
    for (int unsigned j = 0; j < MAX_COLS; j++) inc[j] = 0;
    for (int unsigned j = 0; j < k; j++) begin
      int unsigned w = count_width(pp_count(n, j) + inc[j]);
      for (int unsigned b = 1; b < w; b++)
        if (j + b < MAX_COLS) inc[j + b]++;
    end
    return inc[k];
  endfunction

  // Total inputs of column k.
  function automatic int unsigned col_inputs(int unsigned n, int unsigned k);
    return pp_count(n, k) + carries_in(n, k);
  endfunction

  // Result bits of column k.
  function automatic int unsigned col_width(int unsigned n, int unsigned k);
    return count_width(col_inputs(n, k));
  endfunction

  // Position, in the input vector of column j+b, of the carry that is bit b
  // of column j's count. Only valid when b < col_width(n, j).
  function automatic int unsigned carry_slot(int unsigned n, int unsigned j, int unsigned b);
    int unsigned t    = j + b;
    int unsigned slot = pp_count(n, t);
    for (int unsigned jj = 0; jj < j; jj++)
      if (t - jj < col_width(n, jj)) slot++;
    return slot;
  endfunction

  // Largest column of an n x n product.
  function automatic int unsigned max_col_inputs(int unsigned n);
    int unsigned m = 0;
    for (int unsigned k = 0; k < 2 * n; k++)
      if (col_inputs(n, k) > m) m = col_inputs(n, k);
    return m;
  endfunction

endpackage
