// ft_mvm_pkg: constants and functions shared by the fault-tolerant parallel
// matrix-vector multiplier.
//
// P parallel MVMs are treated like the data bits of a single-error-correcting
// Hamming code. Each MVM p gets a Hamming check-matrix column h(p): the p-th
// integer (counting from 0) that is at least 3 and not a power of two, i.e. a
// column of weight two or more. Check row j then covers every MVM whose column
// has bit j set. For P = 4 this gives columns 3, 5, 6, 7 and three check rows,
// each covering three MVMs, the (7,4) Hamming code. A syndrome with a single
// bit set (1, 2, 4, ...) points at a check row itself, i.e. a fault in the
// detection branch.
//
// Modules use the check matrix through cover_table, a constant computed at
// elaboration; it holds up to MAX_COVER = P * R entries (P up to about 100).
//
// The width helpers give the exact number of bits that a signed sum of n
// values needs, so that no rounding or overflow occurs anywhere: with 8-bit
// operands, N = 20 and M = 30 they give the 21-bit MVM results, 13-bit column
// sums, 15-bit detection-matrix items and 28-bit check values of the design.
//
// From the original scheme: a Hamming code over the MVMs, three check rows
// for P = 4 and exact widths. Own choices: which column each MVM gets and
// the number of check rows for other values of P.
package ft_mvm_pkg;

  // Bits to add to a signed width so that the sum of n such values fits.
  function automatic int sum_bits(input int n);
    return (n <= 1) ? 0 : $clog2(n);
  endfunction

  // Hamming check-matrix column of MVM p (0-based). The k-th such value v
  // satisfies v = p + 2 + floor(log2(v)); iterating from v = p + 3 reaches the
  // smallest solution, which is the wanted one, in a few steps.
  function automatic int hamming_col(input int p);
    int v;
    v = p + 3;
    for (int i = 0; i < 8; i++) v = p + 1 + $clog2(v + 1);
    return v;
  endfunction

  // Number of check rows r so that 2^r - r - 1 >= p (single-error correction).
  function automatic int check_rows(input int p);
    int r;
    r = 2;
    for (int i = 0; i < 30; i++)
      if (((1 << r) - r - 1) < p) r++;
    return r;
  endfunction

  // 1 when check row j covers MVM p.
  function automatic bit row_covers(input int j, input int p);
    return bit'((hamming_col(p) >> j) & 1);
  endfunction

  // Largest P * R the cover table below holds.
  localparam int MAX_COVER = 1024;

  // Cover table of the check matrix, flattened: bit j * p_total + p is 1 when
  // check row j covers MVM p. Modules keep it as a localparam, so the Hamming
  // code is fixed at elaboration and costs no logic.
  function automatic logic [MAX_COVER-1:0] cover_table(input int p_total);
    logic [MAX_COVER-1:0] t;
    int r;
    t = '0;
    r = check_rows(p_total);
    for (int j = 0; j < r; j++)
      for (int p = 0; p < p_total; p++)
        t[j * p_total + p] = row_covers(j, p);
    return t;
  endfunction

endpackage
