// smul_pkg: shared geometry and timing of the full systolic multiplier.
//
// The array for an n x n multiplication has n rows. Row j (fed by
// multiplier bit B_j) holds 2n-j elemental processors, except the last row,
// j = n-1, which holds only n: its processors never see a carry, so the
// product row needs no extension. Summing the rows gives the processor count
// (3n^2+n)/2 - 1.
//
// Timing convention used throughout: processor EP(i,j) in column i, row j
// evaluates in cycle i + (n-1-j) after the first operand bit (A_0 together
// with B_{n-1}) enters; its sum leaves two registers later, so product bit
// O_k is valid k + n + 1 cycles after that first bit. The last result bit
// completes at cycle 3n-2, i.e. 3n-1 evaluation cycles (11 for n = 4).
package smul_pkg;

  // Number of processors in row j of an n-bit array.
  function automatic int row_width(input int n, input int j);
    return (j == n - 1) ? n : 2 * n - j;
  endfunction

  // Total number of processors, summed row by row.
  function automatic int num_ep(input int n);
    int s;
    s = 0;
    for (int j = 0; j < n; j++) s += row_width(n, j);
    return s;
  endfunction

  // Cycles from the first skewed operand bit to product bit k at the array top.
  function automatic int array_out_delay(input int n, input int k);
    return k + n + 1;
  endfunction

endpackage
