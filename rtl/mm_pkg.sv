// mm_pkg: sizes shared by the two matrix multipliers.
//
// The matrix-vector multiplier computes G = A*C with A of 1024 rows and
// 28 columns (the sizes of the image-reconstruction problem it was made
// for). The tri-matrix multiplier computes M = X*Y*Z on 3x3 matrices with
// Y diagonal. Operand word widths are not fixed by the source design; 16-bit
// signed integers are this design's choice, and every result path is kept at
// full precision so no result ever overflows.
package mm_pkg;

  // Matrix-vector multiplier (G = A*C)
  localparam int unsigned MV_ROWS   = 1024;  // rows of A, length of G
  localparam int unsigned MV_COLS   = 28;    // columns of A, length of C
  localparam int unsigned MV_LANES  = 1;     // multipliers working in parallel
  localparam int unsigned MV_DATA_W = 16;    // width of A and C elements

  // Tri-matrix multiplier (M = X*Y*Z)
  localparam int unsigned TM_N      = 3;     // matrix order
  localparam int unsigned TM_DATA_W = 16;    // width of X, Y and Z elements

  // Width of an exact sum of `terms` products of two signed words of widths
  // wa and wb.
  function automatic int unsigned sum_width(int unsigned wa, int unsigned wb,
                                            int unsigned terms);
    return wa + wb + ((terms > 1) ? $clog2(terms) : 0);
  endfunction

endpackage
