// dg_pkg: sizes shared by the dependence-graph (DG) processing elements and arrays.
//
// The matrix-vector and matrix-matrix DGs are built for n = 4, the order used in all
// worked examples (4x4 matrix times 4x1 vector, two 4x4 matrices). The operand width and
// the number representation are this design's own choice: operands are two's-complement
// DG_DATA_W-bit integers, and every partial sum c is carried at full precision,
// 2*DATA_W + clog2(n) bits, so that a sum of n products can never overflow.
package dg_pkg;

  // Order n of the matrices (and of the loop nests).
  parameter int unsigned DG_N = 4;

  // Width of one matrix / vector element (two's complement).
  parameter int unsigned DG_DATA_W = 16;

  // Accumulator width that holds the sum of n products of two data_w-bit values exactly.
  function automatic int unsigned acc_width(int unsigned data_w, int unsigned n);
    return 2 * data_w + ((n > 1) ? $clog2(n) : 1);
  endfunction

  parameter int unsigned DG_ACC_W = acc_width(DG_DATA_W, DG_N);

endpackage
