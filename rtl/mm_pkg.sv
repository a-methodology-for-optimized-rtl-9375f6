// mm_pkg: constants shared by the linear-array matrix multiplier.
//
// The array is built for N x N matrices with N processing elements (PEs).
// N = 16 is the size the design was optimised for. The element width is
// not fixed by the architecture; 16-bit signed two's-complement operands
// are this design's choice, and the accumulator is made wide enough that
// a sum of N full-scale products can never overflow.
package mm_pkg;

  // Matrix size and number of processing elements.
  localparam int unsigned MM_N = 16;

  // Width of one A or B element (signed).
  localparam int unsigned MM_DATA_W = 16;

  // Exact accumulator width for N products of two w-bit signed numbers:
  // one product needs 2w bits, a sum of N of them clog2(N) more.
  function automatic int unsigned acc_width(int unsigned w, int unsigned n);
    return 2 * w + $clog2(n);
  endfunction

  // Width of a row/column index; at least one bit.
  function automatic int unsigned idx_width(int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
