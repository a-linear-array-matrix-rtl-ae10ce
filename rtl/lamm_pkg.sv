// lamm_pkg: shared constants for the linear-array matrix multiplier.
//
// The array multiplies two matrices on a chain of identical processors that
// have no control logic: every processor does c + a*b each cycle and passes
// a, b and the sum on with fixed delays. This package holds the default
// operand widths and the two size formulas that the RTL and the testbenches
// share:
//   * a square n x n product needs 3n-2 processors;
//   * a p x q by q x r product needs p+q+r-2 processors, with a row spacing
//     d >= max(p, r), which sets the accumulator delay line to d-2 stages.
// The element widths are not fixed by the algorithm; 16-bit signed operands
// and a 32-bit accumulator are this implementation's choice.
package lamm_pkg;

  // Width of the elements of A and of B (two's complement).
  parameter int unsigned DEF_A_W = 16;
  parameter int unsigned DEF_B_W = 16;
  // Width of the elements of C; sums wrap modulo 2**DEF_C_W.
  parameter int unsigned DEF_C_W = 32;
  // Size of the square matrices in the default configuration.
  parameter int unsigned DEF_N = 3;

  // Number of processors for an n x n by n x n product.
  function automatic int unsigned square_len(int unsigned n);
    return 3 * n - 2;
  endfunction

  // Number of processors for a p x q by q x r product.
  function automatic int unsigned general_len(int unsigned p, int unsigned q, int unsigned r);
    return p + q + r - 2;
  endfunction

endpackage
