// Shared constants of the GF(2^M) systolic FIR filter.
//
// All arithmetic in the filter is polynomial-basis arithmetic over GF(2^M):
// a "bit multiplication" is an AND and a "bit addition" is an XOR, so no
// carries ever propagate. The data word width M = 9 follows the 9-bit sample
// buses a, b, c, d and y of the filter. The field polynomial is this design's
// own choice: F(x) = x^9 + x^4 + x^3 + x + 1, an irreducible pentanomial.
// F_LOW holds F(x) without its x^M term, which is what a reduction step adds.
package gf_pkg;

  // Width of a sample, a partial product and the filter output.
  parameter int unsigned M = 9;

  // F(x) - x^M: bits 4, 3, 1 and 0 of the pentanomial x^9 + x^4 + x^3 + x + 1.
  parameter logic [M-1:0] F_LOW = 9'b0_0001_1011;

  // Regular PEs (coefficient bits) in the first array and in arrays 2 to 4.
  parameter int unsigned NPE_FIRST = 4;
  parameter int unsigned NPE_OTHER = 3;

endpackage
