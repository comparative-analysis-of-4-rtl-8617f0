// gf_pkg: constants shared by the Galois encoders and their testbenches.
//
// A polynomial is held as a packed vector in which bit k is the coefficient
// of x^k, so a degree-N field polynomial needs N+1 bits with bit N set.
// The two defaults are the field polynomials the encoders were designed
// around: x^4 + x + 1 for GF(2^4) and x^8 + x^4 + x^3 + x + 1 for GF(2^8).
// Both are irreducible; the encoders take the polynomial as an input, so
// these are only the values a system ties to that input by default.
package gf_pkg;

  localparam int unsigned N4 = 4;
  localparam int unsigned N8 = 8;

  typedef logic [N4:0] poly4_t;
  typedef logic [N8:0] poly8_t;

  localparam poly4_t POLY4 = 5'b1_0011;       // x^4 + x + 1
  localparam poly8_t POLY8 = 9'b1_0001_1011;  // x^8 + x^4 + x^3 + x + 1

endpackage
