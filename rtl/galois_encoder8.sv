// galois_encoder8: 8-bit Galois encoder, y = A * B mod P in GF(2^8).
//
// The message B is encoded by multiplying it with the key A in the finite
// field GF(2^8), whose elements are 8-bit polynomials over GF(2). The
// product of two 8-bit operands stays 8 bits wide: whenever a shifted
// partial result overflows into bit 8, the field polynomial P is subtracted
// (XORed). With P = x^8 + x^4 + x^3 + x + 1 (gf_pkg::POLY8) the map B -> A*B is a
// bijection for every nonzero key A, so the message can be recovered by
// whoever knows A and P.
//
// How it works: the shift-and-add loop is unrolled in space. The first
// partial result is A[7] AND B; then 7 gf_shift_add_stage instances, one per
// remaining multiplier bit A[6] .. A[0], each shift the result left, subtract P
// on overflow and add A_i AND B. The 7 stages are the 7 passes of the
// algorithm's loop.
//
// Interface (names and widths as in the encoder's published simulation):
//   a[7:0]  multiplier A, the key
//   b[7:0]  multiplicand B, the message
//   p[8:0]  field polynomial, bit k = coefficient of x^k
//   y[8:0]  y[7:0] is the encoded result; y[8] is this design's own flag,
//           set if some stage was left with bit 8 after subtracting p, which
//           happens only when p[8] = 0. It is 0 for every proper polynomial.
//
// Timing: purely combinational (input-to-output path, no clock); the result
// settles after 8 stages of AND/XOR logic.
module galois_encoder8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic [8:0] p,
  output logic [8:0] y
);

  localparam int unsigned N = gf_pkg::N8;

  // r[k] is the partial result after multiplier bits a[N-1] .. a[N-1-k].
  logic [N-1:0] r   [N];
  logic [N-1:1] ovf;
  logic [N-1:1] residue;

  assign r[0] = b & {N{a[N-1]}};

  for (genvar k = 1; k < N; k++) begin : g_stage
    gf_shift_add_stage #(.N(N)) u_stage (
      .r_in   (r[k-1]),
      .a_bit  (a[N-1-k]),
      .b      (b),
      .p      (p),
      .r_out  (r[k]),
      .ovf    (ovf[k]),
      .residue(residue[k])
    );
  end

  assign y = {|residue, r[N-1]};

  // A proper degree-N polynomial always clears the overflow bit.
  always_comb
    if (p[N]) assert (y[N] == 1'b0) else $error("unreduced result with p[N] = 1");

  // ovf only shows which stages subtracted the polynomial; it is not needed
  // at the output.
  logic unused_ovf;
  assign unused_ovf = ^ovf;

endmodule
