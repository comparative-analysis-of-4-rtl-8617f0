// galois_encoder_top: the 4-bit and the 8-bit Galois encoders side by side.
//
// The two encoders are independent designs of the same algorithm at two
// field sizes, GF(2^4) and GF(2^8); this top only places them next to each
// other with separate ports so that both can be synthesized and simulated
// together. Nothing is shared between them.
//
// Interface: a4/b4/p4 -> y4 is the 4-bit encoder (key, message, polynomial,
// result), a8/b8/p8 -> y8 the 8-bit one. Tie p4 to gf_pkg::POLY4
// (x^4 + x + 1) and p8 to gf_pkg::POLY8 (x^8 + x^4 + x^3 + x + 1) for the
// fields the encoders were designed for.
//
// Timing: purely combinational.
module galois_encoder_top (
  input  logic [3:0] a4,
  input  logic [3:0] b4,
  input  logic [4:0] p4,
  output logic [4:0] y4,
  input  logic [7:0] a8,
  input  logic [7:0] b8,
  input  logic [8:0] p8,
  output logic [8:0] y8
);

  galois_encoder4 u_enc4 (.a(a4), .b(b4), .p(p4), .y(y4));
  galois_encoder8 u_enc8 (.a(a8), .b(b8), .p(p8), .y(y8));

endmodule
