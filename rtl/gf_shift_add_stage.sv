// gf_shift_add_stage: one step of shift-and-add multiplication in GF(2^N).
//
// The encoders multiply by scanning the multiplier A from its most
// significant bit down. Every step after the first does three things, in
// this order:
//   1. shift the partial result left by one, filling with 0;
//   2. if the bit shifted into position N is 1, the value has overflowed the
//      N-bit field, so subtract (XOR) the field polynomial p, which clears
//      bit N when p[N] = 1;
//   3. add (XOR) the partial product A_i AND B.
// This is the loop body of the encoder algorithm, including its two
// rules: test the overflow after the shift, then subtract the polynomial.
//
// Interface: r_in is the previous partial result, a_bit the multiplier bit
// A_i for this step, b the multiplicand (message), p the N+1-bit polynomial.
// r_out is the new partial result. ovf reports that step 2 subtracted the
// polynomial. residue is bit N after step 2: it is 0 for any polynomial with
// p[N] = 1 and flags an unreduced result otherwise (an addition of this
// design; the algorithm assumes a proper degree-N polynomial).
//
// ovf is simply r_in[N-1], the bit that the shift moves into position N;
// it is brought out as its own port because it names the event.
//
// Timing: purely combinational, no clock.
module gf_shift_add_stage #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] r_in,
  input  logic         a_bit,
  input  logic [N-1:0] b,
  input  logic [N:0]   p,
  output logic [N-1:0] r_out,
  output logic         ovf,
  output logic         residue
);

  logic [N:0] shifted;
  logic [N:0] reduced;

  always_comb begin
    shifted = {r_in, 1'b0};
    ovf     = shifted[N];
    reduced = ovf ? (shifted ^ p) : shifted;
    residue = reduced[N];
    r_out   = reduced[N-1:0] ^ (b & {N{a_bit}});
  end

endmodule
