# Galois-field encoders, 4-bit and 8-bit

This design encodes a message word by multiplying it with a secret key in a
finite field GF(2^N). Ordinary multiplication of two N-bit numbers gives a
2N-bit product. Field multiplication gives an N-bit result, so the code word
is no wider than the message. For a nonzero key the map from message to code
word is one-to-one. A receiver that knows the key and the field polynomial
can undo it by multiplying with the key's inverse.

Two encoders are provided, one for each field size:

| module            | field    | key `a` | message `b` | polynomial `p` | result `y` | default polynomial |
|-------------------|----------|---------|-------------|----------------|------------|--------------------|
| `galois_encoder4` | GF(2^4)  | 4 bits  | 4 bits      | 5 bits         | 5 bits     | x^4 + x + 1 (`5'b1_0011`) |
| `galois_encoder8` | GF(2^8)  | 8 bits  | 8 bits      | 9 bits         | 9 bits     | x^8 + x^4 + x^3 + x + 1 (`9'h11B`) |

Both are purely combinational, with no clock and no reset. A result is
valid one propagation delay after the inputs change.

## Field arithmetic in brief

An N-bit word stands for a polynomial over GF(2): bit k is the coefficient
of x^k. Addition and subtraction are both XOR. A product is reduced modulo a
degree-N irreducible polynomial P. The polynomial is supplied as an N+1-bit
word with bit N set, for example `10011` for x^4 + x + 1. With the
polynomials above, GF(2^8) is the field used by AES. The sanity values
0x57 * 0x83 = 0xC1 and 0x53 * 0xCA = 0x01 hold there.

## The shift-and-add algorithm

The multiplier A is scanned from its most significant bit down. The
multiplicand B, the message, is held fixed:

```
R = A[N-1] ? B : 0
for i = N-2 downto 0:             -- N-1 passes: 3 for 4-bit, 7 for 8-bit
    R = R << 1                    -- fill with 0; the old R[N-1] moves to bit N
    if R[N] == 1: R = R ^ P       -- overflow: subtract the polynomial
    R = R ^ (A[i] ? B : 0)        -- add the partial product A_i AND B
y = R
```

The overflow test comes right after the shift. If bit N has been set, the
polynomial is subtracted, which clears bit N because P[N] = 1. Only then is
the next partial product added. Together the two rules keep R at N bits
throughout.

Note on the loop count: the loop runs N-1 times because the first partial
product needs no shift. Four partial products therefore need three
shift-and-reduce passes, and eight need seven. A loop that began from R = 0
and ran only N-1 shift-and-add passes would lose one multiplier bit.

## Hardware structure

The loop is unrolled in space. Each pass is one instance of
`gf_shift_add_stage`:

```
 a[N-1]&b ──► stage(a[N-2]) ──► stage(a[N-3]) ──► … ──► stage(a[0]) ──► y[N-1:0]
                 │ p, b            │ p, b                  │ p, b
```

One stage is a fixed left shift (wiring only), N+1 AND gates that gate P
with the overflow bit, N AND gates for the partial product, and two rows of
XOR gates. The stage ports are:

| port      | dir | width | meaning |
|-----------|-----|-------|---------|
| `r_in`    | in  | N     | partial result from the previous stage |
| `a_bit`   | in  | 1     | multiplier bit for this stage |
| `b`       | in  | N     | multiplicand (message) |
| `p`       | in  | N+1   | field polynomial |
| `r_out`   | out | N     | new partial result |
| `ovf`     | out | 1     | the polynomial was subtracted (equal to `r_in[N-1]`) |
| `residue` | out | 1     | bit N after the subtraction; 0 whenever `p[N]` = 1 |

The critical path runs through all N-1 stages, so delay grows linearly
with N. The gate count grows roughly with N². This is why the 8-bit encoder
is much larger and slower than the 4-bit one.

### The polynomial is an input

`p` is a port, not a constant. The default polynomials are in `gf_pkg`
(`gf_pkg::POLY4`, `gf_pkg::POLY8`). Tie `p` to one of them for the standard
fields. You can also apply any other degree-N polynomial and treat it as
part of the secret. Only an irreducible polynomial gives a true field, in
which every nonzero key can be undone. For example, x^8 + x^4 + x^3 + 1 is
divisible by x + 1, so it does not give a field.

### The top bit of `y`

`y` is N+1 bits wide, matching the encoders' published interface. Bits
`y[N-1:0]` are the code word. `y[N]` is a flag added by this design: the OR
over all stages of `residue`. It can be set only if `p[N]` = 0, i.e. when
the polynomial is not of degree N and an overflow could not be cleared. For
every proper polynomial it is 0, and each encoder asserts this in
simulation.

## Files

| file | contents |
|------|----------|
| `rtl/gf_pkg.sv` | field sizes, polynomial types, default polynomials |
| `rtl/gf_shift_add_stage.sv` | one shift / reduce / add pass, parameter `N` (default 4) |
| `rtl/galois_encoder4.sv` | 4-bit encoder: first partial product + 3 stages |
| `rtl/galois_encoder8.sv` | 8-bit encoder: first partial product + 7 stages |
| `rtl/galois_encoder_top.sv` | both encoders side by side, ports `a4 b4 p4 y4` and `a8 b8 p8 y8` |
| `tb/gf_ref_pkg.sv` | reference model: carry-less product, then polynomial long division |
| `tb/tb_*.sv` | one self-checking testbench per module |

The top level shares nothing between the two encoders. It exists so that
both can be built and simulated together.

## Verification

Each testbench compares the RTL with `gf_ref_pkg`, which computes the
product differently from the RTL. It forms the full 2N-1-bit carry-less
product and then divides by P from the highest term down. Each testbench
prints `TB_RESULT checks=<n> failures=<n>` and has a time-out watchdog.

- `tb_gf_shift_add_stage`: every input combination of a 4-bit stage, with
  three irreducible quartics and one polynomial that has no x^4 term.
- `tb_galois_encoder4`: the seven published example vectors (for instance
  1111 * 1111 = 1010 and 0011 * 0111 = 1001), all 256 key/message pairs for
  each of the three irreducible quartics, and the `y[4]` flag.
- `tb_galois_encoder8`: the eight published example vectors (including
  0x57 * 0x83 = 0xC1, 0x53 * 0xCA = 0x01 and 0xFF * 0xFF = 0x13), all 65536
  pairs with x^8+x^4+x^3+x+1, and random pairs with 0x11D, 0x12B, 0x163
  and 0x119. It also checks that every nonzero key maps the 255 nonzero
  messages one-to-one.
- `tb_galois_encoder_top`: end-to-end at full size. It sweeps all 8-bit
  pairs while the 4-bit encoder cycles through its 256 pairs. It then
  encodes a 64-word message stream, decodes it with the inverse key, and
  checks that the original message comes back. It counts four events and
  fails if any never happened: partial-product additions, polynomial
  subtractions, products that needed no reduction, and the `y[N]` flag.

Every result is checked 1 ns after its inputs change, which confirms that
the encoders have no cycle of latency.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/gf_pkg.sv tb/gf_ref_pkg.sv tb/tb_galois_encoder_top.sv \
    --top-module tb_galois_encoder_top -Mdir obj && obj/Vtb_galois_encoder_top
```

Replace the testbench name to run the others. Every test finishes in well
under a second.

## Departures and open points

- **Source values:**
  - Sizes, port names and widths, both polynomials, and the example
    vectors with their results come from the original design description.
  - The unrolled combinational structure follows from its timing, which is
    reported from input port to output port with no clock.
- **Conflicting 8-bit polynomial:** the original design description names
  the 8-bit polynomial both as x^8 + x^4 + x^3 + x + 1 and as
  x^8 + x^4 + x^3 + 1. This design uses the first one, because the
  published 8-bit results match only that one. The second is not
  irreducible. Since `p` is a port, either can be applied.
- **Design's own choices:** the `y[N]` flag, the assertion, and the
  stage's `ovf` and `residue` outputs.
- **No gate-level match:** the published figures were obtained with a
  commercial 90 nm library. They are 44 and 321 cells, 252 ps and 914 ps
  worst-case delay, and 15.0 µW and 130.8 µW total power for the 4-bit
  and 8-bit encoders. This RTL describes the same function, not that
  netlist, so its synthesized area, delay and power will differ.
- **No decoder:** a matching decoder is mentioned in the original design
  description but not described, so none is provided. Decoding means
  multiplying by the key's inverse. The top-level testbench does this with
  the encoder itself and an inverse found by search.
- **No key handling:** there is no register, handshake or key storage. The
  encoders are pure functions of `a`, `b` and `p`. Add pipeline registers
  around them if a clocked interface is needed.
