// tb_galois_encoder4: self-checking test of the 4-bit Galois encoder.
//
// 1. The seven key/message pairs of the encoder's published simulation with
//    P = x^4 + x + 1, against the results printed there.
// 2. All 256 key/message pairs for each of the three irreducible quartics
//    x^4+x+1, x^4+x^3+1 and x^4+x^3+x^2+x+1, against gf_ref_pkg.
// 3. The flag y[4]: 0 for every proper polynomial, and set by an overflow
//    when P has no x^4 term (P = 0 leaves the shifted bit in place).
// The encoder is combinational: every result is checked 1 ns after its
// inputs change, i.e. with no clock cycle of latency.
module tb_galois_encoder4;
  import gf_ref_pkg::*;

  logic [3:0] a, b;
  logic [4:0] p, y;

  int checks = 0, failures = 0;
  int reduced = 0;

  galois_encoder4 dut (.*);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [4:0] want, input string what);
    #1ns;
    checks++;
    if (y !== want) begin
      failures++;
      if (failures < 10)
        $display("%s: a=%b b=%b p=%b got y=%b want %b", what, a, b, p, y, want);
    end
  endtask

  typedef struct { logic [3:0] a, b; logic [4:0] y; } vec_t;

  initial begin
    // Vectors and results as printed in the published 4-bit waveform.
    vec_t figure[7] = '{
      '{4'b1111, 4'b1111, 5'b01010}, '{4'b1010, 4'b1010, 5'b01000},
      '{4'b1000, 4'b1001, 5'b00100}, '{4'b1111, 4'b1110, 5'b00101},
      '{4'b1000, 4'b1000, 5'b01100}, '{4'b0011, 4'b0001, 5'b00011},
      '{4'b0011, 4'b0111, 5'b01001}};
    int unsigned polys[3] = '{5'b10011, 5'b11001, 5'b11111};
    int unsigned subs, want;

    p = gf_pkg::POLY4;
    foreach (figure[i]) begin
      a = figure[i].a; b = figure[i].b;
      check(figure[i].y, "published vector");
    end

    foreach (polys[pi])
      for (int unsigned ai = 0; ai < 16; ai++)
        for (int unsigned bi = 0; bi < 16; bi++) begin
          p = polys[pi][4:0]; a = ai[3:0]; b = bi[3:0];
          want = gf_mod(clmul(ai, bi, 4), polys[pi], 4, subs);
          if (subs != 0) reduced++;
          check({1'b0, want[3:0]}, "exhaustive");
        end

    // No x^4 term: an overflow cannot be cleared and raises y[4].
    p = 5'b00000; a = 4'b1000; b = 4'b1000;   // 1000 shifted out at once
    check(5'b10000, "unreduced flag set");
    p = 5'b00000; a = 4'b0001; b = 4'b0111;   // no shift ever overflows
    check(5'b00111, "unreduced flag clear");

    if (reduced == 0) begin
      failures++;
      $display("no vector needed polynomial reduction");
    end
    $display("vectors needing reduction: %0d", reduced);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
