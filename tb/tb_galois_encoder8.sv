// tb_galois_encoder8: self-checking test of the 8-bit Galois encoder.
//
// 1. The eight key/message pairs of the encoder's published simulation with
//    P = x^8 + x^4 + x^3 + x + 1, against the results printed there.
// 2. All 65536 key/message pairs with that polynomial, against gf_ref_pkg.
// 3. 2000 random pairs for each of three other irreducible octics
//    (0x11D, 0x12B, 0x163) and for x^8+x^4+x^3+1 (not irreducible, but
//    the arithmetic modulo it is still defined).
// 4. Field properties with the default polynomial: every nonzero key maps
//    the 255 nonzero messages onto 255 distinct codes (the encoding is
//    reversible), and 0x53 * 0xCA = 1.
// Checked 1 ns after each input change: no clock cycle of latency.
module tb_galois_encoder8;
  import gf_ref_pkg::*;

  logic [7:0] a, b;
  logic [8:0] p, y;

  int checks = 0, failures = 0;
  int reduced = 0;

  galois_encoder8 dut (.*);

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [8:0] want, input string what);
    #1ns;
    checks++;
    if (y !== want) begin
      failures++;
      if (failures < 10)
        $display("%s: a=%h b=%h p=%b got y=%b want %b", what, a, b, p, y, want);
    end
  endtask

  typedef struct { logic [7:0] a, b; logic [8:0] y; } vec_t;

  initial begin
    vec_t figure[8] = '{
      '{8'h00, 8'hFF, 9'h000}, '{8'h01, 8'hFF, 9'h0FF},
      '{8'hFF, 8'hFF, 9'h013}, '{8'h57, 8'h83, 9'h0C1},
      '{8'h53, 8'hCA, 9'h001}, '{8'hD3, 8'h9B, 9'h0A7},
      '{8'h97, 8'hE3, 9'h0CA}, '{8'h90, 8'hF9, 9'h041}};
    int unsigned polys[4] = '{9'h11D, 9'h12B, 9'h163, 9'h119};
    int unsigned subs, want;
    bit [255:0] seen;

    p = gf_pkg::POLY8;
    foreach (figure[i]) begin
      a = figure[i].a; b = figure[i].b;
      check(figure[i].y, "published vector");
    end

    for (int unsigned ai = 0; ai < 256; ai++) begin
      seen = '0;
      for (int unsigned bi = 0; bi < 256; bi++) begin
        a = ai[7:0]; b = bi[7:0];
        want = gf_mod(clmul(ai, bi, 8), gf_pkg::POLY8, 8, subs);
        if (subs != 0) reduced++;
        check({1'b0, want[7:0]}, "exhaustive");
        if (bi != 0) seen[y[7:0]] = 1'b1;
      end
      if (ai != 0) begin
        checks++;
        if (seen[0] || $countones(seen) != 255) begin
          failures++;
          $display("key %h does not map nonzero messages one-to-one", ai);
        end
      end
    end

    foreach (polys[pi])
      repeat (2000) begin
        int unsigned ai = $urandom_range(255), bi = $urandom_range(255);
        p = polys[pi][8:0]; a = ai[7:0]; b = bi[7:0];
        check({1'b0, gf_mul(ai, bi, polys[pi], 8)[7:0]}, "other polynomial");
      end

    if (reduced == 0) begin
      failures++;
      $display("no vector needed polynomial reduction");
    end
    $display("vectors needing reduction: %0d", reduced);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
