// tb_galois_encoder_top: end-to-end test of both encoders at full size.
//
// Drives the 4-bit and the 8-bit encoder at the same time with their
// default polynomials (gf_pkg::POLY4, gf_pkg::POLY8): every 8-bit
// key/message pair is applied once, and the 4-bit encoder steps through
// all of its 256 pairs alongside, over and over. Both results are compared
// with gf_ref_pkg after 1 ns (combinational, no cycle of latency). It then
// encodes a short message stream byte by byte and nibble by nibble with a
// fixed key and decodes it again by multiplying with the key's inverse,
// found by search, to show the encoding is reversible.
//
// Mechanisms that must each occur at least once, counted and reported:
//   pp_add    - a partial product A_i AND B added into the result
//   subtract  - a shift overflowed and the polynomial was subtracted
//               (counted from the stages' overflow signals)
//   no_reduce - a product that fitted without any reduction
//   unreduced - a polynomial without its x^N term raised the y[N] flag
module tb_galois_encoder_top;
  import gf_ref_pkg::*;

  logic [3:0] a4, b4;
  logic [4:0] p4, y4;
  logic [7:0] a8, b8;
  logic [8:0] p8, y8;

  int checks = 0, failures = 0;
  int n_pp_add = 0, n_subtract = 0, n_no_reduce = 0, n_unreduced = 0;

  galois_encoder_top dut (.*);

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void expect_eq(logic [8:0] got, logic [8:0] want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("%s: got %b want %b", what, got, want);
    end
  endfunction

  task automatic apply_and_check();
    int unsigned s4, s8, w4, w8;
    #1ns;
    w4 = gf_mod(clmul(a4, b4, 4), p4, 4, s4);
    w8 = gf_mod(clmul(a8, b8, 8), p8, 8, s8);
    expect_eq({4'b0, y4}, {5'b0, w4[3:0]}, $sformatf("enc4 a=%h b=%h", a4, b4));
    expect_eq(y8, {1'b0, w8[7:0]}, $sformatf("enc8 a=%h b=%h", a8, b8));
    if (a8 != 0 && b8 != 0) n_pp_add++;
    if (a8 != 0 && b8 != 0 && s8 == 0) n_no_reduce++;
    n_subtract += $countones(dut.u_enc4.ovf) + $countones(dut.u_enc8.ovf);
  endtask

  // Multiplicative inverse of k by exhaustive search (reference side only).
  function automatic int unsigned inverse8(int unsigned k);
    for (int unsigned c = 1; c < 256; c++)
      if (gf_mul(k, c, gf_pkg::POLY8, 8) == 1) return c;
    return 0;
  endfunction

  function automatic int unsigned inverse4(int unsigned k);
    for (int unsigned c = 1; c < 16; c++)
      if (gf_mul(k, c, gf_pkg::POLY4, 4) == 1) return c;
    return 0;
  endfunction

  initial begin
    byte unsigned msg[$];
    byte unsigned code8[$];
    logic [3:0] code4[$];
    int unsigned key8 = 8'hA7, key4 = 4'hB, inv8, inv4;

    p4 = gf_pkg::POLY4;
    p8 = gf_pkg::POLY8;

    // Full sweep of the 8-bit space, 4-bit space repeated alongside.
    for (int unsigned i = 0; i < 65536; i++) begin
      a8 = i[15:8]; b8 = i[7:0];
      a4 = i[7:4];  b4 = i[3:0];
      apply_and_check();
    end

    // Encode a message stream, then decode it with the inverse key.
    for (int i = 0; i < 64; i++) msg.push_back(byte'($urandom_range(255)));
    a8 = key8[7:0]; a4 = key4[3:0];
    foreach (msg[i]) begin
      b8 = msg[i]; b4 = msg[i][3:0];
      apply_and_check();
      code8.push_back(y8[7:0]);
      code4.push_back(y4[3:0]);
    end
    inv8 = inverse8(key8);
    inv4 = inverse4(key4);
    a8 = inv8[7:0]; a4 = inv4[3:0];
    foreach (msg[i]) begin
      b8 = code8[i]; b4 = code4[i];
      apply_and_check();
      expect_eq(y8, {1'b0, msg[i]}, "8-bit decode by inverse key");
      expect_eq({4'b0, y4}, {5'b0, msg[i][3:0]}, "4-bit decode by inverse key");
    end

    // A polynomial with no x^N term cannot clear an overflow.
    p4 = 5'b00000; a4 = 4'b1100; b4 = 4'b1000;
    p8 = 9'h000;   a8 = 8'h80;   b8 = 8'h80;
    #1ns;
    expect_eq({4'b0, y4}, 9'b0_0001_0000, "enc4 unreduced flag");
    expect_eq(y8, 9'b1_0000_0000, "enc8 unreduced flag");
    if (y4[4]) n_unreduced++;
    if (y8[8]) n_unreduced++;

    $display("pp_add=%0d subtract=%0d no_reduce=%0d unreduced=%0d",
             n_pp_add, n_subtract, n_no_reduce, n_unreduced);
    if (n_pp_add == 0)    begin failures++; $display("pp_add never happened"); end
    if (n_subtract == 0)  begin failures++; $display("subtract never happened"); end
    if (n_no_reduce == 0) begin failures++; $display("no_reduce never happened"); end
    if (n_unreduced == 0) begin failures++; $display("unreduced never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
