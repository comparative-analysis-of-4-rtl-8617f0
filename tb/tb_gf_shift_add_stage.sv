// tb_gf_shift_add_stage: exhaustive check of one shift-and-add step (N = 4).
//
// Every partial result, multiplier bit and multiplicand is applied with four
// polynomials: the three irreducible quartics and one without the x^4 term,
// which must leave the residue flag set after an overflow. Expected values
// come from integer arithmetic: double the partial result, XOR in P when
// the doubled value reaches 16, then XOR in B when the multiplier bit is 1.
// The step is combinational, so outputs are checked 1 ns after each input.
module tb_gf_shift_add_stage;

  localparam int unsigned N = 4;

  logic [N-1:0] r_in, b, r_out;
  logic         a_bit, ovf, residue;
  logic [N:0]   p;

  int checks = 0, failures = 0;

  gf_shift_add_stage dut (.*);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned polys[4] = '{5'b10011, 5'b11001, 5'b11111, 5'b00011};
    int unsigned v, exp_out;
    bit exp_ovf, exp_res;
    int ovf_seen = 0;
    foreach (polys[pi])
      for (int unsigned r = 0; r < 16; r++)
        for (int unsigned a = 0; a < 2; a++)
          for (int unsigned bb = 0; bb < 16; bb++) begin
            p = polys[pi][N:0]; r_in = r[N-1:0]; a_bit = a[0]; b = bb[N-1:0];
            #1ns;
            v = 2 * r;
            exp_ovf = (v >= 16);
            if (exp_ovf) v ^= polys[pi];
            exp_res = (v >= 16);
            exp_out = (v % 16) ^ (a ? bb : 0);
            checks++;
            if (r_out != exp_out[N-1:0] || ovf != exp_ovf || residue != exp_res) begin
              failures++;
              if (failures < 10)
                $display("mismatch p=%b r=%h a=%0d b=%h: got %h/%b/%b want %h/%b/%b",
                         p, r, a, bb, r_out, ovf, residue, exp_out, exp_ovf, exp_res);
            end
            if (ovf) ovf_seen++;
          end
    if (ovf_seen == 0) begin
      failures++;
      $display("the overflow/subtract path was never taken");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
