// tb_arom: exhaustive self-checking testbench of the adder's A unit ROM.
//
// All 225 pairs of valid digit codes (-7..7) are applied. For each the
// outputs must satisfy the signed-digit addition rule: z + y = 8t + w, the
// transfer t in {-1, 0, 1}, the interim digit |w| <= 6 (so that w plus an
// incoming transfer stays a valid digit), and t = 0 whenever |z + y| <= 6.
// Both transfer signs must occur. The unit is combinational: the outputs are
// sampled 1 time unit after the inputs change.
//
// The expected words follow the document's A-unit rule; the 256-word address
// space (two 4-bit codes) is this design's choice.
module tb_arom;
  import sd_pkg::*;

  digit_t z = '0, y = '0;
  digit_t t, w;
  int checks = 0, failures = 0, npos = 0, nneg = 0;

  arom dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = -7; a <= 7; a++) begin
      for (int b = -7; b <= 7; b++) begin
        int tv, wv;
        z = 4'(a); y = 4'(b);
        #1;
        tv = dval(t); wv = dval(w);
        checks++;
        if (8 * tv + wv != a + b || tv < -1 || tv > 1 || wv < -6 || wv > 6 ||
            (a + b >= -6 && a + b <= 6 && tv != 0)) begin
          failures++;
          $display("%0d + %0d gave t %0d w %0d", a, b, tv, wv);
        end
        if (tv > 0) npos++;
        if (tv < 0) nneg++;
      end
    end
    checks += 2;
    if (npos == 0) begin failures++; $display("no positive transfer"); end
    if (nneg == 0) begin failures++; $display("no negative transfer"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
