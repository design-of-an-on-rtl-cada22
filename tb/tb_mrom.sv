// tb_mrom: exhaustive self-checking testbench of the multiplier's digit
// product ROM.
//
// All 225 pairs of valid digit codes (-7..7) are applied, in both orders so
// that the comparator's address sorting is exercised. The output byte must
// hold the product as two digits of the product's sign: 8*hi + lo = x*y with
// |hi|, |lo| <= 7 and neither digit of the opposite sign. The unit is
// combinational: the output is sampled 1 time unit after the inputs change.
//
// The 120-word folded table follows the document; the exact address order is
// this design's choice.
module tb_mrom;
  import sd_pkg::*;

  digit_t x = '0, y = '0;
  logic [7:0] p;
  int checks = 0, failures = 0;

  mrom dut (.*);

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
        int hi, lo;
        x = 4'(a); y = 4'(b);
        #1;
        hi = dval(p[7:4]); lo = dval(p[3:0]);
        checks++;
        if (8 * hi + lo != a * b || hi < -7 || lo < -7 ||
            (a * b > 0 && (hi < 0 || lo < 0)) || (a * b < 0 && (hi > 0 || lo > 0))) begin
          failures++;
          $display("%0d * %0d gave %h", a, b, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
