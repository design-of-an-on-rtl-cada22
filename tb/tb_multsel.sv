// tb_multsel: self-checking testbench of one MULTSEL unit (default size: a
// partial operand of 4 digits times one operand byte).
//
// Random digit vectors Z (digits -7..7, extremes favoured) and bytes y are
// applied, plus the corner cases all +7 / all -7. The output must equal the
// exact integer product (sum z_i 8^(3-i)) * (8 y_hi + y_lo). Products of both
// signs and the largest magnitude must occur. Combinational: sampled 1 time
// unit after the inputs change.
//
// Digit products from the ROM, shifted and added, follow the document; the
// binary result is this design's choice.
module tb_multsel;
  import sd_pkg::*;

  digit_t z [4] = '{default: '0};
  logic [7:0] y = '0;
  logic signed [19:0] p;
  int checks = 0, failures = 0, npos = 0, nneg = 0, nmax = 0;

  multsel dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rd();
    int k;
    k = int'($urandom_range(4));
    if (k == 0) return 7;
    if (k == 1) return -7;
    return int'($urandom_range(14)) - 7;
  endfunction

  task automatic apply(input int zd [4], input int yh, input int yl);
    int zv, e;
    zv = 0;
    for (int i = 0; i < 4; i++) begin z[i] = 4'(zd[i]); zv = zv * 8 + zd[i]; end
    y = {4'(yh), 4'(yl)};
    #1;
    e = zv * (8 * yh + yl);
    checks++;
    if (int'(p) != e) begin
      failures++;
      $display("Z %0d times y %0d gave %0d", zv, 8 * yh + yl, int'(p));
    end
    if (e > 0) npos++;
    if (e < 0) nneg++;
    if (e == 4095 * 63 || e == -4095 * 63) nmax++;
  endtask

  initial begin
    int zd [4];
    zd = '{7, 7, 7, 7};     apply(zd, 7, 7);
    zd = '{-7, -7, -7, -7}; apply(zd, 7, 7);
    zd = '{-7, -7, -7, -7}; apply(zd, -7, -7);
    for (int i = 0; i < 5000; i++) begin
      for (int k = 0; k < 4; k++) zd[k] = rd();
      apply(zd, rd(), rd());
    end
    checks += 3;
    if (npos == 0) begin failures++; $display("no positive product"); end
    if (nneg == 0) begin failures++; $display("no negative product"); end
    if (nmax == 0) begin failures++; $display("no full-scale product"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
