// tb_multop: self-checking testbench of the on-line mantissa multiplier
// MULTOP.
//
// Random operand pairs (2 bytes each, digits -7..7 with the extremes
// favoured, first digits non-zero) are offered byte pair by byte pair with
// random gaps while the PACKOP side applies random back-pressure. Each
// product must come out as 5 signed-digit bytes, out_last on the fifth, with
// every digit in -7..7, the high digit of byte 0 zero, and
//   sum_t byte_t * 64^(4-t) = X * Y   (X, Y the operands as integers of
// 4 radix-8 digits), i.e. exactly the product. Counted and required: a
// non-zero overflow digit (byte 0), a zero first result byte d1 (product
// needing normalisation), negative products. Timing: with no gaps or
// back-pressure the first result byte is offered one cycle after the first
// pair is taken and all 5 bytes leave within 8 cycles of it.
//
// The on-line multiplication recurrence follows the document; the output
// byte count and weights are this design's choices.
module tb_multop;
  import sd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic       in_valid = 1'b0, in_ready, in_last = 1'b0;
  logic [7:0] in_x = '0, in_y = '0;
  logic       out_valid, out_ready = 1'b0, out_last;
  logic [7:0] out_data;

  multop dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  logic [7:0] xq[$], yq[$];
  bit         lq[$];
  longint     pq[$];
  bit         gaps = 1'b1, stall = 1'b1;
  int n_ovf = 0, n_lz = 0, n_negp = 0;
  int in_cyc = -1, out_cyc = -1, last_cyc = -1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc++;
  always @(posedge clk) out_ready <= !stall || ($urandom_range(2) != 0);

  always @(posedge clk) begin
    bit free;
    if (rst_n) begin
      free = !in_valid;
      if (in_valid && in_ready) begin
        if (!gaps && in_cyc < 0) in_cyc = cyc;
        void'(xq.pop_front()); void'(yq.pop_front()); void'(lq.pop_front());
        free = 1'b1;
      end
      if (free) begin
        if (xq.size() > 0 && (!gaps || $urandom_range(2) != 0)) begin
          in_valid <= 1'b1; in_x <= xq[0]; in_y <= yq[0]; in_last <= lq[0];
        end else in_valid <= 1'b0;
      end
    end
  end

  longint acc = 0;
  int     nb = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      if (!gaps && out_cyc < 0) out_cyc = cyc;
      if (out_data[7:4] == 4'b1000 || out_data[3:0] == 4'b1000) begin
        failures++; $display("digit code 1000");
      end
      if (nb == 0 && out_data[7:4] != 4'd0) begin failures++; $display("byte 0 high digit %h", out_data); end
      if (nb == 0 && out_data != 8'd0) n_ovf++;
      if (nb == 1 && out_data == 8'd0) n_lz++;
      acc = acc * 64 + longint'(dval(out_data[7:4])) * 8 + longint'(dval(out_data[3:0]));
      nb++;
      if (out_last != (nb == 5)) begin failures++; $display("out_last at byte %0d", nb); end
      if (nb == 5) begin
        checks++;
        if (!gaps) last_cyc = cyc;
        if (pq.size() == 0) begin
          failures++; $display("unexpected product");
        end else begin
          if (acc != pq[0]) begin
            failures++; $display("product %0d expected %0d", acc, pq[0]);
          end
          if (pq[0] < 0) n_negp++;
          void'(pq.pop_front());
        end
        acc = 0;
        nb  = 0;
      end
    end
  end

  function automatic logic [3:0] rd(input bit nz);
    int k;
    k = int'($urandom_range(5));
    if (k == 0) return 4'd7;
    if (k == 1) return 4'(-7);
    do k = int'($urandom_range(14)) - 7; while (nz && k == 0);
    return 4'(k);
  endfunction

  task automatic one_op();
    logic [7:0] x [2], y [2];
    longint xv, yv;
    x[0] = {rd(1), rd(0)}; x[1] = {rd(0), rd(0)};
    y[0] = {rd(1), rd(0)}; y[1] = {rd(0), rd(0)};
    xv = 0; yv = 0;
    for (int k = 0; k < 2; k++) begin
      xv = xv * 64 + longint'(dval(x[k][7:4])) * 8 + longint'(dval(x[k][3:0]));
      yv = yv * 64 + longint'(dval(y[k][7:4])) * 8 + longint'(dval(y[k][3:0]));
      xq.push_back(x[k]); yq.push_back(y[k]); lq.push_back(k == 1);
    end
    pq.push_back(xv * yv);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 3000; i++) one_op();
    wait (pq.size() == 0);
    stall = 1'b0; gaps = 1'b0;
    repeat (3) @(posedge clk);
    one_op();
    wait (pq.size() == 0);
    checks += 2;
    if (out_cyc - in_cyc != 1) begin
      failures++; $display("first byte %0d cycles after the first pair", out_cyc - in_cyc);
    end
    if (last_cyc - in_cyc > 8) begin
      failures++; $display("last byte %0d cycles after the first pair", last_cyc - in_cyc);
    end
    checks += 3;
    if (n_ovf == 0)  begin failures++; $display("no overflow digit"); end
    if (n_lz == 0)   begin failures++; $display("no zero first byte"); end
    if (n_negp == 0) begin failures++; $display("no negative product"); end
    $display("overflow %0d zero-d1 %0d negative %0d, last byte after %0d cycles", n_ovf, n_lz, n_negp,
             last_cyc - in_cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
