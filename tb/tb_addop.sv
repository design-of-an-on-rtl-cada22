// tb_addop: self-checking testbench of the on-line signed-digit adder ADDOP.
//
// Random operand pairs of 1 to 4 aligned byte pairs (digits -7..7, including
// the extremes that force transfers) are offered with random gaps while the
// NORMOP side applies random back-pressure. For every operation the sum
// digits are collected and checked: there are 2P+1 of them for P input pairs,
// out_last marks the last, every digit is in -7..7, and their value
// sum s_i 8^(2P-i) equals the exact integer sum of the operands. Counted and
// required: positive and negative transfers out of the top digit (s0 != 0),
// one- and two-digit output beats. Timing: with no gaps or back-pressure a
// pair's two digits are offered the cycle after the pair is taken.
//
// The expected digits come from the document's addition rule (t from |z+y| >
// 6, w = z+y-8t); the stimulus mix is this testbench's own.
module tb_addop;
  import sd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic       in_valid = 1'b0, in_ready, in_last = 1'b0;
  logic [7:0] in_z = '0, in_y = '0;
  logic       out_valid, out_ready = 1'b0, out_two, out_last;
  digit_t     out_d0, out_d1;

  addop dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  logic [7:0] zq[$], yq[$];
  bit         lq[$];
  longint     sumq[$];
  int         ndq[$];
  bit         gaps = 1'b1, stall = 1'b1;
  int n_pos = 0, n_neg = 0, n_two = 0, n_one = 0;
  int in_cyc = -1, out_cyc = -1;

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
        void'(zq.pop_front()); void'(yq.pop_front()); void'(lq.pop_front());
        free = 1'b1;
      end
      if (free) begin
        if (zq.size() > 0 && (!gaps || $urandom_range(2) != 0)) begin
          in_valid <= 1'b1; in_z <= zq[0]; in_y <= yq[0]; in_last <= lq[0];
        end else in_valid <= 1'b0;
      end
    end
  end

  // collector
  longint acc = 0;
  int     nd = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      if (!gaps && out_cyc < 0) out_cyc = cyc;
      if (out_two) n_two++; else n_one++;
      for (int h = 0; h < 2; h++) begin
        digit_t d;
        d = (h == 0) ? out_d0 : out_d1;
        if (h == 0 || out_two) begin
          if (d == 4'b1000) begin failures++; $display("digit code 1000"); end
          if (nd == 0 && dval(d) > 0) n_pos++;
          if (nd == 0 && dval(d) < 0) n_neg++;
          acc = acc * 8 + longint'(dval(d));
          nd++;
        end
      end
      if (out_last) begin
        checks++;
        if (sumq.size() == 0) begin
          failures++; $display("unexpected result");
        end else begin
          if (acc != sumq[0] || nd != ndq[0]) begin
            failures++;
            $display("sum %0d with %0d digits, expected %0d with %0d", acc, nd, sumq[0], ndq[0]);
          end
          void'(sumq.pop_front()); void'(ndq.pop_front());
        end
        acc = 0;
        nd  = 0;
      end
    end
  end

  function automatic logic [3:0] rd();
    int k;
    k = int'($urandom_range(5));
    if (k == 0) return 4'd7;
    if (k == 1) return 4'(-7);
    return 4'($urandom_range(14) - 7);
  endfunction

  task automatic one_op(input int np);
    longint z, y;
    z = 0; y = 0;
    for (int k = 0; k < np; k++) begin
      logic [7:0] bz, by;
      bz = {rd(), rd()}; by = {rd(), rd()};
      z = z * 64 + longint'(dval(bz[7:4])) * 8 + longint'(dval(bz[3:0]));
      y = y * 64 + longint'(dval(by[7:4])) * 8 + longint'(dval(by[3:0]));
      zq.push_back(bz); yq.push_back(by); lq.push_back(k == np - 1);
    end
    sumq.push_back(z + y);
    ndq.push_back(2 * np + 1);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 2000; i++) one_op(1 + int'($urandom_range(3)));
    wait (sumq.size() == 0);
    stall = 1'b0; gaps = 1'b0;
    repeat (3) @(posedge clk);
    one_op(3);
    wait (sumq.size() == 0);
    checks++;
    if (out_cyc - in_cyc != 1) begin
      failures++; $display("first digits offered %0d cycles after the pair", out_cyc - in_cyc);
    end
    checks += 4;
    if (n_pos == 0) begin failures++; $display("no positive overflow digit"); end
    if (n_neg == 0) begin failures++; $display("no negative overflow digit"); end
    if (n_two == 0) begin failures++; $display("no two-digit beat"); end
    if (n_one == 0) begin failures++; $display("no one-digit beat"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
