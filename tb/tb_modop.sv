// tb_modop: self-checking testbench of the FPAS operand modifier MODOP.
//
// For random commands (which operand is delayed, a delay of 0..3 digits,
// add or subtract) and random operand digits, the two mantissa byte pairs
// are offered with random gaps while ADDOP's side applies random
// back-pressure. A reference model builds the expected aligned streams: the
// delayed operand gets SFD leading zero digits, op2 is negated digit by
// digit for a subtraction, and both are padded with zero digits to
// ceil((4 + SFD)/2) byte pairs. Every output pair, its count and out_last are
// checked; each delay must occur both ways and with subtraction. Timing: with
// no gaps and no back-pressure a pair must leave one cycle after it entered.
//
// Delaying the smaller operand by SFD digits and negating op2 follow the
// document; the end padding to equal stream lengths is this design's choice.
module tb_modop;
  import sd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic       ctl_valid = 1'b0, ctl_ready;
  modop_ctl_t ctl = '0;
  logic       in_valid = 1'b0, in_ready, in_last = 1'b0;
  logic [7:0] in_op1 = '0, in_op2 = '0;
  logic       out_valid, out_ready = 1'b0, out_last;
  logic [7:0] out_z, out_y;

  modop dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  logic [7:0] zq[$], yq[$];
  bit         lq[$];
  int         seen[2][4][2];
  bit         stall = 1'b1;
  int         in_cyc = 0, out_first = -1;
  modop_ctl_t ctlq[$];
  logic [7:0] i1q[$], i2q[$];
  bit         ilq[$];
  bit         gaps = 1'b1;

  // drivers: the queue head is on the bus while valid
  always @(posedge clk) begin
    bit free;
    if (rst_n) begin
      free = !ctl_valid;
      if (ctl_valid && ctl_ready) begin void'(ctlq.pop_front()); free = 1'b1; end
      if (free) begin
        if (ctlq.size() > 0 && (!gaps || $urandom_range(2) != 0)) begin
          ctl_valid <= 1'b1; ctl <= ctlq[0];
        end else ctl_valid <= 1'b0;
      end
      free = !in_valid;
      if (in_valid && in_ready) begin
        if (!gaps && in_cyc < 0) in_cyc = cyc;
        void'(i1q.pop_front()); void'(i2q.pop_front()); void'(ilq.pop_front());
        free = 1'b1;
      end
      if (free) begin
        if (i1q.size() > 0 && (!gaps || $urandom_range(2) != 0)) begin
          in_valid <= 1'b1; in_op1 <= i1q[0]; in_op2 <= i2q[0]; in_last <= ilq[0];
        end else in_valid <= 1'b0;
      end
    end
  end

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
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (out_first < 0) out_first = cyc;
      if (zq.size() == 0) begin
        failures++; $display("unexpected output pair");
      end else begin
        if (out_z != zq[0] || out_y != yq[0] || out_last != lq[0]) begin
          failures++;
          $display("pair %h %h last %b, expected %h %h %b", out_z, out_y, out_last, zq[0], yq[0], lq[0]);
        end
        void'(zq.pop_front()); void'(yq.pop_front()); void'(lq.pop_front());
      end
    end
  end

  task automatic one_op(input bit d1, input int sfd, input bit sub);
    logic [3:0] a [4], b [4], za [8], ya [8];
    logic [7:0] m1 [2], m2 [2];
    int np;
    for (int i = 0; i < 4; i++) begin a[i] = 4'($urandom_range(14) - 7); b[i] = 4'($urandom_range(14) - 7); end
    m1[0] = {a[0], a[1]}; m1[1] = {a[2], a[3]};
    m2[0] = {b[0], b[1]}; m2[1] = {b[2], b[3]};
    for (int i = 0; i < 8; i++) begin za[i] = '0; ya[i] = '0; end
    for (int i = 0; i < 4; i++) begin
      logic [3:0] bb;
      bb = sub ? 4'(-b[i]) : b[i];
      za[i + (d1 ? sfd : 0)] = a[i];
      ya[i + (d1 ? 0 : sfd)] = bb;
    end
    np = (4 + sfd + 1) / 2;
    for (int k = 0; k < np; k++) begin
      zq.push_back({za[2*k], za[2*k+1]});
      yq.push_back({ya[2*k], ya[2*k+1]});
      lq.push_back(k == np - 1);
    end
    seen[d1][sfd][sub]++;
    ctlq.push_back('{delay1: d1, sfd: 4'(sfd), sub: sub});
    for (int k = 0; k < 2; k++) begin
      i1q.push_back(m1[k]); i2q.push_back(m2[k]); ilq.push_back(k == 1);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 2; i++) for (int j = 0; j < 4; j++) for (int k = 0; k < 2; k++) seen[i][j][k] = 0;
    for (int i = 0; i < 1000; i++)
      one_op(1'($urandom_range(1)), int'($urandom_range(3)), 1'($urandom_range(1)));
    wait (zq.size() == 0);
    // timing with no gaps or stalls
    stall = 1'b0;
    gaps = 1'b0;
    repeat (3) @(posedge clk);
    out_first = -1;
    in_cyc = -100;
    one_op(1'b0, 0, 1'b0);
    wait (zq.size() == 0);
    checks++;
    if (out_first - in_cyc != 1) begin
      failures++; $display("first pair left %0d cycles after it entered", out_first - in_cyc);
    end
    repeat (3) @(posedge clk);
    for (int i = 0; i < 2; i++) for (int j = 0; j < 4; j++) for (int k = 0; k < 2; k++) begin
      checks++;
      if (seen[i][j][k] == 0) begin failures++; $display("case %0d %0d %0d not seen", i, j, k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
