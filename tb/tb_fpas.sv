// tb_fpas: self-checking testbench of the floating point adder-subtractor.
//
// Operand packet pairs are streamed in with random input gaps and random
// output back-pressure. Every result packet is checked against a value worked
// out in the testbench from the operand digits:
//  * exponent difference of 4 digits or more: the larger operand (negated
//    for a subtraction that returns op2), bit for bit;
//  * otherwise: a normalised result whose value is within the truncation
//    bound 8^(exp-4) of the exact sum or difference, or the zero packet for
//    an exact zero;
//  * special operands and exponent over/underflow: the special packet.
// The document's worked examples (a 2-digit alignment, a bypass and a
// digit-level signed-digit sum) are run as directed cases.
// Each mechanism (delays 0..3, bypass, mantissa overflow, leading-zero
// normalisation, zero result, overflow to inf, underflow to eps, special
// operand inputs, output stall) is counted and must occur at least once.
// The latency of a lone operation (first input byte to last result byte) is
// also checked against a bound.
// Rate: 32 operations fed back to back with no gaps or back-pressure must
// finish within 10 cycles per operation plus one latency, i.e. operations
// overlap in the pipeline (the next operand packet enters while the previous
// result is still being formed).
//
// Truncation, normalisation and the special-operand rules follow the
// document; the bounds on latency and rate are in clock cycles, this
// design's stand-in for the document's nanosecond estimates.
module tb_fpas;
  import tb_sd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, in_sub = 1'b0;
  logic [7:0] in_data = '0;
  logic out_valid, out_ready = 1'b0, out_last;
  logic [7:0] out_data;

  fpas dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    bit   exact;
    pkt_t p;      // expected packet if exact
    real  v;      // expected value otherwise
  } exp_t;

  int checks = 0, failures = 0;
  exp_t expq[$];
  logic [7:0] inq[$];
  logic       subq[$];
  int n_delay[4] = '{0, 0, 0, 0};
  int n_bypass = 0, n_ovf = 0, n_lz = 0, n_zero = 0, n_inf = 0, n_eps = 0, n_spin = 0;
  int n_stall = 0, n_done = 0;
  bit stall_en = 1'b1;
  bit gaps = 1'b1;

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push(input bit sub, input pkt_t a, input pkt_t b, input exp_t x);
    inq.push_back(a.e); inq.push_back(a.m1); inq.push_back(a.m2);
    inq.push_back(b.e); inq.push_back(b.m1); inq.push_back(b.m2);
    repeat (6) subq.push_back(sub);
    expq.push_back(x);
  endtask

  function automatic exp_t ex_pkt(input pkt_t p);
    exp_t x; x.exact = 1'b1; x.p = p; x.v = 0.0; return x;
  endfunction

  function automatic exp_t ex_val(input real v);
    exp_t x; x.exact = 1'b0; x.p = sp_zero(); x.v = v; return x;
  endfunction

  // ordinary operands
  task automatic num_op(input bit sub, input pkt_t a, input pkt_t b);
    int ea, eb, d;
    real v;
    ea = eint(a.e);
    eb = eint(b.e);
    d  = ea - eb;
    v  = sub ? pval(a) - pval(b) : pval(a) + pval(b);
    if (d >= 4) begin
      n_bypass++;
      push(sub, a, b, ex_pkt(a));
    end else if (d <= -4) begin
      pkt_t r;
      n_bypass++;
      r = b;
      if (sub) begin r.m1 = bneg(b.m1); r.m2 = bneg(b.m2); end
      push(sub, a, b, ex_pkt(r));
    end else begin
      n_delay[(d < 0) ? -d : d]++;
      if (v == 0.0) begin
        n_zero++;
        push(sub, a, b, ex_pkt(sp_zero()));
      end else begin
        push(sub, a, b, ex_val(v));
      end
    end
  endtask

  // input driver with random gaps: inq[0] is on the bus while in_valid
  always @(posedge clk) begin
    bit free;
    if (rst_n) begin
      free = !in_valid;
      if (in_valid && in_ready) begin
        void'(inq.pop_front());
        void'(subq.pop_front());
        free = 1'b1;
      end
      if (free) begin
        if (inq.size() > 0 && (!gaps || $urandom_range(3) != 0)) begin
          in_valid <= 1'b1;
          in_data  <= inq[0];
          in_sub   <= subq[0];
        end else begin
          in_valid <= 1'b0;
        end
      end
    end
  end

  always @(posedge clk) out_ready <= !stall_en || ($urandom_range(4) != 0);

  // output monitor
  pkt_t got;
  int   obyte = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid && !out_ready) n_stall++;
    if (rst_n && out_valid && out_ready) begin
      unique case (obyte)
        0: got.e = out_data;
        1: got.m1 = out_data;
        default: got.m2 = out_data;
      endcase
      if (out_last != (obyte == 2)) begin
        failures++;
        $display("out_last wrong at byte %0d", obyte);
      end
      obyte = (obyte == 2) ? 0 : obyte + 1;
      if (obyte == 0) begin
        exp_t x;
        checks++;
        n_done++;
        if (expq.size() == 0) begin
          failures++;
          $display("unexpected packet %s", pstr(got));
        end else begin
          x = expq.pop_front();
          if (x.exact) begin
            if (!same(got, x.p)) begin
              failures++;
              $display("FAIL got %s expected %s", pstr(got), pstr(x.p));
            end
          end else begin
            real gv, tol;
            gv  = pval(got);
            tol = 8.0 ** (eint(got.e) - 4) * 1.000001;
            if (!is_norm(got) || (gv - x.v > tol) || (x.v - gv > tol)) begin
              failures++;
              $display("FAIL got %s (%g) expected about %g", pstr(got), gv, x.v);
            end
          end
        end
      end
    end
  end

  initial begin
    pkt_t a, b, c;
    int t0, lat, tput;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;

    // one lone operation to measure the latency
    stall_en = 1'b0;
    a = rnum(3); b = rnum(2);
    num_op(1'b0, a, b);
    @(posedge clk);
    t0 = $time;
    wait (n_done == 1);
    lat = ($time - t0) / 10;
    checks++;
    if (lat > 40) begin
      failures++;
      $display("latency %0d cycles too long", lat);
    end
    stall_en = 1'b1;

    // directed: mantissa overflow (7xxx + 7xxx)
    a.e = ebyte(5); a.m1 = 8'h76; a.m2 = 8'h54;
    b = a;
    n_ovf++;
    num_op(1'b0, a, b);
    // directed: cancellation leaving leading zeros
    a.e = ebyte(2); a.m1 = 8'h34; a.m2 = 8'h56;
    b.e = ebyte(2); b.m1 = 8'h34; b.m2 = 8'h57;
    n_lz++;
    num_op(1'b1, a, b);
    // directed: the document's worst case, delay 3 and six cancelled digits:
    // .-1 7 7 7 E63 + .1 0 0 1 E60 = .0000001 E63 = .1000 E57
    a.e = ebyte(63); a.m1 = 8'hF7; a.m2 = 8'h77;
    b.e = ebyte(60); b.m1 = 8'h10; b.m2 = 8'h01;
    c.e = ebyte(57); c.m1 = 8'h10; c.m2 = 8'h00;
    n_lz++;
    n_delay[3]++;
    push(1'b0, a, b, ex_pkt(c));
    // and the same with a -1 leading digit in a normalised sum
    a.e = ebyte(63); a.m1 = 8'h1F; a.m2 = 8'hFF;
    n_lz++;
    num_op(1'b0, a, b);
    // the document's worked examples: .3451 E+13 + .5766 E+11 (delay 2),
    // .3767 E+69 + .2557 E+65 (bypass, result X), and
    // .6 5 -1 -3 + .4 -7 -1 -4 (signed-digit addition, equal exponents)
    a.e = ebyte(13); a.m1 = 8'h34; a.m2 = 8'h51;
    b.e = ebyte(11); b.m1 = 8'h57; b.m2 = 8'h66;
    num_op(1'b0, a, b);
    a.e = ebyte(69); a.m1 = 8'h37; a.m2 = 8'h67;
    b.e = ebyte(65); b.m1 = 8'h25; b.m2 = 8'h57;
    num_op(1'b0, a, b);
    a.e = ebyte(0); a.m1 = 8'h65; a.m2 = 8'hFD;
    b.e = ebyte(0); b.m1 = 8'h49; b.m2 = 8'hFC;
    num_op(1'b0, a, b);
    // directed: exact zero
    a = rnum(7);
    num_op(1'b1, a, a);
    // directed: exponent overflow to +inf / -inf
    a.e = ebyte(120); a.m1 = 8'h70; a.m2 = 8'h00;
    n_inf++;
    push(1'b0, a, a, ex_pkt(sp_pinf()));
    a.m1 = 8'h90;
    n_inf++;
    push(1'b0, a, a, ex_pkt(sp_ninf()));
    // directed: exponent underflow to +eps (cancellation at exponent -120)
    a.e = ebyte(-120); a.m1 = 8'h34; a.m2 = 8'h56;
    b.e = ebyte(-120); b.m1 = 8'h34; b.m2 = 8'h55;
    n_eps++;
    push(1'b1, a, b, ex_pkt(sp_peps()));
    // directed: special operand inputs
    a = rnum(4);
    push(1'b0, sp_pinf(), a, ex_pkt(sp_pinf()));
    push(1'b1, a, sp_pinf(), ex_pkt(sp_ninf()));
    push(1'b1, sp_pinf(), sp_pinf(), ex_pkt(sp_err()));
    push(1'b0, sp_ninf(), sp_ninf(), ex_pkt(sp_ninf()));
    push(1'b0, sp_err(), a, ex_pkt(sp_err()));
    push(1'b0, sp_peps(), a, ex_pkt(a));
    c = a; c.m1 = bneg(a.m1); c.m2 = bneg(a.m2);
    push(1'b1, sp_peps(), a, ex_pkt(c));
    push(1'b0, sp_peps(), sp_peps(), ex_pkt(sp_peps()));
    n_spin += 8;

    // random ordinary operations
    for (int i = 0; i < 600; i++) begin
      int ea, eb;
      ea = int'($urandom_range(10)) - 5;
      eb = ea + int'($urandom_range(10)) - 5;
      num_op(1'($urandom_range(1)), rnum(ea), rnum(eb));
    end

    wait (expq.size() == 0);
    repeat (20) @(posedge clk);
    // throughput: 32 operations back to back, no gaps, no back-pressure
    stall_en = 1'b0;
    gaps = 1'b0;
    repeat (3) @(posedge clk);
    begin
      int n0, c0;
      n0 = n_done;
      c0 = int'($time);
      for (int i = 0; i < 32; i++) num_op(1'b0, rnum(2), rnum(1));
      wait (n_done == n0 + 32);
      tput = (int'($time) - c0) / 10;
    end
    checks++;
    if (tput > 32 * 10 + lat) begin
      failures++;
      $display("32 back-to-back operations took %0d cycles", tput);
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_delay[i] == 0) begin failures++; $display("delay %0d never seen", i); end
    end
    checks++; if (n_bypass == 0) begin failures++; $display("no bypass"); end
    checks++; if (n_zero == 0)   begin failures++; $display("no zero result"); end
    checks++; if (n_stall == 0)  begin failures++; $display("no output stall"); end
    $display("delays %0d %0d %0d %0d bypass %0d ovf %0d lz %0d zero %0d inf %0d eps %0d special %0d stalls %0d latency %0d, 32 in a row %0d cycles",
             n_delay[0], n_delay[1], n_delay[2], n_delay[3], n_bypass, n_ovf, n_lz, n_zero,
             n_inf, n_eps, n_spin, n_stall, lat, tput);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
