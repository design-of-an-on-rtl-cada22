// tb_fpm: self-checking testbench of the floating point multiplier.
//
// Operand packet pairs are streamed in with random input gaps and random
// output back-pressure. Each result is checked against a value worked out in
// the testbench from the operand digits: a normalised packet within the
// truncation bound 8^(exp-4) of the exact product, the zero packet for a zero
// operand, or the special packet for special operands and exponent
// overflow/underflow (definite: exp1+exp2 beyond +-121; limited: exactly
// +-121, where either the special packet or a correct normalised result in
// range is accepted). Mechanisms counted and required: mantissa overflow digit
// (result exponent exp1+exp2+1), leading-zero normalisation (exp1+exp2-1 or
// less), limited overflow resolved, limited underflow, definite overflow,
// definite underflow, special operand inputs, zero result, output stall.
// The latency of a lone operation is checked against a bound.
// Rate: 32 operations fed back to back with no gaps or back-pressure must
// finish within 10 cycles per operation plus one latency, i.e. operations
// overlap in the pipeline (the next operand packet enters while the previous
// result is still being formed).
//
// Normalisation, limited/definite over/underflow and the special rules
// follow the document; cycle bounds stand in for the document's nanosecond
// estimates.
module tb_fpm;
  import tb_sd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready;
  logic [7:0] in_data = '0;
  logic out_valid, out_ready = 1'b0, out_last;
  logic [7:0] out_data;

  fpm dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready,
           .out_data, .out_last);

  always #5 clk = ~clk;

  typedef struct {
    int   kind;   // 0: value, 1: exact packet, 2: value or the special packet p
    pkt_t p;
    real  v;
    int   xe;     // exp1 + exp2
  } exp_t;

  int checks = 0, failures = 0;
  exp_t expq[$];
  logic [7:0] inq[$];
  int n_ovf = 0, n_lz = 0, n_lovf = 0, n_lunf = 0, n_dovf = 0, n_dunf = 0, n_spin = 0, n_zero = 0;
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

  task automatic push(input pkt_t a, input pkt_t b, input exp_t x);
    inq.push_back(a.e); inq.push_back(a.m1); inq.push_back(a.m2);
    inq.push_back(b.e); inq.push_back(b.m1); inq.push_back(b.m2);
    expq.push_back(x);
  endtask

  function automatic exp_t ex_pkt(input pkt_t p);
    exp_t x; x.kind = 1; x.p = p; x.v = 0.0; x.xe = 0; return x;
  endfunction

  function automatic exp_t ex_val(input real v);
    exp_t x; x.kind = 0; x.p = sp_zero(); x.v = v; x.xe = 0; return x;
  endfunction

  function automatic exp_t ex_either(input real v, input pkt_t p);
    exp_t x; x.kind = 2; x.p = p; x.v = v; x.xe = 0; return x;
  endfunction

  // ordinary operands
  task automatic num_op(input pkt_t a, input pkt_t b);
    int x;
    real v;
    bit neg;
    x   = eint(a.e) + eint(b.e);
    v   = pval(a) * pval(b);
    neg = (v < 0.0);
    if (v == 0.0) begin
      n_zero++;
      push(a, b, ex_pkt(sp_zero()));
    end else if (x > 121) begin
      n_dovf++;
      push(a, b, ex_pkt(neg ? sp_ninf() : sp_pinf()));
    end else if (x < -121) begin
      n_dunf++;
      push(a, b, ex_pkt(neg ? sp_neps() : sp_peps()));
    end else if (x == 121) begin
      push(a, b, ex_either(v, neg ? sp_ninf() : sp_pinf()));
    end else if (x == -121) begin
      push(a, b, ex_either(v, neg ? sp_neps() : sp_peps()));
    end else begin
      exp_t e;
      e = ex_val(v);
      e.xe = x;
      push(a, b, e);
    end
  endtask

  // input driver with random gaps: inq[0] is on the bus while in_valid
  always @(posedge clk) begin
    bit free;
    if (rst_n) begin
      free = !in_valid;
      if (in_valid && in_ready) begin
        void'(inq.pop_front());
        free = 1'b1;
      end
      if (free) begin
        if (inq.size() > 0 && (!gaps || $urandom_range(3) != 0)) begin
          in_valid <= 1'b1;
          in_data  <= inq[0];
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
          if (x.kind == 1 || (x.kind == 2 && same(got, x.p))) begin
            if (!same(got, x.p)) begin
              failures++;
              $display("FAIL got %s expected %s", pstr(got), pstr(x.p));
            end
            if (x.kind == 2 && x.p.e[6:0] == 7'd123) n_lovf++;
            if (x.kind == 2 && x.p.e[6:0] == 7'd125) n_lunf++;
          end else begin
            real gv, tol;
            gv  = pval(got);
            tol = 8.0 ** (eint(got.e) - 4) * 1.000001;
            if (!is_norm(got) || (gv - x.v > tol) || (x.v - gv > tol)) begin
              failures++;
              $display("FAIL got %s (%g) expected about %g", pstr(got), gv, x.v);
            end
            if (x.kind == 2 && eint(got.e) == 120) n_lovf++;
            if (x.kind == 2 && eint(got.e) == -120) n_lunf++;
            if (x.kind == 0 && eint(got.e) == x.xe + 1) n_ovf++;
            if (x.kind == 0 && eint(got.e) < x.xe) n_lz++;
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
    num_op(a, b);
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

    // directed: product with a mantissa overflow digit (document example 7 style)
    a.e = ebyte(1); a.m1 = 8'h77; a.m2 = 8'h77;
    b.e = ebyte(1); b.m1 = 8'h77; b.m2 = 8'h77;
    num_op(a, b);
    // directed: small mantissas give leading zeros
    a.e = ebyte(3); a.m1 = 8'h11; a.m2 = 8'h00;
    b.e = ebyte(2); b.m1 = 8'h1F; b.m2 = 8'h00;
    num_op(a, b);
    // directed: limited overflow that resolves (small mantissas) and that does not
    a.e = ebyte(60); a.m1 = 8'h10; a.m2 = 8'h00;
    b.e = ebyte(61); b.m1 = 8'h10; b.m2 = 8'h00;
    num_op(a, b);
    a.m1 = 8'h70; b.m1 = 8'h70;
    num_op(a, b);
    // directed: limited underflow, definite overflow and underflow
    a.e = ebyte(-60); a.m1 = 8'h7F; a.m2 = 8'h00;
    b.e = ebyte(-61); b.m1 = 8'h77; b.m2 = 8'h00;
    num_op(a, b);
    a.e = ebyte(100); b.e = ebyte(90);
    num_op(a, b);
    a.e = ebyte(-100); b.e = ebyte(90); b.m1 = 8'h97;
    num_op(a, b);
    a.e = ebyte(-100); b.e = ebyte(-90);
    num_op(a, b);
    // directed: zero operand
    a = rnum(2); b = sp_zero();
    num_op(a, b);
    // directed: special operand inputs
    a = rnum(4);
    b = a; b.m1 = bneg(a.m1); b.m2 = bneg(a.m2);
    push(sp_pinf(), a, ex_pkt(a.m1[7] ? sp_ninf() : sp_pinf()));
    push(b, sp_ninf(), ex_pkt(a.m1[7] ? sp_ninf() : sp_pinf()));
    push(sp_pinf(), sp_peps(), ex_pkt(sp_err()));
    push(sp_zero(), sp_pinf(), ex_pkt(sp_err()));
    push(sp_err(), a, ex_pkt(sp_err()));
    push(sp_neps(), a, ex_pkt(a.m1[7] ? sp_peps() : sp_neps()));
    push(sp_peps(), sp_zero(), ex_pkt(sp_zero()));
    n_spin += 7;

    // random ordinary operations
    for (int i = 0; i < 600; i++) begin
      int ea, eb;
      if (i % 10 == 0) begin
        ea = 60 + int'($urandom_range(1));
        eb = 121 - ea;
        if (i % 20 == 0) begin ea = -ea; eb = -eb; end
      end else begin
        ea = int'($urandom_range(20)) - 10;
        eb = int'($urandom_range(20)) - 10;
      end
      a = rnum(ea); b = rnum(eb);
      num_op(a, b);
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
      for (int i = 0; i < 32; i++) num_op(rnum(2), rnum(1));
      wait (n_done == n0 + 32);
      tput = (int'($time) - c0) / 10;
    end
    checks++;
    if (tput > 32 * 10 + lat) begin
      failures++;
      $display("32 back-to-back operations took %0d cycles", tput);
    end
    checks++; if (n_ovf == 0)  begin failures++; $display("no mantissa overflow"); end
    checks++; if (n_lz == 0)   begin failures++; $display("no leading-zero normalisation"); end
    checks++; if (n_lovf == 0) begin failures++; $display("no limited overflow"); end
    checks++; if (n_lunf == 0) begin failures++; $display("no limited underflow"); end
    checks++; if (n_dovf == 0) begin failures++; $display("no definite overflow"); end
    checks++; if (n_dunf == 0) begin failures++; $display("no definite underflow"); end
    checks++; if (n_zero == 0) begin failures++; $display("no zero result"); end
    checks++; if (n_stall == 0) begin failures++; $display("no output stall"); end
    $display("ovf %0d lz %0d limited-ovf %0d limited-unf %0d def-ovf %0d def-unf %0d zero %0d special %0d stalls %0d latency %0d, 32 in a row %0d cycles",
             n_ovf, n_lz, n_lovf, n_lunf, n_dovf, n_dunf, n_zero, n_spin, n_stall, lat, tput);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
