// tb_olbp_top: end-to-end self-checking testbench of the processor top level
// at its default size (2 mantissa bytes, no parameter overridden).
//
// Both functional units are driven at the same time through the top-level
// ports, each with its own packet stream, random input gaps and random result
// back-pressure. Every result packet is checked against a value computed in
// the testbench from the operand digits: bit for bit where the result is a
// bypassed operand or a special packet, otherwise a normalised packet within
// the truncation bound 8^(exp-4) of the exact sum, difference or product.
// Each mechanism is counted from what the design did and must have happened
// at least once: adder alignment delays 0..3, bypass, adder mantissa
// overflow, adder cancellation, exact zero, exponent overflow, special
// operands; multiplier overflow digit, multiplier leading-zero normalisation,
// limited and definite overflow, zero operand, special operands; output
// stalls of both units; both units busy in the same cycle. A lone addition
// and a lone multiplication are timed against a latency bound.
//
// The mechanisms counted are those the document names; placing the two units
// side by side with separate ports is this design's choice.
// The document's worst-case addition (.-1 7 7 7 E63 + .1 0 0 1 E60, six
// cancelled digits) is checked for its exact result .1000 E57.
module tb_olbp_top;
  import tb_sd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic       as_in_valid = 1'b0, as_in_ready, as_in_sub = 1'b0;
  logic [7:0] as_in_data = '0;
  logic       as_out_valid, as_out_ready = 1'b0, as_out_last;
  logic [7:0] as_out_data;
  logic       m_in_valid = 1'b0, m_in_ready;
  logic [7:0] m_in_data = '0;
  logic       m_out_valid, m_out_ready = 1'b0, m_out_last;
  logic [7:0] m_out_data;

  olbp_top dut (.*);

  always #5 clk = ~clk;

  // kind 0: value within the bound, 1: exact packet, 2: value or packet
  typedef struct {
    int   kind;
    pkt_t p;
    real  v;
    int   xe;      // reference exponent: max (adder) or exp1 + exp2 (multiplier)
    int   tag;     // mechanism the operation was chosen to show
  } exp_t;

  localparam int T_NONE = 0, T_OVF = 1, T_LZ = 2;

  int checks = 0, failures = 0;
  exp_t       aq[$], mq[$];
  logic [7:0] ainq[$], minq[$];
  logic       asubq[$];
  int n_delay[4] = '{0, 0, 0, 0};
  int a_bypass = 0, a_ovf = 0, a_lz = 0, a_zero = 0, a_inf = 0, a_spin = 0, a_stall = 0, a_done = 0;
  int m_ovf = 0, m_lz = 0, m_lim = 0, m_def = 0, m_zero = 0, m_spin = 0, m_stall = 0, m_done = 0;
  int both_busy = 0;
  bit stall_en = 1'b1;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic exp_t mk(input int kind, input pkt_t p, input real v, input int xe,
                              input int tag);
    exp_t x;
    x.kind = kind; x.p = p; x.v = v; x.xe = xe; x.tag = tag;
    return x;
  endfunction

  function automatic pkt_t negp(input pkt_t a);
    pkt_t r;
    r = a; r.m1 = bneg(a.m1); r.m2 = bneg(a.m2);
    return r;
  endfunction

  task automatic a_push(input bit sub, input pkt_t a, input pkt_t b, input exp_t x);
    ainq.push_back(a.e); ainq.push_back(a.m1); ainq.push_back(a.m2);
    ainq.push_back(b.e); ainq.push_back(b.m1); ainq.push_back(b.m2);
    repeat (6) asubq.push_back(sub);
    aq.push_back(x);
  endtask

  task automatic m_push(input pkt_t a, input pkt_t b, input exp_t x);
    minq.push_back(a.e); minq.push_back(a.m1); minq.push_back(a.m2);
    minq.push_back(b.e); minq.push_back(b.m1); minq.push_back(b.m2);
    mq.push_back(x);
  endtask

  // ordinary addition or subtraction
  task automatic a_op(input bit sub, input pkt_t a, input pkt_t b, input int tag);
    int d;
    real v;
    d = eint(a.e) - eint(b.e);
    v = sub ? pval(a) - pval(b) : pval(a) + pval(b);
    if (d >= 4)       begin a_bypass++; a_push(sub, a, b, mk(1, a, 0.0, 0, tag)); end
    else if (d <= -4) begin a_bypass++; a_push(sub, a, b, mk(1, sub ? negp(b) : b, 0.0, 0, tag)); end
    else begin
      n_delay[(d < 0) ? -d : d]++;
      if (v == 0.0) a_push(sub, a, b, mk(1, sp_zero(), 0.0, 0, tag));
      else a_push(sub, a, b, mk(0, sp_zero(), v, (d < 0) ? eint(b.e) : eint(a.e), tag));
    end
  endtask

  // ordinary multiplication
  task automatic m_op(input pkt_t a, input pkt_t b);
    int x;
    real v;
    bit neg;
    x   = eint(a.e) + eint(b.e);
    v   = pval(a) * pval(b);
    neg = (v < 0.0);
    if (v == 0.0)       m_push(a, b, mk(1, sp_zero(), 0.0, x, T_NONE));
    else if (x > 121)   begin m_def++; m_push(a, b, mk(1, neg ? sp_ninf() : sp_pinf(), 0.0, x, T_NONE)); end
    else if (x < -121)  begin m_def++; m_push(a, b, mk(1, neg ? sp_neps() : sp_peps(), 0.0, x, T_NONE)); end
    else if (x == 121)  m_push(a, b, mk(2, neg ? sp_ninf() : sp_pinf(), v, x, T_NONE));
    else if (x == -121) m_push(a, b, mk(2, neg ? sp_neps() : sp_peps(), v, x, T_NONE));
    else                m_push(a, b, mk(0, sp_zero(), v, x, T_NONE));
  endtask

  // input drivers: the queue head is on the bus while valid
  always @(posedge clk) begin
    bit free;
    if (rst_n) begin
      free = !as_in_valid;
      if (as_in_valid && as_in_ready) begin
        void'(ainq.pop_front());
        void'(asubq.pop_front());
        free = 1'b1;
      end
      if (free) begin
        if (ainq.size() > 0 && $urandom_range(3) != 0) begin
          as_in_valid <= 1'b1;
          as_in_data  <= ainq[0];
          as_in_sub   <= asubq[0];
        end else begin
          as_in_valid <= 1'b0;
        end
      end
    end
  end

  always @(posedge clk) begin
    bit free;
    if (rst_n) begin
      free = !m_in_valid;
      if (m_in_valid && m_in_ready) begin
        void'(minq.pop_front());
        free = 1'b1;
      end
      if (free) begin
        if (minq.size() > 0 && $urandom_range(3) != 0) begin
          m_in_valid <= 1'b1;
          m_in_data  <= minq[0];
        end else begin
          m_in_valid <= 1'b0;
        end
      end
    end
  end

  always @(posedge clk) as_out_ready <= !stall_en || ($urandom_range(4) != 0);
  always @(posedge clk) m_out_ready <= !stall_en || ($urandom_range(3) != 0);

  // common result check; returns 1 if the value path was taken
  task automatic check(input string u, input pkt_t got, input exp_t x, output bit valpath);
    checks++;
    valpath = 1'b0;
    if (x.kind == 1 || (x.kind == 2 && same(got, x.p))) begin
      if (!same(got, x.p)) begin
        failures++;
        $display("%s FAIL got %s expected %s", u, pstr(got), pstr(x.p));
      end
    end else begin
      real gv, tol;
      valpath = 1'b1;
      gv  = pval(got);
      tol = 8.0 ** (eint(got.e) - 4) * 1.000001;
      if (!is_norm(got) || (gv - x.v > tol) || (x.v - gv > tol)) begin
        failures++;
        $display("%s FAIL got %s (%g) expected about %g", u, pstr(got), gv, x.v);
      end
    end
  endtask

  pkt_t agot, mgot;
  int   abyte = 0, mbyte = 0;

  always @(posedge clk) begin
    if (rst_n && as_out_valid && !as_out_ready) a_stall++;
    if (rst_n && as_out_valid && as_out_ready) begin
      unique case (abyte)
        0: agot.e = as_out_data;
        1: agot.m1 = as_out_data;
        default: agot.m2 = as_out_data;
      endcase
      if (as_out_last != (abyte == 2)) begin failures++; $display("adder out_last wrong"); end
      abyte = (abyte == 2) ? 0 : abyte + 1;
      if (abyte == 0) begin
        exp_t x;
        bit vp;
        a_done++;
        if (aq.size() == 0) begin
          failures++; $display("unexpected adder packet %s", pstr(agot));
        end else begin
          x = aq.pop_front();
          check("adder", agot, x, vp);
          if (x.kind == 1 && same(x.p, sp_zero())) a_zero++;
          if (vp && eint(agot.e) == x.xe + 1) a_ovf++;
          if (vp && eint(agot.e) < x.xe) a_lz++;
          if (x.kind == 1 && agot.e[6:0] == 7'd123) a_inf++;
        end
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n && m_out_valid && !m_out_ready) m_stall++;
    if (rst_n && m_out_valid && m_out_ready) begin
      unique case (mbyte)
        0: mgot.e = m_out_data;
        1: mgot.m1 = m_out_data;
        default: mgot.m2 = m_out_data;
      endcase
      if (m_out_last != (mbyte == 2)) begin failures++; $display("multiplier out_last wrong"); end
      mbyte = (mbyte == 2) ? 0 : mbyte + 1;
      if (mbyte == 0) begin
        exp_t x;
        bit vp;
        m_done++;
        if (mq.size() == 0) begin
          failures++; $display("unexpected multiplier packet %s", pstr(mgot));
        end else begin
          x = mq.pop_front();
          check("multiplier", mgot, x, vp);
          if (x.kind == 1 && same(x.p, sp_zero())) m_zero++;
          if (vp && x.kind == 0 && eint(mgot.e) == x.xe + 1) m_ovf++;
          if (vp && x.kind == 0 && eint(mgot.e) < x.xe) m_lz++;
          if (x.kind == 2) m_lim++;
        end
      end
    end
  end

  always @(posedge clk)
    if (rst_n && (as_in_valid || aq.size() > 0) && (m_in_valid || mq.size() > 0)) both_busy++;

  initial begin
    pkt_t a, b, c;
    int t0, lat_a, lat_m;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;

    // lone operations for latency
    stall_en = 1'b0;
    a_op(1'b0, rnum(3), rnum(2), T_NONE);
    @(posedge clk);
    t0 = int'($time);
    wait (a_done == 1);
    lat_a = (int'($time) - t0) / 10;
    m_op(rnum(3), rnum(2));
    @(posedge clk);
    t0 = int'($time);
    wait (m_done == 1);
    lat_m = (int'($time) - t0) / 10;
    checks += 2;
    if (lat_a > 40) begin failures++; $display("adder latency %0d", lat_a); end
    if (lat_m > 40) begin failures++; $display("multiplier latency %0d", lat_m); end
    stall_en = 1'b1;

    // adder: directed cases
    a.e = ebyte(5); a.m1 = 8'h76; a.m2 = 8'h54;
    a_op(1'b0, a, a, T_OVF);
    b = a; b.m2 = 8'h55;
    a_op(1'b1, a, b, T_LZ);
    a_op(1'b1, a, a, T_NONE);
    a.e = ebyte(120); a.m1 = 8'h70; a.m2 = 8'h00;
    a_push(1'b0, a, a, mk(1, sp_pinf(), 0.0, 0, T_NONE));
    a = rnum(2);
    a_push(1'b1, a, sp_pinf(), mk(1, sp_ninf(), 0.0, 0, T_NONE));
    a_push(1'b0, sp_pinf(), sp_ninf(), mk(1, sp_err(), 0.0, 0, T_NONE));
    a_push(1'b0, sp_peps(), a, mk(1, a, 0.0, 0, T_NONE));
    a_spin += 3;
    // the document's worst-case cancellation: .-1 7 7 7 E63 + .1 0 0 1 E60
    a.e = ebyte(63); a.m1 = 8'hF7; a.m2 = 8'h77;
    b.e = ebyte(60); b.m1 = 8'h10; b.m2 = 8'h01;
    c.e = ebyte(57); c.m1 = 8'h10; c.m2 = 8'h00;
    a_push(1'b0, a, b, mk(1, c, 0.0, 0, T_NONE));

    // multiplier: directed cases
    a.e = ebyte(1); a.m1 = 8'h77; a.m2 = 8'h77;
    m_op(a, a);
    a.e = ebyte(3); a.m1 = 8'h11; a.m2 = 8'h00;
    b.e = ebyte(2); b.m1 = 8'h1F; b.m2 = 8'h00;
    m_op(a, b);
    a.e = ebyte(60); a.m1 = 8'h10; a.m2 = 8'h00;
    b.e = ebyte(61); b.m1 = 8'h10; b.m2 = 8'h00;
    m_op(a, b);
    a.e = ebyte(100); b.e = ebyte(90);
    m_op(a, b);
    m_op(rnum(4), sp_zero());
    a = rnum(4);
    m_push(sp_ninf(), a, mk(1, a.m1[7] ? sp_pinf() : sp_ninf(), 0.0, 0, T_NONE));
    m_push(sp_pinf(), sp_zero(), mk(1, sp_err(), 0.0, 0, T_NONE));
    m_push(a, sp_peps(), mk(1, a.m1[7] ? sp_neps() : sp_peps(), 0.0, 0, T_NONE));
    m_spin += 3;

    // random operations on both units at once
    for (int i = 0; i < 400; i++) begin
      int ea, eb;
      ea = int'($urandom_range(10)) - 5;
      eb = ea + int'($urandom_range(10)) - 5;
      a_op(1'($urandom_range(1)), rnum(ea), rnum(eb), T_NONE);
      if (i % 8 == 0) begin
        ea = 60 + int'($urandom_range(1));
        m_op(rnum(ea), rnum(121 - ea));
      end else begin
        m_op(rnum(int'($urandom_range(20)) - 10), rnum(int'($urandom_range(20)) - 10));
      end
    end

    wait (aq.size() == 0 && mq.size() == 0);
    repeat (20) @(posedge clk);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_delay[i] == 0) begin failures++; $display("adder delay %0d never seen", i); end
    end
    checks++; if (a_bypass == 0) begin failures++; $display("no adder bypass"); end
    checks++; if (a_ovf == 0)    begin failures++; $display("no adder mantissa overflow"); end
    checks++; if (a_lz == 0)     begin failures++; $display("no adder cancellation"); end
    checks++; if (a_zero == 0)   begin failures++; $display("no adder zero result"); end
    checks++; if (a_inf == 0)    begin failures++; $display("no adder overflow"); end
    checks++; if (a_stall == 0)  begin failures++; $display("no adder stall"); end
    checks++; if (m_ovf == 0)    begin failures++; $display("no multiplier overflow digit"); end
    checks++; if (m_lz == 0)     begin failures++; $display("no multiplier normalisation"); end
    checks++; if (m_lim == 0)    begin failures++; $display("no limited overflow"); end
    checks++; if (m_def == 0)    begin failures++; $display("no definite overflow"); end
    checks++; if (m_zero == 0)   begin failures++; $display("no multiplier zero"); end
    checks++; if (m_stall == 0)  begin failures++; $display("no multiplier stall"); end
    checks++; if (both_busy == 0) begin failures++; $display("units never busy together"); end
    $display("adder: delays %0d %0d %0d %0d bypass %0d ovf %0d lz %0d zero %0d inf %0d special %0d stalls %0d latency %0d",
             n_delay[0], n_delay[1], n_delay[2], n_delay[3], a_bypass, a_ovf, a_lz, a_zero,
             a_inf, a_spin, a_stall, lat_a);
    $display("multiplier: ovf %0d lz %0d limited %0d definite %0d zero %0d special %0d stalls %0d latency %0d",
             m_ovf, m_lz, m_lim, m_def, m_zero, m_spin, m_stall, lat_m);
    $display("both busy %0d cycles", both_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
