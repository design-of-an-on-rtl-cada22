// tb_normop: self-checking testbench of the FPAS output stage NORMOP.
//
// Three kinds of operation are mixed at random, each with its descriptor
// from the EXPFIX side:
//  * normal: a sum digit string of 5, 7 or 9 digits (often with leading
//    zeros, sometimes all zero) arrives in one- and two-digit beats; the
//    unnormalised exponent is random, also close to +-120;
//  * bypass: two mantissa byte pairs arrive on the MPX side and op1 or op2
//    (negated or not) must leave behind the given exponent;
//  * special: the chosen special packet must leave.
// All inputs come with random gaps and the output has random back-pressure.
// The expected normal result is computed in the testbench: leading digit =
// first non-zero digit, exponent = unnormalised exponent + 1 - its position,
// 4 digits kept, zero filled, +-inf / +-eps beyond +-120, zero packet for an
// all-zero string. Counted and required: overflow digit, leading zeros,
// zero result, inf, eps, bypass with negation, special. Timing: with no gaps
// the exponent byte must leave the cycle after the leading digit is taken.
//
// The normalise-and-pack routine follows the document; the special packet
// mantissas and bypass negation are this design's choices.
module tb_normop;
  import sd_pkg::*;
  import tb_sd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic       res_valid = 1'b0, res_ready;
  fpas_res_t  res = '0;
  logic       d_valid = 1'b0, d_ready, d_two = 1'b0, d_last = 1'b0;
  digit_t     d0 = '0, d1 = '0;
  logic       op_valid = 1'b0, op_ready, op_last = 1'b0;
  logic [7:0] op1 = '0, op2 = '0;
  logic       out_valid, out_ready = 1'b0, out_last;
  logic [7:0] out_data;

  normop dut (.*);

  always #5 clk = ~clk;

  typedef struct packed {
    logic   two;
    digit_t a;
    digit_t b;
    logic   last;
  } beat_t;

  int checks = 0, failures = 0, cyc = 0;
  fpas_res_t rq[$];
  beat_t     bq[$];
  logic [7:0] o1q[$], o2q[$];
  bit         olq[$];
  pkt_t       expq[$];
  int n_ovf = 0, n_lz = 0, n_zero = 0, n_inf = 0, n_eps = 0, n_byp = 0, n_neg = 0, n_sp = 0;
  bit gaps = 1'b1, stall = 1'b1;
  int lead_cyc = -1, exp_cyc = -1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc++;
  always @(posedge clk) out_ready <= !stall || ($urandom_range(3) != 0);

  // drivers: the queue head is on the bus while valid
  always @(posedge clk) begin
    bit free;
    if (rst_n) begin
      free = !res_valid;
      if (res_valid && res_ready) begin void'(rq.pop_front()); free = 1'b1; end
      if (free) begin
        if (rq.size() > 0 && (!gaps || $urandom_range(2) != 0)) begin
          res_valid <= 1'b1; res <= rq[0];
        end else res_valid <= 1'b0;
      end
      free = !d_valid;
      if (d_valid && d_ready) begin
        if (!gaps && lead_cyc < 0) lead_cyc = cyc;
        void'(bq.pop_front()); free = 1'b1;
      end
      if (free) begin
        if (bq.size() > 0 && (!gaps || $urandom_range(2) != 0)) begin
          d_valid <= 1'b1; d_two <= bq[0].two; d0 <= bq[0].a; d1 <= bq[0].b; d_last <= bq[0].last;
        end else d_valid <= 1'b0;
      end
      free = !op_valid;
      if (op_valid && op_ready) begin
        void'(o1q.pop_front()); void'(o2q.pop_front()); void'(olq.pop_front()); free = 1'b1;
      end
      if (free) begin
        if (o1q.size() > 0 && (!gaps || $urandom_range(2) != 0)) begin
          op_valid <= 1'b1; op1 <= o1q[0]; op2 <= o2q[0]; op_last <= olq[0];
        end else op_valid <= 1'b0;
      end
    end
  end

  pkt_t got;
  int   ob = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      if (ob == 0 && !gaps && exp_cyc < 0) exp_cyc = cyc;
      unique case (ob)
        0: got.e = out_data;
        1: got.m1 = out_data;
        default: got.m2 = out_data;
      endcase
      if (out_last != (ob == 2)) begin failures++; $display("out_last at byte %0d", ob); end
      ob = (ob == 2) ? 0 : ob + 1;
      if (ob == 0) begin
        checks++;
        if (expq.size() == 0) begin
          failures++; $display("unexpected packet %s", pstr(got));
        end else begin
          if (!same(got, expq[0])) begin
            failures++; $display("got %s expected %s", pstr(got), pstr(expq[0]));
          end
          void'(expq.pop_front());
        end
      end
    end
  end

  function automatic int rdv(input int zpct);
    if (int'($urandom_range(99)) < zpct) return 0;
    return int'($urandom_range(14)) - 7;
  endfunction

  task automatic normal_op(input int ex, input int nd, input int lead0, input bit allzero);
    int d[$];
    pkt_t p;
    fpas_res_t r;
    d = {};
    for (int i = 0; i < nd; i++) begin
      int v;
      v = (allzero || i < lead0) ? 0 : rdv(20);
      if (!allzero && i == lead0 && v == 0) v = 3;
      d.push_back(v);
    end
    for (int i = 0; i < nd; i += 2) begin
      beat_t bt;
      bt.two  = (i + 1 < nd);
      bt.a    = 4'(d[i]);
      bt.b    = bt.two ? 4'(d[i + 1]) : 4'd0;
      bt.last = (i + 2 >= nd);
      bq.push_back(bt);
    end
    p = norm_ref(d, ex);
    if (same(p, sp_zero())) n_zero++;
    else if (p.e[6:0] == 7'd123) n_inf++;
    else if (p.e[6:0] == 7'd125) n_eps++;
    else if (d[0] != 0) n_ovf++;
    else if (d[1] == 0) n_lz++;
    r = '{route: RT_NORMAL, sp: SP_NONE, sel2: 1'b0, neg: 1'b0, exp: iexp_t'(ex)};
    rq.push_back(r);
    expq.push_back(p);
  endtask

  task automatic bypass_op(input int ex, input bit sel2, input bit neg);
    pkt_t a, b, p;
    fpas_res_t r;
    a = rnum(ex); b = rnum(ex);
    o1q.push_back(a.m1); o2q.push_back(b.m1); olq.push_back(1'b0);
    o1q.push_back(a.m2); o2q.push_back(b.m2); olq.push_back(1'b1);
    p = sel2 ? b : a;
    p.e = ebyte(ex);
    if (sel2 && neg) begin p.m1 = bneg(b.m1); p.m2 = bneg(b.m2); n_neg++; end
    n_byp++;
    r = '{route: RT_BYPASS, sp: SP_NONE, sel2: sel2, neg: neg, exp: iexp_t'(ex)};
    rq.push_back(r);
    expq.push_back(p);
  endtask

  task automatic special_op(input int k);
    fpas_res_t r;
    sp_t c;
    pkt_t p;
    unique case (k)
      0: begin c = SP_PINF; p = sp_pinf(); end
      1: begin c = SP_NINF; p = sp_ninf(); end
      2: begin c = SP_PEPS; p = sp_peps(); end
      3: begin c = SP_NEPS; p = sp_neps(); end
      default: begin c = SP_ERR; p = sp_err(); end
    endcase
    r = '{route: RT_DRAIN, sp: c, sel2: 1'b0, neg: 1'b0, exp: '0};
    n_sp++;
    rq.push_back(r);
    expq.push_back(p);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 2000; i++) begin
      int k, ex;
      k  = int'($urandom_range(9));
      ex = (k == 0) ? 118 + int'($urandom_range(3)) :
           (k == 1) ? -120 + int'($urandom_range(3)) : int'($urandom_range(40)) - 20;
      if (k < 6)
        normal_op(ex, 5 + 2 * int'($urandom_range(2)), int'($urandom_range(4)),
                  ($urandom_range(30) == 0));
      else if (k < 9)
        bypass_op(int'($urandom_range(240)) - 120, 1'($urandom_range(1)), 1'($urandom_range(1)));
      else
        special_op(int'($urandom_range(4)));
    end
    wait (expq.size() == 0 && bq.size() == 0);
    // timing: leading digit first, no gaps or stalls
    stall = 1'b0; gaps = 1'b0;
    repeat (5) @(posedge clk);
    normal_op(2, 5, 0, 1'b0);
    wait (expq.size() == 0);
    checks++;
    if (exp_cyc - lead_cyc != 1) begin
      failures++; $display("exponent byte %0d cycles after the leading digit", exp_cyc - lead_cyc);
    end
    checks += 7;
    if (n_ovf == 0)  begin failures++; $display("no overflow digit"); end
    if (n_lz == 0)   begin failures++; $display("no leading zeros"); end
    if (n_zero == 0) begin failures++; $display("no zero result"); end
    if (n_inf == 0)  begin failures++; $display("no overflow to inf"); end
    if (n_eps == 0)  begin failures++; $display("no underflow to eps"); end
    if (n_neg == 0)  begin failures++; $display("no negated bypass"); end
    if (n_sp == 0)   begin failures++; $display("no special"); end
    $display("ovf %0d lz %0d zero %0d inf %0d eps %0d bypass %0d neg %0d special %0d",
             n_ovf, n_lz, n_zero, n_inf, n_eps, n_byp, n_neg, n_sp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
