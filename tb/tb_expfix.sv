// tb_expfix: self-checking testbench of the FPAS exponent stage EXPFIX.
//
// Random exponent pairs (ordinary exponents close together or far apart,
// +-inf, +-eps, error codes) with a random subtract flag are offered; the
// NORMOP and MODOP sides take the decision with random delays, and the
// mantissa-pair transfer is simulated by an ops_done pulse a random time after
// the route appears. A reference model in the testbench gives the expected
// route, special packet, bypass operand and negation, result exponent, and
// MODOP command (which operand is delayed, by how many digits, subtract).
// Every combination class (each delay 0..3 both ways, bypass both ways, each
// special rule) must be seen. Timing: the decision must be offered exactly
// two clock edges after the exponent pair is taken (load, then decide), and
// no new pair may be taken before ops_done of the previous one.
//
// The bypass threshold (|x| >= mantissa length) and the delay by |x| digits
// follow the document; negating a bypassed op2 and reading exponent 121 as E
// are this design's choices.
module tb_expfix;
  import sd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic       exp_valid = 1'b0, exp_ready, sub = 1'b0;
  logic [7:0] exp1 = '0, exp2 = '0;
  logic       res_valid, res_ready = 1'b0, ops_valid, ops_ready = 1'b0, route_valid;
  logic       ops_done = 1'b0;
  fpas_res_t  res;
  modop_ctl_t ops;
  route_t     route;

  expfix dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    logic [7:0] e1, e2;
    logic       s;
    route_t     rt;
    sp_t        sp;
    logic       sel2, neg;
    int         ex;
    logic       delay1;
    int         sfd;
  } ref_t;

  int checks = 0, failures = 0, cyc = 0;
  ref_t refq[$];
  int   seen_class[16];
  int   n_done = 0, taken_cyc = 0;
  bit   busy = 1'b0;     // an operation is between exponent take and ops_done

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ei(input logic [7:0] b);
    return b[7] ? -int'(b[6:0]) : int'(b[6:0]);
  endfunction

  // reference decision
  function automatic ref_t model(input logic [7:0] a, input logic [7:0] b, input logic s,
                                 output int cls);
    ref_t r;
    int k1, k2, x;          // class 0 num, 1 inf, 2 eps, 3 err
    logic n1, n2;
    k1 = (a[6:0] <= 120) ? 0 : (a[6:0] == 123) ? 1 : (a[6:0] == 125) ? 2 : 3;
    k2 = (b[6:0] <= 120) ? 0 : (b[6:0] == 123) ? 1 : (b[6:0] == 125) ? 2 : 3;
    n1 = a[7];
    n2 = b[7] ^ s;
    x  = ei(a) - ei(b);
    r.e1 = a; r.e2 = b; r.s = s;
    r.rt = RT_DRAIN; r.sp = SP_ERR; r.sel2 = 1'b0; r.neg = 1'b0; r.ex = 0;
    r.delay1 = (x < 0); r.sfd = (x < 0) ? -x : x;
    if (k1 == 3 || k2 == 3) begin r.sp = SP_ERR; cls = 8; end
    else if (k1 == 1 && k2 == 1) begin r.sp = (n1 == n2) ? (n1 ? SP_NINF : SP_PINF) : SP_ERR; cls = 9; end
    else if (k1 == 1) begin r.sp = n1 ? SP_NINF : SP_PINF; cls = 10; end
    else if (k2 == 1) begin r.sp = n2 ? SP_NINF : SP_PINF; cls = 10; end
    else if (k1 == 2 && k2 == 2) begin r.sp = (n1 == n2) ? (n1 ? SP_NEPS : SP_PEPS) : SP_ERR; cls = 11; end
    else if (k1 == 2) begin r.rt = RT_BYPASS; r.sp = SP_NONE; r.sel2 = 1'b1; r.neg = s; r.ex = ei(b); cls = 12; end
    else if (k2 == 2) begin r.rt = RT_BYPASS; r.sp = SP_NONE; r.ex = ei(a); cls = 12; end
    else if (x >= 4)  begin r.rt = RT_BYPASS; r.sp = SP_NONE; r.ex = ei(a); cls = 4; end
    else if (x <= -4) begin r.rt = RT_BYPASS; r.sp = SP_NONE; r.sel2 = 1'b1; r.neg = s; r.ex = ei(b); cls = 5; end
    else begin
      r.rt = RT_NORMAL; r.sp = SP_NONE; r.ex = (x < 0) ? ei(b) : ei(a);
      cls = (x >= 0) ? x : 12 + (-x);      // 0..3 for x >= 0, 13..15 for x = -1..-3
    end
    return r;
  endfunction

  function automatic logic [7:0] rexp();
    int k;
    k = int'($urandom_range(19));
    if (k == 0) return {1'($urandom_range(1)), 7'd123};
    if (k == 1) return {1'($urandom_range(1)), 7'd125};
    if (k == 2) return {1'($urandom_range(1)), 7'd127};
    if (k == 3) return {1'($urandom_range(1)), 7'd121};
    return ebyte_i(int'($urandom_range(240)) - 120);
  endfunction

  function automatic logic [7:0] ebyte_i(input int e);
    return (e < 0) ? {1'b1, 7'(-e)} : {1'b0, 7'(e)};
  endfunction

  always @(posedge clk) res_ready <= ($urandom_range(2) != 0);
  always @(posedge clk) ops_ready <= ($urandom_range(2) != 0);

  always @(posedge clk) cyc++;

  // monitors
  ref_t cur;
  bit   got_res, got_ops, got_route, saw_res;
  int   done_delay;
  always @(posedge clk) begin
    if (rst_n) begin
      if (exp_valid && exp_ready) begin
        checks++;
        if (busy) begin failures++; $display("new exponent pair taken while busy"); end
        cur = refq.pop_front();
        busy = 1'b1;
        taken_cyc = cyc;
        got_res = 1'b0; got_ops = 1'b0; got_route = 1'b0; saw_res = 1'b0;
        done_delay = int'($urandom_range(6));
      end
      if (busy && res_valid && !saw_res) begin
        saw_res = 1'b1;
        checks++;
        if (cyc - taken_cyc != 2) begin
          failures++;
          $display("decision after %0d edges", cyc - taken_cyc);
        end
      end
      if (busy && res_valid && res_ready && !got_res) begin
        got_res = 1'b1;
        checks++;
        if (res.route != cur.rt || res.sp != cur.sp ||
            (cur.rt == RT_BYPASS && (res.sel2 != cur.sel2 || res.neg != cur.neg ||
                                     int'(res.exp) != cur.ex)) ||
            (cur.rt == RT_NORMAL && int'(res.exp) != cur.ex)) begin
          failures++;
          $display("res for %h %h sub %b: route %0d sp %0d sel2 %b neg %b exp %0d, expected %0d %0d %b %b %0d",
                   cur.e1, cur.e2, cur.s, res.route, res.sp, res.sel2, res.neg, int'(res.exp),
                   cur.rt, cur.sp, cur.sel2, cur.neg, cur.ex);
        end
      end
      if (busy && ops_valid && ops_ready && !got_ops) begin
        got_ops = 1'b1;
        checks++;
        if (cur.rt != RT_NORMAL || ops.delay1 != cur.delay1 || int'(ops.sfd) != cur.sfd ||
            ops.sub != cur.s) begin
          failures++;
          $display("ops for %h %h: delay1 %b sfd %0d sub %b", cur.e1, cur.e2, ops.delay1, ops.sfd, ops.sub);
        end
      end
      ops_done <= 1'b0;
      if (busy && route_valid) begin
        if (!got_route) begin
          got_route = 1'b1;
          checks++;
          if (route != cur.rt) begin failures++; $display("route %0d expected %0d", route, cur.rt); end
        end
        if (done_delay == 0 && !ops_done) begin
          ops_done <= 1'b1;
        end else if (done_delay > 0) begin
          done_delay--;
        end
      end
      if (ops_done) begin
        busy = 1'b0;
        n_done++;
      end
    end
  end

  // exponent driver
  initial begin
    int cls;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 16; i++) seen_class[i] = 0;
    for (int i = 0; i < 2000; i++) begin
      logic [7:0] a, b;
      logic s;
      ref_t r;
      a = rexp();
      b = (i % 2 == 0 && a[6:0] <= 120) ? ebyte_i(ei(a) + int'($urandom_range(8)) - 4) : rexp();
      if (b[6:0] > 120 && b[6:0] != 123 && b[6:0] != 125 && b[6:0] != 127 && b[6:0] != 121)
        b = ebyte_i(0);
      s = 1'($urandom_range(1));
      r = model(a, b, s, cls);
      seen_class[cls]++;
      refq.push_back(r);
      @(posedge clk);
      while ($urandom_range(2) == 0) @(posedge clk);
      exp_valid <= 1'b1; exp1 <= a; exp2 <= b; sub <= s;
      do @(posedge clk); while (!exp_ready);
      exp_valid <= 1'b0;
    end
    wait (n_done == 2000);
    repeat (5) @(posedge clk);
    for (int i = 0; i < 16; i++) begin
      if (i == 6 || i == 7) continue;
      checks++;
      if (seen_class[i] == 0) begin failures++; $display("class %0d never seen", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
