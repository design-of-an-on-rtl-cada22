// tb_exop: self-checking testbench of the FPM exponent stage EXOP.
//
// Random exponent pairs (ordinary, near and beyond the +-121 limits, +-inf,
// +-eps, error codes) are offered; once the route appears the testbench plays
// MPX and passes the two mantissa byte pairs (first bytes random: positive,
// negative, or zero for a zero operand) with random gaps; PACKOP's side takes
// the descriptor with random delays. A reference model gives the expected
// route (product computed or pairs discarded) and descriptor: exp1 + exp2
// for a computed product, otherwise E, +-inf, +-eps or zero with the sign
// taken from the operands. Every rule must be hit. Timing: the descriptor is
// offered the cycle after the first mantissa pair passes, and the next
// exponent pair is not taken before the last mantissa pair.
//
// The in-range, limited and definite over/underflow cases follow the
// document; the special-product table checked here is this design's choice.
module tb_exop;
  import sd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic       exp_valid = 1'b0, exp_ready;
  logic [7:0] exp1 = '0, exp2 = '0;
  logic       route_valid;
  route_t     route;
  logic       op_fire = 1'b0, op_last = 1'b0;
  logic [7:0] op1 = '0, op2 = '0;
  logic       res_valid, res_ready = 1'b0;
  fpm_res_t   res;

  exop dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    logic [7:0] e1, e2, b1, b2;
    route_t     rt;
    sp_t        sp;
    int         x;
    int         cls;
  } ref_t;

  int checks = 0, failures = 0, cyc = 0;
  int seen[12];
  ref_t refq[$];
  int n_done = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ei(input logic [7:0] b);
    return b[7] ? -int'(b[6:0]) : int'(b[6:0]);
  endfunction

  function automatic logic [7:0] eb(input int e);
    return (e < 0) ? {1'b1, 7'(-e)} : {1'b0, 7'(e)};
  endfunction

  function automatic int sgn_byte(input logic [7:0] b);
    if (b[7:4] != 4'd0) return b[7] ? -1 : 1;
    if (b[3:0] != 4'd0) return b[3] ? -1 : 1;
    return 0;
  endfunction

  function automatic ref_t model(input logic [7:0] a, input logic [7:0] b,
                                 input logic [7:0] f1, input logic [7:0] f2);
    ref_t r;
    int k1, k2, s1, s2, ps;
    k1 = (a[6:0] <= 120) ? 0 : (a[6:0] == 123) ? 1 : (a[6:0] == 125) ? 2 : 3;
    k2 = (b[6:0] <= 120) ? 0 : (b[6:0] == 123) ? 1 : (b[6:0] == 125) ? 2 : 3;
    s1 = (k1 == 0) ? sgn_byte(f1) : (a[7] ? -1 : 1);
    s2 = (k2 == 0) ? sgn_byte(f2) : (b[7] ? -1 : 1);
    ps = s1 * s2;
    r.e1 = a; r.e2 = b; r.b1 = f1; r.b2 = f2;
    r.x  = ei(a) + ei(b);
    r.rt = RT_DRAIN;
    if (k1 == 3 || k2 == 3) begin r.sp = SP_ERR; r.cls = 0; end
    else if (k1 == 1 || k2 == 1) begin
      if (k1 == 2 || k2 == 2 || ps == 0) begin r.sp = SP_ERR; r.cls = 1; end
      else begin r.sp = (ps < 0) ? SP_NINF : SP_PINF; r.cls = 2; end
    end
    else if (k1 == 2 || k2 == 2) begin
      if (ps == 0) begin r.sp = SP_ZERO; r.cls = 3; end
      else begin r.sp = (ps < 0) ? SP_NEPS : SP_PEPS; r.cls = 4; end
    end
    else if (r.x > 121 || r.x < -121) begin
      if (ps == 0) begin r.sp = SP_ZERO; r.cls = 5; end
      else if (r.x > 0) begin r.sp = (ps < 0) ? SP_NINF : SP_PINF; r.cls = 6; end
      else begin r.sp = (ps < 0) ? SP_NEPS : SP_PEPS; r.cls = 7; end
    end
    else begin
      r.rt = RT_NORMAL; r.sp = SP_NONE;
      r.cls = (r.x == 121) ? 8 : (r.x == -121) ? 9 : 10;
    end
    return r;
  endfunction

  function automatic logic [7:0] rexp();
    int k;
    k = int'($urandom_range(15));
    if (k == 0) return {1'($urandom_range(1)), 7'd123};
    if (k == 1) return {1'($urandom_range(1)), 7'd125};
    if (k == 2) return {1'($urandom_range(1)), 7'd127};
    if (k < 6)  return eb((int'($urandom_range(1)) * 2 - 1) * (55 + int'($urandom_range(10))));
    return eb(int'($urandom_range(240)) - 120);
  endfunction

  function automatic logic [7:0] rbyte();
    int k;
    k = int'($urandom_range(7));
    if (k == 0) return 8'h00;
    if (k == 1) return {4'd0, 4'($urandom_range(14) - 7)};
    do k = int'($urandom_range(14)) - 7; while (k == 0);
    return {4'(k), 4'($urandom_range(14) - 7)};
  endfunction

  always @(posedge clk) cyc++;
  always @(posedge clk) res_ready <= ($urandom_range(2) != 0);

  // plays MPX: the exponent pair, then two mantissa pairs once routed
  ref_t cur;
  int   phase = 0;        // 0 idle, 1 exp offered, 2 wait route, 3..4 pairs, 5 wait res
  int   fire_cyc = 0;
  bit   got_res = 1'b0, saw_res = 1'b0;
  always @(posedge clk) begin
    if (rst_n) begin
      op_fire <= 1'b0;
      op_last <= 1'b0;
      if (exp_valid && exp_ready) begin
        checks++;
        if (phase != 1) begin failures++; $display("exponent pair taken early"); end
        exp_valid <= 1'b0;
        phase = 2;
        got_res = 1'b0; saw_res = 1'b0;
      end
      if (op_fire && !op_last) fire_cyc = cyc;
      if (res_valid && !saw_res) begin
        saw_res = 1'b1;
        checks++;
        if (cyc - fire_cyc != 1) begin failures++; $display("descriptor %0d cycles after pair", cyc - fire_cyc); end
      end
      if (res_valid && res_ready && !got_res) begin
        got_res = 1'b1;
        checks++;
        if (res.sp != cur.sp || (cur.sp == SP_NONE && int'(res.exp) != cur.x)) begin
          failures++;
          $display("exps %h %h bytes %h %h: sp %0d exp %0d, expected %0d %0d",
                   cur.e1, cur.e2, cur.b1, cur.b2, res.sp, int'(res.exp), cur.sp, cur.x);
        end
      end
      case (phase)
        0: if (refq.size() > 0 && $urandom_range(2) != 0) begin
          cur = refq.pop_front();
          exp_valid <= 1'b1; exp1 <= cur.e1; exp2 <= cur.e2;
          phase = 1;
        end
        2: if (route_valid && $urandom_range(2) != 0) begin
          checks++;
          if (route != cur.rt) begin failures++; $display("route %0d expected %0d", route, cur.rt); end
          op_fire <= 1'b1; op1 <= cur.b1; op2 <= cur.b2;
          phase = 3;
        end
        3: if ($urandom_range(2) != 0) begin
          op_fire <= 1'b1; op_last <= 1'b1; op1 <= 8'($urandom); op2 <= 8'($urandom);
          phase = 4;
        end
        4: phase = 5;
        5: if (got_res) begin n_done++; phase = 0; end
        default: ;
      endcase
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 12; i++) seen[i] = 0;
    for (int i = 0; i < 3000; i++) begin
      ref_t r;
      r = model(rexp(), rexp(), rbyte(), rbyte());
      seen[r.cls]++;
      refq.push_back(r);
    end
    wait (n_done == 3000);
    for (int i = 0; i <= 10; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("rule %0d never used", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
