// expfix: exponent stage of the floating point adder-subtractor.
//
// Takes the exponent pair from MPX and decides how the operation proceeds:
//  * CEXP classifies both exponents (number, +-inf, +-eps, error). If either
//    is special no addition is done and NORMOP is told which packet to send,
//    or, for eps combined with a number, which operand passes unchanged.
//  * SUBTRACTOR forms x = exp1 - exp2 in a 10-bit adder (wider than the
//    exponent so it cannot overflow); COMPARATOR compares x with the mantissa
//    length D (digits); ABS-VAL gives SFD = |x|.
//      x >= D      : bypass, result is exp1 | op1
//      x <= -D     : bypass, result is exp2 | op2 (negated for subtraction)
//      0 <= x < D  : add, delay op2 by x digits, result exponent exp1
//      -D < x < 0  : add, delay op1 by |x| digits, result exponent exp2
// The outcome goes out as three things: the result descriptor for NORMOP
// (res_*), the MODOP start command (ops_*, only for an addition) and the
// route that steers the MPX mantissa pairs (route, held until MPX reports
// the last pair with ops_done). The decision rules above follow the
// document; the results for special operand combinations (inf-inf of
// opposite sign and eps-eps of opposite sign give E) are this design's.
//
// Timing: the exponents are loaded into REG1/REG2 on the cycle they are
// taken; the decision registers are loaded one cycle later. A new exponent
// pair is taken only once NORMOP and MODOP have taken the decision and the
// mantissa pairs of the packet have passed.
module expfix
  import sd_pkg::*;
#(
  parameter int unsigned MANT_BYTES = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       exp_valid,
  output logic       exp_ready,
  input  logic [7:0] exp1,
  input  logic [7:0] exp2,
  input  logic       sub,
  // to NORMOP
  output logic       res_valid,
  input  logic       res_ready,
  output fpas_res_t  res,
  // to MODOP
  output logic       ops_valid,
  input  logic       ops_ready,
  output modop_ctl_t ops,
  // route of the mantissa pairs of this packet pair
  output logic       route_valid,
  output route_t     route,
  input  logic       ops_done
);

  localparam int D = 2 * MANT_BYTES;   // mantissa digits

  typedef enum logic [1:0] {S_IDLE, S_CALC, S_WAIT} state_t;
  state_t state;

  logic [7:0] reg1, reg2;
  logic       sub_q;
  logic       res_pend, ops_pend, route_pend;

  // combinational decision from REG1/REG2
  fpas_res_t  dec_res;
  modop_ctl_t dec_ops;
  eclass_t    c1, c2;
  logic       s1, s2;       // signs of special operands, op2 after the subtraction
  iexp_t      e1, e2, x;
  logic [3:0] sfd;          // |x|, used only when |x| < D

  always_comb begin
    c1 = eclass(reg1[6:0]);
    c2 = eclass(reg2[6:0]);
    s1 = reg1[7];
    s2 = reg2[7] ^ sub_q;
    e1 = exp_to_int(reg1);
    e2 = exp_to_int(reg2);
    x  = e1 - e2;                    // SUBTRACTOR
    sfd = (x < 0) ? 4'(-x) : 4'(x);  // ABS-VAL
    dec_res = '{route: RT_DRAIN, sp: SP_ERR, sel2: 1'b0, neg: 1'b0, exp: '0};
    dec_ops = '{delay1: (x < 0), sfd: sfd, sub: sub_q};
    if (c1 == EC_ERR || c2 == EC_ERR) begin
      dec_res.sp = SP_ERR;
    end else if (c1 == EC_INF || c2 == EC_INF) begin
      if (c1 == EC_INF && c2 == EC_INF)
        dec_res.sp = (s1 == s2) ? (s1 ? SP_NINF : SP_PINF) : SP_ERR;
      else if (c1 == EC_INF)
        dec_res.sp = s1 ? SP_NINF : SP_PINF;
      else
        dec_res.sp = s2 ? SP_NINF : SP_PINF;
    end else if (c1 == EC_EPS && c2 == EC_EPS) begin
      dec_res.sp = (s1 == s2) ? (s1 ? SP_NEPS : SP_PEPS) : SP_ERR;
    end else if (c1 == EC_EPS) begin
      dec_res = '{route: RT_BYPASS, sp: SP_NONE, sel2: 1'b1, neg: sub_q, exp: e2};
    end else if (c2 == EC_EPS) begin
      dec_res = '{route: RT_BYPASS, sp: SP_NONE, sel2: 1'b0, neg: 1'b0, exp: e1};
    end else if (x >= iexp_t'(D)) begin           // COMPARATOR
      dec_res = '{route: RT_BYPASS, sp: SP_NONE, sel2: 1'b0, neg: 1'b0, exp: e1};
    end else if (x <= -iexp_t'(D)) begin
      dec_res = '{route: RT_BYPASS, sp: SP_NONE, sel2: 1'b1, neg: sub_q, exp: e2};
    end else begin                                 // M: larger exponent
      dec_res = '{route: RT_NORMAL, sp: SP_NONE, sel2: 1'b0, neg: 1'b0,
                  exp: (x < 0) ? e2 : e1};
    end
  end

  assign exp_ready   = (state == S_IDLE);
  assign res_valid   = res_pend;
  assign ops_valid   = ops_pend;
  assign route_valid = route_pend;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      reg1       <= '0;
      reg2       <= '0;
      sub_q      <= 1'b0;
      res_pend   <= 1'b0;
      ops_pend   <= 1'b0;
      route_pend <= 1'b0;
      res        <= '0;
      ops        <= '0;
      route      <= RT_DRAIN;
    end else begin
      unique case (state)
        S_IDLE: if (exp_valid) begin          // LREG
          reg1  <= exp1;
          reg2  <= exp2;
          sub_q <= sub;
          state <= S_CALC;
        end
        S_CALC: begin                         // CLOAD, SUB, ABS/COMP, SEL
          res        <= dec_res;
          ops        <= dec_ops;
          route      <= dec_res.route;
          res_pend   <= 1'b1;
          ops_pend   <= (dec_res.route == RT_NORMAL);
          route_pend <= 1'b1;
          state      <= S_WAIT;
        end
        S_WAIT: begin
          if (res_valid && res_ready) res_pend <= 1'b0;
          if (ops_valid && ops_ready) ops_pend <= 1'b0;
          if (ops_done) route_pend <= 1'b0;
          if (!(res_pend && !(res_valid && res_ready)) &&
              !(ops_pend && !(ops_valid && ops_ready)) &&
              !(route_pend && !ops_done))
            state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
