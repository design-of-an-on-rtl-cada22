// exop: exponent stage of the floating point multiplier.
//
// From the exponent pair it decides whether a product is computed:
//  * CEXP classifies both exponents (number, +-inf, +-eps, error);
//  * ADD forms x = exp1 + exp2 (sign-magnitude bytes, 10-bit internal sum);
//  * COMP sorts x into: in range (|x| <= 120), limited overflow/underflow
//    (x = +-121, the product may still normalise back into range, PACKOP
//    checks), or definite overflow/underflow (|x| > 121);
//  * CHESIGN looks at the first mantissa byte of each operand once MPX
//    offers it, to give the sign of a special result.
// When both operands are numbers and x is at most one beyond the range, the
// mantissa pairs go to MULTOP (route RT_NORMAL) and PACKOP receives x.
// Otherwise the pairs are discarded (RT_DRAIN) and PACKOP receives a special
// packet code: E for an error operand or an indefinite product (inf times
// zero or eps), inf or eps with the product sign, or the zero packet when a
// zero operand makes the product exactly zero. These cases follow the
// document; the sign taken from the first byte (its first non-zero digit;
// a first byte of two zero digits marks a zero operand, inputs being
// normalised) and the exact special-case table are this design's choices.
//
// Timing: exponents are loaded (EXPLOAD) when taken, the decision and route
// are registered the next cycle, and the PACKOP descriptor is offered the
// cycle after the first mantissa pair has passed (PSIGN). A new exponent
// pair is taken after the descriptor is taken and the last pair has passed.
module exop
  import sd_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       exp_valid,
  output logic       exp_ready,
  input  logic [7:0] exp1,
  input  logic [7:0] exp2,
  // route of the mantissa pairs
  output logic       route_valid,
  output route_t     route,
  // observation of the MPX mantissa pair transfers
  input  logic       op_fire,
  input  logic [7:0] op1,
  input  logic [7:0] op2,
  input  logic       op_last,
  // to PACKOP
  output logic       res_valid,
  input  logic       res_ready,
  output fpm_res_t   res
);

  typedef enum logic [2:0] {S_IDLE, S_CALC, S_SIGN, S_OUT, S_WAIT} state_t;
  state_t state;

  logic [7:0] reg1, reg2;
  eclass_t    c1, c2;
  iexp_t      x, x_q;
  logic       route_pend;
  logic       norm_q;         // product is computed

  // sign of an operand from its first mantissa byte: -1, 0, +1
  function automatic int bsign(input logic [7:0] b);
    if (b[7:4] != '0) return b[7] ? -1 : 1;
    if (b[3:0] != '0) return b[3] ? -1 : 1;
    return 0;
  endfunction

  assign c1 = eclass(reg1[6:0]);
  assign c2 = eclass(reg2[6:0]);
  assign x  = exp_to_int(reg1) + exp_to_int(reg2);   // ADD

  // special result once the operand signs are known
  // (na, nb: sign bits of the exponent bytes, the signs of special operands)
  function automatic sp_t special(input eclass_t a, input eclass_t b, input logic na,
                                  input logic nb, input int sa, input int sb,
                                  input iexp_t xs);
    int s1, s2, ps;
    s1 = (a == EC_NUM) ? sa : (na ? -1 : 1);
    s2 = (b == EC_NUM) ? sb : (nb ? -1 : 1);
    ps = s1 * s2;
    if (a == EC_ERR || b == EC_ERR) return SP_ERR;
    if (a == EC_INF || b == EC_INF) begin
      if (a == EC_EPS || b == EC_EPS || ps == 0) return SP_ERR;
      return (ps < 0) ? SP_NINF : SP_PINF;
    end
    if (ps == 0) return SP_ZERO;
    if (a == EC_EPS || b == EC_EPS) return (ps < 0) ? SP_NEPS : SP_PEPS;
    if (xs > 0) return (ps < 0) ? SP_NINF : SP_PINF;   // definite overflow
    return (ps < 0) ? SP_NEPS : SP_PEPS;               // definite underflow
  endfunction

  assign exp_ready   = (state == S_IDLE);
  assign route_valid = route_pend;
  assign res_valid   = (state == S_OUT);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      reg1          <= '0;
      reg2          <= '0;
      x_q           <= '0;
      norm_q        <= 1'b0;
      route         <= RT_DRAIN;
      route_pend    <= 1'b0;
      res           <= '0;
    end else begin
      if (route_pend && op_fire && op_last) route_pend <= 1'b0;
      unique case (state)
        S_IDLE: if (exp_valid) begin               // EXPLOAD
          reg1  <= exp1;
          reg2  <= exp2;
          state <= S_CALC;
        end
        S_CALC: begin                              // CLOAD, ADD, COMP
          x_q           <= x;
          norm_q        <= (c1 == EC_NUM) && (c2 == EC_NUM) &&
                           (x <= iexp_t'(EXP_MAX + 1)) && (x >= -iexp_t'(EXP_MAX + 1));
          route         <= ((c1 == EC_NUM) && (c2 == EC_NUM) &&
                            (x <= iexp_t'(EXP_MAX + 1)) && (x >= -iexp_t'(EXP_MAX + 1)))
                           ? RT_NORMAL : RT_DRAIN;
          route_pend    <= 1'b1;
          state         <= S_SIGN;
        end
        S_SIGN: if (op_fire) begin                 // CHESIGN, PSIGN
          res.exp <= x_q;
          res.sp  <= norm_q ? SP_NONE
                            : special(c1, c2, reg1[7], reg2[7], bsign(op1), bsign(op2), x_q);
          state   <= S_OUT;
        end
        S_OUT: if (res_ready) state <= S_WAIT;
        S_WAIT: if (!route_pend) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
