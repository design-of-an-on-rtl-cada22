// sd_pkg: types, constants and small functions shared by the byte-serial
// signed-digit floating point adder-subtractor (FPAS) and multiplier (FPM).
//
// Number format. A packet is one exponent byte followed by MANT_BYTES mantissa
// bytes, exponent first, most significant mantissa byte next. The exponent is
// sign-magnitude (bit 7 sign, bits 6:0 magnitude, powers of 8). Every mantissa
// byte holds two radix-8 signed digits, most significant in bits 7:4. A digit
// is in {-7..7} and coded in 4-bit two's complement ("16's complement"), so
// -3 is 4'b1101. The value of a packet is sum(m_i * 8^-i) * 8^exp and its sign
// is the sign of its most significant non-zero digit.
//
// Special operands use reserved exponent magnitudes: |exp| <= EXP_MAX (120) is
// an ordinary number, +123/-123 is +inf/-inf, +125/-125 is +eps/-eps (an
// underflowed result of that sign), 127 is the error operand E. The other
// magnitudes above 120 are read as E. Those codes follow the design example;
// the mantissa carried by a special packet (a single +1/-1 digit for inf and
// eps, zero for E) is this design's choice. The zero packet is all zero bytes.
package sd_pkg;

  // Largest exponent magnitude of an ordinary number.
  localparam int EXP_MAX = 120;
  localparam logic [6:0] EXP_INF = 7'd123;
  localparam logic [6:0] EXP_EPS = 7'd125;
  localparam logic [6:0] EXP_ERR = 7'd127;

  // Internal exponent: two's complement, wide enough for exp1+exp2 and for
  // the decrements of normalisation.
  typedef logic signed [9:0] iexp_t;

  // One signed digit in 4-bit two's complement.
  typedef logic [3:0] digit_t;

  // Result selector for special packets (the SOP units plus the zero packet).
  typedef enum logic [2:0] {
    SP_NONE = 3'd0,
    SP_PINF = 3'd1,
    SP_NINF = 3'd2,
    SP_PEPS = 3'd3,
    SP_NEPS = 3'd4,
    SP_ERR  = 3'd5,
    SP_ZERO = 3'd6
  } sp_t;

  // Class of one input exponent, as found by CEXP.
  typedef enum logic [1:0] {
    EC_NUM = 2'd0,
    EC_INF = 2'd1,
    EC_EPS = 2'd2,
    EC_ERR = 2'd3
  } eclass_t;

  // Negate one digit: two's complement of the 4-bit code.
  function automatic digit_t dneg(input digit_t d);
    return 4'(-d);
  endfunction

  // Negate both digits of a mantissa byte (the NEG unit).
  function automatic logic [7:0] bneg(input logic [7:0] b);
    return {dneg(b[7:4]), dneg(b[3:0])};
  endfunction

  function automatic int dval(input digit_t d);
    return int'($signed(d));
  endfunction

  // (from the magnitude bits of the exponent byte)
  function automatic eclass_t eclass(input logic [6:0] e);
    if (e <= 7'(EXP_MAX)) return EC_NUM;
    if (e == EXP_INF) return EC_INF;
    if (e == EXP_EPS) return EC_EPS;
    return EC_ERR;
  endfunction

  // Sign-magnitude exponent byte to internal two's complement.
  function automatic iexp_t exp_to_int(input logic [7:0] e);
    return e[7] ? -iexp_t'({3'b0, e[6:0]}) : iexp_t'({3'b0, e[6:0]});
  endfunction

  // Internal exponent (already within +-EXP_MAX) to sign-magnitude byte.
  function automatic logic [7:0] int_to_exp(input iexp_t v);
    return {(v < 0), (v < 0) ? 7'(-v) : 7'(v)};
  endfunction

  // Byte idx (0 = exponent) of a special packet, as held in the SOP units.
  function automatic logic [7:0] sop_byte(input sp_t code, input int idx);
    logic [7:0] b;
    b = 8'h00;
    unique case (code)
      SP_PINF: b = (idx == 0) ? {1'b0, EXP_INF} : (idx == 1) ? 8'h10 : 8'h00;
      SP_NINF: b = (idx == 0) ? {1'b1, EXP_INF} : (idx == 1) ? 8'hF0 : 8'h00;
      SP_PEPS: b = (idx == 0) ? {1'b0, EXP_EPS} : (idx == 1) ? 8'h10 : 8'h00;
      SP_NEPS: b = (idx == 0) ? {1'b1, EXP_EPS} : (idx == 1) ? 8'hF0 : 8'h00;
      SP_ERR:  b = (idx == 0) ? {1'b0, EXP_ERR} : 8'h00;
      default: b = 8'h00;
    endcase
    return b;
  endfunction

  // Signed-digit addition rule of the A units, w_max = r-2 = 6.
  // x = z + y; t = +1 if x > 6, -1 if x < -6, else 0; w = x - 8t.
  // Returns {t, w} as two 4-bit digit codes (the AROM word).
  function automatic logic [7:0] arom_word(input digit_t z, input digit_t y);
    int x, t;
    x = dval(z) + dval(y);
    t = (x > 6) ? 1 : (x < -6) ? -1 : 0;
    return {4'(t), 4'(x - 8 * t)};
  endfunction

  // Packet start information for the normalise-and-pack core.
  typedef struct packed {
    sp_t   sp;      // SP_NONE: normalise the incoming digits; else send this special packet
    iexp_t exp;     // unnormalised result exponent (digit s0 has weight 8^0)
  } pack_start_t;

  // Where the mantissa byte pairs of the current packet pair go.
  typedef enum logic [1:0] {
    RT_NORMAL = 2'd0,   // to the arithmetic unit (MODOP / MULTOP)
    RT_BYPASS = 2'd1,   // FPAS: one operand is the result, straight to NORMOP
    RT_DRAIN  = 2'd2    // special result: the mantissa bytes are discarded
  } route_t;

  // EXPFIX result for NORMOP (res-exp / cexp of the control table).
  typedef struct packed {
    route_t route;
    sp_t    sp;     // special packet to send when route == RT_DRAIN
    logic   sel2;   // bypass: the result is operand 2 (else operand 1)
    logic   neg;    // bypass: negate the passed mantissa (subtraction of op2)
    iexp_t  exp;    // result exponent (bypass) or unnormalised exponent (normal)
  } fpas_res_t;

  // EXPFIX control for MODOP (op-start, exop, sfd).
  typedef struct packed {
    logic       delay1;  // 1: op1 is delayed, 0: op2 is delayed (or none)
    logic [3:0] sfd;     // delay in digits, |exp1 - exp2|
    logic       sub;     // negate op2
  } modop_ctl_t;

  // EXOP result for PACKOP.
  typedef struct packed {
    sp_t   sp;      // SP_NONE: normalise the product; else send this packet
    iexp_t exp;     // exp1 + exp2, may be one beyond the range (limited case)
  } fpm_res_t;

endpackage
