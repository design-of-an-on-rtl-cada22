// tb_sd_pkg: helpers for the testbenches of the signed-digit arithmetic
// units: random operands, packet values computed independently of the RTL
// (digit codes read as signed integers, weights as powers of 8), and the
// special packet encodings the design uses. Packets have 2 mantissa bytes.
//
// The number format follows the document; the special packet mantissas are
// this design's choice.
package tb_sd_pkg;

  typedef struct {
    logic [7:0] e;
    logic [7:0] m1;
    logic [7:0] m2;
  } pkt_t;

  function automatic int dv(input logic [3:0] d);
    return int'($signed(d));
  endfunction

  // random digit in -7..7, non-zero if asked
  function automatic logic [3:0] rdig(input bit nonzero);
    int v;
    do v = int'($urandom_range(14)) - 7; while (nonzero && v == 0);
    return 4'(v);
  endfunction

  function automatic logic [7:0] ebyte(input int e);
    return (e < 0) ? {1'b1, 7'(-e)} : {1'b0, 7'(e)};
  endfunction

  function automatic int eint(input logic [7:0] b);
    return b[7] ? -int'(b[6:0]) : int'(b[6:0]);
  endfunction

  // mantissa as an integer: sum of digits times 8^(3-i)
  function automatic int mint(input logic [7:0] m1, input logic [7:0] m2);
    return dv(m1[7:4]) * 512 + dv(m1[3:0]) * 64 + dv(m2[7:4]) * 8 + dv(m2[3:0]);
  endfunction

  function automatic real pval(input pkt_t p);
    return real'(mint(p.m1, p.m2)) / 4096.0 * (8.0 ** eint(p.e));
  endfunction

  // random normalised number with exponent e (leading digit non-zero)
  function automatic pkt_t rnum(input int e);
    pkt_t p;
    p.e  = ebyte(e);
    p.m1 = {rdig(1), rdig(0)};
    p.m2 = {rdig(0), rdig(0)};
    return p;
  endfunction

  function automatic logic [7:0] bneg(input logic [7:0] b);
    return {4'(-b[7:4]), 4'(-b[3:0])};
  endfunction

  // special packets as the design encodes them
  function automatic pkt_t sp_pinf();  pkt_t p; p.e = 8'h7B; p.m1 = 8'h10; p.m2 = 8'h00; return p; endfunction
  function automatic pkt_t sp_ninf();  pkt_t p; p.e = 8'hFB; p.m1 = 8'hF0; p.m2 = 8'h00; return p; endfunction
  function automatic pkt_t sp_peps();  pkt_t p; p.e = 8'h7D; p.m1 = 8'h10; p.m2 = 8'h00; return p; endfunction
  function automatic pkt_t sp_neps();  pkt_t p; p.e = 8'hFD; p.m1 = 8'hF0; p.m2 = 8'h00; return p; endfunction
  function automatic pkt_t sp_err();   pkt_t p; p.e = 8'h7F; p.m1 = 8'h00; p.m2 = 8'h00; return p; endfunction
  function automatic pkt_t sp_zero();  pkt_t p; p.e = 8'h00; p.m1 = 8'h00; p.m2 = 8'h00; return p; endfunction

  function automatic bit same(input pkt_t a, input pkt_t b);
    return a.e == b.e && a.m1 == b.m1 && a.m2 == b.m2;
  endfunction

  function automatic string pstr(input pkt_t p);
    return $sformatf("%02h|%02h|%02h", p.e, p.m1, p.m2);
  endfunction

  // a result that is a normalised ordinary number
  function automatic bit is_norm(input pkt_t p);
    return p.e[6:0] <= 7'd120 && p.m1[7:4] != 4'd0;
  endfunction

  // Expected packet for a digit string d (most significant first, d[0] of
  // weight 8^ex): normalised to the first non-zero digit, 4 mantissa digits
  // kept (zero filled), exponent checked against +-120.
  function automatic pkt_t norm_ref(input int d[$], input int ex);
    int f, e;
    int m [4];
    pkt_t p;
    f = -1;
    for (int i = 0; i < d.size(); i++) if (f < 0 && d[i] != 0) f = i;
    if (f < 0) return sp_zero();
    e = ex - f + 1;
    if (e > 120)  return (d[f] < 0) ? sp_ninf() : sp_pinf();
    if (e < -120) return (d[f] < 0) ? sp_neps() : sp_peps();
    for (int i = 0; i < 4; i++) m[i] = (f + i < d.size()) ? d[f + i] : 0;
    p.e  = ebyte(e);
    p.m1 = {4'(m[0]), 4'(m[1])};
    p.m2 = {4'(m[2]), 4'(m[3])};
    return p;
  endfunction

endpackage
