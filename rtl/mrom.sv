// mrom: digit-product table of the multiplier (one ROM of MULTSEL).
//
// Returns the product of two signed radix-8 digits as a signed-digit byte
// (two digits of the product's sign, e.g. 7 * -6 = -52 octal = {-5, -2}).
// As in the document, a comparator orders the address pair so that (3,1) and
// (1,3) share one word: with x >= y the table needs 15*16/2 = 120 words
// instead of 225. The table is generated from the product rule at
// elaboration. The unused code 1000 reads as zero. Purely combinational.
module mrom
  import sd_pkg::*;
(
  input  digit_t     x,
  input  digit_t     y,
  output logic [7:0] p
);

  // product of two digit values as a signed-digit byte
  function automatic logic [7:0] word(input int a, input int b);
    int m;
    m = (a * b < 0) ? -(a * b) : a * b;
    return (a * b < 0) ? {4'(-(m / 8)), 4'(-(m % 8))} : {4'(m / 8), 4'(m % 8)};
  endfunction

  // word u*(u+1)/2 + v holds the product of hi = u-7 and lo = v-7 (v <= u)
  logic [7:0] rom [120];
  always_comb begin
    for (int u = 0; u < 15; u++)
      for (int v = 0; v <= u; v++)
        rom[u * (u + 1) / 2 + v] = word(u - 7, v - 7);
  end

  // COMPARATOR and the two address multiplexers
  int hi, lo;
  logic [6:0] idx;
  always_comb begin
    hi  = (dval(x) < dval(y)) ? dval(y) : dval(x);
    lo  = (dval(x) < dval(y)) ? dval(x) : dval(y);
    idx = 7'((hi + 7) * (hi + 8) / 2 + (lo + 7));
    p   = (lo < -7) ? 8'h00 : rom[idx];
  end

endmodule
