// arom: the A unit of the signed-digit adder, built as a 256 x 8 ROM.
//
// The address is the pair of operand digit codes {z, y}; the word is the
// transfer digit t and the interim sum digit w, {t, w}, of the rule
//   x = z + y;  t = +1 if x > 6, -1 if x < -6, else 0;  w = x - 8t
// (radix 8, w_max = 6). The document prefers a ROM to logic because adding the
// 4-bit codes directly is ambiguous (6+6 and -4 share a code). The table is
// generated from the rule at elaboration; the 31 addresses that hold the
// unused code 1000 are filled by the same rule and never read.
// Purely combinational.
module arom
  import sd_pkg::*;
(
  input  digit_t z,
  input  digit_t y,
  output digit_t t,
  output digit_t w
);

  function automatic logic [7:0] rom_word(input int a);
    return arom_word(digit_t'(a / 16), digit_t'(a % 16));
  endfunction

  logic [7:0] rom [256];

  always_comb begin
    for (int a = 0; a < 256; a++) rom[a] = rom_word(a);
  end

  assign {t, w} = rom[{z, y}];

endmodule
