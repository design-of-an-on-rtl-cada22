// multsel: one MULTSEL unit of the multiplier. Forms the product of a
// partial operand Z (ND signed digits, most significant first, integer
// value sum z_i * 8^(ND-1-i)) and one operand byte y (two digits, value
// 8*y_hi + y_lo) from digit products read out of mrom tables, one per digit
// pair, and sums them with their weights into a two's complement integer.
// The document sums the table words with a signed-digit adder; summing in
// binary is this design's choice and gives the same value.
// Purely combinational.
module multsel
  import sd_pkg::*;
#(
  parameter int unsigned ND = 4,
  parameter int unsigned PW = 3 * ND + 8
) (
  input  digit_t                z [ND],
  input  logic [7:0]            y,
  output logic signed [PW-1:0]  p
);

  logic [7:0] ph [ND];
  logic [7:0] pl [ND];

  for (genvar i = 0; i < int'(ND); i++) begin : g_dig
    mrom u_hi (.x(z[i]), .y(y[7:4]), .p(ph[i]));
    mrom u_lo (.x(z[i]), .y(y[3:0]), .p(pl[i]));
  end

  // value of a signed-digit byte
  function automatic logic signed [PW-1:0] bval(input logic [7:0] b);
    return PW'($signed(b[7:4])) * 8 + PW'($signed(b[3:0]));
  endfunction

  always_comb begin
    p = '0;
    for (int i = 0; i < int'(ND); i++)
      p = p + ((bval(ph[i]) * 8 + bval(pl[i])) <<< (3 * (int'(ND) - 1 - i)));
  end

endmodule
