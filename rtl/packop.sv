// packop: output stage of the floating point multiplier.
//
// Takes the descriptor from EXOP (a special packet code, or the unnormalised
// exponent exp1+exp2, which may lie one beyond the range) and the product
// bytes from MULTOP, and sends the result packet. Product byte 0 carries the
// mantissa overflow digit in its low half; its high digit has weight 8 and is
// always zero, so it is dropped (the document's ZERO test on the first byte
// expects exactly that). The remaining digits, two per byte, are normalised
// and packed on line by the shared normpack core: a non-zero overflow digit
// increments the exponent, leading zeros decrement it, the final exponent is
// checked against +-120 (this is where a limited overflow or underflow either
// resolves or becomes +-inf / +-eps), and the mantissa bytes are rebuilt from
// digit pairs that may straddle product bytes (the PACK unit, REG1/REG2 with
// the Ma/Mb/M1/M2 digit multiplexers). Surplus product bytes are drained.
// The procedure follows the document; the shared core is this design's.
//
// Timing: one product byte per cycle; the exponent byte is offered the cycle
// after the leading non-zero digit has been taken.
module packop
  import sd_pkg::*;
#(
  parameter int unsigned MANT_BYTES = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       res_valid,
  output logic       res_ready,
  input  fpm_res_t   res,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_data,
  input  logic       in_last,
  output logic       out_valid,
  input  logic       out_ready,
  output logic [7:0] out_data,
  output logic       out_last
);

  logic first_byte;   // next product byte is byte 0

  always_ff @(posedge clk) begin
    if (!rst_n)                                first_byte <= 1'b1;
    else if (res_valid && res_ready)           first_byte <= 1'b1;
    else if (in_valid && in_ready)             first_byte <= in_last;
  end

  normpack #(.MANT_BYTES(MANT_BYTES)) u_core (
    .clk(clk), .rst_n(rst_n),
    .start_valid(res_valid), .start_ready(res_ready),
    .start('{sp: res.sp, exp: res.exp}),
    .d_valid(in_valid), .d_ready(in_ready),
    .d0(first_byte ? in_data[3:0] : in_data[7:4]),
    .d1(in_data[3:0]),
    .d_two(!first_byte), .d_last(in_last),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data), .out_last(out_last)
  );

endmodule
