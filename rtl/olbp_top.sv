// olbp_top: on-line byte-level pipelined arithmetic processor.
//
// The two functional units of the design stand side by side, each with its
// own byte-serial operand channel and result channel, as a data flow machine
// would attach them: the floating point adder-subtractor (fpas) and the
// floating point multiplier (fpm). Each channel carries packets of one
// exponent byte followed by MANT_BYTES mantissa bytes (two radix-8 signed
// digits per byte); an operation takes two operand packets in a row and
// returns one result packet, exponent first, with *_out_last on its final
// byte. as_in_sub, sampled with the first byte of the first operand packet,
// selects subtraction. Routing packets between the units by operation code
// is not part of this design. All handshakes are valid/ready; reset is
// synchronous, active low.
module olbp_top #(
  parameter int unsigned MANT_BYTES = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  // adder-subtractor
  input  logic       as_in_valid,
  output logic       as_in_ready,
  input  logic [7:0] as_in_data,
  input  logic       as_in_sub,
  output logic       as_out_valid,
  input  logic       as_out_ready,
  output logic [7:0] as_out_data,
  output logic       as_out_last,
  // multiplier
  input  logic       m_in_valid,
  output logic       m_in_ready,
  input  logic [7:0] m_in_data,
  output logic       m_out_valid,
  input  logic       m_out_ready,
  output logic [7:0] m_out_data,
  output logic       m_out_last
);

  fpas #(.MANT_BYTES(MANT_BYTES)) u_fpas (
    .clk(clk), .rst_n(rst_n),
    .in_valid(as_in_valid), .in_ready(as_in_ready), .in_data(as_in_data), .in_sub(as_in_sub),
    .out_valid(as_out_valid), .out_ready(as_out_ready), .out_data(as_out_data),
    .out_last(as_out_last)
  );

  fpm #(.MANT_BYTES(MANT_BYTES)) u_fpm (
    .clk(clk), .rst_n(rst_n),
    .in_valid(m_in_valid), .in_ready(m_in_ready), .in_data(m_in_data),
    .out_valid(m_out_valid), .out_ready(m_out_ready), .out_data(m_out_data),
    .out_last(m_out_last)
  );

endmodule
