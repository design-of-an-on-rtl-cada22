// fpm: byte-serial floating point multiplier with signed-digit mantissas.
//
// Two operand packets (exponent byte, then MANT_BYTES mantissa bytes of two
// radix-8 signed digits) enter one after the other; the product packet
// leaves in the same format. The four modules of the document are chained:
//   MPX -> exponent pair -> EXOP (special operands, exp1+exp2, range, sign)
//   MPX -> mantissa pairs -> MULTOP (on-line multiply, one byte per pair)
//   EXOP descriptor + MULTOP product bytes -> PACKOP (normalise, pack) -> out
// EXOP watches the first mantissa pair (CHESIGN) and decides whether the
// pairs go to MULTOP or are discarded because the result is a special
// packet. Links are valid/ready handshakes standing in for the document's
// ready/acknowledge pairs (Fig 5.9). Reset is synchronous, active low.
module fpm
  import sd_pkg::*;
#(
  parameter int unsigned MANT_BYTES = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_data,
  output logic       out_valid,
  input  logic       out_ready,
  output logic [7:0] out_data,
  output logic       out_last
);

  logic       e_valid, e_ready, e_sub_unused;
  logic [7:0] e1, e2;
  logic       o_valid, o_ready, o_last, o_fire;
  logic [7:0] o1, o2;
  logic       rt_valid;
  route_t     rt;
  logic       r_valid, r_ready;
  fpm_res_t   r;
  logic       m_in_valid, m_in_ready;
  logic       p_valid, p_ready, p_last;
  logic [7:0] p_data;

  mpx #(.MANT_BYTES(MANT_BYTES)) u_mpx (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data), .in_sub(1'b0),
    .exp_valid(e_valid), .exp_ready(e_ready), .exp1(e1), .exp2(e2), .exp_sub(e_sub_unused),
    .op_valid(o_valid), .op_ready(o_ready), .op1(o1), .op2(o2), .op_last(o_last)
  );

  assign m_in_valid = o_valid && rt_valid && (rt == RT_NORMAL);
  assign o_ready    = rt_valid && ((rt == RT_NORMAL) ? m_in_ready : 1'b1);
  assign o_fire     = o_valid && o_ready;

  exop u_exop (
    .clk(clk), .rst_n(rst_n),
    .exp_valid(e_valid), .exp_ready(e_ready), .exp1(e1), .exp2(e2),
    .route_valid(rt_valid), .route(rt),
    .op_fire(o_fire), .op1(o1), .op2(o2), .op_last(o_last),
    .res_valid(r_valid), .res_ready(r_ready), .res(r)
  );

  multop #(.MANT_BYTES(MANT_BYTES)) u_multop (
    .clk(clk), .rst_n(rst_n),
    .in_valid(m_in_valid), .in_ready(m_in_ready), .in_x(o1), .in_y(o2), .in_last(o_last),
    .out_valid(p_valid), .out_ready(p_ready), .out_data(p_data), .out_last(p_last)
  );

  packop #(.MANT_BYTES(MANT_BYTES)) u_packop (
    .clk(clk), .rst_n(rst_n),
    .res_valid(r_valid), .res_ready(r_ready), .res(r),
    .in_valid(p_valid), .in_ready(p_ready), .in_data(p_data), .in_last(p_last),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data), .out_last(out_last)
  );

endmodule
