// fpas: byte-serial floating point adder-subtractor with signed-digit
// mantissas.
//
// Operand packets (exponent byte, then MANT_BYTES mantissa bytes, two radix-8
// signed digits per byte) enter one after the other; the result packet leaves
// in the same format. The five modules of the document are chained:
//   MPX    -> exponent pair -> EXPFIX (special operands, exponent difference)
//   MPX    -> mantissa pairs -> MODOP (align, negate) -> ADDOP (on-line add)
//   ADDOP  -> sum digits -> NORMOP (normalise, pack, special, bypass) -> out
// EXPFIX decides where the mantissa pairs of a packet pair go: to MODOP for
// an addition, straight to NORMOP for a bypass, or nowhere (discarded) when
// a special packet is the result. Every link is a valid/ready handshake, the
// synchronous stand-in for the document's ready/acknowledge pairs (Fig 4.11).
// Because the result's leading digit is found while the sum digits stream
// in, the exponent byte of the result leaves before the last sum digit.
//
// in_sub = 1 selects exp1|op1 - exp2|op2; it is sampled with the first byte
// of the first packet. Reset is synchronous, active low.
module fpas
  import sd_pkg::*;
#(
  parameter int unsigned MANT_BYTES = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_data,
  input  logic       in_sub,
  output logic       out_valid,
  input  logic       out_ready,
  output logic [7:0] out_data,
  output logic       out_last
);

  // MPX
  logic       e_valid, e_ready, e_sub;
  logic [7:0] e1, e2;
  logic       o_valid, o_ready, o_last;
  logic [7:0] o1, o2;
  // EXPFIX
  logic       r_valid, r_ready;
  fpas_res_t  r;
  logic       c_valid, c_ready;
  modop_ctl_t c;
  logic       rt_valid, ops_done;
  route_t     rt;
  // MODOP -> ADDOP
  logic       m_in_valid, m_in_ready;
  logic       a_valid, a_ready, a_last;
  logic [7:0] a_z, a_y;
  // ADDOP -> NORMOP
  logic       s_valid, s_ready, s_two, s_last;
  digit_t     s_d0, s_d1;
  // MPX -> NORMOP (bypass)
  logic       n_op_valid, n_op_ready;

  mpx #(.MANT_BYTES(MANT_BYTES)) u_mpx (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data), .in_sub(in_sub),
    .exp_valid(e_valid), .exp_ready(e_ready), .exp1(e1), .exp2(e2), .exp_sub(e_sub),
    .op_valid(o_valid), .op_ready(o_ready), .op1(o1), .op2(o2), .op_last(o_last)
  );

  expfix #(.MANT_BYTES(MANT_BYTES)) u_expfix (
    .clk(clk), .rst_n(rst_n),
    .exp_valid(e_valid), .exp_ready(e_ready), .exp1(e1), .exp2(e2), .sub(e_sub),
    .res_valid(r_valid), .res_ready(r_ready), .res(r),
    .ops_valid(c_valid), .ops_ready(c_ready), .ops(c),
    .route_valid(rt_valid), .route(rt), .ops_done(ops_done)
  );

  // steering of the MPX mantissa pairs
  assign m_in_valid = o_valid && rt_valid && (rt == RT_NORMAL);
  assign n_op_valid = o_valid && rt_valid && (rt == RT_BYPASS);
  always_comb begin
    o_ready = 1'b0;
    if (rt_valid) begin
      unique case (rt)
        RT_NORMAL: o_ready = m_in_ready;
        RT_BYPASS: o_ready = n_op_ready;
        default:   o_ready = 1'b1;      // discard
      endcase
    end
  end
  assign ops_done = o_valid && o_ready && o_last;

  modop #(.MANT_BYTES(MANT_BYTES)) u_modop (
    .clk(clk), .rst_n(rst_n),
    .ctl_valid(c_valid), .ctl_ready(c_ready), .ctl(c),
    .in_valid(m_in_valid), .in_ready(m_in_ready), .in_op1(o1), .in_op2(o2), .in_last(o_last),
    .out_valid(a_valid), .out_ready(a_ready), .out_z(a_z), .out_y(a_y), .out_last(a_last)
  );

  addop u_addop (
    .clk(clk), .rst_n(rst_n),
    .in_valid(a_valid), .in_ready(a_ready), .in_z(a_z), .in_y(a_y), .in_last(a_last),
    .out_valid(s_valid), .out_ready(s_ready), .out_d0(s_d0), .out_d1(s_d1),
    .out_two(s_two), .out_last(s_last)
  );

  normop #(.MANT_BYTES(MANT_BYTES)) u_normop (
    .clk(clk), .rst_n(rst_n),
    .res_valid(r_valid), .res_ready(r_ready), .res(r),
    .d_valid(s_valid), .d_ready(s_ready), .d0(s_d0), .d1(s_d1), .d_two(s_two), .d_last(s_last),
    .op_valid(n_op_valid), .op_ready(n_op_ready), .op1(o1), .op2(o2), .op_last(o_last),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data), .out_last(out_last)
  );

endmodule
