// normop: output stage of the floating point adder-subtractor.
//
// Three ways to form the result packet, chosen by the descriptor from EXPFIX:
//  * normal: the sum digits from ADDOP are normalised and packed on line by
//    the shared normpack core (overflow digit s0, leading-zero count,
//    exponent over/underflow to +-inf / +-eps, zero result, zero fill and
//    draining of digits that are not needed);
//  * special: EXPFIX found a special operand; the chosen SOP packet is sent
//    and no digits are expected;
//  * bypass: the exponents differ by at least the mantissa length (or one
//    operand is eps); the exponent from EXPFIX is sent, followed by the
//    mantissa bytes of the selected operand taken directly from MPX. For a
//    subtraction that returns op2 the bytes are negated (the document's table
//    lists only "result <- exp2 | op2"; negating is needed for a correct
//    difference and is this design's reading).
// The output multiplexer M9 picks the source. Packets leave on a byte
// channel with out_last on the final byte.
//
// Timing: the descriptor is taken when the unit is idle; in bypass mode the
// exponent byte is offered the next cycle and each MPX pair is passed on the
// cycle it is offered.
module normop
  import sd_pkg::*;
#(
  parameter int unsigned MANT_BYTES = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  // result descriptor from EXPFIX
  input  logic       res_valid,
  output logic       res_ready,
  input  fpas_res_t  res,
  // sum digits from ADDOP
  input  logic       d_valid,
  output logic       d_ready,
  input  digit_t     d0,
  input  digit_t     d1,
  input  logic       d_two,
  input  logic       d_last,
  // mantissa pairs from MPX (bypass)
  input  logic       op_valid,
  output logic       op_ready,
  input  logic [7:0] op1,
  input  logic [7:0] op2,
  input  logic       op_last,
  // result packet
  output logic       out_valid,
  input  logic       out_ready,
  output logic [7:0] out_data,
  output logic       out_last
);

  typedef enum logic [1:0] {B_IDLE, B_EXP, B_MANT} bstate_t;

  bstate_t     bst;
  logic        b_sel2, b_neg; // bypass: which operand, negated
  iexp_t       b_exp;         // bypass: its exponent
  logic        core_busy;     // packet is being formed by the core
  logic        core_sready;
  logic        core_ovalid, core_olast;
  logic [7:0]  core_odata;
  pack_start_t cstart;
  logic        is_bypass;

  assign is_bypass = (res.route == RT_BYPASS);
  assign cstart    = '{sp: (res.route == RT_DRAIN) ? res.sp : SP_NONE, exp: res.exp};

  // take a descriptor only when both paths are idle
  assign res_ready = core_sready && (bst == B_IDLE) && !core_busy;

  normpack #(.MANT_BYTES(MANT_BYTES)) u_core (
    .clk(clk), .rst_n(rst_n),
    .start_valid(res_valid && res_ready && !is_bypass),
    .start_ready(core_sready),
    .start(cstart),
    .d_valid(d_valid), .d_ready(d_ready),
    .d0(d0), .d1(d1), .d_two(d_two), .d_last(d_last),
    .out_valid(core_ovalid), .out_ready(out_ready && core_busy),
    .out_data(core_odata), .out_last(core_olast)
  );

  logic [7:0] byp_byte;
  assign byp_byte = b_sel2 ? (b_neg ? bneg(op2) : op2) : op1;
  assign op_ready = (bst == B_MANT) && out_ready;

  always_comb begin
    out_valid = 1'b0;
    out_data  = 8'h00;
    out_last  = 1'b0;
    unique case (bst)
      B_EXP:  begin out_valid = 1'b1;     out_data = int_to_exp(b_exp); end
      B_MANT: begin out_valid = op_valid; out_data = byp_byte; out_last = op_last; end
      default: begin
        out_valid = core_busy && core_ovalid;
        out_data  = core_odata;
        out_last  = core_olast;
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bst       <= B_IDLE;
      b_sel2    <= 1'b0;
      b_neg     <= 1'b0;
      b_exp     <= '0;
      core_busy <= 1'b0;
    end else begin
      if (res_valid && res_ready) begin
        if (is_bypass) begin
          bst  <= B_EXP;
          b_sel2 <= res.sel2;
          b_neg  <= res.neg;
          b_exp  <= res.exp;
        end else begin
          core_busy <= 1'b1;
        end
      end
      if (core_busy && core_ovalid && out_ready && core_olast) core_busy <= 1'b0;
      unique case (bst)
        B_EXP:  if (out_ready) bst <= B_MANT;
        B_MANT: if (op_valid && out_ready && op_last) bst <= B_IDLE;
        default: ;
      endcase
    end
  end

endmodule
