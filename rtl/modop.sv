// modop: operand modifier of the floating point adder-subtractor.
//
// Aligns the two mantissas for the signed-digit adder while they stream in.
// The operand with the smaller exponent is "delayed": SFD zero digits are
// put in front of it, which is a right shift done without having the whole
// operand. The subtrahend op2 is negated digit by digit for a subtraction
// (NEG; in this number system negation is the two's complement of each 4-bit
// digit). The undelayed operand is padded with zero digits at its end so that
// both streams have the same length, ceil((2*MANT_BYTES + SFD)/2) byte pairs.
//
// Structure. As in the document, each operand's digits are kept in two digit
// wide queues, Q1 for the high digit and Q2 for the low digit of each byte;
// an odd delay rebuilds every output byte from the low digit of one entry
// and the high digit of the next (multiplexers M3/M4), an even delay uses
// whole zero bytes first (M5/M6). Here the queues hold MANT_BYTES entries and
// are indexed by the output position rather than used as wrap-around FIFOs;
// the digit selection is written as an index computation. This is this
// design's simplification of the same function.
//
// Interface: ctl (op-start with EXOP/SFD/sub) is taken once per operation;
// MPX byte pairs arrive on in_*; aligned byte pairs z (op1') and y (op2') go
// to ADDOP on out_* with out_last on the final pair.
// Timing: output pair k is offered once input pair k has been stored (or all
// pairs have), i.e. one cycle after it is taken; one pair per cycle.
module modop
  import sd_pkg::*;
#(
  parameter int unsigned MANT_BYTES = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ctl_valid,
  output logic       ctl_ready,
  input  modop_ctl_t ctl,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_op1,
  input  logic [7:0] in_op2,
  input  logic       in_last,
  output logic       out_valid,
  input  logic       out_ready,
  output logic [7:0] out_z,
  output logic [7:0] out_y,
  output logic       out_last
);

  localparam int ND = 2 * MANT_BYTES;            // digits per mantissa
  localparam int NP = MANT_BYTES + MANT_BYTES;   // upper bound of output pairs
  localparam int CW = $clog2(NP + 1);

  logic       busy;
  modop_ctl_t c;
  digit_t     q1a [MANT_BYTES];   // op1 high digits
  digit_t     q2a [MANT_BYTES];   // op1 low digits
  digit_t     q1b [MANT_BYTES];   // op2 high digits (negated if subtracting)
  digit_t     q2b [MANT_BYTES];   // op2 low digits
  logic [CW-1:0] in_cnt, out_cnt, npairs;
  logic       in_done;

  assign ctl_ready = !busy;
  assign in_ready  = busy && !in_done;
  assign npairs    = CW'((ND + int'(c.sfd) + 1) / 2);
  assign out_valid = busy && (out_cnt < npairs) && ((out_cnt < in_cnt) || in_done);
  assign out_last  = (out_cnt == npairs - 1'b1);

  // digit p (0 = most significant) of an operand stored in qh/ql
  function automatic digit_t pick(input digit_t qh [MANT_BYTES], input digit_t ql [MANT_BYTES],
                                  input int p);
    if (p < 0 || p >= ND) return '0;
    return p[0] ? ql[p/2] : qh[p/2];
  endfunction

  always_comb begin
    int p, d1, d2;
    p  = 2 * int'(out_cnt);
    d1 = c.delay1 ? int'(c.sfd) : 0;
    d2 = c.delay1 ? 0 : int'(c.sfd);
    out_z = {pick(q1a, q2a, p - d1), pick(q1a, q2a, p + 1 - d1)};
    out_y = {pick(q1b, q2b, p - d2), pick(q1b, q2b, p + 1 - d2)};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      c       <= '0;
      in_cnt  <= '0;
      out_cnt <= '0;
      in_done <= 1'b0;
      for (int i = 0; i < int'(MANT_BYTES); i++) begin
        q1a[i] <= '0; q2a[i] <= '0; q1b[i] <= '0; q2b[i] <= '0;
      end
    end else begin
      if (ctl_valid && ctl_ready) begin
        busy    <= 1'b1;
        c       <= ctl;
        in_cnt  <= '0;
        out_cnt <= '0;
        in_done <= 1'b0;
      end
      if (in_valid && in_ready) begin     // LOAD into Q1/Q2
        for (int i = 0; i < int'(MANT_BYTES); i++) begin
          if (in_cnt == CW'(i)) begin
            q1a[i] <= in_op1[7:4];
            q2a[i] <= in_op1[3:0];
            q1b[i] <= c.sub ? dneg(in_op2[7:4]) : in_op2[7:4];
            q2b[i] <= c.sub ? dneg(in_op2[3:0]) : in_op2[3:0];
          end
        end
        in_cnt <= in_cnt + 1'b1;
        if (in_last || in_cnt == CW'(MANT_BYTES - 1)) in_done <= 1'b1;
      end
      if (out_valid && out_ready) begin   // RLOAD to ADDOP
        out_cnt <= out_cnt + 1'b1;
        if (out_last) busy <= 1'b0;
      end
    end
  end

endmodule
