// sop_bank: the special operand (SOP) units and their multiplexers.
//
// One SOP unit per special operand (E, +inf, -inf, +eps, -eps) holds a whole
// packet, MANT_BYTES+1 bytes; the multiplexers M1..M5 pick byte idx of every
// unit (signal CT) and M6 picks the unit (signal SEL). The all-zero packet,
// which the document makes by clearing the output register, is selected here
// as a sixth source. The units never change, so they are constants in this
// design; their contents are defined by sd_pkg::sop_byte.
// Purely combinational.
module sop_bank
  import sd_pkg::*;
#(
  parameter int unsigned IDXW = 2
) (
  input  sp_t             code,
  input  logic [IDXW-1:0] idx,
  output logic [7:0]      data
);

  assign data = sop_byte(code, int'(idx));

endmodule
