// tb_sop_bank: exhaustive self-checking testbench of the special operand
// units. Every special code and byte index is applied and the byte compared
// with the packet the design defines: +-inf and +-eps with exponent
// magnitude 123 / 125, the exponent sign giving the sign, and a mantissa of
// leading digit +-1; E with exponent 127 and zero mantissa; the zero packet
// all zero. Combinational: sampled 1 time unit after the inputs change.
//
// One unit per special operand follows the document; the mantissa bytes of
// the packets are this design's choice.
module tb_sop_bank;
  import sd_pkg::*;
  import tb_sd_pkg::*;

  sp_t        code = SP_NONE;
  logic [1:0] idx = '0;
  logic [7:0] data;
  int checks = 0, failures = 0;
  sp_t  codes [6] = '{SP_PINF, SP_NINF, SP_PEPS, SP_NEPS, SP_ERR, SP_ZERO};
  pkt_t pk [6];

  sop_bank dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pk = '{sp_pinf(), sp_ninf(), sp_peps(), sp_neps(), sp_err(), sp_zero()};
    for (int c = 0; c < 6; c++) begin
      for (int i = 0; i < 3; i++) begin
        logic [7:0] e;
        code = codes[c]; idx = 2'(i);
        #1;
        e = (i == 0) ? pk[c].e : (i == 1) ? pk[c].m1 : pk[c].m2;
        checks++;
        if (data != e) begin
          failures++;
          $display("code %0d byte %0d: %h expected %h", c, i, data, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
