// mpx: input multiplexer of the FPAS and the FPM.
//
// Two operand packets arrive one after the other on a byte-serial channel
// (exp1 | op1_1 .. op1_n | exp2 | op2_1 .. op2_n). The first packet is held in
// DEL, a FIFO of MANT_BYTES+1 byte registers with one common load, so that the
// two operands can leave side by side. Bytes of the second packet go to the
// one-byte register REG. The output switches then present the exponent pair
// (exp1, exp2) on the exponent port and, after it is taken, each mantissa byte
// pair (op1_k, op2_k) on the operand port. When the last pair is taken MPX
// accepts the next packet. The structure (DEL, REG, input switch S1, output
// switches S2/S3) follows the document; the handshake encoding is this
// design's: every channel is valid/ready, a transfer happens on a rising clock
// edge with both high.
//
// The operation flag in_sub (FPAS: subtract) is sampled with the first byte
// of the first packet and travels with the exponent pair.
//
// Timing: one input byte per cycle at most; the exponent pair is valid the
// cycle after exp2 is taken; each operand pair is valid the cycle after its
// second byte is taken. Reset is synchronous, active low.
module mpx #(
  parameter int unsigned MANT_BYTES = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  // byte-serial packet input
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_data,
  input  logic       in_sub,
  // exponent pair (to EXPFIX / EXOP)
  output logic       exp_valid,
  input  logic       exp_ready,
  output logic [7:0] exp1,
  output logic [7:0] exp2,
  output logic       exp_sub,
  // mantissa byte pairs (to MODOP / MULTOP / NORMOP)
  output logic       op_valid,
  input  logic       op_ready,
  output logic [7:0] op1,
  output logic [7:0] op2,
  output logic       op_last
);

  localparam int unsigned PKT = MANT_BYTES + 1;

  typedef enum logic [2:0] {S_LOAD1, S_LOAD2E, S_EXPOUT, S_OPLOAD, S_OPOUT} state_t;

  state_t state;
  logic [7:0] del_q [PKT];   // DEL FIFO, del_q[PKT-1] is its output
  logic [7:0] reg_q;         // REG
  logic       sub_q;
  logic [$clog2(PKT+1)-1:0] cnt;   // bytes of packet 1 loaded / pairs sent

  logic in_fire, exp_fire, op_fire, del_load;

  assign in_ready  = (state == S_LOAD1) || (state == S_LOAD2E) || (state == S_OPLOAD);
  assign in_fire   = in_valid && in_ready;
  assign exp_valid = (state == S_EXPOUT);
  assign exp_fire  = exp_valid && exp_ready;
  assign op_valid  = (state == S_OPOUT);
  assign op_fire   = op_valid && op_ready;

  // S2/S3: the same DEL and REG outputs feed both ports
  assign exp1    = del_q[PKT-1];
  assign exp2    = reg_q;
  assign exp_sub = sub_q;
  assign op1     = del_q[PKT-1];
  assign op2     = reg_q;
  assign op_last = (cnt == ($bits(cnt))'(MANT_BYTES));

  // LOAD: shift DEL by one byte (also how the next op1 byte reaches its output)
  assign del_load = (state == S_LOAD1 && in_fire) || exp_fire || op_fire;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_LOAD1;
      cnt   <= '0;
      reg_q <= '0;
      sub_q <= 1'b0;
      for (int i = 0; i < int'(PKT); i++) del_q[i] <= '0;
    end else begin
      if (del_load) begin
        del_q[0] <= in_data;
        for (int i = 1; i < int'(PKT); i++) del_q[i] <= del_q[i-1];
      end
      unique case (state)
        S_LOAD1: if (in_fire) begin
          if (cnt == 0) sub_q <= in_sub;
          if (cnt == ($bits(cnt))'(PKT - 1)) begin
            cnt   <= '0;
            state <= S_LOAD2E;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_LOAD2E: if (in_fire) begin
          reg_q <= in_data;
          state <= S_EXPOUT;
        end
        S_EXPOUT: if (exp_fire) state <= S_OPLOAD;
        S_OPLOAD: if (in_fire) begin
          reg_q <= in_data;
          cnt   <= cnt + 1'b1;
          state <= S_OPOUT;
        end
        S_OPOUT: if (op_fire) begin
          if (op_last) begin
            cnt   <= '0;
            state <= S_LOAD1;
          end else begin
            state <= S_OPLOAD;
          end
        end
        default: state <= S_LOAD1;
      endcase
    end
  end

endmodule
