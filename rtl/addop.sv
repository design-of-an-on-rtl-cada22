// addop: byte-serial on-line signed-digit adder of the FPAS.
//
// Adds two operands that arrive as byte pairs, most significant first, and
// returns the sum digits most significant first, starting with the overflow
// digit s0. Each byte holds two radix-8 digits, so two A units (AROM1 for the
// high digits, AROM2 for the low digits) work in parallel: for pair j
//   A1: z(2j+1) + y(2j+1) -> t(2j),   w(2j+1)
//   A2: z(2j+2) + y(2j+2) -> t(2j+1), w(2j+2)
// and two binary 4-bit adders (ADD1, ADD2, carry out dropped) form
//   s(2j)   = w(2j)   + t(2j)     with w(2j) kept in WREG0 from pair j-1
//   s(2j+1) = w(2j+1) + t(2j+1)
// WREG0 starts at zero, so s0 = t0 flags mantissa overflow. A carry moves at
// most one digit, so each input pair yields two sum digits at once. After the
// last pair one more digit, s(2P) = w(2P), follows alone. All of this follows
// the document (Fig 3.2 and the ADDOP description).
//
// Interface: in_* is the aligned byte pair from MODOP; out_* carries one or
// two sum digits (out_two = 1: out_d0 then out_d1; else only out_d0) with
// out_last marking the final digit ("last data" to NORMOP).
// Timing: a pair is taken when the output register is free; its two sum
// digits are offered on the next cycle. P pairs give 2P+1 digits.
module addop
  import sd_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_z,
  input  logic [7:0] in_y,
  input  logic       in_last,
  output logic       out_valid,
  input  logic       out_ready,
  output digit_t     out_d0,
  output digit_t     out_d1,
  output logic       out_two,
  output logic       out_last
);

  digit_t t_a, w_a, t_b, w_b;
  digit_t wreg0;
  logic   fin_pend;   // the lone final digit is still to be sent

  arom u_arom1 (.z(in_z[7:4]), .y(in_y[7:4]), .t(t_a), .w(w_a));
  arom u_arom2 (.z(in_z[3:0]), .y(in_y[3:0]), .t(t_b), .w(w_b));

  logic in_fire, out_fire;
  assign in_ready = !out_valid && !fin_pend;
  assign in_fire  = in_valid && in_ready;
  assign out_fire = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_d0    <= '0;
      out_d1    <= '0;
      out_two   <= 1'b0;
      out_last  <= 1'b0;
      wreg0     <= '0;
      fin_pend  <= 1'b0;
    end else begin
      if (out_fire) begin
        if (fin_pend) begin
          out_d0   <= wreg0;      // s(2P) = w(2P) + 0
          out_d1   <= '0;
          out_two  <= 1'b0;
          out_last <= 1'b1;
          fin_pend <= 1'b0;
          wreg0    <= '0;
        end else begin
          out_valid <= 1'b0;
          out_last  <= 1'b0;
        end
      end
      if (in_fire) begin
        out_valid <= 1'b1;
        out_d0    <= wreg0 + t_a;   // ADD1
        out_d1    <= w_a + t_b;     // ADD2
        out_two   <= 1'b1;
        out_last  <= 1'b0;
        wreg0     <= w_b;           // RLOAD2
        fin_pend  <= in_last;
      end
    end
  end

endmodule
