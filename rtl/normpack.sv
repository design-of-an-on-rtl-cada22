// normpack: on-line normalise-and-pack core shared by NORMOP (FPAS) and
// PACKOP (FPM).
//
// Result digits arrive most significant first, one or two per transfer. The
// first digit has weight 8^0: if it is non-zero the mantissa overflowed and
// the exponent is incremented. Otherwise every further zero digit before the
// first non-zero one decrements the exponent. No shifting is needed: the
// first non-zero digit simply becomes the leading mantissa digit, and the
// next 2*MANT_BYTES-1 digits follow it; later digits are accepted and dropped
// (the "dummy acknowledge" that drains the adder or multiplier), and missing
// digits are filled with zeros. When the leading digit is found the final
// exponent is known and checked: above +120 the result is +-inf, below -120
// it is +-eps, the sign being that of the leading digit (the sign of a
// signed-digit number). If every digit is zero the zero packet is sent.
// A start command with a special code sends that special packet instead and
// expects no digits. This procedure follows the document; sharing one core
// between the two units is this design's choice.
//
// Output: the exponent byte leaves as soon as the leading digit is found,
// then each mantissa byte as soon as its two digits are in, so the packet
// streams out while the digits still arrive. Special packets come from the
// SOP registers (sop_bank).
// Timing: one digit transfer per cycle; the exponent byte is offered the
// cycle after the leading digit is taken.
module normpack
  import sd_pkg::*;
#(
  parameter int unsigned MANT_BYTES = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start_valid,
  output logic        start_ready,
  input  pack_start_t start,
  input  logic        d_valid,
  output logic        d_ready,
  input  digit_t      d0,
  input  digit_t      d1,
  input  logic        d_two,
  input  logic        d_last,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [7:0]  out_data,
  output logic        out_last
);

  localparam int ND  = 2 * MANT_BYTES;
  localparam int PKT = MANT_BYTES + 1;
  localparam int CW  = $clog2(ND + 1);
  localparam int PW  = $clog2(PKT + 1);

  logic    active, in_done, searching, first;
  sp_t     sp_q;
  iexp_t   exp_q;
  digit_t  mant [ND];
  logic [CW-1:0] ncol;
  logic [PW-1:0] rd, avail;
  logic [7:0] sop_data;

  // digits of this transfer, processed in order
  logic    n_search, n_first;
  sp_t     n_sp;
  iexp_t   n_exp;
  digit_t  n_mant [ND];
  logic [CW-1:0] n_ncol;

  sop_bank #(.IDXW(PW)) u_sop (.code(sp_q), .idx(rd), .data(sop_data));

  assign start_ready = !active;
  assign d_ready     = active && !in_done;

  always_comb begin
    digit_t dg;
    n_search = searching;
    n_first  = first;
    n_sp     = sp_q;
    n_exp    = exp_q;
    n_ncol   = ncol;
    for (int i = 0; i < ND; i++) n_mant[i] = mant[i];
    for (int k = 0; k < 2; k++) begin
      dg = (k == 0) ? d0 : d1;
      if (k == 0 || d_two) begin
        if (n_sp != SP_NONE) begin
          // special result already chosen: drain
        end else if (n_search) begin
          if (n_first) begin
            if (dg != '0) n_exp = n_exp + 1'b1;     // CTU: mantissa overflow
          end else if (dg == '0) begin
            n_exp = n_exp - 1'b1;                   // CTD: leading zero
          end
          n_first = 1'b0;
          if (dg != '0) begin                       // O/UFLOW check
            n_search = 1'b0;
            if (n_exp > iexp_t'(EXP_MAX))
              n_sp = dg[3] ? SP_NINF : SP_PINF;
            else if (n_exp < -iexp_t'(EXP_MAX))
              n_sp = dg[3] ? SP_NEPS : SP_PEPS;
            else begin
              n_mant[0] = dg;
              n_ncol    = CW'(1);
            end
          end
        end else if (n_ncol < CW'(ND)) begin
          for (int i = 0; i < ND; i++) if (n_ncol == CW'(i)) n_mant[i] = dg;
          n_ncol = n_ncol + 1'b1;
        end
      end
    end
    if (d_last) begin
      if (n_search && n_sp == SP_NONE) n_sp = SP_ZERO;   // all digits zero
      n_ncol = CW'(ND);                                  // zero fill
    end
  end

  // bytes of the packet that are ready to leave
  always_comb begin
    if (!active)              avail = '0;
    else if (sp_q != SP_NONE) avail = PW'(PKT);
    else if (searching)       avail = '0;
    else                      avail = PW'(1 + int'(ncol) / 2);
  end

  assign out_valid = active && (rd < avail);
  assign out_last  = (rd == PW'(PKT - 1));

  // M9: exponent, packed mantissa or special operand byte
  always_comb begin
    out_data = 8'h00;
    if (sp_q != SP_NONE) out_data = sop_data;
    else if (rd == '0)   out_data = int_to_exp(exp_q);
    else begin
      for (int i = 1; i < PKT; i++)
        if (rd == PW'(i)) out_data = {mant[2*i-2], mant[2*i-1]};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active    <= 1'b0;
      in_done   <= 1'b1;
      searching <= 1'b0;
      first     <= 1'b0;
      sp_q      <= SP_NONE;
      exp_q     <= '0;
      ncol      <= '0;
      rd        <= '0;
      for (int i = 0; i < ND; i++) mant[i] <= '0;
    end else begin
      if (start_valid && start_ready) begin
        active    <= 1'b1;
        sp_q      <= start.sp;
        exp_q     <= start.exp;
        in_done   <= (start.sp != SP_NONE);
        searching <= 1'b1;
        first     <= 1'b1;
        ncol      <= '0;
        rd        <= '0;
        for (int i = 0; i < ND; i++) mant[i] <= '0;
      end else begin
        if (d_valid && d_ready) begin
          searching <= n_search;
          first     <= n_first;
          sp_q      <= n_sp;
          exp_q     <= n_exp;
          ncol      <= n_ncol;
          for (int i = 0; i < ND; i++) mant[i] <= n_mant[i];
          if (d_last) in_done <= 1'b1;
        end
        if (out_valid && out_ready) rd <= rd + 1'b1;
        if (active && in_done && rd == PW'(PKT)) active <= 1'b0;
      end
    end
  end

endmodule
