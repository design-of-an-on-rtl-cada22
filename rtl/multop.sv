// multop: on-line signed-digit mantissa multiplier, two digits at a time.
//
// Algorithm (Trivedi-Ercegovac on-line multiplication, taken two radix-8
// digits at a time, i.e. radix R = 64). With x_k, y_k the k-th operand bytes
// and X_k, Y_k the operands known after k bytes,
//   w_j = R (w_{j-1} - d_{j-1}) + X_j y_j + Y_{j-1} x_j
//   d_j = sign(w_j) * floor(|w_j| + 1/2)
// and X*Y = sum d_j R^-j + R^-J (w_J - d_J). The recurrence needs
// |X|,|Y| < 1/4, so the operands are taken internally as X/R and Y/R (a zero
// byte in front); the step with that zero byte always gives d = 0 and is
// left out. Each operand byte pair therefore yields one result byte d, and
// the last pair also yields the remainder w_J - d_J as MANT_BYTES+1 bytes.
// The product leaves as 2*MANT_BYTES+1 signed-digit bytes, byte t of weight
// 64^-t: byte 0 holds the mantissa overflow digit (its high digit is always
// zero), so X*Y*8^(4*MANT_BYTES) = sum byte_t * 64^(2*MANT_BYTES - t).
//
// Structure. OPNDST keeps the operand bytes received so far (OPND REG1..n)
// and OPND REG3 the previous partial Y; two MULTSEL units form X_j y_j and
// Y_{j-1} x_j from digit-product ROMs. The document then uses signed-digit
// adders (S-D ADD1..3), ROUND and NEG; here the partial sums, w, the
// rounding and w - d are computed in two's complement fixed point (w scaled
// by R^(MANT_BYTES+1), which is exact) and d and the remainder are converted
// back to signed-digit bytes by sign and magnitude. That binary datapath is
// this design's choice. RESREG1 (d) and RESREG2 (remainder) feed the output
// multiplexer M as a small byte queue.
//
// Timing: a pair is taken when the previous result bytes have left; its
// result byte is offered the next cycle; after the last pair the remaining
// MANT_BYTES+1 bytes follow one per cycle. out_last marks the final byte.
module multop
  import sd_pkg::*;
#(
  parameter int unsigned MANT_BYTES = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_x,
  input  logic [7:0] in_y,
  input  logic       in_last,
  output logic       out_valid,
  input  logic       out_ready,
  output logic [7:0] out_data,
  output logic       out_last
);

  localparam int N   = MANT_BYTES;
  localparam int ND  = 2 * N;
  localparam int FB  = 6 * (N + 1);       // fraction bits of w
  localparam int WW  = FB + 12;           // width of w
  localparam int PWD = 3 * ND + 8;        // width of a MULTSEL product
  localparam int NQ  = N + 2;             // result bytes held at most
  localparam int QW  = $clog2(NQ + 1);
  localparam int IW  = $clog2(NQ);
  localparam int KW  = $clog2(N + 1);

  typedef logic signed [WW-1:0] w_t;

  digit_t xd [ND];          // OPNDST for X (bytes received so far)
  digit_t yd [ND];          // OPND REG3: Y_{j-1}
  digit_t xd_n [ND];        // X_j including the new byte
  logic [KW-1:0] k;         // pairs received
  w_t     w_q;              // w_{j-1} scaled by 2^FB
  w_t     d_q;              // d_{j-1}
  logic [7:0] q [NQ];       // RESREG1 / RESREG2
  logic [QW-1:0] qcnt, qrd;
  logic       last_q;

  logic signed [PWD-1:0] p1, p2;
  w_t     w_n, aw, d_n, rem;
  logic [7:0] dbyte;
  logic [7:0] rbytes [N+1];

  always_comb begin
    for (int i = 0; i < ND; i++) xd_n[i] = xd[i];
    for (int i = 0; i < N; i++)
      if (k == KW'(i)) begin
        xd_n[2*i]   = in_x[7:4];
        xd_n[2*i+1] = in_x[3:0];
      end
  end

  multsel #(.ND(ND), .PW(PWD)) u_sel1 (.z(xd_n), .y(in_y), .p(p1));   // X_j y_j
  multsel #(.ND(ND), .PW(PWD)) u_sel2 (.z(yd),   .y(in_x), .p(p2));   // Y_{j-1} x_j

  // the next step of the recurrence
  always_comb begin
    w_t m;
    w_n = ((w_q - (d_q <<< FB)) <<< 6) + w_t'(p1) + w_t'(p2);
    aw  = (w_n < 0) ? -w_n : w_n;
    m   = (aw + (w_t'(1) <<< (FB - 1))) >>> FB;            // ROUND
    d_n = (w_n < 0) ? -m : m;
    rem = w_n - (d_n <<< FB);                              // w - d (NEG, S-D ADD3)
    // |d| <= 63: two radix-8 digits of the magnitude, negated for d < 0
    dbyte = (d_n < 0) ? {4'(-{1'b0, m[5:3]}), 4'(-{1'b0, m[2:0]})}
                      : {1'b0, m[5:3], 1'b0, m[2:0]};
  end

  // remainder as N+1 signed-digit bytes, most significant first
  always_comb begin
    w_t ar;
    logic [3:0] dg;
    ar = (rem < 0) ? -rem : rem;
    for (int b = 0; b <= N; b++) begin
      for (int h = 0; h < 2; h++) begin
        dg = {1'b0, ar[FB - 1 - 6 * b - 3 * h -: 3]};
        if (h == 0) rbytes[b][7:4] = (rem < 0) ? 4'(-dg) : dg;
        else        rbytes[b][3:0] = (rem < 0) ? 4'(-dg) : dg;
      end
    end
  end

  assign in_ready  = (qrd == qcnt);
  assign out_valid = (qrd != qcnt);
  assign out_data  = q[IW'(qrd)];
  assign out_last  = last_q && (qrd == qcnt - 1'b1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      k      <= '0;
      w_q    <= '0;
      d_q    <= '0;
      qcnt   <= '0;
      qrd    <= '0;
      last_q <= 1'b0;
      for (int i = 0; i < ND; i++) begin xd[i] <= '0; yd[i] <= '0; end
      for (int i = 0; i < NQ; i++) q[i] <= '0;
    end else begin
      if (out_valid && out_ready) qrd <= qrd + 1'b1;
      if (in_valid && in_ready) begin
        q[0]   <= dbyte;                          // RESLOAD
        qrd    <= '0;
        last_q <= in_last || (k == KW'(N - 1));
        if (in_last || k == KW'(N - 1)) begin     // LOADISHFT: last batch
          for (int b = 0; b <= N; b++) q[b+1] <= rbytes[b];
          qcnt <= QW'(N + 2);
          k    <= '0;
          w_q  <= '0;
          d_q  <= '0;
          for (int i = 0; i < ND; i++) begin xd[i] <= '0; yd[i] <= '0; end
        end else begin
          qcnt <= QW'(1);
          k    <= k + 1'b1;
          w_q  <= w_n;                            // DIFFLOAD
          d_q  <= d_n;
          for (int i = 0; i < ND; i++) xd[i] <= xd_n[i];   // OPERLOAD
          for (int i = 0; i < N; i++)                     // DEL-LOAD
            if (k == KW'(i)) begin
              yd[2*i]   <= in_y[7:4];
              yd[2*i+1] <= in_y[3:0];
            end
        end
      end
    end
  end

endmodule
