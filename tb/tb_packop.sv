// tb_packop: self-checking testbench of the FPM output stage PACKOP.
//
// Descriptors from the EXOP side (an unnormalised exponent from -121 to
// +121, or a special packet code) are paired with product byte strings of 5
// signed-digit bytes (byte 0: overflow digit in its low half, high digit
// zero; random digits, often with leading zero digits, sometimes all zero),
// all with random gaps and random output back-pressure. The expected packet
// is computed in the testbench from the digit string lo(byte0), byte1 ..
// byte4: first non-zero digit leads, exponent = x + 1 - its position, 4
// digits kept, +-inf / +-eps beyond +-120 (this is where a limited overflow
// or underflow resolves), zero packet for all-zero digits; a special code
// gives its packet and takes no product bytes. Counted and required:
// overflow digit, leading zeros, limited overflow and underflow that resolve
// and that do not, zero, special. Timing: with no gaps the exponent byte
// leaves the cycle after the byte holding the leading digit is taken.
//
// Normalisation and the limited over/underflow check follow the document;
// the product byte layout is this design's choice. The document's worked
// example (bytes 00 00 05 44 35 at exponent +72 give .5443 E+69) is run
// first as a directed case.
module tb_packop;
  import sd_pkg::*;
  import tb_sd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic       res_valid = 1'b0, res_ready;
  fpm_res_t   res = '0;
  logic       in_valid = 1'b0, in_ready, in_last = 1'b0;
  logic [7:0] in_data = '0;
  logic       out_valid, out_ready = 1'b0, out_last;
  logic [7:0] out_data;

  packop dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  fpm_res_t   rq[$];
  logic [7:0] bq[$];
  bit         lq[$];
  pkt_t       expq[$];
  int n_ovf = 0, n_lz = 0, n_lim_ok = 0, n_lim_inf = 0, n_lim_eps = 0, n_zero = 0, n_sp = 0;
  bit gaps = 1'b1, stall = 1'b1;
  int lead_cyc = -1, exp_cyc = -1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc++;
  always @(posedge clk) out_ready <= !stall || ($urandom_range(3) != 0);

  always @(posedge clk) begin
    bit free;
    if (rst_n) begin
      free = !res_valid;
      if (res_valid && res_ready) begin void'(rq.pop_front()); free = 1'b1; end
      if (free) begin
        if (rq.size() > 0 && (!gaps || $urandom_range(2) != 0)) begin
          res_valid <= 1'b1; res <= rq[0];
        end else res_valid <= 1'b0;
      end
      free = !in_valid;
      if (in_valid && in_ready) begin
        if (!gaps && lead_cyc < 0) lead_cyc = cyc;
        void'(bq.pop_front()); void'(lq.pop_front()); free = 1'b1;
      end
      if (free) begin
        if (bq.size() > 0 && (!gaps || $urandom_range(2) != 0)) begin
          in_valid <= 1'b1; in_data <= bq[0]; in_last <= lq[0];
        end else in_valid <= 1'b0;
      end
    end
  end

  pkt_t got;
  int   ob = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      if (ob == 0 && !gaps && exp_cyc < 0) exp_cyc = cyc;
      unique case (ob)
        0: got.e = out_data;
        1: got.m1 = out_data;
        default: got.m2 = out_data;
      endcase
      if (out_last != (ob == 2)) begin failures++; $display("out_last at byte %0d", ob); end
      ob = (ob == 2) ? 0 : ob + 1;
      if (ob == 0) begin
        checks++;
        if (expq.size() == 0) begin
          failures++; $display("unexpected packet %s", pstr(got));
        end else begin
          if (!same(got, expq[0])) begin
            failures++; $display("got %s expected %s", pstr(got), pstr(expq[0]));
          end
          void'(expq.pop_front());
        end
      end
    end
  end

  function automatic int rdv(input int zpct);
    if (int'($urandom_range(99)) < zpct) return 0;
    return int'($urandom_range(14)) - 7;
  endfunction

  task automatic normal_op(input int x, input int lead0, input bit allzero);
    int d[$];
    pkt_t p;
    d = {};
    for (int i = 0; i < 9; i++) begin
      int v;
      v = (allzero || i < lead0) ? 0 : rdv(20);
      if (!allzero && i == lead0 && v == 0) v = -2;
      d.push_back(v);
    end
    bq.push_back({4'd0, 4'(d[0])}); lq.push_back(1'b0);
    for (int k = 0; k < 4; k++) begin
      bq.push_back({4'(d[1 + 2 * k]), 4'(d[2 + 2 * k])});
      lq.push_back(k == 3);
    end
    p = norm_ref(d, x);
    if (same(p, sp_zero())) n_zero++;
    else if (d[0] != 0) n_ovf++;
    else if (d[1] == 0) n_lz++;
    if (x == 121 || x == -121) begin
      if (p.e[6:0] == 7'd123) n_lim_inf++;
      else if (p.e[6:0] == 7'd125) n_lim_eps++;
      else if (!same(p, sp_zero())) n_lim_ok++;
    end
    rq.push_back('{sp: SP_NONE, exp: iexp_t'(x)});
    expq.push_back(p);
  endtask

  task automatic special_op(input int k);
    sp_t c;
    pkt_t p;
    unique case (k)
      0: begin c = SP_PINF; p = sp_pinf(); end
      1: begin c = SP_NINF; p = sp_ninf(); end
      2: begin c = SP_PEPS; p = sp_peps(); end
      3: begin c = SP_NEPS; p = sp_neps(); end
      4: begin c = SP_ZERO; p = sp_zero(); end
      default: begin c = SP_ERR; p = sp_err(); end
    endcase
    n_sp++;
    rq.push_back('{sp: c, exp: '0});
    expq.push_back(p);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // worked example of the document: product bytes 00 00 05 44 35 with
    // unnormalised exponent +72 give .5443 E+69
    begin
      pkt_t p;
      bq.push_back(8'h00); bq.push_back(8'h00); bq.push_back(8'h05);
      bq.push_back(8'h44); bq.push_back(8'h35);
      lq.push_back(1'b0); lq.push_back(1'b0); lq.push_back(1'b0);
      lq.push_back(1'b0); lq.push_back(1'b1);
      p.e = ebyte(69); p.m1 = 8'h54; p.m2 = 8'h43;
      n_lz++;
      rq.push_back('{sp: SP_NONE, exp: iexp_t'(72)});
      expq.push_back(p);
    end
    for (int i = 0; i < 2000; i++) begin
      int k, x;
      k = int'($urandom_range(9));
      x = (k == 0) ? 121 : (k == 1) ? -121 : (k == 2) ? 119 + int'($urandom_range(1)) :
          int'($urandom_range(40)) - 20;
      if (k < 9) normal_op(x, int'($urandom_range(3)), ($urandom_range(30) == 0));
      else special_op(int'($urandom_range(5)));
    end
    wait (expq.size() == 0 && bq.size() == 0);
    stall = 1'b0; gaps = 1'b0;
    repeat (5) @(posedge clk);
    normal_op(3, 0, 1'b0);
    wait (expq.size() == 0);
    checks++;
    if (exp_cyc - lead_cyc != 1) begin
      failures++; $display("exponent byte %0d cycles after the leading digit", exp_cyc - lead_cyc);
    end
    checks += 7;
    if (n_ovf == 0)     begin failures++; $display("no overflow digit"); end
    if (n_lz == 0)      begin failures++; $display("no leading zeros"); end
    if (n_lim_ok == 0)  begin failures++; $display("no resolved limited case"); end
    if (n_lim_inf == 0) begin failures++; $display("no limited overflow to inf"); end
    if (n_lim_eps == 0) begin failures++; $display("no limited underflow to eps"); end
    if (n_zero == 0)    begin failures++; $display("no zero"); end
    if (n_sp == 0)      begin failures++; $display("no special"); end
    $display("ovf %0d lz %0d limited ok %0d inf %0d eps %0d zero %0d special %0d",
             n_ovf, n_lz, n_lim_ok, n_lim_inf, n_lim_eps, n_zero, n_sp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
