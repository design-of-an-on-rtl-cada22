// tb_mpx: self-checking testbench of the input multiplexer MPX.
//
// Random packet pairs (exponent byte, 2 mantissa bytes each) are streamed in
// with random gaps and a random subtract flag; the exponent sink and the
// mantissa-pair sink apply random back-pressure. Checked: each exponent pair
// carries exp1, exp2 and the subtract flag of its packet pair; the mantissa
// pairs follow in order (op1 byte i with op2 byte i), op_last on the last;
// no mantissa pair of a packet pair appears before its exponent pair has been
// taken. Throughput: with no gaps and no back-pressure, 32 packet pairs must
// pass in at most 9 cycles each: 6 input bytes, the exponent pair, and the
// two mantissa pairs, since MPX takes a new packet only after the last
// mantissa pair has been absorbed.
//
// The order exponent pair first, then mantissa pairs, and the new input only
// after the last pair, follow the document; the subtract flag riding with
// the packet is this design's choice.
module tb_mpx;

  logic clk = 1'b0, rst_n = 1'b0;
  logic       in_valid = 1'b0, in_ready, in_sub = 1'b0;
  logic [7:0] in_data = '0;
  logic       exp_valid, exp_ready = 1'b0, exp_sub;
  logic [7:0] exp1, exp2;
  logic       op_valid, op_ready = 1'b0, op_last;
  logic [7:0] op1, op2;

  mpx dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [7:0] inq[$];
  logic       subq[$];
  logic [7:0] e1q[$], e2q[$], o1q[$], o2q[$];
  logic       esq[$];
  int         exp_taken = 0, pairs_done = 0, ops_in_pair = 0;
  bit         gaps = 1'b1, stall = 1'b1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push_pair();
    logic [7:0] b [6];
    logic s;
    for (int i = 0; i < 6; i++) b[i] = 8'($urandom);
    s = 1'($urandom_range(1));
    for (int i = 0; i < 6; i++) begin inq.push_back(b[i]); subq.push_back(s); end
    e1q.push_back(b[0]); e2q.push_back(b[3]); esq.push_back(s);
    o1q.push_back(b[1]); o2q.push_back(b[4]);
    o1q.push_back(b[2]); o2q.push_back(b[5]);
  endtask

  always @(posedge clk) begin
    bit free;
    if (rst_n) begin
      free = !in_valid;
      if (in_valid && in_ready) begin
        void'(inq.pop_front());
        void'(subq.pop_front());
        free = 1'b1;
      end
      if (free) begin
        if (inq.size() > 0 && (!gaps || $urandom_range(3) != 0)) begin
          in_valid <= 1'b1;
          in_data  <= inq[0];
          in_sub   <= subq[0];
        end else begin
          in_valid <= 1'b0;
        end
      end
    end
  end

  always @(posedge clk) exp_ready <= !stall || ($urandom_range(2) != 0);
  always @(posedge clk) op_ready <= !stall || ($urandom_range(2) != 0);

  always @(posedge clk) begin
    if (rst_n && exp_valid && exp_ready) begin
      checks++;
      if (exp1 != e1q[0] || exp2 != e2q[0] || exp_sub != esq[0]) begin
        failures++;
        $display("exp pair %h %h %b, expected %h %h %b", exp1, exp2, exp_sub, e1q[0], e2q[0], esq[0]);
      end
      void'(e1q.pop_front()); void'(e2q.pop_front()); void'(esq.pop_front());
      exp_taken++;
    end
    if (rst_n && op_valid && op_ready) begin
      checks++;
      if (exp_taken <= pairs_done) begin
        failures++;
        $display("mantissa pair before its exponent pair");
      end
      if (op1 != o1q[0] || op2 != o2q[0] || op_last != (ops_in_pair == 1)) begin
        failures++;
        $display("op pair %h %h last %b, expected %h %h", op1, op2, op_last, o1q[0], o2q[0]);
      end
      void'(o1q.pop_front()); void'(o2q.pop_front());
      ops_in_pair = (ops_in_pair == 1) ? 0 : 1;
      if (ops_in_pair == 0) pairs_done++;
    end
  end

  initial begin
    int t0, cyc;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 300; i++) push_pair();
    wait (pairs_done == 300);
    // throughput without gaps or back-pressure
    gaps = 1'b0; stall = 1'b0;
    @(posedge clk);
    for (int i = 0; i < 32; i++) push_pair();
    t0 = int'($time);
    wait (pairs_done == 332);
    cyc = (int'($time) - t0) / 10;
    checks++;
    if (cyc > 32 * 9 + 2) begin
      failures++;
      $display("32 packet pairs took %0d cycles", cyc);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (e1q.size() != 0 || o1q.size() != 0) begin failures++; $display("outputs missing"); end
    $display("32 packet pairs in %0d cycles", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
