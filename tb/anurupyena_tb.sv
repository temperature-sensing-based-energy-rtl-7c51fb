// anurupyena_tb: end-to-end test of the clocked multiplier at its default
// parameters (6-bit A and B, 15-bit S, working base 50).
//
// It first repeats the document's example, A = 46, B = 43, and expects
// S = 1978 after one rising clock edge, and checks that S does not change
// before that edge. It then streams every A, B pair, one per clock, and
// compares S one clock later with the product computed here, which checks
// the latency of one clock and the rate of one product per clock. It counts
// the sutra's cases, worked out here from the operands: both operands
// below the base, both above, one on each side, an odd cross-sum whose half
// is carried into the right part, a right part that carries into the left
// and one that borrows from it. Each must occur at least once.
module anurupyena_tb;

  logic [5:0]  A, B;
  logic        clock = 1'b0;
  logic [14:0] S;

  int checks = 0, failures = 0;
  int n_below = 0, n_above = 0, n_mixed = 0, n_half = 0, n_carry = 0, n_borrow = 0;

  anurupyena dut (.A(A), .B(B), .clock(clock), .S(S));

  always #5 clock = ~clock;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [14:0] s_prev;
    int          exp_q[$];
    int          ea, eb, rp;

    // settle S to a known product first
    A = 6'd0; B = 6'd0;
    @(posedge clock); #1;
    check(S == 15'd0, $sformatf("0x0 S=%0d", S));

    // worked example: the product appears on the next edge, not before
    A = 6'd46; B = 6'd43;
    #2;
    s_prev = S;
    check(s_prev == 15'd0, "S changed before the clock edge");
    @(posedge clock); #1;
    check(S == 15'd1978, $sformatf("46x43 S=%0d", S));
    check(S == 15'b000011110111010, "46x43 bit pattern");

    // stream every pair, one per clock
    for (int i = 0; i < 64; i++) begin
      for (int j = 0; j < 64; j++) begin
        A = 6'(i); B = 6'(j);
        exp_q.push_back(i * j);
        #1;
        if (i < 50 && j < 50) n_below++;
        if (i > 50 && j > 50) n_above++;
        if ((i < 50 && j > 50) || (i > 50 && j < 50)) n_mixed++;
        if ((i + j - 50) % 2 != 0) n_half++;
        rp = (((i + j - 50) % 2 != 0) ? 50 : 0) + (i - 50) * (j - 50);
        if (rp >= 100) n_carry++;
        if (rp < 0)    n_borrow++;
        @(posedge clock); #1;
        ea = exp_q.pop_front();
        eb = int'(S);
        check(eb == ea, $sformatf("%0dx%0d S=%0d want %0d", i, j, eb, ea));
      end
    end

    $display("below=%0d above=%0d mixed=%0d half=%0d carry=%0d borrow=%0d",
             n_below, n_above, n_mixed, n_half, n_carry, n_borrow);
    check(n_below > 0, "both-below-base case never seen");
    check(n_above > 0, "both-above-base case never seen");
    check(n_mixed > 0, "mixed-side case never seen");
    check(n_half > 0, "half carry never seen");
    check(n_carry > 0, "right-part carry never seen");
    check(n_borrow > 0, "right-part borrow never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
