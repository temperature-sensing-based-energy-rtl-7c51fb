// anurupyena_core_tb: self-checking test of the combinational sutra datapath.
//
// Three instances cover the bases the sutra is meant for: the default
// working base 50 (100 x 1/2, 6-bit operands), base 60 (10 x 6/1, 6-bit)
// and base 200 (100 x 2/1, 8-bit operands). Every operand pair is applied
// and the product is compared with a plain multiplication done here; the
// left and right parts are checked to recombine to the product, and for
// base 50 the left part is checked against floor((a + b - 50) / 2). The
// worked example 46 x 43 = 1978 (left 19, right 78) is checked on its own.
// Counts of odd cross-sums (half carried into the right part), right parts
// of 100 or more (carry) and negative right parts (borrow) must all be
// non-zero.
module anurupyena_core_tb;

  localparam int IW50  = 2 * 6 + 2 * $clog2(100 + 1) + 4;
  localparam int IW60  = 2 * 6 + 2 * $clog2(60 + 1) + 4;
  localparam int IW200 = 2 * 8 + 2 * $clog2(200 + 1) + 4;

  int checks = 0, failures = 0;
  int n_half = 0, n_carry = 0, n_borrow = 0;

  logic [5:0]  a50, b50, a60, b60;
  logic [7:0]  a200, b200;
  logic [14:0] p50, p60;
  logic [15:0] p200;
  logic signed [IW50-1:0]  l50, r50;
  logic signed [IW60-1:0]  l60, r60;
  logic signed [IW200-1:0] l200, r200;

  anurupyena_core u50 (.a(a50), .b(b50), .p(p50), .left_part(l50), .right_part(r50));

  anurupyena_core #(.WIDTH_IN(6), .WIDTH_OUT(15), .THEO_BASE(10), .RATIO_NUM(6), .RATIO_DEN(1))
    u60 (.a(a60), .b(b60), .p(p60), .left_part(l60), .right_part(r60));

  anurupyena_core #(.WIDTH_IN(8), .WIDTH_OUT(16), .THEO_BASE(100), .RATIO_NUM(2), .RATIO_DEN(1))
    u200 (.a(a200), .b(b200), .p(p200), .left_part(l200), .right_part(r200));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cs, fl;
    // worked example
    a50 = 6'd46; b50 = 6'd43;
    #1;
    check(p50 == 15'd1978, $sformatf("46x43 p=%0d", p50));
    check(l50 == 19 && r50 == 78, $sformatf("46x43 left=%0d right=%0d", l50, r50));

    for (int i = 0; i < 64; i++) begin
      for (int j = 0; j < 64; j++) begin
        a50 = 6'(i); b50 = 6'(j); a60 = 6'(i); b60 = 6'(j);
        #1;
        check(p50 == 15'(i * j), $sformatf("base50 %0dx%0d p=%0d", i, j, p50));
        check(int'(l50) * 100 + int'(r50) == i * j, $sformatf("base50 %0dx%0d parts", i, j));
        cs = i + j - 50;
        fl = (cs >= 0) ? cs / 2 : -((-cs + 1) / 2);
        check(int'(l50) == fl, $sformatf("base50 %0dx%0d left=%0d want %0d", i, j, l50, fl));
        if (cs % 2 != 0) n_half++;
        if (r50 >= 100)  n_carry++;
        if (r50 < 0)     n_borrow++;
        check(p60 == 15'(i * j), $sformatf("base60 %0dx%0d p=%0d", i, j, p60));
        check(int'(l60) * 10 + int'(r60) == i * j, $sformatf("base60 %0dx%0d parts", i, j));
        check(int'(l60) == (i + j - 60) * 6, $sformatf("base60 %0dx%0d left", i, j));
      end
    end

    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a200 = 8'(i); b200 = 8'(j);
        #1;
        check(p200 == 16'(i * j), $sformatf("base200 %0dx%0d p=%0d", i, j, p200));
        check(int'(l200) * 100 + int'(r200) == i * j, $sformatf("base200 %0dx%0d parts", i, j));
      end
    end

    $display("half carries=%0d right-part carries=%0d borrows=%0d", n_half, n_carry, n_borrow);
    check(n_half > 0, "no odd cross-sum seen");
    check(n_carry > 0, "no right-part carry seen");
    check(n_borrow > 0, "no right-part borrow seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
