// anurupyena_core: combinational Anurupyena Shunyamanyat ("proportionately")
// multiplier datapath.
//
// Both operands are taken as deviations from a working base W, where W is a
// power-of-ten theoretical base T scaled by the ratio NUM/DEN (default
// T = 100, NUM/DEN = 1/2, so W = 50). The sutra then forms
//   cross_sum = a + (b - W)             (equal to b + (a - W))
//   scaled    = cross_sum * NUM         (proportion applied to the left part)
//   left      = floor(scaled / DEN)     (left part, counted in units of T)
//   rem       = scaled mod DEN          (fraction of T left over by the division)
//   right     = rem * (T / DEN) + (a - W) * (b - W)
//   product   = left * T + right
// For 46 x 43 near 50: cross_sum = 39, left = 19 (19.5), the half carries 50
// into the right part, right = 50 + (-4)(-7) = 78, product = 1978.
// The right part may exceed T (carry into the left part) or be negative
// (borrow from it); the final addition settles both, so the result is exact
// for every operand value, not only those near the base.
//
// Interface: unsigned operands a and b, product p (zero-extended), and the
// signed left and right parts for observation. Purely combinational.
//
// The document gives the sutra's function and its worked example; the
// arithmetic steps above, the signed internal width and the floor division
// for a negative cross-sum are this design's choices.
module anurupyena_core
  import anurupyena_pkg::*;
#(
  parameter int unsigned WIDTH_IN  = WIDTH_IN_DEF,
  parameter int unsigned WIDTH_OUT = WIDTH_OUT_DEF,
  parameter int unsigned THEO_BASE = THEO_BASE_DEF,
  parameter int unsigned RATIO_NUM = RATIO_NUM_DEF,
  parameter int unsigned RATIO_DEN = RATIO_DEN_DEF,
  // internal signed width: room for cross_sum * T and for the deviation product
  localparam int unsigned IW = 2 * WIDTH_IN + 2 * $clog2(THEO_BASE * RATIO_NUM + 1) + 4
) (
  input  logic [WIDTH_IN-1:0]  a,
  input  logic [WIDTH_IN-1:0]  b,
  output logic [WIDTH_OUT-1:0] p,
  output logic signed [IW-1:0] left_part,   // product = left_part * THEO_BASE + right_part
  output logic signed [IW-1:0] right_part
);

  localparam int unsigned WORK_BASE = THEO_BASE * RATIO_NUM / RATIO_DEN;
  localparam int unsigned REM_UNIT  = THEO_BASE / RATIO_DEN;

  if (THEO_BASE % RATIO_DEN != 0) begin : g_chk_ratio
    $error("anurupyena_core: THEO_BASE must be divisible by RATIO_DEN");
  end
  if (WIDTH_OUT < 2 * WIDTH_IN) begin : g_chk_width
    $error("anurupyena_core: WIDTH_OUT must hold a full product");
  end

  logic signed [IW-1:0] a_dev, b_dev;      // deviations from the working base
  logic signed [IW-1:0] cross_sum, scaled;
  logic signed [IW-1:0] quo_t, rem_t;      // truncating quotient / remainder
  logic signed [IW-1:0] quo, rem;          // floor quotient / non-negative remainder
  logic signed [IW-1:0] dev_prod;
  logic signed [IW-1:0] product;

  always_comb begin
    a_dev     = signed'(IW'(a)) - signed'(IW'(WORK_BASE));
    b_dev     = signed'(IW'(b)) - signed'(IW'(WORK_BASE));
    cross_sum = signed'(IW'(a)) + b_dev;
    scaled    = cross_sum * signed'(IW'(RATIO_NUM));
    quo_t     = scaled / signed'(IW'(RATIO_DEN));
    rem_t     = scaled % signed'(IW'(RATIO_DEN));
    if (rem_t < 0) begin
      quo = quo_t - signed'(IW'(1));
      rem = rem_t + signed'(IW'(RATIO_DEN));
    end else begin
      quo = quo_t;
      rem = rem_t;
    end
    dev_prod   = a_dev * b_dev;
    left_part  = quo;
    right_part = rem * signed'(IW'(REM_UNIT)) + dev_prod;
    product    = left_part * signed'(IW'(THEO_BASE)) + right_part;
  end

  // the product of two unsigned operands is never negative
  if (WIDTH_OUT >= IW) begin : g_ext
    assign p = WIDTH_OUT'(unsigned'(product));
  end else begin : g_trunc
    assign p = product[WIDTH_OUT-1:0];
  end

endmodule
