// anurupyena_pkg: sizes and base constants shared by the Anurupyena
// Shunyamanyat multiplier and its testbenches.
//
// The 6-bit operands and the 15-bit product are the widths of the top-level
// symbol A(5:0), B(5:0), S(14:0). The working base 50 is the base of the
// worked example 46 x 43 = 1978, written the Vedic way as the power-of-ten
// theoretical base 100 scaled by the ratio 1/2. Splitting the working base
// into a power of ten and a ratio is this design's way of expressing the
// "proportionality" of the sutra; other bases the text mentions (60, 200,
// 500) are reached by changing the ratio.
package anurupyena_pkg;

  localparam int unsigned WIDTH_IN_DEF  = 6;    // operand width, A(5:0) / B(5:0)
  localparam int unsigned WIDTH_OUT_DEF = 15;   // product width, S(14:0)
  localparam int unsigned THEO_BASE_DEF = 100;  // theoretical base, a power of ten
  localparam int unsigned RATIO_NUM_DEF = 1;    // working base = THEO_BASE * NUM / DEN
  localparam int unsigned RATIO_DEN_DEF = 2;    // 100 * 1 / 2 = 50

endpackage
