// anurupyena: top level of the Anurupyena Shunyamanyat Vedic multiplier.
//
// Three inputs and one output, as on the top-level symbol: operands A and B
// (6 bits), a clock, and the product S (15 bits). The product is computed
// by anurupyena_core around the working base 50 and captured in a register
// on the rising clock edge, so S shows A * B one clock after A and B are
// presented (latency 1, one new product per clock).
//
// The port names and widths follow the document's symbol and the 46 x 43 =
// 1978 example; the single output register and the absence of a reset are
// this design's choices: the document shows a clock input but gives no
// latency and no reset. S holds an arbitrary value until the first edge.
module anurupyena
  import anurupyena_pkg::*;
#(
  parameter int unsigned WIDTH_IN  = WIDTH_IN_DEF,
  parameter int unsigned WIDTH_OUT = WIDTH_OUT_DEF,
  parameter int unsigned THEO_BASE = THEO_BASE_DEF,
  parameter int unsigned RATIO_NUM = RATIO_NUM_DEF,
  parameter int unsigned RATIO_DEN = RATIO_DEN_DEF
) (
  input  logic [WIDTH_IN-1:0]  A,
  input  logic [WIDTH_IN-1:0]  B,
  input  logic                 clock,
  output logic [WIDTH_OUT-1:0] S
);

  logic [WIDTH_OUT-1:0] product;

  anurupyena_core #(
    .WIDTH_IN (WIDTH_IN),
    .WIDTH_OUT(WIDTH_OUT),
    .THEO_BASE(THEO_BASE),
    .RATIO_NUM(RATIO_NUM),
    .RATIO_DEN(RATIO_DEN)
  ) u_core (
    .a         (A),
    .b         (B),
    .p         (product),
    .left_part (),
    .right_part()
  );

  always_ff @(posedge clock) S <= product;

endmodule
