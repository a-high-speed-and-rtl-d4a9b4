// stack_multiplier: unsigned N x N multiplier with 6:3 stacking counters.
//
// p_o = a_i * b_i. The partial products from pp_gen are reduced column by
// column by ppr_tree, whose 6:3 counters count the 1s in groups of six bits;
// with the default KIND each counter is the bit-stacking counter, which
// stacks the bits into thermometer codes and converts those to a binary count
// without an XOR on its carry paths. When every column holds at most three
// bits, final_adder adds the three rows into the 2N-bit product.
//
// Parameters: N operand width (8 by default, this design's choice: the
// document gives no width), KIND the counter circuit (CNT_STACK by default;
// CNT_PG and CNT_FA select the two other 6:3 counter circuits).
// Interface: a_i, b_i unsigned operands, p_o the full product.
// Timing: purely combinational, no clock; the product is valid one
// propagation delay after the operands.
module stack_multiplier
  import stack_mult_pkg::*;
#(
  parameter int unsigned   N    = 8,
  parameter counter_kind_e KIND = CNT_STACK
) (
  input  logic [N-1:0]   a_i,
  input  logic [N-1:0]   b_i,
  output logic [2*N-1:0] p_o
);

  logic [2*N-1:0][N-1:0] cols;
  logic [2:0][2*N-1:0]   rows;

  pp_gen #(.N(N)) u_pp_gen (
    .a_i   (a_i),
    .b_i   (b_i),
    .cols_o(cols)
  );

  ppr_tree #(.N(N), .KIND(KIND)) u_tree (
    .cols_i(cols),
    .rows_o(rows)
  );

  final_adder #(.W(2 * N)) u_final (
    .rows_i(rows),
    .sum_o (p_o)
  );

endmodule
