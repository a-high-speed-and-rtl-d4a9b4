// counter63: 6:3 counter with a selectable circuit.
//
// Counts the 1s among six equally weighted bits, {c2_o, c1_o, s_o} = count.
// KIND picks the circuit: CNT_STACK (bit stacking, the default and the
// design's main counter), CNT_PG (propagate/generate) or CNT_FA (full
// adders). All three give the same function; only their gates differ.
// Timing: purely combinational.
module counter63
  import stack_mult_pkg::*;
#(
  parameter counter_kind_e KIND = CNT_STACK
) (
  input  logic [5:0] x_i,
  output logic       s_o,
  output logic       c1_o,
  output logic       c2_o
);

  if (KIND == CNT_PG) begin : g_pg
    counter63_pg u_cnt (.x_i, .s_o, .c1_o, .c2_o);
  end else if (KIND == CNT_FA) begin : g_fa
    counter63_fa u_cnt (.x_i, .s_o, .c1_o, .c2_o);
  end else begin : g_stack
    counter63_stack u_cnt (.x_i, .s_o, .c1_o, .c2_o);
  end

endmodule
