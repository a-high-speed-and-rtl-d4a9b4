// stack6: 6-bit bit stacker built from 3-bit stackers.
//
// The six inputs are split into X1..X3 and X4..X6 and each half is stacked by
// a stack3 into Y and Z (thermometer codes, index 0 filled first). Reading Y
// backwards and Z forwards gives a run of 1s bounded by 0s; pairing position
// i of that run (Y[2-i] with Z[i]) the OR of each pair forms vector L and the
// AND forms vector M. L fills completely before M receives any 1, so M is all
// zero unless at least four inputs are 1, and L and M together still hold as
// many 1s as the input. A second pair of stack3s stacks L and M, and the
// concatenation {stack(M), stack(L)} is the 6-bit stack.
//
// Interface: x_i[5:0] (x_i[0] is X1), stack_o[5:0] thermometer code of the
// number of 1s (stack_o[i] set when at least i+1 inputs are 1). The first
// level stacks Y, Z and the merge vector M are brought out because the
// stacking 6:3 counter converts them to binary directly.
// Timing: purely combinational, four gate levels to stack_o.
// The structure and the L/M equations follow the document; port names are
// this design's own.
module stack6 (
  input  logic [5:0] x_i,
  output logic [2:0] y_o,
  output logic [2:0] z_o,
  output logic [2:0] m_o,
  output logic [5:0] stack_o
);

  logic [2:0] l;
  logic [2:0] lstack;
  logic [2:0] mstack;

  stack3 u_stack_y (.p_i(x_i[2:0]), .q_o(y_o));
  stack3 u_stack_z (.p_i(x_i[5:3]), .q_o(z_o));

  // L1 = Y3 + Z1, L2 = Y2 + Z2, L3 = Y1 + Z3; M uses AND on the same pairs.
  always_comb begin
    for (int i = 0; i < 3; i++) begin
      l[i]   = y_o[2-i] | z_o[i];
      m_o[i] = y_o[2-i] & z_o[i];
    end
  end

  stack3 u_stack_l (.p_i(l),   .q_o(lstack));
  stack3 u_stack_m (.p_i(m_o), .q_o(mstack));

  assign stack_o = {mstack, lstack};

endmodule
