// stack3: 3-bit bit stacker.
//
// Gathers the logic 1s among three input bits at the left of the output, so
// that the output is a thermometer code of the number of 1s: q[0] is set when
// at least one input is 1 (OR), q[1] when at least two are (majority), q[2]
// when all three are (AND). The number of 1s is preserved. The three
// equations are the document's; the vector layout (q[0] is the leftmost,
// first-filled position) is this design's naming.
//
// Interface: p_i[2:0] the three bits in any order, q_o[2:0] the stack.
// Timing: purely combinational, one gate level.
module stack3 (
  input  logic [2:0] p_i,
  output logic [2:0] q_o
);

  always_comb begin
    q_o[0] = p_i[0] | p_i[1] | p_i[2];
    q_o[1] = (p_i[0] & p_i[1]) | (p_i[0] & p_i[2]) | (p_i[1] & p_i[2]);
    q_o[2] = p_i[0] & p_i[1] & p_i[2];
  end

endmodule
