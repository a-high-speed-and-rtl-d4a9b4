// full_adder: one-bit full adder (3:2 counter).
// Interface: a_i, b_i, c_i three equally weighted bits; s_o their sum bit,
// co_o the carry (weight 2). Purely combinational.
module full_adder (
  input  logic a_i,
  input  logic b_i,
  input  logic c_i,
  output logic s_o,
  output logic co_o
);

  assign s_o  = a_i ^ b_i ^ c_i;
  assign co_o = (a_i & b_i) | (a_i & c_i) | (b_i & c_i);

endmodule
