// half_adder: one-bit half adder (2:2 counter).
// Interface: a_i, b_i two equally weighted bits; s_o their sum bit, co_o the
// carry (weight 2). Purely combinational.
module half_adder (
  input  logic a_i,
  input  logic b_i,
  output logic s_o,
  output logic co_o
);

  assign s_o  = a_i ^ b_i;
  assign co_o = a_i & b_i;

endmodule
