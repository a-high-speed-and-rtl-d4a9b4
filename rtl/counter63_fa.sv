// counter63_fa: 6:3 counter from full and half adders.
//
// Bits 0..2 go to full adder FA1 and bits 3..5 to FA2. The two sum outputs
// meet in half adder HA1, whose sum is the count's S bit. The carries of FA1,
// FA2 and HA1 (all of weight 2) go to FA3, whose sum is C1 and whose carry is
// C2. This is the arrangement the document gives as the basic principle of
// the 6:3 counter.
//
// Interface: x_i[5:0] six equally weighted bits, s_o weight 1, c1_o weight 2,
// c2_o weight 4. Timing: purely combinational, three adder levels.
module counter63_fa (
  input  logic [5:0] x_i,
  output logic       s_o,
  output logic       c1_o,
  output logic       c2_o
);

  logic s1, s2, k1, k2, kh;

  full_adder u_fa1 (.a_i(x_i[0]), .b_i(x_i[1]), .c_i(x_i[2]), .s_o(s1), .co_o(k1));
  full_adder u_fa2 (.a_i(x_i[3]), .b_i(x_i[4]), .c_i(x_i[5]), .s_o(s2), .co_o(k2));
  half_adder u_ha1 (.a_i(s1), .b_i(s2), .s_o(s_o), .co_o(kh));
  full_adder u_fa3 (.a_i(k1), .b_i(k2), .c_i(kh), .s_o(c1_o), .co_o(c2_o));

endmodule
