// counter63_stack: 6:3 counter based on bit stacking (the main counter).
//
// Counts the 1s among six equally weighted bits and returns the count as a
// 3-bit binary number {c2_o, c1_o, s_o}. The six bits go through the first
// level of a stack6: two 3-bit stacks Y (bits 0..2) and Z (bits 3..5) and the
// merge vector M, which is non-zero exactly when four or more inputs are 1.
// The binary count is read off these without finishing the stack:
//   s  : Y and Z each hold an even count when Y1' + Y2 Y3' (resp. Z) is true,
//        and S is the XOR of the two even-parity flags.
//   c1 : set for counts 2, 3 and 6: (Y2 + Z2 + Y1 Z1) with M all zero, or
//        Y3 Z3 (all six set).
//   c2 : set for counts of four or more: M1 + M2 + M3.
// These are the document's equations (Y1 is y[0]); the full 6-bit stack of
// the stack6 is not needed for the count and is left unconnected.
//
// Interface: x_i[5:0] six bits of one column, s_o weight 1, c1_o weight 2,
// c2_o weight 4. Timing: purely combinational.
module counter63_stack (
  input  logic [5:0] x_i,
  output logic       s_o,
  output logic       c1_o,
  output logic       c2_o
);

  logic [2:0] y;
  logic [2:0] z;
  logic [2:0] m;
  logic       y_even;
  logic       z_even;
  logic       any_m;

  stack6 u_stack6 (
    .x_i    (x_i),
    .y_o    (y),
    .z_o    (z),
    .m_o    (m),
    .stack_o()
  );

  always_comb begin
    y_even = ~y[0] | (y[1] & ~y[2]);
    z_even = ~z[0] | (z[1] & ~z[2]);
    any_m  = m[0] | m[1] | m[2];
    s_o    = y_even ^ z_even;
    c1_o   = ((y[1] | z[1] | (y[0] & z[0])) & ~any_m) | (y[2] & z[2]);
    c2_o   = any_m;
  end

endmodule
