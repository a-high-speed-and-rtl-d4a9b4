// counter63_pg: 6:3 counter using propagate/generate signals.
//
// The six inputs are taken in pairs (A,B), (C,D), (E,F). Each pair gives a
// propagate P = A xor B (exactly one of the two set) and a generate G = A.B
// (both set), so the count is 2*(G0+G1+G2) + (P0+P1+P2). From these:
//   s  = P0 ^ P1 ^ P2
//   c1 = maj(P0,P1,P2) ^ G0 ^ G1 ^ G2
//   c2 = maj(G0,G1,G2) + P0.P1.G2 + P0.P2.G1 + P1.P2.G0
// The P/G split and the c2 expression follow the document; the operators of
// the c1 expression are read as shown here (majority of P xor parity of G),
// which is the only reading that gives a correct count.
//
// Interface: x_i[5:0] (x_i[0] is A), s_o weight 1, c1_o weight 2, c2_o
// weight 4. Timing: purely combinational.
module counter63_pg (
  input  logic [5:0] x_i,
  output logic       s_o,
  output logic       c1_o,
  output logic       c2_o
);

  logic [2:0] p;
  logic [2:0] g;

  always_comb begin
    for (int i = 0; i < 3; i++) begin
      p[i] = x_i[2*i] ^ x_i[2*i+1];
      g[i] = x_i[2*i] & x_i[2*i+1];
    end
    s_o  = p[0] ^ p[1] ^ p[2];
    c1_o = ((p[0] & p[1]) | (p[0] & p[2]) | (p[1] & p[2])) ^ g[0] ^ g[1] ^ g[2];
    c2_o = (g[0] & g[1]) | (g[0] & g[2]) | (g[1] & g[2])
         | (p[0] & p[1] & g[2]) | (p[0] & p[2] & g[1]) | (p[1] & p[2] & g[0]);
  end

endmodule
