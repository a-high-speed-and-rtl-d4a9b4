// pp_gen: partial-product generator of an unsigned N x N multiplier.
//
// Forms the N*N partial-product bits a[i] & b[j] and files each one under its
// column c = i + j, the form the column-compression tree works on. Column c
// holds pp_height(N, c) bits (1, 2, ..., N, ..., 2, 1, then 0 for the top
// column), packed from slot 0 upwards in order of increasing i; the slots
// above a column's height are 0. The source design only states that the
// partial products are generated and then reduced; the plain AND array
// (unsigned operands, no Booth recoding) and this column layout are this
// design's choice.
//
// Interface: a_i, b_i the operands; cols_o[c][k] slot k of column c.
// Timing: purely combinational, one AND gate.
module pp_gen #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]             a_i,
  input  logic [N-1:0]             b_i,
  output logic [2*N-1:0][N-1:0]    cols_o
);

  always_comb begin
    cols_o = '0;
    for (int c = 0; c < 2 * N - 1; c++) begin
      for (int i = 0; i < N; i++) begin
        if (c - i >= 0 && c - i < N) begin
          // slot index: i minus the lowest i that reaches column c
          cols_o[c][i - ((c > N - 1) ? (c - N + 1) : 0)] = a_i[i] & b_i[c-i];
        end
      end
    end
  end

endmodule
