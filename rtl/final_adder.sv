// final_adder: adds the three rows left by the reduction tree.
//
// One row of full adders turns the three rows into a sum row and a carry row
// (carry-save), and a W-bit carry-propagate adder adds those two. The result
// is taken modulo 2^W, which is exact for the product of two W/2-bit numbers.
// The document names the adders only; this split is this design's choice.
//
// Interface: rows_i[r] row r (r = 0..2), sum_o their sum. Purely
// combinational.
module final_adder #(
  parameter int unsigned W = 16
) (
  input  logic [2:0][W-1:0] rows_i,
  output logic [W-1:0]      sum_o
);

  logic [W-1:0] srow;
  logic [W-1:0] crow;

  for (genvar c = 0; c < W; c++) begin : g_csa
    full_adder u_fa (
      .a_i (rows_i[0][c]),
      .b_i (rows_i[1][c]),
      .c_i (rows_i[2][c]),
      .s_o (srow[c]),
      .co_o(crow[c])
    );
  end

  // crow[W-1] has weight 2^W and falls outside the result
  assign sum_o = srow + {crow[W-2:0], 1'b0};

endmodule
