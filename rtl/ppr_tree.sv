// ppr_tree: partial-product reduction tree of 6:3 counters.
//
// Takes the columns of partial products of an N x N multiplication and
// reduces them, stage by stage, with 6:3 counters until no column holds more
// than three bits. In every stage each column of height h > 3 gets h/6
// counters on full groups of six bits and, when three or more bits remain,
// one more counter with its spare inputs tied to 0; one or two leftover bits
// and all columns of height three or less pass on unchanged. A counter's sum
// stays in its column, C1 moves one column up and C2 two columns up, so the
// weighted sum of all bits is unchanged. The shape of every stage is fixed at
// elaboration by the functions of stack_mult_pkg; for N = 8 there are four
// stages. Outputs of weight 2^(2N) and above are always 0 for a product of
// two N-bit numbers and are dropped.
//
// That the multiplier reduces its partial products with 6:3 counters is the
// document's; the stage rule and the three-row stopping point are this
// design's choices.
//
// Interface: cols_i[c][k] slot k of column c, laid out as pp_gen produces it;
// rows_o[r][c] bit c of remaining row r (r = 0..2), to be added by the final
// adder. KIND selects the counter circuit. Timing: purely combinational.
module ppr_tree
  import stack_mult_pkg::*;
#(
  parameter int unsigned   N    = 8,
  parameter counter_kind_e KIND = CNT_STACK
) (
  input  logic [2*N-1:0][N-1:0] cols_i,
  output logic [2:0][2*N-1:0]   rows_o
);

  localparam int unsigned W  = 2 * N;
  localparam int unsigned NS = num_stages(N);
  localparam int unsigned HT = tree_height(N);

  // m[s][c][k]: slot k of column c after stage s (s = 0: partial products)
  logic [NS:0][W-1:0][HT-1:0] m;

  for (genvar c = 0; c < W; c++) begin : g_in
    for (genvar k = 0; k < HT; k++) begin : g_slot
      if (k < pp_height(N, c)) begin : g_bit
        assign m[0][c][k] = cols_i[c][k];
      end else begin : g_zero
        assign m[0][c][k] = 1'b0;
      end
    end
  end

  for (genvar s = 0; s < NS; s++) begin : g_stage
    for (genvar c = 0; c < W; c++) begin : g_col
      localparam int unsigned H    = col_height(N, s, c);
      localparam int unsigned K    = counters_for(H);
      localparam int unsigned P    = pass_for(H);
      localparam int unsigned USED = H - P;
      localparam int unsigned HN   = col_height(N, s + 1, c);
      // heights of columns c+1 and c+2 in this stage, to place the carries
      localparam int unsigned H1   = (c + 1 < W) ? col_height(N, s, c + 1) : 0;
      localparam int unsigned H2   = (c + 2 < W) ? col_height(N, s, c + 2) : 0;
      localparam int unsigned C1AT = pass_for(H1) + counters_for(H1);
      // a column of the next stage holds, in order: its passed bits, the
      // sums of its own counters, C1 of the column below, C2 of the column
      // two below
      localparam int unsigned C2AT = pass_for(H2) + counters_for(H2) + counters_for(H1);

      for (genvar k = 0; k < P; k++) begin : g_pass
        assign m[s+1][c][k] = m[s][c][USED+k];
      end

      for (genvar k = 0; k < K; k++) begin : g_cnt
        logic [5:0] x;
        logic       cs, cc1, cc2;
        for (genvar j = 0; j < 6; j++) begin : g_x
          if (6 * k + j < H) begin : g_bit
            assign x[j] = m[s][c][6*k+j];
          end else begin : g_zero
            assign x[j] = 1'b0;
          end
        end
        counter63 #(.KIND(KIND)) u_cnt (.x_i(x), .s_o(cs), .c1_o(cc1), .c2_o(cc2));
        assign m[s+1][c][P+k] = cs;
        if (c + 1 < W) begin : g_c1
          assign m[s+1][c+1][C1AT+k] = cc1;
        end
        if (c + 2 < W) begin : g_c2
          assign m[s+1][c+2][C2AT+k] = cc2;
        end
      end

      for (genvar k = HN; k < HT; k++) begin : g_zero
        assign m[s+1][c][k] = 1'b0;
      end
    end
  end

  always_comb begin
    rows_o = '0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < W; c++)
        if (r < HT) rows_o[r][c] = m[NS][c][r];
  end

endmodule
