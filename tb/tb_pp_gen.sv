// tb_pp_gen: self-checking test of the partial-product generator (N = 8).
// For corner and random operands it checks, column by column, that the
// number of 1s in column c equals the number of pairs (i, j) with i + j = c
// and a[i] & b[j], that no slot above the column's height is set, and that
// the weighted sum of all columns is a * b. Watchdog on a free clock.
module tb_pp_gen;

  localparam int unsigned N = 8;

  logic                  clk = 1'b0;
  logic [N-1:0]          a, b;
  logic [2*N-1:0][N-1:0] cols;
  int                    checks = 0;
  int                    failures = 0;

  always #5 clk = ~clk;

  pp_gen #(.N(N)) dut (.a_i(a), .b_i(b), .cols_o(cols));

  task automatic check_now();
    longint total = 0;
    for (int c = 0; c < 2 * N; c++) begin
      int exp_ones = 0, got_ones = 0, height;
      height = (c > 2 * N - 2) ? 0 : ((c < 2 * N - 2 - c) ? c : 2 * N - 2 - c) + 1;
      for (int i = 0; i < N; i++)
        if (c - i >= 0 && c - i < N) exp_ones += a[i] & b[c-i];
      for (int k = 0; k < N; k++) begin
        got_ones += cols[c][k];
        if (k >= height && cols[c][k]) begin
          failures++;
          $display("slot above height set: column %0d slot %0d", c, k);
        end
      end
      total += longint'(got_ones) << c;
      checks++;
      if (got_ones != exp_ones) begin
        failures++;
        $display("column %0d: a=%h b=%h expected %0d ones got %0d", c, a, b, exp_ones, got_ones);
      end
    end
    checks++;
    if (total != longint'(a) * longint'(b)) begin
      failures++;
      $display("weighted sum: a=%h b=%h got %0d", a, b, total);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0;
    b = '0;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      case (t)
        0: begin a = '0; b = '0; end
        1: begin a = '1; b = '1; end
        2: begin a = '1; b = '0; end
        3: begin a = 8'h01; b = '1; end
        default: begin a = N'($urandom); b = N'($urandom); end
      endcase
      @(posedge clk);
      check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
