// tb_final_adder: self-checking test of the three-row final adder (W = 16).
// Random and corner rows; the output must equal the sum of the three rows
// modulo 2^W. Watchdog on a free clock.
module tb_final_adder;

  localparam int unsigned W = 16;

  logic              clk = 1'b0;
  logic [2:0][W-1:0] rows;
  logic [W-1:0]      sum;
  int                checks = 0;
  int                failures = 0;

  always #5 clk = ~clk;

  final_adder #(.W(W)) dut (.rows_i(rows), .sum_o(sum));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rows = '0;
    for (int t = 0; t < 2000; t++) begin
      logic [W-1:0] exp_sum;
      @(negedge clk);
      case (t)
        0: rows = '0;
        1: rows = '1;
        2: rows = {{W{1'b0}}, {W{1'b1}}, 16'h0001};
        default: for (int r = 0; r < 3; r++) rows[r] = W'($urandom);
      endcase
      exp_sum = W'(32'(rows[0]) + 32'(rows[1]) + 32'(rows[2]));
      @(posedge clk);
      checks++;
      if (sum != exp_sum) begin
        failures++;
        $display("mismatch: rows %h %h %h expected %h got %h", rows[0], rows[1], rows[2], exp_sum, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
