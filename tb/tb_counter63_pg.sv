// tb_counter63_pg: exhaustive self-checking test of the propagate/generate 6:3 counter.
// Applies all 64 input patterns and compares {c2, c1, s} with the number of
// 1s counted in the testbench. A free-running clock paces the test and a
// watchdog ends it with a failure if it does not finish in time.
module tb_counter63_pg;

  logic       clk = 1'b0;
  logic [5:0] x;
  logic       s, c1, c2;
  int         checks = 0;
  int         failures = 0;

  always #5 clk = ~clk;

  counter63_pg dut (.x_i(x), .s_o(s), .c1_o(c1), .c2_o(c2));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0;
    for (int v = 0; v < 64; v++) begin
      int ones;
      @(negedge clk);
      x = 6'(v);
      ones = 0;
      for (int i = 0; i < 6; i++) ones += (v >> i) & 1;
      @(posedge clk);
      checks++;
      if ({c2, c1, s} != 3'(ones)) begin
        failures++;
        $display("mismatch: x=%b count=%0d got %b", x, ones, {c2, c1, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
