// tb_stack3: exhaustive self-checking test of the 3-bit stacker.
// For all 8 inputs the output must be the thermometer code of the number of
// 1s (q[i] set when at least i+1 inputs are 1). Watchdog on a free clock.
module tb_stack3;

  logic       clk = 1'b0;
  logic [2:0] p;
  logic [2:0] q;
  int         checks = 0;
  int         failures = 0;

  always #5 clk = ~clk;

  stack3 dut (.p_i(p), .q_o(q));

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    p = '0;
    for (int v = 0; v < 8; v++) begin
      int ones;
      logic [2:0] exp_q;
      @(negedge clk);
      p = 3'(v);
      ones = (v & 1) + ((v >> 1) & 1) + ((v >> 2) & 1);
      for (int i = 0; i < 3; i++) exp_q[i] = (ones > i);
      @(posedge clk);
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("mismatch: p=%b expected %b got %b", p, exp_q, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
