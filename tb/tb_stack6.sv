// tb_stack6: exhaustive self-checking test of the 6-bit stacker.
// For all 64 inputs it checks that the 6-bit stack is the thermometer code of
// the number of 1s, that Y and Z are the thermometer codes of the two input
// halves, and that the merge vector M is non-zero exactly when four or more
// inputs are 1 and holds (count - 3) ones then. Watchdog on a free clock.
module tb_stack6;

  logic       clk = 1'b0;
  logic [5:0] x;
  logic [2:0] y, z, m;
  logic [5:0] st;
  int         checks = 0;
  int         failures = 0;

  always #5 clk = ~clk;

  stack6 dut (.x_i(x), .y_o(y), .z_o(z), .m_o(m), .stack_o(st));

  function automatic int ones_of(input int v, input int nbits);
    int n = 0;
    for (int i = 0; i < nbits; i++) n += (v >> i) & 1;
    return n;
  endfunction

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("mismatch %s: x=%b expected %0h got %0h", what, x, exp, got);
    end
  endtask

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
      int n, ny, nz;
      @(negedge clk);
      x  = 6'(v);
      n  = ones_of(v, 6);
      ny = ones_of(v & 7, 3);
      nz = ones_of(v >> 3, 3);
      @(posedge clk);
      check("stack", int'(st), (1 << n) - 1);
      check("y", int'(y), (1 << ny) - 1);
      check("z", int'(z), (1 << nz) - 1);
      check("m", ones_of(int'(m), 3), (n > 3) ? n - 3 : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
