// tb_stack_multiplier: end-to-end test of the multiplier at its default size.
//
// Drives every pair of 8-bit operands (65,536 multiplications) into a
// stack_multiplier with all parameters at their defaults and compares the
// product with a * b computed by the testbench. It also works out, from the
// operands, the inputs of one full first-stage counter (column 7) and of one
// counter whose spare input is tied to 0 (column 4, five live bits) and
// counts how often each input count 0..6 reached them; a count a counter can see but never saw is a failure, so the
// test shows that the stacking counters met every case, including the merge
// vector M being set (four or more 1s) and all six inputs set.
// Watchdog on a free clock.
module tb_stack_multiplier;

  logic        clk = 1'b0;
  logic [7:0]  a, b;
  logic [15:0] p;
  int          checks = 0;
  int          failures = 0;
  int          seen_full [7];
  int          seen_pad  [7];

  always #5 clk = ~clk;

  stack_multiplier dut (.a_i(a), .b_i(b), .p_o(p));

  function automatic int ones6(input logic [5:0] v);
    int n = 0;
    for (int i = 0; i < 6; i++) n += v[i];
    return n;
  endfunction

  // The first six partial products of column c, a[i] & b[c-i] for i = 0..5
  // (fewer where the column is shorter): the inputs of that column's first
  // counter in the first reduction stage.
  function automatic logic [5:0] col_bits(input logic [7:0] x, input logic [7:0] y, input int c);
    logic [5:0] v = '0;
    for (int i = 0; i < 6; i++)
      if (i <= c && c - i < 8) v[i] = x[i] & y[c-i];
    return v;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 7; i++) begin
      seen_full[i] = 0;
      seen_pad[i]  = 0;
    end
    a = '0;
    b = '0;
    for (int v = 0; v < 65536; v++) begin
      @(negedge clk);
      a = v[7:0];
      b = v[15:8];
      @(posedge clk);
      checks++;
      if (p != 16'(a) * 16'(b)) begin
        failures++;
        if (failures < 10) $display("mismatch: %0d * %0d expected %0d got %0d", a, b, 16'(a) * 16'(b), p);
      end
      seen_full[ones6(col_bits(a, b, 7))]++;
      seen_pad[ones6(col_bits(a, b, 4))]++;
    end
    for (int i = 0; i < 7; i++) begin
      $display("count %0d: full counter %0d times, padded counter %0d times", i, seen_full[i], seen_pad[i]);
      checks++;
      if (seen_full[i] == 0) begin
        failures++;
        $display("full counter never saw %0d ones", i);
      end
      if (i <= 5) begin
        checks++;
        if (seen_pad[i] == 0) begin
          failures++;
          $display("padded counter never saw %0d ones", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
