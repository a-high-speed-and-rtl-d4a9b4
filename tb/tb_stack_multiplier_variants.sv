// tb_stack_multiplier_variants: the multiplier at other sizes and with the
// other two 6:3 counter circuits.
//
// Four instances run side by side: N = 8 with the propagate/generate counter
// and with the full-adder counter (both exhaustive), N = 4 with the stacking
// counter (exhaustive) and N = 16 with the stacking counter (corner cases,
// then random operands). Every product is compared with a * b computed by
// the testbench. Watchdog on a free clock.
module tb_stack_multiplier_variants;

  import stack_mult_pkg::*;

  logic        clk = 1'b0;
  logic [7:0]  a8, b8;
  logic [15:0] p_pg, p_fa;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  int          checks = 0;
  int          failures = 0;

  always #5 clk = ~clk;

  stack_multiplier #(.N(8),  .KIND(CNT_PG))    dut_pg  (.a_i(a8),  .b_i(b8),  .p_o(p_pg));
  stack_multiplier #(.N(8),  .KIND(CNT_FA))    dut_fa  (.a_i(a8),  .b_i(b8),  .p_o(p_fa));
  stack_multiplier #(.N(4),  .KIND(CNT_STACK)) dut_4   (.a_i(a4),  .b_i(b4),  .p_o(p4));
  stack_multiplier #(.N(16), .KIND(CNT_STACK)) dut_16  (.a_i(a16), .b_i(b16), .p_o(p16));

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("mismatch %s: expected %0d got %0d", what, exp, got);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a8 = '0; b8 = '0; a4 = '0; b4 = '0; a16 = '0; b16 = '0;
    for (int v = 0; v < 65536; v++) begin
      @(negedge clk);
      a8  = v[7:0];
      b8  = v[15:8];
      a4  = v[3:0] ^ v[11:8];
      b4  = v[7:4] ^ v[15:12];
      case (v)
        0: begin a16 = '0; b16 = '0; end
        1: begin a16 = '1; b16 = '1; end
        2: begin a16 = '1; b16 = 16'd1; end
        3: begin a16 = 16'h8000; b16 = 16'h8000; end
        default: begin a16 = 16'($urandom); b16 = 16'($urandom); end
      endcase
      @(posedge clk);
      check("N=8 pg", p_pg, longint'(a8) * longint'(b8));
      check("N=8 fa", p_fa, longint'(a8) * longint'(b8));
      check("N=4", p4, longint'(a4) * longint'(b4));
      check("N=16", p16, longint'(a16) * longint'(b16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
