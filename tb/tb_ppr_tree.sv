// tb_ppr_tree: self-checking test of the 6:3 counter reduction tree.
// The testbench builds the column layout of the partial products itself
// (slot k of column c holds a[i] & b[c-i] for the k-th valid i) and checks
// that the three rows left by the tree add up to a * b. Three trees are
// tested: N = 8 with the stacking counter (exhaustive over all operands),
// N = 4 and N = 16 (random operands). Watchdog on a free clock.
module tb_ppr_tree;

  import stack_mult_pkg::*;

  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  logic [7:0]            a8, b8;
  logic [15:0][7:0]      cols8;
  logic [2:0][15:0]      rows8;
  logic [3:0]            a4, b4;
  logic [7:0][3:0]       cols4;
  logic [2:0][7:0]       rows4;
  logic [15:0]           a16, b16;
  logic [31:0][15:0]     cols16;
  logic [2:0][31:0]      rows16;

  ppr_tree #(.N(8))  dut8  (.cols_i(cols8),  .rows_o(rows8));
  ppr_tree #(.N(4))  dut4  (.cols_i(cols4),  .rows_o(rows4));
  ppr_tree #(.N(16)) dut16 (.cols_i(cols16), .rows_o(rows16));

  // independent column layout of the partial products
  always_comb begin
    cols8 = '0;
    for (int c = 0; c < 16; c++) begin
      int k;
      k = 0;
      for (int i = 0; i < 8; i++)
        if (c - i >= 0 && c - i < 8) begin cols8[c][k] = a8[i] & b8[c-i]; k++; end
    end
    cols4 = '0;
    for (int c = 0; c < 8; c++) begin
      int k;
      k = 0;
      for (int i = 0; i < 4; i++)
        if (c - i >= 0 && c - i < 4) begin cols4[c][k] = a4[i] & b4[c-i]; k++; end
    end
    cols16 = '0;
    for (int c = 0; c < 32; c++) begin
      int k;
      k = 0;
      for (int i = 0; i < 16; i++)
        if (c - i >= 0 && c - i < 16) begin cols16[c][k] = a16[i] & b16[c-i]; k++; end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a8 = '0; b8 = '0; a4 = '0; b4 = '0; a16 = '0; b16 = '0;
    if (num_stages(8) != 4) begin
      failures++;
      $display("expected 4 stages for N = 8, shape gives %0d", num_stages(8));
    end
    checks++;
    for (int v = 0; v < 65536; v++) begin
      @(negedge clk);
      a8  = v[7:0];
      b8  = v[15:8];
      a4  = v[3:0] ^ v[11:8];
      b4  = v[7:4] ^ v[15:12];
      a16 = (v < 4) ? {16{v[0]}} : 16'($urandom);
      b16 = (v < 4) ? {16{v[1]}} : 16'($urandom);
      @(posedge clk);
      checks += 3;
      if (16'(rows8[0] + rows8[1] + rows8[2]) != 16'(a8 * b8)) begin
        failures++;
        $display("N=8: a=%h b=%h rows %h %h %h", a8, b8, rows8[0], rows8[1], rows8[2]);
      end
      if (8'(rows4[0] + rows4[1] + rows4[2]) != 8'(a4 * b4)) begin
        failures++;
        $display("N=4: a=%h b=%h", a4, b4);
      end
      if (32'(rows16[0] + rows16[1] + rows16[2]) != 32'(a16 * b16)) begin
        failures++;
        $display("N=16: a=%h b=%h", a16, b16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
