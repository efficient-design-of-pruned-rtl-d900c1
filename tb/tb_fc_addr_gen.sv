// tb_fc_addr_gen: self-checking test of fc_addr_gen for groups of 1, 2, 4 and
// 8 indexes (block sizes 8, 4, 2, 1). Random relative indexes are applied; the
// expected addresses are the running sum of all indexes since `init`, the
// first added to the base, as in the document's index format.
module tb_fc_addr_gen;
  import cnn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic init, step;
  logic [11:0] base;
  logic [31:0] idx;
  logic [11:0] a1 [1], a2 [2], a4 [4], a8 [8];

  fc_addr_gen #(.G(1), .AW(12)) d1 (.clk, .rst_n, .init, .base, .step, .idx(idx[3:0]),  .addr(a1));
  fc_addr_gen #(.G(2), .AW(12)) d2 (.clk, .rst_n, .init, .base, .step, .idx(idx[7:0]),  .addr(a2));
  fc_addr_gen #(.G(4), .AW(12)) d4 (.clk, .rst_n, .init, .base, .step, .idx(idx[15:0]), .addr(a4));
  fc_addr_gen #(.G(8), .AW(12)) d8 (.clk, .rst_n, .init, .base, .step, .idx(idx[31:0]), .addr(a8));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int g, logic [11:0] got, int exp);
    checks++;
    if (got != 12'(exp)) begin failures++; $display("FAIL: G=%0d got %0d exp %0d", g, got, exp); end
  endtask

  initial begin
    int r1, r2, r4, r8, s;
    init = 0; step = 0; base = 0; idx = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 20; run++) begin
      @(negedge clk); init = 1; base = 12'($urandom_range(0, 255)); step = 0;
      r1 = int'(base); r2 = r1; r4 = r1; r8 = r1;
      @(negedge clk); init = 0;
      for (int t = 0; t < 40; t++) begin
        idx = $urandom;
        step = ($urandom_range(0, 4) != 0);
        #1;
        s = r1; s += int'(idx[3:0]); chk(1, a1[0], s);
        s = r2; for (int g = 0; g < 2; g++) begin s += int'(idx[4*g +: 4]); chk(2, a2[g], s); end
        s = r4; for (int g = 0; g < 4; g++) begin s += int'(idx[4*g +: 4]); chk(4, a4[g], s); end
        s = r8; for (int g = 0; g < 8; g++) begin s += int'(idx[4*g +: 4]); chk(8, a8[g], s); end
        if (step) begin
          r1 += int'(idx[3:0]);
          for (int g = 0; g < 2; g++) r2 += int'(idx[4*g +: 4]);
          for (int g = 0; g < 4; g++) r4 += int'(idx[4*g +: 4]);
          for (int g = 0; g < 8; g++) r8 += int'(idx[4*g +: 4]);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
