// tb_pe_core: self-checking test of pe_core.
// Random dot products of random lengths are fed one word pair per cycle; the
// expected sum is computed lane by lane in the testbench. Checks the result,
// that res_valid comes exactly one cycle after `last`, the running sum with
// `clr`, and the extreme operand values.
module tb_pe_core;
  import cnn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clr, en, first, last;
  word_t act, wgt;
  acc_t acc, result;
  logic res_valid;

  pe_core dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic acc_t dot(word_t a, word_t w);
    acc_t s = 0;
    for (int i = 0; i < 8; i++) s += $signed(a[8*i +: 8]) * $signed(w[8*i +: 8]);
    return s;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    acc_t exp;
    int len;
    clr = 0; en = 0; first = 0; last = 0; act = '0; wgt = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      len = 1 + $urandom_range(0, 20);
      exp = 0;
      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        en = 1; first = (k == 0); last = (k == len - 1);
        if (t == 0) begin
          act = {8{8'h80}}; wgt = {8{8'h80}};   // -128 * -128 in every lane
        end else begin
          act = {$urandom, $urandom}; wgt = {$urandom, $urandom};
        end
        exp += dot(act, wgt);
        // a bubble inside the dot product must not disturb it
        if (k != len - 1 && $urandom_range(0, 3) == 0) begin
          @(negedge clk); en = 0;
        end
      end
      @(negedge clk);
      en = 0; first = 0; last = 0;
      check(res_valid == 1, "res_valid one cycle after last");
      check(result == exp, $sformatf("dot product %0d: got %0d exp %0d", t, result, exp));
      @(negedge clk);
      check(res_valid == 0, "res_valid is a single pulse");
    end
    // clr and running sum without first
    @(negedge clk); clr = 1;
    @(negedge clk); clr = 0;
    check(acc == 0, "clr zeroes the accumulator");
    exp = 0;
    for (int k = 0; k < 5; k++) begin
      @(negedge clk); en = 1; act = {$urandom, $urandom}; wgt = {$urandom, $urandom};
      exp += dot(act, wgt);
    end
    @(negedge clk); en = 0;
    check(acc == exp, "running sum after clr");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
