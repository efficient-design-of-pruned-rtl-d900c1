// tb_fc_blocksizes: fc_module built for the other static block sizes of the
// document, 4, 2 and 1 (one core per line as in its ZYNQ7020 tables, plus two
// cores with block size 4 and a batch of three). Each needs more batch-memory
// read ports per core; see fc_module_check for what is compared.
module tb_fc_blocksizes;
  bit f [4];
  int c [4], e [4], u [4];
  longint kw [4], dw [4], cc [4];
  fc_module_check #(.BS(4), .CORES(1), .LINES(2)) t0 (.finished(f[0]), .checks(c[0]), .failures(e[0]), .unbalanced_passes(u[0]), .kept_words(kw[0]), .dense_words(dw[0]), .compute_cycles(cc[0]));
  fc_module_check #(.BS(2), .CORES(1), .LINES(2)) t1 (.finished(f[1]), .checks(c[1]), .failures(e[1]), .unbalanced_passes(u[1]), .kept_words(kw[1]), .dense_words(dw[1]), .compute_cycles(cc[1]));
  fc_module_check #(.BS(1), .CORES(1), .LINES(2)) t2 (.finished(f[2]), .checks(c[2]), .failures(e[2]), .unbalanced_passes(u[2]), .kept_words(kw[2]), .dense_words(dw[2]), .compute_cycles(cc[2]));
  fc_module_check #(.BS(4), .CORES(2), .LINES(3)) t3 (.finished(f[3]), .checks(c[3]), .failures(e[3]), .unbalanced_passes(u[3]), .kept_words(kw[3]), .dense_words(dw[3]), .compute_cycles(cc[3]));

  initial begin
    int checks, failures;
    fork
      wait (f[0] && f[1] && f[2] && f[3]);
      #4000000;
    join_any
    checks = 0; failures = 0;
    for (int i = 0; i < 4; i++) begin checks += c[i]; failures += e[i]; end
    checks++;
    if (!(f[0] && f[1] && f[2] && f[3])) begin failures++; $display("FAIL: watchdog"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
