// tb_fc_module: self-checking test of fc_module in its default shape (block
// size 8, one core per line, batch of two) and with two kernels per line
// (two dual-port read ports per batch memory). See fc_module_check.
module tb_fc_module;
  bit f0, f1;
  int c0, c1, e0, e1, u0, u1;
  longint kw [2], dw [2], cc [2];
  fc_module_check #(.BS(8), .CORES(1), .LINES(2)) t0 (.finished(f0), .checks(c0), .failures(e0), .unbalanced_passes(u0), .kept_words(kw[0]), .dense_words(dw[0]), .compute_cycles(cc[0]));
  fc_module_check #(.BS(8), .CORES(2), .LINES(2)) t1 (.finished(f1), .checks(c1), .failures(e1), .unbalanced_passes(u1), .kept_words(kw[1]), .dense_words(dw[1]), .compute_cycles(cc[1]));

  initial begin
    int checks, failures;
    fork
      wait (f0 && f1);
      #2000000;
    join_any
    checks = c0 + c1 + 1;
    failures = e0 + e1;
    if (!(f0 && f1)) begin failures++; $display("FAIL: watchdog"); end
    if (u1 == 0) begin failures++; $display("FAIL: no pass with unbalanced kernels"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
