// tb_alexnet_fc: the dense layers of AlexNet (9216 -> 4096 -> 4096 -> 1000)
// run on fc_module in the configurations of the published result tables,
// each with 2048-word batch and weight memories:
//   B8_90  block size 8, 90% pruning, batch 2 (the default configuration)
//   B4_90  block size 4, 90% pruning, batch 2
//   B1_90  block size 1 (plain pruning), 90% pruning, batch 2
//   B8_70  block size 8, 70% pruning, batch 3
//   B8_90  block size 8, 90% pruning, batch 16 (the larger device)
// Kernels are pruned at random: gaps of 5 to 15 blocks between kept blocks
// keep about 10% of them, gaps of 1 to 6 about 29%. Every output word of every
// layer is compared with the testbench's own computation, and each pass must
// take at most its weight words plus 6 cycles (fc_module_check). The kept
// weight words and the compute cycles of each configuration are printed.
module tb_alexnet_fc;
  localparam int N = 5;
  bit f [N];
  int c [N], e [N], u [N];
  longint kw [N], dw [N], cc [N];
  string name [N] = '{"B8_90 batch 2", "B4_90 batch 2", "B1_90 batch 2", "B8_70 batch 3", "B8_90 batch 16"};

  fc_module_check #(.BS(8), .CORES(1), .LINES(2), .PRUNE_MIN_GAP(5), .PRUNE_MAX_GAP(15), .BMW(2048), .WW(2048), .ALEXNET(1)) t0
    (.finished(f[0]), .checks(c[0]), .failures(e[0]), .unbalanced_passes(u[0]), .kept_words(kw[0]), .dense_words(dw[0]), .compute_cycles(cc[0]));
  fc_module_check #(.BS(4), .CORES(1), .LINES(2), .PRUNE_MIN_GAP(5), .PRUNE_MAX_GAP(15), .BMW(2048), .WW(2048), .ALEXNET(1)) t1
    (.finished(f[1]), .checks(c[1]), .failures(e[1]), .unbalanced_passes(u[1]), .kept_words(kw[1]), .dense_words(dw[1]), .compute_cycles(cc[1]));
  fc_module_check #(.BS(1), .CORES(1), .LINES(2), .PRUNE_MIN_GAP(5), .PRUNE_MAX_GAP(15), .BMW(2048), .WW(2048), .ALEXNET(1)) t2
    (.finished(f[2]), .checks(c[2]), .failures(e[2]), .unbalanced_passes(u[2]), .kept_words(kw[2]), .dense_words(dw[2]), .compute_cycles(cc[2]));
  fc_module_check #(.BS(8), .CORES(1), .LINES(3), .PRUNE_MIN_GAP(1), .PRUNE_MAX_GAP(6), .BMW(2048), .WW(2048), .ALEXNET(1)) t3
    (.finished(f[3]), .checks(c[3]), .failures(e[3]), .unbalanced_passes(u[3]), .kept_words(kw[3]), .dense_words(dw[3]), .compute_cycles(cc[3]));
  fc_module_check #(.BS(8), .CORES(1), .LINES(16), .PRUNE_MIN_GAP(5), .PRUNE_MAX_GAP(15), .BMW(2048), .WW(2048), .ALEXNET(1)) t4
    (.finished(f[4]), .checks(c[4]), .failures(e[4]), .unbalanced_passes(u[4]), .kept_words(kw[4]), .dense_words(dw[4]), .compute_cycles(cc[4]));

  initial begin
    int checks, failures;
    bit all;
    fork
      wait (f[0] && f[1] && f[2] && f[3] && f[4]);
      #100000000;
    join_any
    checks = 0; failures = 0; all = 1;
    for (int i = 0; i < N; i++) begin
      checks += c[i]; failures += e[i]; all &= f[i];
      $display("%s: %0d of %0d weight words kept, %0d compute cycles", name[i], kw[i], dw[i], cc[i]);
    end
    checks++;
    if (!all) begin failures++; $display("FAIL: watchdog"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
