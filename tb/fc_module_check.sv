// fc_module_check: test harness for one configuration of fc_module, used by
// tb_fc_module and tb_fc_blocksizes.
//
// It fills the batch memories with random images, then runs two dense layers:
// 256 -> 64 -> 8 neurons, the second reading the first's outputs from the batch
// memories. Every kernel is block pruned at random (gaps of 1 to 15 blocks,
// sometimes no block at all, so kernels of one pass differ in length) and
// streamed in the kernel format: two header words, then index words each
// followed by the weight words of its sixteen blocks, zero-padded at the end.
// The expected outputs are computed from the dense positions of the kept
// blocks, scaled, activated and compared word by word with the module's output
// stream; each pass must take at most its longest kernel's weight words plus
// CORES + 5 cycles. With ALEXNET set it runs the three dense layers of AlexNet
// instead (9216 -> 4096 -> 4096 -> 1000, non-negative inputs, no empty
// kernels) and needs 2048-word memories. The numbers of kept and unpruned
// weight words and the cycles from start to done are reported.
module fc_module_check
  import cnn_pkg::*;
#(
  parameter int BS = 8,
  parameter int CORES = 1,
  parameter int LINES = 2,
  parameter int PRUNE_MAX_GAP = 15,
  parameter int PRUNE_MIN_GAP = 1,
  parameter int BMW = 256,          // batch memory words
  parameter int WW = 64,            // weight memory words
  parameter bit ALEXNET = 0         // run the AlexNet dense layers instead
) (
  output bit finished,
  output int checks,
  output int failures,
  output int unbalanced_passes,
  output longint kept_words,
  output longint dense_words,
  output longint compute_cycles
);
  localparam int G = 8 / BS;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fc_cfg_t cfg;
  logic layer_init, start, busy, done;
  logic [$clog2(CORES+1)-1:0] kernels_loaded;
  logic bm_valid, bm_ready, k_valid, k_ready;
  dma_beat_t bm_beat;
  word_t k_data;
  logic out_valid [LINES];
  logic [$clog2(BMW)-1:0] out_addr [LINES];
  word_t out_data [LINES];

  fc_module #(.LINES(LINES), .CORES(CORES), .BS(BS), .BM_WORDS(BMW), .W_WORDS(WW)) dut (.*);

  byte img [LINES][BMW*8];
  typedef struct {int addr; word_t data;} wr_t;
  wr_t expq [LINES][$];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL (BS=%0d CORES=%0d): %s", BS, CORES, msg); end
  endtask

  function automatic int sr(longint v, int sh, bit r);
    longint q;
    q = (sh == 0) ? v : (v + (longint'(1) << (sh - 1))) >>> sh;
    if (r && q < 0) q = 0;
    if (q > 127) q = 127;
    if (q < -128) q = -128;
    return int'(q);
  endfunction

  always @(posedge clk) begin
    for (int l = 0; l < LINES; l++)
      if (rst_n && out_valid[l]) begin
        wr_t e;
        if (expq[l].size() == 0) check(0, "unexpected output word");
        else begin
          e = expq[l].pop_front();
          check(int'(out_addr[l]) == e.addr && out_data[l] == e.data,
                $sformatf("line %0d word @%0d = %h, exp @%0d = %h", l, out_addr[l], out_data[l], e.addr, e.data));
        end
      end
  end

  // one dense layer: nin activations at word in_w, nout outputs at word out_w
  task automatic layer(int nin, int in_w, int nout, int out_w, int shift, bit relu);
    byte outs [LINES][$];
    cfg = '0; cfg.in_base = 16'(in_w * G); cfg.out_base = 16'(out_w); cfg.shift = 5'(shift); cfg.relu = relu;
    @(negedge clk); layer_init = 1;
    @(negedge clk); layer_init = 0;
    for (int p = 0; p < nout / CORES; p++) begin
      int nwords [CORES];
      int maxw, t0, t1;
      longint sum [LINES][CORES];
      maxw = 0;
      for (int c = 0; c < CORES; c++) begin
        int pos [$];
        byte wts [$];
        int cur, nb, nblk;
        nblk = nin / BS;
        // choose kept blocks
        cur = int'($urandom_range(0, 15));
        if (!ALEXNET && $urandom_range(0, 9) == 0) cur = nblk;   // empty kernel now and then
        while (cur < nblk) begin
          pos.push_back(cur);
          cur += int'($urandom_range(PRUNE_MIN_GAP, PRUNE_MAX_GAP));
        end
        nb = pos.size();
        for (int b = 0; b < nb * BS; b++) wts.push_back(byte'($urandom));
        for (int l = 0; l < LINES; l++) begin
          sum[l][c] = 0;
          for (int b = 0; b < nb; b++)
            for (int k = 0; k < BS; k++)
              sum[l][c] += longint'(wts[b*BS + k]) * longint'(img[l][in_w*8 + pos[b]*BS + k]);
        end
        nwords[c] = (nb + G - 1) / G;
        kept_words += longint'(nwords[c]);
        dense_words += longint'(nin) / 8;
        if (nwords[c] > maxw) maxw = nwords[c];
        // stream the kernel
        send(word_t'(nb));
        send(word_t'(nin));
        for (int ch = 0; ch < nb; ch += 16) begin
          word_t iw = '0;
          for (int n = 0; n < 16 && ch + n < nb; n++)
            iw[4*n +: 4] = 4'((ch + n == 0) ? pos[0] : pos[ch + n] - pos[ch + n - 1]);
          send(iw);
          for (int w = 0; w < 16 / G && ch + w * G < nb; w++) begin
            word_t ww = '0;
            for (int g = 0; g < G; g++)
              if (ch + w * G + g < nb)
                for (int k = 0; k < BS; k++) ww[8*(g*BS + k) +: 8] = wts[(ch + w*G + g)*BS + k];
            send(ww);
          end
        end
      end
      @(negedge clk); k_valid = 0;
      check(int'(kernels_loaded) == CORES, "all kernels of the pass loaded");
      for (int c = 1; c < CORES; c++) if (nwords[c] != nwords[0]) unbalanced_passes++;
      for (int l = 0; l < LINES; l++)
        for (int c = 0; c < CORES; c++) outs[l].push_back(byte'(sr(sum[l][c], shift, relu)));
      // expected words as they complete
      for (int l = 0; l < LINES; l++)
        if (outs[l].size() % 8 == 0) begin
          wr_t e;
          e.addr = out_w + (p * CORES) / 8;
          for (int k = 0; k < 8; k++) e.data[8*k +: 8] = outs[l][outs[l].size() - 8 + k];
          expq[l].push_back(e);
        end
      @(negedge clk); start = 1; t0 = int'($time / 10);
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      t1 = int'($time / 10);
      compute_cycles += longint'(t1) - longint'(t0);
      check(t1 - t0 <= maxw + CORES + 5 && t1 - t0 >= maxw,
            $sformatf("pass of %0d words took %0d cycles", maxw, t1 - t0));
    end
    @(negedge clk);
    for (int l = 0; l < LINES; l++) begin
      check(expq[l].size() == 0, "all output words seen");
      for (int n = 0; n < nout; n++) img[l][out_w*8 + n] = outs[l][n];
    end
  endtask

  task automatic send(word_t w);
    @(negedge clk);
    k_valid = 1; k_data = w;
    // the loader only takes words while the module is idle
    while (!k_ready) @(negedge clk);
  endtask

  initial begin
    checks = 0; failures = 0; finished = 0; unbalanced_passes = 0;
    kept_words = 0; dense_words = 0; compute_cycles = 0;
    layer_init = 0; start = 0; bm_valid = 0; k_valid = 0; bm_beat = '0; k_data = '0; cfg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < LINES; l++)
      for (int a = 0; a < (ALEXNET ? 1152 : 64); a++) begin
        automatic word_t w = {$urandom, $urandom};
        if (ALEXNET) w &= {8{8'h7f}};   // post-ReLU features are non-negative
        for (int k = 0; k < 8; k++) img[l][a*8 + k] = byte'(w[8*k +: 8]);
        @(negedge clk);
        bm_valid = 1; bm_beat.line = 8'(l); bm_beat.addr = 16'(a); bm_beat.data = w;
      end
    @(negedge clk); bm_valid = 0;
    if (ALEXNET) begin
      // FC6 reads words 0..1151 and writes 1152..1663, FC7 writes 0..511,
      // FC8 writes 1152..1276
      layer(9216, 0, 4096, 1152, 11, 1);
      layer(4096, 1152, 4096, 0, 10, 1);
      layer(4096, 0, 1000, 1152, 10, 0);
    end else begin
      layer(256, 0, 64, 128, 10, 1);
      layer(64, 128, 8, 200, 8, 0);
    end
    finished = 1;
  end
endmodule
