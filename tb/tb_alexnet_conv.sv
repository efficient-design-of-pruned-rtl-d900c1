// tb_alexnet_conv: convolution layers of AlexNet on conv_module at its default
// size (7 lines x 16 columns of cores, 2048-word feature map memories,
// 512-word weight memories).
//
// Each layer is given as an input image (zero padded, maps packed eight to a
// 64-bit word), a kernel shape, a stride and an optional merged max pooling.
// The output rows are dealt out to the 7 lines in bands: line l computes
// output rows l*R .. l*R+R-1, and its feature map memory is loaded with just
// the input rows that band needs. Kernels go through the module 16 at a time,
// one pass each, with the same maps. Every output value is computed here from
// the whole image and compared with the line streams in order. Layers:
//   CONV3  13x13x256 (padded to 15x15), 3x3 kernels, 384 kernels, whole layer
//   CONV5  13x13x192 (padded to 15x15), 3x3 kernels, 64 of its 256 kernels,
//          with the 3x3 / stride 2 max pooling that follows it merged in
//   CONV1  227x227x3 (maps padded to 8), 11x11 kernels, stride 4: one part of
//          the layer (7 of its 55 output rows, 28 of its 55 output columns,
//          32 of its 96 kernels). Even one output row needs 11 x 227 = 2497
//          words, more than a feature map memory, so this layer is cut in
//          columns too.
// The cycles from start to done of every pass are checked against one word
// pair per cycle.
module tb_alexnet_conv;
  import cnn_pkg::*;
  localparam int LINES = 7, COLS = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  conv_cfg_t cfg;
  logic start, busy, done, stall;
  logic fmm_valid, fmm_ready, w_valid, w_ready;
  dma_beat_t fmm_beat;
  word_t w_data;
  logic out_valid [LINES];
  data_t out_data [LINES];
  logic [3:0] out_kernel [LINES];

  conv_module dut (.*);

  word_t img [];            // (row * width + col) * zpw + word
  word_t wm [COLS][512];
  int expq [LINES][$];

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", m); end
  endtask

  function automatic int sr(longint v, int sh, bit r);
    longint q;
    q = (sh == 0) ? v : (v + (longint'(1) << (sh - 1))) >>> sh;
    if (r && q < 0) q = 0;
    if (q > 127) q = 127;
    if (q < -128) q = -128;
    return int'(q);
  endfunction

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    for (int l = 0; l < LINES; l++)
      if (rst_n && out_valid[l]) begin
        int e;
        if (expq[l].size() == 0) chk(0, $sformatf("extra output on line %0d", l));
        else begin
          e = expq[l].pop_front();
          chk((e >> 8) == int'(out_kernel[l]) && byte'(e) == out_data[l],
              $sformatf("line %0d got k%0d %0d, expected k%0d %0d", l, out_kernel[l], out_data[l], e >> 8, byte'(e)));
        end
      end

  // convolution at output row cy, column cx over the whole image
  function automatic longint conv_at(int c, int w, int h, int zpw, int k, int s, int cy, int cx);
    longint acc = 0;
    for (int i = 0; i < k; i++)
      for (int j = 0; j < k; j++)
        for (int z = 0; z < zpw; z++) begin
          int r = cy * s + i;
          word_t a, b;
          a = (r < h) ? img[(r * w + cx * s + j) * zpw + z] : '0;
          b = wm[c][(i * k + j) * zpw + z];
          for (int n = 0; n < 8; n++) acc += longint'($signed(a[8*n +: 8])) * longint'($signed(b[8*n +: 8]));
        end
    return acc;
  endfunction

  // w x h input of zpw words per position, k x k kernels with stride s,
  // pool x pool windows with stride ps (pool 1: none), ox x (7*R) outputs
  // (R pooled rows per line), nk kernels; kernels are loaded 16 per pass
  task automatic layer(string name, int w, int h, int zpw, int k, int s, int pool, int ps,
                       int ox, int r, int nk, int shift);
    int band_rows, kw;
    longint words = 0, cycles = 0;
    img = new[w * h * zpw];
    foreach (img[a]) img[a] = {$urandom, $urandom} & {8{8'h7f}};   // non-negative activations
    kw = k * k * zpw;
    band_rows = ((r - 1) * ps + pool - 1) * s + k;
    chk(band_rows * w * zpw <= 2048, $sformatf("%s band fits a feature map memory", name));
    // feature map memories: the input rows of each line's band
    for (int l = 0; l < LINES; l++) begin
      int r0 = l * r * ps * s;
      for (int a = 0; a < band_rows * w * zpw; a++) begin
        int row = r0 + a / (w * zpw);
        @(negedge clk);
        fmm_valid = 1; fmm_beat.line = 8'(l); fmm_beat.addr = 16'(a);
        fmm_beat.data = (row < h) ? img[row * w * zpw + a % (w * zpw)] : '0;
      end
    end
    @(negedge clk); fmm_valid = 0;
    cfg = '0; cfg.xp = 16'(w); cfg.zpw = 8'(zpw); cfg.xk = 4'(k); cfg.yk = 4'(k);
    cfg.stride = 3'(s); cfg.pool = 2'(pool); cfg.pstride = 2'(ps); cfg.ox = 8'(ox); cfg.oy = 8'(r);
    cfg.shift = 5'(shift); cfg.relu = 1'b1; cfg.kwords = 12'(kw);
    for (int p = 0; p < nk / COLS; p++) begin
      longint t0;
      for (int c = 0; c < COLS; c++)
        for (int a = 0; a < kw; a++) begin
          wm[c][a] = {$urandom, $urandom};
          @(negedge clk); w_valid = 1; w_data = wm[c][a];
        end
      @(negedge clk); w_valid = 0;
      for (int l = 0; l < LINES; l++)
        for (int py = 0; py < r; py++)
          for (int px = 0; px < ox; px++)
            for (int c = 0; c < COLS; c++) begin
              int m = -1000;
              for (int wy = 0; wy < pool; wy++)
                for (int wx = 0; wx < pool; wx++) begin
                  int v = sr(conv_at(c, w, h, zpw, k, s, (l * r + py) * ps + wy, px * ps + wx), shift, 1);
                  if (v > m) m = v;
                end
              expq[l].push_back((c << 8) | (m & 255));
            end
      @(negedge clk); start = 1; t0 = cyc;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      @(negedge clk);
      for (int l = 0; l < LINES; l++) chk(expq[l].size() == 0, $sformatf("%s line %0d: all outputs", name, l));
      chk(cyc - t0 <= longint'(r * ox * pool * pool * kw + 2 * COLS + 10),
          $sformatf("%s pass took %0d cycles", name, cyc - t0));
      words += longint'(r * ox * pool * pool * kw);
      cycles += cyc - t0;
    end
    $display("%s: %0d kernels, %0d word pairs per line in %0d cycles", name, nk, words, cycles);
  endtask

  initial begin
    start = 0; fmm_valid = 0; w_valid = 0; fmm_beat = '0; w_data = '0; cfg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    layer("CONV3", 15, 15, 32, 3, 1, 1, 1, 13, 2, 384, 13);
    layer("CONV5", 15, 15, 24, 3, 1, 3, 2, 6, 1, 64, 13);
    // CONV1 part: output rows 0..6 (one per line) and columns 0..27, which
    // read input columns 0..118: 11 rows x 119 positions = 1309 words per line
    layer("CONV1", 119, 6 * 4 + 11, 1, 11, 4, 1, 1, 28, 1, 32, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
