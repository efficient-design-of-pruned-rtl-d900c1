// tb_conv_module: self-checking test of the convolutional module.
// Random 8-bit input maps are written into each line's feature map memory and
// random kernels into the weight memories through the load ports; then passes
// are run for several layer shapes (3x3 kernel stride 1, stride 2 with merged
// 2x2 max pooling, overlapping 3x3 pooling, 1x1 kernel that forces stalls).
// The testbench computes every convolution directly from the maps and kernels,
// scales, activates and pools it, and compares each line's output stream in
// order (positions in raster order, kernels 0..COLS-1 per position). It also
// checks the pass time against the one-word-per-cycle rate.
module tb_conv_module;
  import cnn_pkg::*;
  localparam int LINES = 2, COLS = 4, FW = 256, WW = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  conv_cfg_t cfg;
  logic start, busy, done, stall;
  logic fmm_valid, fmm_ready, w_valid, w_ready;
  dma_beat_t fmm_beat;
  word_t w_data;
  logic out_valid [LINES];
  data_t out_data [LINES];
  logic [1:0] out_kernel [LINES];

  conv_module #(.LINES(LINES), .COLS(COLS), .FMM_WORDS(FW), .W_WORDS(WW)) dut (.*);

  word_t fmm [LINES][FW];
  word_t wm  [COLS][WW];
  int expq [LINES][$];
  int stalls;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (stall) stalls++;

  // compare output streams as they come
  always @(posedge clk) begin
    for (int l = 0; l < LINES; l++) begin
      if (rst_n && out_valid[l]) begin
        int e;
        checks++;
        if (expq[l].size() == 0) begin failures++; $display("FAIL: extra output line %0d", l); end
        else begin
          e = expq[l].pop_front();
          if ((e >> 8) != int'(out_kernel[l]) || (e & 255) != int'(out_data[l]) % 256 + (out_data[l] < 0 ? 256 : 0)) begin
            failures++;
            $display("FAIL: line %0d got k%0d %0d exp k%0d %0d", l, out_kernel[l], out_data[l], e >> 8, e & 255);
          end
        end
      end
    end
  end

  function automatic longint conv_at(int l, int c, conv_cfg_t g, int cy, int cx);
    longint s = 0;
    for (int i = 0; i < int'(g.yk); i++)
      for (int kx = 0; kx < int'(g.xk); kx++)
        for (int zw = 0; zw < int'(g.zpw); zw++) begin
          word_t a = fmm[l][((cy * int'(g.stride) + i) * int'(g.xp) + cx * int'(g.stride) + kx) * int'(g.zpw) + zw];
          word_t w = wm[c][(i * int'(g.xk) + kx) * int'(g.zpw) + zw];
          for (int k = 0; k < 8; k++) s += longint'($signed(a[8*k +: 8])) * longint'($signed(w[8*k +: 8]));
        end
    return s;
  endfunction

  task automatic run(conv_cfg_t g, bit expect_stall);
    int t0, t1, npairs;
    cfg = g;
    // load maps and kernels
    for (int l = 0; l < LINES; l++)
      for (int a = 0; a < FW; a++) begin
        fmm[l][a] = {$urandom, $urandom};
        @(negedge clk);
        fmm_valid = 1; fmm_beat.line = 8'(l); fmm_beat.addr = 16'(a); fmm_beat.data = fmm[l][a];
      end
    @(negedge clk); fmm_valid = 0;
    for (int c = 0; c < COLS; c++)
      for (int a = 0; a < int'(g.kwords); a++) begin
        wm[c][a] = {$urandom, $urandom};
        @(negedge clk); w_valid = 1; w_data = wm[c][a];
      end
    @(negedge clk); w_valid = 0;
    // expected outputs
    for (int l = 0; l < LINES; l++)
      for (int py = 0; py < int'(g.oy); py++)
        for (int px = 0; px < int'(g.ox); px++)
          for (int c = 0; c < COLS; c++) begin
            int m = -1000;
            for (int wy = 0; wy < int'(g.pool); wy++)
              for (int wx = 0; wx < int'(g.pool); wx++) begin
                int v = sr(conv_at(l, c, g, py * int'(g.pstride) + wy, px * int'(g.pstride) + wx),
                           int'(g.shift), g.relu);
                if (v > m) m = v;
              end
            expq[l].push_back((c << 8) | (m & 255));
          end
    npairs = int'(g.oy) * int'(g.ox) * int'(g.pool) * int'(g.pool) * int'(g.kwords);
    stalls = 0;
    @(negedge clk); start = 1; t0 = int'($time / 10);
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    t1 = int'($time / 10);
    for (int l = 0; l < LINES; l++) check(expq[l].size() == 0, $sformatf("line %0d all outputs", l));
    if (expect_stall) check(stalls > 0, "stall occurred");
    else check(t1 - t0 <= npairs + COLS + 10,
               $sformatf("pass took %0d cycles for %0d word pairs", t1 - t0, npairs));
  endtask

  initial begin
    conv_cfg_t g;
    start = 0; fmm_valid = 0; w_valid = 0; fmm_beat = '0; w_data = '0; cfg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    g = '0; g.xp = 6; g.zpw = 2; g.xk = 3; g.yk = 3; g.stride = 1; g.pool = 1; g.pstride = 1;
    g.ox = 4; g.oy = 3; g.kwords = 18; g.shift = 9; g.relu = 1;
    run(g, 0);
    g = '0; g.xp = 11; g.zpw = 1; g.xk = 3; g.yk = 3; g.stride = 2; g.pool = 2; g.pstride = 2;
    g.ox = 2; g.oy = 2; g.kwords = 9; g.shift = 8; g.relu = 1;
    run(g, 0);
    g = '0; g.xp = 9; g.zpw = 1; g.xk = 2; g.yk = 2; g.stride = 1; g.pool = 3; g.pstride = 2;
    g.ox = 3; g.oy = 2; g.kwords = 4; g.shift = 7; g.relu = 0;
    run(g, 0);
    g = '0; g.xp = 8; g.zpw = 1; g.xk = 1; g.yk = 1; g.stride = 1; g.pool = 1; g.pstride = 1;
    g.ox = 6; g.oy = 3; g.kwords = 1; g.shift = 6; g.relu = 0;
    run(g, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
