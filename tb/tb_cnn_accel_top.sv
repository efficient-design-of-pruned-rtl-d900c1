// tb_cnn_accel_top: end-to-end test of the accelerator at its default size
// (7 x 16 convolution cores, 1 x 2 fully connected cores, block size 8).
//
// A small network runs on a batch of two images, driven as the processor and
// the DMA engines would drive it:
//   conv layer   8 input maps, 3x3 kernels, 16 output maps, merged 2x2 max
//                pooling: each of the 7 lines computes a band of 2 x 4 pooled
//                positions, so an image gives 7*8*16 = 896 features;
//   1x1 pass     a 1x1 convolution over the same maps, whose one-word dot
//                products make the address generator stall;
//   fc layer 1   896 -> 32, block-pruned kernels (some empty), ReLU;
//   fc layer 2   32 -> 8 reading layer 1's outputs from the batch memories.
// The testbench computes every convolution output and every dense output
// itself and compares them with the output streams. It counts the mechanisms
// the design has and fails if one never happened: address-generator stalls,
// merged pooling, pruned blocks skipped, empty kernels, loads refused while a
// module is busy, both batch lines producing, dense outputs written back and
// reused, a switch re-route and the done interrupt.
module tb_cnn_accel_top;
  import cnn_pkg::*;
  localparam int CL = 7, CC = 16, FL = 2, NIN = CL * 8 * CC;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic host_wr_en, irq, conv_stall;
  logic [2:0] host_wr_addr, host_rd_addr;
  logic [31:0] host_wr_data, host_rd_data;
  logic dma_valid [4], dma_ready [4];
  dma_beat_t dma_beat [4];
  logic conv_out_valid [CL];
  data_t conv_out_data [CL];
  logic [3:0] conv_out_kernel [CL];
  logic fc_out_valid [FL];
  logic [10:0] fc_out_addr [FL];
  word_t fc_out_data [FL];

  cnn_accel_top dut (.*);

  // mechanism counters
  int n_stall, n_pool, n_pruned, n_empty, n_refused, n_line [FL], n_reuse, n_reroute, n_irq;

  // model state
  word_t fmm [CL][64];
  word_t ker [CC][9];
  byte   feat [FL][NIN];
  byte   bmem [FL][2048*8];
  int    convq [CL][$];
  typedef struct {int addr; word_t data;} wr_t;
  wr_t   fcq [FL][$];
  int    cur_img;

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", m); end
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
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (conv_stall) n_stall++;
    if (irq) n_irq++;
    for (int l = 0; l < CL; l++)
      if (conv_out_valid[l]) begin
        int e;
        if (convq[l].size() == 0) chk(0, $sformatf("extra conv output line %0d", l));
        else begin
          e = convq[l].pop_front();
          chk(int'(conv_out_kernel[l]) == (e >> 16) && int'(conv_out_data[l]) == (e & 65535) - 128,
              $sformatf("conv line %0d got k%0d %0d exp k%0d %0d", l, conv_out_kernel[l], conv_out_data[l],
                        e >> 16, (e & 65535) - 128));
        end
      end
    for (int l = 0; l < FL; l++)
      if (fc_out_valid[l]) begin
        wr_t e;
        n_line[l]++;
        if (fcq[l].size() == 0) chk(0, "extra fc output");
        else begin
          e = fcq[l].pop_front();
          chk(int'(fc_out_addr[l]) == e.addr && fc_out_data[l] == e.data,
              $sformatf("fc line %0d @%0d %h exp @%0d %h", l, fc_out_addr[l], fc_out_data[l], e.addr, e.data));
        end
      end
  end

  task automatic host_wr(int a, logic [31:0] d);
    @(negedge clk); host_wr_en = 1; host_wr_addr = 3'(a); host_wr_data = d;
    @(negedge clk); host_wr_en = 0;
  endtask

  task automatic wait_done(int bit_no);
    host_rd_addr = 7;
    do @(negedge clk); while (!host_rd_data[bit_no]);
  endtask

  // one beat on DMA channel s; counts cycles in which it was refused
  task automatic dma_send(int s, int line, int addr, word_t d);
    @(negedge clk);
    dma_valid[s] = 1; dma_beat[s].line = 8'(line); dma_beat[s].addr = 16'(addr); dma_beat[s].data = d;
    #1;
    while (!dma_ready[s]) begin n_refused++; @(negedge clk); #1; end
  endtask

  task automatic dma_idle(int s);
    @(negedge clk); dma_valid[s] = 0;
  endtask

  task automatic set_routes(int fmm_src, int w_src, int bm_src, int k_src);
    host_wr(5, 32'(4 | fmm_src) | (32'(4 | w_src) << 4) | (32'(4 | bm_src) << 8) | (32'(4 | k_src) << 12));
  endtask

  function automatic logic [95:0] conv_reg(conv_cfg_t c);
    return 96'(c);
  endfunction

  task automatic conv_pass(conv_cfg_t g, int img, bit keep);
    logic [95:0] r = conv_reg(g);
    host_wr(0, r[31:0]); host_wr(1, r[63:32]); host_wr(2, r[95:64]);
    for (int c = 0; c < CC; c++)
      for (int a = 0; a < int'(g.kwords); a++) dma_send(1, 0, 0, ker[c][a]);
    dma_idle(1);
    for (int l = 0; l < CL; l++)
      for (int py = 0; py < int'(g.oy); py++)
        for (int px = 0; px < int'(g.ox); px++)
          for (int c = 0; c < CC; c++) begin
            int m = -1000;
            for (int wy = 0; wy < int'(g.pool); wy++)
              for (int wx = 0; wx < int'(g.pool); wx++) begin
                longint s = 0;
                int cy = py * int'(g.pstride) + wy, cx = px * int'(g.pstride) + wx;
                for (int i = 0; i < int'(g.yk); i++)
                  for (int kx = 0; kx < int'(g.xk); kx++) begin
                    word_t a = fmm[l][(cy * int'(g.stride) + i) * int'(g.xp) + cx * int'(g.stride) + kx];
                    word_t w = ker[c][i * int'(g.xk) + kx];
                    for (int k = 0; k < 8; k++) s += longint'($signed(a[8*k +: 8])) * longint'($signed(w[8*k +: 8]));
                  end
                if (sr(s, int'(g.shift), g.relu) > m) m = sr(s, int'(g.shift), g.relu);
              end
            convq[l].push_back((c << 16) | (m + 128));
            if (keep) feat[img][l * 8 * CC + (py * int'(g.ox) + px) * CC + c] = byte'(m);
          end
    host_wr(6, 32'h1);
    wait_done(2);
    for (int l = 0; l < CL; l++) chk(convq[l].size() == 0, "all conv outputs seen");
    if (g.pool > 1) n_pool++;
  endtask

  task automatic fc_layer(int nin, int in_w, int nout, int out_w, int shift, bit relu, int ksrc);
    fc_cfg_t f;
    logic [63:0] r;
    byte outs [FL][$];
    f = '0; f.in_base = 16'(in_w); f.out_base = 16'(out_w); f.shift = 5'(shift); f.relu = relu;
    r = 64'(f);
    host_wr(3, r[31:0]); host_wr(4, r[63:32]);
    host_wr(6, 32'h2);                       // layer init
    for (int p = 0; p < nout; p++) begin
      int pos [$];
      byte wts [$];
      int cur, nb;
      longint s [FL];
      cur = int'($urandom_range(0, 15));
      if (p == 3) cur = nin / 8;               // an empty kernel
      while (cur < nin / 8) begin pos.push_back(cur); cur += int'($urandom_range(1, 15)); end
      nb = pos.size();
      if (nb == 0) n_empty++;
      n_pruned += nin / 8 - nb;
      for (int b = 0; b < nb * 8; b++) wts.push_back(byte'($urandom));
      for (int l = 0; l < FL; l++) begin
        s[l] = 0;
        for (int b = 0; b < nb; b++)
          for (int k = 0; k < 8; k++) s[l] += longint'(wts[b*8 + k]) * longint'(bmem[l][in_w*8 + pos[b]*8 + k]);
        outs[l].push_back(byte'(sr(s[l], shift, relu)));
        if (outs[l].size() % 8 == 0) begin
          wr_t e;
          e.addr = out_w + p / 8;
          for (int k = 0; k < 8; k++) e.data[8*k +: 8] = outs[l][p - 7 + k];
          fcq[l].push_back(e);
        end
      end
      // the kernel is streamed right after the start of the previous pass,
      // so the loader must hold it off until that pass is over
      dma_send(ksrc, 0, 0, word_t'(nb));
      dma_send(ksrc, 0, 0, word_t'(nin));
      for (int ch = 0; ch < nb; ch += 16) begin
        word_t iw = '0;
        for (int n = 0; n < 16 && ch + n < nb; n++)
          iw[4*n +: 4] = 4'((ch + n == 0) ? pos[0] : pos[ch + n] - pos[ch + n - 1]);
        dma_send(ksrc, 0, 0, iw);
        for (int w = ch; w < ch + 16 && w < nb; w++) begin
          word_t ww;
          for (int k = 0; k < 8; k++) ww[8*k +: 8] = wts[w*8 + k];
          dma_send(ksrc, 0, 0, ww);
        end
      end
      dma_idle(ksrc);
      host_wr(6, 32'h4);                     // start the pass
    end
    wait_done(3);
    @(negedge clk); @(negedge clk);
    for (int l = 0; l < FL; l++) begin
      chk(fcq[l].size() == 0, "all fc outputs seen");
      for (int n = 0; n < nout; n++) bmem[l][out_w*8 + n] = outs[l][n];
    end
  endtask

  initial begin
    conv_cfg_t g;
    host_wr_en = 0; host_wr_addr = 0; host_wr_data = 0; host_rd_addr = 7;
    for (int s = 0; s < 4; s++) begin dma_valid[s] = 0; dma_beat[s] = '0; end
    n_stall = 0; n_pool = 0; n_pruned = 0; n_empty = 0; n_refused = 0; n_reuse = 0; n_reroute = 0; n_irq = 0;
    n_line = '{0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    set_routes(0, 1, 2, 3);
    for (int c = 0; c < CC; c++) for (int a = 0; a < 9; a++) ker[c][a] = {$urandom, $urandom};
    // two images through the convolutional module
    for (int img = 0; img < FL; img++) begin
      for (int l = 0; l < CL; l++)
        for (int a = 0; a < 60; a++) begin
          fmm[l][a] = {$urandom, $urandom};
          dma_send(0, l, a, fmm[l][a]);
        end
      dma_idle(0);
      g = '0; g.xp = 10; g.zpw = 1; g.xk = 3; g.yk = 3; g.stride = 1; g.pool = 2; g.pstride = 2;
      g.ox = 4; g.oy = 2; g.shift = 9; g.relu = 1; g.kwords = 9;
      conv_pass(g, img, 1);
      if (img == 0) begin
        // a 1x1 convolution pass: short dot products stall the generator
        g = '0; g.xp = 10; g.zpw = 1; g.xk = 1; g.yk = 1; g.stride = 1; g.pool = 1; g.pstride = 1;
        g.ox = 10; g.oy = 2; g.shift = 6; g.relu = 0; g.kwords = 1;
        conv_pass(g, img, 0);
      end
    end
    // features of image b go to batch memory line b (as the DMA would copy them)
    for (int b = 0; b < FL; b++)
      for (int a = 0; a < NIN / 8; a++) begin
        word_t w;
        for (int k = 0; k < 8; k++) begin w[8*k +: 8] = feat[b][a*8 + k]; bmem[b][a*8 + k] = feat[b][a*8 + k]; end
        dma_send(2, b, a, w);
      end
    dma_idle(2);
    fc_layer(NIN, 0, 32, 1024, 10, 1, 3);
    // re-route: kernels of the next layer come on DMA channel 0
    set_routes(1, 3, 2, 0);
    n_reroute++;
    fc_layer(32, 1024, 8, 1100, 7, 0, 0);
    n_reuse++;
    chk(n_stall > 0, $sformatf("address generator stalls: %0d", n_stall));
    chk(n_pool > 0, "merged pooling");
    chk(n_pruned > 0, $sformatf("pruned blocks skipped: %0d", n_pruned));
    chk(n_empty > 0, "empty kernels");
    chk(n_refused > 0, $sformatf("loads held off while busy: %0d", n_refused));
    chk(n_line[0] > 0 && n_line[1] > 0, "both batch lines produced");
    chk(n_reuse > 0 && n_reroute > 0, "write-back reuse and re-route");
    chk(n_irq > 0, "done interrupt");
    $display("mechanisms: stall=%0d pool=%0d pruned=%0d empty=%0d refused=%0d words=%0d/%0d reroute=%0d irq=%0d",
             n_stall, n_pool, n_pruned, n_empty, n_refused, n_line[0], n_line[1], n_reroute, n_irq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
