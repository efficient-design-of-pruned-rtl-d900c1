// tb_conv_addr_gen: self-checking test of conv_addr_gen.
// For several layer shapes (kernel sizes, strides, merged pooling windows) the
// testbench enumerates the expected address sequence straight from Eq. (1) of
// the convolution: for each output, each pooling-window element, each kernel
// row i and word j, FMM address startAddr + i*xp*zpw + j and weight address
// i*xk*zpw + j. Every issued pair and flag is compared in order. It also
// checks that dot-product ends are at least COLS cycles apart, that long dot
// products run without a lost cycle and short ones do stall.
module tb_conv_addr_gen;
  import cnn_pkg::*;
  localparam int COLS = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, valid, first, last, win_first, win_last, stall, done;
  conv_cfg_t cfg;
  logic [10:0] fmm_addr;
  logic [8:0]  w_addr;

  conv_addr_gen #(.AW(11), .WAW(9), .COLS(COLS)) dut (.*);

  typedef struct {int fa; int wa; bit f; bit l; bit wf; bit wl;} exp_t;
  exp_t q[$];
  int stalls, cycles, last_t, min_gap;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic build(conv_cfg_t c);
    int rl = int'(c.xk) * int'(c.zpw);
    int rs = int'(c.xp) * int'(c.zpw);
    q.delete();
    for (int py = 0; py < int'(c.oy); py++)
      for (int px = 0; px < int'(c.ox); px++)
        for (int wy = 0; wy < int'(c.pool); wy++)
          for (int wx = 0; wx < int'(c.pool); wx++) begin
            int cy = py * int'(c.pstride) + wy;
            int cx = px * int'(c.pstride) + wx;
            int sa = cy * int'(c.stride) * rs + cx * int'(c.stride) * int'(c.zpw);
            for (int i = 0; i < int'(c.yk); i++)
              for (int j = 0; j < rl; j++) begin
                exp_t e;
                e.fa = sa + i * rs + j; e.wa = i * rl + j;
                e.f = (i == 0 && j == 0); e.l = (i == int'(c.yk) - 1 && j == rl - 1);
                e.wf = (wx == 0 && wy == 0);
                e.wl = (wx == int'(c.pool) - 1 && wy == int'(c.pool) - 1);
                q.push_back(e);
              end
          end
  endtask

  task automatic run(conv_cfg_t c, bit expect_stall);
    int n;
    build(c);
    n = q.size();
    cfg = c;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    stalls = 0; cycles = 0; last_t = -1000; min_gap = 1000;
    while (1) begin
      @(posedge clk); #1;
      cycles++;
      if (stall) stalls++;
      if (valid) begin
        exp_t e;
        if (q.size() == 0) begin check(0, "extra output"); break; end
        e = q.pop_front();
        check(int'(fmm_addr) == e.fa && int'(w_addr) == e.wa && first == e.f && last == e.l
              && win_first == e.wf && win_last == e.wl,
              $sformatf("addr got %0d/%0d exp %0d/%0d flags %b%b%b%b exp %b%b%b%b", fmm_addr, w_addr,
                        e.fa, e.wa, first, last, win_first, win_last, e.f, e.l, e.wf, e.wl));
        if (last) begin
          if (cycles - last_t < min_gap) min_gap = cycles - last_t;
          last_t = cycles;
        end
      end
      if (done) break;
    end
    check(q.size() == 0, "all addresses issued");
    check(min_gap >= COLS, $sformatf("dot-product ends %0d cycles apart", min_gap));
    if (expect_stall) check(stalls > 0, "short dot products stall");
    else check(stalls == 0 && cycles == n, $sformatf("no lost cycle: %0d cycles for %0d pairs", cycles, n));
  endtask

  initial begin
    conv_cfg_t c;
    start = 0; cfg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 3x3 kernel, 16 maps, stride 1
    c = '0; c.xp = 6; c.zpw = 2; c.xk = 3; c.yk = 3; c.stride = 1; c.pool = 1; c.pstride = 1;
    c.ox = 4; c.oy = 2; c.kwords = 18;
    run(c, 0);
    // stride 2 with merged 2x2 pooling
    c = '0; c.xp = 13; c.zpw = 1; c.xk = 3; c.yk = 2; c.stride = 2; c.pool = 2; c.pstride = 2;
    c.ox = 2; c.oy = 2; c.kwords = 6;
    run(c, 0);
    // overlapping 3x3 pooling, stride 2
    c = '0; c.xp = 9; c.zpw = 1; c.xk = 2; c.yk = 2; c.stride = 1; c.pool = 3; c.pstride = 2;
    c.ox = 3; c.oy = 1; c.kwords = 4;
    run(c, 0);
    // 1x1 kernel on 8 maps: one word per dot product, must stall
    c = '0; c.xp = 8; c.zpw = 1; c.xk = 1; c.yk = 1; c.stride = 1; c.pool = 1; c.pstride = 1;
    c.ox = 5; c.oy = 2; c.kwords = 1;
    run(c, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
