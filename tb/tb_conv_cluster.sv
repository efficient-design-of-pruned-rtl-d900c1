// tb_conv_cluster: self-checking test of conv_cluster (3 lines x 4 columns).
// Dot products of random length (at least COLS words, as the address
// generator guarantees) are fed with random activation words per line and
// weight words per column. For each dot product the testbench expects, per
// line, the scaled results of columns 0..3 in that order, one per cycle,
// starting three cycles after `last`.
module tb_conv_cluster;
  import cnn_pkg::*;
  localparam int LINES = 3, COLS = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic valid, first, last, win_first, win_last, relu, busy;
  word_t act [LINES];
  word_t wgt [COLS];
  logic [4:0] shift;
  logic out_valid [LINES];
  data_t out_data [LINES];
  logic [1:0] out_kernel [LINES];

  conv_cluster #(.LINES(LINES), .COLS(COLS)) dut (.*);

  int expq [LINES][$];
  int tl [$];       // cycle of each `last`
  int cyc = 0;

  function automatic int sr(longint v, int sh, bit r);
    longint q;
    q = (sh == 0) ? v : (v + (longint'(1) << (sh - 1))) >>> sh;
    if (r && q < 0) q = 0;
    if (q > 127) q = 127;
    if (q < -128) q = -128;
    return int'(q);
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    for (int l = 0; l < LINES; l++)
      if (rst_n && out_valid[l]) begin
        int e;
        checks++;
        if (expq[l].size() == 0) begin failures++; $display("FAIL: extra output"); end
        else begin
          e = expq[l].pop_front();
          if (int'(out_kernel[l]) != (e >> 16) || int'(out_data[l]) != ((e & 65535) - 128)) begin
            failures++;
            $display("FAIL: line %0d got k%0d %0d exp k%0d %0d", l, out_kernel[l], out_data[l], e >> 16, (e & 65535) - 128);
          end
          // timing: kernel k leaves 3 + k cycles after the edge that took `last`
          if (l == 0 && cyc - tl[0] != 3 + int'(out_kernel[l])) begin
            checks++; failures++; $display("FAIL: kernel %0d left %0d cycles after last", out_kernel[l], cyc - tl[0]);
          end
          if (l == 0 && out_kernel[l] == 2'(COLS - 1)) void'(tl.pop_front());
        end
      end
  end

  initial begin
    longint s [LINES][COLS];
    int len;
    valid = 0; first = 0; last = 0; win_first = 1; win_last = 1; relu = 0; shift = 6;
    foreach (act[i]) act[i] = '0;
    foreach (wgt[i]) wgt[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      len = $urandom_range(COLS, 12);
      if (t == 50) begin
        // configuration changes only between passes
        @(negedge clk); valid = 0;
        repeat (COLS + 5) @(negedge clk);
        relu = 1;
      end
      foreach (s[l, c]) s[l][c] = 0;
      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        valid = 1; first = (k == 0); last = (k == len - 1);
        foreach (act[l]) act[l] = {$urandom, $urandom};
        foreach (wgt[c]) wgt[c] = {$urandom, $urandom};
        foreach (s[l, c])
          for (int i = 0; i < 8; i++) s[l][c] += longint'($signed(act[l][8*i +: 8])) * longint'($signed(wgt[c][8*i +: 8]));
        if (last) begin
          tl.push_back(cyc + 1);
          foreach (s[l, c]) expq[l].push_back((c << 16) | (sr(s[l][c], int'(shift), relu) + 128));
        end
      end
    end
    @(negedge clk); valid = 0;
    repeat (COLS + 5) @(negedge clk);
    for (int l = 0; l < LINES; l++) begin
      checks++;
      if (expq[l].size() != 0) begin failures++; $display("FAIL: missing outputs"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
