// tb_conv_srp: self-checking test of conv_srp (Shift/ReLU/Pool of one line).
// Results of COLS kernels arrive interleaved, as from the shift chain, for
// pooling windows of 1, 4 and 9 convolution outputs, with idle cycles in
// between. The expected pooled value is the maximum of the scaled, activated
// results of each kernel, computed in the testbench; it must leave one cycle
// after the last result of the window, tagged with its kernel.
module tb_conv_srp;
  import cnn_pkg::*;
  localparam int COLS = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, win_first, win_last, relu, out_valid;
  acc_t in_data;
  logic [1:0] in_kernel, out_kernel;
  logic [4:0] shift;
  data_t out_data;

  conv_srp #(.COLS(COLS)) dut (.*);

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

  initial begin
    int mx [COLS];
    int p, v, nout;
    in_valid = 0; in_data = 0; in_kernel = 0; win_first = 0; win_last = 0;
    shift = 4; relu = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    nout = 0;
    for (int t = 0; t < 300; t++) begin
      p = (t % 3 == 0) ? 1 : (t % 3 == 1) ? 4 : 9;
      relu = 1'(t % 2);
      for (int w = 0; w < p; w++) begin
        for (int k = 0; k < COLS; k++) begin
          @(negedge clk);
          if (w == p - 1 && k > 0) begin
            check_out(k - 1, mx[k - 1]);
          end
          in_valid = 1; in_kernel = 2'(k);
          in_data = acc_t'($signed($urandom_range(0, 8191)) - 4096);
          win_first = (w == 0); win_last = (w == p - 1);
          v = sr(longint'(in_data), int'(shift), relu);
          mx[k] = (w == 0) ? v : (v > mx[k] ? v : mx[k]);
        end
      end
      @(negedge clk);
      check_out(COLS - 1, mx[COLS - 1]);
      in_valid = 0;
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL: spurious output"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out(input int k, input int e);
    checks++;
    if (!(out_valid && out_kernel == 2'(k) && int'(out_data) == e)) begin
      failures++;
      $display("FAIL: kernel %0d valid=%0d got k%0d %0d exp %0d", k, out_valid, out_kernel, out_data, e);
    end
  endtask
endmodule
