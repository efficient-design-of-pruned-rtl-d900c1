// tb_shift_relu: self-checking test of shift_relu.
// Random and corner-case sums are scaled with every shift amount, with and
// without ReLU; the expected value (round half up, ReLU, saturate to 8 bits)
// is computed with 64-bit integer arithmetic in the testbench.
module tb_shift_relu;
  import cnn_pkg::*;
  int checks = 0, failures = 0;
  acc_t din;
  logic [4:0] shift;
  logic relu;
  data_t dout;

  shift_relu dut (.*);

  function automatic int model(longint v, int sh, bit r);
    longint q;
    q = (sh == 0) ? v : (v + (longint'(1) << (sh - 1))) >>> sh;
    if (r && q < 0) q = 0;
    if (q > 127) q = 127;
    if (q < -128) q = -128;
    return int'(q);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static acc_t corner [6] = '{32'sh7fffffff, -32'sh80000000, 0, -1, 255, -300};
    for (int t = 0; t < 3000; t++) begin
      if (t < 6 * 64) din = corner[t % 6];
      else din = (t % 3 == 0) ? acc_t'($urandom) : acc_t'($signed($urandom_range(0, 8191)) - 4096);
      shift = 5'($urandom_range(0, 31));
      if (t < 6 * 64) shift = 5'(t / 12);
      relu  = 1'($urandom);
      #1;
      checks++;
      if (int'(dout) != model(longint'(din), int'(shift), relu)) begin
        failures++;
        $display("FAIL: din=%0d shift=%0d relu=%0d got %0d exp %0d", din, shift, relu, dout,
                 model(longint'(din), int'(shift), relu));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
