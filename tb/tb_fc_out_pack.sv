// tb_fc_out_pack: self-checking test of fc_out_pack. Random bytes arrive with
// gaps; every eighth byte must produce, one cycle later, the 64-bit word of
// the last eight bytes (first byte lowest) at the next output address; `init`
// restarts at a new base.
module tb_fc_out_pack;
  import cnn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic init, in_valid, wr_valid;
  logic [10:0] base, wr_addr;
  data_t in_data;
  word_t wr_data;

  fc_out_pack #(.AW(11)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t w;
    int n, words;
    init = 0; in_valid = 0; base = 0; in_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 5; run++) begin
      @(negedge clk); init = 1; base = 11'($urandom_range(0, 1500));
      @(negedge clk); init = 0;
      n = 0; words = 0;
      for (int t = 0; t < 400; t++) begin
        @(negedge clk);
        checks++;
        if (wr_valid != (in_valid && n % 8 == 0 && n > 0)) begin
          failures++; $display("FAIL: wr_valid %0d at byte %0d", wr_valid, n);
        end
        if (wr_valid) begin
          checks++;
          if (wr_data != w || wr_addr != base + 11'(words - 1)) begin
            failures++; $display("FAIL: word %h @%0d exp %h @%0d", wr_data, wr_addr, w, base + 11'(words - 1));
          end
        end
        in_valid = ($urandom_range(0, 2) != 0);
        in_data = data_t'($urandom);
        if (in_valid) begin
          w[8*(n % 8) +: 8] = in_data;
          n++;
          if (n % 8 == 0) words++;
        end
      end
      @(negedge clk); in_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
