// tb_index_fifo: self-checking test of index_fifo against a queue model.
// Random pushes and pops (never beyond full or empty, by the model or the flags) on a small FIFO; checks
// the head value, empty and full after every cycle, including wrap-around.
module tb_index_fifo;
  localparam int W = 8, DEPTH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic push, pop, empty, full;
  logic [W-1:0] din, dout;
  logic [W-1:0] model [$];

  index_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == DEPTH) ||
          (model.size() > 0 && dout != model[0])) begin
        failures++;
        $display("FAIL: t=%0d size=%0d empty=%0d full=%0d dout=%h", t, model.size(), empty, full, dout);
      end
      push = (t % 500 < 250) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 3) == 0);
      pop  = (t % 500 < 250) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
      // never push into a full FIFO or pop an empty one, by either count
      if (model.size() == DEPTH || full) push = 0;
      if (model.size() == 0 || empty) pop = 0;
      din = W'($urandom);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
