// tb_batch_mem: self-checking test of batch_mem with block sizes 8 (two
// cores: one dual-port copy), 4 (two cores: two copies) and 1 (one core: four
// copies). Random 64-bit words are written, then every read port reads random
// block addresses; the expected block is cut from the written word in the
// testbench. Read data must appear one cycle after the read.
module tb_batch_mem;
  import cnn_pkg::*;
  localparam int WORDS = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic we, re;
  logic [5:0] waddr;
  word_t wdata;
  logic [5:0]  ra8 [2];  logic [63:0] rd8 [2];
  logic [6:0]  ra4 [4];  logic [31:0] rd4 [4];
  logic [8:0]  ra1 [8];  logic [7:0]  rd1 [8];
  word_t model [WORDS];

  batch_mem #(.WORDS(WORDS), .BS(8), .CORES(2)) d8 (.clk, .we, .waddr, .wdata, .re, .raddr(ra8), .rdata(rd8));
  batch_mem #(.WORDS(WORDS), .BS(4), .CORES(2)) d4 (.clk, .we, .waddr, .wdata, .re, .raddr(ra4), .rdata(rd4));
  batch_mem #(.WORDS(WORDS), .BS(1), .CORES(1)) d1 (.clk, .we, .waddr, .wdata, .re, .raddr(ra1), .rdata(rd1));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    we = 0; re = 0; waddr = 0; wdata = 0;
    foreach (ra8[i]) ra8[i] = 0;
    foreach (ra4[i]) ra4[i] = 0;
    foreach (ra1[i]) ra1[i] = 0;
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk); we = 1; waddr = 6'(a); wdata = {$urandom, $urandom}; model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      re = 1;
      foreach (ra8[i]) ra8[i] = 6'($urandom);
      foreach (ra4[i]) ra4[i] = 7'($urandom);
      foreach (ra1[i]) ra1[i] = 9'($urandom);
      @(negedge clk);
      re = 0;
      foreach (ra8[i]) chk(rd8[i] == model[ra8[i]], $sformatf("BS8 port %0d", i));
      foreach (ra4[i]) chk(rd4[i] == model[6'(ra4[i] >> 1)][6'(32*ra4[i][0]) +: 32], $sformatf("BS4 port %0d", i));
      foreach (ra1[i]) chk(rd1[i] == model[6'(ra1[i] >> 3)][6'(8*ra1[i][2:0]) +: 8], $sformatf("BS1 port %0d", i));
      // data holds while re is low
      ra8[0] = ra8[0] + 1'b1;
      @(negedge clk);
      chk(rd8[0] == model[6'(ra8[0] - 1'b1)], "read data holds without re");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
