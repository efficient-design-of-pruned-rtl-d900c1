// tb_controller: self-checking test of the controller's register map.
// Writes random values to the configuration and route registers and checks
// them on the read bus and on the decoded outputs; checks that command bits
// give one-cycle start pulses, that done bits are sticky, raise irq and are
// cleared by the next start, and that status shows busy flags.
module tb_controller;
  import cnn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en;
  logic [2:0] wr_addr, rd_addr;
  logic [31:0] wr_data, rd_data;
  conv_cfg_t conv_cfg;
  fc_cfg_t fc_cfg;
  logic route_en [4];
  logic [1:0] route_src [4];
  logic conv_start, fc_layer_init, fc_start, conv_busy, conv_done, fc_busy, fc_done, irq;
  logic [3:0] fc_kernels_loaded;

  controller #(.NDST(4)) dut (.*);

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic wr(int a, logic [31:0] d);
    @(negedge clk); wr_en = 1; wr_addr = 3'(a); wr_data = d;
    @(negedge clk); wr_en = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [95:0] cv;
    logic [63:0] fv;
    logic [31:0] rv;
    wr_en = 0; wr_addr = 0; wr_data = 0; rd_addr = 0;
    conv_busy = 0; conv_done = 0; fc_busy = 0; fc_done = 0; fc_kernels_loaded = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      cv = {$urandom, $urandom, $urandom};
      fv = {$urandom, $urandom};
      rv = $urandom;
      // a legal table gives each source to at most one destination
      for (int d = 1; d < 4; d++)
        for (int e = 0; e < d; e++)
          if (rv[4*d + 2] && rv[4*e + 2] && rv[4*d +: 2] == rv[4*e +: 2]) rv[4*d + 2] = 1'b0;
      wr(0, cv[31:0]); wr(1, cv[63:32]); wr(2, cv[95:64]);
      wr(3, fv[31:0]); wr(4, fv[63:32]); wr(5, rv);
      chk(conv_cfg == cv[$bits(conv_cfg_t)-1:0], "conv configuration");
      chk(fc_cfg == fv[$bits(fc_cfg_t)-1:0], "fc configuration");
      for (int d = 0; d < 4; d++)
        chk(route_en[d] == rv[4*d + 2] && route_src[d] == rv[4*d +: 2], "route entry");
      rd_addr = 0; #1 chk(rd_data == cv[31:0], "read reg 0");
      rd_addr = 2; #1 chk(rd_data == cv[95:64], "read reg 2");
      rd_addr = 4; #1 chk(rd_data == fv[63:32], "read reg 4");
      rd_addr = 5; #1 chk(rd_data == rv, "read reg 5");
    end
    // command pulses
    @(negedge clk); wr_en = 1; wr_addr = 6; wr_data = 32'h5;
    @(negedge clk); wr_en = 0;
    chk(conv_start && fc_start && !fc_layer_init, "start pulses");
    @(negedge clk);
    chk(!conv_start && !fc_start, "pulses last one cycle");
    wr(6, 32'h2);
    // done handling
    chk(!irq, "no irq before done");
    @(negedge clk); conv_done = 1; conv_busy = 0; fc_busy = 1; fc_kernels_loaded = 4'd3;
    @(negedge clk); conv_done = 0;
    rd_addr = 7; #1;
    chk(rd_data == 32'h36 && irq, $sformatf("status %h", rd_data));
    @(negedge clk); fc_done = 1; fc_busy = 0;
    @(negedge clk); fc_done = 0;
    #1 chk(rd_data[3:2] == 2'b11, "both done sticky");
    wr(6, 32'h1);
    #1 chk(rd_data[3:2] == 2'b10 && irq, "conv start clears conv done");
    wr(6, 32'h4);
    #1 chk(rd_data[3:2] == 2'b00 && !irq, "fc start clears fc done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
