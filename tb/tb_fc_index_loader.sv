// tb_fc_index_loader: self-checking test of fc_index_loader with block size 8
// and two cores and with block size 2 and one core. Random pruned kernels are
// streamed (with idle cycles); the testbench checks every weight-memory write
// (core, address, data) and every FIFO push (core, index group) against the
// stream it sent, and the count of loaded kernels.
module tb_fc_index_loader;
  import cnn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, enable, clear;
  word_t in_data;
  logic ready8, ready2;
  logic [1:0] we8, push8;
  logic [0:0] we2, push2;
  logic [5:0] wa8, wa2;
  word_t wd8, wd2;
  logic [3:0] fd8;
  logic [15:0] fd2;
  logic [1:0] kl8;
  logic [0:0] kl2;

  fc_index_loader #(.BS(8), .CORES(2), .W_WORDS(64)) d8 (
    .clk, .rst_n, .enable, .clear, .in_valid, .in_data, .in_ready(ready8),
    .w_we(we8), .w_addr(wa8), .w_data(wd8), .f_push(push8), .f_data(fd8), .kernels_loaded(kl8));
  fc_index_loader #(.BS(2), .CORES(1), .W_WORDS(64)) d2 (
    .clk, .rst_n, .enable, .clear, .in_valid, .in_data, .in_ready(ready2),
    .w_we(we2), .w_addr(wa2), .w_data(wd2), .f_push(push2), .f_data(fd2), .kernels_loaded(kl2));

  typedef struct {int core; int addr; word_t w; logic [15:0] idx;} ev_t;
  ev_t q8 [$], q2 [$];
  int phase = 0;   // 0: block size 8 loader checked, 1: block size 2 loader

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (phase == 0 && (we8 != 0 || push8 != 0)) begin
      ev_t e;
      checks++;
      if (q8.size() == 0) begin failures++; $display("FAIL: BS8 extra write"); end
      else begin
        e = q8.pop_front();
        if (we8 != 2'(1 << e.core) || push8 != we8 || int'(wa8) != e.addr || wd8 != e.w || fd8 != e.idx[3:0]) begin
          failures++; $display("FAIL: BS8 core %0d addr %0d idx %h (exp %0d %0d %h)", we8, wa8, fd8, e.core, e.addr, e.idx[3:0]);
        end
      end
    end
    if (phase == 1 && (we2 != 0 || push2 != 0)) begin
      ev_t e;
      checks++;
      if (q2.size() == 0) begin failures++; $display("FAIL: BS2 extra write"); end
      else begin
        e = q2.pop_front();
        if (push2 != we2 || int'(wa2) != e.addr || wd2 != e.w || fd2 != e.idx) begin
          failures++; $display("FAIL: BS2 addr %0d idx %h (exp %0d %h)", wa2, fd2, e.addr, e.idx);
        end
      end
    end
  end

  task automatic send(word_t w);
    @(negedge clk);
    while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
    in_valid = 1; in_data = w;
  endtask

  // stream one kernel of nb blocks; record expected events for both loaders
  // (they see the same words, so block counts are given per loader)
  task automatic kernel8(int nb, int core);
    word_t iw;
    send(word_t'(nb)); send(word_t'(999));
    for (int w = 0; w < nb; w++) begin
      if (w % 16 == 0) begin iw = {$urandom, $urandom}; send(iw); end
      begin
        ev_t e; e.core = core; e.addr = w; e.w = {$urandom, $urandom}; e.idx = 16'(iw[4*(w % 16) +: 4]);
        q8.push_back(e);
        send(e.w);
      end
    end
  endtask

  task automatic kernel2(int nb);
    word_t iw;
    int nw = (nb + 3) / 4;
    send(word_t'(nb)); send(word_t'(999));
    for (int w = 0; w < nw; w++) begin
      if (w % 4 == 0) begin iw = {$urandom, $urandom}; send(iw); end
      begin
        ev_t e; e.core = 0; e.addr = w; e.w = {$urandom, $urandom}; e.idx = iw[16*(w % 4) +: 16];
        q2.push_back(e);
        send(e.w);
      end
    end
  endtask

  initial begin
    int nb;
    in_valid = 0; in_data = 0; enable = 1; clear = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // block size 8, two cores: lengths 0, 1, 16, 17, 40 ...
    for (int k = 0; k < 8; k++) begin
      nb = (k == 0) ? 0 : (k == 1) ? 1 : (k == 2) ? 16 : (k == 3) ? 17 : $urandom_range(1, 60);
      kernel8(nb, k % 2);
      @(negedge clk); in_valid = 0;
      @(negedge clk);
      checks++;
      if (int'(kl8) != k % 2 + 1) begin failures++; $display("FAIL: kernels_loaded %0d", kl8); end
      if (k % 2 == 1) begin clear = 1; @(negedge clk); clear = 0; end
    end
    @(negedge clk); in_valid = 0;
    // block size 2 loader, checked alone from a reset
    checks++;
    if (q8.size() != 0) begin failures++; $display("FAIL: BS8 events missing"); end
    phase = 1;
    rst_n = 0; @(negedge clk); rst_n = 1;
    q8.delete();
    enable = 1;
    for (int k = 0; k < 4; k++) begin
      nb = (k == 0) ? 5 : (k == 1) ? 64 : $urandom_range(1, 200);
      kernel2(nb);
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (q2.size() != 0) begin failures++; $display("FAIL: BS2 events missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
