// tb_dma_switch: self-checking test of dma_switch. For random route tables
// (each source used by at most one destination) and random valid/ready
// patterns it checks every destination's valid and beat and every source's
// ready against the table.
module tb_dma_switch;
  import cnn_pkg::*;
  int checks = 0, failures = 0;
  logic route_en [4];
  logic [1:0] route_src [4];
  logic src_valid [4], src_ready [4], dst_valid [4], dst_ready [4];
  dma_beat_t src_beat [4], dst_beat [4];

  dma_switch #(.NSRC(4), .NDST(4)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm [4];
    for (int t = 0; t < 2000; t++) begin
      perm = '{0, 1, 2, 3};
      perm.shuffle();
      for (int d = 0; d < 4; d++) begin
        route_en[d] = ($urandom_range(0, 4) != 0);
        route_src[d] = 2'(perm[d]);
        dst_ready[d] = 1'($urandom);
      end
      for (int s = 0; s < 4; s++) begin
        src_valid[s] = 1'($urandom);
        src_beat[s] = {8'($urandom), 16'($urandom), $urandom, $urandom};
      end
      #1;
      for (int d = 0; d < 4; d++) begin
        checks++;
        if (dst_valid[d] != (route_en[d] && src_valid[perm[d]]) ||
            (route_en[d] && dst_beat[d] != src_beat[perm[d]])) begin
          failures++; $display("FAIL: destination %0d", d);
        end
      end
      for (int s = 0; s < 4; s++) begin
        bit exp;
        exp = 0;
        for (int d = 0; d < 4; d++) if (route_en[d] && perm[d] == s && dst_ready[d]) exp = 1;
        checks++;
        if (src_ready[s] != exp) begin failures++; $display("FAIL: source %0d ready", s); end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
