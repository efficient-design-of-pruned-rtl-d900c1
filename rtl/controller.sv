// controller: configuration registers and command decoder between the
// processor and the two modules (document Fig. 1, "Controller" and the
// modules' "Config. Control").
//
// Before a layer runs, the processor writes the layer's features (sizes,
// addresses, fixed-point shift, activation, pooling) into the configuration
// registers; the modules read them from the registers while they run. The
// register map is this design's choice, 32-bit registers on a simple write and
// read bus:
//   0..2  conv_cfg_t, least significant bits in register 0
//   3..4  fc_cfg_t,   least significant bits in register 3
//   5     DMA route table: destination d in bits [4d+2:4d] as {enable, src[1:0]}
//   6     command (write only, pulses): bit 0 start conv pass, bit 1 FC layer
//         init, bit 2 start FC pass
//   7     status (read only): bit 0 conv busy, bit 1 FC busy, bit 2 conv done,
//         bit 3 FC done, bits [7:4] pruned kernels loaded into the FC module
//         since its last pass. Done bits are sticky, cleared by the next start.
// `irq` is high while any done bit is set. Register reads are combinational.
module controller
  import cnn_pkg::*;
#(
  parameter int unsigned NDST = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  logic [2:0]  wr_addr,
  input  logic [31:0] wr_data,
  input  logic [2:0]  rd_addr,
  output logic [31:0] rd_data,
  output conv_cfg_t   conv_cfg,
  output fc_cfg_t     fc_cfg,
  output logic        route_en  [NDST],
  output logic [1:0]  route_src [NDST],
  output logic        conv_start,
  output logic        fc_layer_init,
  output logic        fc_start,
  input  logic        conv_busy,
  input  logic        conv_done,
  input  logic        fc_busy,
  input  logic        fc_done,
  input  logic [3:0]  fc_kernels_loaded,
  output logic        irq
);

  logic [95:0] conv_q;
  logic [63:0] fc_q;
  logic [31:0] route_q;
  logic        conv_done_q, fc_done_q;

  assign conv_cfg = conv_q[$bits(conv_cfg_t)-1:0];
  assign fc_cfg   = fc_q[$bits(fc_cfg_t)-1:0];
  assign irq      = conv_done_q || fc_done_q;

  always_comb begin
    for (int d = 0; d < int'(NDST); d++) begin
      route_en[d]  = route_q[4*d + 2];
      route_src[d] = route_q[4*d +: 2];
    end
    unique case (rd_addr)
      3'd0: rd_data = conv_q[31:0];
      3'd1: rd_data = conv_q[63:32];
      3'd2: rd_data = conv_q[95:64];
      3'd3: rd_data = fc_q[31:0];
      3'd4: rd_data = fc_q[63:32];
      3'd5: rd_data = route_q;
      3'd7: rd_data = {24'd0, fc_kernels_loaded, fc_done_q, conv_done_q, fc_busy, conv_busy};
      default: rd_data = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      conv_q <= '0; fc_q <= '0; route_q <= '0;
      conv_start <= 1'b0; fc_layer_init <= 1'b0; fc_start <= 1'b0;
      conv_done_q <= 1'b0; fc_done_q <= 1'b0;
    end else begin
      conv_start    <= 1'b0;
      fc_layer_init <= 1'b0;
      fc_start      <= 1'b0;
      if (conv_done) conv_done_q <= 1'b1;
      if (fc_done)   fc_done_q   <= 1'b1;
      if (wr_en) begin
        unique case (wr_addr)
          3'd0: conv_q[31:0]  <= wr_data;
          3'd1: conv_q[63:32] <= wr_data;
          3'd2: conv_q[95:64] <= wr_data;
          3'd3: fc_q[31:0]    <= wr_data;
          3'd4: fc_q[63:32]   <= wr_data;
          3'd5: route_q       <= wr_data;
          3'd6: begin
            conv_start    <= wr_data[0];
            fc_layer_init <= wr_data[1];
            fc_start      <= wr_data[2];
            if (wr_data[0]) conv_done_q <= 1'b0;
            if (wr_data[2]) fc_done_q   <= 1'b0;
          end
          default: ;
        endcase
      end
    end
  end

  // the route table must not give one DMA source to two destinations
  for (genvar a = 0; a < NDST; a++) begin : g_chk
    for (genvar b = a + 1; b < NDST; b++) begin : g_pair
      a_one_owner: assert property (@(posedge clk) disable iff (!rst_n)
        !(route_en[a] && route_en[b] && route_src[a] == route_src[b]));
    end
  end

endmodule
