// cnn_accel_top: CNN inference accelerator with block-pruned dense layers.
//
// Two independent modules share the DMA channels (document Fig. 1): the
// convolutional module (a LINES x COLS matrix of 8-MAC cores, feature map and
// weight memories, address generator, Shift/ReLU/Pool per line) and the fully
// connected module (a batch of FC_LINES images times FC_CORES kernels, block
// pruned kernels of static block size BS, index FIFOs and address generators,
// replicated batch memories, Shift/ReLU and output concatenation). A
// controller holds the layer configurations written by the processor and
// starts the modules; a switch steers NDMA DMA read streams into the modules'
// memories. The DMA engines, the processor and the external memory are not
// part of this RTL: their streams and bus are ports here.
//
// Switch destinations: 0 conv feature maps, 1 conv weights, 2 FC batch
// memories, 3 FC pruned kernels. Output feature maps leave on conv_out_* (one
// 8-bit stream per line) and fc_out_* (64-bit words per batch line, also kept
// in the batch memories for the next dense layer).
//
// Default sizes follow the document's ZYNQ7020 configuration with block size
// 8 and 90% pruning: 16 x 7 convolution cores, 1 x 2 fully connected cores
// (batch of two), 64-bit memories, 2048-word batch memories (11-bit block
// addresses). Memory depths the document does not give are this design's.
module cnn_accel_top
  import cnn_pkg::*;
#(
  parameter int unsigned CONV_LINES = 7,
  parameter int unsigned CONV_COLS  = 16,
  parameter int unsigned FMM_WORDS  = 2048,
  parameter int unsigned CW_WORDS   = 512,
  parameter int unsigned FC_LINES   = 2,
  parameter int unsigned FC_CORES   = 1,
  parameter int unsigned BS         = 8,
  parameter int unsigned BM_WORDS   = 2048,
  parameter int unsigned FW_WORDS   = 2048,
  parameter int unsigned NDMA       = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor register bus
  input  logic        host_wr_en,
  input  logic [2:0]  host_wr_addr,
  input  logic [31:0] host_wr_data,
  input  logic [2:0]  host_rd_addr,
  output logic [31:0] host_rd_data,
  output logic        irq,
  // DMA read streams
  input  logic        dma_valid [NDMA],
  input  dma_beat_t   dma_beat  [NDMA],
  output logic        dma_ready [NDMA],
  // convolution output feature maps
  output logic        conv_out_valid  [CONV_LINES],
  output data_t       conv_out_data   [CONV_LINES],
  output logic [$clog2(CONV_COLS)-1:0] conv_out_kernel [CONV_LINES],
  output logic        conv_stall,
  // dense layer outputs
  output logic        fc_out_valid [FC_LINES],
  output logic [$clog2(BM_WORDS)-1:0] fc_out_addr [FC_LINES],
  output word_t       fc_out_data  [FC_LINES]
);

  localparam int unsigned NDST = 4;

  conv_cfg_t  conv_cfg;
  fc_cfg_t    fc_cfg;
  logic       route_en  [NDST];
  logic [1:0] route_src [NDST];
  logic       conv_start, fc_layer_init, fc_start;
  logic       conv_busy, conv_done, fc_busy, fc_done;
  logic       dst_valid [NDST];
  dma_beat_t  dst_beat  [NDST];
  logic       dst_ready [NDST];
  logic [$clog2(FC_CORES+1)-1:0] fc_kernels_loaded;

  controller #(.NDST(NDST)) u_ctrl (
    .clk, .rst_n,
    .wr_en(host_wr_en), .wr_addr(host_wr_addr), .wr_data(host_wr_data),
    .rd_addr(host_rd_addr), .rd_data(host_rd_data),
    .conv_cfg, .fc_cfg, .route_en, .route_src,
    .conv_start, .fc_layer_init, .fc_start,
    .conv_busy, .conv_done, .fc_busy, .fc_done,
    .fc_kernels_loaded(4'(fc_kernels_loaded)), .irq
  );

  dma_switch #(.NSRC(NDMA), .NDST(NDST), .SW(2)) u_switch (
    .route_en, .route_src,
    .src_valid(dma_valid), .src_beat(dma_beat), .src_ready(dma_ready),
    .dst_valid, .dst_beat, .dst_ready
  );

  conv_module #(
    .LINES(CONV_LINES), .COLS(CONV_COLS), .FMM_WORDS(FMM_WORDS), .W_WORDS(CW_WORDS)
  ) u_conv (
    .clk, .rst_n, .cfg(conv_cfg), .start(conv_start),
    .busy(conv_busy), .done(conv_done), .stall(conv_stall),
    .fmm_valid(dst_valid[0]), .fmm_beat(dst_beat[0]), .fmm_ready(dst_ready[0]),
    .w_valid(dst_valid[1]), .w_data(dst_beat[1].data), .w_ready(dst_ready[1]),
    .out_valid(conv_out_valid), .out_data(conv_out_data), .out_kernel(conv_out_kernel)
  );

  fc_module #(
    .LINES(FC_LINES), .CORES(FC_CORES), .BS(BS), .BM_WORDS(BM_WORDS), .W_WORDS(FW_WORDS)
  ) u_fc (
    .clk, .rst_n, .cfg(fc_cfg), .layer_init(fc_layer_init), .start(fc_start),
    .busy(fc_busy), .done(fc_done), .kernels_loaded(fc_kernels_loaded),
    .bm_valid(dst_valid[2]), .bm_beat(dst_beat[2]), .bm_ready(dst_ready[2]),
    .k_valid(dst_valid[3]), .k_data(dst_beat[3].data), .k_ready(dst_ready[3]),
    .out_valid(fc_out_valid), .out_addr(fc_out_addr), .out_data(fc_out_data)
  );

endmodule
