// cnn_pkg: types and constants shared by the accelerator.
//
// All datapaths move 64-bit words holding eight signed 8-bit values
// (activations or weights). The 64-bit word width, the 8-bit data and the
// 4-bit relative block indexes follow the document; the accumulator width, the
// configuration field widths and the DMA beat format are this design's own
// choices.
package cnn_pkg;

  localparam int unsigned DATA_W = 8;              // activation / weight width
  localparam int unsigned LANES  = 8;              // MACs per core (64-bit word)
  localparam int unsigned WORD_W = DATA_W * LANES; // 64-bit memory and DMA word
  localparam int unsigned ACC_W  = 32;             // core accumulator width
  localparam int unsigned IDX_W  = 4;              // relative block index width
  localparam int unsigned IDX_PER_WORD = WORD_W / IDX_W; // 16 indexes per word

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic        [WORD_W-1:0] word_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // One beat of a DMA read stream. Loaders that fill memories sequentially
  // ignore addr and line; the feature-map and batch-memory loaders use them.
  typedef struct packed {
    logic [7:0]  line;   // target line (FMM or batch memory index)
    logic [15:0] addr;   // target word address
    word_t       data;
  } dma_beat_t;

  // Configuration of one pass of the convolutional module. Sizes are in
  // activations except zpw, the number of 64-bit words per (x, y) position
  // (z_p / 8). Output sizes count pooled outputs when pooling is on.
  typedef struct packed {
    logic [15:0] xp;        // input map width held in each FMM
    logic [7:0]  zpw;       // input maps / 8
    logic [3:0]  xk;        // kernel width
    logic [3:0]  yk;        // kernel height
    logic [2:0]  stride;    // convolution stride
    logic [1:0]  pool;      // pooling window side (1 = no pooling)
    logic [1:0]  pstride;   // pooling stride
    logic [7:0]  ox;        // outputs per output row
    logic [7:0]  oy;        // output rows per line
    logic [4:0]  shift;     // fixed-point scale: right shift of the sum
    logic        relu;      // apply ReLU
    logic [11:0] kwords;    // kernel length in 64-bit words (yk*xk*zpw)
  } conv_cfg_t;

  // Configuration of one layer of the fully connected module.
  typedef struct packed {
    logic [15:0] in_base;   // first read address of the input vector (block units)
    logic [15:0] out_base;  // first 64-bit word address of the output vector
    logic [4:0]  shift;     // fixed-point scale: right shift of the sum
    logic        relu;      // apply ReLU
  } fc_cfg_t;

endpackage
