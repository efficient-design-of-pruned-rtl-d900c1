// fc_index_loader: index memory loader of the fully connected module
// (document Fig. 5, Fig. 7 and Fig. 8: "Register" and "MUX").
//
// Pruned kernels arrive from the DMA one after the other as 64-bit words laid
// out as in the document's kernel organisation: a header, then an index word
// of sixteen 4-bit relative indexes followed by the weight words of those
// sixteen blocks (2*BS words), repeated. The index word is held in a register;
// with each following weight word a multiplexer picks the next group of
// G = 8/BS indexes (the blocks stored in that weight word) and pushes it into
// the FIFO of the kernel being loaded, while the weight word is written to that
// kernel's weight memory. Kernel c of a pass goes to core column c.
//
// Header (this design's reading of the two "size of kernel" words): word 0 is
// the number of stored blocks Nb, from which the loader takes the number of
// weight words ceil(Nb/G); word 1 is not used by the hardware. A last partial
// weight word is zero-padded and its unused indexes are zero, so the padding
// adds nothing to the sum.
//
// Handshake: a word is taken when `in_valid && in_ready`; `in_ready` follows
// `enable` (the module is idle). `kernels_loaded` counts complete kernels since the last `clear`.
module fc_index_loader
  import cnn_pkg::*;
#(
  parameter int unsigned BS      = 8,
  parameter int unsigned CORES   = 1,
  parameter int unsigned W_WORDS = 2048,
  parameter int unsigned G       = 8 / BS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       enable,
  input  logic                       clear,
  input  logic                       in_valid,
  input  word_t                      in_data,
  output logic                       in_ready,
  // weight memory write, shared address/data, one enable per core
  output logic [CORES-1:0]           w_we,
  output logic [$clog2(W_WORDS)-1:0] w_addr,
  output word_t                      w_data,
  // index FIFO push, one per core
  output logic [CORES-1:0]           f_push,
  output logic [G*IDX_W-1:0]         f_data,
  output logic [$clog2(CORES+1)-1:0] kernels_loaded
);

  localparam int unsigned GPW = IDX_PER_WORD / G;   // weight words per index word
  localparam int unsigned WAW = $clog2(W_WORDS);
  localparam int unsigned CW  = (CORES > 1) ? $clog2(CORES) : 1;

  typedef enum logic [1:0] {L_HDR0, L_HDR1, L_IDX, L_WGT} lstate_t;
  lstate_t state;

  word_t               idx_reg;
  logic [$clog2(GPW+1)-1:0] gsel;
  logic [15:0]         words_left;
  logic [WAW-1:0]      wptr;
  logic [CW-1:0]       kern;
  logic                take;
  logic [15:0]         nwords;

  assign in_ready = enable;
  assign take     = in_valid && in_ready;
  assign w_data   = in_data;
  assign w_addr   = wptr;
  assign f_data   = idx_reg[gsel*G*IDX_W +: G*IDX_W];
  assign nwords   = 16'((in_data[15:0] + 16'(G - 1)) / 16'(G));

  always_comb begin
    w_we   = '0;
    f_push = '0;
    if (take && state == L_WGT) begin
      w_we[kern]   = 1'b1;
      f_push[kern] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= L_HDR0; idx_reg <= '0; gsel <= '0; words_left <= '0;
      wptr <= '0; kern <= '0; kernels_loaded <= '0;
    end else begin
      if (clear) kernels_loaded <= '0;
      if (take) begin
        unique case (state)
          L_HDR0: begin
            words_left <= nwords;
            state      <= L_HDR1;
          end
          L_HDR1: begin
            wptr <= '0;
            if (words_left == 0) begin
              state          <= L_HDR0;
              kern           <= (kern == CW'(CORES-1)) ? '0 : kern + 1'b1;
              kernels_loaded <= (clear ? '0 : kernels_loaded) + 1'b1;
            end else begin
              state <= L_IDX;
            end
          end
          L_IDX: begin
            idx_reg <= in_data;
            gsel    <= '0;
            state   <= L_WGT;
          end
          L_WGT: begin
            wptr       <= wptr + 1'b1;
            gsel       <= gsel + 1'b1;
            words_left <= words_left - 16'd1;
            if (words_left == 16'd1) begin
              state          <= L_HDR0;
              kern           <= (kern == CW'(CORES-1)) ? '0 : kern + 1'b1;
              kernels_loaded <= (clear ? '0 : kernels_loaded) + 1'b1;
            end else if (gsel == ($clog2(GPW+1))'(GPW - 1)) begin
              state <= L_IDX;
            end
          end
          default: state <= L_HDR0;
        endcase
      end
    end
  end

endmodule
