// fc_module: fully connected module with block-pruned kernels and image batch.
//
// The module computes dense layers for a batch of LINES images at once: line l
// of the core matrix holds image l in its batch memory, and the CORES cores of
// a line each compute the inner product of that image with a different kernel
// (document Fig. 6). Kernels are block pruned: only blocks of BS consecutive
// weights survive, each with a 4-bit index giving its distance from the
// previous surviving block. Per kernel, an index FIFO and an address generator
// turn those indexes into batch-memory read addresses, so every weight word
// read from a weight memory meets exactly the activations it multiplies and no
// cycle is spent on pruned weights. All lines receive the same addresses.
//
// Operation, one pass per group of CORES kernels:
//  1. `layer_init` (once per layer) points the output packers at cfg.out_base.
//  2. The DMA writes the batch memories (bm_*, line and word address given per
//     beat) and streams the CORES pruned kernels (k_*), see fc_index_loader.
//  3. `start`: every core pops its FIFO once per cycle while it is not empty;
//     kernels of different lengths are allowed, the pass ends when all cores
//     are done. Then each line's results, kernel 0 first, go through
//     shift_relu and the output packer, which writes the outputs back to the
//     line's batch memory (input of the next dense layer) and to out_*.
//  4. `done` pulses. Kernel and batch loads are accepted only while idle, and
//     the kernel stream is also held while an index FIFO is full.
// Timing: a pass with at most N weight words per kernel takes N + CORES + 5
// cycles from `start` to `done`.
//
// BS is the static block size (1, 2, 4 or 8); CORES must divide 8.
module fc_module
  import cnn_pkg::*;
#(
  parameter int unsigned LINES    = 2,
  parameter int unsigned CORES    = 1,
  parameter int unsigned BS       = 8,
  parameter int unsigned BM_WORDS = 2048,
  parameter int unsigned W_WORDS  = 2048
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  fc_cfg_t                    cfg,
  input  logic                       layer_init,
  input  logic                       start,
  output logic                       busy,
  output logic                       done,
  output logic [$clog2(CORES+1)-1:0] kernels_loaded,
  // batch memory load
  input  logic                       bm_valid,
  input  dma_beat_t                  bm_beat,
  output logic                       bm_ready,
  // pruned kernel stream
  input  logic                       k_valid,
  input  word_t                      k_data,
  output logic                       k_ready,
  // output vectors towards the DMA, one stream per line
  output logic                       out_valid [LINES],
  output logic [$clog2(BM_WORDS)-1:0] out_addr [LINES],
  output word_t                      out_data  [LINES]
);

  localparam int unsigned G    = 8 / BS;
  localparam int unsigned RAW  = $clog2(BM_WORDS * G);
  localparam int unsigned BAW  = $clog2(BM_WORDS);
  localparam int unsigned WAW  = $clog2(W_WORDS);
  localparam int unsigned NRP  = CORES * G;
  localparam int unsigned CW   = (CORES > 1) ? $clog2(CORES) : 1;

  typedef enum logic [1:0] {F_IDLE, F_RUN, F_WB} fstate_t;
  fstate_t state;

  // loader
  logic [CORES-1:0]   w_we, f_push;
  logic [WAW-1:0]     w_waddr;
  word_t              w_wdata;
  logic [G*IDX_W-1:0] f_data;

  // per core
  logic [G*IDX_W-1:0] f_dout  [CORES];
  logic               f_empty [CORES];
  logic               f_full  [CORES];
  logic               pop     [CORES];
  logic [RAW-1:0]     ag_addr [CORES][G];
  logic [RAW-1:0]     raddr   [NRP];
  logic [WAW-1:0]     wrptr   [CORES];
  word_t              wgt     [CORES];
  logic               en_q    [CORES];
  logic               any_pop, any_en;

  // per line
  logic [BS*DATA_W-1:0] rdata [LINES][NRP];
  word_t              act     [LINES][CORES];
  acc_t               acc     [LINES][CORES];
  acc_t               res_unused [LINES][CORES];
  logic               rv_unused  [LINES][CORES];
  data_t              act_out [LINES];
  logic               pk_we   [LINES];
  logic [BAW-1:0]     pk_addr [LINES];
  word_t              pk_data [LINES];

  logic [CW:0]        wb_cnt;
  logic [CW-1:0]      wb_idx;
  logic               wb_valid;
  logic               running;

  assign busy     = (state != F_IDLE);
  assign bm_ready = !busy;
  assign running  = (state == F_RUN);

  // a full index FIFO (its weight memory is then full too) holds the kernel stream
  logic any_full;
  always_comb begin
    any_full = 1'b0;
    for (int c = 0; c < CORES; c++) any_full |= f_full[c];
  end

  fc_index_loader #(.BS(BS), .CORES(CORES), .W_WORDS(W_WORDS)) u_loader (
    .clk, .rst_n, .enable(!busy && !any_full), .clear(done),
    .in_valid(k_valid), .in_data(k_data), .in_ready(k_ready),
    .w_we, .w_addr(w_waddr), .w_data(w_wdata),
    .f_push, .f_data, .kernels_loaded
  );

  always_comb begin
    any_pop = 1'b0;
    any_en  = 1'b0;
    for (int c = 0; c < int'(CORES); c++) begin
      pop[c]  = running && !f_empty[c];
      any_pop = any_pop || pop[c];
      any_en  = any_en || en_q[c];
      for (int g = 0; g < int'(G); g++) raddr[c*G + g] = ag_addr[c][g];
    end
  end

  for (genvar c = 0; c < CORES; c++) begin : g_core
    index_fifo #(.W(G*IDX_W), .DEPTH(W_WORDS)) u_fifo (
      .clk, .rst_n, .push(f_push[c]), .din(f_data),
      .pop(pop[c]), .dout(f_dout[c]), .empty(f_empty[c]), .full(f_full[c])
    );
    fc_addr_gen #(.G(G), .AW(RAW)) u_ag (
      .clk, .rst_n, .init(start && state == F_IDLE), .base(RAW'(cfg.in_base)),
      .step(pop[c]), .idx(f_dout[c]), .addr(ag_addr[c])
    );
    sdp_ram #(.DEPTH(W_WORDS), .W(WORD_W)) u_wmem (
      .clk, .we(w_we[c]), .waddr(w_waddr), .wdata(w_wdata),
      .re(pop[c]), .raddr(wrptr[c]), .rdata(wgt[c])
    );
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        wrptr[c] <= '0; en_q[c] <= 1'b0;
      end else begin
        en_q[c] <= pop[c];
        if (start && state == F_IDLE) wrptr[c] <= '0;
        else if (pop[c])             wrptr[c] <= wrptr[c] + 1'b1;
      end
    end
  end

  for (genvar l = 0; l < LINES; l++) begin : g_line
    batch_mem #(.WORDS(BM_WORDS), .BS(BS), .CORES(CORES)) u_bm (
      .clk,
      .we((bm_valid && bm_ready && bm_beat.line == 8'(l)) || pk_we[l]),
      .waddr(pk_we[l] ? pk_addr[l] : BAW'(bm_beat.addr)),
      .wdata(pk_we[l] ? pk_data[l] : bm_beat.data),
      .re(any_pop), .raddr, .rdata(rdata[l])
    );
    for (genvar c = 0; c < CORES; c++) begin : g_pe
      // the G blocks read for core c form its 64-bit activation word
      for (genvar g = 0; g < G; g++) begin : g_blk
        assign act[l][c][g*BS*DATA_W +: BS*DATA_W] = rdata[l][c*G + g];
      end
      pe_core u_pe (
        .clk, .rst_n, .clr(start && state == F_IDLE), .en(en_q[c]),
        .first(1'b0), .last(1'b0), .act(act[l][c]), .wgt(wgt[c]),
        .acc(acc[l][c]), .result(res_unused[l][c]), .res_valid(rv_unused[l][c])
      );
    end
    shift_relu u_sr (
      .din(acc[l][wb_idx]), .shift(cfg.shift), .relu(cfg.relu), .dout(act_out[l])
    );
    fc_out_pack #(.AW(BAW)) u_pack (
      .clk, .rst_n, .init(layer_init), .base(BAW'(cfg.out_base)),
      .in_valid(wb_valid), .in_data(act_out[l]),
      .wr_valid(pk_we[l]), .wr_addr(pk_addr[l]), .wr_data(pk_data[l])
    );
    assign out_valid[l] = pk_we[l];
    assign out_addr[l]  = pk_addr[l];
    assign out_data[l]  = pk_data[l];
  end

  assign wb_valid = (state == F_WB) && (wb_cnt < (CW+1)'(CORES));
  assign wb_idx   = wb_valid ? CW'(wb_cnt) : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= F_IDLE; wb_cnt <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        F_IDLE: if (start) state <= F_RUN;
        // the cycle after the start pulse the FIFOs are read; the pass is
        // over once no core pops and the last MAC has been taken
        F_RUN:  if (!any_pop && !any_en) begin state <= F_WB; wb_cnt <= '0; end
        F_WB: begin
          if (wb_cnt < (CW+1)'(CORES)) wb_cnt <= wb_cnt + 1'b1;
          else begin state <= F_IDLE; done <= 1'b1; end
        end
        default: state <= F_IDLE;
      endcase
    end
  end

endmodule
