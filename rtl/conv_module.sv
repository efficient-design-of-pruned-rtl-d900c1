// conv_module: the convolutional module of the accelerator.
//
// It holds one feature map memory (FMM) per line of cores and one weight
// memory per column, the address generator and the PE cluster (document
// Fig. 1 and Fig. 2). One pass convolves the kernels held in the weight
// memories (one per column) with the input maps held in the FMMs and streams
// the activated, optionally pooled outputs of each line towards the DMA.
// As the document describes, layers with more kernels than columns repeat the
// pass after loading new weights, and maps too large for the FMMs are split.
//
// Loading (before `start`, while `busy` is low):
//  * fmm_*: DMA beats carrying (line, word address, 64-bit word) for the FMMs.
//    Every FMM is addressed alike by the shared address generator, so each
//    line's FMM holds the band of input rows its output rows need; how the
//    map is split between lines is this design's choice.
//  * w_*: the kernels in sequence, cfg.kwords 64-bit words each, kernel c
//    going to column c. The pointer rewinds after each pass.
// Outputs: per line, one 8-bit result per cycle at most, tagged with its
// kernel (column); results come out in output-position order, kernels 0..COLS-1
// for each position. `stall` marks cycles the address generator waits for a
// result chain. `done` pulses once the last result has left.
module conv_module
  import cnn_pkg::*;
#(
  parameter int unsigned LINES     = 7,
  parameter int unsigned COLS      = 16,
  parameter int unsigned FMM_WORDS = 2048,
  parameter int unsigned W_WORDS   = 512
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  conv_cfg_t               cfg,
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  output logic                    stall,
  // feature map load
  input  logic                    fmm_valid,
  input  dma_beat_t               fmm_beat,
  output logic                    fmm_ready,
  // weight load
  input  logic                    w_valid,
  input  word_t                   w_data,
  output logic                    w_ready,
  // output feature maps, one stream per line
  output logic                    out_valid  [LINES],
  output data_t                   out_data   [LINES],
  output logic [$clog2(COLS)-1:0] out_kernel [LINES]
);

  localparam int unsigned AW  = $clog2(FMM_WORDS);
  localparam int unsigned WAW = $clog2(W_WORDS);
  localparam int unsigned CW  = (COLS > 1) ? $clog2(COLS) : 1;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_t;
  state_t state;

  logic           ag_valid, ag_first, ag_last, ag_wf, ag_wl, ag_done, ag_busy;
  logic [AW-1:0]  ag_faddr;
  logic [WAW-1:0] ag_waddr;
  logic           p_valid, p_first, p_last, p_wf, p_wl;
  word_t          act [LINES];
  word_t          wgt [COLS];
  logic           cl_busy;
  logic [7:0]     drain;
  logic [WAW-1:0] wl_ptr;
  logic [CW-1:0]  wl_col;

  assign busy      = (state != S_IDLE);
  assign fmm_ready = !busy;
  assign w_ready   = !busy;

  conv_addr_gen #(.AW(AW), .WAW(WAW), .COLS(COLS)) u_ag (
    .clk, .rst_n, .start(start && state == S_IDLE), .cfg,
    .busy(ag_busy), .valid(ag_valid), .fmm_addr(ag_faddr), .w_addr(ag_waddr),
    .first(ag_first), .last(ag_last), .win_first(ag_wf), .win_last(ag_wl),
    .stall, .done(ag_done)
  );

  for (genvar l = 0; l < LINES; l++) begin : g_fmm
    sdp_ram #(.DEPTH(FMM_WORDS), .W(WORD_W)) u_fmm (
      .clk,
      .we(fmm_valid && fmm_ready && fmm_beat.line == 8'(l)),
      .waddr(AW'(fmm_beat.addr)), .wdata(fmm_beat.data),
      .re(ag_valid), .raddr(ag_faddr), .rdata(act[l])
    );
  end

  for (genvar c = 0; c < COLS; c++) begin : g_wmem
    sdp_ram #(.DEPTH(W_WORDS), .W(WORD_W)) u_wmem (
      .clk,
      .we(w_valid && w_ready && wl_col == CW'(c)),
      .waddr(wl_ptr), .wdata(w_data),
      .re(ag_valid), .raddr(ag_waddr), .rdata(wgt[c])
    );
  end

  // sequential weight loader
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wl_ptr <= '0; wl_col <= '0;
    end else if (done) begin
      wl_ptr <= '0; wl_col <= '0;
    end else if (w_valid && w_ready) begin
      if (wl_ptr == WAW'(cfg.kwords - 12'd1)) begin
        wl_ptr <= '0;
        wl_col <= wl_col + 1'b1;
      end else begin
        wl_ptr <= wl_ptr + 1'b1;
      end
    end
  end

  // control flags follow the one-cycle memory read
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid <= 1'b0; p_first <= 1'b0; p_last <= 1'b0; p_wf <= 1'b0; p_wl <= 1'b0;
    end else begin
      p_valid <= ag_valid; p_first <= ag_first; p_last <= ag_last;
      p_wf    <= ag_wf;    p_wl    <= ag_wl;
    end
  end

  conv_cluster #(.LINES(LINES), .COLS(COLS)) u_cluster (
    .clk, .rst_n, .valid(p_valid), .first(p_first), .last(p_last),
    .win_first(p_wf), .win_last(p_wl), .act, .wgt,
    .shift(cfg.shift), .relu(cfg.relu), .busy(cl_busy),
    .out_valid, .out_data, .out_kernel
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; drain <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE:  if (start) state <= S_RUN;
        S_RUN:   if (ag_done) begin state <= S_DRAIN; drain <= 8'd4; end
        S_DRAIN: begin
          if (drain != 0) drain <= drain - 8'd1;
          else if (!cl_busy) begin state <= S_IDLE; done <= 1'b1; end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the address generator runs only inside a pass
  a_gen_in_run: assert property (@(posedge clk) disable iff (!rst_n) ag_busy |-> state == S_RUN);

endmodule
