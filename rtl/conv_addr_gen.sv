// conv_addr_gen: address generator of the convolutional module.
//
// Convolutions are computed as long dot products (the document's Eq. 1): with
// activations stored position by position, all z_p maps of one (x, y) position
// contiguous, the kernel row i of an output neuron whose window starts at
// startAddr reads the x_k*z_p consecutive activations at
// startAddr + i*x_p*z_p, and the weights are read in plain sequence. Here
// z_p is counted in 64-bit words (zpw = z_p/8), so each step reads one word of
// eight activations and one word of eight weights.
//
// Loop order, outermost first: output row, output column, pooling-window row,
// pooling-window column, kernel row i, word j in the kernel row. When pooling is
// merged (cfg.pool > 1) every convolution output of a pooling window is
// produced in sequence, as the document describes, so the Shift/ReLU/Pool unit
// can pool on the fly. `first`/`last` mark the ends of a dot product and
// `win_first`/`win_last` the ends of a pooling window.
//
// Stall: the cores hand their results to a shift chain that needs COLS cycles
// to empty, so a `last` is held back until COLS cycles have passed since the
// previous one; `stall` is high in each cycle lost this way. The stall rule is
// this design's choice.
//
// Timing: `start` pulses with cfg valid; one address pair per cycle after
// that, outputs registered; `done` pulses with the final pair.
// Assertions check that every address the loops reach exists in the feature
// map and weight memories, i.e. that the layer part loaded fits them.
module conv_addr_gen
  import cnn_pkg::*;
#(
  parameter int unsigned AW   = 11,
  parameter int unsigned WAW  = 9,
  parameter int unsigned COLS = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  conv_cfg_t      cfg,
  output logic           busy,
  output logic           valid,
  output logic [AW-1:0]  fmm_addr,
  output logic [WAW-1:0] w_addr,
  output logic           first,
  output logic           last,
  output logic           win_first,
  output logic           win_last,
  output logic           stall,
  output logic           done
);

  logic [15:0] j, i, wx, wy, px, py, k;
  logic [15:0] row_len, row_stride;
  logic [31:0] cx, cy, addr_c;
  logic        is_last, is_jend, is_iend, is_wxend, is_wyend, is_pxend, is_pyend;
  logic [7:0]  since_last;
  logic        hold;

  always_comb begin
    row_len    = 16'(cfg.xk) * 16'(cfg.zpw);
    row_stride = cfg.xp * 16'(cfg.zpw);
    cy         = 32'(py) * 32'(cfg.pstride) + 32'(wy);
    cx         = 32'(px) * 32'(cfg.pstride) + 32'(wx);
    addr_c     = (cy * 32'(cfg.stride) + 32'(i)) * 32'(row_stride)
               + cx * 32'(cfg.stride) * 32'(cfg.zpw) + 32'(j);
    is_jend    = (j  == row_len - 16'd1);
    is_iend    = (i  == 16'(cfg.yk) - 16'd1);
    is_wxend   = (wx == 16'(cfg.pool) - 16'd1);
    is_wyend   = (wy == 16'(cfg.pool) - 16'd1);
    is_pxend   = (px == 16'(cfg.ox) - 16'd1);
    is_pyend   = (py == 16'(cfg.oy) - 16'd1);
    is_last    = is_jend && is_iend;
    hold       = busy && is_last && (since_last < 8'(COLS));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; valid <= 1'b0; done <= 1'b0; stall <= 1'b0;
      fmm_addr <= '0; w_addr <= '0;
      first <= 1'b0; last <= 1'b0; win_first <= 1'b0; win_last <= 1'b0;
      j <= '0; i <= '0; wx <= '0; wy <= '0; px <= '0; py <= '0; k <= '0;
      since_last <= 8'hff;
    end else begin
      valid <= 1'b0;
      done  <= 1'b0;
      stall <= hold;
      if (since_last != 8'hff) since_last <= since_last + 8'd1;
      if (start && !busy) begin
        busy <= 1'b1;
        j <= '0; i <= '0; wx <= '0; wy <= '0; px <= '0; py <= '0; k <= '0;
      end else if (busy && !hold) begin
        valid     <= 1'b1;
        fmm_addr  <= AW'(addr_c);
        w_addr    <= WAW'(k);
        first     <= (i == 0) && (j == 0);
        last      <= is_last;
        win_first <= (wx == 0) && (wy == 0);
        win_last  <= is_wxend && is_wyend;
        if (is_last) since_last <= 8'd1;
        // advance the loop nest
        if (!is_jend) begin
          j <= j + 16'd1; k <= k + 16'd1;
        end else begin
          j <= '0;
          if (!is_iend) begin
            i <= i + 16'd1; k <= k + 16'd1;
          end else begin
            i <= '0; k <= '0;
            if (!is_wxend) wx <= wx + 16'd1;
            else begin
              wx <= '0;
              if (!is_wyend) wy <= wy + 16'd1;
              else begin
                wy <= '0;
                if (!is_pxend) px <= px + 16'd1;
                else begin
                  px <= '0;
                  if (!is_pyend) py <= py + 16'd1;
                  else begin
                    py   <= '0;
                    busy <= 1'b0;
                    done <= 1'b1;
                  end
                end
              end
            end
          end
        end
      end
    end
  end
  // the layer must fit the memories: every address the loops reach exists
  a_fmm_range: assert property (@(posedge clk) disable iff (!rst_n)
    (busy && !hold) |-> addr_c < (32'(1) << AW));
  a_w_range:   assert property (@(posedge clk) disable iff (!rst_n)
    (busy && !hold) |-> k < (16'(1) << WAW));

endmodule
