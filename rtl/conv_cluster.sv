// conv_cluster: the matrix of processing cores of the convolutional module.
//
// LINES lines of COLS cores (the document's Fig. 2). All cores of a line read
// the same activation word, from the line's feature map memory; all cores of a
// column read the same weight word, from the column's weight memory. So a line
// computes COLS output maps at once (one kernel per column) and the lines
// compute different output activations of the same maps.
//
// When a dot product ends, the COLS sums of each line are loaded into a shift
// chain that runs along the line towards its Shift/ReLU/Pool unit (conv_srp),
// one result per cycle, core 0 first. The chain needs COLS cycles; the address
// generator spaces dot-product ends at least COLS cycles apart, so a chain is
// always empty when it is loaded.
//
// Timing: operands enter with `valid`; sums are in the chains one cycle after
// `last`, and result c of a line leaves conv_srp c+2 cycles later.
module conv_cluster
  import cnn_pkg::*;
#(
  parameter int unsigned LINES = 7,
  parameter int unsigned COLS  = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    valid,
  input  logic                    first,
  input  logic                    last,
  input  logic                    win_first,
  input  logic                    win_last,
  input  word_t                   act [LINES],
  input  word_t                   wgt [COLS],
  input  logic [4:0]              shift,
  input  logic                    relu,
  output logic                    busy,
  output logic                    out_valid  [LINES],
  output data_t                   out_data   [LINES],
  output logic [$clog2(COLS)-1:0] out_kernel [LINES]
);

  localparam int unsigned KW = $clog2(COLS);

  acc_t   result [LINES][COLS];
  logic   rvalid [LINES][COLS];
  acc_t   acc_unused [LINES][COLS];
  acc_t   chain  [LINES][COLS];
  logic   wf_q, wl_q, wf_c, wl_c;
  logic [KW:0] cnt;      // results left in the chains
  logic [KW-1:0] kidx;   // kernel of the result at the chain head

  for (genvar l = 0; l < LINES; l++) begin : g_line
    for (genvar c = 0; c < COLS; c++) begin : g_col
      pe_core u_core (
        .clk, .rst_n, .clr(1'b0), .en(valid), .first, .last,
        .act(act[l]), .wgt(wgt[c]),
        .acc(acc_unused[l][c]), .result(result[l][c]), .res_valid(rvalid[l][c])
      );
    end
    conv_srp #(.COLS(COLS)) u_srp (
      .clk, .rst_n,
      .in_valid(cnt != 0), .in_data(chain[l][0]), .in_kernel(kidx),
      .win_first(wf_c), .win_last(wl_c), .shift, .relu,
      .out_valid(out_valid[l]), .out_data(out_data[l]), .out_kernel(out_kernel[l])
    );
  end

  assign busy = (cnt != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wf_q <= 1'b0; wl_q <= 1'b0; wf_c <= 1'b0; wl_c <= 1'b0;
      cnt  <= '0;   kidx <= '0;
      for (int l = 0; l < int'(LINES); l++)
        for (int c = 0; c < int'(COLS); c++) chain[l][c] <= '0;
    end else begin
      if (valid && last) begin
        wf_q <= win_first;
        wl_q <= win_last;
      end
      if (rvalid[0][0]) begin
        // all cores end together: load the chains
        for (int l = 0; l < int'(LINES); l++)
          for (int c = 0; c < int'(COLS); c++) chain[l][c] <= result[l][c];
        cnt  <= (KW+1)'(COLS);
        kidx <= '0;
        wf_c <= wf_q;
        wl_c <= wl_q;
      end else if (cnt != 0) begin
        for (int l = 0; l < int'(LINES); l++) begin
          for (int c = 0; c < int'(COLS) - 1; c++) chain[l][c] <= chain[l][c+1];
          chain[l][COLS-1] <= '0;
        end
        cnt  <= cnt - 1'b1;
        kidx <= kidx + 1'b1;
      end
    end
  end

endmodule
