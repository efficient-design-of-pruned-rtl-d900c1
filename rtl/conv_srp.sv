// conv_srp: the Shift/ReLU/Pool unit at the end of one line of the
// convolutional cluster.
//
// Results of the line's cores arrive one per cycle, tagged with the core
// (kernel) they came from. Each is scaled and activated by shift_relu. When
// pooling is merged into the layer, the address generator produces all
// convolution outputs of one pooling window in sequence, so the unit keeps a
// running maximum per kernel: `win_first` restarts it, `win_last` releases the
// pooled value. Without pooling both flags are set on every result and each
// value passes straight through. Max pooling is this design's choice among the
// average/max options the document mentions.
//
// Timing: output registered, one cycle after the input.
module conv_srp
  import cnn_pkg::*;
#(
  parameter int unsigned COLS = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  acc_t                    in_data,
  input  logic [$clog2(COLS)-1:0] in_kernel,
  input  logic                    win_first,
  input  logic                    win_last,
  input  logic [4:0]              shift,
  input  logic                    relu,
  output logic                    out_valid,
  output data_t                   out_data,
  output logic [$clog2(COLS)-1:0] out_kernel
);

  data_t scaled;
  data_t pooled;
  data_t mx [COLS];

  shift_relu u_sr (.din(in_data), .shift(shift), .relu(relu), .dout(scaled));

  always_comb begin
    pooled = scaled;
    if (!win_first && mx[in_kernel] > scaled) pooled = mx[in_kernel];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_data   <= '0;
      out_kernel <= '0;
      for (int i = 0; i < int'(COLS); i++) mx[i] <= '0;
    end else begin
      out_valid <= in_valid && win_last;
      if (in_valid) begin
        mx[in_kernel] <= pooled;
        out_data      <= pooled;
        out_kernel    <= in_kernel;
      end
    end
  end

endmodule
