// shift_relu: fixed-point scale adjustment and activation of one core result.
//
// The document places a "Shift ReLU" stage after the cores: the wide sum of a
// dot product is brought back to the layer's 8-bit fixed-point format and the
// ReLU activation is applied. Here the sum is shifted right arithmetically by
// `shift` bits with round-half-up, negative values become zero when `relu` is
// set, and the result saturates to the signed 8-bit range. Rounding and
// saturation are this design's choices (the document gives none).
//
// Purely combinational; users register the output.
module shift_relu
  import cnn_pkg::*;
(
  input  acc_t        din,
  input  logic [4:0]  shift,
  input  logic        relu,
  output data_t       dout
);

  logic signed [ACC_W:0] rounded;
  logic signed [ACC_W:0] half;

  always_comb begin
    half    = (shift == 0) ? '0 : (ACC_W+1)'(1) <<< (shift - 5'd1);
    rounded = ($signed({din[ACC_W-1], din}) + half) >>> shift;
    if (relu && rounded < 0)
      dout = '0;
    else if (rounded > 127)
      dout = 8'sd127;
    else if (rounded < -128)
      dout = -8'sd128;
    else
      dout = data_t'(rounded[DATA_W-1:0]);
  end

endmodule
