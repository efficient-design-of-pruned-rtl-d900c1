// pe_core: one processing core of a cluster.
//
// The core multiplies a 64-bit word of eight signed 8-bit activations by a
// 64-bit word of eight signed 8-bit weights, lane by lane, and adds the eight
// products to its accumulator: eight MACs work in parallel on one kernel, as
// the document describes for kernel parallelism. The same core serves the
// convolutional and the fully connected clusters.
//
// Interface: `en` marks a valid operand pair. `first` starts a new dot product
// (the accumulator restarts from this pair's sum); `last` ends it, copying the
// sum to `result` and pulsing `res_valid` one cycle later. `clr` zeroes the
// accumulator, for users that do not mark the first pair. `acc` is the running
// sum. Timing: one operand pair per cycle, result one cycle after `last`.
// The 32-bit accumulator width is this design's choice.
module pe_core
  import cnn_pkg::*;
#(
  parameter int unsigned N = LANES
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,
  input  logic            en,
  input  logic            first,
  input  logic            last,
  input  logic [N*DATA_W-1:0] act,
  input  logic [N*DATA_W-1:0] wgt,
  output acc_t            acc,
  output acc_t            result,
  output logic            res_valid
);

  acc_t dot;
  acc_t acc_next;

  always_comb begin
    dot = '0;
    for (int i = 0; i < int'(N); i++) begin
      dot += acc_t'($signed(act[i*DATA_W +: DATA_W]) * $signed(wgt[i*DATA_W +: DATA_W]));
    end
    acc_next = (first ? acc_t'(0) : acc) + dot;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      result    <= '0;
      res_valid <= 1'b0;
    end else begin
      res_valid <= en && last;
      if (clr) begin
        acc <= '0;
      end else if (en) begin
        acc <= acc_next;
        if (last) result <= acc_next;
      end
    end
  end

endmodule
