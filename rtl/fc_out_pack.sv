// fc_out_pack: output concatenation and write-address generation for one line
// of the fully connected module (document Fig. 7, "Conc" and "Write addr
// generator").
//
// The activated 8-bit outputs of the line's cores arrive one at a time, in
// output-neuron order. Eight of them are concatenated, neuron n in byte n%8,
// into a 64-bit word that is written to the batch memory at the next word of
// the output vector, starting at `base`. The same word goes to the DMA.
//
// Interface: `init` loads `base` and empties the word; each `in_valid` adds one
// byte; `wr_valid` pulses with the full word the cycle after its eighth byte.
// Output vectors whose length is not a multiple of eight leave their last
// bytes unwritten (this design's choice; the document's layers are multiples
// of eight).
module fc_out_pack
  import cnn_pkg::*;
#(
  parameter int unsigned AW = 11
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           init,
  input  logic [AW-1:0]  base,
  input  logic           in_valid,
  input  data_t          in_data,
  output logic           wr_valid,
  output logic [AW-1:0]  wr_addr,
  output word_t          wr_data
);

  word_t         buf_q;
  logic [2:0]    pos;
  logic [AW-1:0] next_addr;
  word_t         merged;

  always_comb begin
    merged = buf_q;
    merged[pos*DATA_W +: DATA_W] = in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0; pos <= '0; next_addr <= '0;
      wr_valid <= 1'b0; wr_addr <= '0; wr_data <= '0;
    end else begin
      wr_valid <= 1'b0;
      if (init) begin
        buf_q <= '0; pos <= '0; next_addr <= base;
      end else if (in_valid) begin
        buf_q <= merged;
        pos   <= pos + 3'd1;
        if (pos == 3'd7) begin
          wr_valid  <= 1'b1;
          wr_addr   <= next_addr;
          wr_data   <= merged;
          next_addr <= next_addr + 1'b1;
        end
      end
    end
  end

endmodule
