// dma_switch: the switch between the DMA read channels and the module memories
// (document Fig. 1).
//
// NSRC DMA read streams can be steered to NDST destinations: here the feature
// map memories and weight memories of the convolutional module and the batch
// memories and kernel loader of the fully connected module. Each destination
// has a route entry {enable, source}; a source's ready is the ready of the
// destination that selects it. The document only names the switch; the route
// table is this design's choice. Routing two destinations to one source is
// not allowed (the controller asserts this). Purely combinational.
module dma_switch
  import cnn_pkg::*;
#(
  parameter int unsigned NSRC = 4,
  parameter int unsigned NDST = 4,
  parameter int unsigned SW   = $clog2(NSRC)
) (
  input  logic         route_en  [NDST],
  input  logic [SW-1:0] route_src [NDST],
  input  logic         src_valid [NSRC],
  input  dma_beat_t    src_beat  [NSRC],
  output logic         src_ready [NSRC],
  output logic         dst_valid [NDST],
  output dma_beat_t    dst_beat  [NDST],
  input  logic         dst_ready [NDST]
);

  always_comb begin
    for (int s = 0; s < int'(NSRC); s++) src_ready[s] = 1'b0;
    for (int d = 0; d < int'(NDST); d++) begin
      dst_valid[d] = route_en[d] && src_valid[route_src[d]];
      dst_beat[d]  = src_beat[route_src[d]];
      if (route_en[d] && dst_ready[d]) src_ready[route_src[d]] = 1'b1;
    end
  end

endmodule
