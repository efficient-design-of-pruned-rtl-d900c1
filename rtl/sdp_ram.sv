// sdp_ram: simple dual-port memory, one write port and one read port.
//
// Used for the feature map memories and the weight memories, which the DMA
// writes through one port while the cores read through the other, as block
// RAMs do. Read data is registered: it appears the cycle after `re`.
// The contents are not reset, as in a block RAM; users write before reading.
module sdp_ram #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned W     = 64
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
