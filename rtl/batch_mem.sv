// batch_mem: the batch memory of one line of the fully connected module.
//
// It holds the activations of one image of the batch: the input vector of the
// dense layer and, after the layer, its output vector. The DMA and the output
// packer write whole 64-bit words; the cores read blocks of BS activations
// (BS*8 bits) at block addresses, so a memory of WORDS 64-bit words has
// WORDS*8/BS read addresses (11 address bits for 2048 words and BS = 8, 12 for
// BS = 4, as the document's figures print).
//
// Every core of the line needs G = 8/BS block reads per cycle, NRP = CORES*G
// read ports in all. A block RAM gives two ports, so the memory is built from
// ceil(NRP/2) dual-port copies that are always written together, as the
// document describes for the smaller block sizes and for more kernels in
// parallel. Read port p is port p%2 of copy p/2. Writes use port 0 of every
// copy, so the control never writes and reads in the same cycle.
//
// Timing: read data registered, one cycle after `re`.
module batch_mem
  import cnn_pkg::*;
#(
  parameter int unsigned WORDS = 2048,
  parameter int unsigned BS    = 8,
  parameter int unsigned CORES = 1,
  parameter int unsigned G     = 8 / BS,
  parameter int unsigned NRP   = CORES * G,
  parameter int unsigned RAW   = $clog2(WORDS * G)
) (
  input  logic                      clk,
  input  logic                      we,
  input  logic [$clog2(WORDS)-1:0]  waddr,
  input  word_t                     wdata,
  input  logic                      re,
  input  logic [RAW-1:0]            raddr [NRP],
  output logic [BS*DATA_W-1:0]      rdata [NRP]
);

  localparam int unsigned NCOPY = (NRP + 1) / 2;
  localparam int unsigned SW    = (G > 1) ? $clog2(G) : 1;
  localparam int unsigned WAW   = $clog2(WORDS);

  for (genvar k = 0; k < NCOPY; k++) begin : g_copy
    word_t mem [WORDS];
    always_ff @(posedge clk) begin
      if (we) mem[waddr] <= wdata;
    end
    for (genvar q = 0; q < 2; q++) begin : g_port
      if (2*k + q < NRP) begin : g_used
        localparam int unsigned P = 2*k + q;
        word_t         word_q;
        logic [SW-1:0] sel_q;
        always_ff @(posedge clk) begin
          if (re) begin
            word_q <= mem[WAW'(raddr[P] >> $clog2(G))];
            sel_q  <= (G > 1) ? SW'(raddr[P]) : '0;
          end
        end
        assign rdata[P] = word_q[sel_q*BS*DATA_W +: BS*DATA_W];
      end
    end
  end

endmodule
