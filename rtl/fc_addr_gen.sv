// fc_addr_gen: read-address generator of one kernel in the fully connected
// module (document Fig. 7 and Fig. 8).
//
// Each stored block of a pruned kernel carries a 4-bit index giving its
// distance, in blocks, from the previous stored block (the first from the
// start of the input vector). Adding the indexes in turn to a running address
// register, initialised with the input vector's start address in the batch
// memory, gives the read address of the block of activations each block of
// weights must meet. With G = 8/BS indexes per group (BS the block size),
// G addresses are produced at once: address g is the running address plus
// indexes 0..g of the group, and the running address then moves to the last
// of them. Addresses count blocks of BS activations.
//
// Interface: `init` loads `base`; `step` consumes the group on `idx` (the FIFO
// head). `addr` is combinational from the running address and `idx`.
module fc_addr_gen
  import cnn_pkg::*;
#(
  parameter int unsigned G  = 1,
  parameter int unsigned AW = 11
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 init,
  input  logic [AW-1:0]        base,
  input  logic                 step,
  input  logic [G*IDX_W-1:0]   idx,
  output logic [AW-1:0]        addr [G]
);

  logic [AW-1:0] run;

  always_comb begin
    logic [AW-1:0] a;
    a = run;
    for (int g = 0; g < int'(G); g++) begin
      a       = a + AW'(idx[g*IDX_W +: IDX_W]);
      addr[g] = a;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    run <= '0;
    else if (init) run <= base;
    else if (step) run <= addr[G-1];
  end

endmodule
