// dcache: L1 data storage (32 KB, 64-bit words).
//
// The document gives the L1 D-cache's size, its two ports and its 2-cycle
// pipelined access; tags, misses and the L2 behind it are outside this design,
// so this block is the data array of a cache that always hits. Each of the
// NPORT read ports takes an address in one cycle and returns the word in the
// next (the second of the load's two cache cycles); a new read can start every
// cycle. The write port stores committed stores drained from the store queue;
// a read in the cycle after a write to the same word sees the new data.
module dcache
  import morph_pkg::*;
#(
  parameter int WORDS = 4096,
  parameter int NPORT = 2
) (
  input  logic                         clk,
  input  logic [NPORT-1:0][ADDR_W-1:0] rd_addr,
  output logic [NPORT-1:0][XLEN-1:0]   rd_data,
  input  logic                         we,
  input  logic [ADDR_W-1:0]            waddr,
  input  logic [XLEN-1:0]              wdata
);
  logic [XLEN-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[int'(waddr) % WORDS] <= wdata;
    for (int k = 0; k < NPORT; k++) rd_data[k] <= mem[int'(rd_addr[k]) % WORDS];
  end

endmodule
