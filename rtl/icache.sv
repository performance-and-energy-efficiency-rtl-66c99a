// icache: instruction storage of the MorphCore front end.
//
// The document gives only the size of the L1 I-cache (32 KB). Misses and the
// L2 behind it are outside this design, so this block is the 32 KB of
// instruction words that the cache holds, read without a miss: one read of
// W consecutive 32-bit words per cycle, combinational (the fetch stage
// resolves jumps in the same cycle). A write port fills the storage.
module icache
  import morph_pkg::*;
#(
  parameter int WORDS = 8192,
  parameter int W     = 4
) (
  input  logic                  clk,
  input  logic                  we,
  input  logic [PC_W-1:0]       waddr,
  input  logic [31:0]           wdata,
  input  logic [PC_W-1:0]       rd_pc,
  output logic [W-1:0][31:0]    rd_words
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_comb begin
    for (int i = 0; i < W; i++)
      rd_words[i] = mem[(int'(rd_pc) + i) % WORDS];
  end

endmodule
