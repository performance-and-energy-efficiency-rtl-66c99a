// prf: physical register file.
//
// In OutofOrder mode it holds speculative and architectural values of the
// renamed registers; in InOrder mode it is divided into fixed partitions that
// hold the architectural registers of the eight in-order threads. When the
// window is reduced only the lowest `active` entries are on (the document
// segments the bit lines so that the rest can be switched off): a write to an
// entry at or above `active` is dropped and a read from one returns zero, and
// an assertion flags either.
//
// Ports: NR combinational read ports, NW write ports written at the clock edge
// (a higher-numbered port wins if two write the same entry).
module prf
  import morph_pkg::*;
#(
  parameter int N  = 192,
  parameter int NR = 8,
  parameter int NW = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [PREG_W:0]            active,
  input  logic [NR-1:0][PREG_W-1:0]  raddr,
  output logic [NR-1:0][XLEN-1:0]    rdata,
  input  logic [NW-1:0]              we,
  input  logic [NW-1:0][PREG_W-1:0]  waddr,
  input  logic [NW-1:0][XLEN-1:0]    wdata
);
  logic [XLEN-1:0] regs [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) regs[i] <= '0;
    end else begin
      for (int k = 0; k < NW; k++)
        if (we[k] && {1'b0, waddr[k]} < active && int'(waddr[k]) < N)
          regs[waddr[k]] <= wdata[k];
    end
  end

  always_comb begin
    for (int k = 0; k < NR; k++)
      rdata[k] = ({1'b0, raddr[k]} < active && int'(raddr[k]) < N) ? regs[raddr[k]] : '0;
  end

  // A write outside the active part is a scheduling error of the core.
  for (genvar k = 0; k < NW; k++) begin : g_chk
    a_active_write: assert property (@(posedge clk) disable iff (!rst_n)
                                     !(we[k] && {1'b0, waddr[k]} >= active))
      else $error("prf: write to inactive entry %0d", waddr[k]);
  end

endmodule
