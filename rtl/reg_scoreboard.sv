// reg_scoreboard: per-register availability (M / DELAY / SHIFT / R) table.
//
// This is the InOrder Wakeup table of the document: one entry per
// architectural register of every in-order thread (register t*NUM_AREG + r),
// with the MATCH bit M, a SHIFT field loaded from the firing instruction's
// latency and the ready bit R. When an instruction fires it broadcasts its
// destination and latency: the entry resets R, sets M and loads DELAY. While M
// is set SHIFT moves right one bit per cycle and R is set when it reaches zero.
// DELAY is one-hot, bit (latency-1), so a dependant can fire exactly
// <latency> cycles after its producer (back-to-back for 1-cycle operations).
//
// In OutofOrder mode the same table, indexed by physical register, supplies
// the state of a source at the moment its instruction enters the RS (rename
// clears the entry of a newly allocated destination). reinit marks every
// register ready (after the mode-change routine has filled the registers).
//
// Lookups (lk_*) return the state the register will have in the next cycle,
// including this cycle's broadcasts, which is what an instruction written into
// the RS at this clock edge must start with. rdy_now is the current R bit.
module reg_scoreboard
  import morph_pkg::*;
#(
  parameter int N  = 192,
  parameter int W  = 4,
  parameter int NL = 8      // lookup ports
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    reinit,
  input  logic [W-1:0]            bc_v,
  input  logic [W-1:0][PREG_W-1:0] bc_tag,
  input  logic [W-1:0][3:0]       bc_lat,
  input  logic [W-1:0]            clr_v,
  input  logic [W-1:0][PREG_W-1:0] clr_tag,
  input  logic [NL-1:0][PREG_W-1:0] lk_tag,
  output logic [NL-1:0]           lk_m,
  output logic [NL-1:0][7:0]      lk_shift,
  output logic [N-1:0]            rdy_now
);
  logic [N-1:0]       m_q, r_q;
  logic [N-1:0][7:0]  sh_q;
  logic [N-1:0]       m_d, r_d;
  logic [N-1:0][7:0]  sh_d;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      m_d[i]  = m_q[i];
      sh_d[i] = sh_q[i];
      if (m_q[i] && sh_q[i] != 0) sh_d[i] = sh_q[i] >> 1;
      for (int k = 0; k < W; k++)
        if (clr_v[k] && int'(clr_tag[k]) == i) begin
          m_d[i]  = 1'b0;
          sh_d[i] = '0;
        end
      for (int k = 0; k < W; k++)
        if (bc_v[k] && int'(bc_tag[k]) == i) begin
          m_d[i]  = 1'b1;
          sh_d[i] = 8'(8'd1 << (bc_lat[k] - 4'd1)) >> 1;
        end
      r_d[i] = m_d[i] && sh_d[i] == 0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_q  <= '1;
      r_q  <= '1;
      sh_q <= '0;
    end else if (reinit) begin
      m_q  <= '1;
      r_q  <= '1;
      sh_q <= '0;
    end else begin
      m_q  <= m_d;
      r_q  <= r_d;
      sh_q <= sh_d;
    end
  end

  assign rdy_now = r_q;

  always_comb begin
    for (int l = 0; l < NL; l++) begin
      lk_m[l]     = m_d[lk_tag[l] % PREG_W'(N)];
      lk_shift[l] = sh_d[lk_tag[l] % PREG_W'(N)];
    end
  end

endmodule
