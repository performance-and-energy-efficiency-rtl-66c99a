// rename_unit: OutofOrder and InOrder register renaming.
//
// OutofOrder mode (as in the document's baseline core): each of the two
// out-of-order contexts has a Speculative-RAT read at rename and a
// Permanent-RAT written at commit. Destinations take a free physical register
// from the free list; the register a destination previously mapped to (pold)
// returns to the free list when the instruction commits. Sources of a lane
// that are written by an older lane of the same group take that lane's new
// register (dependency check). The free list only hands out registers below
// the active PRF size (60 in the reduced window, 192 otherwise).
//
// InOrder mode: no tables are used. The physical register is the thread ID
// concatenated with the architectural register ID (thread t, register r ->
// t*NUM_AREG + r), which divides the PRF into one fixed partition per thread.
// A multiplexer picks the InOrder or OutofOrder result per lane.
//
// reinit (from the mode-change routine) sets both RATs of the two OOO slots to
// slot*NUM_AREG + r and puts every other active register on the free list; the
// routine fills the architectural values into those registers.
//
// Timing: the rename result is combinational from in_uops; the tables and the
// free list change at the clock edge when do_rename is high. can_rename says
// whether enough free registers exist for the group.
module rename_unit
  import morph_pkg::*;
#(
  parameter int W        = 4,
  parameter int NUM_PREG = 192,
  parameter int NUM_AREG_P = NUM_AREG
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      mode_inorder,
  input  logic [PREG_W-1:0]         preg_active,   // number of active physical registers
  input  logic [OOO_CTX-1:0][TID_W-1:0] slot_tid,
  input  logic                      reinit,
  input  uop_t [W-1:0]              in_uops,
  input  logic                      do_rename,
  output logic                      can_rename,
  output logic [W-1:0][PREG_W-1:0]  pdst,
  output logic [W-1:0][PREG_W-1:0]  psrc1,
  output logic [W-1:0][PREG_W-1:0]  psrc2,
  output logic [W-1:0][PREG_W-1:0]  pold,
  // commit
  input  logic [W-1:0]              cm_valid,
  input  logic [W-1:0][TID_W-1:0]   cm_tid,
  input  logic [W-1:0]              cm_has_dst,
  input  logic [W-1:0][AREG_W-1:0]  cm_rd,
  input  logic [W-1:0][PREG_W-1:0]  cm_pdst,
  input  logic [W-1:0][PREG_W-1:0]  cm_pold,
  output logic [OOO_CTX-1:0][NUM_AREG_P-1:0][PREG_W-1:0] perm_rat,
  output logic [PREG_W:0]           free_count
);
  logic [OOO_CTX-1:0][NUM_AREG_P-1:0][PREG_W-1:0] spec_rat;
  logic [NUM_PREG-1:0] free_q;

  function automatic int slot_of(logic [TID_W-1:0] t, logic [OOO_CTX-1:0][TID_W-1:0] st);
    return (OOO_CTX > 1 && t == st[1]) ? 1 : 0;
  endfunction

  // Pick up to W free registers, lowest first.
  logic [W-1:0][PREG_W-1:0] newp;
  logic [W-1:0]             newp_v;
  always_comb begin
    automatic logic [NUM_PREG-1:0] f = free_q;
    for (int i = 0; i < W; i++) begin
      newp[i]   = '0;
      newp_v[i] = 1'b0;
      for (int p = 0; p < NUM_PREG; p++)
        if (!newp_v[i] && f[p]) begin
          newp[i]   = PREG_W'(p);
          newp_v[i] = 1'b1;
        end
      if (newp_v[i]) f[newp[i]] = 1'b0;
    end
  end

  always_comb begin
    free_count = '0;
    for (int p = 0; p < NUM_PREG; p++) free_count += (PREG_W+1)'(free_q[p]);
  end

  // Rename the group.
  logic [W-1:0] need;
  always_comb begin
    automatic int k = 0;
    can_rename = 1'b1;
    for (int i = 0; i < W; i++) begin
      automatic int s = slot_of(in_uops[i].tid, slot_tid);
      need[i] = in_uops[i].valid && in_uops[i].has_dst;
      if (mode_inorder) begin
        pdst[i]  = PREG_W'(int'(in_uops[i].tid) * NUM_AREG_P + int'(in_uops[i].rd));
        psrc1[i] = PREG_W'(int'(in_uops[i].tid) * NUM_AREG_P + int'(in_uops[i].rs1));
        psrc2[i] = PREG_W'(int'(in_uops[i].tid) * NUM_AREG_P + int'(in_uops[i].rs2));
        pold[i]  = pdst[i];
      end else begin
        psrc1[i] = spec_rat[s][in_uops[i].rs1];
        psrc2[i] = spec_rat[s][in_uops[i].rs2];
        pold[i]  = spec_rat[s][in_uops[i].rd];
        pdst[i]  = '0;
        if (need[i]) begin
          if (!newp_v[k]) can_rename = 1'b0;
          pdst[i] = newp[k];
          k++;
        end
        // dependency check against older lanes of the group
        for (int j = 0; j < i; j++) begin
          if (need[j] && in_uops[j].tid == in_uops[i].tid) begin
            if (in_uops[j].rd == in_uops[i].rs1) psrc1[i] = pdst[j];
            if (in_uops[j].rd == in_uops[i].rs2) psrc2[i] = pdst[j];
            if (in_uops[j].rd == in_uops[i].rd)  pold[i]  = pdst[j];
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      spec_rat <= '0;
      perm_rat <= '0;
      free_q   <= '0;
    end else if (reinit) begin
      for (int s = 0; s < OOO_CTX; s++)
        for (int r = 0; r < NUM_AREG_P; r++) begin
          spec_rat[s][r] <= PREG_W'(s * NUM_AREG_P + r);
          perm_rat[s][r] <= PREG_W'(s * NUM_AREG_P + r);
        end
      for (int p = 0; p < NUM_PREG; p++)
        free_q[p] <= (p >= OOO_CTX * NUM_AREG_P) && (p < int'(preg_active));
    end else if (!mode_inorder) begin
      if (do_rename)
        for (int i = 0; i < W; i++)
          if (need[i]) begin
            spec_rat[slot_of(in_uops[i].tid, slot_tid)][in_uops[i].rd] <= pdst[i];
            free_q[pdst[i]] <= 1'b0;
          end
      for (int i = 0; i < W; i++)
        if (cm_valid[i] && cm_has_dst[i]) begin
          perm_rat[slot_of(cm_tid[i], slot_tid)][cm_rd[i]] <= cm_pdst[i];
          free_q[cm_pold[i]] <= 1'b1;
        end
    end
  end

endmodule
