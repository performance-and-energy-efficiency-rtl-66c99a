// rob: reorder buffer, partitioned per thread.
//
// The ROB keeps instructions in program order per thread and commits them in
// order once they are done. It is divided into equal fixed-size partitions,
// one per running thread: two in OutofOrder mode (one per out-of-order
// context, as in a Pentium-4-style SMT core) and eight in InOrder mode, where
// the document reuses the ROB to hold the in-order threads' instruction
// information. In the reduced window only ROB_SMALL entries are used (two
// partitions of ROB_SMALL/2). Each partition is a circular buffer with head,
// tail and count.
//
// Allocation takes the valid lanes of a renamed group (all lanes of a group
// belong to one thread) at the partition's tail. Completion ports mark an
// entry done and keep its result (the value is reported at commit). Commit
// retires up to the current width per cycle, visiting the partitions
// round-robin and taking done entries from each head in order. In OutofOrder
// mode the commit lanes also update the Permanent-RAT and free the previous
// register (in rename_unit); in InOrder mode only the head pointer moves.
module rob
  import morph_pkg::*;
#(
  parameter int ROB_SIZE  = 192,
  parameter int ROB_SMALL = 48,
  parameter int W         = 4,
  parameter int NC        = 12     // completion ports
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       mode_inorder,
  input  logic                       win_small,
  input  logic                       half_width,
  input  logic [OOO_CTX-1:0][TID_W-1:0] slot_tid,
  input  logic                       reinit,
  // allocation
  input  uop_t [W-1:0]               al_uop,
  input  logic [W-1:0][PREG_W-1:0]   al_pdst,
  input  logic [W-1:0][PREG_W-1:0]   al_pold,
  input  logic [W-1:0][LSQ_W-1:0]   al_lsq,
  input  logic                       al_go,
  output logic                       can_alloc,
  output logic [W-1:0][ROB_W-1:0]    al_idx,
  // completion
  input  logic [NC-1:0]              cp_v,
  input  logic [NC-1:0][ROB_W-1:0]   cp_idx,
  input  logic [NC-1:0][XLEN-1:0]    cp_data,
  // commit
  output logic [W-1:0]               cm_v,
  output uop_t [W-1:0]               cm_uop,
  output logic [W-1:0][PREG_W-1:0]  cm_pdst,
  output logic [W-1:0][PREG_W-1:0]  cm_pold,
  output logic [W-1:0][LSQ_W-1:0]   cm_lsq,
  output logic [W-1:0][XLEN-1:0]    cm_data,
  output logic                       empty
);
  localparam int NP = NUM_THREADS;

  logic [ROB_SIZE-1:0]             v_q, done_q;
  uop_t [ROB_SIZE-1:0]             u_q;
  logic [ROB_SIZE-1:0][PREG_W-1:0] pdst_q, pold_q;
  logic [ROB_SIZE-1:0][LSQ_W-1:0]  lsq_q;
  logic [ROB_SIZE-1:0][XLEN-1:0]   data_q;
  logic [NP-1:0][ROB_W-1:0]        head_q, tail_q, cnt_q;
  logic [TID_W-1:0]                rr_q;

  int psize, nparts;
  always_comb begin
    nparts = mode_inorder ? NP : OOO_CTX;
    psize  = mode_inorder ? ROB_SIZE / NP : (win_small ? ROB_SMALL : ROB_SIZE) / OOO_CTX;
  end

  function automatic int part_of(logic [TID_W-1:0] t, logic mi, logic [OOO_CTX-1:0][TID_W-1:0] st);
    if (mi) return int'(t);
    return (t == st[OOO_CTX-1]) ? OOO_CTX - 1 : 0;
  endfunction

  // allocation
  logic [NP-1:0][ROB_W:0] add;
  always_comb begin
    can_alloc = 1'b1;
    add       = '0;
    al_idx    = '0;
    for (int i = 0; i < W; i++)
      if (al_uop[i].valid) begin
        automatic int p = part_of(al_uop[i].tid, mode_inorder, slot_tid);
        al_idx[i] = ROB_W'(p * psize + (int'(tail_q[p]) + int'(add[p])) % psize);
        add[p]    = add[p] + 1;
        if (int'(cnt_q[p]) + int'(add[p]) > psize) can_alloc = 1'b0;
      end
  end

  // commit selection
  logic [NP-1:0][ROB_W:0] ncm;
  always_comb begin
    automatic int n = 0;
    automatic int wmax = half_width ? W/2 : W;
    cm_v = '0; cm_uop = '0; cm_pdst = '0; cm_pold = '0; cm_lsq = '0; cm_data = '0;
    ncm  = '0;
    for (int k = 1; k <= NP; k++) begin
      automatic int p = (int'(rr_q) + k) % NP;
      automatic logic stop = 1'b0;
      if (p < nparts)
        for (int j = 0; j < W; j++) begin
          automatic int e = p * psize + (int'(head_q[p]) + j) % psize;
          if (!stop && n < wmax && j < int'(cnt_q[p]) && v_q[e] && done_q[e]) begin
            cm_v[n]    = 1'b1;
            cm_uop[n]  = u_q[e];
            cm_pdst[n] = pdst_q[e];
            cm_pold[n] = pold_q[e];
            cm_lsq[n]  = lsq_q[e];
            cm_data[n] = data_q[e];
            ncm[p]     = ncm[p] + 1;
            n++;
          end else begin
            stop = 1'b1;
          end
        end
    end
  end

  always_comb begin
    empty = 1'b1;
    for (int p = 0; p < NP; p++) if (cnt_q[p] != 0) empty = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= '0; done_q <= '0; head_q <= '0; tail_q <= '0; cnt_q <= '0; rr_q <= '0;
      data_q <= '0;
      lsq_q <= '0;
      pdst_q <= '0;
      pold_q <= '0;
      u_q <= '0;
    end else if (reinit) begin
      v_q <= '0; done_q <= '0; head_q <= '0; tail_q <= '0; cnt_q <= '0;
    end else begin
      rr_q <= rr_q + TID_W'(1);
      for (int c = 0; c < NC; c++)
        if (cp_v[c]) begin
          done_q[cp_idx[c]] <= 1'b1;
          data_q[cp_idx[c]] <= cp_data[c];
        end
      for (int p = 0; p < NP; p++)
        for (int j = 0; j < W; j++)
          if (j < int'(ncm[p])) v_q[p * psize + (int'(head_q[p]) + j) % psize] <= 1'b0;
      if (al_go && can_alloc)
        for (int i = 0; i < W; i++)
          if (al_uop[i].valid) begin
            automatic int e = int'(al_idx[i]);
            v_q[e]    <= 1'b1;
            // control transfers and no-ops have nothing to execute
            done_q[e] <= al_uop[i].op == OP_NOP || al_uop[i].op == OP_JMP ||
                         al_uop[i].op == OP_CALL || al_uop[i].op == OP_RET;
            data_q[e] <= '0;
            u_q[e]    <= al_uop[i];
            pdst_q[e] <= al_pdst[i];
            pold_q[e] <= al_pold[i];
            lsq_q[e]  <= al_lsq[i];
          end
      for (int p = 0; p < NP; p++) begin
        automatic int a = (al_go && can_alloc) ? int'(add[p]) : 0;
        head_q[p] <= ROB_W'((int'(head_q[p]) + int'(ncm[p])) % psize);
        tail_q[p] <= ROB_W'((int'(tail_q[p]) + a) % psize);
        cnt_q[p]  <= ROB_W'(int'(cnt_q[p]) + a - int'(ncm[p]));
      end
    end
  end

endmodule
