// lsq: load queue and store queue.
//
// Store queue (SQ): a store takes an entry at rename, writes its address and
// data when it executes, is marked committed when it retires, and then drains
// to the D-cache (one store per cycle, oldest first per partition); the SQ
// therefore also serves as the store buffer for committed data. A load
// searches the SQ of its own thread for the youngest older store with the same
// address and, if there is one, takes its data instead of the D-cache's. The
// SQ is active in both modes and is partitioned equally among the running
// threads (two partitions in OutofOrder mode, eight in InOrder mode).
//
// Load queue (LQ): used only in OutofOrder mode. A load takes an entry at
// rename and records its address when it executes; an executing store searches
// the LQ for a younger load of its thread that has already read the same
// address (a store-to-load order violation) and reports it on viol. The LQ
// entry is freed when the load commits. In InOrder mode loads are not
// speculative and the LQ is neither written nor searched.
//
// Ages: every store gets a 7-bit per-thread sequence number; a load carries
// the number the next store of its thread will get (sqpos), so a store is
// older than the load when (sqpos - seq) mod 128 lies in 1..SQ_SIZE.
//
// Reduced window: LQ_SMALL and SQ_SMALL entries are used. Searches are
// combinational; all updates happen at the clock edge.
module lsq
  import morph_pkg::*;
#(
  parameter int LQ_SIZE  = 70,
  parameter int SQ_SIZE  = 50,
  parameter int LQ_SMALL = 20,
  parameter int SQ_SMALL = 10,
  parameter int W        = 4,
  parameter int NMEM     = 2
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        mode_inorder,
  input  logic                        win_small,
  input  logic [OOO_CTX-1:0][TID_W-1:0] slot_tid,
  input  logic                        reinit,
  // allocation at rename
  input  uop_t [W-1:0]                al_uop,
  input  logic                        al_go,
  output logic                        can_alloc,
  output logic [W-1:0][LSQ_W-1:0]     al_lsq,
  output logic [W-1:0][LSQ_W-1:0]     al_sqpos,
  // store execution
  input  logic [NMEM-1:0]             st_v,
  input  logic [NMEM-1:0][TID_W-1:0]  st_tid,
  input  logic [NMEM-1:0][LSQ_W-1:0]  st_idx,
  input  logic [NMEM-1:0][ADDR_W-1:0] st_addr,
  input  logic [NMEM-1:0][XLEN-1:0]   st_data,
  // load execution
  input  logic [NMEM-1:0]             ld_v,
  input  logic [NMEM-1:0][TID_W-1:0]  ld_tid,
  input  logic [NMEM-1:0][LSQ_W-1:0]  ld_lq,
  input  logic [NMEM-1:0][LSQ_W-1:0]  ld_sqpos,
  input  logic [NMEM-1:0][ADDR_W-1:0] ld_addr,
  output logic [NMEM-1:0]             fwd_hit,
  output logic [NMEM-1:0][XLEN-1:0]   fwd_data,
  // commit
  input  logic [W-1:0]                cm_v,
  input  uop_t [W-1:0]                cm_uop,
  input  logic [W-1:0][LSQ_W-1:0]     cm_lsq,
  // D-cache write of committed stores
  output logic                        dw_v,
  output logic [ADDR_W-1:0]           dw_addr,
  output logic [XLEN-1:0]             dw_data,
  output logic                        viol,
  output logic                        sq_empty
);
  localparam int NP = NUM_THREADS;

  // store queue
  logic [SQ_SIZE-1:0]             s_v, s_ex, s_cm;
  logic [SQ_SIZE-1:0][ADDR_W-1:0] s_addr;
  logic [SQ_SIZE-1:0][XLEN-1:0]   s_data;
  logic [SQ_SIZE-1:0][LSQ_W-1:0]  s_seq;
  logic [NP-1:0][LSQ_W-1:0]       s_head, s_tail, s_cnt, s_nseq;
  // load queue
  logic [LQ_SIZE-1:0]             l_v, l_ex;
  logic [LQ_SIZE-1:0][ADDR_W-1:0] l_addr;
  logic [LQ_SIZE-1:0][LSQ_W-1:0]  l_pos;
  logic [OOO_CTX-1:0][LSQ_W-1:0]  l_head, l_tail, l_cnt;
  logic [TID_W-1:0]               drr_q;

  int spsz, snp, lpsz;
  always_comb begin
    snp  = mode_inorder ? NP : OOO_CTX;
    spsz = mode_inorder ? SQ_SIZE / NP : (win_small ? SQ_SMALL : SQ_SIZE) / OOO_CTX;
    lpsz = (win_small ? LQ_SMALL : LQ_SIZE) / OOO_CTX;
  end

  function automatic int part_of(logic [TID_W-1:0] t, logic mi, logic [OOO_CTX-1:0][TID_W-1:0] st);
    if (mi) return int'(t);
    return (t == st[OOO_CTX-1]) ? OOO_CTX - 1 : 0;
  endfunction

  // SQ partition of thread t when searching (threads keep their partition)
  function automatic int seq_dist(logic [LSQ_W-1:0] pos, logic [LSQ_W-1:0] seq);
    return int'(LSQ_W'(pos - seq));
  endfunction

  // ------------------------------------------------------------ allocation
  logic [NP-1:0][LSQ_W:0]      sadd;
  logic [OOO_CTX-1:0][LSQ_W:0] ladd;
  always_comb begin
    can_alloc = 1'b1;
    sadd = '0;
    ladd = '0;
    al_lsq = '0;
    al_sqpos = '0;
    for (int i = 0; i < W; i++)
      if (al_uop[i].valid) begin
        automatic int p = part_of(al_uop[i].tid, mode_inorder, slot_tid);
        al_sqpos[i] = LSQ_W'(int'(s_nseq[al_uop[i].tid]) + int'(sadd[p]));
        if (al_uop[i].op == OP_ST) begin
          al_lsq[i] = LSQ_W'(p * spsz + (int'(s_tail[p]) + int'(sadd[p])) % spsz);
          sadd[p]   = sadd[p] + 1;
          if (int'(s_cnt[p]) + int'(sadd[p]) > spsz) can_alloc = 1'b0;
        end else if (al_uop[i].op == OP_LD && !mode_inorder) begin
          al_lsq[i] = LSQ_W'(p * lpsz + (int'(l_tail[p]) + int'(ladd[p])) % lpsz);
          ladd[p]   = ladd[p] + 1;
          if (int'(l_cnt[p]) + int'(ladd[p]) > lpsz) can_alloc = 1'b0;
        end
      end
  end

  // ------------------------------------------------------------ searches
  always_comb begin
    for (int k = 0; k < NMEM; k++) begin
      automatic int best = 1 << LSQ_W;
      fwd_hit[k]  = 1'b0;
      fwd_data[k] = '0;
      for (int e = 0; e < SQ_SIZE; e++) begin
        automatic int d = seq_dist(ld_sqpos[k], s_seq[e]);
        if (ld_v[k] && s_v[e] && s_ex[e] && s_addr[e] == ld_addr[k] &&
            part_of(ld_tid[k], mode_inorder, slot_tid) == e / (spsz > 0 ? spsz : 1) &&
            d >= 1 && d <= SQ_SIZE && d < best) begin
          best        = d;
          fwd_hit[k]  = 1'b1;
          fwd_data[k] = s_data[e];
        end
      end
    end
  end

  always_comb begin
    viol = 1'b0;
    if (!mode_inorder)
      for (int k = 0; k < NMEM; k++)
        for (int e = 0; e < LQ_SIZE; e++)
          if (st_v[k] && l_v[e] && l_ex[e] && l_addr[e] == st_addr[k] &&
              e / (lpsz > 0 ? lpsz : 1) == part_of(st_tid[k], mode_inorder, slot_tid)) begin
            automatic int d = seq_dist(l_pos[e], s_seq[st_idx[k]]);
            if (d >= 1 && d <= SQ_SIZE) viol = 1'b1;
          end
  end

  // ------------------------------------------------------------ drain
  int dpart;
  always_comb begin
    dw_v    = 1'b0;
    dw_addr = '0;
    dw_data = '0;
    dpart   = 0;
    for (int k = 1; k <= NP; k++) begin
      automatic int p = (int'(drr_q) + k) % NP;
      automatic int e = p * spsz + int'(s_head[p]);
      if (!dw_v && p < snp && s_cnt[p] != 0 && s_cm[e]) begin
        dw_v    = 1'b1;
        dw_addr = s_addr[e];
        dw_data = s_data[e];
        dpart   = p;
      end
    end
    sq_empty = 1'b1;
    for (int p = 0; p < NP; p++) if (s_cnt[p] != 0) sq_empty = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_v <= '0; s_ex <= '0; s_cm <= '0; s_head <= '0; s_tail <= '0; s_cnt <= '0; s_nseq <= '0;
      l_v <= '0; l_ex <= '0; l_head <= '0; l_tail <= '0; l_cnt <= '0; drr_q <= '0;
      s_addr <= '0; s_data <= '0; s_seq <= '0; l_addr <= '0; l_pos <= '0;
    end else if (reinit) begin
      s_v <= '0; s_ex <= '0; s_cm <= '0; s_head <= '0; s_tail <= '0; s_cnt <= '0;
      l_v <= '0; l_ex <= '0; l_head <= '0; l_tail <= '0; l_cnt <= '0;
    end else begin
      automatic logic [NP-1:0][LSQ_W:0]      lfree = '0;
      automatic logic [NP-1:0]               sdrain = '0;
      if (dw_v) begin
        drr_q <= TID_W'(dpart);
        s_v[6'(dpart * spsz + int'(s_head[dpart]))] <= 1'b0;
        s_cm[6'(dpart * spsz + int'(s_head[dpart]))] <= 1'b0;
        sdrain[dpart] = 1'b1;
      end
      for (int k = 0; k < NMEM; k++) begin
        if (st_v[k]) begin
          s_ex[st_idx[k]]   <= 1'b1;
          s_addr[st_idx[k]] <= st_addr[k];
          s_data[st_idx[k]] <= st_data[k];
        end
        if (ld_v[k] && !mode_inorder) begin
          l_ex[ld_lq[k]]   <= 1'b1;
          l_addr[ld_lq[k]] <= ld_addr[k];
        end
      end
      for (int i = 0; i < W; i++)
        if (cm_v[i]) begin
          if (cm_uop[i].op == OP_ST) s_cm[cm_lsq[i]] <= 1'b1;
          if (cm_uop[i].op == OP_LD && !mode_inorder) begin
            l_v[cm_lsq[i]] <= 1'b0;
            lfree[part_of(cm_uop[i].tid, mode_inorder, slot_tid)] =
              lfree[part_of(cm_uop[i].tid, mode_inorder, slot_tid)] + 1;
          end
        end
      if (al_go && can_alloc)
        for (int i = 0; i < W; i++)
          if (al_uop[i].valid) begin
            if (al_uop[i].op == OP_ST) begin
              s_v[al_lsq[i]]   <= 1'b1;
              s_ex[al_lsq[i]]  <= 1'b0;
              s_cm[al_lsq[i]]  <= 1'b0;
              s_seq[al_lsq[i]] <= al_sqpos[i];
            end else if (al_uop[i].op == OP_LD && !mode_inorder) begin
              l_v[al_lsq[i]]   <= 1'b1;
              l_ex[al_lsq[i]]  <= 1'b0;
              l_pos[al_lsq[i]] <= al_sqpos[i];
            end
          end
      for (int p = 0; p < NP; p++) begin
        automatic int sa = (al_go && can_alloc) ? int'(sadd[p]) : 0;
        s_head[p] <= LSQ_W'((int'(s_head[p]) + int'(sdrain[p])) % spsz);
        s_tail[p] <= LSQ_W'((int'(s_tail[p]) + sa) % spsz);
        s_cnt[p]  <= LSQ_W'(int'(s_cnt[p]) + sa - int'(sdrain[p]));
      end
      for (int t = 0; t < NP; t++) begin
        automatic int ns = 0;
        if (al_go && can_alloc)
          for (int i = 0; i < W; i++)
            if (al_uop[i].valid && al_uop[i].op == OP_ST && int'(al_uop[i].tid) == t) ns++;
        s_nseq[t] <= LSQ_W'(int'(s_nseq[t]) + ns);
      end
      for (int p = 0; p < OOO_CTX; p++) begin
        automatic int la = (al_go && can_alloc) ? int'(ladd[p]) : 0;
        l_head[p] <= LSQ_W'((int'(l_head[p]) + int'(lfree[p])) % lpsz);
        l_tail[p] <= LSQ_W'((int'(l_tail[p]) + la) % lpsz);
        l_cnt[p]  <= LSQ_W'(int'(l_cnt[p]) + la - int'(lfree[p]));
      end
    end
  end

endmodule
