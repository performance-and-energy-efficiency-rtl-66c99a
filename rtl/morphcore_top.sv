// morphcore_top: the MorphCore core.
//
// MorphCore is a large out-of-order core (4-wide, 192-entry window, two SMT
// contexts) with small additions that let it run in five modes: the full
// out-of-order mode, three out-of-order modes with half the width and/or a
// quarter of the window (4W/48, 2W/192, 2W/48) for single threads with
// little ILP or MLP, and an 8-thread in-order SMT mode for phases with many
// active threads. The in-order mode reuses the PRF as the threads'
// architectural register files, the RS as per-thread in-order instruction
// buffers and the ROB as per-thread instruction records, and turns off
// renaming, the out-of-order wakeup/select and the load queue.
//
// Pipeline (one group of up to 4 instructions from one thread per cycle):
//   fetch (fetch_unit + icache) -> decode latch (decode_stage) ->
//   rename/dispatch (rename_unit, rob, lsq allocation, RS insertion) ->
//   select (reservation_station) -> register read + bypass -> execute
//   (exec_unit, dcache, lsq searches) -> PRF write (directly or through the
//   inorder_wb_buffer) -> commit (rob; Permanent-RAT and free list update,
//   store-queue drain to the D-cache).
// tlp_mode_ctrl picks InOrder or OutofOrder mode from the number of active
// threads and runs the drain/spill/fill routine on every change of mode;
// sampling_policy picks the width/window mode in OutofOrder mode.
//
// Ports: thread_active is the set of threads that are runnable (not waiting
// on a synchronisation event). imem_* and dmem_* load the instruction and data
// storage, ctx_init_* set a thread's PC. energy is the energy spent per cycle,
// objective/x_pct the power-management goal. cm_* report the committed
// instructions (up to 4 per cycle) with their result, for checking.
module morphcore_top
  import morph_pkg::*;
#(
  parameter int QUANTUM  = 10_000_000,
  parameter int INTERVAL = 100_000,
  parameter int REPL     = 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [NUM_THREADS-1:0]       thread_active,
  input  logic                         imem_we,
  input  logic [PC_W-1:0]              imem_addr,
  input  logic [31:0]                  imem_data,
  input  logic                         dmem_we,
  input  logic [ADDR_W-1:0]            dmem_addr,
  input  logic [XLEN-1:0]              dmem_data,
  input  logic                         ctx_init_we,
  input  logic [TID_W-1:0]             ctx_init_tid,
  input  logic [PC_W-1:0]              ctx_init_pc,
  input  logic [15:0]                  energy,
  input  logic [1:0]                   objective,
  input  logic [6:0]                   x_pct,
  output logic [WIDTH-1:0]             cm_v,
  output logic [WIDTH-1:0][TID_W-1:0]  cm_tid,
  output logic [WIDTH-1:0][PC_W-1:0]   cm_pc,
  output logic [WIDTH-1:0]             cm_wen,
  output logic [WIDTH-1:0][AREG_W-1:0] cm_rd,
  output logic [WIDTH-1:0][XLEN-1:0]   cm_data,
  output logic                         mode_inorder,
  output logic                         half_width,
  output logic                         win_small,
  output logic                         running,
  output logic                         dispatch_stall,
  output logic                         policy_decided,
  output logic                         lsq_violation,
  output logic [15:0]                  n_mode_switch,
  output logic [15:0]                  n_delayed_writes
);
  localparam int W  = WIDTH;
  localparam int NC = 3 * W;
  localparam int NB = NUM_THREADS * 4;

  // ---------------------------------------------------------------- control
  logic [OOO_CTX-1:0][TID_W-1:0]                  slot_tid;
  logic [NUM_THREADS-1:0]                         ctx_enable;
  logic                                           reinit, drained;
  logic [OOO_CTX-1:0][NUM_AREG-1:0][PREG_W-1:0]   perm_rat;
  logic [3:0][PREG_W-1:0]                         mc_raddr, mc_waddr;
  logic [3:0][XLEN-1:0]                           mc_rdata, mc_wdata;
  logic [3:0]                                     mc_we;
  logic [NUM_THREADS-1:0][63:0]                   att;
  logic [1:0]                                     ilp_mode, chosen;
  logic                                           sampling;

  // ---------------------------------------------------------------- front end
  logic [PC_W-1:0]          ic_pc;
  logic [W-1:0][31:0]       ic_words;
  fetch_slot_t [W-1:0]      f_grp;
  uop_t [W-1:0]             d_uops;
  logic                     stall;
  logic [NUM_THREADS-1:0][15:0] bhr;
  logic                     fetched;

  icache #(.W(W)) u_icache (
    .clk, .we(imem_we), .waddr(imem_addr), .wdata(imem_data),
    .rd_pc(ic_pc), .rd_words(ic_words)
  );

  fetch_unit #(.NUM_CTX(NUM_THREADS), .W(W)) u_fetch (
    .clk, .rst_n, .half_width, .ctx_enable, .stall,
    .ctx_init_we, .ctx_init_tid, .ctx_init_pc,
    .icache_pc(ic_pc), .icache_words(ic_words), .out_grp(f_grp), .bhr, .fetched
  );

  decode_stage #(.W(W)) u_decode (
    .clk, .rst_n, .half_width, .stall, .in_grp(f_grp), .out_uops(d_uops)
  );

  // ---------------------------------------------------------------- rename / dispatch
  logic [W-1:0][PREG_W-1:0] r_pdst, r_psrc1, r_psrc2, r_pold;
  logic                     can_rename, rob_ok, rs_ok, lsq_ok, go;
  logic [W-1:0][ROB_W-1:0]  rob_idx;
  logic [W-1:0][LSQ_W-1:0]  lsq_idx, sqpos;
  logic [PREG_W-1:0]        preg_active;
  logic [RS_W:0]            rs_active;
  logic                     any_valid;
  ruop_t [W-1:0]            ins;

  // commit
  logic [W-1:0]             c_v;
  uop_t [W-1:0]             c_uop;
  logic [W-1:0][PREG_W-1:0] c_pdst, c_pold;
  logic [W-1:0][LSQ_W-1:0]  c_lsq;
  logic [W-1:0][XLEN-1:0]   c_data;
  logic                     rob_empty;

  assign preg_active = (win_small && !mode_inorder) ? PREG_W'(60) : PREG_W'(192);
  assign rs_active   = (win_small && !mode_inorder) ? (RS_W+1)'(20) : (RS_W+1)'(60);

  always_comb begin
    any_valid = 1'b0;
    for (int i = 0; i < W; i++) any_valid |= d_uops[i].valid;
  end

  assign go    = any_valid && can_rename && rob_ok && rs_ok && lsq_ok && !reinit;
  assign stall = any_valid && !go;
  assign dispatch_stall = stall;

  logic [W-1:0] c_has_dst;
  logic [W-1:0][TID_W-1:0]  c_tid;
  logic [W-1:0][AREG_W-1:0] c_rd;
  always_comb begin
    for (int i = 0; i < W; i++) begin
      c_has_dst[i] = c_uop[i].has_dst;
      c_tid[i]     = c_uop[i].tid;
      c_rd[i]      = c_uop[i].rd;
    end
  end

  rename_unit #(.W(W)) u_rename (
    .clk, .rst_n, .mode_inorder, .preg_active, .slot_tid, .reinit,
    .in_uops(d_uops), .do_rename(go), .can_rename,
    .pdst(r_pdst), .psrc1(r_psrc1), .psrc2(r_psrc2), .pold(r_pold),
    .cm_valid(c_v), .cm_tid(c_tid), .cm_has_dst(c_has_dst), .cm_rd(c_rd),
    .cm_pdst(c_pdst), .cm_pold(c_pold), .perm_rat, .free_count()
  );

  // completion
  result_t [W-1:0][2:0]      res;
  logic [NC-1:0]             cp_v;
  logic [NC-1:0][ROB_W-1:0]  cp_idx;
  logic [NC-1:0][XLEN-1:0]   cp_data;
  always_comb begin
    for (int k = 0; k < W; k++)
      for (int c = 0; c < 3; c++) begin
        cp_v[3*k+c]    = res[k][c].valid;
        cp_idx[3*k+c]  = res[k][c].rob;
        cp_data[3*k+c] = res[k][c].data;
      end
  end

  rob #(.W(W), .NC(NC)) u_rob (
    .clk, .rst_n, .mode_inorder, .win_small, .half_width, .slot_tid, .reinit,
    .al_uop(d_uops), .al_pdst(r_pdst), .al_pold(r_pold), .al_lsq(lsq_idx),
    .al_go(go), .can_alloc(rob_ok), .al_idx(rob_idx),
    .cp_v, .cp_idx, .cp_data,
    .cm_v(c_v), .cm_uop(c_uop), .cm_pdst(c_pdst), .cm_pold(c_pold), .cm_lsq(c_lsq),
    .cm_data(c_data), .empty(rob_empty)
  );

  // RS lanes: only instructions with work to do enter the RS
  always_comb begin
    for (int i = 0; i < W; i++) begin
      ins[i].u       = d_uops[i];
      ins[i].u.valid = d_uops[i].valid && (d_uops[i].op inside {OP_ADD, OP_SUB, OP_XOR, OP_ADDI,
                                                                OP_MUL, OP_LD, OP_ST});
      ins[i].pdst    = r_pdst[i];
      ins[i].psrc1   = r_psrc1[i];
      ins[i].psrc2   = r_psrc2[i];
      ins[i].pold    = r_pold[i];
      ins[i].rob     = rob_idx[i];
      ins[i].lsq     = lsq_idx[i];
      ins[i].sqpos   = sqpos[i];
    end
  end

  // ---------------------------------------------------------------- schedule / execute
  issue_t [W-1:0]            iss;
  logic [NUM_THREADS-1:0]    thr_ok;
  logic [191:0]              wb_pend;

  reservation_station #(.W(W)) u_rs (
    .clk, .rst_n, .mode_inorder, .half_width, .rs_active, .reinit,
    .ins, .ins_go(go), .can_insert(rs_ok), .thr_ok, .wb_pend, .iss, .occupancy()
  );

  logic [2*W-1:0][PREG_W-1:0] rf_addr;
  logic [2*W-1:0][XLEN-1:0]   rf_data, wb_data;
  logic [2*W-1:0]             wb_hit;
  logic [1:0]                 st_v, ld_v, fwd_hit;
  logic [1:0][TID_W-1:0]      st_tid, ld_tid;
  logic [1:0][LSQ_W-1:0]      st_idx, ld_lq, ld_sqpos;
  logic [1:0][ADDR_W-1:0]     st_addr, ld_addr;
  logic [1:0][XLEN-1:0]       st_data, fwd_data, dc_data;

  exec_unit #(.W(W), .NMEM(2)) u_exec (
    .clk, .rst_n, .half_width, .iss,
    .rf_addr, .rf_data, .wb_hit, .wb_data,
    .st_v, .st_tid, .st_idx, .st_addr, .st_data,
    .ld_v, .ld_tid, .ld_lq, .ld_sqpos, .ld_addr, .fwd_hit, .fwd_data, .dc_data,
    .res
  );

  logic [W-1:0][2:0]        direct;
  logic [NB-1:0]            rel_we;
  logic [NB-1:0][PREG_W-1:0] rel_addr;
  logic [NB-1:0][XLEN-1:0]  rel_data;
  logic                     wb_empty;

  inorder_wb_buffer #(.W(W)) u_wbbuf (
    .clk, .rst_n, .mode_inorder, .iss, .res, .direct,
    .rel_we, .rel_addr, .rel_data,
    .lk_addr(rf_addr), .lk_hit(wb_hit), .lk_data(wb_data),
    .thr_ok, .pend(wb_pend), .empty(wb_empty), .delayed_count(n_delayed_writes)
  );

  // PRF: ports 0..NC-1 results, then buffer releases, then the mode-change routine
  localparam int NWP = NC + NB + 4;
  logic [NWP-1:0]             p_we;
  logic [NWP-1:0][PREG_W-1:0] p_waddr;
  logic [NWP-1:0][XLEN-1:0]   p_wdata;
  logic [2*W+4-1:0][PREG_W-1:0] p_raddr;
  logic [2*W+4-1:0][XLEN-1:0]   p_rdata;
  always_comb begin
    for (int k = 0; k < W; k++)
      for (int c = 0; c < 3; c++) begin
        p_we[3*k+c]    = res[k][c].valid && res[k][c].wen && direct[k][c];
        p_waddr[3*k+c] = res[k][c].pdst;
        p_wdata[3*k+c] = res[k][c].data;
      end
    for (int e = 0; e < NB; e++) begin
      p_we[NC+e]    = rel_we[e];
      p_waddr[NC+e] = rel_addr[e];
      p_wdata[NC+e] = rel_data[e];
    end
    for (int k = 0; k < 4; k++) begin
      p_we[NC+NB+k]    = mc_we[k];
      p_waddr[NC+NB+k] = mc_waddr[k];
      p_wdata[NC+NB+k] = mc_wdata[k];
    end
    for (int s = 0; s < 2*W; s++) begin
      p_raddr[s] = rf_addr[s];
      rf_data[s] = p_rdata[s];
    end
    for (int k = 0; k < 4; k++) begin
      p_raddr[2*W+k] = mc_raddr[k];
      mc_rdata[k]    = p_rdata[2*W+k];
    end
  end

  prf #(.N(192), .NR(2*W+4), .NW(NWP)) u_prf (
    .clk, .rst_n, .active({1'b0, preg_active}),
    .raddr(p_raddr), .rdata(p_rdata), .we(p_we), .waddr(p_waddr), .wdata(p_wdata)
  );

  // ---------------------------------------------------------------- memory
  logic                 dw_v, sq_empty;
  logic [ADDR_W-1:0]    dw_addr;
  logic [XLEN-1:0]      dw_data;

  lsq #(.W(W), .NMEM(2)) u_lsq (
    .clk, .rst_n, .mode_inorder, .win_small, .slot_tid, .reinit,
    .al_uop(d_uops), .al_go(go), .can_alloc(lsq_ok), .al_lsq(lsq_idx), .al_sqpos(sqpos),
    .st_v, .st_tid, .st_idx, .st_addr, .st_data,
    .ld_v, .ld_tid, .ld_lq, .ld_sqpos, .ld_addr, .fwd_hit, .fwd_data,
    .cm_v(c_v), .cm_uop(c_uop), .cm_lsq(c_lsq),
    .dw_v, .dw_addr, .dw_data, .viol(lsq_violation), .sq_empty
  );

  dcache #(.NPORT(2)) u_dcache (
    .clk, .rd_addr(ld_addr), .rd_data(dc_data),
    .we(dw_v || dmem_we), .waddr(dw_v ? dw_addr : dmem_addr), .wdata(dw_v ? dw_data : dmem_data)
  );

  // ---------------------------------------------------------------- mode control
  always_comb begin
    drained = rob_empty && sq_empty && wb_empty && !any_valid;
    for (int i = 0; i < W; i++) drained &= !f_grp[i].valid;
  end

  tlp_mode_ctrl u_tlp (
    .clk, .rst_n, .thread_active, .ilp_mode, .drained, .perm_rat,
    .mode_inorder, .half_width, .win_small, .slot_tid, .ctx_enable, .run(running), .reinit,
    .mc_raddr, .mc_rdata, .mc_we, .mc_waddr, .mc_wdata, .att, .n_switch(n_mode_switch)
  );

  logic [2:0] ncommit;
  always_comb begin
    ncommit = '0;
    for (int i = 0; i < W; i++) ncommit += 3'(c_v[i]);
  end

  sampling_policy #(.QUANTUM(QUANTUM), .INTERVAL(INTERVAL), .REPL(REPL)) u_policy (
    .clk, .rst_n, .hold(mode_inorder || !running), .commits(ncommit), .energy,
    .objective, .x_pct, .mode(ilp_mode), .sampling, .decided(policy_decided), .chosen
  );

  // ---------------------------------------------------------------- commit trace
  always_comb begin
    for (int i = 0; i < W; i++) begin
      cm_v[i]    = c_v[i];
      cm_tid[i]  = c_uop[i].tid;
      cm_pc[i]   = c_uop[i].pc;
      cm_wen[i]  = c_uop[i].has_dst;
      cm_rd[i]   = c_uop[i].rd;
      cm_data[i] = c_data[i];
    end
  end

endmodule
