// reservation_station: unified RS with OutofOrder and InOrder wakeup/select.
//
// OutofOrder mode (document Fig. 3.5, unshaded part): an incoming instruction
// takes any free entry below the active size (60, or 20 in the reduced
// window) from a free list. Each source keeps MATCH (M) and SHIFT fields:
// every firing instruction broadcasts its destination tag and latency, a
// matching source sets M and loads SHIFT, SHIFT moves right each cycle and the
// source is ready (R) when SHIFT is zero. An entry with both sources ready
// requests execution; the select logic grants the oldest requesting entries
// (an age matrix records insertion order), up to the issue width, and frees
// them. This design adds two scheduling rules of its own: a load waits until
// every older store of its thread has fired (so loads never bypass an
// unexecuted store), and at most two memory operations fire per cycle, on
// functional units 0 and 1, the D-cache's two ports.
//
// InOrder mode: the RS is split into one fixed partition of RS_SIZE/8 entries
// per thread, each a circular FIFO with its own insert and head pointers. The
// InOrder wakeup looks only at the two oldest instructions of each thread and
// uses the per-register table (reg_scoreboard) instead of the tag broadcast
// into the entries: the oldest is ready when its sources are available and,
// as this design's own rule, its destination has no write in flight (neither
// in a functional unit nor waiting in the delayed-write buffer); the
// second is ready when it is ready itself and the oldest fires in the same
// cycle and it does not depend on it. Eight per-thread selects feed a
// round-robin select across threads. thr_ok (from the in-order write buffer)
// keeps a thread from firing when its buffer could overflow.
//
// In both modes entries leave the RS when they fire. Fired instructions come
// out on iss[] (combinational, one per functional unit slot) and must be
// latched by the execution units.
module reservation_station
  import morph_pkg::*;
#(
  parameter int RS_SIZE  = 60,
  parameter int W        = 4,
  parameter int NUM_PREG = 192
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 mode_inorder,
  input  logic                 half_width,
  input  logic [RS_W:0]        rs_active,     // active entries (OutofOrder mode)
  input  logic                 reinit,        // empty RS, all registers ready
  input  ruop_t [W-1:0]        ins,
  input  logic                 ins_go,        // write the valid lanes of ins
  output logic                 can_insert,
  input  logic [NUM_THREADS-1:0] thr_ok,
  input  logic [NUM_PREG-1:0]  wb_pend,       // register has a buffered write (InOrder)
  output issue_t [W-1:0]       iss,
  output logic [RS_W:0]        occupancy
);
  localparam int PART = RS_SIZE / NUM_THREADS;
  localparam int PW   = $clog2(PART) + 1;

  logic [RS_SIZE-1:0]              e_v;
  ruop_t [RS_SIZE-1:0]             e_r;
  logic [RS_SIZE-1:0]              e_m1, e_m2;
  logic [RS_SIZE-1:0][7:0]         e_sh1, e_sh2;
  logic [RS_SIZE-1:0][RS_SIZE-1:0] ob;       // ob[i][j]: entry j was inserted before entry i
  logic [NUM_THREADS-1:0][PW-1:0]  head_q, tail_q, cnt_q;
  logic [TID_W-1:0]                rr_q;

  // ---------------------------------------------------------------- scoreboard
  logic [W-1:0]               bc_v;
  logic [W-1:0][PREG_W-1:0]   bc_tag;
  logic [W-1:0][3:0]          bc_lat;
  logic [W-1:0]               clr_v;
  logic [2*W-1:0][PREG_W-1:0] lk_tag;
  logic [2*W-1:0]             lk_m;
  logic [2*W-1:0][7:0]        lk_sh;
  logic [NUM_PREG-1:0]        rdy;

  always_comb begin
    for (int i = 0; i < W; i++) begin
      lk_tag[2*i]   = ins[i].psrc1;
      lk_tag[2*i+1] = ins[i].psrc2;
      clr_v[i]      = ins_go && can_insert && !mode_inorder && ins[i].u.valid && ins[i].u.has_dst;
    end
  end

  reg_scoreboard #(.N(NUM_PREG), .W(W), .NL(2*W)) u_sb (
    .clk, .rst_n, .reinit,
    .bc_v, .bc_tag, .bc_lat,
    .clr_v, .clr_tag(pdst_of(ins)),
    .lk_tag, .lk_m, .lk_shift(lk_sh), .rdy_now(rdy)
  );

  function automatic logic [W-1:0][PREG_W-1:0] pdst_of(ruop_t [W-1:0] x);
    for (int i = 0; i < W; i++) pdst_of[i] = x[i].pdst;
  endfunction

  function automatic logic is_mem(ruop_t r);
    return r.u.fu == FU_MEM;
  endfunction

  // ---------------------------------------------------------------- select
  logic [W-1:0]              g_v;
  logic [W-1:0][RS_W-1:0]    g_idx;
  logic [RS_SIZE-1:0]        fire;
  logic [NUM_THREADS-1:0][1:0] thr_fired;
  int                        width_now;

  assign width_now = half_width ? W/2 : W;

  // OutofOrder request and age rank. An entry requests when both sources are
  // ready (and, for a load, no older store of its thread is left). Of the
  // memory requests only the two oldest stay eligible; the grant goes to the
  // eligible entries with the fewest older eligible entries (rank < width).
  logic [NUM_THREADS-1:0][RS_SIZE-1:0] st_mask;
  logic [RS_SIZE-1:0]                  req, mem_req, elig;
  logic [RS_SIZE-1:0][RS_W:0]          rank;

  always_comb begin
    for (int t = 0; t < NUM_THREADS; t++)
      for (int i = 0; i < RS_SIZE; i++)
        st_mask[t][i] = e_v[i] && e_r[i].u.op == OP_ST && int'(e_r[i].u.tid) == t;
    for (int i = 0; i < RS_SIZE; i++) begin
      req[i] = e_v[i] && e_m1[i] && e_sh1[i] == 0 && e_m2[i] && e_sh2[i] == 0 &&
               !(e_r[i].u.op == OP_LD && |(ob[i] & st_mask[e_r[i].u.tid]));
      mem_req[i] = req[i] && is_mem(e_r[i]);
    end
    for (int i = 0; i < RS_SIZE; i++)
      elig[i] = req[i] && (!is_mem(e_r[i]) || $countones(ob[i] & mem_req) < 2);
    for (int i = 0; i < RS_SIZE; i++)
      rank[i] = (RS_W+1)'($countones(ob[i] & elig));
  end

  always_comb begin
    automatic int n = 0, nmem = 0;
    g_v       = '0;
    g_idx     = '0;
    thr_fired = '0;
    if (!mode_inorder) begin
      for (int k = 0; k < W; k++)
        if (k < width_now)
          for (int i = 0; i < RS_SIZE; i++)
            if (elig[i] && int'(rank[i]) == k) begin
              g_v[k]   = 1'b1;
              g_idx[k] = RS_W'(i);
            end
    end else begin
      // hierarchical in-order select: per thread up to two, round robin over threads
      for (int k = 1; k <= NUM_THREADS; k++) begin
        automatic int t = (int'(rr_q) + k) % NUM_THREADS;
        automatic logic go0 = 1'b0;
        for (int s = 0; s < 2; s++) begin
          if (int'(cnt_q[t]) > s && thr_ok[t] && n < width_now && (s == 0 || go0)) begin
            automatic int e = t * PART + ((int'(head_q[t]) + s) % PART);
            automatic ruop_t r = e_r[e];
            automatic logic ok;
            ok = (!r.u.use1 || rdy[r.psrc1]) && (!r.u.use2 || rdy[r.psrc2]) &&
                 (!r.u.has_dst || (rdy[r.pdst] && !wb_pend[r.pdst])) && !(is_mem(r) && nmem >= 2);
            if (s == 1) begin
              automatic ruop_t p = e_r[t * PART + int'(head_q[t])];
              if (p.u.has_dst && ((r.u.use1 && r.psrc1 == p.pdst) ||
                                  (r.u.use2 && r.psrc2 == p.pdst) ||
                                  (r.u.has_dst && r.pdst == p.pdst)))
                ok = 1'b0;
            end
            if (ok) begin
              g_v[n]   = 1'b1;
              g_idx[n] = RS_W'(e);
              if (is_mem(r)) nmem++;
              n++;
              thr_fired[t] = thr_fired[t] + 2'd1;
              if (s == 0) go0 = 1'b1;
            end else if (s == 0) begin
              go0 = 1'b0;
            end
          end
        end
      end
    end
    fire = '0;
    for (int k = 0; k < W; k++) if (g_v[k]) fire[g_idx[k]] = 1'b1;
  end

  // Route fired instructions to functional-unit slots: memory ops to FU 0/1.
  // Memory operations take slots 0, 1 in grant order; the others follow them.
  always_comb begin
    automatic int nm_all = 0, nm = 0, no = 0;
    for (int k = 0; k < W; k++) if (g_v[k] && is_mem(e_r[g_idx[k]])) nm_all++;
    iss = '0;
    for (int k = 0; k < W; k++)
      if (g_v[k]) begin
        automatic int slot;
        if (is_mem(e_r[g_idx[k]])) begin
          slot = nm;
          nm++;
        end else begin
          slot = nm_all + no;
          no++;
        end
        for (int q = 0; q < W; q++)
          if (q == slot) begin
            iss[q].valid = 1'b1;
            iss[q].gk    = 2'(k);
            iss[q].r     = e_r[g_idx[k]];
          end
      end
    for (int k = 0; k < W; k++) begin
      bc_v[k]   = iss[k].valid && iss[k].r.u.has_dst;
      bc_tag[k] = iss[k].r.pdst;
      bc_lat[k] = iss[k].r.u.lat;
    end
  end

  // ---------------------------------------------------------------- insert
  logic [W-1:0][RS_W-1:0] slot_of_lane;
  always_comb begin
    automatic logic [RS_SIZE-1:0] busy = e_v;
    automatic int need = 0;
    can_insert   = 1'b1;
    slot_of_lane = '0;
    for (int i = 0; i < W; i++) begin
      if (ins[i].u.valid) begin
        need++;
        if (mode_inorder) begin
          automatic int t = int'(ins[i].u.tid);
          automatic int n_prev = 0;   // earlier lanes of the same thread
          for (int j = 0; j < i; j++)
            if (ins[j].u.valid && ins[j].u.tid == ins[i].u.tid) n_prev++;
          slot_of_lane[i] = RS_W'(t * PART + ((int'(tail_q[t]) + n_prev) % PART));
          if (int'(cnt_q[t]) + n_prev + 1 > PART) can_insert = 1'b0;
        end else begin
          automatic logic got = 1'b0;
          for (int e = 0; e < RS_SIZE; e++)
            if (!got && !busy[e] && e < int'(rs_active)) begin
              got             = 1'b1;
              busy[e]         = 1'b1;
              slot_of_lane[i] = RS_W'(e);
            end
          if (!got) can_insert = 1'b0;
        end
      end
    end
  end

  always_comb begin
    occupancy = '0;
    for (int i = 0; i < RS_SIZE; i++) occupancy += (RS_W+1)'(e_v[i]);
  end

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_v    <= '0;
      head_q <= '0;
      tail_q <= '0;
      cnt_q  <= '0;
      rr_q   <= '0;
      ob     <= '0;
      e_m1 <= '0;
      e_m2 <= '0;
      e_r <= '0;
      e_sh1 <= '0;
      e_sh2 <= '0;
    end else if (reinit) begin
      e_v    <= '0;
      head_q <= '0;
      tail_q <= '0;
      cnt_q  <= '0;
    end else begin
      rr_q <= rr_q + TID_W'(1);
      // OOO wakeup: shift and tag match in every entry
      for (int i = 0; i < RS_SIZE; i++) begin
        if (e_m1[i] && e_sh1[i] != 0) e_sh1[i] <= e_sh1[i] >> 1;
        if (e_m2[i] && e_sh2[i] != 0) e_sh2[i] <= e_sh2[i] >> 1;
        for (int k = 0; k < W; k++)
          if (bc_v[k] && !mode_inorder) begin
            if (!e_m1[i] && e_r[i].psrc1 == bc_tag[k]) begin
              e_m1[i]  <= 1'b1;
              e_sh1[i] <= 8'(8'd1 << (bc_lat[k] - 4'd1)) >> 1;
            end
            if (!e_m2[i] && e_r[i].psrc2 == bc_tag[k]) begin
              e_m2[i]  <= 1'b1;
              e_sh2[i] <= 8'(8'd1 << (bc_lat[k] - 4'd1)) >> 1;
            end
          end
      end
      for (int i = 0; i < RS_SIZE; i++) if (fire[i]) e_v[i] <= 1'b0;
      if (mode_inorder)
        for (int t = 0; t < NUM_THREADS; t++) begin
          head_q[t] <= PW'((int'(head_q[t]) + int'(thr_fired[t])) % PART);
        end
      // insertion
      begin
        if (ins_go && can_insert) begin
          for (int i = 0; i < W; i++)
            if (ins[i].u.valid) begin
              automatic int e = int'(slot_of_lane[i]);
              e_v[e]   <= 1'b1;
              e_r[e]   <= ins[i];
              e_m1[e]  <= !ins[i].u.use1 || lk_m[2*i];
              e_sh1[e] <= ins[i].u.use1 ? lk_sh[2*i] : 8'd0;
              e_m2[e]  <= !ins[i].u.use2 || lk_m[2*i+1];
              e_sh2[e] <= ins[i].u.use2 ? lk_sh[2*i+1] : 8'd0;
              for (int j = 0; j < RS_SIZE; j++) begin
                automatic logic prev_lane = 1'b0;   // inserted by an earlier lane now
                for (int a = 0; a < i; a++)
                  if (ins[a].u.valid && int'(slot_of_lane[a]) == j) prev_lane = 1'b1;
                ob[e][j] <= e_v[j] || prev_lane;
                ob[j][e] <= 1'b0;
              end
            end
        end
        if (mode_inorder)
          for (int t = 0; t < NUM_THREADS; t++) begin
            automatic int tadd = 0;
            if (ins_go && can_insert)
              for (int i = 0; i < W; i++) if (ins[i].u.valid && int'(ins[i].u.tid) == t) tadd++;
            tail_q[t] <= PW'((int'(tail_q[t]) + tadd) % PART);
            cnt_q[t]  <= PW'(int'(cnt_q[t]) + tadd - int'(thr_fired[t]));
          end
      end
    end
  end

endmodule
