// tlp_mode_ctrl: mode decision and mode-change routine.
//
// Decision (document Sec. 4.1): the core runs in InOrder mode when more than
// two threads are active and in OutofOrder mode otherwise; in OutofOrder mode
// the width/window mode comes from the sampling policy (ilp_mode), in InOrder
// mode the core is always 4-wide with the full window. In OutofOrder mode the
// two out-of-order contexts (slots) must hold the active threads; when a
// thread becomes active that is not in a slot the contexts are exchanged
// through the same routine (this design's choice).
//
// Mode-change routine (a micro-code routine in the document, a state machine
// here): DRAIN stops fetch until the pipeline, ROB, store queue and write
// buffer are empty; SPILL copies the architectural registers of every thread
// whose state is in the PRF (through the Permanent-RAT in OutofOrder mode, from
// its partition in InOrder mode) to a reserved save area, four 64-bit
// registers (256 bits) per cycle, and records each thread's save-area pointer
// in the Active Threads Table; RECONF switches the configuration and resets
// the RATs, free list, RS, ROB and queues (reinit); FILL loads the
// architectural registers from the save areas named by the Active Threads
// Table into the PRF: every thread's partition for InOrder mode, or registers
// slot*16..slot*16+15 of the two slots in OutofOrder mode (the mapping reinit
// gives the RATs). With 16 registers per thread a thread takes 4 cycles to
// spill and 4 to fill (the document: about 30 cycles for x86's 780 bytes).
//
// After reset the routine runs RECONF and FILL once (all registers zero) and
// the core starts in OutofOrder mode with threads 0 and 1 in the slots.
module tlp_mode_ctrl
  import morph_pkg::*;
#(
  parameter int  SAVE_BASE = 'h10000    // byte address of the reserved save area
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [NUM_THREADS-1:0]     thread_active,
  input  logic [1:0]                 ilp_mode,     // {half_width, win_small}
  input  logic                       drained,
  input  logic [OOO_CTX-1:0][NUM_AREG-1:0][PREG_W-1:0] perm_rat,
  // configuration
  output logic                       mode_inorder,
  output logic                       half_width,
  output logic                       win_small,
  output logic [OOO_CTX-1:0][TID_W-1:0] slot_tid,
  output logic [NUM_THREADS-1:0]     ctx_enable,
  output logic                       run,          // normal execution (not switching)
  output logic                       reinit,
  // PRF access of the routine
  output logic [3:0][PREG_W-1:0]     mc_raddr,
  input  logic [3:0][XLEN-1:0]       mc_rdata,
  output logic [3:0]                 mc_we,
  output logic [3:0][PREG_W-1:0]     mc_waddr,
  output logic [3:0][XLEN-1:0]       mc_wdata,
  output logic [NUM_THREADS-1:0][63:0] att,        // Active Threads Table
  output logic [15:0]                n_switch
);
  typedef enum logic [2:0] {S_RUN, S_DRAIN, S_SPILL, S_RECONF, S_FILL} state_e;
  localparam int CHUNKS = NUM_AREG / 4;

  state_e st_q;
  logic [XLEN-1:0] save_q [NUM_THREADS * NUM_AREG];
  logic [4:0]      step_q;          // thread list index * CHUNKS + chunk
  logic            n_inorder, n_half, n_small;
  logic [OOO_CTX-1:0][TID_W-1:0] n_slot;
  logic            n_inorder_cur;

  // ---------------------------------------------------------------- decision
  logic       want_inorder;
  logic [OOO_CTX-1:0][TID_W-1:0] want_slot;
  logic       change;
  always_comb begin
    automatic int n = 0;
    automatic logic [NUM_THREADS-1:0] covered = '0;
    automatic logic [OOO_CTX-1:0] taken = '0;
    for (int t = 0; t < NUM_THREADS; t++) n += int'(thread_active[t]);
    want_inorder = n > 2;
    // keep threads already in a slot, place the other active ones in free slots
    want_slot = slot_tid;
    for (int s = 0; s < OOO_CTX; s++)
      for (int t = 0; t < NUM_THREADS; t++)
        if (thread_active[t] && int'(slot_tid[s]) == t) begin
          covered[t] = 1'b1;
          taken[s]   = 1'b1;
        end
    for (int t = 0; t < NUM_THREADS; t++)
      if (thread_active[t] && !covered[t])
        for (int s = 0; s < OOO_CTX; s++)
          if (!covered[t] && !taken[s]) begin
            want_slot[s] = TID_W'(t);
            taken[s]     = 1'b1;
            covered[t]   = 1'b1;
          end
    if (want_inorder)
      change = !mode_inorder;
    else
      change = mode_inorder || want_slot != slot_tid ||
               {half_width, win_small} != ilp_mode;
  end

  // ---------------------------------------------------------------- routine
  logic [TID_W-1:0] cur_t;
  logic [1:0]       chunk;
  logic             last_step;
  always_comb begin
    chunk = step_q[1:0];
    if (st_q == S_FILL ? n_inorder : mode_inorder) begin
      cur_t     = TID_W'(step_q[4:2]);
      last_step = step_q == 5'(NUM_THREADS * CHUNKS - 1);
    end else begin
      cur_t     = (st_q == S_FILL) ? n_slot[step_q[2]] : slot_tid[step_q[2]];
      last_step = step_q == 5'(OOO_CTX * CHUNKS - 1);
    end
    mc_raddr = '0;
    mc_we    = '0;
    mc_waddr = '0;
    mc_wdata = '0;
    for (int k = 0; k < 4; k++) begin
      automatic int r = int'(chunk) * 4 + k;
      automatic int base = int'(att[cur_t] - 64'(SAVE_BASE)) / 8;
      mc_raddr[k] = mode_inorder ? PREG_W'(int'(cur_t) * NUM_AREG + r)
                                 : perm_rat[step_q[2]][r];
      if (st_q == S_FILL) begin
        mc_we[k]    = 1'b1;
        mc_waddr[k] = n_inorder ? PREG_W'(int'(cur_t) * NUM_AREG + r)
                                : PREG_W'(int'(step_q[2]) * NUM_AREG + r);
        mc_wdata[k] = save_q[(base + r) % (NUM_THREADS * NUM_AREG)];
      end
    end
  end

  assign run        = st_q == S_RUN;
  assign reinit     = st_q == S_FILL && step_q == 0;
  assign mode_inorder = n_inorder_cur;

  always_comb begin
    ctx_enable = '0;
    if (st_q == S_RUN) begin
      if (mode_inorder) ctx_enable = thread_active;
      else
        for (int t = 0; t < NUM_THREADS; t++)
          for (int s = 0; s < OOO_CTX; s++)
            if (thread_active[t] && int'(slot_tid[s]) == t) ctx_enable[t] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q          <= S_RECONF;
      step_q        <= '0;
      n_inorder_cur <= 1'b0;
      half_width    <= 1'b0;
      win_small     <= 1'b0;
      for (int s = 0; s < OOO_CTX; s++) slot_tid[s] <= TID_W'(s);
      n_inorder     <= 1'b0;
      n_half        <= 1'b0;
      n_small       <= 1'b0;
      for (int s = 0; s < OOO_CTX; s++) n_slot[s] <= TID_W'(s);
      n_switch      <= '0;
      for (int t = 0; t < NUM_THREADS; t++) att[t] <= 64'(SAVE_BASE + t * NUM_AREG * 8);
      for (int i = 0; i < NUM_THREADS * NUM_AREG; i++) save_q[i] <= '0;
    end else begin
      unique case (st_q)
        S_RUN: if (change) begin
          st_q      <= S_DRAIN;
          n_inorder <= want_inorder;
          n_half    <= want_inorder ? 1'b0 : ilp_mode[1];
          n_small   <= want_inorder ? 1'b0 : ilp_mode[0];
          n_slot    <= want_inorder ? slot_tid : want_slot;
          n_switch  <= n_switch + 16'd1;
        end
        S_DRAIN: if (drained) begin
          st_q   <= S_SPILL;
          step_q <= '0;
        end
        S_SPILL: begin
          for (int k = 0; k < 4; k++)
            save_q[int'(cur_t) * NUM_AREG + int'(chunk) * 4 + k] <= mc_rdata[k];
          att[cur_t] <= 64'(SAVE_BASE + int'(cur_t) * NUM_AREG * 8);
          step_q <= step_q + 5'd1;
          if (last_step) st_q <= S_RECONF;
        end
        S_RECONF: begin
          n_inorder_cur <= n_inorder;
          half_width    <= n_half;
          win_small     <= n_small;
          slot_tid      <= n_slot;
          step_q        <= '0;
          st_q          <= S_FILL;
        end
        S_FILL: begin
          step_q <= step_q + 5'd1;
          if (last_step) st_q <= S_RUN;
        end
        default: st_q <= S_RUN;
      endcase
    end
  end

endmodule
