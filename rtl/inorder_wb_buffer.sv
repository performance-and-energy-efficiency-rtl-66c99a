// inorder_wb_buffer: delayed-write buffer of InOrder mode (4 entries per thread).
//
// In InOrder mode the PRF partitions hold each thread's architectural
// registers, so the document delays the PRF write of a younger instruction
// while an older, longer-latency instruction of the same thread is still in
// the execution pipeline; the younger result waits in a small per-thread data
// buffer that is also bypassed into the PRF-read stage.
//
// How it is done here: for every thread the buffer keeps the number of cycles
// until the last fired instruction writes the PRF (rel). An instruction fired
// with latency L is due to write after R = max(L, rel) cycles. If R > L the
// write is delayed: an entry is reserved at fire time with a count-down of R,
// it captures the result when the functional unit produces it, and writes the
// PRF when the count-down reaches zero. All other results are written straight
// away (direct[] tells the core which). thr_ok[t] is high while thread t has
// at least two free entries, the most it can reserve in one cycle, and the RS
// does not fire a thread without it. pend[] marks registers with a buffered
// write; the RS does not fire a younger writer of such a register, so a
// buffered (older) value can never overwrite a younger one in the PRF. In
// OutofOrder mode nothing is buffered.
//
// Timing: instruction fired in cycle c writes the PRF at the end of cycle
// c+1+R. Lookups (lk_*) are combinational.
module inorder_wb_buffer
  import morph_pkg::*;
#(
  parameter int W       = 4,
  parameter int ENTRIES = 4,
  parameter int NUM_PREG = 192
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        mode_inorder,
  input  issue_t [W-1:0]              iss,
  input  result_t [W-1:0][2:0]        res,
  output logic [W-1:0][2:0]           direct,
  output logic [NUM_THREADS*ENTRIES-1:0]             rel_we,
  output logic [NUM_THREADS*ENTRIES-1:0][PREG_W-1:0] rel_addr,
  output logic [NUM_THREADS*ENTRIES-1:0][XLEN-1:0]   rel_data,
  input  logic [2*W-1:0][PREG_W-1:0]  lk_addr,
  output logic [2*W-1:0]              lk_hit,
  output logic [2*W-1:0][XLEN-1:0]    lk_data,
  output logic [NUM_THREADS-1:0]      thr_ok,
  output logic [NUM_PREG-1:0]         pend,           // registers with a buffered write
  output logic                        empty,
  output logic [15:0]                 delayed_count   // writes delayed so far (statistics)
);
  localparam int NE = NUM_THREADS * ENTRIES;

  logic [NE-1:0]             v_q, d_q;
  logic [NE-1:0][ROB_W-1:0]  rob_q;
  logic [NE-1:0][PREG_W-1:0] pd_q;
  logic [NE-1:0][4:0]        cnt_q;
  logic [NE-1:0][XLEN-1:0]   data_q;
  logic [NUM_THREADS-1:0][4:0] rel_q;

  always_comb begin
    empty = ~|v_q;
    pend  = '0;
    for (int e = 0; e < NE; e++)
      if (v_q[e] && int'(pd_q[e]) < NUM_PREG) pend[pd_q[e]] = 1'b1;
    for (int t = 0; t < NUM_THREADS; t++) begin
      automatic int nfree = 0;
      for (int e = 0; e < ENTRIES; e++) nfree += int'(!v_q[t*ENTRIES+e]);
      thr_ok[t] = !mode_inorder || nfree >= 2;
    end
    for (int e = 0; e < NE; e++) begin
      rel_we[e]   = v_q[e] && cnt_q[e] == 0;
      rel_addr[e] = pd_q[e];
      rel_data[e] = data_q[e];
    end
    for (int s = 0; s < 2*W; s++) begin
      lk_hit[s]  = 1'b0;
      lk_data[s] = '0;
      for (int e = 0; e < NE; e++)
        if (v_q[e] && d_q[e] && pd_q[e] == lk_addr[s]) begin
          lk_hit[s]  = 1'b1;
          lk_data[s] = data_q[e];
        end
    end
    for (int k = 0; k < W; k++)
      for (int c = 0; c < 3; c++) begin
        direct[k][c] = res[k][c].valid && res[k][c].wen;
        for (int e = 0; e < NE; e++)
          if (v_q[e] && !d_q[e] && rob_q[e] == res[k][c].rob) direct[k][c] = 1'b0;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q   <= '0;
      d_q   <= '0;
      rel_q <= '0;
      rob_q <= '0;
      pd_q  <= '0;
      cnt_q <= '0;
      data_q <= '0;
      delayed_count <= '0;
    end else begin
      automatic logic [NE-1:0] busy = v_q;
      automatic int ndel = 0;
      // count down, release
      for (int e = 0; e < NE; e++) begin
        if (v_q[e] && cnt_q[e] != 0) cnt_q[e] <= cnt_q[e] - 5'd1;
        if (rel_we[e]) begin
          v_q[e] <= 1'b0;
          busy[e] = 1'b0;
        end
      end
      // capture results of delayed writes
      for (int k = 0; k < W; k++)
        for (int c = 0; c < 3; c++)
          for (int e = 0; e < NE; e++)
            if (v_q[e] && !d_q[e] && res[k][c].valid && res[k][c].wen && rob_q[e] == res[k][c].rob) begin
              d_q[e]    <= 1'b1;
              data_q[e] <= res[k][c].data;
            end
      // fire: compute write time per thread in program order
      for (int t = 0; t < NUM_THREADS; t++) begin
        automatic int rel = int'(rel_q[t]);
        automatic logic fired = 1'b0;
        for (int g = 0; g < W; g++)
          for (int k = 0; k < W; k++)
            if (mode_inorder && iss[k].valid && int'(iss[k].gk) == g &&
                int'(iss[k].r.u.tid) == t && iss[k].r.u.has_dst) begin
              automatic int lat = int'(iss[k].r.u.lat);
              automatic int r   = (rel > lat) ? rel : lat;
              if (r > lat) begin
                automatic logic got = 1'b0;
                for (int e = t*ENTRIES; e < (t+1)*ENTRIES; e++)
                  if (!got && !busy[e]) begin
                    got       = 1'b1;
                    busy[e]   = 1'b1;
                    v_q[e]   <= 1'b1;
                    d_q[e]   <= 1'b0;
                    rob_q[e] <= iss[k].r.rob;
                    pd_q[e]  <= iss[k].r.pdst;
                    cnt_q[e] <= 5'(r);
                  end
                ndel++;
              end
              rel   = r;
              fired = 1'b1;
            end
        if (fired)          rel_q[t] <= 5'(rel - 1);
        else if (rel > 0)   rel_q[t] <= 5'(rel - 1);
      end
      delayed_count <= delayed_count + 16'(ndel);
    end
  end

endmodule
