// exec_unit: register read, bypass network and the four functional units.
//
// Fired instructions are latched in the register-read stage, where each
// source is taken, in this order, from the bypass network (results that the
// functional units put out in this cycle), from the in-order write buffer
// (results whose PRF write is being delayed, InOrder mode) or from the PRF.
// The four functional units are multi-purpose, with the document's latencies:
// integer arithmetic 1 cycle, integer multiply 4 cycles pipelined, loads
// 1 cycle of address generation plus a 2-cycle pipelined D-cache. Units 0 and
// 1 carry the memory pipes (the D-cache has two ports). A result is visible on
// res[] exactly <latency> cycles after the cycle in which its instruction
// would first see the result of a producer it was woken by, so that the RS
// wakeup timing and the bypass meet (issue in cycle t, result on res[] in
// cycle t+1+latency).
//
// Loads: in the second cycle they send their address to the D-cache and
// search the store queue for the latest older store; the store-queue answer
// is carried one cycle and overrides the D-cache data. Stores compute address
// and data in the register-read cycle and write the store queue at that clock
// edge; they complete (no register write) one cycle later.
//
// Reduced width: units 2 and 3 are off, and their bypass wires are cut off
// from the network (their results are masked from every bypass comparator).
module exec_unit
  import morph_pkg::*;
#(
  parameter int W    = 4,
  parameter int NMEM = 2
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        half_width,
  input  issue_t [W-1:0]              iss,
  // register read
  output logic [2*W-1:0][PREG_W-1:0]  rf_addr,
  input  logic [2*W-1:0][XLEN-1:0]    rf_data,
  input  logic [2*W-1:0]              wb_hit,
  input  logic [2*W-1:0][XLEN-1:0]    wb_data,
  // stores to the store queue
  output logic [NMEM-1:0]             st_v,
  output logic [NMEM-1:0][TID_W-1:0]  st_tid,
  output logic [NMEM-1:0][LSQ_W-1:0]  st_idx,
  output logic [NMEM-1:0][ADDR_W-1:0] st_addr,
  output logic [NMEM-1:0][XLEN-1:0]   st_data,
  // loads: store-queue search and D-cache read (second cycle)
  output logic [NMEM-1:0]             ld_v,
  output logic [NMEM-1:0][TID_W-1:0]  ld_tid,
  output logic [NMEM-1:0][LSQ_W-1:0]  ld_lq,
  output logic [NMEM-1:0][LSQ_W-1:0]  ld_sqpos,
  output logic [NMEM-1:0][ADDR_W-1:0] ld_addr,
  input  logic [NMEM-1:0]             fwd_hit,
  input  logic [NMEM-1:0][XLEN-1:0]   fwd_data,
  input  logic [NMEM-1:0][XLEN-1:0]   dc_data,      // one cycle after ld_addr
  // results: [unit][0]=ALU/store, [1]=multiply, [2]=load
  output result_t [W-1:0][2:0]        res
);
  issue_t  [W-1:0]       rr_q;
  result_t [W-1:0]       alu_q;
  result_t [W-1:0][3:0]  mul_q;
  issue_t  [NMEM-1:0]    lda_q;
  logic    [NMEM-1:0][ADDR_W-1:0] lda_addr;
  result_t [NMEM-1:0]    ldb_q;
  logic    [NMEM-1:0]    ldb_hit;
  logic    [NMEM-1:0][XLEN-1:0] ldb_fwd;
  result_t [NMEM-1:0]    ldc_q;

  always_comb begin
    res = '0;
    for (int k = 0; k < W; k++) begin
      res[k][0] = alu_q[k];
      res[k][1] = mul_q[k][3];
    end
    for (int k = 0; k < NMEM; k++) res[k][2] = ldc_q[k];
  end

  // Bypass network + operand selection.
  logic [2*W-1:0][XLEN-1:0] opnd;
  always_comb begin
    for (int k = 0; k < W; k++) begin
      rf_addr[2*k]   = rr_q[k].r.psrc1;
      rf_addr[2*k+1] = rr_q[k].r.psrc2;
    end
    for (int s = 0; s < 2*W; s++) begin
      automatic logic hit = 1'b0;
      opnd[s] = wb_hit[s] ? wb_data[s] : rf_data[s];
      for (int k = 0; k < W; k++)
        if (!(half_width && k >= W/2))         // gated bypass wires
          for (int c = 0; c < 3; c++)
            if (!hit && res[k][c].valid && res[k][c].wen && res[k][c].pdst == rf_addr[s]) begin
              hit     = 1'b1;
              opnd[s] = res[k][c].data;
            end
    end
  end

  // Memory pipe outputs.
  always_comb begin
    for (int k = 0; k < NMEM; k++) begin
      automatic ruop_t r = rr_q[k].r;
      st_v[k]    = rr_q[k].valid && r.u.op == OP_ST;
      st_tid[k]  = r.u.tid;
      st_idx[k]  = r.lsq;
      st_addr[k] = ADDR_W'(opnd[2*k] + r.u.imm);
      st_data[k] = opnd[2*k+1];
      ld_v[k]    = lda_q[k].valid;
      ld_tid[k]  = lda_q[k].r.u.tid;
      ld_lq[k]   = lda_q[k].r.lsq;
      ld_sqpos[k]= lda_q[k].r.sqpos;
      ld_addr[k] = lda_addr[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_q  <= '0;
      alu_q <= '0;
      mul_q <= '0;
      lda_q <= '0;
      ldb_q <= '0;
      ldc_q <= '0;
      lda_addr <= '0;
      ldb_hit  <= '0;
      ldb_fwd  <= '0;
    end else begin
      for (int k = 0; k < W; k++) begin
        automatic ruop_t r = rr_q[k].r;
        automatic logic  v = rr_q[k].valid && !(half_width && k >= W/2);
        rr_q[k] <= iss[k];
        if (half_width && k >= W/2) rr_q[k].valid <= 1'b0;
        // ALU (and store completion)
        alu_q[k]       <= '0;
        alu_q[k].valid <= v && (r.u.fu == FU_ALU || r.u.op == OP_ST);
        alu_q[k].tid   <= r.u.tid;
        alu_q[k].wen   <= r.u.fu == FU_ALU && r.u.has_dst;
        alu_q[k].pdst  <= r.pdst;
        alu_q[k].rob   <= r.rob;
        alu_q[k].data  <= alu_result(r.u.op, opnd[2*k], opnd[2*k+1], r.u.imm);
        // multiplier, 4 stages
        mul_q[k][0]       <= '0;
        mul_q[k][0].valid <= v && r.u.fu == FU_MUL;
        mul_q[k][0].tid   <= r.u.tid;
        mul_q[k][0].wen   <= 1'b1;
        mul_q[k][0].pdst  <= r.pdst;
        mul_q[k][0].rob   <= r.rob;
        mul_q[k][0].data  <= alu_result(r.u.op, opnd[2*k], opnd[2*k+1], r.u.imm);
        for (int s = 1; s < 4; s++) mul_q[k][s] <= mul_q[k][s-1];
      end
      for (int k = 0; k < NMEM; k++) begin
        // address generation
        lda_q[k]       <= rr_q[k];
        lda_q[k].valid <= rr_q[k].valid && rr_q[k].r.u.op == OP_LD;
        lda_addr[k]    <= ADDR_W'(opnd[2*k] + rr_q[k].r.u.imm);
        // D-cache cycle 1 + store-queue search
        ldb_q[k]       <= '0;
        ldb_q[k].valid <= lda_q[k].valid;
        ldb_q[k].tid   <= lda_q[k].r.u.tid;
        ldb_q[k].wen   <= 1'b1;
        ldb_q[k].pdst  <= lda_q[k].r.pdst;
        ldb_q[k].rob   <= lda_q[k].r.rob;
        ldb_hit[k]     <= fwd_hit[k];
        ldb_fwd[k]     <= fwd_data[k];
        // D-cache cycle 2
        ldc_q[k]       <= ldb_q[k];
        ldc_q[k].data  <= ldb_hit[k] ? ldb_fwd[k] : dc_data[k];
      end
    end
  end

endmodule
