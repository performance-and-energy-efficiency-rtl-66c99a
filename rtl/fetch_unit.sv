// fetch_unit: MorphCore fetch stage with eight SMT contexts.
//
// Each context holds a PC, a branch history register (BHR) and a return
// address stack (RAS), as the document describes. Every cycle one context is
// picked round-robin among the contexts that are enabled and a group of up to
// WIDTH consecutive instruction words is read from the I-cache. In OutofOrder
// mode the controller enables at most two contexts, in InOrder mode all eight
// (the document's 2 and 8 SMT ways). In reduced-width mode only the lower two
// fetch slots are used and the upper slots are always Not Valid.
//
// Conditional branches, and therefore the branch predictor and misprediction
// recovery, are not part of this design. Direct jumps, calls and returns are
// resolved here at fetch (this design's choice): the group is cut after the
// control transfer, the next PC of the context becomes the jump target (JMP,
// CALL) or the top of the RAS (RET), CALL pushes the return address, and the
// BHR shifts in a taken bit. Control-transfer words travel down the pipe as
// no-ops so that every fetched word is committed.
//
// Interface/timing: icache_pc/icache_tid are combinational from the context
// state; icache_words must return in the same cycle. The fetched group is
// registered in out_grp and held while stall is high. ctx_init_* sets the PC
// of a context (used by the testbench or boot code) and clears its RAS.
module fetch_unit
  import morph_pkg::*;
#(
  parameter int NUM_CTX   = 8,
  parameter int W         = 4,
  parameter int BHR_W     = 16,
  parameter int RAS_DEPTH = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    half_width,
  input  logic [NUM_CTX-1:0]      ctx_enable,   // contexts allowed to fetch
  input  logic                    stall,        // decode cannot take a new group
  input  logic                    ctx_init_we,
  input  logic [TID_W-1:0]        ctx_init_tid,
  input  logic [PC_W-1:0]         ctx_init_pc,
  output logic [PC_W-1:0]         icache_pc,
  input  logic [W-1:0][31:0]      icache_words,
  output fetch_slot_t [W-1:0]     out_grp,
  output logic [NUM_CTX-1:0][BHR_W-1:0] bhr,
  output logic                    fetched       // a group was fetched this cycle
);
  localparam int RP_W = $clog2(RAS_DEPTH);

  logic [NUM_CTX-1:0][PC_W-1:0]                  pc_q;
  logic [NUM_CTX-1:0][RAS_DEPTH-1:0][PC_W-1:0]   ras_q;
  logic [NUM_CTX-1:0][RP_W-1:0]                  rsp_q;
  logic [TID_W-1:0]                              rr_q;   // last context fetched

  // Round-robin pick among enabled contexts, starting after rr_q.
  logic             pick_v;
  logic [TID_W-1:0] pick;
  always_comb begin
    pick_v = 1'b0;
    pick   = '0;
    for (int k = 1; k <= NUM_CTX; k++) begin
      automatic logic [TID_W-1:0] c = TID_W'((int'(rr_q) + k) % NUM_CTX);
      if (!pick_v && ctx_enable[c]) begin
        pick_v = 1'b1;
        pick   = c;
      end
    end
  end

  assign icache_pc = pc_q[pick];

  // Build the group and the next PC of the picked context.
  fetch_slot_t [W-1:0] grp;
  logic [PC_W-1:0]     next_pc;
  logic                push, pop, taken;
  logic [PC_W-1:0]     push_pc;
  always_comb begin
    automatic logic cut = 1'b0;
    automatic int   lanes = half_width ? W/2 : W;
    grp     = '0;
    next_pc = pc_q[pick] + PC_W'(lanes);
    push    = 1'b0;
    pop     = 1'b0;
    taken   = 1'b0;
    push_pc = '0;
    for (int i = 0; i < W; i++) begin
      if (pick_v && !cut && i < lanes) begin
        automatic logic [31:0] w = icache_words[i];
        grp[i].valid = 1'b1;
        grp[i].tid   = pick;
        grp[i].pc    = pc_q[pick] + PC_W'(i);
        grp[i].instr = w;
        unique case (opcode_e'(w[31:28]))
          OP_JMP:  begin cut = 1'b1; taken = 1'b1; next_pc = w[PC_W-1:0]; end
          OP_CALL: begin cut = 1'b1; taken = 1'b1; next_pc = w[PC_W-1:0];
                         push = 1'b1; push_pc = pc_q[pick] + PC_W'(i + 1); end
          OP_RET:  begin cut = 1'b1; taken = 1'b1; pop = 1'b1;
                         next_pc = ras_q[pick][rsp_q[pick] - RP_W'(1)]; end
          default: ;
        endcase
      end
    end
  end

  assign fetched = pick_v && !stall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q    <= '0;
      ras_q   <= '0;
      rsp_q   <= '0;
      bhr     <= '0;
      rr_q    <= TID_W'(NUM_CTX - 1);
      out_grp <= '0;
    end else begin
      if (!stall) begin
        out_grp <= grp;
        if (pick_v) begin
          rr_q       <= pick;
          pc_q[pick] <= next_pc;
          if (taken) bhr[pick] <= {bhr[pick][BHR_W-2:0], 1'b1};
          if (push) begin
            ras_q[pick][rsp_q[pick]] <= push_pc;
            rsp_q[pick]              <= rsp_q[pick] + RP_W'(1);
          end else if (pop) begin
            rsp_q[pick] <= rsp_q[pick] - RP_W'(1);
          end
        end
      end
      if (ctx_init_we) begin
        pc_q[ctx_init_tid]  <= ctx_init_pc;
        rsp_q[ctx_init_tid] <= '0;
      end
    end
  end

endmodule
