// morph_pkg: types and constants shared by the MorphCore modules.
//
// The core executes a small register-to-register micro-op set (ALU, multiply,
// load, store and fetch-resolved jumps) that stands in for decoded x86
// micro-ops. Sizes follow the document's main configuration: 4-wide, 192-entry
// window (ROB/PRF), 60-entry RS, 70/50 load/store queue, 8 SMT contexts of
// which 2 are out-of-order contexts, 16 integer architectural registers per
// thread. The reduced sizes (2-wide, 48-entry window: RS 20, LQ 20, SQ 10,
// PRF 60) are the document's too. The instruction encoding is this design's
// own choice.
package morph_pkg;

  localparam int XLEN        = 64;
  localparam int WIDTH       = 4;     // full superscalar width
  localparam int NUM_THREADS = 8;     // in-order SMT contexts
  localparam int OOO_CTX     = 2;     // out-of-order SMT contexts
  localparam int NUM_AREG    = 16;    // integer architectural registers per thread
  localparam int PC_W        = 13;    // word address into the 32 KB I-cache
  localparam int TID_W       = 3;
  localparam int AREG_W      = 4;
  localparam int PREG_W      = 8;     // enough for 192 physical registers
  localparam int ROB_W       = 8;     // enough for 192 ROB entries
  localparam int RS_W        = 6;     // enough for 60 RS entries
  localparam int LSQ_W       = 7;     // enough for 70 LQ / 50 SQ entries
  localparam int ADDR_W      = 12;    // 64-bit word address into the 32 KB D-cache

  // Functional-unit latencies (Table 4.1): int arith 1, int mul 4 (pipelined),
  // loads 1 + 2-cycle D-cache.
  localparam int LAT_ALU = 1;
  localparam int LAT_MUL = 4;
  localparam int LAT_LD  = 3;

  typedef enum logic [3:0] {
    OP_NOP  = 4'd0,
    OP_ADD  = 4'd1,
    OP_SUB  = 4'd2,
    OP_XOR  = 4'd3,
    OP_ADDI = 4'd4,
    OP_MUL  = 4'd5,
    OP_LD   = 4'd6,
    OP_ST   = 4'd7,
    OP_JMP  = 4'd8,
    OP_CALL = 4'd9,
    OP_RET  = 4'd10
  } opcode_e;

  typedef enum logic [1:0] {
    FU_ALU = 2'd0,
    FU_MUL = 2'd1,
    FU_MEM = 2'd2
  } fu_class_e;

  // Fetched instruction word with its context.
  typedef struct packed {
    logic              valid;
    logic [TID_W-1:0]  tid;
    logic [PC_W-1:0]   pc;
    logic [31:0]       instr;
  } fetch_slot_t;

  // Decoded micro-op.
  typedef struct packed {
    logic              valid;
    logic [TID_W-1:0]  tid;
    logic [PC_W-1:0]   pc;
    opcode_e           op;
    fu_class_e         fu;
    logic [3:0]        lat;
    logic              has_dst;
    logic              use1;
    logic              use2;
    logic [AREG_W-1:0] rd;
    logic [AREG_W-1:0] rs1;
    logic [AREG_W-1:0] rs2;
    logic [XLEN-1:0]   imm;
  } uop_t;

  // Micro-op after renaming and resource allocation.
  typedef struct packed {
    uop_t              u;
    logic [PREG_W-1:0] pdst;
    logic [PREG_W-1:0] psrc1;
    logic [PREG_W-1:0] psrc2;
    logic [PREG_W-1:0] pold;   // previous mapping of rd, freed at commit
    logic [ROB_W-1:0]  rob;
    logic [LSQ_W-1:0]  lsq;    // LQ index for loads, SQ index for stores
    logic [LSQ_W-1:0]  sqpos;  // loads: SQ insert position at rename (older stores lie before it)
  } ruop_t;

  // Issued micro-op on its way to a functional unit.
  typedef struct packed {
    logic              valid;
    logic [1:0]        gk;     // grant order within the cycle (program order per thread)
    ruop_t             r;
  } issue_t;

  // Completed result.
  typedef struct packed {
    logic              valid;
    logic [TID_W-1:0]  tid;
    logic              wen;
    logic [PREG_W-1:0] pdst;
    logic [ROB_W-1:0]  rob;
    logic [XLEN-1:0]   data;
  } result_t;

  // Instruction word layout: op[31:28] rd[27:24] rs1[23:20] rs2[19:16] imm[15:0]
  function automatic logic [31:0] enc(opcode_e op, logic [3:0] rd, logic [3:0] rs1,
                                      logic [3:0] rs2, logic [15:0] imm);
    return {op, rd, rs1, rs2, imm};
  endfunction

  function automatic uop_t decode_word(fetch_slot_t f);
    uop_t u;
    u         = '0;
    u.valid   = f.valid;
    u.tid     = f.tid;
    u.pc      = f.pc;
    u.op      = opcode_e'(f.instr[31:28]);
    u.rd      = f.instr[27:24];
    u.rs1     = f.instr[23:20];
    u.rs2     = f.instr[19:16];
    u.imm     = {{(XLEN-16){f.instr[15]}}, f.instr[15:0]};
    u.fu      = FU_ALU;
    u.lat     = 4'(LAT_ALU);
    unique case (u.op)
      OP_ADD, OP_SUB, OP_XOR: begin u.has_dst = 1'b1; u.use1 = 1'b1; u.use2 = 1'b1; end
      OP_ADDI:                begin u.has_dst = 1'b1; u.use1 = 1'b1; end
      OP_MUL:  begin u.has_dst = 1'b1; u.use1 = 1'b1; u.use2 = 1'b1; u.fu = FU_MUL; u.lat = 4'(LAT_MUL); end
      OP_LD:   begin u.has_dst = 1'b1; u.use1 = 1'b1; u.fu = FU_MEM; u.lat = 4'(LAT_LD); end
      OP_ST:   begin u.use1 = 1'b1; u.use2 = 1'b1; u.fu = FU_MEM; end
      default: ;  // NOP and control transfers (resolved in fetch) execute as no-ops
    endcase
    return u;
  endfunction

  // Reference semantics of one ALU/MUL micro-op (used by the execution units).
  function automatic logic [XLEN-1:0] alu_result(opcode_e op, logic [XLEN-1:0] a,
                                                 logic [XLEN-1:0] b, logic [XLEN-1:0] imm);
    unique case (op)
      OP_ADD:  return a + b;
      OP_SUB:  return a - b;
      OP_XOR:  return a ^ b;
      OP_ADDI: return a + imm;
      OP_MUL:  return a * b;
      default: return '0;
    endcase
  endfunction

endpackage
