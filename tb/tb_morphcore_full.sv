// tb_morphcore_full: end-to-end test of the MorphCore core at its default
// parameters (10M-instruction quantum, 100K-instruction sampling interval).
// It is the same test as tb_morphcore_top, with a long single-thread phase so
// that the policy samples all four OutofOrder modes (4 x 100K instructions)
// and takes a decision.
//
//
// Each of the eight threads runs its own looping program (ALU, multiply,
// load, store, call/return and jumps) in its own code and data region. The
// testbench follows every committed instruction with an independent
// instruction-level model of the thread and compares the PC, the destination
// register and the value. The set of active threads changes in phases
// (1 thread, 8 threads, 2 other threads, 3 threads, 1 thread), so the core
// must switch between OutofOrder and InOrder mode and exchange its
// out-of-order contexts; within OutofOrder phases the sampling policy (short
// quantum/interval here) moves through the four width/window modes. Each
// mechanism is counted and a failure is recorded for any that never happened.
module tb_morphcore_full;
  import morph_pkg::*;


  logic clk = 1'b0, rst_n = 1'b0;
  logic [NUM_THREADS-1:0] thread_active;
  logic imem_we, dmem_we, ctx_init_we;
  logic [PC_W-1:0] imem_addr, ctx_init_pc;
  logic [31:0] imem_data;
  logic [ADDR_W-1:0] dmem_addr;
  logic [XLEN-1:0] dmem_data;
  logic [TID_W-1:0] ctx_init_tid;
  logic [15:0] energy;
  logic [1:0] objective = 2'd2;
  logic [6:0] x_pct = 7'd15;
  logic [WIDTH-1:0] cm_v, cm_wen;
  logic [WIDTH-1:0][TID_W-1:0] cm_tid;
  logic [WIDTH-1:0][PC_W-1:0] cm_pc;
  logic [WIDTH-1:0][AREG_W-1:0] cm_rd;
  logic [WIDTH-1:0][XLEN-1:0] cm_data;
  logic mode_inorder, half_width, win_small, running, dispatch_stall, policy_decided, lsq_violation;
  logic [15:0] n_mode_switch, n_delayed_writes;

  morphcore_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ------------------------------------------------------------ programs + model
  logic [31:0]     prog [8192];
  logic [XLEN-1:0] gmem [4096];
  logic [XLEN-1:0] gregs [NUM_THREADS][NUM_AREG];
  logic [PC_W-1:0] gpc [NUM_THREADS];
  logic [PC_W-1:0] gras [NUM_THREADS][$];
  longint          ncommit [NUM_THREADS];

  function automatic logic [3:0] rdst();
    return 4'($urandom_range(1, 14));
  endfunction
  function automatic logic [3:0] rsrc();
    return 4'($urandom_range(1, 15));
  endfunction

  task automatic gen_thread(int t);
    int base = t * 256, pc;
    prog[base] = enc(OP_ADDI, 4'd15, 4'd15, 4'd0, 16'(t * 64));
    for (int r = 1; r < 15; r++) prog[base + r] = enc(OP_ADDI, 4'(r), 4'(r), 4'd0, 16'($urandom_range(1, 999)));
    pc = base + 16;
    for (int i = 0; i < 48; i++) begin
      int k = $urandom_range(0, 9);
      logic [15:0] off = 16'($urandom_range(0, 15));
      case (k)
        0, 1: prog[pc] = enc(OP_ADD,  rdst(), rsrc(), rsrc(), 16'd0);
        2:    prog[pc] = enc(OP_SUB,  rdst(), rsrc(), rsrc(), 16'd0);
        3:    prog[pc] = enc(OP_XOR,  rdst(), rsrc(), rsrc(), 16'd0);
        4:    prog[pc] = enc(OP_ADDI, rdst(), rsrc(), 4'd0, 16'($urandom_range(0, 65535)));
        5:    prog[pc] = enc(OP_MUL,  rdst(), rsrc(), rsrc(), 16'd0);
        6, 7: prog[pc] = enc(OP_LD,   rdst(), 4'd15, 4'd0, off);
        default: prog[pc] = enc(OP_ST, 4'd0, 4'd15, rsrc(), off);
      endcase
      pc++;
    end
    prog[pc]     = enc(OP_CALL, 4'd0, 4'd0, 4'd0, 16'(base + 200));
    prog[pc + 1] = enc(OP_JMP,  4'd0, 4'd0, 4'd0, 16'(base + 16));
    for (int i = 0; i < 6; i++)
      prog[base + 200 + i] = (i % 2 == 0) ? enc(OP_MUL, rdst(), rsrc(), rsrc(), 16'd0)
                                          : enc(OP_ST, 4'd0, 4'd15, rsrc(), 16'($urandom_range(16, 31)));
    prog[base + 206] = enc(OP_LD, rdst(), 4'd15, 4'd0, 16'($urandom_range(16, 31)));
    prog[base + 207] = enc(OP_RET, 4'd0, 4'd0, 4'd0, 16'd0);
  endtask

  // one instruction of thread t in the reference model; returns the value written
  task automatic model_step(int t, output logic [PC_W-1:0] pc, output logic wen,
                            output logic [3:0] rd, output logic [XLEN-1:0] val);
    logic [31:0] w = prog[gpc[t]];
    opcode_e op = opcode_e'(w[31:28]);
    logic [3:0] a = w[23:20], b = w[19:16];
    logic [XLEN-1:0] imm = {{(XLEN-16){w[15]}}, w[15:0]};
    logic [ADDR_W-1:0] addr = ADDR_W'(gregs[t][a] + imm);
    pc  = gpc[t];
    rd  = w[27:24];
    wen = 1'b0;
    val = '0;
    gpc[t] = gpc[t] + 1;
    case (op)
      OP_ADD:  begin wen = 1; val = gregs[t][a] + gregs[t][b]; end
      OP_SUB:  begin wen = 1; val = gregs[t][a] - gregs[t][b]; end
      OP_XOR:  begin wen = 1; val = gregs[t][a] ^ gregs[t][b]; end
      OP_ADDI: begin wen = 1; val = gregs[t][a] + imm; end
      OP_MUL:  begin wen = 1; val = gregs[t][a] * gregs[t][b]; end
      OP_LD:   begin wen = 1; val = gmem[addr]; end
      OP_ST:   gmem[addr] = gregs[t][b];
      OP_JMP:  gpc[t] = w[PC_W-1:0];
      OP_CALL: begin gras[t].push_back(gpc[t]); gpc[t] = w[PC_W-1:0]; end
      OP_RET:  gpc[t] = gras[t].pop_back();
      default: ;
    endcase
    if (wen) gregs[t][rd] = val;
  endtask

  // ------------------------------------------------------------ commit checking
  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < WIDTH; i++) if (cm_v[i]) begin
      logic [PC_W-1:0] pc; logic wen; logic [3:0] rd; logic [XLEN-1:0] val;
      int t;
      t = int'(cm_tid[i]);
      model_step(t, pc, wen, rd, val);
      ncommit[t]++;
      checks++;
      if (pc !== cm_pc[i] || wen !== cm_wen[i] || (wen && (rd !== cm_rd[i] || val !== cm_data[i]))) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH cyc %0d t%0d pc %0d/%0d wen %0d/%0d rd %0d/%0d val %h/%h (inorder=%0d hw=%0d ws=%0d)",
                   cycle, t, cm_pc[i], pc, cm_wen[i], wen, cm_rd[i], rd, cm_data[i], val,
                   mode_inorder, half_width, win_small);
      end
    end
  end

  // ------------------------------------------------------------ mechanism counters
  int n_to_inorder = 0, n_to_ooo = 0, n_stall = 0, n_fwd = 0, n_decided = 0, n_swap = 0;
  int n_mode_cyc [4];
  logic prev_inorder = 1'b0;
  logic [OOO_CTX-1:0][TID_W-1:0] prev_slots;
  always @(posedge clk) if (rst_n) begin
    if (mode_inorder && !prev_inorder) n_to_inorder++;
    if (!mode_inorder && prev_inorder) n_to_ooo++;
    prev_inorder <= mode_inorder;
    prev_slots   <= dut.slot_tid;
    if (!mode_inorder && prev_slots != dut.slot_tid && !$isunknown(prev_slots)) n_swap++;
    if (dispatch_stall) n_stall++;
    if (|dut.u_lsq.fwd_hit) n_fwd++;
    if (policy_decided) n_decided++;
    if (running && !mode_inorder && |cm_v) n_mode_cyc[{half_width, win_small}]++;
  end

  // energy per cycle by mode (wider and larger costs more)
  always_comb begin
    energy = mode_inorder ? 16'd60 : 16'(50 + (half_width ? 0 : 30) + (win_small ? 0 : 20));
  end

  // ------------------------------------------------------------ stimulus
  task automatic phase(logic [NUM_THREADS-1:0] act, int cycles);
    thread_active = act;
    repeat (cycles) @(posedge clk);
  endtask

  initial begin
    thread_active = '0;
    imem_we = 0; dmem_we = 0; ctx_init_we = 0;
    imem_addr = '0; imem_data = '0; dmem_addr = '0; dmem_data = '0;
    ctx_init_tid = '0; ctx_init_pc = '0;
    for (int i = 0; i < 8192; i++) prog[i] = '0;
    for (int t = 0; t < NUM_THREADS; t++) begin
      gen_thread(t);
      gpc[t] = PC_W'(t * 256);
      ncommit[t] = 0;
      for (int r = 0; r < NUM_AREG; r++) gregs[t][r] = '0;
    end
    for (int i = 0; i < 4; i++) n_mode_cyc[i] = 0;
    repeat (2) @(posedge clk);
    // load instruction and data storage while the core is held in reset
    for (int i = 0; i < NUM_THREADS * 256; i++) begin
      imem_we <= 1; imem_addr <= PC_W'(i); imem_data <= prog[i];
      @(posedge clk);
    end
    for (int i = 0; i < 4096; i++) begin
      gmem[i] = XLEN'(i) * 64'h9E37_79B9_7F4A_7C15 + 64'd7;
      dmem_we <= 1; dmem_addr <= ADDR_W'(i); dmem_data <= gmem[i];
      @(posedge clk);
    end
    imem_we <= 0; dmem_we <= 0;
    rst_n <= 1'b1;
    for (int t = 0; t < NUM_THREADS; t++) begin
      ctx_init_we <= 1; ctx_init_tid <= TID_W'(t); ctx_init_pc <= PC_W'(t * 256);
      @(posedge clk);
    end
    ctx_init_we <= 0;
    repeat (20) @(posedge clk);
    phase(8'b0000_0001, 300000);
    phase(8'b1111_1111, 4000);
    phase(8'b0000_0110, 6000);
    phase(8'b0011_1000, 3000);
    phase(8'b0000_0001, 5000);
    phase(8'b0000_0000, 300);
    $display("commits per thread: %0d %0d %0d %0d %0d %0d %0d %0d", ncommit[0], ncommit[1],
             ncommit[2], ncommit[3], ncommit[4], ncommit[5], ncommit[6], ncommit[7]);
    $display("to_inorder=%0d to_ooo=%0d swaps=%0d switches=%0d stalls=%0d fwd=%0d delayed=%0d decided=%0d",
             n_to_inorder, n_to_ooo, n_swap, n_mode_switch, n_stall, n_fwd, n_delayed_writes, n_decided);
    $display("OOO commit cycles per mode 4W192=%0d 4W48=%0d 2W192=%0d 2W48=%0d",
             n_mode_cyc[0], n_mode_cyc[1], n_mode_cyc[2], n_mode_cyc[3]);
    for (int t = 0; t < NUM_THREADS; t++) begin
      checks++;
      if (ncommit[t] < 100) begin failures++; $display("FAIL thread %0d made no progress", t); end
    end
    checks += 9;
    if (n_to_inorder == 0)     begin failures++; $display("FAIL no switch to InOrder"); end
    if (n_to_ooo == 0)         begin failures++; $display("FAIL no switch to OutofOrder"); end
    if (n_swap == 0)           begin failures++; $display("FAIL no context exchange"); end
    if (n_stall == 0)          begin failures++; $display("FAIL no dispatch stall"); end
    if (n_fwd == 0)            begin failures++; $display("FAIL no store-to-load forwarding"); end
    if (n_delayed_writes == 0) begin failures++; $display("FAIL no delayed in-order write"); end
    if (n_decided == 0)        begin failures++; $display("FAIL no policy decision"); end
    if (lsq_violation)         begin failures++; $display("FAIL order violation"); end
    if (n_mode_cyc[1] == 0 || n_mode_cyc[2] == 0 || n_mode_cyc[3] == 0)
                               begin failures++; $display("FAIL a reduced mode never ran"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
