// tb_fetch_unit: checks the SMT fetch unit with its own instruction memory.
//
// A random program holds ALU words, jumps within the main area and calls into
// a function area whose routines end with a return. Each enabled context
// starts at its own PC. A reference model per context (PC and return stack)
// must match every fetched lane: the lanes of a group are consecutive
// instructions of one context, a group ends after the first jump, call or
// return, and otherwise is 4 wide (2 in reduced width). Groups must rotate
// round-robin over the enabled contexts, hold while stall is high, and come
// one cycle after the pick (registered output).
module tb_fetch_unit;
  import morph_pkg::*;
  localparam int NUM_CTX = 8, W = 4, WORDS = 8192, FUNC = 7000;

  logic clk = 1'b0, rst_n = 1'b0, half_width = 1'b0, stall = 1'b0;
  logic [NUM_CTX-1:0] ctx_enable = '0;
  logic ctx_init_we = 1'b0;
  logic [TID_W-1:0] ctx_init_tid = '0;
  logic [PC_W-1:0] ctx_init_pc = '0, icache_pc;
  logic [W-1:0][31:0] icache_words;
  fetch_slot_t [W-1:0] out_grp, held;
  logic [NUM_CTX-1:0][15:0] bhr;
  logic fetched;
  logic [31:0] prog [WORDS];
  logic [PC_W-1:0] mpc [NUM_CTX];
  logic [PC_W-1:0] mras [NUM_CTX][$];
  int checks = 0, failures = 0, ngroups = 0, ncalls = 0;
  int last_tid = NUM_CTX - 1;
  logic prev_stall = 1'b0, prev_fetched = 1'b0, prev_hw = 1'b0;
  logic [NUM_CTX-1:0] prev_en = '0;

  fetch_unit #(.NUM_CTX(NUM_CTX), .W(W)) dut (.*);

  always_comb
    for (int i = 0; i < W; i++) icache_words[i] = prog[(int'(icache_pc) + i) % WORDS];

  always #5 clk = ~clk;

  function automatic logic [31:0] alu_word();
    return {4'($urandom_range(0, 7)), 28'($urandom)};
  endfunction

  initial begin
    for (int a = 0; a < FUNC; a++) begin
      automatic int k = $urandom_range(0, 19);
      if (k == 0)      prog[a] = enc(OP_JMP, 4'd0, 4'd0, 4'd0, 16'($urandom_range(0, FUNC - 20)));
      else if (k == 1) prog[a] = enc(OP_CALL, 4'd0, 4'd0, 4'd0, 16'($urandom_range(FUNC, WORDS - 1)));
      else             prog[a] = alu_word();
    end
    for (int a = FUNC - 10; a < FUNC; a++) prog[a] = enc(OP_JMP, 4'd0, 4'd0, 4'd0, 16'd0);
    for (int a = FUNC; a < WORDS; a++)
      prog[a] = ($urandom_range(0, 5) == 0 || a == WORDS - 1) ? enc(OP_RET, 4'd0, 4'd0, 4'd0, 16'd0) : alu_word();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NUM_CTX; t++) begin
      @(negedge clk);
      ctx_init_we = 1'b1; ctx_init_tid = TID_W'(t); ctx_init_pc = PC_W'(t * 800);
      mpc[t] = PC_W'(t * 800);
    end
    @(negedge clk);
    ctx_init_we = 1'b0;
    for (int c = 0; c < 30000; c++) begin
      @(negedge clk);
      // check the group loaded at the last edge
      if (prev_stall) begin
        checks++;
        if (out_grp !== held) begin failures++; $display("FAIL output changed during stall"); end
      end else if (prev_fetched) begin
        automatic int t = int'(out_grp[0].tid);
        automatic int lanes = prev_hw ? W/2 : W;
        automatic int exp_t = -1;
        automatic bit cut = 0;
        for (int k = 1; k <= NUM_CTX && exp_t < 0; k++)
          if (prev_en[(last_tid + k) % NUM_CTX]) exp_t = (last_tid + k) % NUM_CTX;
        checks++;
        if (t != exp_t) begin failures++; if (failures < 10) $display("FAIL picked %0d expected %0d", t, exp_t); end
        last_tid = t;
        ngroups++;
        for (int i = 0; i < W; i++) begin
          checks++;
          if (!cut && i < lanes) begin
            automatic logic [31:0] w = prog[mpc[t]];
            if (!out_grp[i].valid || out_grp[i].tid != TID_W'(t) || out_grp[i].pc !== mpc[t] ||
                out_grp[i].instr !== w) begin
              failures++;
              if (failures < 10) $display("FAIL t%0d lane %0d pc %0d expected %0d", t, i, out_grp[i].pc, mpc[t]);
            end
            case (opcode_e'(w[31:28]))
              OP_JMP:  begin mpc[t] = w[PC_W-1:0]; cut = 1; end
              OP_CALL: begin mras[t].push_back(mpc[t] + 1'b1); mpc[t] = w[PC_W-1:0]; cut = 1; ncalls++; end
              OP_RET:  begin mpc[t] = mras[t].pop_back(); cut = 1; end
              default: mpc[t] = mpc[t] + 1'b1;
            endcase
          end else if (out_grp[i].valid) begin
            failures++;
            if (failures < 10) $display("FAIL lane %0d valid after the end of the group", i);
          end
        end
      end else begin
        checks++;
        if (|{out_grp[0].valid, out_grp[1].valid, out_grp[2].valid, out_grp[3].valid}) begin
          failures++; $display("FAIL group without a fetch");
        end
      end
      held = out_grp;
      // drive the next cycle
      if (c % 500 == 0) begin
        ctx_enable = NUM_CTX'($urandom);
        half_width = $urandom_range(0, 1);
      end
      stall = $urandom_range(0, 5) == 0;
      #1;
      prev_stall   = stall;
      prev_fetched = fetched;
      prev_hw      = half_width;
      prev_en      = ctx_enable;
    end
    checks++;
    if (ngroups < 5000 || ncalls < 50) begin failures++; $display("FAIL too little fetched (%0d groups, %0d calls)", ngroups, ncalls); end
    $display("groups=%0d calls=%0d", ngroups, ncalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
