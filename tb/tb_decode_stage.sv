// tb_decode_stage: checks the decode latch stage.
//
// Random groups of instruction words go in; one cycle later each lane must
// hold the decoded micro-op (fields, functional unit, latency, which operands
// are read, whether a register is written), checked against an independent
// table of the instruction set. While stall is high the output must hold. In
// reduced width the upper two lanes must be Not Valid and their data latches
// must keep their old contents (they are clock-gated).
module tb_decode_stage;
  import morph_pkg::*;
  localparam int W = 4;

  logic clk = 1'b0, rst_n = 1'b0, half_width = 1'b0, stall = 1'b0;
  fetch_slot_t [W-1:0] in_grp;
  uop_t [W-1:0] out_uops, prev;
  fetch_slot_t [W-1:0] exp_in;
  logic exp_hw;
  int checks = 0, failures = 0;

  decode_stage #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check_lane(int i, fetch_slot_t f, logic hw, uop_t old);
    uop_t u = out_uops[i];
    logic [3:0] op = f.instr[31:28];
    logic dst, u1, u2; logic [3:0] lat; fu_class_e fu;
    dst = op inside {4'd1, 4'd2, 4'd3, 4'd4, 4'd5, 4'd6};
    u1  = op inside {4'd1, 4'd2, 4'd3, 4'd4, 4'd5, 4'd6, 4'd7};
    u2  = op inside {4'd1, 4'd2, 4'd3, 4'd5, 4'd7};
    lat = (op == 4'd5) ? 4'd4 : (op == 4'd6) ? 4'd3 : 4'd1;
    fu  = (op == 4'd5) ? FU_MUL : (op inside {4'd6, 4'd7}) ? FU_MEM : FU_ALU;
    checks++;
    if (hw && i >= W/2) begin
      if (u.valid !== 1'b0 || u.pc !== old.pc || u.op !== old.op) begin
        failures++;
        if (failures < 10) $display("FAIL lane %0d not gated in half width", i);
      end
    end else if (u.valid !== f.valid || u.tid !== f.tid || u.pc !== f.pc || u.op !== opcode_e'(op) ||
                 u.rd !== f.instr[27:24] || u.rs1 !== f.instr[23:20] || u.rs2 !== f.instr[19:16] ||
                 u.imm !== {{(XLEN-16){f.instr[15]}}, f.instr[15:0]} ||
                 (op <= 4'd10 && (u.has_dst !== dst || u.use1 !== u1 || u.use2 !== u2 ||
                                  u.lat !== lat || u.fu !== fu))) begin
      failures++;
      if (failures < 10) $display("FAIL lane %0d op %0d", i, op);
    end
  endtask

  initial begin
    in_grp = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      if (c > 0) for (int i = 0; i < W; i++) check_lane(i, exp_in[i], exp_hw, prev[i]);
      prev = out_uops;
      stall      = c > 0 && $urandom_range(0, 4) == 0;
      half_width = (c / 3000) % 2 == 1;
      for (int i = 0; i < W; i++) begin
        in_grp[i].valid = $urandom_range(0, 3) != 0;
        in_grp[i].tid   = TID_W'($urandom);
        in_grp[i].pc    = PC_W'($urandom);
        in_grp[i].instr = {4'($urandom_range(0, 10)), 28'($urandom)};
      end
      if (!stall) begin
        exp_in = in_grp;
        exp_hw = half_width;
      end else begin
        // on a stall the output keeps the last loaded group
        for (int i = 0; i < W; i++) prev[i].valid = out_uops[i].valid;
      end
    end
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
