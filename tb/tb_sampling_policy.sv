// tb_sampling_policy: checks the quantum/interval sampling policy.
//
// A reduced quantum (2000 instructions) and interval (100) are used. Each cycle
// 0..4 instructions commit at random and the energy input depends on the mode
// the policy currently selects, so each mode has its own energy per cycle and,
// through a mode-dependent commit rate, its own cycle count. A reference model
// counts instructions, cycles and energy per sampling interval, predicts the
// chosen mode for each objective (fewest cycles, least energy, least energy
// within x% of the fastest) and checks mode, sampling flag, decision pulse
// timing and the chosen mode, over several quanta with changing objectives.
module tb_sampling_policy;
  localparam int QUANTUM = 2000, INTERVAL = 100;

  logic clk = 1'b0, rst_n = 1'b0, hold = 1'b0;
  logic [2:0] commits = '0;
  logic [15:0] energy = '0;
  logic [1:0] objective = '0;
  logic [6:0] x_pct = 7'd10;
  logic [1:0] mode, chosen;
  logic sampling, decided;
  int checks = 0, failures = 0;

  sampling_policy #(.QUANTUM(QUANTUM), .INTERVAL(INTERVAL), .REPL(1)) dut (.*);

  always #5 clk = ~clk;

  // reference state
  longint icnt = 0, intv = 0, ccur = 0, ecur = 0;
  longint cyc [4], en [4];
  int     epc [4], rate [4];
  int     exp_choice = 0, n_dec = 0;

  function automatic int ref_pick(int obj, int x);
    longint best = cyc[0], beste;
    int p = 0; bit have = 0;
    for (int i = 1; i < 4; i++) if (cyc[i] < best) best = cyc[i];
    for (int i = 0; i < 4; i++) begin
      bit ok = (obj == 0) ? (cyc[i] == best) : (obj == 1) ? 1'b1 : (cyc[i] * (100 - x) <= best * 100);
      if (obj == 0) begin if (ok && !have) begin have = 1; p = i; end end
      else if (ok && (!have || en[i] < beste)) begin have = 1; beste = en[i]; p = i; end
    end
    return p;
  endfunction

  // new per-mode rates and energies, and the next objective, for each quantum
  task automatic new_quantum(int q);
    objective = 2'(q % 3);
    for (int m = 0; m < 4; m++) begin
      epc[m]  = $urandom_range(50, 400);
      rate[m] = $urandom_range(1, 4);
      cyc[m] = 0; en[m] = 0;
    end
  endtask

  initial begin
    new_quantum(0);
    begin
      repeat (25000) begin
        @(negedge clk);
        if (!rst_n) rst_n = 1'b1;
        // drive from the current mode
        energy  = 16'(epc[mode]);
        commits = 3'($urandom_range(0, rate[mode]));
        #1;
        // check mode / sampling before the edge
        checks++;
        if (sampling !== (intv < 4) || (intv < 4 && mode !== 2'(intv % 4)) ||
            (intv >= 4 && mode !== 2'(exp_choice))) begin
          failures++;
          if (failures < 10) $display("FAIL mode %0d sampling %0d, interval %0d expect choice %0d", mode, sampling, intv, exp_choice);
        end
        // reference of this cycle
        ccur++; ecur += energy; icnt += commits;
        if (icnt >= INTERVAL) begin
          icnt -= INTERVAL;
          if (intv < 4) begin cyc[intv % 4] += ccur; en[intv % 4] += ecur; end
          checks++;
          if (decided !== (intv == 3)) begin failures++; $display("FAIL decided=%0d at interval %0d", decided, intv); end
          if (intv == 3) begin
            exp_choice = ref_pick(int'(objective), int'(x_pct));
            n_dec++;
          end
          ccur = 0; ecur = 0;
          intv++;
          if (intv >= QUANTUM / INTERVAL) begin
            intv = 0;
            new_quantum(n_dec);
          end
        end else begin
          checks++;
          if (decided) begin failures++; $display("FAIL decided without interval end"); end
        end
        @(posedge clk);
        #1;
        if (intv == 4 && ccur == 0 && icnt < INTERVAL) begin
          checks++;
          if (chosen !== 2'(exp_choice)) begin
            failures++;
            $display("FAIL chosen %0d expected %0d (objective %0d)", chosen, exp_choice, objective);
          end
        end
      end
    end
    checks++;
    if (n_dec < 3) begin failures++; $display("FAIL only %0d decisions", n_dec); end
    $display("decisions=%0d", n_dec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
