// tb_reg_scoreboard: checks the register availability table.
//
// Every cycle random registers are broadcast (latency 1..4) and cleared. The
// reference keeps, per register, the cycle from which it is ready (or "not
// ready" after a clear). A register broadcast in cycle c with latency L must
// show rdy_now from cycle c+L on, exactly (back-to-back for L = 1); a cleared
// register stays not ready until its next broadcast; a broadcast beats a clear
// of the same register in the same cycle. The lookup ports must return the
// MATCH bit of the next cycle. reinit must make every register ready.
module tb_reg_scoreboard;
  import morph_pkg::*;
  localparam int N = 192, W = 4, NL = 8;

  logic clk = 1'b0, rst_n = 1'b0, reinit = 1'b0;
  logic [W-1:0] bc_v = '0, clr_v = '0;
  logic [W-1:0][PREG_W-1:0] bc_tag = '0, clr_tag = '0;
  logic [W-1:0][3:0] bc_lat = '0;
  logic [NL-1:0][PREG_W-1:0] lk_tag = '0;
  logic [NL-1:0] lk_m;
  logic [NL-1:0][7:0] lk_shift;
  logic [N-1:0] rdy_now;
  longint rdy_at [N];      // -1: not ready (cleared, no broadcast yet)
  longint cyc = 0;
  int checks = 0, failures = 0, n_lat_checked = 0;

  reg_scoreboard #(.N(N), .W(W), .NL(NL)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < N; i++) rdy_at[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      cyc++;
      // compare the current state
      for (int i = 0; i < N; i++) begin
        logic e;
        e = rdy_at[i] >= 0 && rdy_at[i] <= cyc;
        checks++;
        if (rdy_now[i] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL cyc %0d reg %0d rdy %0d expected %0d", cyc, i, rdy_now[i], e);
        end
        if (rdy_at[i] == cyc) n_lat_checked++;
      end
      // drive this cycle
      reinit = (c % 5000 == 4999);
      for (int k = 0; k < W; k++) begin
        bc_v[k]    = $urandom_range(0, 2) != 0;
        bc_tag[k]  = PREG_W'($urandom_range(0, 15) + 16 * k);   // distinct per lane
        bc_lat[k]  = 4'($urandom_range(1, 4));
        clr_v[k]   = $urandom_range(0, 3) == 0;
        clr_tag[k] = PREG_W'($urandom_range(0, N - 1));
        if ($urandom_range(0, 3) == 0) clr_tag[k] = bc_tag[k];
      end
      for (int l = 0; l < NL; l++) lk_tag[l] = (l < W) ? bc_tag[l] : PREG_W'($urandom_range(0, N - 1));
      // next state of the reference
      if (reinit) begin
        for (int i = 0; i < N; i++) rdy_at[i] = 0;
      end else begin
        for (int k = 0; k < W; k++) if (clr_v[k]) rdy_at[clr_tag[k]] = -1;
        for (int k = 0; k < W; k++) if (bc_v[k]) rdy_at[bc_tag[k]] = cyc + longint'(bc_lat[k]);
      end
      #1;
      if (!reinit)
        for (int l = 0; l < NL; l++) begin
          checks++;
          if (lk_m[l] !== (rdy_at[lk_tag[l]] >= 0)) begin
            failures++;
            if (failures < 10) $display("FAIL lookup %0d reg %0d m=%0d", l, lk_tag[l], lk_m[l]);
          end
        end
    end
    checks++;
    if (n_lat_checked < 1000) begin failures++; $display("FAIL too few latency checks"); end
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
