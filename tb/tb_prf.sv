// tb_prf: checks the physical register file against a reference array.
//
// Four write ports and eight read ports at the full size (192 entries). Each
// cycle random ports write random entries below the active limit (192, then 60
// as in the reduced window, then 128 as in InOrder mode); when two ports write
// the same entry the higher-numbered one must win. Reads are combinational and
// must return the reference value, or zero above the active limit.
module tb_prf;
  import morph_pkg::*;
  localparam int N = 192, NR = 8, NW = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [PREG_W:0] active = 9'd192;
  logic [NR-1:0][PREG_W-1:0] raddr;
  logic [NR-1:0][XLEN-1:0]   rdata;
  logic [NW-1:0]             we;
  logic [NW-1:0][PREG_W-1:0] waddr;
  logic [NW-1:0][XLEN-1:0]   wdata;
  logic [XLEN-1:0] refm [N];
  int checks = 0, failures = 0;

  prf #(.N(N), .NR(NR), .NW(NW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    we = '0; raddr = '0; waddr = '0; wdata = '0;
    for (int i = 0; i < N; i++) refm[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 6000; c++) begin
      @(negedge clk);
      if (c == 2000) active = 9'd60;
      if (c == 4000) active = 9'd128;
      for (int k = 0; k < NW; k++) begin
        we[k]    = $urandom_range(0, 1);
        waddr[k] = PREG_W'($urandom_range(0, int'(active) - 1));
        if ($urandom_range(0, 3) == 0 && k > 0) waddr[k] = waddr[k-1];
        wdata[k] = {$urandom, $urandom};
      end
      for (int k = 0; k < NR; k++) raddr[k] = PREG_W'($urandom_range(0, N - 1));
      #1;
      for (int k = 0; k < NR; k++) begin
        logic [XLEN-1:0] e;
        e = (int'(raddr[k]) < int'(active)) ? refm[raddr[k]] : '0;
        checks++;
        if (rdata[k] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL read %0d got %h expected %h", raddr[k], rdata[k], e);
        end
      end
      for (int k = 0; k < NW; k++) if (we[k]) refm[waddr[k]] = wdata[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
