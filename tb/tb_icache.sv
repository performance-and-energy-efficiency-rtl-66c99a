// tb_icache: checks the instruction memory.
//
// All 8192 words are written through the write port, then random fetch
// addresses (including the last words, where the group wraps to address 0)
// must return the four consecutive words in the same cycle (combinational
// read), also right after a write to one of them.
module tb_icache;
  import morph_pkg::*;
  localparam int WORDS = 8192, W = 4;

  logic clk = 1'b0, we = 1'b0;
  logic [PC_W-1:0] waddr = '0, rd_pc = '0;
  logic [31:0] wdata = '0;
  logic [W-1:0][31:0] rd_words;
  logic [31:0] refm [WORDS];
  int checks = 0, failures = 0;

  icache #(.WORDS(WORDS), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = PC_W'(a); wdata = $urandom;
      refm[a] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      if (we) refm[waddr] = wdata;     // written at the edge just passed
      rd_pc = PC_W'((c % 7 == 0) ? WORDS - $urandom_range(1, 4) : $urandom_range(0, WORDS - 1));
      #1;
      for (int i = 0; i < W; i++) begin
        checks++;
        if (rd_words[i] !== refm[(int'(rd_pc) + i) % WORDS]) begin
          failures++;
          if (failures < 10) $display("FAIL pc %0d word %0d", rd_pc, i);
        end
      end
      we    = $urandom_range(0, 1);
      waddr = PC_W'(int'(rd_pc) + $urandom_range(0, 3));
      wdata = $urandom;
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
