// tb_dcache: checks the two-read-port, one-write-port data memory.
//
// The whole memory is first written with known values, then random reads on
// both ports and random writes run together. Reads are registered: the data
// of the address presented in cycle c appears after the edge that ends cycle
// c and is the value before any write at that same edge.
module tb_dcache;
  import morph_pkg::*;
  localparam int WORDS = 4096, NPORT = 2;

  logic clk = 1'b0;
  logic [NPORT-1:0][ADDR_W-1:0] rd_addr = '0;
  logic [NPORT-1:0][XLEN-1:0]   rd_data;
  logic we = 1'b0;
  logic [ADDR_W-1:0] waddr = '0;
  logic [XLEN-1:0]   wdata = '0;
  logic [XLEN-1:0]   refm [WORDS];
  logic [NPORT-1:0][XLEN-1:0] expd;
  int checks = 0, failures = 0;

  dcache #(.WORDS(WORDS), .NPORT(NPORT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = ADDR_W'(a); wdata = {$urandom, $urandom};
      refm[a] = wdata;
    end
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      if (c > 0)
        for (int k = 0; k < NPORT; k++) begin
          checks++;
          if (rd_data[k] !== expd[k]) begin
            failures++;
            if (failures < 10) $display("FAIL port %0d addr %0d got %h expected %h", k, rd_addr[k], rd_data[k], expd[k]);
          end
        end
      for (int k = 0; k < NPORT; k++) begin
        rd_addr[k] = ADDR_W'($urandom_range(0, WORDS - 1));
        if ($urandom_range(0, 3) == 0) rd_addr[k] = waddr;
        expd[k] = refm[rd_addr[k]];
      end
      we    = $urandom_range(0, 1);
      if ($urandom_range(0, 2) == 0) waddr = rd_addr[0];
      else waddr = ADDR_W'($urandom_range(0, WORDS - 1));
      wdata = {$urandom, $urandom};
      if (we) refm[waddr] = wdata;
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
